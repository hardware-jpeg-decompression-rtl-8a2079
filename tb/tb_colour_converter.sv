// tb_colour_converter: register-level test of the four-pixel YCC-to-RGB
// peripheral.
//
// Writes Y, Cb and Cr words back-to-back, reads the three packed RGB words
// and compares every byte with the conversion formula evaluated in integer
// arithmetic in the testbench. Checks the register read-back, that the
// results can be read in the ninth cycle counted from the Y write (reads
// issued earlier are stalled until then), and that both clamp limits occur.
module tb_colour_converter;
  import jpeg_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  reg_bus_if #(.ADDR_W(3)) bus (.clk, .rst);
  logic busy;
  colour_converter dut (.clk, .rst, .bus(bus), .busy);

  int checks = 0, failures = 0, stalls = 0, clamp_lo = 0, clamp_hi = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic int clamp(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  function automatic void ref_px(input int y, cb, cr, output int r, g, b);
    r = clamp(y + ((91881 * (cr - 128) + 32768) >>> 16));
    b = clamp(y + ((116130 * (cb - 128) + 32768) >>> 16));
    g = clamp(y + ((32768 - 46802 * (cr - 128) - 22554 * (cb - 128)) >>> 16));
  endfunction

  task automatic xfer(input bit is_wr, input int a, input logic [31:0] d,
                      output logic [31:0] q);
    bus.wr = is_wr; bus.rd = !is_wr; bus.addr = 3'(a); bus.wdata = d;
    forever begin
      @(negedge clk);
      if (bus.ack) begin q = bus.rdata; break; end
      stalls++;
    end
    @(posedge clk); #1;
    bus.wr = 0; bus.rd = 0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q, w [3];
    logic [7:0] got [12], expb [12];
    int ys [4], cbs [4], crs [4], er, eg, eb;
    int t0, s0;
    bus.wr = 0; bus.rd = 0; bus.addr = '0; bus.wdata = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;

    for (int t = 0; t < 400; t++) begin
      for (int p = 0; p < 4; p++) begin
        ys[p]  = int'($urandom_range(0, 255));
        cbs[p] = int'($urandom_range(0, 255));
        crs[p] = int'($urandom_range(0, 255));
        ref_px(ys[p], cbs[p], crs[p], er, eg, eb);
        expb[3*p] = 8'(er); expb[3*p+1] = 8'(eg); expb[3*p+2] = 8'(eb);
      end
      t0 = cycle;
      xfer(1, CC_R_Y,  {8'(ys[3]),  8'(ys[2]),  8'(ys[1]),  8'(ys[0])},  q);
      xfer(1, CC_R_CB, {8'(cbs[3]), 8'(cbs[2]), 8'(cbs[1]), 8'(cbs[0])}, q);
      xfer(1, CC_R_CR, {8'(crs[3]), 8'(crs[2]), 8'(crs[1]), 8'(crs[0])}, q);
      s0 = stalls;
      xfer(0, CC_R_RGB0, '0, w[0]);
      // the first RGB read completes on the ninth edge counted from the Y write
      checks++;
      if (cycle - t0 != 9) begin
        failures++; $display("first RGB read after %0d cycles, expected 9", cycle - t0);
      end
      checks++;
      if (stalls - s0 != 5) begin
        failures++; $display("RGB read stalled %0d cycles, expected 5", stalls - s0);
      end
      xfer(0, CC_R_RGB1, '0, w[1]);
      xfer(0, CC_R_RGB2, '0, w[2]);
      for (int k = 0; k < 12; k++) got[k] = w[k / 4][8 * (k % 4) +: 8];
      for (int k = 0; k < 12; k++) begin
        checks++;
        if (got[k] == 0 && expb[k] == 0) clamp_lo++;
        if (got[k] == 255 && expb[k] == 255) clamp_hi++;
        if (got[k] != expb[k]) begin
          failures++;
          $display("set %0d byte %0d (pixel %0d %s) = %0d, expected %0d", t, k, k / 3,
                   (k % 3 == 0) ? "R" : (k % 3 == 1) ? "G" : "B", got[k], expb[k]);
        end
      end
      if (t % 50 == 0) begin
        xfer(0, CC_R_CB, '0, q);
        checks++;
        if (q != {8'(cbs[3]), 8'(cbs[2]), 8'(cbs[1]), 8'(cbs[0])}) begin
          failures++; $display("Cb read-back %h", q);
        end
      end
    end
    checks++;
    if (clamp_lo == 0 || clamp_hi == 0) begin
      failures++; $display("clamps seen: low %0d high %0d", clamp_lo, clamp_hi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
