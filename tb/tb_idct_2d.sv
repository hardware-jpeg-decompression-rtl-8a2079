// tb_idct_2d: register-level test of the dequantising 2D-IDCT peripheral.
//
// Writes complete 8x8 blocks row by row exactly as the driver does (eight
// quantisation registers, then four coefficient pairs, back-to-back one
// transfer per cycle), polls DONE, reads the eight output rows, and compares
// every sample with an integer model of dequantisation, the fixed-point row
// and column 1D-IDCTs and the range limit (exact match), and with the
// real-valued 2D-IDCT (within a tolerance). Checks the register read-back,
// that a block finishes within the 186 clock cycles the accelerator needs,
// that both clamp limits occur, and that a row write arriving during the
// column pass is stalled and then processed correctly.
module tb_idct_2d;
  import jpeg_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  reg_bus_if #(.ADDR_W(5)) bus (.clk, .rst);
  logic done;
  idct_2d dut (.clk, .rst, .bus(bus), .done);

  int checks = 0, failures = 0, stalls = 0, clamp_lo = 0, clamp_hi = 0;
  int cycle = 0;
  real max_err = 0.0;
  always @(posedge clk) cycle <= cycle + 1;

  // ------------------------------------------------------------ model
  function automatic int s16(longint v);
    return int'($signed(16'(v)));
  endfunction

  function automatic void idct1(input int x [8], output int y [8]);
    longint a0, a1, r2, r3, d, s, e [4], o4, o5, o6, o7, o [4];
    a0 = (longint'(x[0]) + x[4]) * 256;
    a1 = (longint'(x[0]) - x[4]) * 256;
    r2 = longint'(x[2]) * 139 - longint'(x[6]) * 335;
    r3 = longint'(x[2]) * 335 + longint'(x[6]) * 139;
    d  = (longint'(x[1]) - x[7]) * 181;
    s  = (longint'(x[1]) + x[7]) * 181;
    e[0] = a0 + r3; e[3] = a0 - r3; e[1] = a1 + r2; e[2] = a1 - r2;
    o4 = d + longint'(x[5]) * 256; o6 = d - longint'(x[5]) * 256;
    o7 = s + longint'(x[3]) * 256; o5 = s - longint'(x[3]) * 256;
    o[3] = o4 * 301 - o7 * 201;
    o[0] = o4 * 201 + o7 * 301;
    o[2] = o5 * 355 - o6 * 71;
    o[1] = o5 * 71 + o6 * 355;
    for (int n = 0; n < 4; n++) begin
      y[n]     = s16(((e[n] * 256 + o[n]) * 91) >>> 24);
      y[7 - n] = s16(((e[n] * 256 - o[n]) * 91) >>> 24);
    end
  endfunction

  int coefm [8][8], quantm [8][8], deqm [8][8], expm [8][8];
  real exact [8][8];

  task automatic build_model();
    int t [8][8];
    int v [8], w [8];
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) deqm[r][c] = s16(longint'(coefm[r][c]) * quantm[r][c]);
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < 8; c++) v[c] = deqm[r][c];
      idct1(v, w);
      for (int c = 0; c < 8; c++) t[r][c] = w[c];
    end
    for (int c = 0; c < 8; c++) begin
      for (int r = 0; r < 8; r++) v[r] = t[r][c];
      idct1(v, w);
      for (int r = 0; r < 8; r++) expm[r][c] = w[r] < -128 ? 0 : (w[r] > 127 ? 255 : w[r] + 128);
    end
    for (int x = 0; x < 8; x++)
      for (int y = 0; y < 8; y++) begin
        real acc = 0.0;
        for (int u = 0; u < 8; u++)
          for (int vv = 0; vv < 8; vv++)
            acc += (u == 0 ? 0.70710678 : 1.0) * (vv == 0 ? 0.70710678 : 1.0) * deqm[u][vv] *
                   $cos((2 * y + 1) * vv * 3.14159265358979 / 16.0) *
                   $cos((2 * x + 1) * u * 3.14159265358979 / 16.0);
        acc = acc / 4.0 + 128.0;
        exact[x][y] = acc < 0.0 ? 0.0 : (acc > 255.0 ? 255.0 : acc);
      end
  endtask

  // ------------------------------------------------------------ bus
  task automatic xfer(input bit is_wr, input int a, input logic [31:0] d,
                      output logic [31:0] q);
    bus.wr = is_wr; bus.rd = !is_wr; bus.addr = 5'(a); bus.wdata = d;
    forever begin
      @(negedge clk);
      if (bus.ack) begin q = bus.rdata; break; end
      stalls++;
    end
    @(posedge clk); #1;
    bus.wr = 0; bus.rd = 0;
  endtask

  task automatic wr(int a, logic [31:0] d);
    logic [31:0] q;
    xfer(1, a, d, q);
  endtask

  task automatic rd(int a, output logic [31:0] q);
    xfer(0, a, '0, q);
  endtask

  task automatic write_row(int r);
    for (int c = 0; c < 8; c++) wr(IDCT_R_QUANT0 + c, 32'(quantm[r][c]));
    for (int k = 0; k < 4; k++)
      wr(IDCT_R_COEF0 + k, {16'(coefm[r][2*k+1]), 16'(coefm[r][2*k])});
  endtask

  task automatic read_and_check(string name);
    logic [31:0] q0, q1;
    for (int r = 0; r < 8; r++) begin
      rd(IDCT_R_OUT0, q0);
      rd(IDCT_R_OUT1, q1);
      for (int c = 0; c < 8; c++) begin
        int got;
        real err;
        got = (c < 4) ? int'(q0[8*c +: 8]) : int'(q1[8*(c-4) +: 8]);
        if (got == 0 && expm[r][c] == 0) clamp_lo++;
        if (got == 255 && expm[r][c] == 255) clamp_hi++;
        checks++;
        if (got != expm[r][c]) begin
          failures++;
          $display("%s: out[%0d][%0d] = %0d, model %0d", name, r, c, got, expm[r][c]);
        end
        err = real'(got) - exact[r][c];
        if (err < 0.0) err = -err;
        checks++;
        if (err > max_err) max_err = err;
        if (err > 9.0) begin
          failures++;
          $display("%s: out[%0d][%0d] = %0d, exact %f", name, r, c, got, exact[r][c]);
        end
      end
    end
  endtask

  task automatic make_block(int kind);
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        quantm[r][c] = int'($urandom_range(1, 24)) + r + c;
        // typical block: energy falls off with frequency
        coefm[r][c] = (r + c > 6) ? 0 : int'($urandom_range(0, 2 * (16 >> (r + c / 2)) + 2)) - ((16 >> (r + c / 2)) + 1);
      end
    case (kind)
      1: begin coefm[0][0] = 100; quantm[0][0] = 16; end   // very bright: clamps high
      2: begin coefm[0][0] = -100; quantm[0][0] = 16; end  // very dark: clamps low
      default: begin coefm[0][0] = int'($urandom_range(0, 60)) - 30; quantm[0][0] = 16; end
    endcase
    build_model();
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q;
    int t0, t_done;
    bus.wr = 0; bus.rd = 0; bus.addr = '0; bus.wdata = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;

    for (int b = 0; b < 12; b++) begin
      make_block(b % 3);
      t0 = cycle;
      for (int r = 0; r < 8; r++) write_row(r);
      // register read-back of the last row's values
      rd(IDCT_R_QUANT0 + 3, q);
      checks++;
      if (q[15:0] != 16'(quantm[7][3])) begin failures++; $display("quant read-back %h", q); end
      rd(IDCT_R_COEF0 + 2, q);
      checks++;
      if (q != {16'(coefm[7][5]), 16'(coefm[7][4])}) begin failures++; $display("coef read-back %h", q); end
      do rd(IDCT_R_DONE, q); while (q[0] !== 1'b1);
      t_done = cycle;
      checks++;
      if (t_done - t0 > 186) begin
        failures++; $display("block took %0d cycles", t_done - t0);
      end
      if (b == 0) $display("block of 96 writes done after %0d cycles", t_done - t0);
      read_and_check($sformatf("block %0d", b));
    end

    // stall: next block's last coefficient write lands in the column pass
    make_block(0);
    for (int r = 0; r < 8; r++) write_row(r);
    begin
      int s0;
      s0 = stalls;
      make_block(0);
      write_row(0);
      checks++;
      if (stalls == s0) begin failures++; $display("no stall seen"); end
      for (int r = 1; r < 8; r++) write_row(r);
      do rd(IDCT_R_DONE, q); while (q[0] !== 1'b1);
      read_and_check("after stall");
    end

    checks++;
    if (clamp_lo == 0 || clamp_hi == 0) begin
      failures++; $display("clamps seen: low %0d high %0d", clamp_lo, clamp_hi);
    end
    $display("stalls %0d clamp_lo %0d clamp_hi %0d, largest distance from the exact IDCT %f",
             stalls, clamp_lo, clamp_hi, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
