// tb_jpeg_accel_top: end-to-end test of the accelerator at its default
// parameters.
//
// Plays the part of the decoder software on a small 16x16-pixel colour image
// without chroma subsampling: for each of the three components and each 8x8
// block it writes the quantised coefficients and the quantisation table row
// by row into the IDCT peripheral (at its base address), polls DONE and reads
// the eight output rows; then it feeds the Y, Cb and Cr planes four pixels at
// a time through the colour converter and reads the interleaved RGB bytes.
// Every RGB byte is compared with an integer model of the whole chain.
//
// It also counts the mechanisms of the design and fails if one never
// happened: dequantisation with a table entry above one, rows overlapping in
// the 1D-IDCT pipeline with further register writes, the column pass,
// IDCT range limiting at both ends, colour clamping at both ends, stalled
// colour reads, a stalled IDCT row write, and an access to an unmapped
// address.
module tb_jpeg_accel_top;
  import jpeg_pkg::*;

  localparam logic [31:0] IDCT_BASE = 32'hA6E2_0000;
  localparam logic [31:0] CC_BASE   = 32'hA6E3_0000;
  localparam int W = 16, H = 16;

  logic        clk = 0, rst = 1;
  logic        bus_wr = 0, bus_rd = 0;
  logic [31:0] bus_addr = '0, bus_wdata = '0, bus_rdata;
  logic        bus_ack, idct_done, cc_busy;
  always #5 clk = ~clk;

  jpeg_accel_top dut (.*);

  int checks = 0, failures = 0;
  int n_stall_cc = 0, n_stall_idct = 0, n_overlap = 0, n_cols = 0, n_unmapped = 0;
  int n_deq = 0, n_ilo = 0, n_ihi = 0, n_clo = 0, n_chi = 0;

  // observe the shared 1D-IDCT: results leaving the pipe while software writes
  always @(posedge clk) begin
    if (dut.u_idct.idct_out_valid && bus_wr && bus_ack) n_overlap++;
    if (dut.u_idct.col_we) n_cols++;
  end

  // ------------------------------------------------------------ model
  function automatic int s16(longint v);
    return int'($signed(16'(v)));
  endfunction

  function automatic void idct1(input int x [8], output int y [8]);
    longint a0, a1, r2, r3, d, s, e [4], o4, o5, o6, o7, o [4];
    a0 = (longint'(x[0]) + longint'(x[4])) * 256;
    a1 = (longint'(x[0]) - longint'(x[4])) * 256;
    r2 = longint'(x[2]) * 139 - longint'(x[6]) * 335;
    r3 = longint'(x[2]) * 335 + longint'(x[6]) * 139;
    d  = (longint'(x[1]) - longint'(x[7])) * 181;
    s  = (longint'(x[1]) + longint'(x[7])) * 181;
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

  function automatic int clamp(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  int coef  [3][H][W];   // quantised coefficients, block layout
  int qtab  [3][8][8];
  int plane [3][H][W];   // model samples
  int hwpl  [3][H][W];   // samples read from the IDCT peripheral

  task automatic model_block(int ch, int by, int bx);
    int t [8][8];
    int v [8], w [8];
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < 8; c++) v[c] = s16(longint'(coef[ch][by*8+r][bx*8+c]) * qtab[ch][r][c]);
      idct1(v, w);
      for (int c = 0; c < 8; c++) t[r][c] = w[c];
    end
    for (int c = 0; c < 8; c++) begin
      for (int r = 0; r < 8; r++) v[r] = t[r][c];
      idct1(v, w);
      for (int r = 0; r < 8; r++) begin
        plane[ch][by*8+r][bx*8+c] = w[r] < -128 ? 0 : (w[r] > 127 ? 255 : w[r] + 128);
        if (w[r] < -128) n_ilo++;
        if (w[r] > 127)  n_ihi++;
      end
    end
  endtask

  // ------------------------------------------------------------ bus
  task automatic xfer(input bit is_wr, input logic [31:0] a, input logic [31:0] d,
                      output logic [31:0] q, output int stalled);
    bus_wr = is_wr; bus_rd = !is_wr; bus_addr = a; bus_wdata = d;
    stalled = 0;
    forever begin
      @(negedge clk);
      if (bus_ack) begin q = bus_rdata; break; end
      stalled++;
    end
    @(posedge clk); #1;
    bus_wr = 0; bus_rd = 0;
  endtask

  task automatic wr_idct(int reg_i, logic [31:0] d);
    logic [31:0] q; int s;
    xfer(1, IDCT_BASE + 32'(4 * reg_i), d, q, s);
    n_stall_idct += s;
  endtask

  task automatic write_block(int ch, int by, int bx);
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < 8; c++) begin
        wr_idct(IDCT_R_QUANT0 + c, 32'(qtab[ch][r][c]));
        if (qtab[ch][r][c] > 1 && coef[ch][by*8+r][bx*8+c] != 0) n_deq++;
      end
      for (int k = 0; k < 4; k++)
        wr_idct(IDCT_R_COEF0 + k, {16'(coef[ch][by*8+r][bx*8+2*k+1]),
                                   16'(coef[ch][by*8+r][bx*8+2*k])});
    end
  endtask

  task automatic read_block(int ch, int by, int bx);
    logic [31:0] q0, q1; int s, polls;
    // poll DONE as the driver does, but give up after 400 reads
    polls = 0;
    do begin
      xfer(0, IDCT_BASE + 32'(4 * IDCT_R_DONE), '0, q0, s);
      polls++;
    end while (q0[0] !== 1'b1 && polls < 400);
    checks++;
    if (q0[0] !== 1'b1) begin
      failures++;
      $display("block ch %0d (%0d,%0d): DONE never set", ch, by, bx);
    end
    for (int r = 0; r < 8; r++) begin
      xfer(0, IDCT_BASE + 32'(4 * IDCT_R_OUT0), '0, q0, s);
      xfer(0, IDCT_BASE + 32'(4 * IDCT_R_OUT1), '0, q1, s);
      for (int c = 0; c < 4; c++) begin
        hwpl[ch][by*8+r][bx*8+c]   = int'(q0[8*c +: 8]);
        hwpl[ch][by*8+r][bx*8+c+4] = int'(q1[8*c +: 8]);
      end
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q, w [3];
    int s;
    repeat (3) @(posedge clk);
    #1 rst = 0;

    // --------------- image content: smooth gradients plus strong extremes
    for (int ch = 0; ch < 3; ch++) begin
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) qtab[ch][r][c] = 2 + r + c + (ch > 0 ? 4 : 0);
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          int r, c;
          r = y % 8; c = x % 8;
          coef[ch][y][x] = (r + c > 5) ? 0 : int'($urandom_range(0, 8)) - 4;
        end
      // DC per block: one saturating bright, one dark, two mid-range
      coef[ch][0][0] = 90;  coef[ch][0][8] = -90;
      coef[ch][8][0] = 10 * (ch - 1);  coef[ch][8][8] = -5;
      qtab[ch][0][0] = 16;
    end
    // chroma extremes so that the colour converter clamps
    coef[2][0][0] = 60; coef[1][0][8] = 60;

    // --------------- IDCT of all 12 blocks
    for (int ch = 0; ch < 3; ch++)
      for (int by = 0; by < H / 8; by++)
        for (int bx = 0; bx < W / 8; bx++) begin
          model_block(ch, by, bx);
          write_block(ch, by, bx);
          read_block(ch, by, bx);
        end
    for (int ch = 0; ch < 3; ch++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          checks++;
          if (hwpl[ch][y][x] != plane[ch][y][x]) begin
            failures++;
            $display("IDCT ch %0d (%0d,%0d) = %0d, model %0d", ch, y, x, hwpl[ch][y][x], plane[ch][y][x]);
          end
        end

    // --------------- an IDCT row write during the column pass is stalled
    write_block(0, 0, 0);
    write_block(0, 0, 0);   // its last row trigger waits for the first block
    read_block(0, 0, 0);
    for (int y = 0; y < 8; y++)
      for (int x = 0; x < 8; x++) begin
        checks++;
        if (hwpl[0][y][x] != plane[0][y][x]) begin
          failures++; $display("IDCT after stall (%0d,%0d) = %0d", y, x, hwpl[0][y][x]);
        end
      end

    // --------------- colour conversion, 4 pixels per transfer
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x += 4) begin
        logic [31:0] wy, wb, wr_;
        for (int p = 0; p < 4; p++) begin
          wy[8*p +: 8]  = 8'(hwpl[0][y][x+p]);
          wb[8*p +: 8]  = 8'(hwpl[1][y][x+p]);
          wr_[8*p +: 8] = 8'(hwpl[2][y][x+p]);
        end
        xfer(1, CC_BASE + 32'(4 * CC_R_Y),  wy,  q, s);
        xfer(1, CC_BASE + 32'(4 * CC_R_CB), wb,  q, s);
        xfer(1, CC_BASE + 32'(4 * CC_R_CR), wr_, q, s);
        for (int k = 0; k < 3; k++) begin
          xfer(0, CC_BASE + 32'(4 * (CC_R_RGB0 + k)), '0, w[k], s);
          n_stall_cc += s;
        end
        for (int p = 0; p < 4; p++) begin
          int yy, cb, cr;
          int e [3], raw [3];
          yy = plane[0][y][x+p]; cb = plane[1][y][x+p]; cr = plane[2][y][x+p];
          raw[0] = yy + ((91881 * (cr - 128) + 32768) >>> 16);
          raw[1] = yy + ((32768 - 46802 * (cr - 128) - 22554 * (cb - 128)) >>> 16);
          raw[2] = yy + ((116130 * (cb - 128) + 32768) >>> 16);
          for (int k = 0; k < 3; k++) begin
            int idx, got;
            idx = 3 * p + k;
            e[k] = clamp(raw[k]);
            if (raw[k] < 0) n_clo++;
            if (raw[k] > 255) n_chi++;
            got = int'(w[idx / 4][8 * (idx % 4) +: 8]);
            checks++;
            if (got != e[k]) begin
              failures++;
              $display("RGB (%0d,%0d) comp %0d = %0d, model %0d", y, x + p, k, got, e[k]);
            end
          end
        end
      end

    // --------------- unmapped address: acknowledged, reads zero
    xfer(0, 32'h1000_0000, '0, q, s);
    n_unmapped++;
    checks++;
    if (q != 0 || s != 0) begin failures++; $display("unmapped read %h stalled %0d", q, s); end

    $display("mechanisms: dequant %0d overlap %0d column-writes %0d idct-clamp lo %0d hi %0d",
             n_deq, n_overlap, n_cols, n_ilo, n_ihi);
    $display("            colour-clamp lo %0d hi %0d colour-stall %0d idct-stall %0d unmapped %0d",
             n_clo, n_chi, n_stall_cc, n_stall_idct, n_unmapped);
    begin
      int m [10];
      m = '{n_deq, n_overlap, n_cols, n_ilo, n_ihi, n_clo, n_chi, n_stall_cc, n_stall_idct, n_unmapped};
      for (int i = 0; i < 10; i++) begin
        checks++;
        if (m[i] == 0) begin failures++; $display("mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
