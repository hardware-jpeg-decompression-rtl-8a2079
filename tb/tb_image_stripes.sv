// tb_image_stripes: runs the accelerator, at its default parameters, on one
// full-width stripe of eight pixel rows at each of nine photo sizes, and
// projects the hardware-only decode time of the whole images.
//
// The sizes are those of a set of test photographs at about 5, 10 and 20
// megapixels (three scenes each), coded 4:4:4 without chroma subsampling.
// The pictures themselves are not available, so the coefficients are
// generated: per block a random DC level and a few low-frequency AC terms,
// with DC values large enough that the range limiter and the colour clamp
// both act. For each image the testbench acts as the decoder software does:
// every 8x8 block of every component of the stripe (the last block column
// padded when the width is not a multiple of 8) is written row by row,
// quantisation row first, into the IDCT peripheral; DONE is polled and the
// eight output rows are read. Then each stripe row is colour converted four
// pixels at a time. Every R, G and B byte is compared with an integer model.
//
// Timing checks, one per block and one per four-pixel group:
//  - from the first register write of a block to the cycle in which DONE is
//    set, at most 186 clocks (the reference system's figure per 8x8 block);
//  - the first RGB read after the Y, Cb, Cr writes completes in the ninth
//    clock counted from the Y write (9 clocks per four pixels).
// From the measured clocks per block it prints, for each whole image, the
// number of blocks and of four-pixel groups and the hardware-only time at a
// 125 MHz clock, next to the IDCT time the same block count takes at 186
// clocks per block. Only the stripe is simulated; the whole-image figures
// are arithmetic on the measured clocks.
module tb_image_stripes;
  import jpeg_pkg::*;

  localparam logic [31:0] IDCT_BASE = 32'hA6E2_0000;
  localparam logic [31:0] CC_BASE   = 32'hA6E3_0000;
  localparam int NIMG = 9;
  localparam int MAXW = 5400;            // widest image, a multiple of 8
  localparam real F_CLK = 125.0e6;

  localparam int IMG_W [NIMG] = '{2686, 3799, 5400, 2560, 3653, 5164, 2503, 3540, 5040};
  localparam int IMG_H [NIMG] = '{1862, 2634, 3744, 1920, 2740, 3873, 1998, 2826, 4024};
  string img_name [NIMG] = '{"bookstore 5MP", "bookstore 10MP", "bookstore 20MP",
                             "dog 5MP", "dog 10MP", "dog 20MP",
                             "beach 5MP", "beach 10MP", "beach 20MP"};

  logic        clk = 0, rst = 1;
  logic        bus_wr = 0, bus_rd = 0;
  logic [31:0] bus_addr = '0, bus_wdata = '0, bus_rdata;
  logic        bus_ack, idct_done, cc_busy;
  always #5 clk = ~clk;

  jpeg_accel_top dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  longint t_first, t_done;
  logic   done_q = 0;
  int n_ilo = 0, n_ihi = 0, n_clo = 0, n_chi = 0;

  // cycle counter and the cycle in which DONE is first seen set
  always @(posedge clk) begin
    cyc <= cyc + 1;
    done_q <= idct_done;
    if (idct_done && !done_q) t_done = cyc;
  end

  // ------------------------------------------------------------ model
  function automatic int s16(longint v);
    return int'($signed(16'(v)));
  endfunction

  // integer 1D-IDCT with the datapath's constants and shifts
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

  int qtab  [3][8][8];
  int blk   [8][8];              // coefficients of the block being sent
  int plane [3][8][MAXW];        // model samples of the stripe
  int hwpl  [3][8][MAXW];        // samples read from the IDCT peripheral

  task automatic make_block(int ch);
    int dc;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) blk[r][c] = 0;
    dc = int'($urandom_range(0, 1400)) - 700;
    blk[0][0] = dc;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3 - r; c++)
        if (r + c > 0) blk[r][c] = int'($urandom_range(0, 12)) - 6;
    if (ch > 0) blk[0][0] = dc / 2;
  endtask

  task automatic model_block(int ch, int bx);
    int t [8][8];
    int v [8], w [8];
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < 8; c++) v[c] = s16(longint'(blk[r][c]) * qtab[ch][r][c]);
      idct1(v, w);
      for (int c = 0; c < 8; c++) t[r][c] = w[c];
    end
    for (int c = 0; c < 8; c++) begin
      for (int r = 0; r < 8; r++) v[r] = t[r][c];
      idct1(v, w);
      for (int r = 0; r < 8; r++) begin
        plane[ch][r][bx*8+c] = w[r] < -128 ? 0 : (w[r] > 127 ? 255 : w[r] + 128);
        if (w[r] < -128) n_ilo++;
        if (w[r] > 127)  n_ihi++;
      end
    end
  endtask

  // ------------------------------------------------------------ bus
  // one word transfer; returns the number of clocks the slave stalled it
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

  task automatic send_block(int ch, output longint clocks);
    logic [31:0] q; int s;
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < 8; c++) begin
        if (r == 0 && c == 0) t_first = cyc;
        xfer(1, IDCT_BASE + 32'(4 * (IDCT_R_QUANT0 + c)), 32'(qtab[ch][r][c]), q, s);
      end
      for (int k = 0; k < 4; k++)
        xfer(1, IDCT_BASE + 32'(4 * (IDCT_R_COEF0 + k)),
             {16'(blk[r][2*k+1]), 16'(blk[r][2*k])}, q, s);
    end
    clocks = -1;
    for (int p = 0; p < 400 && clocks < 0; p++) begin
      xfer(0, IDCT_BASE + 32'(4 * IDCT_R_DONE), '0, q, s);
      if (q[0]) clocks = t_done - t_first + 1;
    end
  endtask

  task automatic read_block(int ch, int bx);
    logic [31:0] q0, q1; int s;
    for (int r = 0; r < 8; r++) begin
      xfer(0, IDCT_BASE + 32'(4 * IDCT_R_OUT0), '0, q0, s);
      xfer(0, IDCT_BASE + 32'(4 * IDCT_R_OUT1), '0, q1, s);
      for (int c = 0; c < 4; c++) begin
        hwpl[ch][r][bx*8+c]   = int'(q0[8*c +: 8]);
        hwpl[ch][r][bx*8+c+4] = int'(q1[8*c +: 8]);
      end
    end
  endtask

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q, w [3];
    int s, nbx, ngrp, bad_idct, bad_cc;
    longint clocks, max_clocks, sum_clocks, nblk_img, ngrp_img;
    real t_idct, t_cc, t_idct_ref;
    repeat (3) @(posedge clk);
    #1 rst = 0;

    for (int ch = 0; ch < 3; ch++)
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++)
          qtab[ch][r][c] = (ch == 0 ? 2 : 3) + 2 * (r + c);

    for (int im = 0; im < NIMG; im++) begin
      nbx = (IMG_W[im] + 7) / 8;
      ngrp = (IMG_W[im] + 3) / 4;
      max_clocks = 0; sum_clocks = 0; bad_idct = 0; bad_cc = 0;

      // ---- IDCT of every block of the stripe
      for (int ch = 0; ch < 3; ch++)
        for (int bx = 0; bx < nbx; bx++) begin
          make_block(ch);
          model_block(ch, bx);
          send_block(ch, clocks);
          checks++;
          if (clocks < 0 || clocks > 186) begin
            failures++;
            if (bad_idct++ < 5)
              $display("%s block %0d ch %0d: %0d clocks to DONE", img_name[im], bx, ch, clocks);
          end
          if (clocks > max_clocks) max_clocks = clocks;
          sum_clocks += clocks;
          read_block(ch, bx);
        end

      // ---- colour conversion of the stripe, four pixels per transfer
      for (int y = 0; y < 8; y++)
        for (int g = 0; g < ngrp; g++) begin
          logic [31:0] wy, wb, wr_;
          int first_stall;
          for (int p = 0; p < 4; p++) begin
            wy[8*p +: 8]  = 8'(hwpl[0][y][4*g+p]);
            wb[8*p +: 8]  = 8'(hwpl[1][y][4*g+p]);
            wr_[8*p +: 8] = 8'(hwpl[2][y][4*g+p]);
          end
          xfer(1, CC_BASE + 32'(4 * CC_R_Y),  wy,  q, s);
          xfer(1, CC_BASE + 32'(4 * CC_R_CB), wb,  q, s);
          xfer(1, CC_BASE + 32'(4 * CC_R_CR), wr_, q, s);
          for (int k = 0; k < 3; k++) begin
            xfer(0, CC_BASE + 32'(4 * (CC_R_RGB0 + k)), '0, w[k], s);
            if (k == 0) first_stall = s;
          end
          // Y, Cb, Cr writes take clocks 1..3; the read completes in clock 9
          checks++;
          if (3 + first_stall + 1 != 9) begin
            failures++;
            if (bad_cc++ < 5)
              $display("%s row %0d group %0d: RGB after %0d clocks", img_name[im], y, g,
                       3 + first_stall + 1);
          end
          for (int p = 0; p < 4; p++) begin
            int yy, cb, cr, idx, got;
            int e [3], raw [3];
            yy = plane[0][y][4*g+p]; cb = plane[1][y][4*g+p]; cr = plane[2][y][4*g+p];
            raw[0] = yy + ((91881 * (cr - 128) + 32768) >>> 16);
            raw[1] = yy + ((32768 - 46802 * (cr - 128) - 22554 * (cb - 128)) >>> 16);
            raw[2] = yy + ((116130 * (cb - 128) + 32768) >>> 16);
            for (int k = 0; k < 3; k++) begin
              e[k] = clamp(raw[k]);
              if (raw[k] < 0) n_clo++;
              if (raw[k] > 255) n_chi++;
              idx = 3 * p + k;
              got = int'(w[idx / 4][8 * (idx % 4) +: 8]);
              checks++;
              if (got != e[k]) begin
                failures++;
                if (bad_cc++ < 5)
                  $display("%s row %0d px %0d comp %0d = %0d, model %0d", img_name[im], y,
                           4 * g + p, k, got, e[k]);
              end
            end
          end
        end

      // ---- projection to the whole image
      nblk_img = longint'(nbx) * ((longint'(IMG_H[im]) + 7) / 8) * 3;
      ngrp_img = longint'(ngrp) * longint'(IMG_H[im]);
      t_idct = real'(nblk_img) * real'(max_clocks) / F_CLK;
      t_idct_ref = real'(nblk_img) * 186.0 / F_CLK;
      t_cc = real'(ngrp_img) * 9.0 / F_CLK;
      $display("%-15s %0dx%0d: stripe %0d blocks, %0d clocks/block max (%0.1f mean); image %0d blocks -> IDCT %0.2f s (%0.2f s at 186), %0d groups of 4 px -> colour %0.2f s",
               img_name[im], IMG_W[im], IMG_H[im], 3 * nbx, max_clocks,
               real'(sum_clocks) / real'(3 * nbx), nblk_img, t_idct, t_idct_ref, ngrp_img, t_cc);
    end

    $display("range limit lo %0d hi %0d, colour clamp lo %0d hi %0d", n_ilo, n_ihi, n_clo, n_chi);
    checks += 4;
    if (n_ilo == 0 || n_ihi == 0 || n_clo == 0 || n_chi == 0) begin
      failures++;
      $display("a clamp never acted");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
