// tb_idct_1d: self-checking testbench for the 8-point 1D-IDCT pipeline.
//
// Drives random and directed coefficient rows, one per cycle (back-to-back)
// and with gaps, and compares every result with two independent models:
// a bit-exact integer model of the fixed-point Loeffler flow (exact match
// required) and the floating-point IDCT definition (within 2% + 3 LSB, the
// precision the 8-bit constants allow). Also checks the 4-cycle latency.
module tb_idct_1d;
  import jpeg_pkg::*;

  logic  clk = 0, rst = 1;
  logic  in_valid = 0;
  coef_t in_x [8];
  logic  out_valid;
  coef_t out_y [8];
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  idct_1d dut (.clk, .rst, .in_valid, .in_x, .out_valid, .out_y);

  // bit-exact model
  function automatic void model(input int x [8], output int y [8]);
    longint a0, a1, r2, r3, d, s, e [4], o4, o5, o6, o7, o [4], t;
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
      t = ((e[n] * 256 + o[n]) * 91) >>> 24;  y[n]     = int'(16'(t));
      t = ((e[n] * 256 - o[n]) * 91) >>> 24;  y[7 - n] = int'(16'(t));
      y[n] = int'($signed(16'(y[n]))); y[7 - n] = int'($signed(16'(y[7 - n])));
    end
  endfunction

  function automatic real ref_idct(int x [8], int n);
    real acc = 0.0;
    for (int k = 0; k < 8; k++)
      acc += (k == 0 ? 1.0 / $sqrt(8.0) : 0.5) * x[k] * $cos((2 * n + 1) * k * 3.14159265358979 / 16.0);
    return acc;
  endfunction

  // expected results queue, with issue cycle
  typedef struct { int y [8]; real f [8]; int cyc; } exp_t;
  exp_t q [$];
  int   cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic send(int x [8]);
    exp_t e;
    model(x, e.y);
    for (int n = 0; n < 8; n++) e.f[n] = ref_idct(x, n);
    e.cyc = cycle;
    q.push_back(e);
    for (int i = 0; i < 8; i++) in_x[i] = coef_t'(x[i]);
    in_valid = 1;
    @(posedge clk); #1;
    in_valid = 0;
  endtask

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      exp_t e;
      if (q.size() == 0) begin
        failures++; $display("unexpected output");
      end else begin
        e = q.pop_front();
        checks++;
        if (cycle - e.cyc != 4) begin
          failures++; $display("latency %0d, expected 4", cycle - e.cyc);
        end
        for (int n = 0; n < 8; n++) begin
          real err;
          checks++;
          if (int'(out_y[n]) != e.y[n]) begin
            failures++; $display("y[%0d] = %0d, model %0d", n, out_y[n], e.y[n]);
          end
          err = real'(int'(out_y[n])) - e.f[n];
          if (err < 0) err = -err;
          checks++;
          if (err > 3.0 + 0.02 * (e.f[n] < 0 ? -e.f[n] : e.f[n])) begin
            failures++; $display("y[%0d] = %0d, exact %f", n, out_y[n], e.f[n]);
          end
        end
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x [8];
    for (int i = 0; i < 8; i++) in_x[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // directed: DC only, each single basis function
    for (int k = 0; k < 8; k++) begin
      for (int i = 0; i < 8; i++) x[i] = (i == k) ? 256 : 0;
      send(x);
    end
    // random, back-to-back
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < 8; i++) x[i] = int'($urandom_range(0, 2047)) - 1024;
      send(x);
    end
    // random with gaps
    for (int t = 0; t < 50; t++) begin
      for (int i = 0; i < 8; i++) x[i] = int'($urandom_range(0, 511)) - 256;
      send(x);
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1;
    end
    repeat (8) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++; $display("%0d results missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
