// idct_1d: 8-point one-dimensional inverse DCT, four clocked stages.
//
// Computes y(n) = 1/sqrt(8) * [ x0 + sqrt(2) * sum_{k=1..7} x_k cos((2n+1)k pi/16) ]
// with the Loeffler factorisation: one sqrt(2)*R6 rotator on (x2,x6) and a
// 1/sqrt(2) scaling of x1 and x7 (stage 1), butterflies forming the even part
// and the odd-part sums (stage 2), sqrt(2)*R3 and sqrt(2)*R1 rotators on the
// odd part (stage 3), and the final butterflies with the 1/sqrt(8) scaling
// (stage 4). All constants carry 8 fractional bits; products are kept at full
// width and the result is shifted back by 24 bits (floor) and truncated to
// 16 bits.
//
// The four stages are those of the accelerator's 1D-IDCT. Here they form a
// pipeline rather than a state machine: a new row or column can enter every
// cycle (in_valid), and its result appears with out_valid exactly LATENCY = 4
// cycles later. Intermediate widths are sized so that nothing overflows before
// the final 16-bit truncation; that, and pipelining, are choices of this design.
module idct_1d
  import jpeg_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      in_valid,
  input  coef_t     in_x [8],
  output logic      out_valid,
  output coef_t     out_y [8]
);
  localparam int unsigned LATENCY = 4;

  typedef logic signed [27:0] w1_t;  // stage 1/2 words (inputs << 8 plus products)
  typedef logic signed [39:0] w3_t;  // stage 3/4 words (<< 16)

  // ---------------- stage 1: rotator sqrt2*R6, 1/sqrt2 on the odd inputs
  w1_t  s1_x0, s1_x4, s1_x3, s1_x5, s1_r2, s1_r3, s1_d17, s1_s17;
  always_ff @(posedge clk) begin
    s1_x0  <= w1_t'(in_x[0]) <<< IDCT_CBITS;
    s1_x4  <= w1_t'(in_x[4]) <<< IDCT_CBITS;
    s1_x3  <= w1_t'(in_x[3]) <<< IDCT_CBITS;
    s1_x5  <= w1_t'(in_x[5]) <<< IDCT_CBITS;
    s1_r2  <= w1_t'(in_x[2]) * K_C6 - w1_t'(in_x[6]) * K_S6;
    s1_r3  <= w1_t'(in_x[2]) * K_S6 + w1_t'(in_x[6]) * K_C6;
    s1_d17 <= w1_t'(w1_t'(in_x[1]) - w1_t'(in_x[7])) * K_R2;
    s1_s17 <= w1_t'(w1_t'(in_x[1]) + w1_t'(in_x[7])) * K_R2;
  end

  // ---------------- stage 2: butterflies
  w1_t  s2_e0, s2_e1, s2_e2, s2_e3, s2_o4, s2_o5, s2_o6, s2_o7;
  always_ff @(posedge clk) begin
    s2_e0 <= s1_x0 + s1_x4 + s1_r3;
    s2_e3 <= s1_x0 + s1_x4 - s1_r3;
    s2_e1 <= s1_x0 - s1_x4 + s1_r2;
    s2_e2 <= s1_x0 - s1_x4 - s1_r2;
    s2_o4 <= s1_d17 + s1_x5;
    s2_o6 <= s1_d17 - s1_x5;
    s2_o7 <= s1_s17 + s1_x3;
    s2_o5 <= s1_s17 - s1_x3;
  end

  // ---------------- stage 3: rotators sqrt2*R3 and sqrt2*R1
  w3_t  s3_e [4];
  w3_t  s3_o [4];   // s3_o[n] pairs with s3_e[n]
  always_ff @(posedge clk) begin
    s3_e[0] <= w3_t'(s2_e0) <<< IDCT_CBITS;
    s3_e[1] <= w3_t'(s2_e1) <<< IDCT_CBITS;
    s3_e[2] <= w3_t'(s2_e2) <<< IDCT_CBITS;
    s3_e[3] <= w3_t'(s2_e3) <<< IDCT_CBITS;
    s3_o[3] <= w3_t'(s2_o4) * K_C3 - w3_t'(s2_o7) * K_S3;
    s3_o[0] <= w3_t'(s2_o4) * K_S3 + w3_t'(s2_o7) * K_C3;
    s3_o[2] <= w3_t'(s2_o5) * K_C1 - w3_t'(s2_o6) * K_S1;
    s3_o[1] <= w3_t'(s2_o5) * K_S1 + w3_t'(s2_o6) * K_C1;
  end

  // ---------------- stage 4: output butterflies, 1/sqrt8, back to integer
  typedef logic signed [47:0] w4_t;
  function automatic coef_t scale_out(w3_t v);
    w4_t p;
    p = w4_t'(v) * K_N8;
    return coef_t'(p >>> (3 * IDCT_CBITS));
  endfunction

  always_ff @(posedge clk) begin
    for (int n = 0; n < 4; n++) begin
      out_y[n]     <= scale_out(s3_e[n] + s3_o[n]);
      out_y[7 - n] <= scale_out(s3_e[n] - s3_o[n]);
    end
  end

  // ---------------- valid pipeline
  logic [LATENCY-1:0] vpipe;
  always_ff @(posedge clk) begin
    if (rst) vpipe <= '0;
    else     vpipe <= {vpipe[LATENCY-2:0], in_valid};
  end
  assign out_valid = vpipe[LATENCY-1];

endmodule
