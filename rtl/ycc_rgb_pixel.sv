// ycc_rgb_pixel: converts one JFIF Y/Cb/Cr pixel to R/G/B.
//
//   R = Y + 1.402   (Cr-128)
//   G = Y - 0.34414 (Cb-128) - 0.71414 (Cr-128)
//   B = Y + 1.772   (Cb-128)
//
// The factors are fixed-point constants with 16 fractional bits; half an LSB
// (2^15) is added before the products are shifted back (arithmetic, floor),
// so each chroma term is rounded to the nearest integer before Y is added.
// The sums are clamped to 0..255. Purely combinational: it replaces the four
// chroma lookup tables of a software decoder by direct multiplication.
module ycc_rgb_pixel
  import jpeg_pkg::*;
(
  input  logic [7:0] y,
  input  logic [7:0] cb,
  input  logic [7:0] cr,
  output rgb_t       rgb
);
  typedef logic signed [31:0] s32_t;
  s32_t cb_c, cr_c, t_r, t_g, t_b;

  always_comb begin
    cb_c = s32_t'({1'b0, cb}) - 32'sd128;
    cr_c = s32_t'({1'b0, cr}) - 32'sd128;
    t_r  = (cr_c * K_CR_R + K_HALF) >>> CC_FRAC;
    t_b  = (cb_c * K_CB_B + K_HALF) >>> CC_FRAC;
    t_g  = (K_HALF - cr_c * K_CR_G - cb_c * K_CB_G) >>> CC_FRAC;
    rgb.r = clamp_u8(20'(t_r + s32_t'({1'b0, y})));
    rgb.g = clamp_u8(20'(t_g + s32_t'({1'b0, y})));
    rgb.b = clamp_u8(20'(t_b + s32_t'({1'b0, y})));
  end
endmodule
