// jpeg_pkg: shared types, constants and small arithmetic helpers for the JPEG
// decompression accelerator (dequantising 2D-IDCT peripheral and YCC-to-RGB
// colour converter).
//
// The IDCT constants are the rotation and scaling factors of the Loeffler
// 8-point inverse DCT, sqrt(2)*cos/sin(n*pi/16), 1/sqrt(2) and 1/sqrt(8),
// each multiplied by 2^8 and rounded. The colour constants are the ITU-R
// BT.601 / JFIF factors 1.402, 0.71414, 0.34414 and 1.772 multiplied by 2^16,
// as the hardware's fixed-point table gives them.
//
// Register word offsets follow the software driver of the accelerator: the
// IDCT peripheral has 22 32-bit registers, the colour converter 6.
package jpeg_pkg;

  // ---------------------------------------------------------------- IDCT
  localparam int unsigned COEF_W     = 16;  // coefficient / 1D-IDCT word width
  localparam int unsigned IDCT_CBITS = 8;   // fractional bits of IDCT constants

  typedef logic signed [11:0] kconst_t;

  // sqrt(2)*cos(6pi/16), sqrt(2)*sin(6pi/16)       (rotator sqrt2*R6)
  localparam kconst_t K_C6 = 12'sd139;
  localparam kconst_t K_S6 = 12'sd335;
  // 1/sqrt(2)                                      (odd-input scaling)
  localparam kconst_t K_R2 = 12'sd181;
  // sqrt(2)*cos(3pi/16), sqrt(2)*sin(3pi/16)       (rotator sqrt2*R3)
  localparam kconst_t K_C3 = 12'sd301;
  localparam kconst_t K_S3 = 12'sd201;
  // sqrt(2)*cos(pi/16),  sqrt(2)*sin(pi/16)        (rotator sqrt2*R1)
  localparam kconst_t K_C1 = 12'sd355;
  localparam kconst_t K_S1 = 12'sd71;
  // 1/sqrt(8) output scaling
  localparam kconst_t K_N8 = 12'sd91;

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef coef_t                    coef_row_t [8];
  typedef logic [7:0]               sample_t;
  typedef sample_t                  sample_row_t [8];

  // IDCT register map (32-bit word offsets)
  localparam int unsigned IDCT_NUM_REG  = 22;
  localparam int unsigned IDCT_R_QUANT0 = 0;   // 0..7: quantisation entries 0..7
  localparam int unsigned IDCT_R_COEF0  = 8;   // 8..11: coefficient pairs
  localparam int unsigned IDCT_R_COEF3  = 11;  // writing it starts the row
  localparam int unsigned IDCT_R_OUT0   = 13;  // samples 0..3 of current row
  localparam int unsigned IDCT_R_OUT1   = 14;  // samples 4..7; read advances row
  localparam int unsigned IDCT_R_DONE   = 21;  // bit 0: block finished

  // ---------------------------------------------------------------- colour
  localparam int unsigned CC_FRAC = 16;
  localparam int signed K_CR_R = 32'h0_166E9;  // 1.402   * 2^16
  localparam int signed K_CR_G = 32'h0_0B6D2;  // 0.71414 * 2^16
  localparam int signed K_CB_G = 32'h0_0581A;  // 0.34414 * 2^16
  localparam int signed K_CB_B = 32'h0_1C5A2;  // 1.772   * 2^16
  localparam int signed K_HALF = 32'h0_08000;  // 0.5     * 2^16, rounding

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  localparam int unsigned CC_NUM_REG = 6;
  localparam int unsigned CC_R_Y   = 0;  // Y0..Y3
  localparam int unsigned CC_R_CB  = 1;  // Cb0..Cb3
  localparam int unsigned CC_R_CR  = 2;  // Cr0..Cr3, writing it starts conversion
  localparam int unsigned CC_R_RGB0 = 3; // R0 G0 B0 R1
  localparam int unsigned CC_R_RGB1 = 4; // G1 B1 R2 G2
  localparam int unsigned CC_R_RGB2 = 5; // B2 R3 G3 B3

  // ---------------------------------------------------------------- helpers
  // IDCT output range limit: level-shift a signed sample by +128 and clamp
  // to 0..255.
  function automatic sample_t idct_range_limit(coef_t v);
    if (v < -16'sd128)      return 8'd0;
    else if (v > 16'sd127)  return 8'd255;
    else                    return sample_t'(v + 16'sd128);
  endfunction

  // Colour range limit: clamp a signed value to 0..255.
  function automatic logic [7:0] clamp_u8(logic signed [19:0] v);
    if (v < 0)              return 8'd0;
    else if (v > 20'sd255)  return 8'd255;
    else                    return v[7:0];
  endfunction

endpackage
