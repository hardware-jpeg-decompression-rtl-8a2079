// dequantizer: scales one row of eight quantised DCT coefficients back up by
// the matching row of the quantisation table, F'(u,v) = F(u,v) * Q(u,v).
//
// Purely combinational: eight parallel multipliers. As in the accelerator's
// register interface, each product is truncated to the 16-bit coefficient
// word that feeds the 1D-IDCT (the low 16 bits of the product, which are the
// same whether the table entries are read as signed or unsigned).
module dequantizer
  import jpeg_pkg::*;
(
  input  coef_t coef  [8],
  input  coef_t quant [8],
  output coef_t deq   [8]
);
  always_comb begin
    for (int i = 0; i < 8; i++) begin
      deq[i] = coef_t'(coef[i] * quant[i]);
    end
  end
endmodule
