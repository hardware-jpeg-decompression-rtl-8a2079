// idct_matrix: the 8x8 intermediate matrix of the row-column 2D-IDCT.
//
// The row pass writes whole rows (row_we, row_widx); the column pass reads a
// whole column (col_ridx, combinational col_q) and writes the transformed
// column back in place (col_we, col_widx). Reading columns out of a
// row-written matrix is the transposition between the two passes. A
// combinational row read port (row_ridx, row_q) serves the output registers.
// Writes take effect at the rising edge; a row and a column write in the same
// cycle are not allowed (the controller never issues them together).
module idct_matrix
  import jpeg_pkg::*;
(
  input  logic       clk,
  input  logic       row_we,
  input  logic [2:0] row_widx,
  input  coef_t      row_d [8],
  input  logic       col_we,
  input  logic [2:0] col_widx,
  input  coef_t      col_d [8],
  input  logic [2:0] col_ridx,
  output coef_t      col_q [8],
  input  logic [2:0] row_ridx,
  output coef_t      row_q [8]
);
  coef_t m [8][8];   // m[row][column]

  always_ff @(posedge clk) begin
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < 8; c++) begin
        if (row_we && row_widx == 3'(r))      m[r][c] <= row_d[c];
        else if (col_we && col_widx == 3'(c)) m[r][c] <= col_d[r];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      col_q[i] = m[i][col_ridx];
      row_q[i] = m[row_ridx][i];
    end
  end
endmodule
