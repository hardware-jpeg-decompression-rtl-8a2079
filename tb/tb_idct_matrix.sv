// tb_idct_matrix: writes rows, reads them back by rows and by columns
// (transposition), overwrites columns and checks that only that column
// changed, against a reference 8x8 array kept in the testbench.
module tb_idct_matrix;
  import jpeg_pkg::*;
  logic clk = 0;
  logic row_we = 0, col_we = 0;
  logic [2:0] row_widx = 0, col_widx = 0, col_ridx = 0, row_ridx = 0;
  coef_t row_d [8], col_d [8], col_q [8], row_q [8];
  int ref_m [8][8];
  int checks = 0, failures = 0;
  int cidx;

  always #5 clk = ~clk;
  idct_matrix dut (.*);

  task automatic check_all();
    for (int a = 0; a < 8; a++) begin
      row_ridx = 3'(a); col_ridx = 3'(a); #1;
      for (int b = 0; b < 8; b++) begin
        checks += 2;
        if (int'(row_q[b]) != ref_m[a][b]) begin
          failures++; $display("row %0d col %0d: %0d exp %0d", a, b, row_q[b], ref_m[a][b]);
        end
        if (int'(col_q[b]) != ref_m[b][a]) begin
          failures++; $display("col %0d row %0d: %0d exp %0d", a, b, col_q[b], ref_m[b][a]);
        end
      end
    end
    @(negedge clk);
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin row_d[i] = '0; col_d[i] = '0; end
    @(negedge clk);
    for (int r = 0; r < 8; r++) begin
      row_we = 1; row_widx = 3'(r);
      for (int c = 0; c < 8; c++) begin
        ref_m[r][c] = int'($urandom_range(0, 65535)) - 32768;
        row_d[c] = coef_t'(ref_m[r][c]);
      end
      @(negedge clk);
    end
    row_we = 0;
    check_all();
    for (int t = 0; t < 16; t++) begin
      cidx = int'($urandom_range(0, 7));
      col_we = 1; col_widx = 3'(cidx);
      for (int r = 0; r < 8; r++) begin
        ref_m[r][cidx] = int'($urandom_range(0, 65535)) - 32768;
        col_d[r] = coef_t'(ref_m[r][cidx]);
      end
      @(negedge clk);
      col_we = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
