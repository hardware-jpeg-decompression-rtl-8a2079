// tb_dequantizer: checks the eight parallel dequantisation multipliers
// against coefficient * table entry, truncated to 16 bits, for random
// and directed values (including negative coefficients).
module tb_dequantizer;
  import jpeg_pkg::*;
  coef_t coef [8], quant [8], deq [8];
  int checks = 0, failures = 0;

  dequantizer dut (.coef, .quant, .deq);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int c [8], qv [8];
      for (int i = 0; i < 8; i++) begin
        c[i]  = (t < 10) ? (i - 4) * (t + 1) : int'($urandom_range(0, 4095)) - 2048;
        qv[i] = (t < 10) ? i + 1 : int'($urandom_range(1, 255));
        coef[i]  = coef_t'(c[i]);
        quant[i] = coef_t'(qv[i]);
      end
      #1;
      for (int i = 0; i < 8; i++) begin
        int expv;
        expv = int'($signed(16'(c[i] * qv[i])));
        checks++;
        if (int'(deq[i]) != expv) begin
          failures++;
          $display("deq[%0d] %0d*%0d = %0d, expected %0d", i, c[i], qv[i], deq[i], expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
