// tb_ycc_rgb_pixel: exhaustive over Cb and Cr for several Y values, checking
// each output against the conversion formula evaluated in integer arithmetic
// in the testbench, and against the real-valued formula (within 1).
module tb_ycc_rgb_pixel;
  import jpeg_pkg::*;
  logic [7:0] y, cb, cr;
  rgb_t rgb;
  int checks = 0, failures = 0;

  ycc_rgb_pixel dut (.y, .cb, .cr, .rgb);

  function automatic int clamp(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ys [6] = '{0, 16, 100, 128, 235, 255};
    for (int yi = 0; yi < 6; yi++)
      for (int b = 0; b < 256; b += 3)
        for (int r = 0; r < 256; r += 5) begin
          int er, eg, eb;
          real fr, fg, fb;
          y = 8'(ys[yi]); cb = 8'(b); cr = 8'(r);
          #1;
          er = clamp(ys[yi] + ((91881 * (r - 128) + 32768) >>> 16));
          eb = clamp(ys[yi] + ((116130 * (b - 128) + 32768) >>> 16));
          eg = clamp(ys[yi] + ((32768 - 46802 * (r - 128) - 22554 * (b - 128)) >>> 16));
          fr = ys[yi] + 1.402 * (r - 128);
          fg = ys[yi] - 0.34414 * (b - 128) - 0.71414 * (r - 128);
          fb = ys[yi] + 1.772 * (b - 128);
          checks += 3;
          if (int'(rgb.r) != er || int'(rgb.g) != eg || int'(rgb.b) != eb) begin
            failures++;
            $display("Y=%0d Cb=%0d Cr=%0d: got %0d %0d %0d exp %0d %0d %0d",
                     ys[yi], b, r, rgb.r, rgb.g, rgb.b, er, eg, eb);
          end
          checks++;
          if ((fr > 0.5 && fr < 254.5 && (rgb.r - fr > 1.0 || fr - rgb.r > 1.0)) ||
              (fg > 0.5 && fg < 254.5 && (rgb.g - fg > 1.0 || fg - rgb.g > 1.0)) ||
              (fb > 0.5 && fb < 254.5 && (rgb.b - fb > 1.0 || fb - rgb.b > 1.0))) begin
            failures++;
            $display("Y=%0d Cb=%0d Cr=%0d: %0d %0d %0d far from %f %f %f",
                     ys[yi], b, r, rgb.r, rgb.g, rgb.b, fr, fg, fb);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
