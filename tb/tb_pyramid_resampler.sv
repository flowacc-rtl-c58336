// tb_pyramid_resampler: random 2x2 pixel groups in both modes and all four
// interpolation phases, against the mean / bilinear formulas worked out here.
module tb_pyramid_resampler;
  import flowacc_pkg::*;
  logic mode_up, ph_x, ph_y;
  pix_t p00, p01, p10, p11, pix;
  int checks = 0, failures = 0;
  pyramid_resampler dut (.mode_up, .ph_x, .ph_y, .p00, .p01, .p10, .p11, .pix);
  initial begin
    for (int n = 0; n < 4000; n++) begin
      int a, b, c, d, e;
      a = $urandom % 256; b = $urandom % 256; c = $urandom % 256; d = $urandom % 256;
      if (n < 8) begin a = 255; b = 255; c = 255; d = 255; end
      p00 = pix_t'(a); p01 = pix_t'(b); p10 = pix_t'(c); p11 = pix_t'(d);
      mode_up = n[0]; ph_x = n[1]; ph_y = n[2];
      #1;
      if (!mode_up)          e = (a + b + c + d) / 4;
      else if (ph_x && ph_y) e = (a + b + c + d) / 4;
      else if (ph_x)         e = (a + b) / 2;
      else if (ph_y)         e = (a + c) / 2;
      else                   e = a;
      checks++;
      if (int'(pix) != e) begin
        failures++;
        $display("FAIL n=%0d got %0d exp %0d", n, pix, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
