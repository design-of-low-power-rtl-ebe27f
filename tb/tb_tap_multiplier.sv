// tb_tap_multiplier: exhaustive test of one filter tap. Every unsigned 8-bit sample is
// multiplied by every 8-bit sign-magnitude coefficient and the signed 16-bit product is
// compared with the integer product sample * (sign ? -magnitude : magnitude).
`timescale 1ns/1ps
module tb_tap_multiplier;
  import fir_pkg::*;
  int checks = 0, failures = 0;

  sample_t  x;
  coef_t    c;
  product_t p;

  tap_multiplier dut (.x(x), .c(c), .p(p));

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        int cv;
        x = sample_t'(i); c = coef_t'(j);
        cv = (j >= 128) ? -(j - 128) : j;
        #1;
        checks++;
        if (int'(p) != i * cv) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * coef %h = %0d, expected %0d", i, c, p, i * cv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
