// tb_array_multiplier: exhaustive test of the 8 x 7 unsigned array multiplier used by every
// filter tap, plus random operands for a 5 x 4 instance, each against integer multiplication.
`timescale 1ns/1ps
module tb_array_multiplier;
  int checks = 0, failures = 0;

  logic [7:0]  a;
  logic [6:0]  b;
  logic [14:0] p;
  logic [4:0]  a5;
  logic [3:0]  b4;
  logic [8:0]  p9;

  array_multiplier dut (.a(a), .b(b), .p(p));
  array_multiplier #(.AW(5), .BW(4)) dut_small (.a(a5), .b(b4), .p(p9));

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 128; j++) begin
        a = 8'(i); b = 7'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d", i, j, p);
        end
      end
    end
    for (int i = 0; i < 32; i++) begin
      for (int j = 0; j < 16; j++) begin
        a5 = 5'(i); b4 = 4'(j);
        #1;
        checks++;
        if (int'(p9) != i * j) begin
          failures++;
          if (failures < 10) $display("FAIL 5x4 %0d * %0d = %0d", i, j, p9);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
