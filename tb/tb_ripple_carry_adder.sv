// tb_ripple_carry_adder: self-checking test of the W-bit ripple-carry adder.
// Applies corner cases (all ones, carry through every bit) and random operands at the default
// width of 18 and at width 8, checking sum and carry out against plain integer addition.
`timescale 1ns/1ps
module tb_ripple_carry_adder;
  localparam int W = 18;
  int checks = 0, failures = 0;

  logic [W-1:0] a, b, s;
  logic ci, co;
  logic [7:0] a8, b8, s8;
  logic ci8, co8;

  ripple_carry_adder dut (.a(a), .b(b), .cin(ci), .sum(s), .cout(co));
  ripple_carry_adder #(.W(8)) dut8 (.a(a8), .b(b8), .cin(ci8), .sum(s8), .cout(co8));

  task automatic check(input logic [W-1:0] ta, input logic [W-1:0] tb, input logic tc);
    logic [W:0] expect_v;
    a = ta; b = tb; ci = tc;
    #1;
    expect_v = {1'b0, ta} + {1'b0, tb} + (W+1)'(tc);
    checks++;
    if ({co, s} !== expect_v) begin
      failures++;
      $display("FAIL %h + %h + %b = %h, expected %h", ta, tb, tc, {co, s}, expect_v);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0, 1'b0);
    check('1, '0, 1'b1);
    check('1, '1, 1'b1);
    check({W{1'b1}}, 18'd1, 1'b0);
    check(18'h15555, 18'h2AAAA, 1'b1);
    repeat (2000) check(W'($urandom), W'($urandom), 1'($urandom));
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j += 7) begin
        a8 = 8'(i); b8 = 8'(j); ci8 = 1'(i ^ j);
        #1;
        checks++;
        if ({co8, s8} !== 9'(i + j + int'(ci8))) begin
          failures++;
          $display("FAIL 8-bit %0d + %0d + %b = %0d", i, j, ci8, {co8, s8});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
