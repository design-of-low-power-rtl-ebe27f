// tb_adder_chain: checks the 17-input adder chain with corner cases (all most-negative,
// all most-positive products) and random signed products, against an integer sum.
`timescale 1ns/1ps
module tb_adder_chain;
  localparam int N = 17, PW = 16, YW = 18;
  int checks = 0, failures = 0;

  logic signed [PW-1:0] prod [N];
  logic signed [YW-1:0] sum;

  adder_chain dut (.prod(prod), .sum(sum));

  task automatic check();
    int ref_sum = 0;
    for (int i = 0; i < N; i++) ref_sum += int'(prod[i]);
    #1;
    checks++;
    // compare modulo 2^YW, the width of the result
    if (sum !== YW'(ref_sum)) begin
      failures++;
      if (failures < 10) $display("FAIL sum = %0d, expected %0d", sum, ref_sum);
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
    for (int i = 0; i < N; i++) prod[i] = '0;
    check();
    for (int i = 0; i < N; i++) prod[i] = 16'sd32385;   // largest tap product, 255 * 127
    check();
    for (int i = 0; i < N; i++) prod[i] = -16'sd32385;
    check();
    for (int i = 0; i < N; i++) prod[i] = (i % 2 == 0) ? 16'sd7 : -16'sd9;
    check();
    repeat (3000) begin
      // keep |sum| within 18 bits: products up to 15 bits of magnitude
      for (int i = 0; i < N; i++) prod[i] = PW'($signed(15'($urandom)) );
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
