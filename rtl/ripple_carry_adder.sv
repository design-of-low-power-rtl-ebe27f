// ripple_carry_adder: W-bit adder built as a chain of full adders, the carry rippling from bit 0
// to bit W-1. The filter uses it for every addition, both inside the array multiplier and in the
// chain that sums the tap products; using a ripple-carry adder follows the design description,
// while the width parameter and the carry-in/carry-out ports are this design's own choice.
//
// Interface: a, b, cin in; sum = (a + b + cin) mod 2^W and the carry out of the top bit.
// Timing: purely combinational, delay grows linearly with W.
module ripple_carry_adder #(
  parameter int W = 18
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;
  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[W];
endmodule
