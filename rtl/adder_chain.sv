// adder_chain: sums N signed tap products into one YW-bit result.
//
// The products are sign-extended to YW bits and added one after another, each stage a YW-bit
// ripple-carry adder taking the running sum from the stage before, like the row of adders of
// the direct-form filter. The first stage starts from zero. Carries out of the top bit are
// dropped: with the filter's coefficients the sum always fits YW bits.
//
// Interface: prod[0..N-1] in, sum out.
// Timing: purely combinational; the delay is N ripple-carry additions.
module adder_chain #(
  parameter int N  = 17,
  parameter int PW = 16,
  parameter int YW = 18
) (
  input  logic signed [PW-1:0] prod [N],
  output logic signed [YW-1:0] sum
);
  logic [YW-1:0] partial [N+1];
  assign partial[0] = '0;

  for (genvar i = 0; i < N; i++) begin : g_stage
    logic [YW-1:0] ext;
    logic          unused_cout;
    assign ext = YW'(prod[i]);   // sign extension of a signed value
    ripple_carry_adder #(.W(YW)) u_rca (
      .a   (partial[i]),
      .b   (ext),
      .cin (1'b0),
      .sum (partial[i+1]),
      .cout(unused_cout)
    );
  end

  assign sum = signed'(partial[N]);
endmodule
