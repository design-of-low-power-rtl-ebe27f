// delay_line: tapped delay line of DEPTH sample registers (the z^-1 row of the filter).
//
// On every rising clock edge the input moves into stage 1 and each stage k into stage k+1.
// taps[0] is the input itself (X[n]) and taps[k] is stage k (X[n-k]), so the filter sees the
// current sample and the DEPTH previous ones at once. The 16-stage row of unit delays follows
// the design description. The synchronous active-low reset, which clears every stage, is this
// design's own choice.
//
// Interface: clk, rst_n, d in; taps[0..DEPTH] out.
// Timing: one register per stage; a sample presented before edge t is on taps[k] for the
// cycle after edge t+k-1.
module delay_line #(
  parameter int W     = 8,
  parameter int DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] taps [DEPTH+1]
);
  logic [W-1:0] stage [1:DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 1; k <= DEPTH; k++) stage[k] <= '0;
    end else begin
      stage[1] <= d;
      for (int k = 2; k <= DEPTH; k++) stage[k] <= stage[k-1];
    end
  end

  always_comb begin
    taps[0] = d;
    for (int k = 1; k <= DEPTH; k++) taps[k] = stage[k];
  end
endmodule
