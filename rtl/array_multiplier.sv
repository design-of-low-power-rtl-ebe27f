// array_multiplier: unsigned AW x BW parallel array multiplier.
//
// Row 0 is the partial product a & b[0]. Each following row j adds the partial product
// a & b[j] to the upper AW bits of the row above with an AW-bit ripple-carry adder; the lowest
// bit of every row is a finished product bit and the last row gives the top AW bits. This is
// the regular, parallel multiplier structure the design description calls for; the exact
// arrangement of rows is this design's own choice.
//
// Interface: a (AW bits), b (BW bits) in, p = a * b (AW+BW bits) out.
// Timing: purely combinational.
module array_multiplier #(
  parameter int AW = 8,
  parameter int BW = 7
) (
  input  logic [AW-1:0]    a,
  input  logic [BW-1:0]    b,
  output logic [AW+BW-1:0] p
);
  // row[j] holds AW+1 bits: the carry out of the row and its AW-bit sum
  logic [AW:0] row [BW];

  assign row[0] = {1'b0, a & {AW{b[0]}}};
  assign p[0]   = row[0][0];

  for (genvar j = 1; j < BW; j++) begin : g_row
    logic [AW-1:0] s;
    logic          co;
    ripple_carry_adder #(.W(AW)) u_rca (
      .a   (row[j-1][AW:1]),
      .b   (a & {AW{b[j]}}),
      .cin (1'b0),
      .sum (s),
      .cout(co)
    );
    assign row[j] = {co, s};
    assign p[j]   = s[0];
  end

  assign p[AW+BW-1:BW] = row[BW-1][AW:1];
endmodule
