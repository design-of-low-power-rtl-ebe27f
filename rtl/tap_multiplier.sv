// tap_multiplier: one filter tap, product of an unsigned sample and a sign-magnitude coefficient.
//
// The 7-bit coefficient magnitude and the 8-bit sample go through the array multiplier, giving
// a 15-bit unsigned magnitude. If the coefficient's sign bit is set the magnitude is negated in
// two's complement (invert, then add one with a ripple-carry adder), so the product leaves as a
// 16-bit signed number ready for the adder chain. A coefficient of 8'h00 or 8'h80 gives zero.
// Multiplying each delayed sample by its coefficient follows the design description; the
// sign-magnitude reading of the coefficients and the unsigned samples are this design's own
// inference (see fir_pkg).
//
// Interface: x (sample), c (coefficient) in, p (signed product) out.
// Timing: purely combinational.
module tap_multiplier
  import fir_pkg::*;
(
  input  sample_t  x,
  input  coef_t    c,
  output product_t p
);
  logic [XW+MW-1:0] mag;     // |p|, at most 255 * 127
  logic [PW-1:0]    mag_ext;
  logic [PW-1:0]    neg;
  logic             unused_cout;

  array_multiplier #(.AW(XW), .BW(MW)) u_mul (
    .a(x),
    .b(c[MW-1:0]),
    .p(mag)
  );

  assign mag_ext = {1'b0, mag};

  ripple_carry_adder #(.W(PW)) u_neg (
    .a   (~mag_ext),
    .b   ('0),
    .cin (1'b1),
    .sum (neg),
    .cout(unused_cout)
  );

  assign p = c[CW-1] ? product_t'(neg) : product_t'(mag_ext);
endmodule
