// fir_filter: 17-coefficient direct-form transversal FIR filter, 8-bit in, 18-bit out.
//
// Computes Y[n] = sum over k = 0..16 of h[k] * X[n-k] with the fixed coefficient set of
// fir_pkg (81, 01, 00, 82, ... 64, 7F, sign-magnitude, X[n] first). The input feeds a
// 16-stage delay line; the input and the 16 stored samples each go to a tap multiplier with
// its coefficient, an adder chain sums the 17 products, and the sum is registered into out1.
// Taps, widths, port names and the direct-form structure follow the design description.
// The coefficient encoding, unsigned samples, the meaning of port n and the output register
// are this design's own reading (see fir_pkg and below).
//
// Interface:
//   clk   rising-edge clock
//   n     synchronous active-low reset: while low, the delay line and out1 are cleared
//   x_in  unsigned input sample, one per clock
//   out1  two's-complement filter output
// Timing: one sample in and one result out per clock. The sample present on x_in at edge t
// is already included in the out1 value that appears after edge t (one register of latency,
// the X[n] tap taken straight from the input).
module fir_filter
  import fir_pkg::*;
#(
  parameter coef_set_t COEFS = COEFS_DEFAULT
) (
  input  logic    clk,
  input  logic    n,
  input  sample_t x_in,
  output result_t out1
);
  sample_t  taps [TAPS];
  product_t prod [TAPS];
  result_t  sum;

  delay_line #(.W(XW), .DEPTH(TAPS-1)) u_delay (
    .clk  (clk),
    .rst_n(n),
    .d    (x_in),
    .taps (taps)
  );

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    tap_multiplier u_mul (
      .x(taps[k]),
      .c(COEFS[k]),
      .p(prod[k])
    );
  end

  adder_chain #(.N(TAPS), .PW(PW), .YW(YW)) u_sum (
    .prod(prod),
    .sum (sum)
  );

  always_ff @(posedge clk) begin
    if (!n) out1 <= '0;
    else    out1 <= sum;
  end
endmodule
