// fir_pkg: sizes, types and the coefficient set shared by the transversal FIR filter.
//
// The filter has 17 coefficient positions, X[n] .. X[n-16], one of which is zero, so 16 taps
// do real work. Input samples are 8-bit unsigned, the output is 18-bit two's complement. These
// sizes, the coefficient values and their order follow the published filter equation.
//
// Coefficients are 8-bit sign-magnitude numbers: bit 7 is the sign, bits 6:0 the magnitude, so
// 8'h96 is -22 and 8'h7F is +127. That reading is this design's own inference: it is the one
// encoding under which the published simulation values come out, as the Fig. 6 style
// testbench shows. With unsigned samples the largest output magnitude is
// 255 * (sum of magnitudes = 336) = 85680, which needs exactly 18 signed bits.
package fir_pkg;

  localparam int TAPS = 17;  // coefficient positions X[n] .. X[n-16]
  localparam int XW   = 8;   // input sample width (unsigned)
  localparam int CW   = 8;   // coefficient width (sign-magnitude)
  localparam int MW   = CW - 1;   // coefficient magnitude width
  localparam int PW   = XW + MW + 1;  // signed product width: 16
  localparam int YW   = 18;  // output width (two's complement)

  typedef logic [XW-1:0] sample_t;
  typedef logic [CW-1:0] coef_t;
  typedef logic signed [PW-1:0] product_t;
  typedef logic signed [YW-1:0] result_t;
  typedef coef_t coef_set_t [TAPS];

  // Y[n] = 81 X[n] + 01 X[n-1] + 00 X[n-2] + 82 X[n-3] + ... + 64 X[n-15] + 7F X[n-16]
  // Entry k multiplies X[n-k].
  localparam coef_set_t COEFS_DEFAULT = '{
    8'h81, 8'h01, 8'h00, 8'h82, 8'h81, 8'h03, 8'h01, 8'h85, 8'h86,
    8'h03, 8'h0C, 8'h02, 8'h96, 8'h96, 8'h1C, 8'h64, 8'h7F
  };

  // Value of a sign-magnitude coefficient as a plain integer (for reference models).
  function automatic int sm_value(coef_t c);
    return c[CW-1] ? -int'(c[MW-1:0]) : int'(c[MW-1:0]);
  endfunction

endpackage
