// tb_fir_filter: end-to-end test of the 17-coefficient filter at its default parameters.
//
// A reference model keeps its own sample history and computes
// Y[n] = sum h[k] * X[n-k] with the coefficients read as sign-magnitude integers. Every
// clock the registered output is compared with the model, which also checks the one-clock
// latency (the sample on x_in at edge t must already be in the out1 value after edge t).
// Stimulus phases: impulse (reads back every coefficient in order, including the zero tap),
// step, random samples, a pattern that drives the output to its positive and negative
// extremes, and a reset in the middle of a stream. Each mechanism is counted and a mechanism
// that never happened counts as a failure.
`timescale 1ns/1ps
module tb_fir_filter;
  import fir_pkg::*;
  int checks = 0, failures = 0;
  int n_resets = 0, n_negative = 0, n_zero_tap = 0, n_top_bit = 0, n_impulse = 0;

  logic    clk = 1'b0;
  logic    n = 1'b0;
  sample_t x_in = '0;
  result_t out1;

  int hist [TAPS];   // hist[k] = X[n-k] as seen at the next edge

  fir_filter dut (.clk(clk), .n(n), .x_in(x_in), .out1(out1));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model_out();
    int acc = 0;
    for (int k = 0; k < TAPS; k++) acc += sm_value(COEFS_DEFAULT[k]) * hist[k];
    return acc;
  endfunction

  // Drive one sample (and reset level) for the next edge, then check the result after it.
  task automatic cycle(input int v, input logic rst_n);
    int expect_v;
    x_in = sample_t'(v);
    n    = rst_n;
    for (int k = TAPS-1; k >= 1; k--) hist[k] = hist[k-1];
    hist[0] = v;
    expect_v = rst_n ? model_out() : 0;
    if (!rst_n) for (int k = 0; k < TAPS; k++) hist[k] = 0;
    @(posedge clk);
    #1;
    checks++;
    if (int'(out1) != expect_v) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d out1=%0d expected %0d", v, out1, expect_v);
    end
    if (!rst_n) n_resets++;
    if (out1 < 0) n_negative++;
    if (out1[YW-2] != out1[YW-1]) n_top_bit++;   // value needs all 18 bits
  endtask

  initial begin
    for (int k = 0; k < TAPS; k++) hist[k] = 0;
    cycle(0, 1'b0);
    cycle(0, 1'b0);

    // impulse of height 1: out1 reads back h[0], h[1], ... h[16]
    cycle(1, 1'b1);
    for (int k = 0; k < TAPS; k++) begin
      checks++;
      if (int'(out1) != sm_value(COEFS_DEFAULT[k])) begin
        failures++;
        $display("FAIL impulse response h[%0d] = %0d", k, out1);
      end
      if (COEFS_DEFAULT[k][MW-1:0] == '0 && out1 == 0) n_zero_tap++;
      n_impulse++;
      if (k < TAPS-1) cycle(0, 1'b1);
    end
    repeat (TAPS) cycle(0, 1'b1);

    // step of height 255: the output settles at 255 * sum(h)
    repeat (TAPS + 3) cycle(255, 1'b1);

    // random samples
    repeat (2000) cycle(int'($urandom_range(0, 255)), 1'b1);

    // extremes: 255 on positive taps and 0 on negative taps, and the opposite.
    // X[n-k] = v means the sample entered k clocks before the checked edge.
    for (int sgn = 0; sgn < 2; sgn++) begin
      for (int t = TAPS-1; t >= 0; t--) begin
        cycle((int'(COEFS_DEFAULT[t][CW-1]) == sgn) ? 255 : 0, 1'b1);
      end
    end

    // reset in the middle of a stream
    repeat (10) cycle(int'($urandom_range(0, 255)), 1'b1);
    cycle(200, 1'b0);
    repeat (30) cycle(int'($urandom_range(0, 255)), 1'b1);

    $display("mechanisms: resets=%0d negative_outputs=%0d full_range=%0d zero_tap=%0d impulse_taps=%0d",
             n_resets, n_negative, n_top_bit, n_zero_tap, n_impulse);
    if (n_resets == 0)   begin failures++; $display("FAIL reset never exercised"); end
    if (n_negative == 0) begin failures++; $display("FAIL no negative output seen"); end
    if (n_top_bit == 0)  begin failures++; $display("FAIL output never used all 18 bits"); end
    if (n_zero_tap == 0) begin failures++; $display("FAIL zero tap never observed"); end
    if (n_impulse != TAPS) begin failures++; $display("FAIL impulse response incomplete"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
