// tb_fir_fig6: replays the published timing simulation of the filter.
//
// The published waveform has a 200 ns clock (rising edges at 200, 400, 600, 800 ns), n going
// high at 100 ns, and x_in = 0, then 8 from 190 ns, then 5 from 390 ns (bits 7:5 are not
// shown and are taken as 0). It shows out1 = 18'h00320, 18'h002D4, 18'h001D0, 18'h00162 after
// those four edges. Those values come out only if the coefficients are sign-magnitude and the
// newest sample meets the coefficient printed for X[n-15] (64), the next one 1C, then 96, 96,
// and so on: the published simulation applies the coefficient list in the reverse order of
// the filter equation. This testbench therefore sets the filter's coefficient parameter to
// that order, h[k] = list[(15 - k) mod 17], and checks the four published output values.
// The published run starts from cleared sample registers; here a single clock pulse at 50 ns,
// while n is still low, clears them through the synchronous reset, ahead of the published
// timing.
`timescale 1ns/1ps
module tb_fir_fig6;
  import fir_pkg::*;
  int checks = 0, failures = 0;

  function automatic coef_set_t sim_order();
    coef_set_t c;
    for (int k = 0; k < TAPS; k++) c[k] = COEFS_DEFAULT[(15 - k + TAPS) % TAPS];
    return c;
  endfunction
  localparam coef_set_t SIM_COEFS = sim_order();

  logic    clk = 1'b0;
  logic    n = 1'b0;
  sample_t x_in = '0;
  result_t out1;

  fir_filter #(.COEFS(SIM_COEFS)) dut (.clk(clk), .n(n), .x_in(x_in), .out1(out1));

  // clock: low for the first 200 ns, then a 200 ns period
  initial begin
    #50  clk = 1'b1;
    #10  clk = 1'b0;
    #140;
    forever begin
      clk = 1'b1; #100;
      clk = 1'b0; #100;
    end
  end

  initial begin
    #5000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam result_t EXPECTED [4] = '{18'h00320, 18'h002D4, 18'h001D0, 18'h00162};

  initial begin
    #100 n = 1'b1;
    #90  x_in = 8'd8;     // 190 ns
    #200 x_in = 8'd5;     // 390 ns
  end

  initial begin
    #150;   // past the clearing pulse
    for (int e = 0; e < 4; e++) begin
      @(posedge clk);
      #10;
      checks++;
      if (out1 !== EXPECTED[e]) begin
        failures++;
        $display("FAIL edge %0d at %0t: out1 = %h, expected %h", e, $time, out1, EXPECTED[e]);
      end
    end
    checks++;
    if ($time > 820) begin
      failures++;
      $display("FAIL results arrived late");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
