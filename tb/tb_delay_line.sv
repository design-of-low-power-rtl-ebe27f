// tb_delay_line: checks the 16-stage tapped delay line against a software history of the
// samples: after every clock each tap k must hold the sample from k clocks earlier (tap 0 is
// the input itself), and a synchronous reset must clear every stage.
`timescale 1ns/1ps
module tb_delay_line;
  localparam int W = 8, DEPTH = 16;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] d;
  logic [W-1:0] taps [DEPTH+1];
  logic [W-1:0] hist [DEPTH+1];  // hist[k] = expected X[n-k]

  delay_line dut (.clk(clk), .rst_n(rst_n), .d(d), .taps(taps));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int k = 0; k <= DEPTH; k++) begin
      checks++;
      if (taps[k] !== hist[k]) begin
        failures++;
        if (failures < 10) $display("FAIL tap %0d = %h, expected %h", k, taps[k], hist[k]);
      end
    end
  endtask

  task automatic step(input logic [W-1:0] v, input logic r);
    // advance the model for the edge that is about to happen
    if (!rst_n) for (int k = 1; k <= DEPTH; k++) hist[k] = '0;
    else begin
      for (int k = DEPTH; k >= 2; k--) hist[k] = hist[k-1];
      hist[1] = d;
    end
    @(posedge clk);
    #1;
    rst_n = r;
    d = v;
    hist[0] = v;
    #1;
    compare();
  endtask

  initial begin
    d = '0;
    for (int k = 0; k <= DEPTH; k++) hist[k] = '0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) step(W'($urandom), 1'b1);
    step(8'hA5, 1'b0);           // reset asserted for the next edge
    step(8'h3C, 1'b1);
    for (int k = 1; k <= DEPTH; k++) begin
      checks++;
      if (taps[k] !== '0) begin
        failures++;
        $display("FAIL stage %0d not cleared by reset", k);
      end
    end
    for (int i = 0; i < 100; i++) step(W'($urandom), 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
