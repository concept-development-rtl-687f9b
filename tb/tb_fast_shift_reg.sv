// tb_fast_shift_reg: self-checking test of the 400 MHz sampling chain.
//
// Drives a random bit stream into the chain, half a clock before each rising
// edge, and keeps its own record of the last four bits driven. After every
// edge it checks that samples[3] is the latest bit (S1) and samples[0] the
// one taken three edges earlier (S4), and that reset clears the chain. The
// clock runs at 400 MHz (2.5 ns period).
`timescale 1ns/1ps
module tb_fast_shift_reg;

  localparam int unsigned TAPS = 4;

  logic            clk_fast = 1'b0;
  logic            rst_n    = 1'b0;
  logic            din      = 1'b0;
  logic [TAPS-1:0] samples;
  logic [TAPS-1:0] model;

  int checks   = 0;
  int failures = 0;

  fast_shift_reg #(.TAPS(TAPS)) dut (
    .clk_fast (clk_fast),
    .rst_n    (rst_n),
    .din      (din),
    .samples  (samples)
  );

  always #1.25 clk_fast = ~clk_fast;

  task automatic check(input logic [TAPS-1:0] exp, input string what);
    checks++;
    if (samples !== exp) begin
      failures++;
      $display("FAIL %s: samples=%b expected %b at %0t", what, samples, exp, $time);
    end
  endtask

  initial begin
    model = '0;
    repeat (3) @(negedge clk_fast);
    check('0, "reset");
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk_fast);
      din = 1'($urandom_range(0, 1));
      @(posedge clk_fast);
      model = {din, model[TAPS-1:1]};
      #0.1;
      check(model, "shift");
    end
    // asynchronous reset in the middle of a run
    @(negedge clk_fast);
    din = 1'b1;
    repeat (4) @(negedge clk_fast);
    rst_n = 1'b0;
    #0.1;
    check('0, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk_fast);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
