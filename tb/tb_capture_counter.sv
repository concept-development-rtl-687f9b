// tb_capture_counter: self-checking test of the RAM write-address counter.
//
// Runs several capture rounds with random gaps. In each round it raises arm,
// then checks cycle by cycle that exactly DEPTH writes follow, on the next
// DEPTH edges, at addresses 0..DEPTH-1, that full rises on the edge of the
// last write and stays high (with no further writes) while arm is held, and
// that full falls one edge after arm falls. Clock: 100 MHz.
`timescale 1ns/1ps
module tb_capture_counter;

  localparam int unsigned DEPTH = 4;
  localparam int unsigned AW    = 2;

  logic          clk_slow = 1'b0;
  logic          rst_n    = 1'b0;
  logic          arm      = 1'b0;
  logic          we;
  logic [AW-1:0] waddr;
  logic          full;

  int checks   = 0;
  int failures = 0;

  capture_counter #(.DEPTH(DEPTH)) dut (
    .clk_slow (clk_slow),
    .rst_n    (rst_n),
    .arm      (arm),
    .we       (we),
    .waddr    (waddr),
    .full     (full)
  );

  always #5 clk_slow = ~clk_slow;

  task automatic expect_state(input logic e_we, input int e_addr, input logic e_full,
                              input string what);
    checks++;
    if (we !== e_we || (e_we && waddr !== AW'(e_addr)) || full !== e_full) begin
      failures++;
      $display("FAIL %s: we=%b waddr=%0d full=%b, expected we=%b waddr=%0d full=%b at %0t",
               what, we, waddr, full, e_we, e_addr, e_full, $time);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk_slow);
    expect_state(1'b0, 0, 1'b0, "reset");
    rst_n = 1'b1;
    for (int round = 0; round < 20; round++) begin
      // idle gap: nothing written
      repeat ($urandom_range(0, 5)) begin
        @(negedge clk_slow);
        expect_state(1'b0, 0, 1'b0, "idle");
      end
      arm = 1'b1;
      @(negedge clk_slow);               // edge that sees arm
      for (int a = 0; a < DEPTH; a++) begin
        expect_state(1'b1, a, 1'b0, "write");
        @(negedge clk_slow);
      end
      // holding: full, no writes, for as long as arm stays high
      repeat ($urandom_range(1, 6)) begin
        expect_state(1'b0, 0, 1'b1, "hold");
        @(negedge clk_slow);
      end
      arm = 1'b0;
      expect_state(1'b0, 0, 1'b1, "hold until edge");
      @(negedge clk_slow);
      expect_state(1'b0, 0, 1'b0, "released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk_slow);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
