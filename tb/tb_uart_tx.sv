// tb_uart_tx: self-checking test of the RS232 transmitter.
//
// Runs the transmitter at 10 clock cycles per bit (CLK_HZ = 1000, BAUD =
// 100) and sends random bytes, some back to back and some with gaps. An
// independent receiver watches the line: it finds the start bit, samples each
// bit in its middle, and checks the data (LSB first), the start and stop
// levels, that the line holds still for a whole bit time, and that a frame
// lasts exactly 10 bit times. It also checks the idle level and ready.
`timescale 1ns/1ps
module tb_uart_tx;

  localparam int unsigned CLK_HZ = 1000;
  localparam int unsigned BAUD   = 100;
  localparam int unsigned CPB    = CLK_HZ / BAUD;
  localparam int unsigned NBYTES = 60;

  logic       clk   = 1'b0;
  logic       rst_n = 1'b0;
  logic [7:0] data  = '0;
  logic       valid = 1'b0;
  logic       ready;
  logic       txd;

  int checks   = 0;
  int failures = 0;
  logic [7:0] sent [$];

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (
    .clk (clk), .rst_n (rst_n), .data (data), .valid (valid), .ready (ready), .txd (txd)
  );

  always #5 clk = ~clk;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s at %0t", msg, $time);
  endtask

  // sender
  initial begin
    repeat (3) @(posedge clk);
    checks++;
    if (txd !== 1'b1 || ready !== 1'b1) fail("idle line after reset");
    rst_n = 1'b1;
    for (int i = 0; i < NBYTES; i++) begin
      @(negedge clk);
      data  = 8'($urandom);
      valid = 1'b1;
      do @(posedge clk); while (!ready);
      sent.push_back(data);
      @(negedge clk);
      valid = 1'b0;
      if (i % 3 == 2) repeat ($urandom_range(1, 40)) @(negedge clk);
    end
  end

  // receiver
  initial begin
    logic [7:0] rx;
    longint     start_t, stop_t;
    @(posedge rst_n);
    for (int i = 0; i < NBYTES; i++) begin
      while (txd !== 1'b0) @(posedge clk);
      start_t = $time;
      // each bit must stay constant for CPB cycles
      for (int b = 0; b < 10; b++) begin
        logic level;
        level = txd;
        for (int c = 0; c < CPB; c++) begin
          if (c == CPB / 2) begin
            if (b == 0 && txd !== 1'b0) fail("start bit");
            if (b >= 1 && b <= 8) rx[b-1] = txd;
            if (b == 9) begin
              checks++;
              if (txd !== 1'b1) fail("stop bit");
            end
          end
          if (txd !== level) fail($sformatf("bit %0d changed inside its bit time", b));
          @(posedge clk);
        end
      end
      stop_t = $time;
      checks++;
      if (stop_t - start_t != 10 * CPB * 10) fail($sformatf("frame length %0d ns", stop_t - start_t));
      checks++;
      if (sent.size() == 0) fail("frame without a byte");
      else begin
        logic [7:0] exp;
        exp = sent.pop_front();
        if (rx !== exp) fail($sformatf("data %h expected %h", rx, exp));
      end
    end
    repeat (2 * CPB) @(posedge clk);
    checks++;
    if (txd !== 1'b1 || ready !== 1'b1) fail("idle line at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBYTES * 12 * CPB + 2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
