// tb_dual_clock_ram: self-checking test of the dual-clock sample RAM.
//
// Writes random 4-bit words on a 100 MHz clock and reads them back on an
// unrelated 37 MHz clock. Checks that each read returns the last word written
// to that address, exactly one read-clock edge after the address is applied,
// and that a write with we low changes nothing.
`timescale 1ns/1ps
module tb_dual_clock_ram;

  localparam int unsigned WIDTH = 4;
  localparam int unsigned DEPTH = 4;
  localparam int unsigned AW    = 2;

  logic             wclk = 1'b0, rclk = 1'b0;
  logic             we   = 1'b0;
  logic [AW-1:0]    waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0;
  logic [WIDTH-1:0] rdata;
  logic [WIDTH-1:0] model [DEPTH];

  int checks   = 0;
  int failures = 0;

  dual_clock_ram #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (
    .wclk (wclk), .we (we), .waddr (waddr), .wdata (wdata),
    .rclk (rclk), .raddr (raddr), .rdata (rdata)
  );

  always #5     wclk = ~wclk;
  always #13.5  rclk = ~rclk;

  task automatic write_word(input int a, input logic [WIDTH-1:0] d, input logic en);
    @(negedge wclk);
    we = en; waddr = AW'(a); wdata = d;
    @(negedge wclk);
    we = 1'b0;
    if (en) model[a] = d;
  endtask

  task automatic read_check(input int a);
    @(negedge rclk);
    raddr = AW'(a);
    @(posedge rclk);
    #0.1;
    checks++;
    if (rdata !== model[a]) begin
      failures++;
      $display("FAIL read addr %0d: got %b expected %b", a, rdata, model[a]);
    end
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) write_word(a, WIDTH'(a * 5 + 3), 1'b1);
    for (int a = 0; a < DEPTH; a++) read_check(a);
    for (int r = 0; r < 50; r++) begin
      for (int a = 0; a < DEPTH; a++) write_word(a, WIDTH'($urandom), 1'b1);
      write_word($urandom_range(0, DEPTH - 1), WIDTH'($urandom), 1'b0);  // disabled write
      for (int a = DEPTH - 1; a >= 0; a--) read_check(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge wclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
