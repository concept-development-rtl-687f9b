// dual_clock_ram: sample memory of one channel.
//
// A DEPTH x WIDTH memory with a write port on the 100 MHz word clock and a
// read port on the system clock, so that samples written at the sensor's
// pace can be read at the pace of the rest of the chip. The write port stores
// wdata at waddr on a rising edge of wclk when we is high. The read port
// registers mem[raddr] into rdata on every rising edge of rclk: data appear
// one rclk cycle after the address. Writing and reading the same word at the
// same time is not protected; the capture handshake never does it.
//
// The 4-bit width, the four words and the two clocks are the document's; the
// registered read port is this design's own choice (it maps onto FPGA block
// or distributed RAM). The memory is not reset.
`timescale 1ns/1ps
module dual_clock_ram #(
  parameter int unsigned WIDTH = 4,
  parameter int unsigned DEPTH = 4,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             wclk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rclk,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge wclk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge rclk) begin
    rdata <= mem[raddr];
  end

endmodule
