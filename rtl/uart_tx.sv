// uart_tx: RS232 transmitter for the hit packets.
//
// Sends each byte as one asynchronous frame: a low start bit, eight data bits
// least significant first, and a high stop bit (8N1), each bit lasting
// CLK_HZ / BAUD cycles of clk. The line idles high.
//
// Interface: a valid/ready handshake. ready is high while the transmitter is
// idle; a byte is taken on a rising edge where valid and ready are both high,
// and the start bit begins on the next cycle. One frame takes 10 bit times;
// ready returns one cycle after the stop bit ends.
//
// The document says only that a UART sends one-byte packets over RS232; the
// frame format, the baud rate (115200) and the system clock (50 MHz) are this
// design's own defaults.
`timescale 1ns/1ps
module uart_tx #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 115_200,
  localparam int unsigned CLKS_PER_BIT = CLK_HZ / BAUD,
  localparam int unsigned CW = (CLKS_PER_BIT > 1) ? $clog2(CLKS_PER_BIT) : 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       txd
);

  // frame shift register: {stop, data[7:0], start}, sent from bit 0
  logic [9:0]    frame;
  logic [3:0]    bits_left;
  logic [CW-1:0] baud_cnt;
  logic          busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame     <= '1;
      bits_left <= '0;
      baud_cnt  <= '0;
      busy      <= 1'b0;
    end else if (!busy) begin
      if (valid) begin
        frame     <= {1'b1, data, 1'b0};
        bits_left <= 4'd10;
        baud_cnt  <= CW'(CLKS_PER_BIT - 1);
        busy      <= 1'b1;
      end
    end else if (baud_cnt != '0) begin
      baud_cnt <= baud_cnt - 1'b1;
    end else begin
      frame     <= {1'b1, frame[9:1]};
      baud_cnt  <= CW'(CLKS_PER_BIT - 1);
      bits_left <= bits_left - 1'b1;
      if (bits_left == 4'd1) busy <= 1'b0;
    end
  end

  assign ready = !busy;
  assign txd   = busy ? frame[0] : 1'b1;

  initial begin
    assert (CLKS_PER_BIT >= 2)
      else $error("uart_tx: CLK_HZ / BAUD must be at least 2");
  end

endmodule
