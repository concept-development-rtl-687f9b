// capture_counter: write-address counter of the sample RAMs.
//
// Runs on the 100 MHz word clock. When the reading side asks for a capture
// (arm high) and the previous one has been handed over (full low), it writes
// DEPTH consecutive words: for DEPTH cycles we is high and waddr counts
// 0, 1, .., DEPTH-1. It then raises full and stops, so the RAM contents hold
// still while they are read out. When arm falls, full falls and the next
// capture can start once arm rises again (a four-phase handshake).
//
// Timing: the first write happens on the edge after the one that sees arm
// high; full rises on the edge that writes the last word. arm must already be
// synchronised to clk_slow; full goes to the reading side, which synchronises
// it. The counter clocked at 100 MHz that addresses the RAM is the
// document's; the arm/full handshake that lets the reader find the memory
// still is this design's own, as the document does not say when reading
// happens.
`timescale 1ns/1ps
module capture_counter #(
  parameter int unsigned DEPTH = 4,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk_slow,  // 100 MHz word clock
  input  logic          rst_n,
  input  logic          arm,       // capture request, synchronous to clk_slow
  output logic          we,        // RAM write enable
  output logic [AW-1:0] waddr,     // RAM write address
  output logic          full       // DEPTH words captured, RAM is stable
);

  typedef enum logic [1:0] {IDLE, CAPTURE, HOLD} state_t;

  state_t        state;
  logic [AW-1:0] count;

  always_ff @(posedge clk_slow or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      count <= '0;
      full  <= 1'b0;
    end else begin
      unique case (state)
        IDLE: begin
          count <= '0;
          if (arm) state <= CAPTURE;
        end
        CAPTURE: begin
          count <= count + 1'b1;
          if (count == AW'(DEPTH - 1)) begin
            state <= HOLD;
            full  <= 1'b1;
          end
        end
        HOLD: begin
          if (!arm) begin
            state <= IDLE;
            full  <= 1'b0;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign we    = (state == CAPTURE);
  assign waddr = count;

endmodule
