// reset_sync: reset bridge for one clock domain.
//
// The active-low reset rst_n_in asserts rst_n_out at once (asynchronously)
// and releases it two rising edges of clk after rst_n_in rises, so every
// flip-flop of the domain leaves reset on the same edge. This is this
// design's own choice; the document says nothing about reset.
`timescale 1ns/1ps
module reset_sync (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_n_out
);

  logic stage;

  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) begin
      stage     <= 1'b0;
      rst_n_out <= 1'b0;
    end else begin
      stage     <= 1'b1;
      rst_n_out <= stage;
    end
  end

endmodule
