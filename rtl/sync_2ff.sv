// sync_2ff: two-flip-flop synchroniser for a slowly changing level.
//
// The input may come from any clock domain; the output is the input delayed
// by two cycles of clk and safe to use in that domain. Both flip-flops clear
// on the asynchronous active-low reset. This helper is this design's own; the
// document does not describe how signals cross between its clock domains.
`timescale 1ns/1ps
module sync_2ff #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
