// fast_shift_reg: the high-speed sampler of one sensor channel.
//
// A chain of TAPS D flip-flops, clocked by the 400 MHz sampling clock, shifts
// the sensor input along on every edge. All TAPS flip-flop outputs (S1..S4 in
// the document's drawing) are brought out side by side, so that a clock four
// times slower sees, on each of its edges, the last TAPS samples at once: one
// 400 MHz stream becomes four 100 MHz streams.
//
// Interface: samples[TAPS-1] is S1, the sample taken on the latest edge, and
// samples[0] is the oldest one. Bit i of samples therefore holds the i-th
// sample in time order of the last TAPS, which is how the sample position in
// a hit packet is counted. The input is taken on the first flip-flop with no
// extra synchroniser, as in the document; that it is registered once per
// 400 MHz edge is the whole timing. Flip-flop chain and tap count follow the
// document; the bit order and the asynchronous reset are this design's own.
`timescale 1ns/1ps
module fast_shift_reg #(
  parameter int unsigned TAPS = 4
) (
  input  logic            clk_fast,  // 400 MHz sampling clock
  input  logic            rst_n,     // active-low, synchronous to clk_fast on release
  input  logic            din,       // sensor channel
  output logic [TAPS-1:0] samples    // [TAPS-1] newest (S1) .. [0] oldest (S4)
);

  always_ff @(posedge clk_fast or negedge rst_n) begin
    if (!rst_n) samples <= '0;
    else        samples <= {din, samples[TAPS-1:1]};
  end

endmodule
