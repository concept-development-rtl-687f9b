// event_detector_top: radiation-strike event detector.
//
// Each of the CHANNELS sensor inputs is sampled on every edge of the 400 MHz
// clock by a four-flip-flop shift register (fast_shift_reg). On each edge of
// the 100 MHz clock, the four latest samples of every channel are written as
// one 4-bit word into that channel's 4-word dual-clock RAM (dual_clock_ram),
// at the address given by a counter shared by all channels (capture_counter).
// One capture is therefore DEPTH x TAPS = 16 samples, 2.5 ns apart, covering
// 40 ns on every channel at once.
//
// Once the capture is complete the RAMs are read in the system clock domain
// (clk_sys) by hit_reader, which turns every sample that is 1 into a one-byte
// packet {word address, sample position, channel} and sends it over RS232
// (uart_tx). Empty samples send nothing. The time of a hit inside the capture
// is (address * 4 + position) * 2.5 ns.
//
// The packet's channel field is 4 bits wide, enough for 16 channels, while the
// sensor has 32. This design therefore gives every group of 16 channels its
// own reader and its own serial line: uart_txd[k] reports channels
// 16k .. 16k+15, and channel c is sent as c mod 16 on line c / 16. All lines
// share one capture, which starts only when every reader has asked for it.
//
// Clocks: clk_fast (400 MHz) and clk_slow (100 MHz) must come from the same
// source with rising edges aligned, clk_slow being clk_fast divided by four;
// clk_sys is independent. The capture handshake crosses between clk_slow and
// clk_sys through two-flip-flop synchronisers. rst_n is an asynchronous
// active-low reset, released separately in each domain.
//
// The sampling chain, the 4x4-bit RAM per channel, the 100 MHz address
// counter and the packet layout follow the document. The capture handshake,
// the split into serial lines, the clock phase relation, the reset and the
// UART settings are this design's own.
`timescale 1ns/1ps
module event_detector_top
  import event_pkg::*;
#(
  parameter int unsigned CHANNELS   = 32,
  parameter int unsigned CLK_SYS_HZ = 50_000_000,
  parameter int unsigned BAUD       = 115_200,
  localparam int unsigned TAPS      = 1 << LOC_BITS,   // samples per RAM word
  localparam int unsigned DEPTH     = 1 << ADDR_BITS,  // words per channel
  localparam int unsigned LINKS     = (CHANNELS + CHANNELS_PER_LINK - 1) / CHANNELS_PER_LINK
) (
  input  logic                clk_fast,    // 400 MHz sampling clock
  input  logic                clk_slow,    // 100 MHz word clock, clk_fast / 4, edge-aligned
  input  logic                clk_sys,     // system clock of the reading side
  input  logic                rst_n,
  input  logic [CHANNELS-1:0] sensor_in,   // one line per sensor channel
  output logic [LINKS-1:0]    uart_txd,    // RS232 data, one line per 16 channels
  output logic                capturing,   // high while a capture is being written
  output logic [LINKS-1:0]    scan_done    // pulse: a link has finished reading a capture
);

  localparam int unsigned AW = ADDR_BITS;

  // ---------------- resets ----------------
  logic rst_n_fast, rst_n_slow, rst_n_sys;

  reset_sync u_rst_fast (.clk(clk_fast), .rst_n_in(rst_n), .rst_n_out(rst_n_fast));
  reset_sync u_rst_slow (.clk(clk_slow), .rst_n_in(rst_n), .rst_n_out(rst_n_slow));
  reset_sync u_rst_sys  (.clk(clk_sys),  .rst_n_in(rst_n), .rst_n_out(rst_n_sys));

  // ---------------- capture control (clk_slow) ----------------
  logic [LINKS-1:0] link_arm;
  logic             arm_all, arm_slow;
  logic             we, full, full_sys;
  logic [AW-1:0]    waddr;

  assign arm_all = &link_arm;

  sync_2ff #(.WIDTH(1)) u_sync_arm  (.clk(clk_slow), .rst_n(rst_n_slow), .d(arm_all), .q(arm_slow));
  sync_2ff #(.WIDTH(1)) u_sync_full (.clk(clk_sys),  .rst_n(rst_n_sys),  .d(full),    .q(full_sys));

  capture_counter #(.DEPTH(DEPTH)) u_counter (
    .clk_slow (clk_slow),
    .rst_n    (rst_n_slow),
    .arm      (arm_slow),
    .we       (we),
    .waddr    (waddr),
    .full     (full)
  );

  assign capturing = we;

  // ---------------- per-channel sampling and storage ----------------
  // rdata is padded to whole links; channels beyond CHANNELS read as zero.
  logic [LINKS*CHANNELS_PER_LINK-1:0][TAPS-1:0] rdata;
  logic [LINKS-1:0][AW-1:0]                      link_raddr;

  for (genvar c = 0; c < LINKS * CHANNELS_PER_LINK; c++) begin : g_chan
    if (c < CHANNELS) begin : g_used
      logic [TAPS-1:0] samples;

      fast_shift_reg #(.TAPS(TAPS)) u_shift (
        .clk_fast (clk_fast),
        .rst_n    (rst_n_fast),
        .din      (sensor_in[c]),
        .samples  (samples)
      );

      dual_clock_ram #(.WIDTH(TAPS), .DEPTH(DEPTH)) u_ram (
        .wclk  (clk_slow),
        .we    (we),
        .waddr (waddr),
        .wdata (samples),
        .rclk  (clk_sys),
        .raddr (link_raddr[c / CHANNELS_PER_LINK]),
        .rdata (rdata[c])
      );
    end else begin : g_pad
      assign rdata[c] = '0;
    end
  end

  // ---------------- per-link readout and UART (clk_sys) ----------------
  for (genvar k = 0; k < LINKS; k++) begin : g_link
    hit_packet_t packet;
    logic        pkt_valid, pkt_ready;

    hit_reader #(.CHANNELS(CHANNELS_PER_LINK), .WIDTH(TAPS), .DEPTH(DEPTH)) u_reader (
      .clk       (clk_sys),
      .rst_n     (rst_n_sys),
      .arm       (link_arm[k]),
      .full      (full_sys),
      .raddr     (link_raddr[k]),
      .rdata     (rdata[k*CHANNELS_PER_LINK +: CHANNELS_PER_LINK]),
      .tx_packet (packet),
      .tx_valid  (pkt_valid),
      .tx_ready  (pkt_ready),
      .scan_done (scan_done[k])
    );

    uart_tx #(.CLK_HZ(CLK_SYS_HZ), .BAUD(BAUD)) u_uart (
      .clk   (clk_sys),
      .rst_n (rst_n_sys),
      .data  (packet),
      .valid (pkt_valid),
      .ready (pkt_ready),
      .txd   (uart_txd[k])
    );
  end

endmodule
