// hit_reader: data reading and conversion logic of one serial link.
//
// Works in the system clock domain. It asks for a capture (arm), waits until
// the capture side reports full, releases arm and then walks through the
// sample RAMs of its CHANNELS channels: channel by channel, word address 0 to
// DEPTH-1, sample position 0 to WIDTH-1. For every sample that is 1 it sends
// one byte {address, position, channel} (event_pkg::hit_packet_t) to the UART;
// samples that are 0 send nothing. When the walk is over it waits for full to
// fall and arms again.
//
// Timing: the RAM read port is registered, so a word is taken one cycle after
// its address is put on raddr. Each word then takes one cycle per sample
// position, plus the cycles spent waiting for the UART (tx_ready) on a hit.
// With no hits, scan_done comes 1 + CHANNELS * DEPTH * (WIDTH + 2) cycles
// after arm falls (385 cycles for 16 channels).
//
// What is sent, and that only hits are sent, follow the document; the walk
// order, the handshake with the capture side and the per-link channel field
// are this design's own.
`timescale 1ns/1ps
module hit_reader
  import event_pkg::*;
#(
  parameter int unsigned CHANNELS = CHANNELS_PER_LINK,
  parameter int unsigned WIDTH    = 1 << LOC_BITS,
  parameter int unsigned DEPTH    = 1 << ADDR_BITS
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // capture handshake
  output logic                            arm,
  input  logic                            full,       // synchronised to clk
  // RAM read side; all channels share raddr
  output logic [ADDR_BITS-1:0]            raddr,
  input  logic [CHANNELS-1:0][WIDTH-1:0]  rdata,
  // packet stream to the UART
  output hit_packet_t                     tx_packet,
  output logic                            tx_valid,
  input  logic                            tx_ready,
  // status
  output logic                            scan_done   // one-cycle pulse at the end of a walk
);

  typedef enum logic [2:0] {ARM, RELEASE, READ, LATCH, EMIT, WAIT_EMPTY} state_t;

  localparam int unsigned CW = (CHANNELS > 1) ? $clog2(CHANNELS) : 1;

  state_t                state;
  logic [CW-1:0]         chan;
  logic [ADDR_BITS-1:0]  addr;
  logic [LOC_BITS-1:0]   loc;
  logic [WIDTH-1:0]      word;

  logic last_loc, last_addr, last_chan, hit, sent;

  assign last_loc  = (loc  == LOC_BITS'(WIDTH - 1));
  assign last_addr = (addr == ADDR_BITS'(DEPTH - 1));
  assign last_chan = (chan == CW'(CHANNELS - 1));
  assign hit       = word[loc];
  assign sent      = tx_valid && tx_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ARM;
      chan      <= '0;
      addr      <= '0;
      loc       <= '0;
      word      <= '0;
      scan_done <= 1'b0;
    end else begin
      scan_done <= 1'b0;
      unique case (state)
        ARM:     if (full) state <= RELEASE;
        RELEASE: begin
          chan  <= '0;
          addr  <= '0;
          state <= READ;
        end
        READ:    state <= LATCH;
        LATCH: begin
          word  <= rdata[chan];
          loc   <= '0;
          state <= EMIT;
        end
        EMIT: begin
          if (!hit || sent) begin
            loc <= loc + 1'b1;
            if (last_loc) begin
              addr <= addr + 1'b1;
              if (last_addr) begin
                chan <= chan + 1'b1;
                if (last_chan) begin
                  state     <= WAIT_EMPTY;
                  scan_done <= 1'b1;
                end else begin
                  state <= READ;
                end
              end else begin
                state <= READ;
              end
            end
          end
        end
        WAIT_EMPTY: if (!full) state <= ARM;
        default:    state <= ARM;
      endcase
    end
  end

  assign arm       = (state == ARM);
  assign raddr     = addr;
  assign tx_valid  = (state == EMIT) && hit;
  assign tx_packet = '{addr: addr, loc: loc, chan: CHAN_BITS'(chan)};

  // valid/ready rule: a packet offered to the UART stays until it is taken
  a_hold_packet: assert property (@(posedge clk) disable iff (!rst_n)
    tx_valid && !tx_ready |=> tx_valid && $stable(tx_packet));

  initial begin
    assert (CHANNELS >= 1 && CHANNELS <= CHANNELS_PER_LINK)
      else $error("hit_reader: a link names at most %0d channels", CHANNELS_PER_LINK);
    assert (WIDTH == (1 << LOC_BITS) && DEPTH == (1 << ADDR_BITS))
      else $error("hit_reader: WIDTH and DEPTH must match the packet fields");
  end

endmodule
