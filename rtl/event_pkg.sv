// event_pkg: types and constants shared by the event-detector modules.
//
// A hit is reported to the PC as one byte. From the most significant end it
// holds the RAM word address (2 bits), the position of the sample inside that
// word (2 bits) and the channel number (4 bits). The layout follows the
// document; the names are this design's own.
`timescale 1ns/1ps
package event_pkg;

  localparam int unsigned ADDR_BITS = 2;  // RAM word address: four words per channel
  localparam int unsigned LOC_BITS  = 2;  // sample position inside a 4-bit word
  localparam int unsigned CHAN_BITS = 4;  // channel number inside one serial link

  // Channels one serial link can name with its 4-bit channel field.
  localparam int unsigned CHANNELS_PER_LINK = 1 << CHAN_BITS;

  typedef struct packed {
    logic [ADDR_BITS-1:0] addr;  // bits 7:6
    logic [LOC_BITS-1:0]  loc;   // bits 5:4
    logic [CHAN_BITS-1:0] chan;  // bits 3:0
  } hit_packet_t;

endpackage
