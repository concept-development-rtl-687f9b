# Radiation-strike event detector

A radiation strike on a sensor channel shows up as a short transient, often
only a few nanoseconds long. This design records such transients on 32
sensor channels with 2.5 ns resolution and reports every strike to a PC over
RS232. Each strike is sent as one byte that says when and where it happened.

The main idea is to oversample with plain flip-flops. Each channel runs
through a four-flip-flop shift register clocked at 400 MHz. A 100 MHz clock
then picks up the four latest samples at once, as one 4-bit word. One fast
stream becomes four slow streams, and only the shift register has to run at
400 MHz. The words go into a small dual-clock RAM per channel. Logic on the
system clock reads them back and sends one byte per strike. Empty samples
send nothing, so the slow serial link carries only real events.

```
 sensor_in[c] ─► fast_shift_reg ──4──► dual_clock_ram ──4──► hit_reader ──8──► uart_tx ──► uart_txd[k]
                 (400 MHz)             (4 words, one per      (system clock:    (8N1,
                                       channel)               1 byte per hit)   115200 baud)
                                          ▲ we, waddr
                 capture_counter ─────────┘   (100 MHz, shared by all channels)
```

## From one 400 MHz stream to 4-bit words

`fast_shift_reg` shifts the sensor line in on every 400 MHz edge. Its output
`samples[3:0]` holds the last four samples in time order:

* `samples[0]` is the oldest sample (the fourth flip-flop, S4).
* `samples[3]` is the newest sample (the first flip-flop, S1).

`clk_slow` must be `clk_fast` divided by four, with rising edges that line
up, as from one PLL. Each 100 MHz edge then sees four samples that no other
word shares, taken 2.5 ns apart. Without that phase relation, words would
overlap or leave gaps. The sensor input goes straight into the first
flip-flop, with no synchroniser in front, because the aim is to record the
raw transient.

## A capture, and how the two clock domains hand it over

Each channel has only four words of memory: 16 samples, or 40 ns. The design
therefore works in *captures*. A capture writes all four words once, on four
consecutive 100 MHz edges and in every channel at the same time. The memory
then stays untouched until all of it has been read out. This is the part that
needs the most care, because writing happens on `clk_slow` and reading on
`clk_sys`.

`capture_counter` (on `clk_slow`) and one `hit_reader` per serial line (on
`clk_sys`) pass two levels back and forth, each through a two-flip-flop
synchroniser:

1. Every reader raises `arm`. The top ANDs the readers' `arm` signals, so a
   capture starts only when all of them are ready.
2. The counter sees `arm`. It drives `we` for four edges, with `waddr` going
   0, 1, 2, 3. It then raises `full` and stops.
3. Each reader sees `full` and drops `arm`. It then reads its 16 channels'
   RAMs. The write side is idle, so the data hold still.
4. The counter sees `arm` low and drops `full`.
5. A reader that has finished, and has seen `full` low, raises `arm` again.

Strikes that arrive while a capture is being read out are not recorded. The
time between captures depends on how many hits have to go out over the slow
serial link.

## Hit packets and the serial lines

A reader goes through its channels in order. For each channel it reads word
addresses 0 to 3, and within each word it checks positions 0 to 3. Every `1`
it finds becomes one byte, `event_pkg::hit_packet_t`:

| bits | field  | meaning |
|------|--------|---------|
| 7:6  | `addr` | RAM word, 0 = first 10 ns of the capture |
| 5:4  | `loc`  | sample position inside the word, 0 = oldest |
| 3:0  | `chan` | channel number on this serial line |

The time of a hit from the start of a capture is
`(addr * 4 + loc) * 2.5 ns`.

The 4-bit channel field can name only 16 channels, but the sensor has 32.
The byte format is kept as it is. Instead, every group of 16 channels has its
own reader, its own UART and its own line: `uart_txd[k]` carries channels
`16k .. 16k+15`, and channel `c` is sent as `c mod 16`. Both lines share each
capture. `CHANNELS` can be set to any count; the number of lines
(`LINKS = ceil(CHANNELS / 16)`) follows from it.

Reading and formatting a word takes one cycle per sample position plus two
cycles for the registered RAM read. A walk with no hits takes
`1 + 16 * 4 * 6 = 385` system clocks. Each hit also waits for the UART.
The UART sends 8N1, LSB first, at 115200 baud from 50 MHz (434 clocks per
bit): about 87 µs per hit, or roughly 11,500 hits per second per line.
`hit_reader` holds a byte on a valid/ready handshake until the UART takes it.
An assertion checks that rule.

## Top-level interface (`event_detector_top`)

| port | dir | width | |
|------|-----|-------|---|
| `clk_fast` | in | 1 | 400 MHz sampling clock |
| `clk_slow` | in | 1 | 100 MHz, `clk_fast / 4`, rising edges aligned |
| `clk_sys` | in | 1 | system clock of the reading side, any phase |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `sensor_in` | in | `CHANNELS` | sensor lines |
| `uart_txd` | out | `LINKS` | RS232 data (logic level), idles high |
| `capturing` | out | 1 | RAM write in progress |
| `scan_done` | out | `LINKS` | pulse: a line has finished reading a capture |

Parameters: `CHANNELS = 32`, `CLK_SYS_HZ = 50_000_000`, `BAUD = 115_200`.
The word width (4 samples) and the depth (4 words) follow from the packet
fields in `event_pkg`. They cannot change without changing the byte format.

Each clock domain takes `rst_n` through its own `reset_sync`: the reset takes
effect at once and ends on a clock edge. The sample RAMs are not reset.
Nothing they hold is read before a capture has written it.

## Files

| file | what it is |
|------|------------|
| `rtl/event_pkg.sv` | packet field widths and `hit_packet_t` |
| `rtl/fast_shift_reg.sv` | 400 MHz four-tap sampling chain |
| `rtl/capture_counter.sv` | 100 MHz write-address counter and capture handshake |
| `rtl/dual_clock_ram.sv` | 4 x 4-bit RAM, write on `clk_slow`, registered read on `clk_sys` |
| `rtl/hit_reader.sv` | RAM walk, hit-to-byte conversion |
| `rtl/uart_tx.sv` | 8N1 transmitter |
| `rtl/sync_2ff.sv`, `rtl/reset_sync.sv` | clock-domain crossing helpers |
| `rtl/event_detector_top.sv` | the whole detector |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench checks itself. It prints `TB_RESULT checks=N failures=M` and
stops, and a watchdog ends it if it hangs. For example, the end-to-end test
at full size:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/event_pkg.sv \
    tb/tb_event_detector_top.sv --top-module tb_event_detector_top
./obj_dir/Vtb_event_detector_top
```

It takes about a second. `tb_event_detector_top` runs the design at its
default parameters (32 channels, 50 MHz, 115200 baud). It drives quiet,
sparse and burst stimulus, and keeps its own model of what every shift
register held. From that model it predicts every byte on both serial lines,
and it decodes the lines to compare them. It also checks that each capture
is exactly four consecutive 100 MHz words. It fails if any of the following
never happened: a capture with no hits, a burst of strikes seen as several
hits on one channel, a hit in every word and every position, traffic on both
lines, and the reader waiting for a busy UART.

The module testbenches check the following:

* `tb_fast_shift_reg`: the tap order, and the asynchronous reset.
* `tb_capture_counter`: the exact cycles of `we`, `waddr` and `full` across
  the handshake.
* `tb_dual_clock_ram`: reads on an unrelated clock, with one cycle of
  latency.
* `tb_hit_reader`: the byte list for random, empty and full memories, UART
  stalls, the `arm`/`full` rules, and the 385-cycle walk.
* `tb_uart_tx`: framing, bit timing and back-to-back frames.

## How far to trust it, and where it departs from the concept

The following come from the concept this design is built on:

* the flip-flop chain at 400 MHz;
* the four-sample, 100 MHz words;
* a dual-clock RAM of four 4-bit words per channel;
* a 100 MHz counter that addresses the RAM;
* one byte per hit, laid out as address, location, channel;
* no packets for empty samples;
* UART and RS232 to a PC.

This implementation adds or chooses the following:

* **Two serial lines.** The concept states both "32 channels" and a 4-bit
  channel field. The two lines keep both numbers. A single-line variant
  would need a wider packet or fewer channels.
* **The capture handshake**, and with it the dead time during readout. The
  concept does not say when the memory is read relative to writing.
* **One shared address counter** for all channels, since they all write at
  the same moment.
* **The clock relation.** `clk_slow` must be derived from `clk_fast` and
  aligned with it. No clock generation is included; the clocks come in as
  ports.
* **The UART settings:** 8N1, 115200 baud, 50 MHz system clock, no parity
  and no checksum.
* **Reset behaviour**, the bit order inside a word, the walk order, and the
  registered RAM read.

The following are not included:

* the PC program that plots the hits;
* the RS232 level shifter (`uart_txd` is a logic-level signal);
* the sensor itself.

A "sticky bit" alternative was considered for the concept: one bit per
channel per 10 ns, with a longer window but no way to tell consecutive
strikes apart. It is not implemented here.

Timing closure at 400 MHz has not been checked on any FPGA. The fast domain
is only the four flip-flops per channel and the RAM write-data path, which
keeps it as small as it can be.

`verilator -Wall` reports `SYNCASYNCNET` on the system-domain reset. This is
expected: the reset is used asynchronously by the flip-flops and
synchronously by the handshake assertion's `disable iff`.
