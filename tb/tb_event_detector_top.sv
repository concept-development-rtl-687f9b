// tb_event_detector_top: end-to-end test of the event detector at its
// default size (32 channels, 400/100 MHz sampling, 50 MHz system clock,
// 115200 baud).
//
// The testbench drives the 32 sensor lines half a 400 MHz period before each
// sampling edge and keeps its own record of the last four values driven on
// every channel. On each 100 MHz edge on which the design writes its RAMs
// (capturing high) it stores that record as one word; after four words it
// works out, independently of the design, the bytes each serial line must
// carry: {word, position, channel mod 16} for every 1 sample, channels in
// order, on line channel / 16. Two UART receivers decode the serial lines
// (8N1, 434 clocks per bit) and compare every byte with that list.
//
// The stimulus changes with every capture: a quiet capture (no strike at
// all), sparse random strikes, and bursts of consecutive strikes on one
// channel. The test counts, and fails if any never happens: a capture with no
// packet, a burst of strikes on one channel caught as several hits, hits in
// every sample position and every word, hits on both serial lines, and the
// reader waiting for a busy UART. It also checks that every capture writes
// exactly four consecutive 100 MHz words.
`timescale 1ns/1ps
module tb_event_detector_top;

  localparam int unsigned CHANNELS = 32;
  localparam int unsigned LINKS    = 2;
  localparam int unsigned CPB      = 50_000_000 / 115_200;  // system clocks per bit
  localparam int unsigned NCAP     = 12;                    // captures with stimulus

  logic                clk_fast = 1'b0, clk_slow = 1'b0, clk_sys = 1'b0;
  logic                rst_n    = 1'b0;
  logic [CHANNELS-1:0] sensor_in = '0;
  logic [LINKS-1:0]    uart_txd;
  logic                capturing;
  logic [LINKS-1:0]    scan_done;

  event_detector_top dut (
    .clk_fast  (clk_fast),
    .clk_slow  (clk_slow),
    .clk_sys   (clk_sys),
    .rst_n     (rst_n),
    .sensor_in (sensor_in),
    .uart_txd  (uart_txd),
    .capturing (capturing),
    .scan_done (scan_done)
  );

  // 400 MHz and 100 MHz with coinciding rising edges; 50 MHz unrelated phase
  always #1.25 clk_fast = ~clk_fast;
  initial begin
    #1.25;
    forever #5 clk_slow = ~clk_slow;
  end
  initial begin
    #3.3;
    forever #10 clk_sys = ~clk_sys;
  end

  int checks = 0, failures = 0;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s at %0t", msg, $time);
  endtask

  // ---------------- stimulus ----------------
  int captures = 0;        // completed captures
  int burst_left = 0;
  int burst_chan = 0;

  always @(negedge clk_fast) begin
    int mode;
    logic [CHANNELS-1:0] v;
    mode = (captures >= NCAP) ? 0 : captures % 3;   // 0 quiet, 1 sparse, 2 bursts
    v = '0;
    if (rst_n && mode == 1) begin
      for (int c = 0; c < CHANNELS; c++) v[c] = ($urandom_range(0, 63) == 0);
    end else if (rst_n && mode == 2) begin
      if (burst_left == 0 && $urandom_range(0, 7) == 0) begin
        burst_left = $urandom_range(2, 5);
        burst_chan = $urandom_range(0, CHANNELS - 1);
      end
      if (burst_left > 0) begin
        v[burst_chan] = 1'b1;
        burst_left--;
      end
    end
    sensor_in <= v;
  end

  // ---------------- reference model ----------------
  logic [3:0] hist [CHANNELS];            // last four samples, [3] newest
  logic [3:0] words [CHANNELS][4];
  int         word_idx = 0;
  logic [7:0] expected [LINKS][$];

  // coverage counters
  int n_empty_capture = 0, n_burst = 0, n_backpressure = 0;
  int n_loc [4];
  int n_addr [4];
  int n_link [LINKS];

  initial begin
    for (int c = 0; c < CHANNELS; c++) hist[c] = '0;
    for (int i = 0; i < 4; i++) begin n_loc[i] = 0; n_addr[i] = 0; end
    for (int k = 0; k < LINKS; k++) n_link[k] = 0;
  end

  always @(posedge clk_fast)
    for (int c = 0; c < CHANNELS; c++) hist[c] <= {sensor_in[c], hist[c][3:1]};

  always @(posedge clk_slow) begin
    if (rst_n && capturing) begin
      for (int c = 0; c < CHANNELS; c++) words[c][word_idx] = hist[c];
      word_idx++;
      if (word_idx == 4) begin
        int hits;
        hits = 0;
        word_idx = 0;
        for (int c = 0; c < CHANNELS; c++) begin
          logic [15:0] trace;
          for (int a = 0; a < 4; a++) begin
            trace[a*4 +: 4] = words[c][a];
            for (int b = 0; b < 4; b++)
              if (words[c][a][b]) begin
                expected[c / 16].push_back({2'(a), 2'(b), 4'(c % 16)});
                hits++;
                n_loc[b]++;
                n_addr[a]++;
                n_link[c / 16]++;
              end
          end
          for (int t = 0; t < 15; t++) if (trace[t] && trace[t+1]) begin n_burst++; break; end
        end
        if (hits == 0) n_empty_capture++;
        captures++;
      end
    end else if (rst_n) begin
      checks++;
      if (word_idx != 0) fail("capture shorter than four consecutive words");
    end
  end


  // ---------------- UART receivers ----------------
  int received [LINKS];

  for (genvar k = 0; k < LINKS; k++) begin : g_rx
    // the reader offers a packet while the UART is still sending
    always @(posedge clk_sys)
      if (dut.g_link[k].pkt_valid && !dut.g_link[k].pkt_ready) n_backpressure++;

    initial begin
      logic [7:0] rx;
      received[k] = 0;
      @(posedge rst_n);
      forever begin
        @(negedge uart_txd[k]);
        repeat (CPB / 2) @(posedge clk_sys);
        if (uart_txd[k] !== 1'b0) fail($sformatf("line %0d: short start bit", k));
        for (int b = 0; b < 8; b++) begin
          repeat (CPB) @(posedge clk_sys);
          rx[b] = uart_txd[k];
        end
        repeat (CPB) @(posedge clk_sys);
        checks++;
        if (uart_txd[k] !== 1'b1) fail($sformatf("line %0d: stop bit", k));
        checks++;
        received[k]++;
        if (expected[k].size() == 0) fail($sformatf("line %0d: unexpected byte %h", k, rx));
        else begin
          logic [7:0] e;
          e = expected[k].pop_front();
          if (rx !== e) fail($sformatf("line %0d: byte %h expected %h", k, rx, e));
        end
      end
    end
  end

  // ---------------- sequence ----------------
  initial begin
    repeat (5) @(posedge clk_sys);
    rst_n = 1'b1;
    wait (captures >= NCAP + 2);
    wait (expected[0].size() == 0 && expected[1].size() == 0);
    repeat (12 * CPB) @(posedge clk_sys);
    checks++;
    if (expected[0].size() != 0 || expected[1].size() != 0) fail("bytes not received");
    $display("captures=%0d bytes line0=%0d line1=%0d empty=%0d bursts=%0d backpressure=%0d",
             captures, received[0], received[1], n_empty_capture, n_burst, n_backpressure);
    $display("hits by position %0d %0d %0d %0d, by word %0d %0d %0d %0d",
             n_loc[0], n_loc[1], n_loc[2], n_loc[3], n_addr[0], n_addr[1], n_addr[2], n_addr[3]);
    checks++; if (n_empty_capture == 0) fail("no capture without hits");
    checks++; if (n_burst == 0)         fail("no burst of consecutive strikes");
    checks++; if (n_backpressure == 0)  fail("reader never waited for the UART");
    for (int i = 0; i < 4; i++) begin
      checks++; if (n_loc[i] == 0)  fail($sformatf("no hit in position %0d", i));
      checks++; if (n_addr[i] == 0) fail($sformatf("no hit in word %0d", i));
    end
    for (int k = 0; k < LINKS; k++) begin
      checks++; if (n_link[k] == 0) fail($sformatf("no hit on line %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk_sys);
    failures++;
    $display("FAIL watchdog: captures=%0d", captures);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
