// tb_hit_reader: self-checking test of the data reading and conversion logic.
//
// The testbench stands in for the capture side and for the sample RAMs: it
// answers arm with full, fills its own 16 x 4 x 4-bit memory model with a new
// random pattern for every capture (registered read port, one cycle of
// latency, like dual_clock_ram), and takes packets with a randomly stalling
// ready. For every capture it works out on its own the list of bytes
// {address, position, channel} for the 1 samples, in walk order, and compares
// it with what the reader sends. It also checks:
//  - arm falls after full is seen and returns only after full has fallen;
//  - no packet is offered for a capture full of zeros;
//  - with no hits the walk takes 1 + 16 * 4 * 6 = 385 cycles from arm falling
//    to scan_done.
`timescale 1ns/1ps
module tb_hit_reader;
  import event_pkg::*;

  localparam int unsigned CH    = CHANNELS_PER_LINK;
  localparam int unsigned WIDTH = 4;
  localparam int unsigned DEPTH = 4;
  localparam int unsigned ROUNDS = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  logic arm, full = 1'b0;
  logic [ADDR_BITS-1:0] raddr;
  logic [CH-1:0][WIDTH-1:0] rdata;
  hit_packet_t tx_packet;
  logic tx_valid, tx_ready = 1'b0, scan_done;

  logic [WIDTH-1:0] mem [CH][DEPTH];
  logic [7:0]       expected [$];
  int checks = 0, failures = 0;
  int stall_pct = 50;

  hit_reader #(.CHANNELS(CH), .WIDTH(WIDTH), .DEPTH(DEPTH)) dut (
    .clk (clk), .rst_n (rst_n), .arm (arm), .full (full),
    .raddr (raddr), .rdata (rdata),
    .tx_packet (tx_packet), .tx_valid (tx_valid), .tx_ready (tx_ready),
    .scan_done (scan_done)
  );

  always #10 clk = ~clk;

  // RAM model: registered read, shared address
  always_ff @(posedge clk)
    for (int c = 0; c < CH; c++) rdata[c] <= mem[c][raddr];

  // UART model: random ready, checks each accepted byte
  always @(posedge clk) begin
    if (rst_n && tx_valid && tx_ready) begin
      checks++;
      if (expected.size() == 0) begin
        failures++;
        $display("FAIL unexpected packet %h at %0t", tx_packet, $time);
      end else begin
        logic [7:0] e;
        e = expected.pop_front();
        if (8'(tx_packet) !== e) begin
          failures++;
          $display("FAIL packet %h expected %h at %0t", tx_packet, e, $time);
        end
      end
    end
    tx_ready <= ($urandom_range(0, 99) >= stall_pct);
  end

  task automatic fill(input int density_pct);
    expected.delete();
    for (int c = 0; c < CH; c++)
      for (int a = 0; a < DEPTH; a++) begin
        for (int b = 0; b < WIDTH; b++) mem[c][a][b] = ($urandom_range(0, 99) < density_pct);
        for (int b = 0; b < WIDTH; b++)
          if (mem[c][a][b]) expected.push_back({2'(a), 2'(b), 4'(c)});
      end
  endtask

  initial begin
    longint t_release, t_done;
    for (int c = 0; c < CH; c++) for (int a = 0; a < DEPTH; a++) mem[c][a] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < ROUNDS; r++) begin
      int density;
      density = (r % 4 == 0) ? 0 : (r % 4 == 1) ? 100 : $urandom_range(2, 40);
      stall_pct = (r % 2 == 1) ? 0 : 70;
      // wait for the request, then "capture"
      while (!arm) @(negedge clk);
      checks++;
      if (expected.size() != 0) begin
        failures++;
        $display("FAIL round %0d: %0d packets missing", r, expected.size());
      end
      fill(density);
      repeat ($urandom_range(1, 4)) @(negedge clk);
      full = 1'b1;
      while (arm) @(negedge clk);
      t_release = $time / 20;
      while (!scan_done) begin
        @(negedge clk);
        // arm must stay low while full is high
        if (arm) begin
          failures++;
          $display("FAIL arm raised during walk");
        end
      end
      t_done = $time / 20;
      if (density == 0) begin
        checks++;
        if (t_done - t_release != 1 + CH * DEPTH * (WIDTH + 2)) begin
          failures++;
          $display("FAIL walk took %0d cycles, expected %0d", t_done - t_release,
                   1 + CH * DEPTH * (WIDTH + 2));
        end
      end
      repeat (3) begin
        @(negedge clk);
        checks++;
        if (arm) begin
          failures++;
          $display("FAIL arm raised before full fell");
        end
      end
      full = 1'b0;
      @(negedge clk);
      @(negedge clk);
      checks++;
      if (!arm) begin
        failures++;
        $display("FAIL arm not raised after full fell");
      end
    end
    checks++;
    if (expected.size() != 0) begin
      failures++;
      $display("FAIL %0d packets missing at end", expected.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
