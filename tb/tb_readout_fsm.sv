// tb_readout_fsm: self-checking test of the readout state machine.
//
// The testbench models the eight channel RAMs (registered read port, random
// contents) and the write counter (write enable for 4 cycles after a start),
// holds the buffer-full input randomly high, and sends acquire pulses at
// random moments. It checks:
//   - packets come in the order channel, address, bit position, wrapping
//     around after channel 7, each carrying the right stored bit and fields;
//   - no packet is pushed while the buffer is full, and the position does
//     not advance during a pause;
//   - acquire gives one counter-start pulse, no packets until writing ends,
//     and the next packet is channel 0, address 0, position 0;
//   - with a never-full buffer a full sweep of 128 packets takes 160 cycles.
// Counts of pauses, acquisitions and wrap-arounds must all be non-zero.
`timescale 1ns / 1ps
module tb_readout_fsm;
  import ed_pkg::*;

  logic    clk = 0, rst = 1, acquire = 0, buf_full = 0, wr_busy = 0;
  word_t   chan_in [NUM_CHANNELS];
  word_t   ram [NUM_CHANNELS][DEPTH];
  addr_t   addr_b;
  logic    cnt_start, pkt_valid;
  packet_t pkt;

  int checks = 0, failures = 0;
  int exp_idx = 0;             // position in the sweep, 0..127
  int stalls = 0, acqs = 0, wraps = 0, starts = 0, busy_left = 0;
  int pkts = 0;
  logic in_standby = 0, full_mode = 1;

  readout_fsm dut (.*);

  always #5 clk = ~clk;

  // channel RAM model: registered read
  always @(posedge clk)
    for (int c = 0; c < NUM_CHANNELS; c++) chan_in[c] <= ram[c][addr_b];

  // write counter model
  always @(posedge clk) begin
    if (cnt_start) begin busy_left <= DEPTH; wr_busy <= 1; end
    else if (busy_left > 1) busy_left <= busy_left - 1;
    else begin busy_left <= 0; wr_busy <= 0; end
  end

  // packet checker
  always @(posedge clk) if (!rst) begin
    if (cnt_start) begin
      starts++;
      in_standby <= 1;
      exp_idx <= 0;
    end
    if (pkt_valid) begin
      int c, a, l;
      c = exp_idx / 16; a = (exp_idx / 4) % 4; l = exp_idx % 4;
      checks++;
      pkts++;
      if (buf_full) begin failures++; $display("push while full"); end
      if (in_standby && wr_busy) begin failures++; $display("push during recording"); end
      if (pkt.chan != 3'(c) || pkt.addr != 2'(a) || pkt.loc != 2'(l) || pkt.val != ram[c][a][l]) begin
        failures++;
        $display("pkt c%0d a%0d l%0d v%0d, want c%0d a%0d l%0d v%0d",
                 pkt.chan, pkt.addr, pkt.loc, pkt.val, c, a, l, ram[c][a][l]);
      end
      if (exp_idx == 127) wraps++;
      exp_idx <= (exp_idx + 1) % 128;
      in_standby <= 0;
    end else if (buf_full && !wr_busy && !cnt_start && !acquire) stalls++;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    foreach (ram[c, a]) ram[c][a] = word_t'($urandom);
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // sweep timing with a free buffer: starts at idx 0 right after reset
    t0 = 0;
    while (!(pkt_valid && exp_idx == 0 && pkts > 0)) begin @(posedge clk); #1; t0++; end
    checks++;
    if (t0 != 160 + 1) begin
      // pkts>0 at first, idx 0 again after 128 packets: 160 cycles per sweep
      failures++;
      $display("first sweep took %0d cycles, want 161", t0);
    end
    for (int n = 0; n < 6000; n++) begin
      @(posedge clk); #1;
      buf_full = ($urandom % 3 == 0);
      acquire  = ($urandom % 400 == 0) && (busy_left == 0) && !cnt_start && !wr_busy;
      if (acquire) begin
        acqs++;
        ram[$urandom % NUM_CHANNELS][$urandom % DEPTH] = word_t'($urandom);
      end
    end
    acquire = 0; buf_full = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (stalls == 0 || acqs == 0 || wraps < 2 || starts != acqs) begin
      failures++;
      $display("stalls=%0d acqs=%0d starts=%0d wraps=%0d", stalls, acqs, starts, wraps);
    end
    $display("stalls=%0d acquisitions=%0d wraps=%0d packets=%0d", stalls, acqs, wraps, pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
