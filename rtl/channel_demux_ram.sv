// channel_demux_ram: one sensor channel's demultiplexer and sample memory.
//
// Four D flip-flops (S1..S4) form a shift chain clocked at 400 MHz, so at any
// moment they hold the last four 2.5 ns samples of the input, S1 the newest.
// On each 100 MHz edge with `we` high the four flip-flop outputs are written
// as one word into a 4-bit wide, 4-deep dual-port RAM at `addr_a`. Port B is
// read at `addr_b` by the readout state machine.
//
// Word layout: bit l holds the sample that is l-th in time within the word,
// so bit 0 is S4 (the oldest) and bit 3 is S1 (the newest). Across a recording
// the sample taken at time (a*4 + l) * 2.5 ns after the first written edge's
// window opens lands in address a, bit l.
//
// Timing: clk_400 and clk_100 come from the same PLL and share rising edges.
// A write at a 100 MHz edge stores the samples taken at the four 400 MHz edges
// before it. Port B is registered (block-RAM style): out_b shows mem[addr_b]
// one clk_100 cycle after addr_b is presented.
//
// The shift chain, the 4x4 size and the shared write counter follow the
// design; the bit order and the registered read port are this design's
// choices. The sensor input is sampled directly, as in the design, without
// a synchroniser.
`timescale 1ns / 1ps

module channel_demux_ram
  import ed_pkg::*;
(
  input  logic  clk_400,
  input  logic  clk_100,
  input  logic  din,
  input  logic  we,
  input  addr_t addr_a,
  input  addr_t addr_b,
  output word_t out_b
);

  // S1 is shreg[SAMPLES-1], S4 is shreg[0]: new samples enter at the top.
  word_t shreg;
  word_t mem [DEPTH];

  always_ff @(posedge clk_400)
    shreg <= {din, shreg[SAMPLES-1:1]};

  always_ff @(posedge clk_100) begin
    if (we)
      mem[addr_a] <= shreg;
    out_b <= mem[addr_b];
  end

endmodule
