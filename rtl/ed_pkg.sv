// ed_pkg: constants and types shared by the event detector.
//
// The detector samples NUM_CHANNELS sensor lines at 400 MHz. Each channel
// packs SAMPLES consecutive samples into one RAM word per 100 MHz cycle and
// keeps DEPTH words, so one recording spans DEPTH*SAMPLES samples (40 ns).
// Every stored bit leaves the FPGA as one self-describing 8-bit packet:
//
//   bit 7    val   - the sample value
//   bits 6:5 loc   - position of the sample inside its RAM word (0 = oldest)
//   bits 4:3 addr  - RAM address of the word
//   bits 2:0 chan  - channel number
//
// The field set and its order (val, Loc[1:0], Addr[1:0], Chan[2:0]) follow
// the design; placing val at the most significant bit is this design's
// reading of the left-to-right field order.
`timescale 1ns / 1ps

package ed_pkg;

  localparam int NUM_CHANNELS = 8;
  localparam int SAMPLES      = 4;   // samples per RAM word (flip-flops per channel)
  localparam int DEPTH        = 4;   // RAM words per channel
  localparam int CHAN_W       = $clog2(NUM_CHANNELS);
  localparam int LOC_W        = $clog2(SAMPLES);
  localparam int ADDR_W       = $clog2(DEPTH);

  typedef logic [SAMPLES-1:0] word_t;
  typedef logic [ADDR_W-1:0]  addr_t;

  typedef struct packed {
    logic              val;
    logic [LOC_W-1:0]  loc;
    logic [ADDR_W-1:0] addr;
    logic [CHAN_W-1:0] chan;
  } packet_t;

endpackage
