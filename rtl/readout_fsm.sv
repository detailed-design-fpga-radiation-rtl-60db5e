// readout_fsm: the state machine between the channel RAMs and the UART.
//
// In normal operation it walks the memory of every channel in turn: for each
// channel, each RAM address, each bit position inside the word, it emits one
// 8-bit packet {val, loc, addr, chan} (see ed_pkg) into the UART buffer, and
// when the last bit of the last channel has gone it starts over, forever.
// While the buffer reports full the walk is frozen and no packet is lost or
// skipped.
//
// An `acquire` pulse (the acquisition code arrived from the host) interrupts
// the walk: the machine pulses `cnt_start`, which resets the shared write
// counter and enables RAM writing, then stands by until the counter drops its
// write enable (`wr_busy`) after 40 ns of recording. It then restarts the walk
// at channel 0, address 0, bit 0, so the new recording is sent in order.
//
// States:
//   FETCH   - drive addr_b; the registered RAM port answers on the next cycle
//   SEND    - push one packet per cycle while the buffer is not full
//   START   - pulse cnt_start
//   STANDBY - wait for wr_busy to fall
//
// Timing: a packet is pushed in the cycle pkt_valid is high. With a free
// buffer one channel (16 bits) takes 20 cycles: 4 fetch cycles plus 16 sends.
//
// The read order, the packet fields, the pause on buffer full and the standby
// during recording follow the design. Restarting the walk at channel 0 after
// a recording, ignoring a second acquire during standby, and the fetch cycle
// for the registered RAM port are this design's choices.
`timescale 1ns / 1ps

module readout_fsm
  import ed_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  word_t   chan_in [NUM_CHANNELS],
  output addr_t   addr_b,
  input  logic    acquire,
  input  logic    buf_full,
  output logic    cnt_start,
  input  logic    wr_busy,
  output packet_t pkt,
  output logic    pkt_valid
);

  typedef enum logic [1:0] {FETCH, SEND, START, STANDBY} state_t;

  state_t            state;
  logic [CHAN_W-1:0] chan;
  addr_t             addr;
  logic [LOC_W-1:0]  loc;
  word_t             word;

  assign addr_b    = addr;
  assign word      = chan_in[chan];
  assign cnt_start = (state == START);

  always_comb begin
    pkt.val   = word[loc];
    pkt.loc   = loc;
    pkt.addr  = addr;
    pkt.chan  = chan;
    pkt_valid = (state == SEND) && !buf_full && !acquire;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= FETCH;
      chan  <= '0;
      addr  <= '0;
      loc   <= '0;
    end else begin
      unique case (state)
        FETCH: begin
          if (acquire) state <= START;
          else         state <= SEND;
        end
        SEND: begin
          if (acquire) begin
            state <= START;
          end else if (!buf_full) begin
            loc <= loc + 1'b1;
            if (loc == LOC_W'(SAMPLES - 1)) begin
              state <= FETCH;
              addr  <= addr + 1'b1;
              if (addr == ADDR_W'(DEPTH - 1))
                chan <= chan + 1'b1;
            end
          end
        end
        START: state <= STANDBY;
        STANDBY: begin
          if (!wr_busy) begin
            state <= FETCH;
            chan  <= '0;
            addr  <= '0;
            loc   <= '0;
          end
        end
        default: state <= FETCH;
      endcase
    end
  end

  // The state machine never pushes into a full buffer.
  assert property (@(posedge clk) disable iff (rst) pkt_valid |-> !buf_full);

endmodule
