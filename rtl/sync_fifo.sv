// sync_fifo: the UART transmit buffer.
//
// A single-clock first-in first-out queue of DEPTH entries of WIDTH bits.
// The readout state machine pushes packets; the UART transmitter pops them.
// `full` is what pauses the state machine.
//
// Interface: `dout` always shows the oldest entry while `empty` is low
// (first-word fall-through); `pop` removes it at the clock edge. A push while
// full and a pop while empty are ignored. Push and pop may happen in the same
// cycle. DEPTH must be a power of two.
//
// The buffer and its full flag follow the design; its depth and the
// fall-through read are this design's choices.
`timescale 1ns / 1ps

module sync_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full
);

  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;   // one extra bit tells full from empty
  logic             do_push, do_pop;

  assign empty   = (wptr == rptr);
  assign full    = (wptr[AW-1:0] == rptr[AW-1:0]) && (wptr[AW] != rptr[AW]);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_push)
      mem[wptr[AW-1:0]] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_push) wptr <= wptr + 1'b1;
      if (do_pop)  rptr <= rptr + 1'b1;
    end
  end

endmodule
