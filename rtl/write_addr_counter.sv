// write_addr_counter: shared write address and write enable for all channel RAMs.
//
// A one-cycle `start` pulse from the readout state machine resets the address
// to 0 and raises `we`. The address then advances once per 100 MHz cycle;
// after the last address (DEPTH-1) has been written `we` drops by itself, so
// one recording is exactly DEPTH writes (4 x 10 ns = 40 ns). A `start` while
// recording restarts from address 0.
//
// Interface: `addr` and `we` are registered; the first write happens on the
// clock edge after the one that sees `start`.
//
// The counter, its reset by the state machine and the automatic end of writing
// follow the design; generating `we` inside the counter is this design's choice.
`timescale 1ns / 1ps

module write_addr_counter #(
  parameter int DEPTH = 4
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,
  output logic [$clog2(DEPTH)-1:0] addr,
  output logic                     we
);

  localparam logic [$clog2(DEPTH)-1:0] LAST = $clog2(DEPTH)'(DEPTH - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      addr <= '0;
      we   <= 1'b0;
    end else if (start) begin
      addr <= '0;
      we   <= 1'b1;
    end else if (we) begin
      if (addr == LAST) begin
        we <= 1'b0;
      end else begin
        addr <= addr + 1'b1;
      end
    end
  end

endmodule
