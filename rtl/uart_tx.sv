// uart_tx: RS-232 style serial transmitter, 8 data bits, no parity, 1 stop bit.
//
// A `start` pulse while idle loads `data` and sends a start bit (0), the eight
// data bits least significant first, and a stop bit (1), each CLKS_PER_BIT
// clock cycles long. `busy` is high from the cycle after `start` until the
// stop bit has ended; `start` while busy is ignored. The line idles high.
//
// The design fixes only the 8-bit frame; the 8N1 format and the bit time
// (868 cycles of 100 MHz, about 115200 baud) are this design's choices.
`timescale 1ns / 1ps

module uart_tx #(
  parameter int CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [7:0] data,
  output logic       busy,
  output logic       tx
);

  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  logic [8:0]    frame;     // stop, data[7:0]; shifted out LSB first
  logic [3:0]    bits_left;
  logic [CW-1:0] tick;

  assign busy = (bits_left != 0);

  always_ff @(posedge clk) begin
    if (rst) begin
      frame     <= '1;
      bits_left <= '0;
      tick      <= '0;
      tx        <= 1'b1;
    end else if (!busy) begin
      tx <= 1'b1;
      if (start) begin
        frame     <= {1'b1, data};
        bits_left <= 4'd10;
        tick      <= CW'(CLKS_PER_BIT - 1);
        tx        <= 1'b0;
      end
    end else if (tick != 0) begin
      tick <= tick - 1'b1;
    end else begin
      frame     <= {1'b1, frame[8:1]};
      bits_left <= bits_left - 1'b1;
      tick      <= CW'(CLKS_PER_BIT - 1);
      tx        <= frame[0];   // idle-high 1 once the stop bit is done
    end
  end

endmodule
