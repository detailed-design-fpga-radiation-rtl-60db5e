// uart_rx: RS-232 style serial receiver, 8 data bits, no parity, 1 stop bit.
//
// The line is brought into the clock domain through two flip-flops. A falling
// edge starts a frame; the start bit is checked again half a bit later, and
// each data bit is then sampled in the middle of its bit time, least
// significant first. If the stop bit reads 1 the byte appears on `data` with
// a one-cycle `valid` pulse; a frame with a bad stop bit is dropped,
// and the receiver waits for the line to return high before looking for the
// next start bit.
//
// Timing: `valid` comes about 9.5 bit times (plus 2 synchroniser cycles)
// after the falling edge of the start bit.
//
// The design only says an 8-bit code is received over RS-232; the frame
// format, bit time and sampling scheme are this design's choices.
`timescale 1ns / 1ps

module uart_rx #(
  parameter int CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx,
  output logic [7:0] data,
  output logic       valid
);

  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [2:0] {IDLE, START_BIT, DATA_BITS, STOP_BIT, WAIT_IDLE} state_t;

  state_t        state;
  logic [1:0]    sync;
  logic          rx_s;
  logic [CW-1:0] tick;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;

  assign rx_s = sync[1];

  always_ff @(posedge clk) begin
    if (rst) sync <= 2'b11;
    else     sync <= {sync[0], rx};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= IDLE;
      tick    <= '0;
      bit_idx <= '0;
      shreg   <= '0;
      data    <= '0;
      valid   <= 1'b0;
    end else begin
      valid <= 1'b0;
      unique case (state)
        IDLE: begin
          if (!rx_s) begin
            state <= START_BIT;
            tick  <= CW'(CLKS_PER_BIT / 2 - 1);
          end
        end
        START_BIT: begin
          if (tick != 0) begin
            tick <= tick - 1'b1;
          end else if (!rx_s) begin
            state   <= DATA_BITS;
            tick    <= CW'(CLKS_PER_BIT - 1);
            bit_idx <= '0;
          end else begin
            state <= IDLE;          // glitch, not a start bit
          end
        end
        DATA_BITS: begin
          if (tick != 0) begin
            tick <= tick - 1'b1;
          end else begin
            shreg   <= {rx_s, shreg[7:1]};
            tick    <= CW'(CLKS_PER_BIT - 1);
            bit_idx <= bit_idx + 1'b1;
            if (bit_idx == 3'd7) state <= STOP_BIT;
          end
        end
        STOP_BIT: begin
          if (tick != 0) begin
            tick <= tick - 1'b1;
          end else begin
            if (rx_s) begin
              state <= IDLE;
              data  <= shreg;
              valid <= 1'b1;
            end else begin
              state <= WAIT_IDLE;   // framing error: drop the byte
            end
          end
        end
        WAIT_IDLE: begin
          if (rx_s) state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
