// uart_logic: the FPGA side of the RS-232 link.
//
// Outbound, packets from the readout state machine are pushed into a transmit
// buffer (sync_fifo); whenever the transmitter is idle and the buffer holds a
// packet, the packet is popped and sent as one serial byte. `buf_full` tells
// the state machine to pause. Inbound, a receiver (uart_rx) decodes bytes from
// the host; a byte equal to ACQ_CODE produces a one-cycle `acquire` pulse that
// starts a new recording. Other bytes are ignored.
//
// Timing: a popped packet starts its start bit on the next clock; bytes go out
// back to back, one every 10 bit times plus one clock. `acquire` rises the
// cycle after the receiver's `valid`.
//
// The buffer, the buffer-full signal and the acquisition code follow the
// design; the code's value (ASCII 'A'), the buffer depth and the baud rate are
// this design's choices.
`timescale 1ns / 1ps

module uart_logic #(
  parameter int         CLKS_PER_BIT = 868,
  parameter int         FIFO_DEPTH   = 16,
  parameter logic [7:0] ACQ_CODE     = 8'h41
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] pkt,
  input  logic       pkt_valid,
  output logic       buf_full,
  output logic       acquire,
  input  logic       rx,
  output logic       tx
);

  logic [7:0] fifo_dout, rx_data;
  logic       fifo_empty, tx_busy, tx_start, rx_valid;

  assign tx_start = !fifo_empty && !tx_busy;

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_buf (
    .clk   (clk),
    .rst   (rst),
    .push  (pkt_valid),
    .din   (pkt),
    .pop   (tx_start),
    .dout  (fifo_dout),
    .empty (fifo_empty),
    .full  (buf_full)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk   (clk),
    .rst   (rst),
    .start (tx_start),
    .data  (fifo_dout),
    .busy  (tx_busy),
    .tx    (tx)
  );

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk   (clk),
    .rst   (rst),
    .rx    (rx),
    .data  (rx_data),
    .valid (rx_valid)
  );

  always_ff @(posedge clk) begin
    if (rst) acquire <= 1'b0;
    else     acquire <= rx_valid && (rx_data == ACQ_CODE);
  end

endmodule
