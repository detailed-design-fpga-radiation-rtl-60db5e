// event_detector_top: eight-channel radiation event detector with RS-232 readout.
//
// Each sensor line is sampled at 400 MHz by its own four-flip-flop shift chain
// and stored, four samples per 100 MHz word, into its own 4x4-bit RAM
// (channel_demux_ram). One write-address counter (write_addr_counter) drives
// the write port of all eight RAMs at once, so a recording captures the same
// 40 ns window (16 samples of 2.5 ns) on every channel. The readout state
// machine (readout_fsm) reads the RAMs back through their second port and
// sends every stored bit as a self-describing 8-bit packet through the UART
// logic (uart_logic). Receiving the acquisition code from the host makes the
// state machine start a new recording.
//
// Interface:
//   clk_100   - 100 MHz system clock; everything but the shift chains runs on it
//   clk_400   - 400 MHz sample clock from the FPGA's PLL, rising edges aligned
//               with clk_100 (the PLL itself is a vendor primitive outside
//               this RTL)
//   rst       - synchronous, active high, clk_100 domain
//   sensor_in - the eight sensor lines
//   rs232_rx  - serial input from the host (acquisition code)
//   rs232_tx  - serial output to the host (packets)
//
// The block structure, sizes and clocks follow the design; reset, baud rate,
// buffer depth and acquisition code value are this design's choices
// (see the sub-modules).
`timescale 1ns / 1ps

module event_detector_top
  import ed_pkg::*;
#(
  parameter int         CLKS_PER_BIT = 868,
  parameter int         FIFO_DEPTH   = 16,
  parameter logic [7:0] ACQ_CODE     = 8'h41
) (
  input  logic                    clk_100,
  input  logic                    clk_400,
  input  logic                    rst,
  input  logic [NUM_CHANNELS-1:0] sensor_in,
  input  logic                    rs232_rx,
  output logic                    rs232_tx
);

  addr_t   wr_addr, rd_addr;
  logic    wr_en, cnt_start, acquire, buf_full, pkt_valid;
  word_t   chan_data [NUM_CHANNELS];
  packet_t pkt;

  for (genvar c = 0; c < NUM_CHANNELS; c++) begin : g_chan
    channel_demux_ram u_chan (
      .clk_400 (clk_400),
      .clk_100 (clk_100),
      .din     (sensor_in[c]),
      .we      (wr_en),
      .addr_a  (wr_addr),
      .addr_b  (rd_addr),
      .out_b   (chan_data[c])
    );
  end

  write_addr_counter #(.DEPTH(DEPTH)) u_counter (
    .clk   (clk_100),
    .rst   (rst),
    .start (cnt_start),
    .addr  (wr_addr),
    .we    (wr_en)
  );

  readout_fsm u_fsm (
    .clk       (clk_100),
    .rst       (rst),
    .chan_in   (chan_data),
    .addr_b    (rd_addr),
    .acquire   (acquire),
    .buf_full  (buf_full),
    .cnt_start (cnt_start),
    .wr_busy   (wr_en),
    .pkt       (pkt),
    .pkt_valid (pkt_valid)
  );

  uart_logic #(
    .CLKS_PER_BIT (CLKS_PER_BIT),
    .FIFO_DEPTH   (FIFO_DEPTH),
    .ACQ_CODE     (ACQ_CODE)
  ) u_uart (
    .clk       (clk_100),
    .rst       (rst),
    .pkt       (pkt),
    .pkt_valid (pkt_valid),
    .buf_full  (buf_full),
    .acquire   (acquire),
    .rx        (rs232_rx),
    .tx        (rs232_tx)
  );

endmodule
