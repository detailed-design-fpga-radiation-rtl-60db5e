// tb_event_detector_top: end-to-end test of the event detector at its default
// parameters, with the testbench acting as the PLL (clocks) and as the host.
//
// Clocks: 400 MHz and 100 MHz with aligned rising edges. After each 400 MHz
// rising edge p every sensor line c is driven to patbit(c, p), a hash of
// (c, p), so the line carries random pulses of 2.5 ns and longer; the sample
// taken at edge p+1 is patbit(c, p).
//
// Host: the testbench sends bytes on rs232_rx at 115200 baud (868 clocks per
// bit) and decodes every byte on rs232_tx. The test
//   1. sends a byte that is not the acquisition code (must be ignored);
//   2. twice, sends the acquisition code, skips the packets that may still
//      have been buffered from before (at most buffer depth), then takes the
//      next 128 packets, which must be one full sweep in order (channel,
//      address, position) and together give 16 samples on each of the 8
//      channels;
//   3. searches the time around the code for the window of 16 consecutive
//      400 MHz samples that the capture must equal on all 8 channels at once,
//      and requires exactly one.
// It also checks that each recording holds write enable for 4 cycles (40 ns)
// and that nothing is pushed to the buffer while recording. It counts every
// mechanism: acquisitions, recording cycles, buffer-full pauses, sweep
// wrap-arounds, ignored non-code bytes and captured pulses of 5 ns or less;
// any that never happened is a failure.
`timescale 1ps / 1ps
module tb_event_detector_top;
  import ed_pkg::*;

  localparam int         CPB      = 868;        // n_match the top's default
  localparam longint     BIT_PS   = CPB * 10000;
  localparam logic [7:0] CODE     = 8'h41;
  localparam int         STALE    = 16 + 1;     // buffer depth + one spare

  logic                    clk_100 = 0, clk_400 = 0, rst = 1, rs232_rx = 1;
  logic [NUM_CHANNELS-1:0] sensor_in = '0;
  logic                    rs232_tx;

  int     p400 = 0;
  int     checks = 0, failures = 0;
  int     n_acq = 0, n_rec_cycles = 0, n_stall = 0, n_wrap = 0, n_ignored = 0, n_short = 0;
  int     rec_run = 0;
  logic [7:0] rxq [$];
  longint     rxt [$];

  event_detector_top dut (.*);

  function automatic logic patbit(int c, int p);
    logic [31:0] x;
    x = 32'(p) * 32'h9E3779B1 ^ (32'(c + 1) * 32'h85EBCA6B);
    x ^= x >> 15; x *= 32'h2C1B3C6D; x ^= x >> 12;
    return x[20];
  endfunction

  // clocks and sensor stimulus
  initial begin
    forever begin
      #1250;
      p400++;
      clk_400 = 1;
      if (p400 % 4 == 1) clk_100 = 1;
      #1250;
      clk_400 = 0;
      if (p400 % 4 == 3) clk_100 = 0;
      for (int c = 0; c < NUM_CHANNELS; c++) sensor_in[c] = patbit(c, p400);
    end
  end

  // mechanism monitors
  always @(posedge clk_100) if (!rst) begin
    if (dut.acquire) n_acq++;
    if (dut.wr_en) begin
      n_rec_cycles++;
      rec_run++;
      if (dut.pkt_valid) begin failures++; $display("packet pushed while recording"); end
    end else if (rec_run != 0) begin
      checks++;
      if (rec_run != DEPTH) begin failures++; $display("recording lasted %0d cycles", rec_run); end
      rec_run = 0;
    end
    if (dut.buf_full && dut.u_fsm.state == dut.u_fsm.SEND) n_stall++;
    if (dut.pkt_valid && dut.pkt.chan == 3'd7 && dut.pkt.addr == 2'd3 && dut.pkt.loc == 2'd3) n_wrap++;
  end

  // host receiver: decode rs232_tx
  initial begin
    logic [7:0] b;
    longint     t;
    @(negedge rst);
    forever begin
      @(negedge rs232_tx);
      t = $time;
      #(BIT_PS / 2);
      if (rs232_tx !== 1'b0) continue;
      for (int i = 0; i < 8; i++) begin #(BIT_PS); b[i] = rs232_tx; end
      #(BIT_PS);
      checks++;
      if (rs232_tx !== 1'b1) begin failures++; $display("bad stop bit"); end
      rxq.push_back(b);
      rxt.push_back(t);
    end
  end

  task automatic host_send(input logic [7:0] b);
    rs232_rx = 0; #(BIT_PS);
    for (int i = 0; i < 8; i++) begin rs232_rx = b[i]; #(BIT_PS); end
    rs232_rx = 1; #(BIT_PS);
  endtask

  // one acquisition: send the code, collect a sweep, find the capture window
  task automatic acquisition();
    longint  t_end;
    int      p_lo, p_hi, idx, first, n_match, found;
    logic    cap [NUM_CHANNELS][DEPTH * SAMPLES];
    packet_t pk;
    int      acq_before;

    acq_before = n_acq;
    p_lo = p400;
    host_send(CODE);
    t_end = $time;
    p_hi = p400 + 4 * 2 * CPB;
    checks++;
    if (n_acq != acq_before + 1) begin failures++; $display("acquisition code not acted on"); end
    // drop what was sent before the code ended
    while (rxt.size() > 0 && rxt[0] <= t_end) begin void'(rxq.pop_front()); void'(rxt.pop_front()); end
    // wait for the stale bytes plus one full sweep
    wait (rxq.size() >= STALE + 128);
    repeat (STALE) begin void'(rxq.pop_front()); void'(rxt.pop_front()); end
    first = -1;
    for (int n = 0; n < 128; n++) begin
      pk  = packet_t'(rxq.pop_front());
      void'(rxt.pop_front());
      idx = int'(pk.chan) * 16 + int'(pk.addr) * 4 + int'(pk.loc);
      if (first < 0) first = idx;
      checks++;
      if (idx != (first + n) % 128) begin
        failures++;
        $display("packet %0d out of order: chan %0d addr %0d loc %0d", n, pk.chan, pk.addr, pk.loc);
      end
      cap[pk.chan][int'(pk.addr) * SAMPLES + int'(pk.loc)] = pk.val;
    end
    // the capture must be one 16-sample window, the same on all channels
    n_match = 0; found = -1;
    for (int o = p_lo; o <= p_hi; o++) begin
      logic ok;
      ok = 1;
      for (int c = 0; c < NUM_CHANNELS && ok; c++)
        for (int i = 0; i < DEPTH * SAMPLES && ok; i++)
          if (cap[c][i] != patbit(c, o + i)) ok = 0;
      if (ok) begin n_match++; found = o; end
    end
    checks++;
    if (n_match != 1) begin
      failures++;
      $display("capture matched %0d windows between samples %0d and %0d", n_match, p_lo, p_hi);
    end else begin
      $display("capture = samples %0d..%0d (code finished near sample %0d)", found, found + 15,
               int'(t_end / 2500));
    end
    // short pulses (1 or 2 samples, <= 5 ns) inside the window
    for (int c = 0; c < NUM_CHANNELS; c++)
      for (int i = 1; i < DEPTH * SAMPLES - 2; i++)
        if (!cap[c][i-1] && cap[c][i] && (!cap[c][i+1] || (!cap[c][i+2] && cap[c][i+1]))) n_short++;
  endtask

  initial begin
    #(64'd200_000_000_000);   // 200 ms
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int acq_before;
    repeat (4) @(posedge clk_100);
    #1000 rst = 0;
    #(BIT_PS * 3);
    // a byte that is not the acquisition code
    acq_before = n_acq;
    host_send(8'h55);
    #(BIT_PS * 2);
    checks++;
    if (n_acq != acq_before) failures++;
    else n_ignored++;
    acquisition();
    #(BIT_PS * 5);
    acquisition();
    $display("acquisitions=%0d recording_cycles=%0d stall_cycles=%0d wraps=%0d ignored=%0d short_pulses=%0d",
             n_acq, n_rec_cycles, n_stall, n_wrap, n_ignored, n_short);
    checks++;
    if (n_acq != 2 || n_rec_cycles != 2 * DEPTH || n_stall == 0 || n_wrap == 0 || n_ignored == 0 || n_short == 0) begin
      failures++;
      $display("a mechanism did not happen as expected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
