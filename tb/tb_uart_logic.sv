// tb_uart_logic: self-checking test of the UART side of the detector.
//
// Outbound: random packets are pushed in bursts, obeying buf_full like the
// state machine does; a serial decoder in the testbench samples the tx line
// mid-bit and every decoded byte must match the pushed packets in order.
// The buffer must report full during the bursts, and bytes must leave back to
// back (10 bit times plus one clock apart) while the buffer has data.
// Inbound: random bytes, some equal to the acquisition code, are sent on rx;
// exactly one acquire pulse must follow each acquisition code, and none any
// other byte.
`timescale 1ns / 1ps
module tb_uart_logic;
  localparam int         CPB  = 16;
  localparam logic [7:0] CODE = 8'h41;

  logic       clk = 0, rst = 1, pkt_valid = 0, rx = 1;
  logic [7:0] pkt = '0;
  logic       buf_full, acquire, tx;

  logic [7:0] expq [$];
  int checks = 0, failures = 0, got = 0, fulls = 0, codes = 0, acqs = 0;
  int last_start = -1, gaps_ok = 0, cyc = 0;

  uart_logic #(.CLKS_PER_BIT(CPB), .FIFO_DEPTH(16), .ACQ_CODE(CODE)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  always @(posedge clk) if (!rst) begin
    if (buf_full) fulls++;
    if (acquire) acqs++;
  end

  // serial decoder on tx
  initial begin
    logic [7:0] b;
    @(negedge rst);
    forever begin
      @(negedge tx);
      if (last_start >= 0 && cyc - last_start == 10 * CPB + 1) gaps_ok++;
      last_start = cyc;
      #(CPB * 10 / 2);
      checks++;
      if (tx !== 0) begin failures++; $display("bad start bit"); end
      for (int i = 0; i < 8; i++) begin #(CPB * 10); b[i] = tx; end
      #(CPB * 10);
      checks++;
      if (tx !== 1) begin failures++; $display("bad stop bit"); end
      got++;
      checks++;
      if (expq.size() == 0) begin failures++; $display("extra byte %h", b); end
      else if (b !== expq.pop_front()) begin failures++; $display("byte %h mismatch", b); end
    end
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // inbound: host sends bytes
  initial begin
    @(negedge rst);
    #3000;
    for (int n = 0; n < 30; n++) begin
      logic [7:0] b;
      b = (n % 3 == 0) ? CODE : 8'($urandom);
      if (b == CODE) codes++;
      rx = 0; #(CPB * 10);
      for (int i = 0; i < 8; i++) begin rx = b[i]; #(CPB * 10); end
      rx = 1; repeat (1 + $urandom % 4) #(CPB * 10);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int burst = 0; burst < 6; burst++) begin
      int n;
      n = 10 + $urandom % 20;
      while (n > 0) begin
        @(posedge clk); #1;
        pkt_valid = 0;
        if (!buf_full && ($urandom % 4 != 0)) begin
          pkt = 8'($urandom);
          pkt_valid = 1;
          expq.push_back(pkt);
          n--;
        end
        @(posedge clk); #1;
        pkt_valid = 0;
      end
      // let it drain
      wait (expq.size() == 0);
      repeat (50) @(posedge clk);
    end
    repeat (CPB * 10 * 40) @(posedge clk);
    checks++;
    if (fulls == 0 || got == 0 || expq.size() != 0) begin
      failures++;
      $display("fulls=%0d got=%0d left=%0d", fulls, got, expq.size());
    end
    checks++;
    if (acqs != codes) begin failures++; $display("acquire pulses %0d, codes sent %0d", acqs, codes); end
    checks++;
    if (gaps_ok < got / 2) begin failures++; $display("only %0d back-to-back bytes", gaps_ok); end
    $display("bytes=%0d full_cycles=%0d codes=%0d acquires=%0d back_to_back=%0d", got, fulls, codes, acqs, gaps_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
