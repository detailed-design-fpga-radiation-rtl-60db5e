// tb_uart_rx: self-checking test of the serial receiver.
//
// A serialiser in the testbench sends random 8N1 bytes, with the bit time
// slightly off nominal (+-3%) to exercise mid-bit sampling, plus a short
// glitch (which must not start a byte) and frames with a broken stop bit
// (which must be dropped). Every valid pulse is compared with the expected
// byte, and the number of pulses must equal the number of good frames.
`timescale 1ns / 1ps
module tb_uart_rx;
  localparam int CPB = 32;

  logic       clk = 0, rst = 1, rx = 1;
  logic [7:0] data;
  logic       valid;
  logic [7:0] expq [$];
  int         checks = 0, failures = 0, sent = 0, got = 0;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;

  task automatic send(input logic [7:0] b, input logic stop, input int bit_ns);
    rx = 0; repeat (bit_ns) #1;
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (bit_ns) #1; end
    rx = stop; repeat (bit_ns) #1;
    rx = 1; repeat (bit_ns) #1;
  endtask

  always @(posedge clk) if (valid && !rst) begin
    got++;
    checks++;
    if (expq.size() == 0) begin
      failures++;
      $display("unexpected byte %h at %0t", data, $time);
    end else begin
      logic [7:0] e;
      e = expq.pop_front();
      if (data !== e) begin failures++; $display("got %h want %h", data, e); end
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100 rst = 0;
    #1000;
    // glitch shorter than half a bit
    rx = 0; #(CPB * 10 / 4); rx = 1; #(CPB * 10 * 12);
    for (int n = 0; n < 80; n++) begin
      logic [7:0] b;
      int         bit_ns;
      b = 8'($urandom);
      bit_ns = CPB * 10 + ((n % 3) - 1) * CPB * 10 * 3 / 100;
      if (n % 10 == 7) begin
        send(b, 1'b0, bit_ns);   // framing error: dropped
        repeat (2 * bit_ns) #1;
      end else begin
        expq.push_back(b);
        sent++;
        send(b, 1'b1, bit_ns);
      end
    end
    #(CPB * 10 * 4);
    checks++;
    if (got != sent || expq.size() != 0) begin
      failures++;
      $display("got %0d bytes, sent %0d", got, sent);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
