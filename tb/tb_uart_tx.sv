// tb_uart_tx: self-checking test of the serial transmitter.
//
// Random bytes are sent, some back to back and some with idle gaps. The
// testbench samples the line in the middle of every bit time and checks the
// frame: start bit 0, eight data bits LSB first, stop bit 1. It also checks
// that busy lasts exactly 10 bit times and that a start while busy is ignored.
`timescale 1ns / 1ps
module tb_uart_tx;
  localparam int CPB = 16;

  logic       clk = 0, rst = 1, start = 0;
  logic [7:0] data = '0;
  logic       busy, tx;
  int         checks = 0, failures = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    int         busy_cycles;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (tx !== 1'b1 || busy) failures++;
    for (int n = 0; n < 60; n++) begin
      b = 8'($urandom);
      start = 1; data = b;
      @(posedge clk); #1;
      start = 0;
      // frame starts at this edge; sample each bit at its middle
      fork
        begin
          busy_cycles = 0;
          while (busy) begin @(posedge clk); #1; busy_cycles++; end
        end
        begin
          // a start attempt in the middle of the frame must be ignored
          repeat (3 * CPB) @(posedge clk);
          #2 start = 1; data = ~b;
          @(posedge clk); #1 start = 0;
        end
        begin
          repeat (CPB / 2) @(posedge clk);
          #2;
          for (int i = 0; i < 10; i++) begin
            logic want;
            want = (i == 0) ? 1'b0 : (i == 9) ? 1'b1 : b[i-1];
            checks++;
            if (tx !== want) begin
              failures++;
              $display("byte %h bit %0d: tx=%b want %b", b, i, tx, want);
            end
            repeat (CPB) @(posedge clk);
            #2;
          end
        end
      join
      checks++;
      if (busy_cycles != 10 * CPB) begin
        failures++;
        $display("busy lasted %0d cycles, want %0d", busy_cycles, 10 * CPB);
      end
      if ($urandom % 2 != 0) repeat ($urandom % 40) @(posedge clk);
      #1;
      checks++;
      if (tx !== 1'b1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
