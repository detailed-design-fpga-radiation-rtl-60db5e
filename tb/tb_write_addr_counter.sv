// tb_write_addr_counter: self-checking test of the shared write-address counter.
//
// Random start pulses are applied. The testbench's reference counts the cycles
// since the last start: a start must give exactly four write cycles, with
// addresses 0, 1, 2, 3 on consecutive clocks, beginning one clock after the
// start, and then write enable low. It also checks the recording length:
// 4 cycles of 10 ns = 40 ns per start.
`timescale 1ns / 1ps
module tb_write_addr_counter;
  localparam int DEPTH = 4;

  logic       clk = 0, rst = 1, start = 0;
  logic [1:0] addr;
  logic       we;
  int         checks = 0, failures = 0, since = 100, we_cycles = 0, starts = 0;

  write_addr_counter #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(posedge clk);
      // reference update for this edge
      if (start) begin since = 1; starts++; end
      else if (since < 100) since++;
      #1;
      checks++;
      if (we !== (since >= 1 && since <= DEPTH)) begin
        failures++;
        $display("cycle %0d: we=%b since=%0d", cyc, we, since);
      end
      if (we) begin
        we_cycles++;
        checks++;
        if (addr !== 2'(since - 1)) begin
          failures++;
          $display("cycle %0d: addr=%0d since=%0d", cyc, addr, since);
        end
      end
      start = ($urandom % 9 == 0);
    end
    // each start yields DEPTH writes unless a later start cut it short
    checks++;
    if (we_cycles > starts * DEPTH || we_cycles < starts) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
