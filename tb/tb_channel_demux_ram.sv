// tb_channel_demux_ram: self-checking test of one channel's shift chain and RAM.
//
// The clock generator makes aligned 400 MHz and 100 MHz clocks and, after each
// 400 MHz rising edge p, drives the input to a pseudo-random value pat[p], so
// the sample taken at edge p+1 is pat[p]. A write at the 100 MHz edge that is
// 400 MHz edge p must therefore store {pat[p-2], pat[p-3], pat[p-4], pat[p-5]}
// (newest sample in bit 3). Write enable, write address and read address are
// random every cycle; the testbench keeps its own copy of the RAM and checks
// every registered read (old data on a read of the address being written).
`timescale 1ps / 1ps
module tb_channel_demux_ram;
  import ed_pkg::*;

  localparam int NCYC = 2000;
  localparam int NP   = 4 * NCYC + 64;

  logic  clk_400 = 0, clk_100 = 0, din = 0, we = 0;
  addr_t addr_a = '0, addr_b = '0;
  word_t out_b;

  int    p400 = 0;
  logic  pat [NP];
  word_t model [DEPTH];
  logic  known [DEPTH];
  int    checks = 0, failures = 0, writes = 0;

  channel_demux_ram dut (.*);

  initial begin
    for (int i = 0; i < NP; i++) pat[i] = 1'($urandom);
    forever begin
      #1250;
      p400++;
      clk_400 = 1;
      if (p400 % 4 == 1) clk_100 = 1;
      #1250;
      clk_400 = 0;
      if (p400 % 4 == 3) clk_100 = 0;
      din = pat[p400];
    end
  end

  initial begin
    #(1250 * 2 * 4 * (NCYC + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t exp_rd;
    logic  rd_known;
    foreach (known[i]) known[i] = 0;
    repeat (3) @(posedge clk_100);
    for (int cyc = 0; cyc < NCYC; cyc++) begin
      @(posedge clk_100);
      // expectation for this edge, computed from values held before it
      exp_rd   = model[addr_b];
      rd_known = known[addr_b];
      if (we) begin
        model[addr_a] = {pat[p400-2], pat[p400-3], pat[p400-4], pat[p400-5]};
        known[addr_a] = 1;
        writes++;
      end
      #100;
      if (rd_known) begin
        checks++;
        if (out_b !== exp_rd) begin
          failures++;
          $display("read mismatch at edge %0d addr %0d: got %b want %b", p400, addr_b, out_b, exp_rd);
        end
      end
      we     = (cyc > 5) && ($urandom % 3 != 0);
      addr_a = addr_t'($urandom);
      addr_b = addr_t'($urandom);
    end
    if (writes < NCYC / 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
