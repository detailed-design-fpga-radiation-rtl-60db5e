// tb_sync_fifo: self-checking test of the transmit buffer against a queue model.
//
// Random pushes and pops, with phases that favour filling and draining, are
// compared every cycle with a SystemVerilog queue: output word, empty and full
// (full exactly when DEPTH words are held).
`timescale 1ns / 1ps
module tb_sync_fifo;
  localparam int WIDTH = 8, DEPTH = 16;

  logic             clk = 0, rst = 1, push = 0, pop = 0;
  logic [WIDTH-1:0] din = '0, dout;
  logic             empty, full;
  logic [WIDTH-1:0] q [$];
  int               checks = 0, failures = 0, saw_full = 0;

  sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      int bias;
      bias = ((cyc / 200) % 2 != 0) ? 3 : 1;
      push = ($urandom % 4) < bias + 1;
      pop  = ($urandom % 4) < 3 - bias + 1;
      din  = WIDTH'($urandom);
      #1;
      checks += 2;
      if (empty !== (q.size() == 0)) begin failures++; $display("empty wrong, size %0d", q.size()); end
      if (full !== (q.size() == DEPTH)) begin failures++; $display("full wrong, size %0d", q.size()); end
      if (q.size() == DEPTH) saw_full++;
      if (q.size() > 0) begin
        checks++;
        if (dout !== q[0]) begin failures++; $display("dout %h want %h", dout, q[0]); end
      end
      @(posedge clk);
      begin
        logic do_pop, do_push;
        do_pop  = pop && q.size() > 0;
        do_push = push && q.size() < DEPTH;
        if (do_pop) void'(q.pop_front());
        if (do_push) q.push_back(din);
      end
      #1;
    end
    checks++;
    if (saw_full == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
