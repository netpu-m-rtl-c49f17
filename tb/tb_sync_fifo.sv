// tb_sync_fifo: checks the first-word-fall-through FIFO against a queue
// model under random pushes and pops, including full, empty, simultaneous
// push/pop and clear, at a small depth.
`timescale 1ns/1ps
module tb_sync_fifo;
  logic clk = 0, rst_n = 0, clr = 0, push = 0, pop = 0;
  logic [15:0] din, dout;
  logic empty, full;
  logic [4:0] count;
  int checks = 0, failures = 0;
  logic [15:0] q [$];
  int n_full = 0, n_both = 0;

  sync_fifo #(.WIDTH(16), .DEPTH(16)) dut (.clk, .rst_n, .clr, .push, .din, .pop,
                                           .dout, .empty, .full, .count);
  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 20000; it++) begin
      @(negedge clk);
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == 16) || int'(count) != q.size() ||
          (q.size() > 0 && dout != q[0])) begin
        failures++;
        if (failures < 10) $display("it %0d: empty %0d full %0d count %0d dout %h, model %0d", it,
                                    empty, full, count, dout, q.size());
      end
      clr = ($urandom_range(0, 999) == 0);
      push = ($urandom_range(0, 99) < ((it / 2000) % 2 ? 70 : 35)) && !full;
      pop = ($urandom_range(0, 99) < ((it / 2000) % 2 ? 35 : 70)) && !empty;
      din = 16'($urandom);
      if (full) n_full++;
      if (push && pop) n_both++;
      if (clr) q = {};
      else begin
        if (pop) void'(q.pop_front());
        if (push) q.push_back(din);
      end
    end
    checks++;
    if (n_full == 0 || n_both == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
