// tb_maxout: checks the arg-max unit on random result sequences, including
// ties (the first maximum wins), negative values and gaps in in_valid.
`timescale 1ns/1ps
module tb_maxout;
  import netpu_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, in_valid = 0;
  logic signed [36:0] in_val, max_val;
  logic [15:0] in_idx, max_idx;
  int checks = 0, failures = 0;

  maxout dut (.clk, .rst_n, .clr, .in_valid, .in_val, .in_idx, .max_val, .max_idx);
  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_val = '0; in_idx = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 500; s++) begin
      longint best;
      int bi, n;
      @(negedge clk);
      clr = 1;
      @(negedge clk);
      clr = 0;
      n = $urandom_range(1, 40);
      best = 0; bi = -1;
      for (int i = 0; i < n; i++) begin
        longint v;
        while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
        v = (s % 2) ? longint'(int'($urandom_range(0, 6)) - 3)
                    : longint'(int'($urandom)) * 8;
        in_valid = 1; in_val = 37'(v); in_idx = 16'(i);
        if (bi < 0 || v > best) begin best = v; bi = i; end
        @(negedge clk);
        in_valid = 0;
      end
      checks++;
      if (longint'(max_val) != best || int'(max_idx) != bi) begin
        failures++;
        $display("seq %0d: max %0d at %0d, expected %0d at %0d", s, max_val, max_idx, best, bi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
