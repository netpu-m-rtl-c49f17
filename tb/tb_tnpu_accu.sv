// tb_tnpu_accu: checks the TNPU accumulator over random neurons of random
// length, with and without the bias, and that the sum appears one cycle
// after the last accepted word.
`timescale 1ns/1ps
module tb_tnpu_accu;
  import netpu_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, first = 0, bias_en = 0;
  logic signed [15:0] prod [8];
  logic signed [7:0]  bias;
  logic signed [31:0] acc;
  int checks = 0, failures = 0;

  tnpu_accu dut (.clk, .rst_n, .en, .first, .prod, .bias, .bias_en, .acc);

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint model;
    foreach (prod[j]) prod[j] = '0;
    bias = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int len;
      len = $urandom_range(1, 20);
      bias_en = 1'($urandom_range(0, 1));
      bias = 8'($urandom);
      model = bias_en ? longint'(bias) : 0;
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        en = ($urandom_range(0, 4) != 0) || k == len - 1;
        first = (k == 0);
        if (!en) begin k--; first = 0; continue; end
        foreach (prod[j]) begin
          prod[j] = 16'($urandom);
          model += longint'(prod[j]);
        end
      end
      @(negedge clk);
      en = 0;
      checks++;
      if (longint'(acc) != longint'(int'(model))) begin
        failures++;
        $display("neuron %0d: acc %0d expected %0d", n, acc, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
