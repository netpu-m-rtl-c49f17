// tb_tnpu_bn: checks batch normalization y = x * scale + offset (5 fraction
// bits, saturated to 37 bits) for random and extreme operands.
`timescale 1ns/1ps
module tb_tnpu_bn;
  import netpu_pkg::*;
  import netpu_tb_pkg::*;

  logic signed [31:0] x, scale, offset;
  logic signed [36:0] y;
  int checks = 0, failures = 0;

  tnpu_bn dut (.x, .scale, .offset, .y);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 3000; it++) begin
      if (it % 2 == 0) begin
        x = 32'(int'($urandom_range(0, 200000)) - 100000);
        scale = 32'(int'($urandom_range(0, 400)) - 200);
        offset = 32'(int'($urandom_range(0, 20000)) - 10000);
      end else begin
        x = $urandom; scale = $urandom; offset = $urandom;
      end
      #1;
      checks++;
      if (longint'(y) != sat37(longint'(x) * longint'(scale) + longint'(offset))) begin
        failures++;
        if (failures < 10) $display("x %0d s %0d o %0d: y %0d", x, scale, offset, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
