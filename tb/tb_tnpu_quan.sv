// tb_tnpu_quan: checks requantization q = clamp(round(x*scale + offset)) at
// every output precision against the reference formula.
`timescale 1ns/1ps
module tb_tnpu_quan;
  import netpu_pkg::*;
  import netpu_tb_pkg::*;

  logic signed [36:0] x;
  logic [2:0] out_prec;
  logic signed [31:0] scale, offset;
  logic [7:0] q;
  int checks = 0, failures = 0;

  tnpu_quan dut (.x, .out_prec, .scale, .offset, .q);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 5000; it++) begin
      out_prec = 3'($urandom_range(0, 7));
      x = 37'(int'($urandom_range(0, 40000)) - 8000);
      scale = 32'($urandom_range(0, 1 << 20)) - 32'(1 << 17);
      offset = 32'(int'($urandom_range(0, 4000)) - 2000);
      #1;
      checks++;
      if (int'(q) != ref_quan(longint'(x), int'(out_prec) + 1, longint'(scale), longint'(offset))) begin
        failures++;
        if (failures < 10) $display("x %0d s %0d o %0d p %0d: q %0d", x, scale, offset, out_prec, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
