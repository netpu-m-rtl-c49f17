// tb_tnpu_activ: checks every activation (ReLU, piecewise-linear Sigmoid,
// tanh, Sign, Multi-Thresholds at 1..4 output bits) against the reference
// formulas, on random values and on the Sigmoid breakpoints.
`timescale 1ns/1ps
module tb_tnpu_activ;
  import netpu_pkg::*;
  import netpu_tb_pkg::*;

  logic signed [36:0] x, y;
  act_e act;
  logic [2:0] out_prec;
  logic signed [31:0] sign_thr;
  logic signed [31:0] mt_thr [15];
  int checks = 0, failures = 0;

  tnpu_activ dut (.x, .act, .out_prec, .sign_thr, .mt_thr, .y);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint expect_y();
    longint v;
    v = longint'(x);
    unique case (act)
      ACT_RELU:    return (v < 0) ? 0 : v;
      ACT_SIGMOID: return ref_sigmoid(v);
      ACT_TANH:    return 2 * ref_sigmoid(2 * v) - 32;
      ACT_SIGN:    return (v >= longint'(sign_thr)) ? 1 : 0;
      default: begin
        int c, n;
        c = 0;
        n = (1 << (int'(out_prec) + 1)) - 1;
        for (int i = 0; i < n && i < 15; i++) if (v > longint'(mt_thr[i])) c++;
        return c;
      end
    endcase
  endfunction

  initial begin
    int brk [] = '{0, 31, 32, 33, 75, 76, 77, 159, 160, 161, 37, 38, 79, 80};
    for (int it = 0; it < 6000; it++) begin
      act = act_e'(it % 5);
      out_prec = 3'($urandom_range(0, 3));
      sign_thr = 32'(int'($urandom_range(0, 4000)) - 2000);
      begin
        int b;
        b = -3000;
        foreach (mt_thr[i]) begin
          b += int'($urandom_range(0, 400));
          mt_thr[i] = 32'(b);
        end
      end
      if (it < 2 * brk.size() * 5)
        x = 37'((((it / 5) % 2) ? -1 : 1) * brk[(it / 10) % brk.size()]);
      else if (it % 4 == 0)
        x = 37'({$urandom, $urandom});
      else
        x = 37'(int'($urandom_range(0, 8000)) - 4000);
      #1;
      checks++;
      if (longint'(y) != expect_y()) begin
        failures++;
        if (failures < 10) $display("act %s x %0d: y %0d exp %0d", act.name(), x, y, expect_y());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
