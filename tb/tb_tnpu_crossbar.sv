// tb_tnpu_crossbar: checks the TNPU crossbar paths for every layer type,
// activation and BN folding option: which value enters ACTIV and QUAN and
// which value leaves as the neuron output.
`timescale 1ns/1ps
module tb_tnpu_crossbar;
  import netpu_pkg::*;

  layer_type_e ltype;
  act_e act;
  logic bn_fold;
  logic [7:0] raw_in, quan_q, out_q;
  logic signed [31:0] acc;
  logic signed [36:0] bn_y, activ_y, activ_x, quan_x, out_val;
  int checks = 0, failures = 0;

  tnpu_crossbar dut (.ltype, .act, .bn_fold, .raw_in, .acc, .bn_y, .activ_y,
                     .quan_q, .activ_x, .quan_x, .out_q, .out_val);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s %s %s fold %0d: %s = %0d expected %0d", ltype.name(), act.name(),
               "", bn_fold, what, got, exp);
    end
  endtask

  initial begin
    for (int it = 0; it < 300; it++) begin
      ltype = layer_type_e'(it % 3);
      act = act_e'((it / 3) % 5);
      bn_fold = 1'((it / 15) % 2);
      raw_in = 8'($urandom); quan_q = 8'($urandom);
      acc = $urandom; bn_y = 37'({$urandom, $urandom}); activ_y = 37'({$urandom, $urandom});
      #1;
      begin
        longint post;
        post = bn_fold ? longint'(acc) * 32 : longint'(bn_y);
        if (ltype == LT_INPUT) begin
          chk("activ_x", activ_x, longint'(raw_in) * 32);
          chk("quan_x", quan_x, longint'(raw_in) * 32);
        end else begin
          chk("activ_x", activ_x, post);
          chk("quan_x", quan_x, longint'(activ_y));
        end
        if (act == ACT_SIGN || act == ACT_MT) chk("out_q", out_q, longint'(activ_y[7:0]));
        else chk("out_q", out_q, longint'(quan_q));
        chk("out_val", out_val, post);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
