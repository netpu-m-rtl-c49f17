// tb_tnpu: checks one TNPU as a neuron of input, hidden and output layers
// with random precisions, activations and BN folding. Parameters are written
// through the parameter port, input and weight words are streamed with
// random gaps, and the quantized output (input/hidden layers) or the 37-bit
// result (output layer) is compared with the reference model. It also checks
// that out_valid follows fin by exactly one cycle.
`timescale 1ns/1ps
module tb_tnpu;
  import netpu_pkg::*;
  import netpu_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  layer_cfg_t cfg;
  logic prm_we = 0;
  prm_e prm_sel;
  logic [3:0] prm_idx;
  logic [31:0] prm_data;
  logic acc_en = 0, acc_first = 0, fin = 0;
  logic [63:0] x, w;
  logic [6:0] nvalid;
  logic out_valid;
  logic [7:0] out_q;
  logic signed [36:0] out_val;
  int checks = 0, failures = 0;

  tnpu dut (.clk, .rst_n, .cfg, .prm_we, .prm_sel, .prm_idx, .prm_data, .acc_en,
            .acc_first, .x, .w, .nvalid, .fin, .out_valid, .out_q, .out_val);

  always #5 clk = ~clk;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(prm_e s, int idx, longint v);
    @(negedge clk);
    prm_we = 1; prm_sel = s; prm_idx = 4'(idx); prm_data = 32'(v);
    @(negedge clk);
    prm_we = 0;
  endtask

  task automatic finish_and_check(int exp_q, longint exp_v, bit is_out, int nn);
    @(negedge clk);
    fin = 1;
    @(negedge clk);
    fin = 0;
    checks++;
    if (!out_valid) begin failures++; $display("out_valid missing one cycle after fin"); end
    checks++;
    if (is_out ? (longint'(out_val) != exp_v) : (int'(out_q) != exp_q)) begin
      failures++;
      $display("case %0d cfg %p: q %0d val %0d, expected q %0d val %0d", nn, cfg, out_q,
               out_val, exp_q, exp_v);
    end
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("out_valid longer than one cycle"); end
  endtask

  net_model m;

  initial begin
    x = '0; w = '0; nvalid = '0; prm_sel = PRM_BIAS; prm_idx = '0; prm_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int nn = 0; nn < 400; nn++) begin
      int ip, wp, op, L;
      act_e a;
      layer_type_e lt;
      m = new();
      lt = layer_type_e'(nn % 3);
      a = act_e'($urandom_range(0, 4));
      ip = (lt == LT_INPUT) ? 7 : ((nn % 2) ? 0 : int'($urandom_range(1, 7)));
      wp = (ip == 0) ? 0 : int'($urandom_range(0, 7));
      op = (a == ACT_SIGN) ? 0 : (a == ACT_MT) ? int'($urandom_range(0, 3))
                                             : int'($urandom_range(0, 7));
      L = (lt == LT_INPUT) ? 1 : int'($urandom_range(1, 150));
      m.nl = 2;
      m.set_layer(0, LT_INPUT, ACT_RELU, 0, 7, 7, 7, 1, 1);
      m.set_layer(1, lt, a, 1'($urandom_range(0, 1)), ip, wp, op, 1, L);
      m.gen_params(1);
      cfg = m.cfg[1];
      wr(PRM_SIGN_THR, 0, m.sthr[1][0]);
      for (int i = 0; i < MT_NUM; i++) wr(PRM_MT_THR, i, m.mthr[1][i]);
      wr(PRM_BIAS, 0, longint'(m.bias[1][0]));
      wr(PRM_BN_SCALE, 0, m.bn_s[1][0]);
      wr(PRM_BN_OFFS, 0, m.bn_o[1][0]);
      wr(PRM_Q_SCALE, 0, m.q_s[1][0]);
      wr(PRM_Q_OFFS, 0, m.q_o[1][0]);
      if (lt == LT_INPUT) begin
        int p;
        longint v;
        int e;
        p = int'($urandom_range(0, 255));
        @(negedge clk);
        x = 64'($urandom) << 8 | 64'(p);
        v = longint'(p) * 32;
        if (a == ACT_SIGN || a == ACT_MT) e = m.act_out(1, 0, v);
        else e = ref_quan(v, op + 1, m.q_s[1][0], m.q_o[1][0]);
        finish_and_check(e, 0, 0, nn);
      end else begin
        int acts [];
        int epw, K;
        longint acc, v;
        epw = (ip == 0) ? 64 : 8;
        K = (L + epw - 1) / epw;
        acts = new[L];
        acc = cfg.bn_fold ? longint'(m.bias[1][0]) : 0;
        foreach (acts[e]) begin
          int xv, wv;
          acts[e] = int'($urandom_range(0, (1 << (ip + 1)) - 1));
          xv = acts[e];
          wv = m.wt[1][e];
          if (ip == 0) acc += (xv == wv) ? 1 : -1;
          else begin
            if (wp == 0) wv = wv ? 1 : -1;
            else if (wv >= (1 << wp)) wv -= (1 << (wp + 1));
            acc += longint'(xv) * longint'(wv);
          end
        end
        for (int k = 0; k < K; k++) begin
          @(negedge clk);
          while ($urandom_range(0, 3) == 0) begin acc_en = 0; @(negedge clk); end
          x = {$urandom, $urandom}; w = {$urandom, $urandom};   // junk beyond valid
          for (int i = 0; i < epw && k * epw + i < L; i++) begin
            int e;
            e = k * epw + i;
            if (ip == 0) begin x[i] = 1'(acts[e]); w[i] = 1'(m.wt[1][e]); end
            else begin x[i*8 +: 8] = 8'(acts[e]); w[i*8 +: 8] = 8'(m.wt[1][e]); end
          end
          nvalid = 7'((L - k * epw >= epw) ? epw : L - k * epw);
          acc_en = 1;
          acc_first = (k == 0);
        end
        @(negedge clk);
        acc_en = 0;
        if (cfg.bn_fold) v = acc * 32;
        else v = sat37(acc * m.bn_s[1][0] + m.bn_o[1][0]);
        finish_and_check((lt == LT_OUTPUT) ? 0 : m.act_out(1, 0, v), v, lt == LT_OUTPUT, nn);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
