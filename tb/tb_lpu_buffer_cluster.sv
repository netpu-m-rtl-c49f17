// tb_lpu_buffer_cluster: checks the LPU buffer cluster at small depths.
// Random pushes and pops on the input, reload and weight buffers and on all
// seven parameter buffers are compared with queue models. Parameter words
// for the 128-bit buffers are sent as pairs of 64-bit words (first word in
// the low half, with idle cycles allowed between the two halves); bias words
// go straight into the 64-bit bias buffer. Also checks full/empty flags and
// that a push to a full parameter buffer is refused (prm_full).
`timescale 1ns/1ps
module tb_lpu_buffer_cluster;
  import netpu_pkg::*;

  localparam int DD = 16, PD = 8;
  logic clk = 0, rst_n = 0, clr = 0;
  logic in_push = 0, in_pop = 0, rl_push = 0, rl_pop = 0, wt_push = 0, wt_pop = 0;
  logic [63:0] in_din, rl_din, wt_din, in_dout, rl_dout, wt_dout, prm_din;
  logic in_full, in_empty, rl_full, rl_empty, wt_full, wt_empty;
  logic prm_push = 0, prm_full;
  prm_e prm_sel;
  logic [NUM_PRM-1:0] prm_pop = '0, prm_empty;
  logic [127:0] prm_dout [NUM_PRM];
  int checks = 0, failures = 0;

  lpu_buffer_cluster #(.DATA_DEPTH(DD), .PRM_DEPTH(PD)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0]  qi [$], qr [$], qw [$];
  logic [127:0] qp [NUM_PRM][$];
  int half = 0;           // a wide parameter word is half written
  prm_e cur;
  logic [63:0] low;
  int n_refused = 0, n_full = 0;

  task automatic chk(string what, bit cond);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("%0t %s", $time, what);
    end
  endtask

  initial begin
    in_din = '0; rl_din = '0; wt_din = '0; prm_din = '0; prm_sel = PRM_SIGN_THR;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 30000; it++) begin
      int push_bias;
      @(negedge clk);
      // compare outputs with the models
      chk("in", in_empty == (qi.size() == 0) && in_full == (qi.size() == DD) &&
                (qi.size() == 0 || in_dout == qi[0]));
      chk("rl", rl_empty == (qr.size() == 0) && rl_full == (qr.size() == DD) &&
                (qr.size() == 0 || rl_dout == qr[0]));
      chk("wt", wt_empty == (qw.size() == 0) && wt_full == (qw.size() == DD) &&
                (qw.size() == 0 || wt_dout == qw[0]));
      for (int p = 0; p < NUM_PRM; p++)
        chk($sformatf("prm %0d", p), prm_empty[p] == (qp[p].size() == 0) &&
            (qp[p].size() == 0 || prm_dout[p] == qp[p][0]));
      // new stimulus; fill phases alternate with drain phases
      begin
        int pp;
        pp = ((it / 500) % 2) ? 70 : 30;
        in_push = $urandom_range(0, 99) < pp; in_din = {$urandom, $urandom};
        rl_push = $urandom_range(0, 99) < pp && !rl_full; rl_din = {$urandom, $urandom};
        wt_push = $urandom_range(0, 99) < pp && !wt_full; wt_din = {$urandom, $urandom};
        in_pop = $urandom_range(0, 99) >= pp && !in_empty;
        rl_pop = $urandom_range(0, 99) >= pp && !rl_empty;
        wt_pop = $urandom_range(0, 99) >= pp && !wt_empty;
        for (int p = 0; p < NUM_PRM; p++) prm_pop[p] = $urandom_range(0, 99) >= pp + 25 && !prm_empty[p];
        if (half == 0) cur = prm_e'($urandom_range(0, NUM_PRM - 1));
        prm_sel = cur;
        prm_push = $urandom_range(0, 99) < pp;
        prm_din = {$urandom, $urandom};
      end
      #1;
      // model update for the transfers at the next posedge
      if (in_push && !in_full) qi.push_back(in_din);
      if (in_push && in_full) in_push = 0;
      if (in_pop) void'(qi.pop_front());
      if (rl_pop) void'(qr.pop_front());
      if (rl_push) qr.push_back(rl_din);
      if (wt_pop) void'(qw.pop_front());
      if (wt_push) qw.push_back(wt_din);
      for (int p = 0; p < NUM_PRM; p++) if (prm_pop[p]) void'(qp[p].pop_front());
      if (prm_push) begin
        if (prm_full) n_refused++;
        else if (cur == PRM_BIAS) qp[cur].push_back({64'd0, prm_din});
        else if (half == 0) begin low = prm_din; half = 1; end
        else begin qp[cur].push_back({prm_din, low}); half = 0; end
      end
      if (prm_full) n_full++;
    end
    chk("full parameter buffer seen and refused", n_refused > 0 && n_full > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
