// tb_lpu: runs single layers of random networks through one LPU.
// For each case the testbench picks a layer of a random network (input,
// hidden or output), sends the layer setting, streams the layer parameters
// and, after start, the weights, supplies the layer's input words and
// compares every output word with the reference model. Input, output and
// stream handshakes get random gaps and backpressure in half of the cases.
// In the gap-free cases it also checks the processing rate: from start to
// done the LPU may take at most one cycle per weight word plus a fixed
// per-batch and per-layer overhead (neuron initialization, finishing and
// output packing), see MAX_BATCH_OVH / MAX_LAYER_OVH below.
`timescale 1ns/1ps
module tb_lpu;
  import netpu_pkg::*;
  import netpu_tb_pkg::*;

  localparam int MAX_BATCH_OVH = 8;
  localparam int MAX_LAYER_OVH = 8;

  logic clk = 0, rst_n = 0;
  logic cfg_valid = 0, start = 0;
  layer_cfg_t cfg_in;
  logic [63:0] s_data, in_data, out_data;
  logic s_valid = 0, s_ready, in_valid = 0, in_ready, out_valid, out_last, out_ready = 0;
  logic idle, loaded, done;
  int checks = 0, failures = 0;

  lpu dut (.clk, .rst_n, .cfg_valid, .cfg_in, .start, .s_data, .s_valid, .s_ready,
           .in_data, .in_valid, .in_ready, .out_data, .out_valid, .out_last, .out_ready,
           .idle, .loaded, .done);
  always #5 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  net_model m;
  int lay, n_out_words, got;
  bit gaps, running;
  logic [63:0] s_q [$], in_q [$];
  int cyc, t_start, t_done;
  int n_lt [3] = '{0, 0, 0};

  always @(posedge clk) cyc <= cyc + 1;

  // stream and input drivers: drive on the negedge and note whether the
  // transfer happens at the following posedge (ready settled after #1)
  bit s_x = 0, in_x = 0, out_x = 0;
  always @(negedge clk) begin
    if (running) begin
      if (s_x) void'(s_q.pop_front());
      if (in_x) void'(in_q.pop_front());
      s_valid = s_q.size() > 0 && !(gaps && $urandom_range(0, 3) == 0);
      s_data = s_q.size() > 0 ? s_q[0] : '0;
      in_valid = in_q.size() > 0 && !(gaps && $urandom_range(0, 3) == 0);
      in_data = in_q.size() > 0 ? in_q[0] : '0;
      out_ready = !(gaps && $urandom_range(0, 2) == 0);
      #1;
      s_x = s_valid && s_ready;
      in_x = in_valid && in_ready;
      out_x = out_valid && out_ready;
    end else begin
      s_x = 0; in_x = 0; out_x = 0;
    end
  end

  // output monitor
  always @(negedge clk) begin
    #2;
    if (running && out_x) begin
      checks++;
      if (m.cfg[lay].ltype == LT_OUTPUT) begin
        if (int'(out_data[15:0]) != m.exp_class || longint'(signed'(out_data[63:16])) != m.exp_max
            || !out_last) begin
          failures++;
          $display("output layer: got class %0d max %0d last %0d, expected %0d %0d",
                   out_data[15:0], signed'(out_data[63:16]), out_last, m.exp_class, m.exp_max);
        end
      end else if (out_data !== m.out_word(lay, got) || out_last) begin
        failures++;
        $display("layer %0d word %0d: got %h expected %h cfg %p", lay, got, out_data,
                 m.out_word(lay, got), m.cfg[lay]);
      end
      got++;
    end
  end

  initial begin
    s_data = '0; in_data = '0; cfg_in = '0; running = 0; cyc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int tc = 0; tc < 60; tc++) begin
      int timeout;
      m = new();
      m.randomize_net(100);
      lay = (tc % 3 == 0) ? 0 : (tc % 3 == 1) ? int'($urandom_range(1, m.nl - 2)) : m.nl - 1;
      n_lt[m.cfg[lay].ltype]++;
      gaps = tc % 2;
      m.stream = {};
      m.push_params(lay);
      s_q = m.stream;
      m.stream = {};
      m.push_weights(lay);
      in_q = {};
      for (int w = 0; w < m.in_words(lay); w++) begin
        if (lay == 0) begin
          logic [63:0] wd;
          wd = '0;
          for (int j = 0; j < 8; j++)
            if (w * 8 + j < m.pixels.size()) wd[j*8 +: 8] = 8'(m.pixels[w * 8 + j]);
          in_q.push_back(wd);
        end else in_q.push_back(m.out_word(lay - 1, w));
      end
      if (m.cfg[lay].ltype == LT_OUTPUT) n_out_words = 1;
      else n_out_words = (m.cfg[lay].out_prec == 0) ? (int'(m.cfg[lay].neurons) + 63) / 64
                                                    : (int'(m.cfg[lay].neurons) + 7) / 8;
      got = 0;
      checks++;
      if (!idle) begin failures++; $display("case %0d: LPU not idle", tc); end
      @(negedge clk);
      cfg_valid = 1; cfg_in = m.cfg[lay];
      @(negedge clk);
      cfg_valid = 0;
      running = 1;
      timeout = 0;
      while (!loaded && timeout < 100000) begin @(negedge clk); timeout++; end
      @(negedge clk);
      checks++;
      if (s_q.size() != 0 || !loaded) begin
        failures++;
        $display("case %0d: %0d parameter words left after loaded", tc, s_q.size());
      end
      // weights are released only after start; input words may already be buffered
      foreach (m.stream[i]) s_q.push_back(m.stream[i]);
      @(negedge clk);
      start = 1;
      t_start = cyc;
      @(negedge clk);
      start = 0;
      timeout = 0;
      while (!done && timeout < 1000000) begin @(posedge clk); timeout++; end
      t_done = cyc;
      repeat (3) @(negedge clk);
      running = 0;
      s_valid = 0; in_valid = 0; out_ready = 0;
      checks++;
      if (got != n_out_words || s_q.size() != 0 || in_q.size() != 0) begin
        failures++;
        $display("case %0d: %0d of %0d output words, %0d stream and %0d input words left",
                 tc, got, n_out_words, s_q.size(), in_q.size());
      end
      if (!gaps) begin
        int bound, nb, wwords, nvals;
        nb = batches(m.cfg[lay], NUM_TNPU);
        wwords = (lay == 0) ? m.in_words(lay) : int'(m.cfg[lay].neurons) * m.in_words(lay);
        // neuron processing takes one 64-bit weight word per cycle (the
        // rate of the stream); an input layer takes one input word per cycle
        // neuron initialization writes one parameter value per cycle
        nvals = 0;
        for (int p = 0; p < NUM_PRM; p++)
          if (prm_used(m.cfg[lay], prm_e'(p))) nvals += NUM_TNPU * prm_per_tnpu(m.cfg[lay], prm_e'(p));
        bound = wwords + nb * (nvals + MAX_BATCH_OVH) + MAX_LAYER_OVH +
                ((m.cfg[lay].ltype == LT_OUTPUT) ? int'(m.cfg[lay].neurons) : 0);
        checks++;
        if (t_done - t_start > bound) begin
          failures++;
          $display("case %0d: %0d cycles from start to done, bound %0d", tc, t_done - t_start,
                   bound);
        end
      end
    end
    checks++;
    if (n_lt[0] == 0 || n_lt[1] == 0 || n_lt[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
