// tb_netpu: end-to-end test of the NetPU-M accelerator at its default size.
//
// Runs a series of randomly shaped MLPs (3 to 6 layers, random activations,
// precisions, BN folding and neuron counts) through the stream interface,
// with random gaps on the input stream (every fourth network gap-free)
// and random back-pressure on the output
// stream, and compares the class index and its value with the
// reference model of netpu_tb_pkg. It also counts how often each mechanism
// of the design was exercised (binary and integer multiplication, each
// activation, BN folded and not, input reload, partial neuron batches, LPU
// resetting, the OUT MUX on each LPU, stream stalls) and fails if one never
// occurred.
`timescale 1ns/1ps
module tb_netpu;
  import netpu_pkg::*;
  import netpu_tb_pkg::*;

  localparam int NUM_NETS = 40;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [63:0] s_tdata;
  logic        s_tvalid, s_tready;
  logic [63:0] m_tdata;
  logic        m_tvalid, m_tready, m_tlast;
  logic        busy, done;

  int checks = 0, failures = 0;

  netpu dut (
    .clk, .rst_n,
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tready(s_tready),
    .m_axis_tdata(m_tdata), .m_axis_tvalid(m_tvalid), .m_axis_tlast(m_tlast),
    .m_axis_tready(m_tready), .busy, .done
  );

  always #5 clk = ~clk;   // 1 ns units, see timescale

  // mechanism counters
  int n_binary, n_integer, n_act[5], n_fold, n_nofold, n_reload, n_partial;
  int n_reset, n_out_lpu[2], n_in_stall, n_out_stall, n_mix, n_multi_batch_out, n_bipolar;

  always @(negedge clk) if (rst_n) begin
    if (dut.g_lpu[0].u_lpu.rl_pop) n_reload++;
    if (dut.g_lpu[1].u_lpu.rl_pop) n_reload++;
    if (dut.state == dut.N_CFG && dut.set_pop && !dut.in_init) n_reset++;
    if (dut.tx_push) n_out_lpu[dut.out_idx]++;
    if (m_tvalid && !m_tready) n_out_stall++;
  end

  initial begin
    #(64'd20_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  net_model m;
  int lay_words[2];   // output words seen from each LPU in its current layer
  int lay_of[2];      // layer each LPU runs

  // check every word an LPU passes to the next LPU
  always @(negedge clk) if (rst_n && m != null) begin
    for (int i = 0; i < 2; i++) begin
      logic v, r;
      logic [63:0] d;
      v = (i == 0) ? dut.l_out_valid[0] : dut.l_out_valid[1];
      r = (i == 0) ? dut.l_out_ready[0] : dut.l_out_ready[1];
      d = dut.l_out_data[i];
      if ((i == 0 ? dut.l_start[0] : dut.l_start[1])) begin
        lay_words[i] = 0;
        lay_of[i] = int'(dut.cur);
      end
      if (v && r && !(dut.out_en && int'(dut.out_idx) == i)) begin
        checks++;
        if (d !== m.out_word(lay_of[i], lay_words[i])) begin
          failures++;
          $display("layer %0d word %0d: %h expected %h (cfg %p)", lay_of[i], lay_words[i], d,
                   m.out_word(lay_of[i], lay_words[i]), m.cfg[lay_of[i]]);
        end
        lay_words[i]++;
      end
    end
  end

  initial begin
    s_tdata = '0; s_tvalid = 1'b0; m_tready = 1'b0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    for (int net = 0; net < NUM_NETS; net++) begin
      m = new();
      m.randomize_net(net < 4 ? 9 : 24);
      m.build_stream(2);
      for (int l = 0; l < m.nl; l++) begin
        if (l > 0 && m.cfg[l].in_prec == 0) n_binary++;
        if (l > 0 && m.cfg[l].in_prec != 0) n_integer++;
        if (m.cfg[l].ltype != LT_OUTPUT) n_act[m.cfg[l].act]++;
        if (l > 0) begin
          if (m.cfg[l].bn_fold) n_fold++; else n_nofold++;
          if (m.cfg[l].neurons % 8 != 0) n_partial++;
          if (m.cfg[l].in_prec != m.cfg[l].out_prec && m.cfg[l].ltype == LT_HIDDEN) n_mix++;
          if (m.cfg[l].in_prec != 0 && m.cfg[l].w_prec == 0) n_bipolar++;
        end
      end
      if (m.cfg[m.nl-1].neurons > 8) n_multi_batch_out++;
      fork
        begin : feed
          // drive on the falling edge; a word moves at the next rising edge
          // when valid and ready are both high in between
          while (m.stream.size() > 0) begin
            @(negedge clk);
            s_tvalid = (net % 4 == 3) || ($urandom_range(0, 3) != 0);
            s_tdata  = m.stream[0];
            #1;
            if (s_tvalid && s_tready) void'(m.stream.pop_front());
            else if (!s_tvalid) n_in_stall++;
          end
          @(negedge clk);
          s_tvalid = 1'b0;
        end
        begin : drain
          bit got;
          got = 0;
          while (!got) begin
            @(negedge clk);
            m_tready = ($urandom_range(0, 2) != 0);
            #1;
            if (m_tvalid && m_tready) begin
              got = 1;
              checks++;
              if (int'(m_tdata[15:0]) != m.exp_class ||
                  longint'(signed'(m_tdata[63:16])) != m.exp_max || !m_tlast) begin
                failures++;
                $display("net %0d: class %0d value %0d, expected class %0d value %0d",
                         net, m_tdata[15:0], signed'(m_tdata[63:16]), m.exp_class, m.exp_max);
              end
            end
          end
          @(negedge clk);
          m_tready = 1'b0;
        end
      join
      // the accelerator returns to its idle state after each inference
      repeat (3) @(posedge clk);
      checks++;
      if (busy || m_tvalid) begin
        failures++;
        $display("net %0d: not idle after inference", net);
      end
    end

    begin
      int cnt [string];
      cnt["binary multiply"]       = n_binary;
      cnt["integer multiply"]      = n_integer;
      cnt["ReLU"]                  = n_act[ACT_RELU];
      cnt["Sigmoid"]               = n_act[ACT_SIGMOID];
      cnt["tanh"]                  = n_act[ACT_TANH];
      cnt["Sign"]                  = n_act[ACT_SIGN];
      cnt["Multi-Thresholds"]      = n_act[ACT_MT];
      cnt["BN folded"]             = n_fold;
      cnt["BN not folded"]         = n_nofold;
      cnt["input reload"]          = n_reload;
      cnt["partial batch"]         = n_partial;
      cnt["mixed precision"]       = n_mix;
      cnt["1-bit weights, wider inputs"] = n_bipolar;
      cnt["LPU resetting"]         = n_reset;
      cnt["output from LPU 0"]     = n_out_lpu[0];
      cnt["output from LPU 1"]     = n_out_lpu[1];
      cnt["input stream gap"]      = n_in_stall;
      cnt["output back-pressure"]  = n_out_stall;
      cnt["multi-batch MaxOut"]    = n_multi_batch_out;
      foreach (cnt[s]) begin
        $display("mechanism %-22s : %0d", s, cnt[s]);
        checks++;
        if (cnt[s] == 0) begin
          failures++;
          $display("mechanism %s never exercised", s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
