// tb_netpu_full: full-size run of the accelerator with its default
// parameters (2 LPUs of 8 TNPUs, buffers as in the architecture's buffer
// table) on the MNIST-sized MLPs of the evaluation: 784 inputs, three hidden
// layers of 64 (TFC), 256 (SFC) or 1024 (LFC) neurons, 10 outputs, in the
// w1a1 (Sign activation, BN folded), w2a2 (Multi-Threshold, BN folded) and
// w1a2 (Multi-Threshold) variants. Parameters and images are random; the
// result is compared with the reference model.
// Timing: the stream is fed without gaps and the output is always ready.
// The testbench counts clock cycles from the first accepted stream word to
// the result and checks that the accelerator keeps up with its input
// stream: cycles <= stream words + a fixed overhead per layer and per
// neuron batch (OVH_LAYER, OVH_BATCH). The cycle count is also printed
// next to the simulated latency reported for the original implementation at
// 100 MHz, and the testbench checks that it is not slower than that.
// With the gap-free stream the receive FIFO fills up whenever an LPU falls
// behind it (neuron initialization, finishing a batch); the testbench checks
// that this back-pressure on s_axis_tready happened.
`timescale 1ns/1ps
module tb_netpu_full;
  import netpu_pkg::*;
  import netpu_tb_pkg::*;

  localparam int OVH_LAYER = 64;
  localparam int OVH_BATCH = 16;

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

  always #5 clk = ~clk;

  initial begin
    #(64'd60_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  net_model m;
  int total_stall = 0;
  longint cyc;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic run(string name, int hidden, int wb, int ab, act_e act, bit fold,
                     real paper_us);
    longint t0, t1;
    int nwords, bound, sent, n_stall;
    bit got;
    m = new();
    m.mlp(hidden, wb, ab, act, fold);
    m.build_stream(2);
    nwords = m.stream.size();
    bound = OVH_LAYER * m.nl;
    for (int l = 0; l < m.nl; l++) begin
      int per;
      per = 0;
      for (int p = 0; p < NUM_PRM; p++)
        if (prm_used(m.cfg[l], prm_e'(p))) per += NUM_TNPU * prm_per_tnpu(m.cfg[l], prm_e'(p));
      bound += batches(m.cfg[l], NUM_TNPU) * (OVH_BATCH + per);
    end
    bound += nwords;
    t0 = -1; t1 = -1; got = 0; sent = 0; n_stall = 0;
    m_tready = 1'b1;
    fork
      begin
        while (m.stream.size() > 0) begin
          @(negedge clk);
          s_tvalid = 1'b1;
          s_tdata  = m.stream[0];
          #1;
          if (!s_tready) n_stall++;
        if (s_tready) begin
            if (t0 < 0) t0 = cyc;
            void'(m.stream.pop_front());
            sent++;
          end
        end
        @(negedge clk);
        s_tvalid = 1'b0;
      end
      while (!got) begin
        @(negedge clk);
        #1;
        if (m_tvalid) begin
          got = 1;
          t1 = cyc;
          checks++;
          if (int'(m_tdata[15:0]) != m.exp_class ||
              longint'(signed'(m_tdata[63:16])) != m.exp_max || !m_tlast) begin
            failures++;
            $display("%s: class %0d value %0d, expected class %0d value %0d", name,
                     m_tdata[15:0], signed'(m_tdata[63:16]), m.exp_class, m.exp_max);
          end
        end
      end
    join
    @(negedge clk);
    s_tvalid = 1'b0;
    repeat (3) @(posedge clk);
    checks++;
    if (busy) begin failures++; $display("%s: busy after the result", name); end
    checks++;
    if (t1 - t0 > bound) begin
      failures++;
      $display("%s: %0d cycles, more than the bound %0d", name, t1 - t0, bound);
    end
    // the original implementation's reported simulated latency is an upper
    // bound for this design
    checks++;
    if (real'(t1 - t0) > paper_us * 100.0) begin
      failures++;
      $display("%s: slower than the reported latency", name);
    end
    total_stall += n_stall;
    $display("%s: input stream held back (s_axis_tready low) in %0d cycles", name, n_stall);
    $display("%s: %0d stream words, %0d cycles = %0.3f us at 100 MHz (bound %0d); reported %0.3f us",
             name, nwords, t1 - t0, real'(t1 - t0) / 100.0, bound, paper_us);
  endtask

  initial begin
    cyc = 0;
    s_tvalid = 1'b0; s_tdata = '0; m_tready = 1'b0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    run("TFC-w1a1", 64,   1, 1, ACT_SIGN, 1'b1, 38.745);
    run("TFC-w2a2", 64,   2, 2, ACT_MT,   1'b1, 172.165);
    run("SFC-w1a1", 256,  1, 1, ACT_SIGN, 1'b1, 133.785);
    run("SFC-w2a2", 256,  2, 2, ACT_MT,   1'b0, 882.085);
    run("LFC-w1a1", 1024, 1, 1, ACT_SIGN, 1'b1, 974.745);
    run("LFC-w1a2", 1024, 1, 2, ACT_MT,   1'b1, 7408.225);
    // the receive FIFO must have filled up and held the stream back
    checks++;
    if (total_stall == 0) begin failures++; $display("receive FIFO never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
