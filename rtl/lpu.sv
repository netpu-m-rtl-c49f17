// lpu: Layer Processing Unit.
//
// Runs one layer of an MLP on a cluster of NUM_TNPU (8) TNPUs. The layer is
// split into batches of 8 neurons; the layer control loads a batch's
// parameters into the TNPUs, streams every input word past them with one
// weight word per TNPU, lets them finish, and packs their outputs.
//
// Operation, driven by the network controller:
//  1. cfg_valid in the idle state loads a layer setting (layer_cfg_t).
//  2. Parameter loading: the LPU takes the layer's parameters from s_* into
//     its buffer cluster, category by category in the order sign thresholds,
//     multi-thresholds, biases, BN scales, BN offsets, QUAN scales, QUAN
//     offsets, skipping categories the layer does not use. Each category holds
//     one value per neuron padded to whole batches (Multi-Thresholds:
//     2^n - 1 values per neuron, neuron after neuron); 32-bit values are
//     packed two per stream word, biases eight per word. An input layer takes
//     one batch of parameters, used by TNPU t for byte t of every input word.
//     When done, loaded = 1.
//  3. start begins processing. Weights then arrive on s_*: for each batch,
//     for each input word k, one 64-bit weight word per valid neuron of the
//     batch (no padding). The LPU accepts exactly neurons * words_per_input.
//     Per batch: neuron initialization (parameters into TNPU registers), then
//     neuron processing at one weight word per cycle. The first batch reads
//     its inputs from the layer input buffer and copies them into the input
//     reload buffer; later batches read the reload buffer and copy back, the
//     last batch does not copy, leaving both buffers empty.
//  4. Outputs leave on out_*: hidden/input layers send packed words (binary
//     outputs 64 per word, element i in bit i; wider outputs one per byte);
//     an output layer sends one word {sign-extended max value, class index in
//     bits 15:0} with out_last = 1. done pulses when the layer has finished.
// The three steps (layer initialization, neuron initialization, neuron
// processing), the batch scheme and the input reload follow the
// architecture; the stream order, word formats and cycle timing are this
// design's choices.
module lpu
  import netpu_pkg::*;
#(
  parameter int unsigned DATA_DEPTH = 1024,
  parameter int unsigned PRM_DEPTH  = 2048
) (
  input  logic                clk,
  input  logic                rst_n,
  // layer setting
  input  logic                cfg_valid,
  input  layer_cfg_t          cfg_in,
  input  logic                start,
  // parameter and weight stream
  input  logic [WORD_W-1:0]   s_data,
  input  logic                s_valid,
  output logic                s_ready,
  // layer input data
  input  logic [WORD_W-1:0]   in_data,
  input  logic                in_valid,
  output logic                in_ready,
  // layer output data
  output logic [WORD_W-1:0]   out_data,
  output logic                out_valid,
  output logic                out_last,
  input  logic                out_ready,
  // status
  output logic                idle,
  output logic                loaded,
  output logic                done
);

  typedef enum logic [3:0] {
    S_IDLE, S_PARAM, S_LOADED, S_NINIT, S_PROC, S_PROC_IN, S_FIN,
    S_COLLECT, S_MAXOUT, S_RESULT, S_DONE
  } state_e;

  state_e      state;
  layer_cfg_t  cfg;
  prm_e        pcat;
  logic [31:0] pcnt;          // words of the current category received
  logic [15:0] batch, nb;     // current batch, number of batches
  logic [15:0] k, nk;         // current input word, input words per neuron
  logic [3:0]  t;             // TNPU being fed
  logic [3:0]  ld_tgt;        // neuron initialization: target TNPU
  logic [3:0]  ld_idx;        // threshold index
  logic [2:0]  ld_slot;       // value within buffer word
  logic [31:0] wrecv, wtotal; // weight words received / expected
  logic [WORD_W-1:0] x_reg;
  logic [WORD_W-1:0] pack_w;
  logic [2:0]  pack_g;

  logic is_input, is_output;
  assign is_input  = (cfg.ltype == LT_INPUT);
  assign is_output = (cfg.ltype == LT_OUTPUT);

  // ---------------------------------------------------------------- buffers
  logic                in_full, in_empty, rl_full, rl_empty, wt_full, wt_empty;
  logic                in_pop, rl_push, rl_pop, wt_push, wt_pop, prm_push, prm_full;
  logic [WORD_W-1:0]   in_dout, rl_dout, wt_dout;
  logic [NUM_PRM-1:0]  prm_pop, prm_empty;
  logic [2*WORD_W-1:0] prm_dout [NUM_PRM];
  logic [WORD_W-1:0]   src_dout;
  logic                src_empty;

  lpu_buffer_cluster #(.DATA_DEPTH(DATA_DEPTH), .PRM_DEPTH(PRM_DEPTH)) u_buf (
    .clk, .rst_n, .clr(1'b0),
    .in_push(in_valid && !in_full), .in_din(in_data), .in_full, .in_pop, .in_dout, .in_empty,
    .rl_push, .rl_din(src_dout), .rl_full, .rl_pop, .rl_dout, .rl_empty,
    .wt_push, .wt_din(s_data), .wt_full, .wt_pop, .wt_dout, .wt_empty,
    .prm_push, .prm_sel(pcat), .prm_din(s_data), .prm_full,
    .prm_pop, .prm_dout, .prm_empty
  );

  assign in_ready = !in_full;

  // first batch reads the layer input buffer, later ones the reload buffer
  logic first_batch, last_batch, last_k;
  assign first_batch = (batch == 16'd0);
  assign last_batch  = (batch == nb - 16'd1);
  assign last_k      = (k == nk - 16'd1);
  assign src_dout    = first_batch ? in_dout  : rl_dout;
  assign src_empty   = first_batch ? in_empty : rl_empty;

  // ------------------------------------------------------- derived sizes
  function automatic logic [31:0] prm_words(layer_cfg_t c, prm_e p);
    logic [31:0] n;
    n = 32'(batches(c, NUM_TNPU)) * 32'(NUM_TNPU) * 32'(prm_per_tnpu(c, p));
    return (p == PRM_BIAS) ? n / 8 : n / 2;
  endfunction

  function automatic logic [15:0] in_words(layer_cfg_t c);
    int unsigned epw;
    epw = (c.ltype == LT_INPUT) ? 8 : elems_per_word(c.in_prec);
    return 16'((int'(c.in_len) + epw - 1) / epw);
  endfunction

  // neurons in the current batch (hidden/output) or elements in the current
  // input word (input layer)
  logic [3:0] nvals;
  always_comb begin
    int unsigned rem;
    if (is_input) rem = int'(cfg.in_len) - int'(k) * 8;
    else          rem = int'(cfg.neurons) - int'(batch) * NUM_TNPU;
    nvals = (rem >= NUM_TNPU) ? 4'(NUM_TNPU) : 4'(rem);
  end

  // valid elements of input word k
  logic [6:0] nvalid;
  always_comb begin
    int unsigned epw, rem;
    epw = elems_per_word(cfg.in_prec);
    rem = int'(cfg.in_len) - int'(k) * epw;
    nvalid = (rem >= epw) ? 7'(epw) : 7'(rem);
  end

  // -------------------------------------------------------------- TNPUs
  logic [NUM_TNPU-1:0]     t_acc_en, t_prm_we, t_out_valid;
  logic                    t_fin, acc_first;
  logic [WORD_W-1:0]       x_bus;
  logic [PRM_W-1:0]        prm_val;
  logic [7:0]              t_out_q   [NUM_TNPU];
  logic signed [VAL_W-1:0] t_out_val [NUM_TNPU];

  assign x_bus     = (t == 4'd0) ? src_dout : x_reg;
  assign acc_first = (k == 16'd0);

  for (genvar i = 0; i < NUM_TNPU; i++) begin : g_tnpu
    logic [WORD_W-1:0] xi;
    assign xi = is_input ? WORD_W'(in_dout[i*8 +: 8]) : x_bus;
    tnpu u_tnpu (
      .clk, .rst_n, .cfg,
      .prm_we(t_prm_we[i]), .prm_sel(pcat), .prm_idx(ld_idx), .prm_data(prm_val),
      .acc_en(t_acc_en[i]), .acc_first(acc_first), .x(xi), .w(wt_dout),
      .nvalid(nvalid), .fin(t_fin), .out_valid(t_out_valid[i]),
      .out_q(t_out_q[i]), .out_val(t_out_val[i])
    );
  end

  // value of the parameter word currently loaded into a TNPU
  always_comb begin
    logic [2*WORD_W-1:0] wd;
    wd = prm_dout[pcat];
    if (pcat == PRM_BIAS) prm_val = PRM_W'(signed'(wd[ld_slot*8 +: 8]));
    else                  prm_val = wd[ld_slot[1:0]*32 +: 32];
  end

  // -------------------------------------------------------------- maxout
  logic                    mx_clr, mx_valid;
  logic signed [VAL_W-1:0] mx_val;
  logic [15:0]             mx_idx;

  maxout u_maxout (
    .clk, .rst_n, .clr(mx_clr), .in_valid(mx_valid),
    .in_val(t_out_val[t[2:0]]), .in_idx(batch * 16'(NUM_TNPU) + 16'(t)),
    .max_val(mx_val), .max_idx(mx_idx)
  );

  // ------------------------------------------------------ output packing
  logic [WORD_W-1:0] grp_bytes, grp_bits_w;
  always_comb begin
    grp_bytes  = '0;
    grp_bits_w = pack_w;
    for (int i = 0; i < NUM_TNPU; i++) begin
      if (i < int'(nvals)) begin
        grp_bytes[i*8 +: 8]                     = t_out_q[i];
        grp_bits_w[int'(pack_g)*8 + i]          = t_out_q[i][0];
      end
    end
  end

  logic out_free;
  assign out_free = !out_valid || out_ready;
  logic last_group;
  assign last_group = is_input ? last_k : last_batch;

  // ------------------------------------------------------- control logic
  logic prm_skip, ld_last_val, ld_word_end;
  int unsigned ld_per;
  always_comb begin
    prm_skip    = !prm_used(cfg, pcat);
    ld_per      = prm_per_tnpu(cfg, pcat);
    ld_last_val = (ld_tgt == 4'(NUM_TNPU - 1)) && (int'(ld_idx) == ld_per - 1);
    ld_word_end = (int'(ld_slot) == prm_per_word(pcat) - 1);
  end

  // stream handshake
  always_comb begin
    s_ready  = 1'b0;
    prm_push = 1'b0;
    wt_push  = 1'b0;
    unique case (state)
      S_PARAM: begin
        s_ready  = !prm_skip && !prm_full;
        prm_push = s_valid && s_ready;
      end
      S_NINIT, S_PROC, S_FIN, S_COLLECT, S_MAXOUT, S_RESULT: begin
        s_ready = (wrecv != wtotal) && !wt_full;
        wt_push = s_valid && s_ready;
      end
      default: ;
    endcase
  end

  // data path strobes
  logic proc_go;
  always_comb begin
    in_pop   = 1'b0;
    rl_pop   = 1'b0;
    rl_push  = 1'b0;
    wt_pop   = 1'b0;
    prm_pop  = '0;
    t_prm_we = '0;
    t_acc_en = '0;
    t_fin    = 1'b0;
    mx_valid = 1'b0;
    mx_clr   = (state == S_LOADED) && start;
    proc_go  = 1'b0;
    unique case (state)
      S_NINIT: if (!prm_skip && !prm_empty[pcat]) begin
        t_prm_we[ld_tgt[2:0]] = 1'b1;
        if (ld_word_end) prm_pop[pcat] = 1'b1;
      end
      S_PROC: begin
        if (t == 4'd0)
          proc_go = !src_empty && !wt_empty && (last_batch || !rl_full);
        else
          proc_go = !wt_empty;
        if (proc_go) begin
          t_acc_en[t[2:0]] = 1'b1;
          wt_pop = 1'b1;
          if (t == 4'd0) begin
            if (first_batch) in_pop = 1'b1;
            else             rl_pop = 1'b1;
            rl_push = !last_batch;
          end
        end
      end
      S_PROC_IN: if (!in_empty) begin
        in_pop = 1'b1;
        t_fin  = 1'b1;
      end
      S_FIN: t_fin = 1'b1;
      S_MAXOUT: mx_valid = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cfg       <= '0;
      pcat      <= PRM_SIGN_THR;
      pcnt      <= '0;
      batch     <= '0;
      nb        <= 16'd1;
      k         <= '0;
      nk        <= 16'd1;
      t         <= '0;
      ld_tgt    <= '0;
      ld_idx    <= '0;
      ld_slot   <= '0;
      wrecv     <= '0;
      wtotal    <= '0;
      x_reg     <= '0;
      pack_w    <= '0;
      pack_g    <= '0;
      out_data  <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (wt_push) wrecv <= wrecv + 32'd1;

      unique case (state)
        S_IDLE: if (cfg_valid) begin
          cfg   <= cfg_in;
          pcat  <= PRM_SIGN_THR;
          pcnt  <= '0;
          state <= S_PARAM;
        end

        S_PARAM: begin
          if (prm_skip || (prm_push && pcnt + 32'd1 == prm_words(cfg, pcat))) begin
            pcnt <= '0;
            if (pcat == PRM_Q_OFFS) state <= S_LOADED;
            else                    pcat  <= prm_e'(pcat + 3'd1);
          end else if (prm_push) begin
            pcnt <= pcnt + 32'd1;
          end
        end

        S_LOADED: if (start) begin
          nb      <= 16'(batches(cfg, NUM_TNPU));
          nk      <= in_words(cfg);
          wtotal  <= is_input ? 32'd0 : 32'(cfg.neurons) * 32'(in_words(cfg));
          wrecv   <= '0;
          batch   <= '0;
          k       <= '0;
          t       <= '0;
          pcat    <= PRM_SIGN_THR;
          ld_tgt  <= '0;
          ld_idx  <= '0;
          ld_slot <= '0;
          pack_w  <= '0;
          pack_g  <= '0;
          state   <= S_NINIT;
        end

        S_NINIT: begin
          if (prm_skip) begin
            if (pcat == PRM_Q_OFFS) begin
              pcat  <= PRM_SIGN_THR;
              state <= is_input ? S_PROC_IN : S_PROC;
            end else begin
              pcat  <= prm_e'(pcat + 3'd1);
            end
          end else if (!prm_empty[pcat]) begin
            ld_slot <= ld_word_end ? 3'd0 : ld_slot + 3'd1;
            if (int'(ld_idx) == ld_per - 1) begin
              ld_idx <= '0;
              ld_tgt <= ld_tgt + 4'd1;
            end else begin
              ld_idx <= ld_idx + 4'd1;
            end
            if (ld_last_val) begin
              ld_tgt  <= '0;
              ld_idx  <= '0;
              ld_slot <= '0;
              if (pcat == PRM_Q_OFFS) begin
                pcat  <= PRM_SIGN_THR;
                state <= is_input ? S_PROC_IN : S_PROC;
              end else begin
                pcat  <= prm_e'(pcat + 3'd1);
              end
            end
          end
        end

        S_PROC: if (proc_go) begin
          if (t == 4'd0) x_reg <= src_dout;
          if (t == nvals - 4'd1) begin
            t <= '0;
            if (last_k) state <= S_FIN;
            else        k     <= k + 16'd1;
          end else begin
            t <= t + 4'd1;
          end
        end

        S_PROC_IN: if (!in_empty) state <= S_COLLECT;

        S_FIN: state <= S_COLLECT;

        S_COLLECT: begin
          if (is_output) begin
            t     <= '0;
            state <= S_MAXOUT;
          end else if (out_free) begin
            if (cfg.out_prec != 3'd0) begin
              out_data  <= grp_bytes;
              out_valid <= 1'b1;
              out_last  <= 1'b0;
            end else if (pack_g == 3'd7 || last_group) begin
              out_data  <= grp_bits_w;
              out_valid <= 1'b1;
              out_last  <= 1'b0;
              pack_w    <= '0;
              pack_g    <= '0;
            end else begin
              pack_w    <= grp_bits_w;
              pack_g    <= pack_g + 3'd1;
            end
            if (is_input) begin
              if (last_k) state <= S_DONE;
              else begin
                k     <= k + 16'd1;
                state <= S_PROC_IN;
              end
            end else begin
              if (last_batch) state <= S_DONE;
              else begin
                batch <= batch + 16'd1;
                k     <= '0;
                state <= S_NINIT;
              end
            end
          end
        end

        S_MAXOUT: begin
          if (t == nvals - 4'd1) begin
            t <= '0;
            if (last_batch) state <= S_RESULT;
            else begin
              batch <= batch + 16'd1;
              k     <= '0;
              state <= S_NINIT;
            end
          end else begin
            t <= t + 4'd1;
          end
        end

        S_RESULT: if (out_free) begin
          out_data  <= {{(WORD_W-16-VAL_W){mx_val[VAL_W-1]}}, mx_val, mx_idx};
          out_valid <= 1'b1;
          out_last  <= 1'b1;
          state     <= S_DONE;
        end

        S_DONE: if (!out_valid || out_ready) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  assign idle   = (state == S_IDLE);
  assign loaded = (state == S_LOADED);

  a_ready_only_when_active: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IDLE || state == S_LOADED) |-> !s_ready)
    else $error("lpu: stream accepted outside a layer");

endmodule
