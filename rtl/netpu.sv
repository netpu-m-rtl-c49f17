// netpu: Network Processing Unit, the top of the NetPU-M accelerator.
//
// Runs a whole MLP, layer after layer, on a ring of NUM_LPU (2) Layer
// Processing Units. The network, its inputs and its parameters all arrive as
// one stream of 64-bit words on s_axis_*; the class found by the output
// layer leaves on m_axis_* as one word {sign-extended max value, class index
// in bits 15:0} with tlast = 1. No other control is needed.
//
// Stream order for one inference with N layers (layer i runs on LPU i mod
// NUM_LPU):
//   N | N layer setting words | dataset input words (8-bit elements, 8 per
//   word) | parameters of layers 0 .. NUM_LPU-1 | weights of layer 0 |
//   parameters of layer NUM_LPU | weights of layer 1 | ... | weights of
//   layer N-1.
// Layer 0 must be an input layer and layer N-1 the output layer.
//
// Structure: a receive FIFO and a transmit FIFO on the stream ports, a layer
// setting FIFO, the NetPU control state machine, the IN MUX in front of LPU 0
// (dataset inputs while IS_FIRST_INPUT, otherwise the output of the last
// LPU), an output crossbar behind each LPU (to the next LPU, or, for the LPU
// named by the output layer index with output enable set, through the OUT
// MUX to the transmit FIFO).
// Control steps: NetPU initialization (layer count, settings, dataset
// inputs), LPU initialization (settings and parameters of the first NUM_LPU
// layers), LPU processing (weights of the running layer), LPU resetting (the
// finished LPU takes the setting and parameters of the layer NUM_LPU ahead).
// The ring, the multiplexers, the control steps and the stream order follow
// the architecture; word formats, FIFO depths and handshakes are this
// design's choices.
module netpu
  import netpu_pkg::*;
#(
  parameter int unsigned NUM_LPU    = 2,
  parameter int unsigned DATA_DEPTH = 1024,
  parameter int unsigned PRM_DEPTH  = 2048,
  parameter int unsigned RX_DEPTH   = 512,
  parameter int unsigned TX_DEPTH   = 16,
  parameter int unsigned SET_DEPTH  = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [WORD_W-1:0]   s_axis_tdata,
  input  logic                s_axis_tvalid,
  output logic                s_axis_tready,
  output logic [WORD_W-1:0]   m_axis_tdata,
  output logic                m_axis_tvalid,
  output logic                m_axis_tlast,
  input  logic                m_axis_tready,
  output logic                busy,
  output logic                done
);

  localparam int unsigned LW = (NUM_LPU > 1) ? $clog2(NUM_LPU) : 1;

  typedef enum logic [3:0] {
    N_NUM, N_SET, N_DATA, N_CFG, N_PRM, N_START, N_RUN, N_FIN
  } nstate_e;

  nstate_e     state;
  logic [15:0] nlayers, scnt, cur, cfg_layer;
  logic [15:0] dcnt;
  logic [LW-1:0] cfg_lpu, run_lpu;
  logic        in_init;
  logic [LW-1:0] out_idx;   // output layer index: LPU holding the output layer
  logic        out_en;      // output enable

  // ------------------------------------------------------------ RX FIFO
  logic [WORD_W-1:0] rx_dout;
  logic              rx_empty, rx_full, rx_pop;
  logic [$clog2(RX_DEPTH):0] rx_cnt;

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(RX_DEPTH)) u_rx (
    .clk, .rst_n, .clr(1'b0), .push(s_axis_tvalid && s_axis_tready), .din(s_axis_tdata),
    .pop(rx_pop), .dout(rx_dout), .empty(rx_empty), .full(rx_full), .count(rx_cnt)
  );
  assign s_axis_tready = !rx_full;

  // ------------------------------------------------ layer setting FIFO
  logic             set_push, set_pop, set_empty, set_full;
  layer_cfg_t       set_dout;
  logic [$clog2(SET_DEPTH):0] set_cnt;

  sync_fifo #(.WIDTH(CFG_W), .DEPTH(SET_DEPTH)) u_set (
    .clk, .rst_n, .clr(1'b0), .push(set_push), .din(rx_dout[CFG_W-1:0]),
    .pop(set_pop), .dout(set_dout), .empty(set_empty), .full(set_full), .count(set_cnt)
  );

  // ------------------------------------------------------------ TX FIFO
  logic              tx_push, tx_full, tx_empty;
  logic [WORD_W:0]   tx_din, tx_dout;
  logic [$clog2(TX_DEPTH):0] tx_cnt;

  sync_fifo #(.WIDTH(WORD_W+1), .DEPTH(TX_DEPTH)) u_tx (
    .clk, .rst_n, .clr(1'b0), .push(tx_push), .din(tx_din),
    .pop(m_axis_tvalid && m_axis_tready), .dout(tx_dout), .empty(tx_empty),
    .full(tx_full), .count(tx_cnt)
  );
  assign m_axis_tvalid = !tx_empty;
  assign m_axis_tdata  = tx_dout[WORD_W-1:0];
  assign m_axis_tlast  = tx_dout[WORD_W];

  // ---------------------------------------------------------------- LPUs
  logic [NUM_LPU-1:0]  l_cfg_valid, l_start, l_s_valid, l_s_ready;
  logic [NUM_LPU-1:0]  l_in_valid, l_in_ready, l_out_valid, l_out_last, l_out_ready;
  logic [NUM_LPU-1:0]  l_idle, l_loaded, l_done;
  logic [WORD_W-1:0]   l_in_data  [NUM_LPU];
  logic [WORD_W-1:0]   l_out_data [NUM_LPU];
  logic                is_first_input;

  for (genvar i = 0; i < NUM_LPU; i++) begin : g_lpu
    lpu #(.DATA_DEPTH(DATA_DEPTH), .PRM_DEPTH(PRM_DEPTH)) u_lpu (
      .clk, .rst_n,
      .cfg_valid(l_cfg_valid[i]), .cfg_in(set_dout), .start(l_start[i]),
      .s_data(rx_dout), .s_valid(l_s_valid[i]), .s_ready(l_s_ready[i]),
      .in_data(l_in_data[i]), .in_valid(l_in_valid[i]), .in_ready(l_in_ready[i]),
      .out_data(l_out_data[i]), .out_valid(l_out_valid[i]), .out_last(l_out_last[i]),
      .out_ready(l_out_ready[i]),
      .idle(l_idle[i]), .loaded(l_loaded[i]), .done(l_done[i])
    );
  end

  // IN MUX, LPU output crossbars and OUT MUX
  assign is_first_input = (state == N_DATA);

  always_comb begin
    tx_push = 1'b0;
    tx_din  = '0;
    for (int i = 0; i < NUM_LPU; i++) begin
      int prev;
      logic prev_to_out;
      prev = (i == 0) ? NUM_LPU - 1 : i - 1;
      prev_to_out = out_en && (out_idx == LW'(prev));
      if (i == 0 && is_first_input) begin
        l_in_data[i]  = rx_dout;
        l_in_valid[i] = !rx_empty;
      end else begin
        l_in_data[i]  = l_out_data[prev];
        l_in_valid[i] = l_out_valid[prev] && !prev_to_out &&
                        !(i == 0 && is_first_input);
      end
    end
    for (int i = 0; i < NUM_LPU; i++) begin
      int nxt;
      nxt = (i == NUM_LPU - 1) ? 0 : i + 1;
      if (out_en && out_idx == LW'(i)) begin
        l_out_ready[i] = !tx_full;
        if (l_out_valid[i]) begin
          tx_push = 1'b1;
          tx_din  = {l_out_last[i], l_out_data[i]};
        end
      end else begin
        l_out_ready[i] = l_in_ready[nxt] && !(nxt == 0 && is_first_input);
      end
    end
  end

  // stream routing from the RX FIFO
  always_comb begin
    l_s_valid = '0;
    rx_pop    = 1'b0;
    set_push  = 1'b0;
    unique case (state)
      N_NUM:  rx_pop = !rx_empty;
      N_SET:  begin
        set_push = !rx_empty && !set_full;
        rx_pop   = set_push;
      end
      N_DATA: rx_pop = !rx_empty && l_in_ready[0];
      N_PRM:  begin
        l_s_valid[cfg_lpu] = !rx_empty;
        rx_pop = !rx_empty && l_s_ready[cfg_lpu];
      end
      N_RUN:  begin
        l_s_valid[run_lpu] = !rx_empty;
        rx_pop = !rx_empty && l_s_ready[run_lpu];
      end
      default: ;
    endcase
  end

  always_comb begin
    l_cfg_valid = '0;
    l_start     = '0;
    set_pop     = 1'b0;
    if (state == N_CFG && !set_empty && l_idle[cfg_lpu]) begin
      l_cfg_valid[cfg_lpu] = 1'b1;
      set_pop = 1'b1;
    end
    if (state == N_START && l_loaded[run_lpu]) l_start[run_lpu] = 1'b1;
  end

  function automatic logic [LW-1:0] next_lpu(logic [LW-1:0] i);
    return (int'(i) == NUM_LPU - 1) ? '0 : i + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= N_NUM;
      nlayers   <= '0;
      scnt      <= '0;
      cur       <= '0;
      cfg_layer <= '0;
      dcnt      <= '0;
      cfg_lpu   <= '0;
      run_lpu   <= '0;
      in_init   <= 1'b0;
      out_idx   <= '0;
      out_en    <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        // NetPU initialization
        N_NUM: if (!rx_empty) begin
          nlayers <= rx_dout[15:0];
          scnt    <= '0;
          out_en  <= 1'b0;
          state   <= N_SET;
        end
        N_SET: if (set_push) begin
          if (scnt == 16'd0)
            dcnt <= 16'((int'(rx_dout[15:0]) + 7) / 8);
          scnt <= scnt + 16'd1;
          if (scnt + 16'd1 == nlayers) state <= N_DATA;
        end
        N_DATA: if (rx_pop) begin
          dcnt <= dcnt - 16'd1;
          if (dcnt == 16'd1) begin
            cfg_layer <= '0;
            cfg_lpu   <= '0;
            cur       <= '0;
            run_lpu   <= '0;
            in_init   <= 1'b1;
            state     <= N_CFG;
          end
        end
        // LPU initialization / resetting
        N_CFG: if (set_pop) begin
          if (set_dout.ltype == LT_OUTPUT) begin
            out_idx <= cfg_lpu;
            out_en  <= 1'b1;
          end
          state <= N_PRM;
        end
        N_PRM: if (l_loaded[cfg_lpu]) begin
          if (in_init && cfg_layer + 16'd1 < nlayers && int'(cfg_lpu) < NUM_LPU - 1) begin
            cfg_layer <= cfg_layer + 16'd1;
            cfg_lpu   <= cfg_lpu + 1'b1;
            state     <= N_CFG;
          end else begin
            in_init <= 1'b0;
            state   <= N_START;
          end
        end
        // LPU processing
        N_START: if (l_start[run_lpu]) state <= N_RUN;
        N_RUN: if (l_done[run_lpu]) begin
          cur     <= cur + 16'd1;
          run_lpu <= next_lpu(run_lpu);
          if (cur + 16'd1 == nlayers) begin
            state <= N_FIN;
          end else if (int'(cur) + NUM_LPU < int'(nlayers)) begin
            cfg_layer <= cur + 16'(NUM_LPU);
            cfg_lpu   <= run_lpu;
            state     <= N_CFG;
          end else begin
            state <= N_START;
          end
        end
        N_FIN: begin
          done  <= 1'b1;
          state <= N_NUM;
        end
        default: state <= N_NUM;
      endcase
    end
  end

  assign busy = (state != N_NUM);

  a_axis_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid && $stable(m_axis_tdata))
    else $error("netpu: output stream changed while stalled");
  a_single_output: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(l_out_valid & l_out_ready & {NUM_LPU{out_en}} & (NUM_LPU'(1) << out_idx)))
    else $error("netpu: two LPUs drive the OUT MUX");

endmodule
