// tnpu: Transformable Neuron Processing Unit.
//
// One neuron whose precision, activation and BN folding are set at run time.
// It chains MUL -> ACCU -> BN -> ACTIV -> QUAN with a crossbar that bypasses
// stages according to the layer type (input, hidden, output), the activation
// and the BN folding option.
//
// Interface and timing:
//  * cfg holds the current layer setting (stable while the TNPU works).
//  * Parameters are written one 32-bit value per cycle with prm_we, selecting
//    the category with prm_sel and, for Multi-Thresholds, the threshold with
//    prm_idx. Biases use the low 8 bits.
//  * Each cycle with acc_en = 1 multiplies the 64-bit input word x by the
//    64-bit weight word w and adds the result to the accumulator; acc_first
//    marks the first word of a neuron, nvalid the valid elements of the word.
//  * fin = 1 finishes the neuron: the cycle after, out_valid = 1 and out_q
//    (quantized output, for input and hidden layers) and out_val (37-bit
//    result with 5 fraction bits, for output layers) hold the result until
//    the next fin. fin must come at least one cycle after the last acc_en.
//    For an input layer, fin alone processes the raw byte x[7:0].
// The stage set and crossbar paths follow the architecture; the parameter
// write port and the one-cycle finishing step are this design's choices.
module tnpu
  import netpu_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  layer_cfg_t               cfg,
  input  logic                     prm_we,
  input  prm_e                     prm_sel,
  input  logic [3:0]               prm_idx,
  input  logic [PRM_W-1:0]         prm_data,
  input  logic                     acc_en,
  input  logic                     acc_first,
  input  logic [WORD_W-1:0]        x,
  input  logic [WORD_W-1:0]        w,
  input  logic [6:0]               nvalid,
  input  logic                     fin,
  output logic                     out_valid,
  output logic [7:0]               out_q,
  output logic signed [VAL_W-1:0]  out_val
);

  // parameter registers
  logic signed [BIAS_W-1:0] bias;
  logic signed [PRM_W-1:0]  bn_scale, bn_offs, sign_thr, q_scale, q_offs;
  logic signed [PRM_W-1:0]  mt_thr [MT_NUM];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bias     <= '0;
      bn_scale <= '0;
      bn_offs  <= '0;
      sign_thr <= '0;
      q_scale  <= '0;
      q_offs   <= '0;
      for (int i = 0; i < MT_NUM; i++) mt_thr[i] <= '0;
    end else if (prm_we) begin
      unique case (prm_sel)
        PRM_SIGN_THR: sign_thr <= prm_data;
        PRM_MT_THR:   if (int'(prm_idx) < MT_NUM) mt_thr[prm_idx] <= prm_data;
        PRM_BIAS:     bias     <= prm_data[BIAS_W-1:0];
        PRM_BN_SCALE: bn_scale <= prm_data;
        PRM_BN_OFFS:  bn_offs  <= prm_data;
        PRM_Q_SCALE:  q_scale  <= prm_data;
        PRM_Q_OFFS:   q_offs   <= prm_data;
        default: ;
      endcase
    end
  end

  logic signed [PROD_W-1:0] prod [LANES];
  logic signed [ACC_W-1:0]  acc;
  logic signed [VAL_W-1:0]  bn_y, activ_x, activ_y, quan_x, res_val;
  logic [7:0]               quan_q, res_q;

  tnpu_mul u_mul (
    .x(x), .w(w), .in_prec(cfg.in_prec), .w_prec(cfg.w_prec),
    .nvalid(nvalid), .prod(prod)
  );

  tnpu_accu u_accu (
    .clk(clk), .rst_n(rst_n), .en(acc_en), .first(acc_first), .prod(prod),
    .bias(bias), .bias_en(cfg.bn_fold), .acc(acc)
  );

  tnpu_bn u_bn (
    .x(acc), .scale(bn_scale), .offset(bn_offs), .y(bn_y)
  );

  tnpu_activ u_activ (
    .x(activ_x), .act(cfg.act), .out_prec(cfg.out_prec),
    .sign_thr(sign_thr), .mt_thr(mt_thr), .y(activ_y)
  );

  tnpu_quan u_quan (
    .x(quan_x), .out_prec(cfg.out_prec), .scale(q_scale), .offset(q_offs),
    .q(quan_q)
  );

  tnpu_crossbar u_xbar (
    .ltype(cfg.ltype), .act(cfg.act), .bn_fold(cfg.bn_fold),
    .raw_in(x[7:0]), .acc(acc), .bn_y(bn_y), .activ_y(activ_y),
    .quan_q(quan_q), .activ_x(activ_x), .quan_x(quan_x),
    .out_q(res_q), .out_val(res_val)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_q     <= '0;
      out_val   <= '0;
    end else begin
      out_valid <= fin;
      if (fin) begin
        out_q   <= res_q;
        out_val <= res_val;
      end
    end
  end

endmodule
