// tnpu_crossbar: data-path router (Crossbar) of a TNPU.
//
// Selects which stages a value passes through, so that one TNPU can act as a
// neuron of an input, hidden or output layer:
//  * input layer: the raw 8-bit dataset input goes to ACTIV when the
//    activation is Sign or Multi-Thresholds, otherwise straight to QUAN;
//  * hidden layer: ACCU -> BN -> ACTIV -> QUAN, where BN is bypassed when BN
//    folding is on and QUAN is bypassed for Sign and Multi-Thresholds;
//  * output layer: the BN output (or the ACCU output when BN is folded) is the
//    neuron's result.
// A bypassed BN passes the integer accumulator value shifted into the 5
// fraction-bit format. The raw dataset input is likewise an integer in that
// format. Combinational. The routing rules follow the architecture.
module tnpu_crossbar
  import netpu_pkg::*;
(
  input  layer_type_e              ltype,
  input  act_e                     act,
  input  logic                     bn_fold,
  input  logic [7:0]               raw_in,    // non-quantized dataset input
  input  logic signed [ACC_W-1:0]  acc,       // ACCU output
  input  logic signed [VAL_W-1:0]  bn_y,      // BN output
  input  logic signed [VAL_W-1:0]  activ_y,   // ACTIV output
  input  logic [7:0]               quan_q,    // QUAN output
  output logic signed [VAL_W-1:0]  activ_x,   // ACTIV input
  output logic signed [VAL_W-1:0]  quan_x,    // QUAN input
  output logic [7:0]               out_q,     // quantized neuron output
  output logic signed [VAL_W-1:0]  out_val    // output-layer neuron result
);

  logic signed [VAL_W-1:0] post_acc;
  logic signed [VAL_W-1:0] raw_v;
  logic                    thr_act;

  always_comb begin
    thr_act  = (act == ACT_SIGN) || (act == ACT_MT);
    post_acc = bn_fold ? (VAL_W'(acc) <<< FRAC) : bn_y;
    raw_v    = VAL_W'({raw_in, 5'b0});
    activ_x  = (ltype == LT_INPUT) ? raw_v : post_acc;
    quan_x   = (ltype == LT_INPUT) ? raw_v : activ_y;
    out_q    = thr_act ? activ_y[7:0] : quan_q;
    out_val  = post_acc;
  end

endmodule
