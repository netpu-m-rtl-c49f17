// tnpu_activ: activation stage (ACTIV) of a TNPU.
//
// Input and output are 37-bit signed fixed-point values with 5 fraction bits.
// The activation is selected at run time:
//  * ReLU:     max(x, 0).
//  * Sigmoid:  piecewise-linear approximation, for |x| >= 5 -> 1,
//              2.375 <= |x| < 5 -> |x|/32 + 0.84375, 1 <= |x| < 2.375 ->
//              |x|/8 + 0.625, |x| < 1 -> |x|/4 + 0.5, and 1 - f(|x|) for
//              negative x. The shifts act on the 5-fraction-bit value, so
//              the result is a multiple of 1/32.
//  * tanh:     2 * Sigmoid(2x) - 1, sharing the Sigmoid.
//  * Sign:     1 if x >= threshold, else 0 (the threshold folds BN).
//  * Multi-Thresholds: the number of thresholds thr[i], i < 2^n - 1 for an
//              n-bit output, that are smaller than x (thr[i] < x); at most
//              4-bit outputs, so 15 thresholds.
// Thresholds are 32-bit signed with 5 fraction bits. Sign and
// Multi-Thresholds outputs are plain integers (no fraction bits).
// Combinational. The functions, breakpoints and port widths follow the
// architecture (Sign: 1 when x reaches the threshold; Multi-Thresholds:
// count of thresholds below x); the threshold format is this design's
// choice.
module tnpu_activ
  import netpu_pkg::*;
(
  input  logic signed [VAL_W-1:0]  x,
  input  act_e                     act,
  input  logic [2:0]               out_prec,
  input  logic signed [PRM_W-1:0]  sign_thr,
  input  logic signed [PRM_W-1:0]  mt_thr [MT_NUM],
  output logic signed [VAL_W-1:0]  y
);

  // Piecewise-linear sigmoid on a value with 5 fraction bits; result in 0..32.
  function automatic logic [5:0] sigmoid_pwl(logic signed [VAL_W:0] v);
    logic [VAL_W:0] a;
    logic [5:0]     f;
    a = v[VAL_W] ? unsigned'(-v) : unsigned'(v);
    if (a >= 160)     f = 6'd32;
    else if (a >= 76) f = 6'(a >> 5) + 6'd27;
    else if (a >= 32) f = 6'(a >> 3) + 6'd20;
    else              f = 6'(a >> 2) + 6'd16;
    return v[VAL_W] ? 6'd32 - f : f;
  endfunction

  logic signed [VAL_W:0] x2;
  logic [5:0]            sig_x, sig_2x;
  logic [4:0]            mt_cnt;
  int unsigned           n_thr;

  assign x2     = {x, 1'b0};
  assign sig_x  = sigmoid_pwl({x[VAL_W-1], x});
  assign sig_2x = sigmoid_pwl(x2);

  always_comb begin
    n_thr = mt_count(out_prec);
    if (n_thr > MT_NUM) n_thr = MT_NUM;
    mt_cnt = '0;
    for (int i = 0; i < MT_NUM; i++)
      if (i < n_thr && x > VAL_W'(mt_thr[i])) mt_cnt = mt_cnt + 5'd1;
  end

  always_comb begin
    unique case (act)
      ACT_RELU:    y = x[VAL_W-1] ? '0 : x;
      ACT_SIGMOID: y = VAL_W'(sig_x);
      ACT_TANH:    y = VAL_W'(signed'({1'b0, sig_2x, 1'b0})) - VAL_W'(32);
      ACT_SIGN:    y = (x >= VAL_W'(sign_thr)) ? VAL_W'(1) : '0;
      ACT_MT:      y = VAL_W'(mt_cnt);
      default:     y = '0;
    endcase
  end

endmodule
