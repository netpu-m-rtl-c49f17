// netpu_pkg: types and constants shared by the NetPU-M accelerator.
//
// The accelerator is configured entirely through its input data stream of
// 64-bit words. One 64-bit "layer setting" word describes a layer; its low 47
// bits are the packed struct layer_cfg_t below (in_len in bits 15:0, neurons
// in 31:16, out_prec 34:32, w_prec 37:35, in_prec 40:38, bn_fold 41, act 44:42,
// ltype 46:45). The fields are the ones the architecture lists for a layer
// (layer type, activation, BN folding, input/weight/output precision, neuron
// number, input length); their widths and positions are this design's choice.
//
// Precision codes are 3 bits: code p means p+1 bits, so 0 is binary (1 bit)
// and 7 is 8 bits. Internal values after the accumulator use a signed 37-bit
// fixed-point format with 5 fraction bits (32 integer bits), as the BN and
// activation units of the architecture specify.
package netpu_pkg;

  localparam int unsigned WORD_W     = 64;  // stream and buffer word
  localparam int unsigned LANES      = 8;   // multipliers per TNPU
  localparam int unsigned NUM_TNPU   = 8;   // TNPUs per LPU (one neuron batch)
  localparam int unsigned ACC_W      = 32;  // accumulator output
  localparam int unsigned PROD_W     = 16;  // one multiplier output
  localparam int unsigned FRAC       = 5;   // fraction bits of internal values
  localparam int unsigned VAL_W      = 37;  // BN / ACTIV / QUAN value width
  localparam int unsigned PRM_W      = 32;  // BN, threshold and QUAN parameters
  localparam int unsigned BIAS_W     = 8;   // accumulator bias
  localparam int unsigned MT_BITS    = 4;   // max. precision of Multi-Thresholds
  localparam int unsigned MT_NUM     = (1 << MT_BITS) - 1;  // thresholds per neuron
  localparam int unsigned Q_SCALE_FRAC = 16; // QUAN scale is Q16.16

  typedef enum logic [1:0] {
    LT_INPUT  = 2'd0,
    LT_HIDDEN = 2'd1,
    LT_OUTPUT = 2'd2
  } layer_type_e;

  typedef enum logic [2:0] {
    ACT_RELU    = 3'd0,
    ACT_SIGMOID = 3'd1,
    ACT_TANH    = 3'd2,
    ACT_SIGN    = 3'd3,
    ACT_MT      = 3'd4
  } act_e;

  typedef struct packed {
    layer_type_e ltype;
    act_e        act;
    logic        bn_fold;
    logic [2:0]  in_prec;
    logic [2:0]  w_prec;
    logic [2:0]  out_prec;
    logic [15:0] neurons;
    logic [15:0] in_len;
  } layer_cfg_t;

  localparam int unsigned CFG_W = $bits(layer_cfg_t);

  // Parameter categories, in the order a layer's parameters arrive in the
  // stream and are loaded into the TNPUs.
  typedef enum logic [2:0] {
    PRM_SIGN_THR = 3'd0,
    PRM_MT_THR   = 3'd1,
    PRM_BIAS     = 3'd2,
    PRM_BN_SCALE = 3'd3,
    PRM_BN_OFFS  = 3'd4,
    PRM_Q_SCALE  = 3'd5,
    PRM_Q_OFFS   = 3'd6
  } prm_e;

  localparam int unsigned NUM_PRM = 7;

  // Regular activations produce full-precision values that QUAN requantizes.
  function automatic logic act_regular(act_e a);
    return (a == ACT_RELU) || (a == ACT_SIGMOID) || (a == ACT_TANH);
  endfunction

  // Number of thresholds a Multi-Thresholds neuron needs for an output
  // precision code: 2^bits - 1.
  function automatic int unsigned mt_count(logic [2:0] out_prec);
    return (1 << (int'(out_prec) + 1)) - 1;
  endfunction

  // Whether a layer with this setting uses a parameter category.
  function automatic logic prm_used(layer_cfg_t c, prm_e p);
    unique case (p)
      PRM_SIGN_THR: return c.ltype != LT_OUTPUT && c.act == ACT_SIGN;
      PRM_MT_THR:   return c.ltype != LT_OUTPUT && c.act == ACT_MT;
      PRM_BIAS:     return c.ltype != LT_INPUT && c.bn_fold;
      PRM_BN_SCALE,
      PRM_BN_OFFS:  return c.ltype != LT_INPUT && !c.bn_fold;
      PRM_Q_SCALE,
      PRM_Q_OFFS:   return c.ltype != LT_OUTPUT && act_regular(c.act);
      default:      return 1'b0;
    endcase
  endfunction

  // Values of one category loaded into one TNPU.
  function automatic int unsigned prm_per_tnpu(layer_cfg_t c, prm_e p);
    return (p == PRM_MT_THR) ? mt_count(c.out_prec) : 1;
  endfunction

  // Values of one category packed in one buffer word: 8-bit biases in a
  // 64-bit word, 32-bit parameters in a 128-bit word.
  function automatic int unsigned prm_per_word(prm_e p);
    return (p == PRM_BIAS) ? 8 : 4;
  endfunction

  // Stream elements per 64-bit word for a precision code: binary data is
  // packed 64 per word, 2..8-bit data one per byte.
  function automatic int unsigned elems_per_word(logic [2:0] prec);
    return (prec == 3'd0) ? 64 : 8;
  endfunction

  // Batches of NT neurons a layer is split into. The input layer uses one
  // batch of parameters that every input word shares.
  function automatic int unsigned batches(layer_cfg_t c, int unsigned nt);
    if (c.ltype == LT_INPUT) return 1;
    return (int'(c.neurons) + nt - 1) / nt;
  endfunction

endpackage
