// tnpu_mul: multiplier stage (MUL) of a TNPU.
//
// Eight lanes, each holding one 8-bit activation byte and one 8-bit weight
// byte of the 64-bit input and weight words. The input and weight precision
// codes select the mode at run time:
//  * binary (both codes 0): each byte carries eight 1-bit channels. A lane
//    XNORs its activation and weight bytes and counts the ones; with bit '1'
//    standing for +1 and '0' for -1 the lane's sum of products is
//    ones - (channels - ones) = 2*ones - channels.
//  * 2..8 bits: each byte carries one element. The activation is taken as
//    unsigned and the weight as two's complement, each cut to its precision;
//    unused upper bits are ignored. A 1-bit weight (code 0) with wider
//    activations is bipolar like in binary mode: '1' is +1 and '0' is -1.
// nvalid is the number of valid elements in the word (binary: channels 0..63,
// otherwise lanes 0..7); invalid elements contribute nothing. This masking of
// a layer's last, partly filled word is this design's addition.
// Purely combinational: prod is valid in the same cycle as the inputs.
// The lane structure, XNOR/popcount and precision ports follow the
// architecture; the signedness of activations and weights and the bipolar
// 1-bit weights are this design's choice.
module tnpu_mul
  import netpu_pkg::*;
(
  input  logic [LANES*8-1:0]            x,        // MUL inputs
  input  logic [LANES*8-1:0]            w,        // MUL weights
  input  logic [2:0]                    in_prec,  // input precision code
  input  logic [2:0]                    w_prec,   // weight precision code
  input  logic [6:0]                    nvalid,   // valid elements in the word
  output logic signed [PROD_W-1:0]      prod [LANES]
);

  logic binary;
  assign binary = (in_prec == 3'd0);

  always_comb begin
    for (int j = 0; j < LANES; j++) begin
      logic [7:0]  xb, wb, xn, mask_b;
      logic [7:0]  xu, wm;
      logic signed [8:0]  xs;
      logic signed [8:0]  ws;
      logic [3:0]  ones, chans;
      xb = x[j*8 +: 8];
      wb = w[j*8 +: 8];
      // binary lane
      for (int c = 0; c < 8; c++) mask_b[c] = (j*8 + c) < int'(nvalid);
      xn    = ~(xb ^ wb) & mask_b;
      ones  = '0;
      chans = '0;
      for (int c = 0; c < 8; c++) begin
        ones  = ones  + 4'(xn[c]);
        chans = chans + 4'(mask_b[c]);
      end
      // integer lane
      xu = xb & 8'((9'd1 << (int'(in_prec) + 1)) - 9'd1);
      wm = wb & 8'((9'd1 << (int'(w_prec) + 1)) - 9'd1);
      xs = signed'({1'b0, xu});
      ws = '0;
      for (int b = 0; b < 8; b++)
        ws[b] = (b <= int'(w_prec)) ? wm[b] : wm[w_prec];
      ws[8] = wm[w_prec];
      if (w_prec == 3'd0) ws = wm[0] ? 9'sd1 : -9'sd1;
      if (binary)
        prod[j] = PROD_W'(signed'({1'b0, ones, 1'b0}) - signed'({2'b0, chans}));
      else if (j < int'(nvalid))
        prod[j] = PROD_W'(xs * ws);
      else
        prod[j] = '0;
    end
  end

endmodule
