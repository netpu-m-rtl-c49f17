// tnpu_accu: accumulator stage (ACCU) of a TNPU.
//
// Adds the eight multiplier outputs of a word to a 32-bit running sum. On the
// first word of a neuron (first = 1) the sum restarts from the 8-bit signed
// bias when bias_en is set (BN folding mode) and from zero otherwise.
// Timing: the sum of the words accepted up to cycle n (en = 1) is on acc in
// cycle n+1. Reset clears the sum.
// The 16-bit product inputs, 8-bit bias and 32-bit output follow the
// architecture; adding the bias at the first word is this design's choice.
module tnpu_accu
  import netpu_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          en,
  input  logic                          first,
  input  logic signed [PROD_W-1:0]      prod [LANES],
  input  logic signed [BIAS_W-1:0]      bias,
  input  logic                          bias_en,
  output logic signed [ACC_W-1:0]       acc
);

  logic signed [ACC_W-1:0] sum;
  logic signed [ACC_W-1:0] base;

  always_comb begin
    sum = '0;
    for (int j = 0; j < LANES; j++) sum = sum + ACC_W'(prod[j]);
    if (first) base = bias_en ? ACC_W'(bias) : '0;
    else       base = acc;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= base + sum;
  end

endmodule
