// tnpu_quan: quantization stage (QUAN) of a TNPU.
//
// Requantizes a full-precision value (37 bits, 5 fraction bits) to the n-bit
// unsigned input of the next layer:
//     q = clamp(round(x * scale + offset), 0, 2^n - 1)
// with scale a signed Q16.16 number and offset a signed number with 5
// fraction bits; rounding is half up. n is out_prec + 1. Combinational.
// The ports (value, output precision, 32-bit scale and offset) follow the
// architecture; the formula and number formats are this design's choices.
module tnpu_quan
  import netpu_pkg::*;
(
  input  logic signed [VAL_W-1:0]  x,
  input  logic [2:0]               out_prec,
  input  logic signed [PRM_W-1:0]  scale,
  input  logic signed [PRM_W-1:0]  offset,
  output logic [7:0]               q
);

  localparam int unsigned SH = FRAC + Q_SCALE_FRAC;

  logic signed [79:0] prod;
  logic signed [79:0] r;
  logic signed [79:0] qmax;

  always_comb begin
    prod = 80'(x) * 80'(scale);
    r    = (prod + (80'(offset) <<< Q_SCALE_FRAC) + (80'sd1 <<< (SH - 1))) >>> SH;
    qmax = (80'sd1 <<< (int'(out_prec) + 1)) - 80'sd1;
    if (r < 0)          q = '0;
    else if (r > qmax)  q = qmax[7:0];
    else                q = r[7:0];
  end

endmodule
