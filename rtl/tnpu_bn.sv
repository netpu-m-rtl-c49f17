// tnpu_bn: batch normalization stage (BN) of a TNPU.
//
// Computes y = x * scale + offset, where x is the 32-bit integer accumulator
// value and scale and offset are 32-bit signed fixed-point numbers with 5
// fraction bits. The result is a 37-bit value with 32 integer and 5 fraction
// bits, saturated at its range. Combinational.
// Port widths and the output format follow the architecture; the 5 fraction
// bits of scale and offset and the saturation are this design's choices.
module tnpu_bn
  import netpu_pkg::*;
(
  input  logic signed [ACC_W-1:0]  x,
  input  logic signed [PRM_W-1:0]  scale,
  input  logic signed [PRM_W-1:0]  offset,
  output logic signed [VAL_W-1:0]  y
);

  localparam logic signed [63:0] VMAX = (64'sd1 <<< (VAL_W - 1)) - 64'sd1;
  localparam logic signed [63:0] VMIN = -(64'sd1 <<< (VAL_W - 1));

  logic signed [63:0] full;

  always_comb begin
    full = 64'(x) * 64'(scale) + 64'(offset);
    if (full > VMAX)      y = VMAX[VAL_W-1:0];
    else if (full < VMIN) y = VMIN[VAL_W-1:0];
    else                  y = full[VAL_W-1:0];
  end

endmodule
