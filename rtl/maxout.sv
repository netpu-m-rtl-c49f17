// maxout: arg-max unit of an output layer.
//
// Receives the output-layer neuron results one per cycle (in_valid, in_val
// with its neuron index in_idx) and keeps the largest value and its index.
// A value replaces the kept one only when strictly larger, so the first of
// equal maxima wins. clr starts a new search; the kept value is then the
// most negative number. max_val / max_idx are registered and reflect every
// value accepted up to the previous clock edge.
// The arg-max function follows the architecture (MaxOut selects the class);
// the serial one-value-per-cycle structure is this design's choice.
module maxout
  import netpu_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     in_valid,
  input  logic signed [VAL_W-1:0]  in_val,
  input  logic [15:0]              in_idx,
  output logic signed [VAL_W-1:0]  max_val,
  output logic [15:0]              max_idx
);

  localparam logic signed [VAL_W-1:0] MOST_NEG = {1'b1, {(VAL_W-1){1'b0}}};

  logic seen;

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      max_val <= MOST_NEG;
      max_idx <= '0;
      seen    <= 1'b0;
    end else if (in_valid && (!seen || in_val > max_val)) begin
      max_val <= in_val;
      max_idx <= in_idx;
      seen    <= 1'b1;
    end
  end

endmodule
