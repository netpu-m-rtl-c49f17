// lpu_buffer_cluster: data buffer cluster of a Layer Processing Unit.
//
// Holds the FIFOs an LPU loads a layer through (sizes are the defaults):
//   layer input    64 bit x 1024   input reload   64 bit x 1024
//   layer weight   64 bit x 1024   bias           64 bit x 1024
//   BN scale      128 bit x 2048   BN offset     128 bit x 2048
//   sign threshold 128 bit x 2048  multi-thresholds 128 bit x 2048
//   QUAN scale    128 bit x 2048   QUAN offset   128 bit x 2048
// The stream that fills the parameter buffers is 64 bits wide: for the
// 128-bit buffers two consecutive stream words form one buffer word, the
// first in the low half. prm_sel chooses the buffer a parameter word goes
// to; the selected buffer must receive an even number of words.
// All FIFOs are first-word-fall-through (see sync_fifo); clr empties all of
// them and the half-word register.
// Buffer names, widths and depths follow the architecture's buffer table;
// the 64-to-128-bit packing is this design's choice.
module lpu_buffer_cluster
  import netpu_pkg::*;
#(
  parameter int unsigned DATA_DEPTH = 1024,   // input, reload, weight, bias
  parameter int unsigned PRM_DEPTH  = 2048    // 128-bit parameter buffers
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  // layer input buffer
  input  logic                 in_push,
  input  logic [WORD_W-1:0]    in_din,
  output logic                 in_full,
  input  logic                 in_pop,
  output logic [WORD_W-1:0]    in_dout,
  output logic                 in_empty,
  // input reload buffer
  input  logic                 rl_push,
  input  logic [WORD_W-1:0]    rl_din,
  output logic                 rl_full,
  input  logic                 rl_pop,
  output logic [WORD_W-1:0]    rl_dout,
  output logic                 rl_empty,
  // layer weight buffer
  input  logic                 wt_push,
  input  logic [WORD_W-1:0]    wt_din,
  output logic                 wt_full,
  input  logic                 wt_pop,
  output logic [WORD_W-1:0]    wt_dout,
  output logic                 wt_empty,
  // parameter buffers, written through a 64-bit port
  input  logic                 prm_push,
  input  prm_e                 prm_sel,
  input  logic [WORD_W-1:0]    prm_din,
  output logic                 prm_full,
  input  logic [NUM_PRM-1:0]   prm_pop,
  output logic [2*WORD_W-1:0]  prm_dout  [NUM_PRM],
  output logic [NUM_PRM-1:0]   prm_empty
);

  logic [$clog2(DATA_DEPTH):0] in_cnt, rl_cnt, wt_cnt;

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(DATA_DEPTH)) u_in (
    .clk, .rst_n, .clr, .push(in_push), .din(in_din), .pop(in_pop),
    .dout(in_dout), .empty(in_empty), .full(in_full), .count(in_cnt)
  );

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(DATA_DEPTH)) u_reload (
    .clk, .rst_n, .clr, .push(rl_push), .din(rl_din), .pop(rl_pop),
    .dout(rl_dout), .empty(rl_empty), .full(rl_full), .count(rl_cnt)
  );

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(DATA_DEPTH)) u_wt (
    .clk, .rst_n, .clr, .push(wt_push), .din(wt_din), .pop(wt_pop),
    .dout(wt_dout), .empty(wt_empty), .full(wt_full), .count(wt_cnt)
  );

  // 64 -> 128 bit packing for the wide parameter buffers
  logic              half;
  logic [WORD_W-1:0] low;
  logic [NUM_PRM-1:0] pfull;
  logic [NUM_PRM-1:0] ppush;

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      half <= 1'b0;
      low  <= '0;
    end else if (prm_push && !prm_full && prm_sel != PRM_BIAS) begin
      half <= !half;
      if (!half) low <= prm_din;
    end
  end

  always_comb begin
    for (int p = 0; p < NUM_PRM; p++)
      ppush[p] = prm_push && !prm_full && (prm_sel == prm_e'(p)) &&
                 ((prm_e'(p) == PRM_BIAS) || half);
  end

  assign prm_full = pfull[prm_sel];

  for (genvar p = 0; p < NUM_PRM; p++) begin : g_prm
    if (p == int'(PRM_BIAS)) begin : g_bias
      logic [$clog2(DATA_DEPTH):0] cnt;
      logic [WORD_W-1:0]           d;
      sync_fifo #(.WIDTH(WORD_W), .DEPTH(DATA_DEPTH)) u_f (
        .clk, .rst_n, .clr, .push(ppush[p]), .din(prm_din), .pop(prm_pop[p]),
        .dout(d), .empty(prm_empty[p]), .full(pfull[p]), .count(cnt)
      );
      assign prm_dout[p] = {{WORD_W{1'b0}}, d};
    end else begin : g_wide
      logic [$clog2(PRM_DEPTH):0] cnt;
      sync_fifo #(.WIDTH(2*WORD_W), .DEPTH(PRM_DEPTH)) u_f (
        .clk, .rst_n, .clr, .push(ppush[p]), .din({prm_din, low}), .pop(prm_pop[p]),
        .dout(prm_dout[p]), .empty(prm_empty[p]), .full(pfull[p]), .count(cnt)
      );
    end
  end

endmodule
