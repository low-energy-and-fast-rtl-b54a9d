// exc_synapse: excitatory plastic synapse with LUT-based STDP.
//
// Holds one weight in [0, 1] (Q16.16). When eligible (replay phase) and the
// postsynaptic neuron spikes while the presynaptic one fired dt ticks ago
// (dt < 40), the weight grows by the table entry for +dt; when the
// presynaptic neuron spikes and the postsynaptic one fired dt ticks ago, the
// weight falls by the entry for -dt. The table level is floor(10 * w),
// capped at 9. Skipping the update when both spike together, and clamping
// the weight to [0, 1], are this implementation's choices.
//
// Interface: we/wdata load a weight (initialisation); pre_/post_spike and
// pre_/post_age come from the neurons through the crossbar; w is the weight.
// Timing: one update per cycle, visible the next cycle.
module exc_synapse
  import snn_pkg::*;
#(
  parameter fix_t P_W_MAX = FIX_ONE
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  fix_t             wdata,
  input  logic             eligible,
  input  logic             pre_spike,
  input  logic             post_spike,
  input  logic [AGE_W-1:0] pre_age,
  input  logic [AGE_W-1:0] post_age,
  output fix_t             w
);

  logic [3:0]  bin, level;
  logic        upd;
  fix_t        dw;
  logic [35:0] w10;
  logic signed [DATA_W:0] w_sum;

  always_comb begin
    w10   = 36'(unsigned'(w)) * 36'd10;
    level = (w10[35:FRAC_W] > 20'd9) ? 4'd9 : w10[FRAC_W+3:FRAC_W];
    upd   = 1'b0;
    bin   = 4'd0;
    if (eligible && post_spike && !pre_spike && int'(pre_age) < STDP_WINDOW) begin
      upd = 1'b1;
      bin = 4'(int'(pre_age) / BIN_TICKS);
    end else if (eligible && pre_spike && !post_spike && int'(post_age) < STDP_WINDOW) begin
      upd = 1'b1;
      bin = 4'(LUT_HALF + int'(post_age) / BIN_TICKS);
    end
    w_sum = {w[DATA_W-1], w} + {dw[DATA_W-1], dw};
  end

  stdp_lut u_lut (.bin(bin), .level(level), .dw(dw));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) w <= '0;
    else if (we) w <= wdata;
    else if (upd) begin
      if (w_sum < 0) w <= '0;
      else if (w_sum > signed'({P_W_MAX[DATA_W-1], P_W_MAX})) w <= P_W_MAX;
      else w <= w_sum[DATA_W-1:0];
    end
  end

endmodule
