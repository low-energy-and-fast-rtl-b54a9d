// synapses_block: the network's excitatory plastic synapses.
//
// Holds N_SYN exc_synapse instances (64: 6x8 sensory->hippocampal and 8x2
// hippocampal->motor). The 58 inhibitory synapses of the design are static
// with weight 1, so they hold no state and need no multiplier: they are
// realised as the subtraction of lateral terms in activity_unit.
//
// Interface: a group write port loads N_WR consecutive weights per cycle
// (wr_base is the group number; used by init_synapses with one LFSR per
// lane); eligible enables STDP; per-synapse spike and age inputs come from
// the crossbar; w_exc is every weight; rd_addr/rd_data is a readout port.
// Timing: writes and updates take effect the next cycle; rd_data is
// combinational.
module synapses_block
  import snn_pkg::*;
#(
  parameter int unsigned N_SYN = N_EXC,
  parameter int unsigned N_WR  = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         wr_en,
  input  logic [$clog2(N_SYN/N_WR)-1:0] wr_base,
  input  fix_t                         wr_data [N_WR],
  input  logic                         eligible,
  input  logic [N_SYN-1:0]             pre_spike,
  input  logic [N_SYN-1:0]             post_spike,
  input  logic [AGE_W-1:0]             pre_age  [N_SYN],
  input  logic [AGE_W-1:0]             post_age [N_SYN],
  output fix_t                         w_exc    [N_SYN],
  input  logic [$clog2(N_SYN)-1:0]     rd_addr,
  output fix_t                         rd_data
);

  for (genvar k = 0; k < N_SYN; k++) begin : g_syn
    logic we_k;
    assign we_k = wr_en && (int'(wr_base) == k / N_WR);
    exc_synapse u_syn (
      .clk        (clk),
      .rst_n      (rst_n),
      .we         (we_k),
      .wdata      (wr_data[k % N_WR]),
      .eligible   (eligible),
      .pre_spike  (pre_spike[k]),
      .post_spike (post_spike[k]),
      .pre_age    (pre_age[k]),
      .post_age   (post_age[k]),
      .w          (w_exc[k])
    );
  end

  assign rd_data = w_exc[rd_addr];

endmodule
