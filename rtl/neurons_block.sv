// neurons_block: the column of LIF neurons and their spike-age counters.
//
// Holds N lif_neuron instances (16 in the context-dependent network: 6
// sensory, 8 hippocampal, 2 motor). Beside each neuron sits an AGE_W-bit
// counter of ticks since its last spike, which the plastic synapses use as
// the pre- and postsynaptic spike timing for STDP; keeping one counter per
// neuron rather than per synapse is this implementation's choice.
//
// Interface: v_in[i] drives neuron i; clr clears all membranes; en advances
// one tick; age_clr sets every age to AGE_MAX ("no recent spike").
// Timing: a spike is high for the one cycle after the crossing tick; the age
// is 1 in the next cycle and grows by one per enabled tick, saturating at
// AGE_MAX. A spike seen G ticks after another therefore sees age G.
module neurons_block
  import snn_pkg::*;
#(
  parameter int unsigned N = N_NEU
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  input  logic             age_clr,
  input  fix_t             v_in  [N],
  output fix_t             vm    [N],
  output logic [N-1:0]     spike,
  output logic [AGE_W-1:0] age   [N]
);

  for (genvar i = 0; i < N; i++) begin : g_neu
    lif_neuron u_lif (
      .clk   (clk),
      .rst_n (rst_n),
      .clr   (clr),
      .en    (en),
      .v_in  (v_in[i]),
      .vm    (vm[i]),
      .spike (spike[i])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                        age[i] <= AGE_MAX;
      else if (age_clr)                  age[i] <= AGE_MAX;
      else if (spike[i])                 age[i] <= AGE_W'(1);
      else if (en && age[i] != AGE_MAX)  age[i] <= age[i] + AGE_W'(1);
    end
  end

endmodule
