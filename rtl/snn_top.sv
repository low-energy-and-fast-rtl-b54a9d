// snn_top: spiking neural network that learns a context-dependent task.
//
// Sensory neurons encode a triplet (context A/B, item X/Y, position 1/2);
// hippocampal and motor layers are winner-take-all layers; the motor layer
// chooses "dig" or "move". A dig ends the behavioural phase and, rewarded or
// not, the stored action sequences are replayed forward or in reverse so
// that STDP strengthens or weakens the synapses that led to the choice.
//
// Blocks: neurons_block (16 LIF neurons), synapses_block (64 plastic
// excitatory synapses), crossbar, activities_wta, peripheral_block
// (scheduler, init, history, behavioural and replay control).
//
// Interface: run initialises the weights; start_trial begins a trial with
// the triplet on ctx/item/pos. The environment answers a move pulse by
// presenting the other item, and holds reward valid whenever dig may fire
// (it is sampled in the cycle dig is high). trial_done pulses at the end of
// the replay. wt_addr/wt_data read any excitatory weight; spike and vm show
// the neurons. Timing: one network tick per clock cycle.
module snn_top
  import snn_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     run,
  input  logic                     start_trial,
  input  logic                     ctx,
  input  logic                     item,
  input  logic                     pos,
  input  logic                     reward,
  output phase_t                   phase,
  output logic                     init_done,
  output logic                     dig,
  output logic                     move,
  output logic                     trial_done,
  output logic                     trial_rewarded,
  output logic                     trial_timeout,
  output logic [N_NEU-1:0]         spike,
  output fix_t                     vm [N_NEU],
  output logic [N_HID-1:0]         win_hid,
  output logic [N_OUT-1:0]         win_out,
  output fix_t                     act_hid [N_HID],
  output fix_t                     act_out [N_OUT],
  output logic                     valid_hid,
  output logic                     valid_out,
  output logic                     hist_push,
  output logic                     replay_fwd,
  output logic                     replay_busy,
  input  logic [$clog2(N_EXC)-1:0] wt_addr,
  output fix_t                     wt_data
);

  localparam int unsigned N_LFSR = 4;

  fix_t             v_neu [N_NEU];
  logic             neuron_en, neuron_clr, age_clr, eligible;
  logic [AGE_W-1:0] age [N_NEU];
  fix_t             w_exc [N_EXC];

  logic                             wr_en;
  logic [$clog2(N_EXC/N_LFSR)-1:0]  wr_base;
  fix_t                             wr_data [N_LFSR];

  logic [N_EXC-1:0] syn_pre_spike, syn_post_spike;
  logic [AGE_W-1:0] syn_pre_age  [N_EXC];
  logic [AGE_W-1:0] syn_post_age [N_EXC];
  fix_t x_in [N_IN];
  fix_t x_hid [N_HID];
  fix_t x_out [N_OUT];
  fix_t w_hid [N_HID][N_IN];
  fix_t w_out [N_OUT][N_HID];
  fix_t v_hid [N_HID];
  fix_t v_out [N_OUT];

  neurons_block #(.N(N_NEU)) u_neurons (
    .clk, .rst_n, .clr (neuron_clr), .en (neuron_en), .age_clr,
    .v_in (v_neu), .vm, .spike, .age
  );

  synapses_block #(.N_SYN(N_EXC), .N_WR(N_LFSR)) u_synapses (
    .clk, .rst_n, .wr_en, .wr_base, .wr_data, .eligible,
    .pre_spike (syn_pre_spike), .post_spike (syn_post_spike),
    .pre_age (syn_pre_age), .post_age (syn_post_age),
    .w_exc, .rd_addr (wt_addr), .rd_data (wt_data)
  );

  crossbar u_crossbar (
    .vm, .spike, .age, .w_exc,
    .syn_pre_spike, .syn_post_spike, .syn_pre_age, .syn_post_age,
    .x_in, .x_hid, .x_out, .w_hid, .w_out
  );

  activities_wta u_act (
    .x_in, .x_hid, .x_out, .w_hid, .w_out,
    .act_hid, .act_out, .win_hid, .win_out, .v_hid, .v_out,
    .valid_hid, .valid_out
  );

  peripheral_block #(.N_LFSR(N_LFSR)) u_periph (
    .clk, .rst_n, .run, .start_trial, .reward, .ctx, .item, .pos,
    .spike, .v_hid, .v_out, .v_neu,
    .neuron_en, .neuron_clr, .age_clr, .eligible,
    .wr_en, .wr_base, .wr_data,
    .phase, .init_done, .dig, .move, .hist_push,
    .trial_done, .trial_rewarded, .trial_timeout, .replay_fwd, .replay_busy
  );

endmodule
