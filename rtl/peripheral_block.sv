// peripheral_block: the control side of the network.
//
// Groups the Scheduler, Init-Synapses, Hist-Sequence, Ctrl-Behav and
// Ctrl-Replay units and the multiplexer that selects the neurons' input
// voltages: Ctrl-Behav's in the behavioural phase, Ctrl-Replay's in the
// replay phase (selected by the scheduler).
//
// Interface: the external orders (run, start_trial), the environment's
// sensory triplet and reward, the neuron spikes and the WTA drive levels
// in; the neuron inputs and controls, the synapse write port and
// eligibility, and the trial status out. dig/move are the motor spikes of
// the behavioural phase, i.e. the actions taken.
// Timing: as scheduler and ctrl_replay; the multiplexer is combinational.
module peripheral_block
  import snn_pkg::*;
#(
  parameter int unsigned N_LFSR         = 4,
  parameter int unsigned HIST_DEPTH     = 2,
  parameter int unsigned REPLAY_GAP     = 2,
  parameter int unsigned REPLAY_SEQ_GAP = 48,
  parameter int unsigned MAX_ACTIONS    = 8,
  parameter int unsigned ACTION_TIMEOUT = 100
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              run,
  input  logic                              start_trial,
  input  logic                              reward,
  input  logic                              ctx,
  input  logic                              item,
  input  logic                              pos,
  input  logic [N_NEU-1:0]                  spike,
  input  fix_t                              v_hid [N_HID],
  input  fix_t                              v_out [N_OUT],
  output fix_t                              v_neu [N_NEU],
  output logic                              neuron_en,
  output logic                              neuron_clr,
  output logic                              age_clr,
  output logic                              eligible,
  output logic                              wr_en,
  output logic [$clog2(N_EXC/N_LFSR)-1:0]   wr_base,
  output fix_t                              wr_data [N_LFSR],
  output phase_t                            phase,
  output logic                              init_done,
  output logic                              dig,
  output logic                              move,
  output logic                              hist_push,
  output logic                              trial_done,
  output logic                              trial_rewarded,
  output logic                              trial_timeout,
  output logic                              replay_fwd,
  output logic                              replay_busy
);

  logic init_start, hist_clr, behav, sel_replay, replay_start;
  logic replay_done;
  logic [N_NEU-1:0]      seq [HIST_DEPTH];
  logic [HIST_DEPTH-1:0] seq_valid;
  fix_t v_beh [N_NEU];
  fix_t v_rep [N_NEU];

  assign dig  = behav && spike[DIG_IDX];
  assign move = behav && spike[MOVE_IDX];

  scheduler #(.MAX_ACTIONS(MAX_ACTIONS), .ACTION_TIMEOUT(ACTION_TIMEOUT)) u_sched (
    .clk, .rst_n, .run, .start_trial, .reward,
    .dig_spike (dig), .move_spike (move),
    .init_done, .replay_done,
    .phase, .init_start, .neuron_en, .neuron_clr, .age_clr, .hist_clr,
    .behav, .sel_replay, .eligible, .replay_start, .replay_fwd,
    .trial_done, .trial_rewarded, .trial_timeout
  );

  init_synapses #(.N_SYN(N_EXC), .N_LFSR(N_LFSR)) u_init (
    .clk, .rst_n, .start (init_start), .wr_en, .wr_base, .wr_data, .done (init_done)
  );

  hist_sequence #(.N(N_NEU), .DEPTH(HIST_DEPTH)) u_hist (
    .clk, .rst_n, .clr (hist_clr), .rec_en (behav), .spike,
    .seq, .seq_valid, .push (hist_push)
  );

  ctrl_behav u_behav (
    .behav, .ctx, .item, .pos, .v_hid, .v_out, .v_beh
  );

  ctrl_replay #(.DEPTH(HIST_DEPTH), .GAP(REPLAY_GAP), .SEQ_GAP(REPLAY_SEQ_GAP)) u_replay (
    .clk, .rst_n, .start (replay_start), .fwd (replay_fwd),
    .seq, .seq_valid, .v_rep, .busy (replay_busy), .done (replay_done)
  );

  // Input multiplexer of the neurons.
  always_comb begin
    for (int i = 0; i < N_NEU; i++) v_neu[i] = sel_replay ? v_rep[i] : v_beh[i];
  end

endmodule
