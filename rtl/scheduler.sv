// scheduler: sequencing of the network.
//
// A run order starts the synapse initialisation; when it is done the
// network waits for a start-trial order. The behavioural phase then runs the
// neurons until a motor neuron fires. "Move" is an action in the
// environment: the neurons are cleared for one cycle and the phase goes on
// with the new sensory input. "Dig" ends the phase: the reward input is
// sampled, the neurons and spike ages are cleared, the plastic synapses are
// made eligible and Ctrl-Replay replays forward if rewarded, in reverse
// otherwise. When the replay is done the trial ends and the next start-trial
// order is awaited.
// This implementation adds two limits the design leaves open: a trial also
// ends, unrewarded, after MAX_ACTIONS actions or after ACTION_TIMEOUT ticks
// without an action; it is then replayed in reverse like an unrewarded dig.
//
// Interface: run, start_trial, reward, the motor spikes and the done pulses
// of init/replay in; phase and the control strobes out.
// Timing: the phase is registered and the control strobes are decoded from
// it (Moore). INIT lasts until init_done; MOVE and RSTART last one cycle;
// the reward is sampled in the cycle dig_spike is high. trial_done pulses
// for one cycle, with trial_rewarded and trial_timeout valid alongside.
module scheduler
  import snn_pkg::*;
#(
  parameter int unsigned MAX_ACTIONS    = 8,
  parameter int unsigned ACTION_TIMEOUT = 100
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   run,
  input  logic   start_trial,
  input  logic   reward,
  input  logic   dig_spike,
  input  logic   move_spike,
  input  logic   init_done,
  input  logic   replay_done,
  output phase_t phase,
  output logic   init_start,
  output logic   neuron_en,
  output logic   neuron_clr,
  output logic   age_clr,
  output logic   hist_clr,
  output logic   behav,
  output logic   sel_replay,
  output logic   eligible,
  output logic   replay_start,
  output logic   replay_fwd,
  output logic   trial_done,
  output logic   trial_rewarded,
  output logic   trial_timeout
);

  int unsigned step_cnt, act_cnt;
  logic        timeout_q;

  // Moore decodes of the phase.
  always_comb begin
    neuron_en  = (phase == PH_BEHAV) || (phase == PH_REPLAY);
    neuron_clr = (phase == PH_WAIT) || (phase == PH_MOVE) || (phase == PH_RSTART) ||
                 (phase == PH_IDLE) || (phase == PH_INIT);
    age_clr    = (phase == PH_RSTART);
    hist_clr   = (phase == PH_IDLE) || (phase == PH_INIT) || (phase == PH_WAIT);
    behav      = (phase == PH_BEHAV);
    sel_replay = (phase == PH_REPLAY) || (phase == PH_RSTART);
    eligible   = (phase == PH_REPLAY);
    replay_start = (phase == PH_RSTART);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase          <= PH_IDLE;
      init_start     <= 1'b0;
      replay_fwd     <= 1'b0;
      trial_done     <= 1'b0;
      trial_rewarded <= 1'b0;
      trial_timeout  <= 1'b0;
      timeout_q      <= 1'b0;
      step_cnt       <= 0;
      act_cnt        <= 0;
    end else begin
      init_start <= 1'b0;
      trial_done <= 1'b0;
      case (phase)
        PH_IDLE: if (run) begin
          init_start <= 1'b1;
          phase      <= PH_INIT;
        end
        PH_INIT: if (init_done) phase <= PH_WAIT;
        PH_WAIT: if (run) begin
          init_start <= 1'b1;
          phase      <= PH_INIT;
        end else if (start_trial) begin
          step_cnt <= 0;
          act_cnt  <= 0;
          phase    <= PH_BEHAV;
        end
        PH_BEHAV: begin
          step_cnt <= step_cnt + 1;
          if (dig_spike) begin
            replay_fwd <= reward;
            timeout_q  <= 1'b0;
            phase      <= PH_RSTART;
          end else if (move_spike) begin
            act_cnt  <= act_cnt + 1;
            step_cnt <= 0;
            if (act_cnt + 1 >= MAX_ACTIONS) begin
              replay_fwd <= 1'b0;
              timeout_q  <= 1'b1;
              phase      <= PH_RSTART;
            end else begin
              phase <= PH_MOVE;
            end
          end else if (step_cnt + 1 >= ACTION_TIMEOUT) begin
            replay_fwd <= 1'b0;
            timeout_q  <= 1'b1;
            phase      <= PH_RSTART;
          end
        end
        PH_MOVE:   phase <= PH_BEHAV;
        PH_RSTART: phase <= PH_REPLAY;
        PH_REPLAY: if (replay_done) begin
          trial_done     <= 1'b1;
          trial_rewarded <= replay_fwd;
          trial_timeout  <= timeout_q;
          phase          <= PH_WAIT;
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

endmodule
