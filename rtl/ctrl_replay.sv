// ctrl_replay: neuron input voltages during the replay phase.
//
// Replays the stored action sequences so that the plastic synapses see the
// spike order of the behavioural phase. Each sequence is replayed layer by
// layer: every neuron of the layer that was active gets V_REPLAY for one
// tick, which makes it fire, and the next layer follows GAP ticks later.
//   forward (rewarded):  oldest sequence first, sensory -> hippocampal -> motor
//   reverse (otherwise): latest sequence first, motor -> hippocampal -> sensory
// Forward replay puts every presynaptic spike GAP ticks before its
// postsynaptic spike (potentiation); reverse replay puts it after
// (depression). Between sequences SEQ_GAP ticks pass, longer than the STDP
// window, so that spikes of different sequences do not interact. GAP,
// SEQ_GAP and the drive level are this implementation's choices.
//
// Interface: start/fwd and the history in; v_rep[N_NEU], busy and a done
// pulse out. Timing: each valid sequence takes 2*GAP + 1 + SEQ_GAP cycles; done
// follows one cycle after the last wait.
module ctrl_replay
  import snn_pkg::*;
#(
  parameter int unsigned DEPTH   = 2,
  parameter int unsigned GAP     = 2,
  parameter int unsigned SEQ_GAP = 48,
  parameter fix_t        P_V_REPLAY = V_REPLAY
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             fwd,
  input  logic [N_NEU-1:0] seq [DEPTH],
  input  logic [DEPTH-1:0] seq_valid,
  output fix_t             v_rep [N_NEU],
  output logic             busy,
  output logic             done
);

  typedef enum logic [1:0] {R_IDLE, R_DRIVE, R_WAIT, R_SEQWAIT} rstate_t;

  rstate_t              st;
  logic                 fwd_q;
  logic [N_NEU-1:0]     seq_q [DEPTH];
  logic [DEPTH-1:0]     valid_q;
  int unsigned          s_idx;    // position in replay order
  logic [1:0]           layer;    // step within a sequence, 0..2
  int unsigned          cnt;

  int unsigned          e_idx;    // history entry being replayed (only its low bits index seq_q)
  logic [1:0]           lyr;      // layer being driven: 0 sens, 1 hid, 2 motor
  logic [N_NEU-1:0]     drive_mask;

  always_comb begin
    e_idx = fwd_q ? (DEPTH - 1 - s_idx) : s_idx;
    lyr   = fwd_q ? layer : (2'd2 - layer);
    drive_mask = '0;
    for (int i = 0; i < N_NEU; i++) begin
      if ((lyr == 2'd0 && i < HID_BASE) ||
          (lyr == 2'd1 && i >= HID_BASE && i < OUT_BASE) ||
          (lyr == 2'd2 && i >= OUT_BASE))
        drive_mask[i] = seq_q[e_idx][i];
    end
    for (int i = 0; i < N_NEU; i++)
      v_rep[i] = (st == R_DRIVE && valid_q[e_idx] && drive_mask[i]) ? P_V_REPLAY : '0;
  end

  assign busy = (st != R_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= R_IDLE;
      fwd_q   <= 1'b0;
      valid_q <= '0;
      s_idx   <= 0;
      layer   <= '0;
      cnt     <= 0;
      done    <= 1'b0;
      for (int d = 0; d < DEPTH; d++) seq_q[d] <= '0;
    end else begin
      done <= 1'b0;
      case (st)
        R_IDLE: begin
          if (start) begin
            fwd_q   <= fwd;
            seq_q   <= seq;
            valid_q <= seq_valid;
            s_idx   <= 0;
            layer   <= '0;
            st      <= R_DRIVE;
          end
        end
        R_DRIVE: begin
          if (!valid_q[e_idx]) begin
            // Nothing stored here: skip to the next sequence at once.
            if (s_idx == DEPTH - 1) begin
              st   <= R_IDLE;
              done <= 1'b1;
            end else begin
              s_idx <= s_idx + 1;
            end
          end else begin
            cnt <= 1;
            st  <= (layer == 2'd2) ? R_SEQWAIT : R_WAIT;
          end
        end
        R_WAIT: begin
          if (cnt >= GAP - 1) begin
            layer <= layer + 2'd1;
            st    <= R_DRIVE;
          end else begin
            cnt <= cnt + 1;
          end
        end
        R_SEQWAIT: begin
          if (cnt >= SEQ_GAP) begin
            layer <= '0;
            if (s_idx == DEPTH - 1) begin
              st   <= R_IDLE;
              done <= 1'b1;
            end else begin
              s_idx <= s_idx + 1;
              st    <= R_DRIVE;
            end
          end else begin
            cnt <= cnt + 1;
          end
        end
        default: st <= R_IDLE;
      endcase
    end
  end

endmodule
