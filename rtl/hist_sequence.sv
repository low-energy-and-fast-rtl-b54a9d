// hist_sequence: history of the latest action sequences.
//
// During the behavioural phase it records which neurons were active (fired
// at least once) since the last action. When a motor neuron fires, that
// activity mask, including the motor spike, is pushed as one action sequence
// into a DEPTH-entry history (entry 0 the latest) and recording restarts.
// Ctrl-Replay reads the history in the replay phase. Recording per action
// and clearing the history at the start of each trial are this
// implementation's choices (clr is held while the network waits for a
// trial).
//
// Interface: clr empties everything; rec_en enables recording; spike is the
// neuron spike vector; seq/seq_valid is the history; push shows a store.
// Timing: a sequence is visible in the cycle after the motor spike.
module hist_sequence
  import snn_pkg::*;
#(
  parameter int unsigned N     = N_NEU,
  parameter int unsigned DEPTH = 2,
  parameter int unsigned OUT_LO = OUT_BASE
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             rec_en,
  input  logic [N-1:0]     spike,
  output logic [N-1:0]     seq [DEPTH],
  output logic [DEPTH-1:0] seq_valid,
  output logic             push
);

  logic [N-1:0] cur;

  assign push = rec_en && (|spike[N-1:OUT_LO]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur       <= '0;
      seq_valid <= '0;
      for (int d = 0; d < DEPTH; d++) seq[d] <= '0;
    end else if (clr) begin
      cur       <= '0;
      seq_valid <= '0;
      for (int d = 0; d < DEPTH; d++) seq[d] <= '0;
    end else if (push) begin
      cur    <= '0;
      seq[0] <= cur | spike;
      for (int d = 1; d < DEPTH; d++) seq[d] <= seq[d-1];
      seq_valid <= {seq_valid[DEPTH-2:0], 1'b1};
    end else if (rec_en) begin
      cur <= cur | spike;
    end
  end

endmodule
