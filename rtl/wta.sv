// wta: winner-take-all of one layer.
//
// A comparator finds the neuron with the highest activity; the output
// assignment then pulls that neuron's input up to V_UP and pulls every other
// neuron's input down to V_DOWN. A winner is only declared when its activity
// is above zero, and ties go to the lowest index; both are this
// implementation's choices, as are the two drive levels.
//
// Interface: act[N] in; winner (one-hot, all zero if none), valid and the
// drive levels v_drive[N] out. Timing: combinational.
module wta
  import snn_pkg::*;
#(
  parameter int unsigned N     = N_HID,
  parameter fix_t        P_UP  = V_UP,
  parameter fix_t        P_DOWN = V_DOWN
) (
  input  fix_t         act     [N],
  output logic [N-1:0] winner,
  output logic         valid,
  output fix_t         v_drive [N]
);

  fix_t best;
  int   best_idx;

  // Comparator.
  always_comb begin
    best     = act[0];
    best_idx = 0;
    for (int i = 1; i < N; i++) begin
      if (act[i] > best) begin
        best     = act[i];
        best_idx = i;
      end
    end
    valid = (best > 0);
  end

  // Output assignment: pull up the maximum, pull down the others.
  always_comb begin
    for (int i = 0; i < N; i++) begin
      winner[i]  = valid && (i == best_idx);
      v_drive[i] = winner[i] ? P_UP : P_DOWN;
    end
  end

endmodule
