// ctrl_behav: neuron input voltages during the behavioural phase.
//
// The sensory triplet (context, item, position; one bit each) selects three
// of the six sensory neurons, which receive V_SENS; the hippocampal and
// motor neurons receive the pull-up / pull-down levels of their layer's WTA.
// Outside the behavioural phase every output is 0. The one-hot coding of
// the triplet (neuron 0/1 context A/B, 2/3 item X/Y, 4/5 position 1/2) and
// the drive level are this implementation's choices.
//
// Interface: behav (phase control from the scheduler), ctx/item/pos,
// v_hid/v_out from the WTAs in; v_beh[N_NEU] out. Timing: combinational.
module ctrl_behav
  import snn_pkg::*;
#(
  parameter fix_t P_V_SENS = V_SENS
) (
  input  logic behav,
  input  logic ctx,
  input  logic item,
  input  logic pos,
  input  fix_t v_hid [N_HID],
  input  fix_t v_out [N_OUT],
  output fix_t v_beh [N_NEU]
);

  logic [N_IN-1:0] sens;

  always_comb begin
    sens = {pos, !pos, item, !item, ctx, !ctx};
    for (int i = 0; i < N_IN; i++)
      v_beh[i] = (behav && sens[i]) ? P_V_SENS : '0;
    for (int i = 0; i < N_HID; i++)
      v_beh[HID_BASE + i] = behav ? v_hid[i] : '0;
    for (int i = 0; i < N_OUT; i++)
      v_beh[OUT_BASE + i] = behav ? v_out[i] : '0;
  end

endmodule
