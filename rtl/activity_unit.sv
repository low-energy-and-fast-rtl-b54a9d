// activity_unit: cell activity of one postsynaptic neuron (block "A").
//
// Computes
//   A_j = sum_i (V_i - V_reset) * W_ij(exc)  -  sum_{i != j} (V_i - V_reset) * W_inh
// over the N_PRE neurons of the previous layer and the N_LAT neurons of the
// own layer. The excitatory terms use one multiplier each; the inhibitory
// weight W_INH is the constant 1, so the lateral product reduces to the term
// itself and costs no multiplier.
// Products are taken back to Q16.16 by an arithmetic shift, the sums are
// kept at 64 bits and the result saturated to 32 bits (this
// implementation's choice of rounding and overflow handling).
//
// Interface: x_pre and w are the presynaptic terms and weights, x_lat the
// own layer's terms; SELF is the own position in x_lat. Timing: combinational.
module activity_unit
  import snn_pkg::*;
#(
  parameter int unsigned N_PRE = N_IN,
  parameter int unsigned N_LAT = N_HID,
  parameter int unsigned SELF  = 0
) (
  input  fix_t x_pre [N_PRE],
  input  fix_t w     [N_PRE],
  input  fix_t x_lat [N_LAT],
  output fix_t act
);

  longint exc_sum, inh_sum;

  always_comb begin
    exc_sum = 0;
    for (int i = 0; i < N_PRE; i++)
      exc_sum += (longint'(x_pre[i]) * longint'(w[i])) >>> FRAC_W;
    inh_sum = 0;
    for (int i = 0; i < N_LAT; i++)
      if (i != SELF) inh_sum += (longint'(x_lat[i]) * longint'(W_INH)) >>> FRAC_W;
    act = sat32(exc_sum - inh_sum);
  end

endmodule
