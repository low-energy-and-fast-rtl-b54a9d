// crossbar: the connection map between neurons, synapses and activity units.
//
// Every connection of the network is defined here. Towards the synapses it
// routes each neuron's spike and spike age to the synapses where that neuron
// is pre- or postsynaptic (snn_pkg::exc_pre / exc_post). Towards the
// activity units it forms the presynaptic terms x_i = V_i - V_reset of every
// layer and arranges the 64 excitatory weights as one weight row per
// postsynaptic neuron. The inhibitory connections (all to all within a
// layer, no self-inhibition) are the lateral terms x_hid and x_out.
//
// Interface: neuron state in, synapse timing and layer vectors out.
// Timing: purely combinational.
module crossbar
  import snn_pkg::*;
(
  input  fix_t             vm       [N_NEU],
  input  logic [N_NEU-1:0] spike,
  input  logic [AGE_W-1:0] age      [N_NEU],
  input  fix_t             w_exc    [N_EXC],
  output logic [N_EXC-1:0] syn_pre_spike,
  output logic [N_EXC-1:0] syn_post_spike,
  output logic [AGE_W-1:0] syn_pre_age  [N_EXC],
  output logic [AGE_W-1:0] syn_post_age [N_EXC],
  output fix_t             x_in  [N_IN],
  output fix_t             x_hid [N_HID],
  output fix_t             x_out [N_OUT],
  output fix_t             w_hid [N_HID][N_IN],
  output fix_t             w_out [N_OUT][N_HID]
);

  for (genvar k = 0; k < N_EXC; k++) begin : g_syn
    localparam int PRE  = exc_pre(k);
    localparam int POST = exc_post(k);
    assign syn_pre_spike[k]  = spike[PRE];
    assign syn_post_spike[k] = spike[POST];
    assign syn_pre_age[k]    = age[PRE];
    assign syn_post_age[k]   = age[POST];
  end

  for (genvar i = 0; i < N_IN; i++) begin : g_xin
    assign x_in[i] = vm[i] - V_RESET;
  end
  for (genvar i = 0; i < N_HID; i++) begin : g_xhid
    assign x_hid[i] = vm[HID_BASE + i] - V_RESET;
  end
  for (genvar i = 0; i < N_OUT; i++) begin : g_xout
    assign x_out[i] = vm[OUT_BASE + i] - V_RESET;
  end

  for (genvar j = 0; j < N_HID; j++) begin : g_whid
    for (genvar i = 0; i < N_IN; i++) begin : g_pre
      assign w_hid[j][i] = w_exc[i * N_HID + j];
    end
  end
  for (genvar j = 0; j < N_OUT; j++) begin : g_wout
    for (genvar i = 0; i < N_HID; i++) begin : g_pre
      assign w_out[j][i] = w_exc[N_IN * N_HID + i * N_OUT + j];
    end
  end

endmodule
