// activities_wta: the "Activities plus WTAs" block.
//
// Eight activity units and a WTA form the hippocampal layer, two activity
// units and a WTA the motor layer. Because each layer competes on computed
// activity rather than on membrane voltages that depend on the synaptic
// weights, the winner is chosen directly, which keeps firing rates low.
//
// Interface: layer vectors and weight rows from the crossbar in; the
// activities, one-hot winners and the WTA drive levels of both layers out.
// Timing: combinational (one network tick).
module activities_wta
  import snn_pkg::*;
(
  input  fix_t               x_in  [N_IN],
  input  fix_t               x_hid [N_HID],
  input  fix_t               x_out [N_OUT],
  input  fix_t               w_hid [N_HID][N_IN],
  input  fix_t               w_out [N_OUT][N_HID],
  output fix_t               act_hid [N_HID],
  output fix_t               act_out [N_OUT],
  output logic [N_HID-1:0]   win_hid,
  output logic [N_OUT-1:0]   win_out,
  output fix_t               v_hid [N_HID],
  output fix_t               v_out [N_OUT],
  output logic               valid_hid,
  output logic               valid_out
);

  for (genvar j = 0; j < N_HID; j++) begin : g_ahid
    activity_unit #(.N_PRE(N_IN), .N_LAT(N_HID), .SELF(j)) u_a (
      .x_pre (x_in), .w (w_hid[j]), .x_lat (x_hid), .act (act_hid[j])
    );
  end

  for (genvar j = 0; j < N_OUT; j++) begin : g_aout
    activity_unit #(.N_PRE(N_HID), .N_LAT(N_OUT), .SELF(j)) u_a (
      .x_pre (x_hid), .w (w_out[j]), .x_lat (x_out), .act (act_out[j])
    );
  end

  wta #(.N(N_HID)) u_wta_hid (
    .act (act_hid), .winner (win_hid), .valid (valid_hid), .v_drive (v_hid)
  );
  wta #(.N(N_OUT)) u_wta_out (
    .act (act_out), .winner (win_out), .valid (valid_out), .v_drive (v_out)
  );

endmodule
