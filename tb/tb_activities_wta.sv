// tb_activities_wta: random layer vectors and weights; both layers'
// activities are compared with the activity equation evaluated here in
// floating point, and the winners with the argmax of those references.
module tb_activities_wta;
  import snn_pkg::*;
  fix_t x_in [N_IN];
  fix_t x_hid [N_HID];
  fix_t x_out [N_OUT];
  fix_t w_hid [N_HID][N_IN];
  fix_t w_out [N_OUT][N_HID];
  fix_t act_hid [N_HID];
  fix_t act_out [N_OUT];
  logic [N_HID-1:0] win_hid;
  logic [N_OUT-1:0] win_out;
  fix_t v_hid [N_HID];
  fix_t v_out [N_OUT];
  logic valid_hid, valid_out;
  int checks = 0, failures = 0;

  activities_wta dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real rh [N_HID];
    real ro [N_OUT];
    real e;
    int bh, bo;
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < N_IN; i++) x_in[i] = fix_t'($urandom_range(0, 65536));
      for (int i = 0; i < N_HID; i++) x_hid[i] = fix_t'($urandom_range(0, (t % 2) ? 4000 : 65536));
      for (int i = 0; i < N_OUT; i++) x_out[i] = fix_t'($urandom_range(0, 30000));
      for (int j = 0; j < N_HID; j++) for (int i = 0; i < N_IN; i++) w_hid[j][i] = fix_t'($urandom_range(0, 65536));
      for (int j = 0; j < N_OUT; j++) for (int i = 0; i < N_HID; i++) w_out[j][i] = fix_t'($urandom_range(0, 65536));
      #1;
      bh = 0; bo = 0;
      for (int j = 0; j < N_HID; j++) begin
        rh[j] = 0.0;
        for (int i = 0; i < N_IN; i++) rh[j] += $itor(x_in[i]) * $itor(w_hid[j][i]) / 65536.0;
        for (int i = 0; i < N_HID; i++) if (i != j) rh[j] -= $itor(x_hid[i]);
        e = $itor(act_hid[j]) - rh[j]; if (e < 0) e = -e;
        checks++;
        if (e > 8.0) begin failures++; $display("FAIL act_hid[%0d]=%0d ref=%f", j, act_hid[j], rh[j]); end
        if (rh[j] > rh[bh] + 8.0) bh = j;
      end
      for (int j = 0; j < N_OUT; j++) begin
        ro[j] = 0.0;
        for (int i = 0; i < N_HID; i++) ro[j] += $itor(x_hid[i]) * $itor(w_out[j][i]) / 65536.0;
        for (int i = 0; i < N_OUT; i++) if (i != j) ro[j] -= $itor(x_out[i]);
        e = $itor(act_out[j]) - ro[j]; if (e < 0) e = -e;
        checks++;
        if (e > 10.0) begin failures++; $display("FAIL act_out[%0d]", j); end
        if (ro[j] > ro[bo] + 10.0) bo = j;
      end
      checks++;
      if (rh[bh] > 16.0 && !win_hid[bh]) begin failures++; $display("FAIL hid winner %b exp %0d", win_hid, bh); end
      checks++;
      if (ro[bo] > 16.0 && !win_out[bo]) begin failures++; $display("FAIL out winner %b exp %0d", win_out, bo); end
      checks++;
      if ($countones(win_hid) > 1 || $countones(win_out) > 1) begin failures++; $display("FAIL not one-hot"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
