// tb_ctrl_behav: all eight sensory triplets with random WTA levels; checks
// that exactly the neurons of the triplet's context, item and position get
// 0.25, that the hippocampal and motor neurons get their WTA levels, and
// that everything is 0 outside the behavioural phase.
module tb_ctrl_behav;
  import snn_pkg::*;
  logic behav, ctx, item, pos;
  fix_t v_hid [N_HID];
  fix_t v_out [N_OUT];
  fix_t v_beh [N_NEU];
  int checks = 0, failures = 0;

  ctrl_behav dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] on;
    for (int t = 0; t < 64; t++) begin
      {behav, ctx, item, pos} = 4'(t % 16);
      for (int i = 0; i < N_HID; i++) v_hid[i] = fix_t'($urandom);
      for (int i = 0; i < N_OUT; i++) v_out[i] = fix_t'($urandom);
      #1;
      on = '0;
      on[ctx ? 1 : 0] = 1; on[item ? 3 : 2] = 1; on[pos ? 5 : 4] = 1;
      for (int i = 0; i < 6; i++) begin
        checks++;
        if (v_beh[i] != ((behav && on[i]) ? 32'sd16384 : 32'sd0)) begin failures++; $display("FAIL sens %0d", i); end
      end
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (v_beh[6 + i] != (behav ? v_hid[i] : 32'sd0)) begin failures++; $display("FAIL hid"); end
      end
      for (int i = 0; i < 2; i++) begin
        checks++;
        if (v_beh[14 + i] != (behav ? v_out[i] : 32'sd0)) begin failures++; $display("FAIL out"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
