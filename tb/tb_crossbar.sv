// tb_crossbar: random neuron states and weights; every routed signal is
// compared with the connection map written out independently here:
// synapse k < 48 joins sensory k/8 to hippocampal 6 + k%8, synapse k >= 48
// joins hippocampal 6 + (k-48)/2 to motor 14 + (k-48)%2.
module tb_crossbar;
  import snn_pkg::*;
  fix_t vm [N_NEU];
  logic [N_NEU-1:0] spike;
  logic [AGE_W-1:0] age [N_NEU];
  fix_t w_exc [N_EXC];
  logic [N_EXC-1:0] syn_pre_spike, syn_post_spike;
  logic [AGE_W-1:0] syn_pre_age [N_EXC];
  logic [AGE_W-1:0] syn_post_age [N_EXC];
  fix_t x_in [N_IN];
  fix_t x_hid [N_HID];
  fix_t x_out [N_OUT];
  fix_t w_hid [N_HID][N_IN];
  fix_t w_out [N_OUT][N_HID];
  int checks = 0, failures = 0;

  crossbar dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int r = 0; r < 20; r++) begin
      for (int i = 0; i < N_NEU; i++) begin
        vm[i] = fix_t'($urandom); spike[i] = 1'($urandom); age[i] = 8'($urandom);
      end
      for (int k = 0; k < N_EXC; k++) w_exc[k] = fix_t'($urandom);
      #1;
      for (int k = 0; k < 48; k++) begin
        chk(syn_pre_spike[k] == spike[k / 8] && syn_post_spike[k] == spike[6 + k % 8], "spike in-hid");
        chk(syn_pre_age[k] == age[k / 8] && syn_post_age[k] == age[6 + k % 8], "age in-hid");
        chk(w_hid[k % 8][k / 8] == w_exc[k], "w_hid");
      end
      for (int k = 48; k < 64; k++) begin
        chk(syn_pre_spike[k] == spike[6 + (k - 48) / 2] && syn_post_spike[k] == spike[14 + (k - 48) % 2], "spike hid-out");
        chk(syn_pre_age[k] == age[6 + (k - 48) / 2] && syn_post_age[k] == age[14 + (k - 48) % 2], "age hid-out");
        chk(w_out[(k - 48) % 2][(k - 48) / 2] == w_exc[k], "w_out");
      end
      for (int i = 0; i < 6; i++) chk(x_in[i] == vm[i], "x_in");
      for (int i = 0; i < 8; i++) chk(x_hid[i] == vm[6 + i], "x_hid");
      for (int i = 0; i < 2; i++) chk(x_out[i] == vm[14 + i], "x_out");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
