// tb_activity_unit: random presynaptic terms, weights and lateral terms;
// the activity is compared with the equation evaluated in floating point,
// A = sum x_i w_i - sum_{i != self} x_lat_i (tolerance: 1 LSB per product).
module tb_activity_unit;
  import snn_pkg::*;
  localparam int NP = 6, NL = 8, SELF = 3;
  fix_t x_pre [NP];
  fix_t w [NP];
  fix_t x_lat [NL];
  fix_t act;
  int checks = 0, failures = 0;

  activity_unit #(.N_PRE(NP), .N_LAT(NL), .SELF(SELF)) dut (.x_pre, .w, .x_lat, .act);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real r, e;
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < NP; i++) begin
        x_pre[i] = fix_t'($urandom_range(0, 200000));
        w[i] = fix_t'($urandom_range(0, 65536));
      end
      for (int i = 0; i < NL; i++) x_lat[i] = fix_t'($urandom_range(0, (t % 2) ? 20000 : 200000));
      #1;
      r = 0.0;
      for (int i = 0; i < NP; i++) r += ($itor(x_pre[i]) / 65536.0) * ($itor(w[i]) / 65536.0);
      for (int i = 0; i < NL; i++) if (i != SELF) r -= $itor(x_lat[i]) / 65536.0;
      e = $itor(act) - r * 65536.0;
      if (e < 0) e = -e;
      checks++;
      if (e > NP + 1) begin failures++; $display("FAIL act=%0d ref=%f", act, r * 65536.0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
