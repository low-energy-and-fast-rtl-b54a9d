// tb_wta: random activities (including ties and all-negative sets); the
// one-hot winner must be the lowest-index maximum when that maximum is
// positive and nothing otherwise; the drive levels must be 0.25 for the
// winner and 0 for the others.
module tb_wta;
  import snn_pkg::*;
  localparam int N = 8;
  fix_t act [N];
  logic [N-1:0] winner;
  logic valid;
  fix_t v_drive [N];
  int checks = 0, failures = 0;

  wta #(.N(N)) dut (.act, .winner, .valid, .v_drive);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bi;
    logic [N-1:0] ew;
    for (int t = 0; t < 600; t++) begin
      for (int i = 0; i < N; i++) begin
        case (t % 3)
          0: act[i] = fix_t'($urandom_range(0, 100000)) - 32'sd50000;
          1: act[i] = fix_t'($urandom_range(0, 4)) * 32'sd1000;      // many ties
          default: act[i] = -fix_t'($urandom_range(1, 50000));       // none positive
        endcase
      end
      #1;
      bi = 0;
      for (int i = 1; i < N; i++) if (act[i] > act[bi]) bi = i;
      ew = (act[bi] > 0) ? (N'(1) << bi) : '0;
      checks++;
      if (winner != ew || valid != (act[bi] > 0)) begin
        failures++; $display("FAIL winner=%b exp=%b", winner, ew);
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (v_drive[i] != (ew[i] ? 32'sd16384 : 32'sd0)) begin failures++; $display("FAIL drive"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
