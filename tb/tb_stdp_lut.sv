// tb_stdp_lut: checks every table entry against the learning rule evaluated
// in floating point: dw = +0.056 (1-w) exp(-dt/10) for bins 0..7 and
// dw = -0.056 w exp(-|dt|/10) for bins 8..15, dt at the bin centre
// (5 ticks per bin) and w at the level centre. The tolerance allows for the
// fixed-point evaluation (1% of the entry plus 8 LSB). Also checks the
// shape: potentiation falls with dt and with w, depression grows with w.
module tb_stdp_lut;
  import snn_pkg::*;
  logic [3:0] bin, level;
  fix_t dw;
  int checks = 0, failures = 0;
  fix_t tab [16][10];

  stdp_lut dut (.bin, .level, .dw);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real dt, w, ref_v, err;
    for (int b = 0; b < 16; b++) begin
      for (int l = 0; l < 10; l++) begin
        bin = 4'(b); level = 4'(l); #1;
        tab[b][l] = dw;
        dt = ((b % 8) + 0.5) * 5.0;
        w  = (l + 0.5) / 10.0;
        if (b < 8) ref_v = 0.056 * (1.0 - w) * $exp(-dt / 10.0);
        else       ref_v = -0.056 * w * $exp(-dt / 10.0);
        ref_v = ref_v * 65536.0;
        err = $itor(dw) - ref_v;
        if (err < 0) err = -err;
        checks++;
        if (err > 0.01 * ((ref_v < 0) ? -ref_v : ref_v) + 8.0) begin
          failures++;
          $display("FAIL bin %0d lvl %0d dw=%0d ref=%f", b, l, dw, ref_v);
        end
      end
    end
    for (int b = 0; b < 16; b++)
      for (int l = 1; l < 10; l++) begin
        checks++;
        if (b < 8 && !(tab[b][l] < tab[b][l-1])) begin failures++; $display("FAIL pot shape"); end
        if (b >= 8 && !(tab[b][l] < tab[b][l-1])) begin failures++; $display("FAIL dep shape"); end
      end
    for (int b = 1; b < 8; b++) begin
      checks++;
      if (!(tab[b][5] < tab[b-1][5])) begin failures++; $display("FAIL decay"); end
    end
    // out-of-range level reads zero
    bin = 4'd0; level = 4'd12; #1;
    checks++;
    if (dw != 0) begin failures++; $display("FAIL range"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
