// tb_ctrl_replay: replays two stored sequences forward and in reverse, and
// with only one valid entry. Every cycle the set of neurons receiving the
// replay level is compared with a schedule worked out here: sequence n,
// layer l is driven at start + 1 + n*(2*GAP + 1 + SEQ_GAP) + l*GAP, forward
// taking the oldest entry and sensory->hippocampal->motor, reverse the
// latest entry and motor->hippocampal->sensory. The done pulse must come
// at the end of the schedule (an invalid entry costs one cycle).
module tb_ctrl_replay;
  import snn_pkg::*;
  localparam int D = 2, GAP = 2, SG = 48;
  localparam int SEQ_T = 2 * GAP + 1 + SG;
  logic clk = 0, rst_n = 0, start = 0, fwd = 0, busy, done;
  logic [N_NEU-1:0] seq [D];
  logic [D-1:0] seq_valid;
  fix_t v_rep [N_NEU];
  int checks = 0, failures = 0;

  ctrl_replay #(.DEPTH(D), .GAP(GAP), .SEQ_GAP(SG)) dut (
    .clk, .rst_n, .start, .fwd, .seq, .seq_valid, .v_rep, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N_NEU-1:0] layer_mask(int l);
    case (l)
      0: return 16'h003F;
      1: return 16'h3FC0;
      default: return 16'hC000;
    endcase
  endfunction

  task automatic run(input logic f, input logic [D-1:0] vld);
    logic [N_NEU-1:0] exp_m, got;
    int order [D];
    int t_end, t, n_done, base;
    @(negedge clk);
    start = 1; fwd = f; seq_valid = vld;
    @(negedge clk);
    start = 0;
    seq[0] = '0; seq[1] = '0; seq_valid = '0;   // must have been latched
    for (int s = 0; s < D; s++) order[s] = f ? (D - 1 - s) : s;
    t_end = 0;
    for (int s = 0; s < D; s++) t_end += vld[order[s]] ? SEQ_T : 1;
    n_done = 0;
    for (t = 0; t < t_end + 5; t++) begin
      // expected drive in this cycle (t = 0 is the cycle after start)
      exp_m = '0;
      base = 0;
      for (int s = 0; s < D; s++) begin
        if (vld[order[s]]) begin
          for (int l = 0; l < 3; l++)
            if (t == base + l * GAP)
              exp_m = ((order[s] == 1) ? 16'hA5C3 : 16'h5A3C) & layer_mask(f ? l : 2 - l);
          base += SEQ_T;
        end else base += 1;
      end
      got = '0;
      for (int i = 0; i < N_NEU; i++) got[i] = (v_rep[i] == 32'sd73728);
      checks++;
      if (got != exp_m) begin failures++; $display("FAIL t=%0d got %h exp %h", t, got, exp_m); end
      if (done) begin
        n_done++;
        checks++;
        if (t != t_end) begin failures++; $display("FAIL done at %0d exp %0d", t, t_end); end
      end
      @(negedge clk);
    end
    checks++;
    if (n_done != 1 || busy) begin failures++; $display("FAIL done count %0d", n_done); end
  endtask

  initial begin
    seq_valid = '0; seq[0] = '0; seq[1] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    seq[0] = 16'h5A3C; seq[1] = 16'hA5C3; run(1, 2'b11);
    seq[0] = 16'h5A3C; seq[1] = 16'hA5C3; run(0, 2'b11);
    seq[0] = 16'h5A3C; seq[1] = 16'hA5C3; run(1, 2'b01);
    seq[0] = 16'h5A3C; seq[1] = 16'hA5C3; run(0, 2'b01);
    seq[0] = 16'h5A3C; seq[1] = 16'hA5C3; run(0, 2'b00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
