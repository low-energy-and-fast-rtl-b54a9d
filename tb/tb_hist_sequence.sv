// tb_hist_sequence: random spikes with occasional motor spikes; a model
// accumulates the activity mask and keeps the latest two sequences, and the
// block's history, valid bits and push are compared with it every cycle.
// Also checks that nothing is recorded when rec_en is low and that clr
// empties the history.
module tb_hist_sequence;
  import snn_pkg::*;
  localparam int N = 16, D = 2;
  logic clk = 0, rst_n = 0, clr = 0, rec_en = 0, push;
  logic [N-1:0] spike = '0;
  logic [N-1:0] seq [D];
  logic [D-1:0] seq_valid;
  logic [N-1:0] cur, m0, m1;
  logic [D-1:0] mv;
  int checks = 0, failures = 0, pushes = 0;

  hist_sequence #(.N(N), .DEPTH(D)) dut (.clk, .rst_n, .clr, .rec_en, .spike, .seq, .seq_valid, .push);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cur = '0; m0 = '0; m1 = '0; mv = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      clr = ($urandom_range(0, 150) == 0);
      rec_en = ($urandom_range(0, 9) != 0);
      spike = N'($urandom) & N'($urandom) & N'($urandom);
      if ($urandom_range(0, 9) != 0) spike[15:14] = 2'b00;
      #1;
      checks++;
      if (push != (rec_en && |spike[15:14])) begin failures++; $display("FAIL push"); end
      if (clr) begin cur = '0; m0 = '0; m1 = '0; mv = '0; end
      else if (rec_en && |spike[15:14]) begin
        m1 = m0; m0 = cur | spike; cur = '0; mv = {mv[0], 1'b1}; pushes++;
      end else if (rec_en) cur = cur | spike;
      @(posedge clk); #1;
      checks++;
      if (seq[0] != m0 || seq[1] != m1 || seq_valid != mv) begin
        failures++; $display("FAIL seq %h %h %b exp %h %h %b", seq[0], seq[1], seq_valid, m0, m1, mv);
      end
    end
    checks++; if (pushes < 20) begin failures++; $display("FAIL few pushes"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
