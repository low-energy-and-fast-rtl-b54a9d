// tb_init_synapses: after a start pulse, checks that exactly 16 group
// writes happen (groups 0..15 in order), that each lane's data is the low
// 16 bits of its own LFSR model (so every weight is in [0, 1)), that done
// pulses once in the cycle after the last write, and that lanes differ.
module tb_init_synapses;
  import snn_pkg::*;
  localparam int NS = 64, NL = 4;
  logic clk = 0, rst_n = 0, start = 0, wr_en, done;
  logic [3:0] wr_base;
  fix_t wr_data [NL];
  logic [31:0] m [NL];
  int checks = 0, failures = 0, writes = 0, done_at = -1, cyc = 0, same = 0;

  init_synapses #(.N_SYN(NS), .N_LFSR(NL)) dut (.clk, .rst_n, .start, .wr_en, .wr_base, .wr_data, .done);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NL; k++) begin
      m[k] = 32'h1234_5679 ^ (32'h9E37_79B9 * (k + 1));
      if (m[k] == 0) m[k] = 1;
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int t = 0; t < 30; t++) begin
      cyc++;
      if (wr_en) begin
        checks++;
        if (int'(wr_base) != writes) begin failures++; $display("FAIL order"); end
        for (int k = 0; k < NL; k++) begin
          checks++;
          if (wr_data[k] != fix_t'({16'd0, m[k][15:0]}) || wr_data[k] < 0 || wr_data[k] >= 65536) begin
            failures++; $display("FAIL lane %0d data %h model %h", k, wr_data[k], m[k][15:0]);
          end
          m[k] = m[k][0] ? ((m[k] >> 1) ^ 32'h8020_0003) : (m[k] >> 1);
        end
        if (wr_data[0] == wr_data[1]) same++;
        writes++;
      end
      if (done) begin
        checks++;
        if (done_at >= 0) begin failures++; $display("FAIL done twice"); end
        done_at = cyc;
      end
      @(negedge clk);
    end
    checks++; if (writes != 16) begin failures++; $display("FAIL writes=%0d", writes); end
    checks++; if (done_at != 17) begin failures++; $display("FAIL done at %0d", done_at); end
    checks++; if (same > 2) begin failures++; $display("FAIL lanes equal"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
