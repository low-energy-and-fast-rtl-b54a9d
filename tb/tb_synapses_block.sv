// tb_synapses_block: group writes, readback and per-synapse STDP.
// Writes all 64 weights through the 4-lane group port and reads them back,
// then applies a post spike with a recent pre spike to a single synapse and
// checks that exactly that weight grew and no other changed.
module tb_synapses_block;
  import snn_pkg::*;
  localparam int NS = N_EXC, NW = 4;
  logic clk = 0, rst_n = 0, wr_en = 0, eligible = 0;
  logic [$clog2(NS/NW)-1:0] wr_base = '0;
  fix_t wr_data [NW];
  logic [NS-1:0] pre_spike = '0, post_spike = '0;
  logic [AGE_W-1:0] pre_age [NS];
  logic [AGE_W-1:0] post_age [NS];
  fix_t w_exc [NS];
  logic [$clog2(NS)-1:0] rd_addr = '0;
  fix_t rd_data;
  fix_t exp_w [NS];
  int checks = 0, failures = 0;

  synapses_block #(.N_SYN(NS), .N_WR(NW)) dut (
    .clk, .rst_n, .wr_en, .wr_base, .wr_data, .eligible, .pre_spike, .post_spike,
    .pre_age, .post_age, .w_exc, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NS; k++) begin pre_age[k] = '1; post_age[k] = '1; end
    for (int k = 0; k < NW; k++) wr_data[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < NS / NW; g++) begin
      @(negedge clk);
      wr_en = 1; wr_base = 4'(g);
      for (int k = 0; k < NW; k++) begin
        wr_data[k] = fix_t'(1000 * (g * NW + k) + 7);
        exp_w[g * NW + k] = wr_data[k];
      end
    end
    @(negedge clk); wr_en = 0;
    for (int k = 0; k < NS; k++) begin
      rd_addr = 6'(k); #1;
      checks++;
      if (rd_data != exp_w[k] || w_exc[k] != exp_w[k]) begin
        failures++; $display("FAIL rd %0d = %0d exp %0d", k, rd_data, exp_w[k]);
      end
    end
    // STDP on synapse 21 only
    @(negedge clk);
    eligible = 1; post_spike[21] = 1; pre_age[21] = 8'd2;
    @(negedge clk);
    eligible = 0; post_spike[21] = 0;
    for (int k = 0; k < NS; k++) begin
      checks++;
      if (k == 21) begin
        if (!(w_exc[k] > exp_w[k])) begin failures++; $display("FAIL no potentiation"); end
      end else if (w_exc[k] != exp_w[k]) begin
        failures++; $display("FAIL synapse %0d changed", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
