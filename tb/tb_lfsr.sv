// tb_lfsr: compares the register with a software model of the Galois LFSR
// (x^32 + x^22 + x^2 + x + 1) over many steps, checks that load replaces a
// zero seed by 1, that en low holds the state and that the state never
// becomes zero.
module tb_lfsr;
  logic clk = 0, rst_n = 0, load = 0, en = 0;
  logic [31:0] seed = 0, q, m;
  int checks = 0, failures = 0;

  lfsr dut (.clk, .rst_n, .load, .seed, .en, .q);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); load = 1; seed = 32'h0; @(negedge clk); load = 0;
    checks++; if (q != 32'h1) begin failures++; $display("FAIL zero seed"); end
    @(negedge clk); load = 1; seed = 32'hACE1_2345; @(negedge clk); load = 0;
    m = 32'hACE1_2345;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      if (en) m = m[0] ? ((m >> 1) ^ 32'h8020_0003) : (m >> 1);
      en = 0;
      checks++;
      if (q != m || q == 0) begin failures++; $display("FAIL q=%h m=%h", q, m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
