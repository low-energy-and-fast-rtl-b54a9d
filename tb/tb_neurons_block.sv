// tb_neurons_block: self-checking test of the neuron column and spike ages.
// Neurons get different constant drives; the testbench models each membrane
// and age counter independently and compares all of them every cycle,
// including the age clear and the saturation at AGE_MAX.
module tb_neurons_block;
  import snn_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, age_clr = 0;
  fix_t v_in [N];
  fix_t vm [N];
  logic [N-1:0] spike;
  logic [AGE_W-1:0] age [N];
  int checks = 0, failures = 0;
  longint rv [N];
  logic   rs [N];
  int     ra [N];

  neurons_block #(.N(N)) dut (.clk, .rst_n, .clr, .en, .age_clr, .v_in, .vm, .spike, .age);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic e, input logic c, input logic ac);
    longint s;
    @(negedge clk);
    en = e; clr = c; age_clr = ac;
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      // age uses the spike of the previous cycle
      if (ac) ra[i] = 255;
      else if (rs[i]) ra[i] = 1;
      else if (e && ra[i] != 255) ra[i]++;
      if (c) begin rv[i] = 0; rs[i] = 0; end
      else if (e) begin
        s = rv[i] + longint'(v_in[i]) - 655;
        if (s > 65536) begin rv[i] = 0; rs[i] = 1; end
        else begin rs[i] = 0; rv[i] = (s < 0) ? 0 : s; end
      end else rs[i] = 0;
    end
    #1;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (longint'(vm[i]) != rv[i] || spike[i] != rs[i] || int'(age[i]) != ra[i]) begin
        failures++;
        $display("FAIL n%0d vm=%0d/%0d spike=%0b/%0b age=%0d/%0d", i, vm[i], rv[i], spike[i], rs[i], age[i], ra[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin rv[i] = 0; rs[i] = 0; ra[i] = 255; end
    v_in[0] = 32'sd16384; v_in[1] = 32'sd30000; v_in[2] = 32'sd0; v_in[3] = 32'sd73728;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) step(1, 0, 0);
    step(1, 0, 1);
    for (int t = 0; t < 20; t++) step(1, 0, 0);
    step(1, 1, 0);
    for (int t = 0; t < 200; t++) step(($urandom_range(0, 3) != 0), ($urandom_range(0, 40) == 0), ($urandom_range(0, 60) == 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
