// tb_lif_neuron: self-checking test of the LIF neuron.
// A reference model in the testbench integrates Vm += V - leak with the
// threshold and floor, tick by tick, and every cycle the neuron's membrane
// and spike are compared with it. Covers firing and reset, the floor at
// V_reset, the enable, the clear, and the firing period for a constant input.
module tb_lif_neuron;
  import snn_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  fix_t v_in = 0, vm;
  logic spike;
  int checks = 0, failures = 0;
  longint ref_vm = 0;
  logic   ref_spike = 0;
  int     spikes = 0, first_spike = -1, cyc = 0;

  lif_neuron dut (.clk, .rst_n, .clr, .en, .v_in, .vm, .spike);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input fix_t v, input logic e, input logic c);
    longint s;
    @(negedge clk);
    v_in = v; en = e; clr = c;
    @(posedge clk);
    // reference update
    if (c) begin ref_vm = 0; ref_spike = 0; end
    else if (e) begin
      s = ref_vm + longint'(v) - 655;
      if (s > 65536) begin ref_vm = 0; ref_spike = 1; end
      else begin ref_spike = 0; ref_vm = (s < 0) ? 0 : s; end
    end else ref_spike = 0;
    #1;
    checks++;
    if (longint'(vm) != ref_vm || spike != ref_spike) begin
      failures++;
      $display("FAIL vm=%0d ref=%0d spike=%0b ref=%0b", vm, ref_vm, spike, ref_spike);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // constant drive 0.25: expected period from the closed form
    for (int t = 0; t < 40; t++) begin
      step(32'sd16384, 1, 0);
      cyc++;
      if (spike) begin spikes++; if (first_spike < 0) first_spike = cyc; end
    end
    // 0.25-0.01 = 0.24 per tick: 1.0 exceeded after 5 ticks
    checks++;
    if (first_spike != 5) begin failures++; $display("FAIL first spike at %0d", first_spike); end
    checks++;
    if (spikes != 8) begin failures++; $display("FAIL spikes=%0d", spikes); end
    // leak only: floor at V_reset
    for (int t = 0; t < 10; t++) step(32'sd1000, 1, 0);
    for (int t = 0; t < 200; t++) step(0, 1, 0);
    checks++;
    if (vm != 0) begin failures++; $display("FAIL floor vm=%0d", vm); end
    // enable low holds the membrane
    step(32'sd30000, 1, 0);
    for (int t = 0; t < 5; t++) step(32'sd30000, 0, 0);
    // clear
    step(32'sd30000, 1, 1);
    // random drive
    for (int t = 0; t < 500; t++) step(fix_t'($urandom_range(0, 40000)) - 32'sd5000, ($urandom_range(0, 7) != 0), ($urandom_range(0, 50) == 0));
    // large drive fires every tick
    for (int t = 0; t < 5; t++) step(32'sd73728, 1, 0);
    checks++;
    if (!spike) begin failures++; $display("FAIL replay drive"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
