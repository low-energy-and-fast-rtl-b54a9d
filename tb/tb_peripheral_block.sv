// tb_peripheral_block: the control side without the neurons. The testbench
// plays the neurons: it drives spike vectors and WTA levels and watches the
// neuron inputs. Checks: run -> 16 weight group writes then init_done;
// in the behavioural phase the sensory neurons of the triplet get 0.25 and
// the others the WTA levels; a move spike gives a move pulse and one clear
// cycle; a rewarded dig starts a forward replay in which the recorded
// sensory, hippocampal and motor neurons are driven in that order, 2 cycles
// apart, first the sequence before the move; an unrewarded dig replays in
// reverse; the plastic synapses are eligible only during replay.
module tb_peripheral_block;
  import snn_pkg::*;
  logic clk = 0, rst_n = 0, run = 0, start_trial = 0, reward = 0;
  logic ctx = 0, item = 0, pos = 0;
  logic [N_NEU-1:0] spike = '0;
  fix_t v_hid [N_HID];
  fix_t v_out [N_OUT];
  fix_t v_neu [N_NEU];
  logic neuron_en, neuron_clr, age_clr, eligible, wr_en;
  logic [3:0] wr_base;
  fix_t wr_data [4];
  phase_t phase;
  logic init_done, dig, move, hist_push, trial_done, trial_rewarded, trial_timeout, replay_fwd, replay_busy;
  int checks = 0, failures = 0;

  peripheral_block dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [N_NEU-1:0] driven();
    logic [N_NEU-1:0] m;
    for (int i = 0; i < N_NEU; i++) m[i] = (v_neu[i] == 32'sd73728);
    return m;
  endfunction

  // Collect the replay drive pattern: list of (cycle, mask).
  task automatic collect(output logic [N_NEU-1:0] masks [6], output int times [6], output int n);
    int t;
    n = 0; t = 0;
    while (phase != PH_WAIT && t < 400) begin
      if (driven() != 0 && n < 6) begin masks[n] = driven(); times[n] = t; n++; end
      if (eligible != (phase == PH_REPLAY)) begin checks++; failures++; $display("FAIL eligible"); end
      @(negedge clk); #1; t++;
    end
  endtask

  initial begin
    int writes;
    logic [N_NEU-1:0] masks [6];
    int times [6];
    int n;
    for (int i = 0; i < N_HID; i++) v_hid[i] = (i == 2) ? 32'sd16384 : 32'sd0;
    v_out[0] = 32'sd16384; v_out[1] = 32'sd0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); run = 1; @(negedge clk); run = 0; #1;
    writes = 0;
    for (int t = 0; t < 30 && !init_done; t++) begin
      if (wr_en) writes++;
      @(negedge clk); #1;
    end
    chk(writes == 16, $sformatf("init writes %0d", writes));
    @(negedge clk); #1;
    chk(phase == PH_WAIT, "wait after init");

    // trial: context B, item Y, position 1 -> move -> item X position 2 -> dig (unrewarded)
    ctx = 1; item = 1; pos = 0;
    @(negedge clk); start_trial = 1; @(negedge clk); start_trial = 0; #1;
    chk(phase == PH_BEHAV, "behav");
    for (int i = 0; i < 6; i++)
      chk(v_neu[i] == ((i == 1 || i == 3 || i == 4) ? 32'sd16384 : 32'sd0), "sensory drive");
    chk(v_neu[8] == 32'sd16384 && v_neu[6] == 0 && v_neu[14] == 32'sd16384, "WTA levels");
    // neurons 1,3,4 and hippocampal 8 fire, then move
    @(negedge clk); spike = 16'h001A; @(negedge clk); spike = 16'h0100;
    @(negedge clk); spike = 16'h8000; #1;
    chk(move && !dig, "move pulse");
    @(negedge clk); spike = '0; #1;
    chk(phase == PH_MOVE && neuron_clr, "move clears neurons");
    item = 0; pos = 1;
    @(negedge clk); #1;
    chk(phase == PH_BEHAV, "behav after move");
    spike = 16'h0025; @(negedge clk); spike = 16'h0800; @(negedge clk);
    reward = 0; spike = 16'h4000; #1;
    chk(dig && !move, "dig pulse");
    @(negedge clk); spike = '0; #1;
    chk(phase == PH_RSTART && age_clr, "replay start");
    collect(masks, times, n);
    // reverse: latest (dig sequence) first, motor -> hid -> sensory
    chk(n == 6, $sformatf("six drive steps (%0d)", n));
    chk(masks[0] == 16'h4000 && masks[1] == 16'h0800 && masks[2] == 16'h0025, "reverse order, latest first");
    chk(masks[3] == 16'h8000 && masks[4] == 16'h0100 && masks[5] == 16'h001A, "reverse order, then older");
    chk(times[1] - times[0] == 2 && times[2] - times[1] == 2 && times[3] - times[2] == 49, "reverse spacing");
    chk(!trial_rewarded, "unrewarded");

    // trial: context A, item X -> dig (rewarded), forward replay of one sequence
    ctx = 0; item = 0; pos = 0;
    @(negedge clk); start_trial = 1; @(negedge clk); start_trial = 0;
    spike = 16'h0015; @(negedge clk); spike = 16'h2000; @(negedge clk);
    reward = 1; spike = 16'h4000; #1;
    chk(dig, "dig 2");
    @(negedge clk); spike = '0; reward = 0; #1;
    collect(masks, times, n);
    chk(n == 3, "three drive steps");
    chk(masks[0] == 16'h0015 && masks[1] == 16'h2000 && masks[2] == 16'h4000, "forward order");
    chk(times[1] - times[0] == 2 && times[2] - times[1] == 2, "forward spacing");
    chk(trial_rewarded, "rewarded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
