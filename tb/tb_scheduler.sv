// tb_scheduler: walks the scheduler through run/init, a trial with a move
// and a rewarded dig, an unrewarded dig, a trial ended by MAX_ACTIONS moves
// and one ended by ACTION_TIMEOUT ticks without an action. Checks the phase
// after each event, the Moore control strobes of each phase, the sampled
// reward direction and the trial status pulses, and the timeout tick count.
module tb_scheduler;
  import snn_pkg::*;
  logic clk = 0, rst_n = 0, run = 0, start_trial = 0, reward = 0;
  logic dig_spike = 0, move_spike = 0, init_done = 0, replay_done = 0;
  phase_t phase;
  logic init_start, neuron_en, neuron_clr, age_clr, hist_clr, behav, sel_replay;
  logic eligible, replay_start, replay_fwd, trial_done, trial_rewarded, trial_timeout;
  int checks = 0, failures = 0;

  scheduler dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (phase %0d)", what, phase); end
  endtask

  task automatic strobes();
    chk(neuron_en == (phase == PH_BEHAV || phase == PH_REPLAY), "neuron_en");
    chk(behav == (phase == PH_BEHAV), "behav");
    chk(eligible == (phase == PH_REPLAY), "eligible");
    chk(sel_replay == (phase == PH_REPLAY || phase == PH_RSTART), "sel_replay");
    chk(replay_start == (phase == PH_RSTART) && age_clr == (phase == PH_RSTART), "replay_start");
    chk(neuron_clr == !(phase == PH_BEHAV || phase == PH_REPLAY), "neuron_clr");
    chk(hist_clr == (phase == PH_IDLE || phase == PH_INIT || phase == PH_WAIT), "hist_clr");
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0; #1;
  endtask

  task automatic finish_replay(input logic exp_fwd, input logic exp_to);
    chk(phase == PH_RSTART, "to rstart"); strobes();
    chk(replay_fwd == exp_fwd, "replay direction");
    @(negedge clk);
    chk(phase == PH_REPLAY, "to replay"); strobes();
    repeat (5) @(negedge clk);
    pulse(replay_done);
    chk(trial_done && trial_rewarded == exp_fwd && trial_timeout == exp_to, "trial status");
    chk(phase == PH_WAIT, "back to wait"); strobes();
  endtask

  initial begin
    int n;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 chk(phase == PH_IDLE, "idle"); strobes();
    @(negedge clk); run = 1; @(negedge clk); run = 0; #1;
    chk(phase == PH_INIT && init_start, "init"); strobes();
    repeat (10) @(negedge clk);
    pulse(init_done);
    chk(phase == PH_WAIT, "wait"); strobes();
    // trial 1: move, then rewarded dig
    pulse(start_trial);
    chk(phase == PH_BEHAV && !hist_clr, "behav"); strobes();
    repeat (7) @(negedge clk);
    pulse(move_spike);
    chk(phase == PH_MOVE, "move"); strobes();
    @(negedge clk); #1 chk(phase == PH_BEHAV, "behav again");
    reward = 1;
    pulse(dig_spike);
    reward = 0;
    finish_replay(1, 0);
    // trial 2: unrewarded dig
    pulse(start_trial);
    repeat (3) @(negedge clk);
    pulse(dig_spike);
    finish_replay(0, 0);
    // trial 3: MAX_ACTIONS moves
    pulse(start_trial);
    for (int k = 0; k < 7; k++) begin
      pulse(move_spike);
      chk(phase == PH_MOVE, "move k");
      @(negedge clk);
    end
    pulse(move_spike);
    finish_replay(0, 1);
    // trial 4: no action for ACTION_TIMEOUT ticks
    pulse(start_trial);
    n = 1;
    while (phase == PH_BEHAV && n < 500) begin @(negedge clk); n++; end
    chk(n == 101, $sformatf("timeout after %0d ticks", n - 1));   // 100 behavioural ticks
    finish_replay(0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
