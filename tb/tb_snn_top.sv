// tb_snn_top: the whole network learning the context-dependent task.
//
// An environment model plays the task: each trial picks a context (A/B) and
// the position of item X; the agent first faces a random one of the two
// pots. A "move" makes the environment present the other pot; "dig" is
// rewarded when it is item X in context A or item Y in context B. The
// network runs at its default parameters for N_TRIALS trials.
//
// Checked: all initial weights in [0, 1); one-hot winners and never dig and
// move together; after a rewarded trial no weight has fallen, after an
// unrewarded one none has risen; the replay phase lasts exactly as long as
// the two-entry history predicts (53 cycles per stored sequence, 1 per
// empty entry, plus one); each mechanism (initialisation, sensory,
// hippocampal and motor spikes, both WTAs, move, rewarded and unrewarded
// dig, forward and reverse replay, potentiation, depression, a trial ended
// by the action limit or the timeout) happens at least once. The share of
// correct first choices over each window of 30 trials is printed, and at
// least 24 of the last 30 must be correct (the task is learned).
module tb_snn_top;
  import snn_pkg::*;
  localparam int N_TRIALS = 400;

  logic clk = 0, rst_n = 0, run = 0, start_trial = 0;
  logic ctx = 0, item = 0, pos = 0, reward;
  phase_t phase;
  logic init_done, dig, move, trial_done, trial_rewarded, trial_timeout;
  logic [N_NEU-1:0] spike;
  fix_t vm [N_NEU];
  logic [N_HID-1:0] win_hid;
  logic [N_OUT-1:0] win_out;
  fix_t act_hid [N_HID];
  fix_t act_out [N_OUT];
  logic valid_hid, valid_out, hist_push, replay_fwd, replay_busy;
  logic [$clog2(N_EXC)-1:0] wt_addr = '0;
  fix_t wt_data;

  snn_top dut (.*);

  always #5 clk = ~clk;
  assign reward = (!ctx && !item) || (ctx && item);

  int checks = 0, failures = 0;
  int n_init = 0, n_sens = 0, n_hid = 0, n_mot = 0, n_whid = 0, n_wout = 0;
  int n_move = 0, n_dig_rew = 0, n_dig_norew = 0, n_fwd = 0, n_rev = 0;
  int n_pot = 0, n_dep = 0, n_limit = 0;
  int correct_last = 0, total_last = 0;
  fix_t w0 [N_EXC];
  fix_t w1 [N_EXC];
  int   win [30];

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic read_weights(output fix_t w [N_EXC]);
    for (int k = 0; k < N_EXC; k++) begin
      @(negedge clk); wt_addr = 6'(k); #1; w[k] = wt_data;
    end
  endtask

  // per-cycle monitors
  always @(posedge clk) if (rst_n) begin
    if (|spike[5:0]) n_sens++;
    if (|spike[13:6]) n_hid++;
    if (phase == PH_BEHAV && |spike[15:14]) n_mot++;
    if (phase == PH_BEHAV && valid_hid) n_whid++;
    if (phase == PH_BEHAV && valid_out) n_wout++;
    if ($countones(win_hid) > 1 || $countones(win_out) > 1) begin
      checks++; failures++; $display("FAIL winner not one-hot");
    end
    if (dig && move) begin checks++; failures++; $display("FAIL dig and move together"); end
  end

  initial begin
    int wc;
    int actions, rep_cycles, exp_rep, first_ok, cyc, ups, downs;
    logic x_pos, first, last_dig, last_rew;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); run = 1; @(negedge clk); run = 0;
    cyc = 0;
    while (phase != PH_WAIT && cyc < 100) begin @(negedge clk); cyc++; end
    chk(phase == PH_WAIT, "init finished");
    chk(cyc == 18, $sformatf("init took %0d cycles", cyc));   // start, 16 group writes, done
    n_init++;
    read_weights(w0);
    for (int k = 0; k < N_EXC; k++) chk(w0[k] >= 0 && w0[k] < 32'sd65536, "initial weight range");

    for (int t = 0; t < N_TRIALS; t++) begin
      ctx   = 1'($urandom);
      x_pos = 1'($urandom);
      first = 1'($urandom);           // 0: faces X first, 1: faces Y first
      item  = first;
      pos   = first ? !x_pos : x_pos;
      @(negedge clk); start_trial = 1; @(negedge clk); start_trial = 0;
      actions = 0; first_ok = -1; rep_cycles = 0; last_dig = 0; last_rew = 0;
      while (phase != PH_WAIT) begin
        if (dig || move) begin
          actions++;
          last_dig = dig; last_rew = reward;
          if (first_ok < 0) first_ok = (dig == reward);
          if (dig && reward) n_dig_rew++;
          if (dig && !reward) n_dig_norew++;
          if (move) begin
            n_move++;
            @(negedge clk);
            item = !item; pos = !pos;   // the other pot
            continue;
          end
        end
        if (phase == PH_REPLAY) rep_cycles++;
        @(negedge clk);
      end
      chk(trial_rewarded == (last_dig && last_rew), "reward reaches the scheduler");
      if (trial_timeout) n_limit++;
      if (trial_rewarded) n_fwd++; else n_rev++;
      exp_rep = 1 + ((actions >= 2) ? 2 * 53 : (actions == 1) ? 53 + 1 : 2);
      chk(rep_cycles == exp_rep, $sformatf("replay %0d cycles, expected %0d (actions %0d)", rep_cycles, exp_rep, actions));
      read_weights(w1);
      ups = 0; downs = 0;
      for (int k = 0; k < N_EXC; k++) begin
        if (w1[k] > w0[k]) ups++;
        if (w1[k] < w0[k]) downs++;
      end
      if (trial_rewarded) chk(downs == 0, "rewarded trial depressed a weight");
      else chk(ups == 0, "unrewarded trial potentiated a weight");
      n_pot += ups; n_dep += downs;
      w0 = w1;
      win[t % 30] = (first_ok == 1);
      if (t % 50 == 49) begin
        wc = 0;
        for (int k = 0; k < 30; k++) wc += win[k];
        $display("trial %0d: correct first choices in the last 30 trials: %0d", t + 1, wc);
      end
      if (t >= N_TRIALS - 30) begin
        total_last++;
        if (first_ok == 1) correct_last++;
      end
    end

    chk(correct_last >= 24, "task learned: at least 80% correct in the last 30 trials");
    chk(n_init > 0, "initialisation");
    chk(n_sens > 0 && n_hid > 0 && n_mot > 0, "spikes in all layers");
    chk(n_whid > 0 && n_wout > 0, "WTA winners");
    chk(n_move > 0, "move");
    chk(n_dig_rew > 0, "rewarded dig");
    chk(n_dig_norew > 0, "unrewarded dig");
    chk(n_fwd > 0 && n_rev > 0, "forward and reverse replay");
    chk(n_pot > 0 && n_dep > 0, "potentiation and depression");
    chk(n_limit > 0, "trial ended by action limit or timeout");
    $display("mechanisms: moves=%0d dig_rew=%0d dig_norew=%0d fwd=%0d rev=%0d pot=%0d dep=%0d limit=%0d",
             n_move, n_dig_rew, n_dig_norew, n_fwd, n_rev, n_pot, n_dep, n_limit);
    $display("correct first choices in last %0d trials: %0d", total_last, correct_last);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
