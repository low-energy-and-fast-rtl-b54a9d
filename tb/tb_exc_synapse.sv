// tb_exc_synapse: self-checking test of one plastic synapse.
// Loads weights, applies pre/post spike pairs with chosen ages and compares
// the weight change with the learning rule evaluated in floating point at
// the bin centre and the level centre of the present weight (tolerance 1% +
// 8 LSB). Also checks: no change when not eligible, outside the 40-tick
// window or on coincident spikes, and clamping to [0, 1].
module tb_exc_synapse;
  import snn_pkg::*;
  logic clk = 0, rst_n = 0, we = 0, eligible = 0, pre_spike = 0, post_spike = 0;
  fix_t wdata = 0, w;
  logic [AGE_W-1:0] pre_age = '1, post_age = '1;
  int checks = 0, failures = 0;

  exc_synapse dut (.clk, .rst_n, .we, .wdata, .eligible, .pre_spike, .post_spike,
                   .pre_age, .post_age, .w);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rule(int dt, real wv);
    int  lvl;
    real wc, tc;
    lvl = int'($floor(wv * 10.0));
    if (lvl > 9) lvl = 9;
    wc = (lvl + 0.5) / 10.0;
    if (dt >= 40 || dt <= -40 || dt == 0) return 0.0;
    if (dt > 0) begin
      tc = ((dt / 5) + 0.5) * 5.0;
      return 0.056 * (1.0 - wc) * $exp(-tc / 10.0) * 65536.0;
    end
    tc = (((-dt) / 5) + 0.5) * 5.0;
    return -0.056 * wc * $exp(-tc / 10.0) * 65536.0;
  endfunction

  task automatic load(input fix_t v);
    @(negedge clk); we = 1; wdata = v;
    @(negedge clk); we = 0;
    checks++;
    if (w != v) begin failures++; $display("FAIL load"); end
  endtask

  // dt > 0: post spikes, pre fired dt ticks ago; dt < 0: pre spikes.
  task automatic pair(input int dt, input logic el);
    fix_t  w0;
    real   r, err, lim;
    w0 = w;
    @(negedge clk);
    eligible = el;
    if (dt >= 0) begin post_spike = 1; pre_spike = (dt == 0); pre_age = AGE_W'(dt); post_age = '1; end
    else begin pre_spike = 1; post_spike = 0; post_age = AGE_W'(-dt); pre_age = '1; end
    @(negedge clk);
    pre_spike = 0; post_spike = 0; eligible = 0;
    r = el ? rule(dt, $itor(w0) / 65536.0) : 0.0;
    r = $itor(w0) + r;
    if (r < 0) r = 0;
    if (r > 65536.0) r = 65536.0;
    err = $itor(w) - r; if (err < 0) err = -err;
    lim = 0.01 * (($itor(w0) > r) ? $itor(w0) - r : r - $itor(w0)) + 8.0;
    checks++;
    if (err > lim) begin
      failures++;
      $display("FAIL dt=%0d el=%0b w0=%0d w=%0d ref=%f", dt, el, w0, w, r);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    load(32'sd32768);
    pair(3, 1);          // potentiation
    pair(-3, 1);         // depression
    pair(12, 1);
    pair(-27, 1);
    pair(39, 1);
    pair(45, 1);         // outside window
    pair(-45, 1);
    pair(0, 1);          // coincident
    pair(3, 0);          // not eligible
    load(32'sd65000);
    for (int k = 0; k < 5; k++) pair(1, 1);   // clamp at 1.0
    checks++;
    if (w != 32'sd65536) begin failures++; $display("FAIL clamp high w=%0d", w); end
    load(32'sd100);
    for (int k = 0; k < 3; k++) pair(-1, 1);   // clamp at 0
    checks++;
    if (w != 0) begin failures++; $display("FAIL clamp low w=%0d", w); end
    for (int k = 0; k < 300; k++) begin
      if (k % 40 == 0) load(fix_t'($urandom_range(0, 65536)));
      pair($urandom_range(0, 100) - 50, ($urandom_range(0, 4) != 0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
