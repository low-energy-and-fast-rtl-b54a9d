// stdp_lut: look-up table of STDP weight changes, 16 time bins x 10 levels.
//
// The plastic synapses do not evaluate the exponential learning rule; they
// read the weight change from this table, addressed by the bin of the spike
// time difference and by the level of the present weight. Bins 0..7 are
// potentiation (pre before post, dt = +1..+40 ticks), bins 8..15 depression
// (post before pre). The table size follows the design; the entries are
// computed at elaboration by snn_pkg::stdp_entry (formula in snn_pkg).
//
// Interface: bin (0..15) and level (0..9) in, dw (Q16.16) out. Out-of-range
// addresses return 0. Timing: purely combinational (a ROM).
module stdp_lut
  import snn_pkg::*;
(
  input  logic [3:0] bin,
  input  logic [3:0] level,
  output fix_t       dw
);

  fix_t rom [LUT_DT_BINS * LUT_W_LVLS];

  for (genvar b = 0; b < LUT_DT_BINS; b++) begin : g_bin
    for (genvar l = 0; l < LUT_W_LVLS; l++) begin : g_lvl
      assign rom[b * LUT_W_LVLS + l] = stdp_entry(b, l);
    end
  end

  always_comb begin
    if (int'(level) < LUT_W_LVLS) dw = rom[int'(bin) * LUT_W_LVLS + int'(level)];
    else dw = '0;
  end

endmodule
