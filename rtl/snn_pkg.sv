// snn_pkg: types and constants shared by the context-dependent learning SNN.
//
// All neuron voltages, activities and synaptic weights are 32-bit signed
// fixed-point numbers with 16 fractional bits (Q16.16): 1.0 is 65536. The
// 32-bit word width follows the design's choice of 32-bit arithmetic; the
// split into integer and fraction bits is this implementation's choice.
//
// The network has 6 sensory neurons (context A/B, item X/Y, position 1/2),
// 8 hippocampal neurons and 2 motor neurons (dig, move): 16 neurons,
// 6x8 + 8x2 = 64 excitatory plastic synapses and 8x7 + 2x1 = 58 static
// inhibitory synapses. Neurons are numbered 0..5 sensory, 6..13 hippocampal,
// 14 dig, 15 move.
//
// The STDP look-up table (16 spike-time bins x 10 weight levels) is computed
// here from a closed form, so no data file is needed:
//   dt > 0 (pre before post):  dw = +A_P * (1 - w) * exp(-dt / TAU)
//   dt < 0 (post before pre):  dw = -A_M *  w      * exp(-|dt| / TAU)
// Bins 0..7 cover dt = +1..+40 ticks and bins 8..15 cover dt = -1..-40 ticks,
// 5 ticks wide; each entry is evaluated at the bin centre and at the centre
// of weight level l, w = (l + 0.5) / 10, with one tick taken as 1 ms.
// A_P = 0.056 and TAU = 10 ticks reproduce the published potentiation curve
// (about 0.05 at w = 0.1, 0.028 at w = 0.5, 0.005 at w = 0.9). The published
// depression is about three times weaker (A_M near 0.019); with that value
// this network does not learn the task, so A_M = A_P is used here.
package snn_pkg;

  localparam int unsigned DATA_W = 32;
  localparam int unsigned FRAC_W = 16;
  typedef logic signed [DATA_W-1:0] fix_t;

  localparam fix_t FIX_ONE = 32'sd65536;

  // Network shape.
  localparam int unsigned N_IN   = 6;
  localparam int unsigned N_HID  = 8;
  localparam int unsigned N_OUT  = 2;
  localparam int unsigned N_NEU  = N_IN + N_HID + N_OUT;        // 16
  localparam int unsigned N_EXC  = N_IN * N_HID + N_HID * N_OUT; // 64
  localparam int unsigned N_INH  = N_HID * (N_HID - 1) + N_OUT * (N_OUT - 1); // 58
  localparam int unsigned HID_BASE = N_IN;          // 6
  localparam int unsigned OUT_BASE = N_IN + N_HID;  // 14
  localparam int unsigned DIG_IDX  = OUT_BASE;      // 14
  localparam int unsigned MOVE_IDX = OUT_BASE + 1;  // 15

  // Neuron constants (Q16.16).
  localparam fix_t V_TH     = 32'sd65536;  // 1.0
  localparam fix_t V_RESET  = 32'sd0;      // 0.0
  localparam fix_t V_LEAK   = 32'sd655;    // ~0.01 per tick
  localparam fix_t V_SENS   = 32'sd16384;  // 0.25: drive of an active sensory neuron
  localparam fix_t V_UP     = 32'sd16384;  // 0.25: WTA pull-up of the winner
  localparam fix_t V_DOWN   = 32'sd0;      // WTA pull-down of the others
  localparam fix_t V_REPLAY = 32'sd73728;  // 1.125: forces a spike in one tick
  localparam fix_t W_INH    = FIX_ONE;     // inhibitory weight, W = 1

  // Spike-age counters: ticks since the neuron's last spike, saturating.
  localparam int unsigned AGE_W   = 8;
  localparam logic [AGE_W-1:0] AGE_MAX = '1;

  // STDP look-up table.
  localparam int unsigned LUT_DT_BINS = 16;
  localparam int unsigned LUT_W_LVLS  = 10;
  localparam int unsigned LUT_HALF    = LUT_DT_BINS / 2;   // 8 bins per sign
  localparam int unsigned BIN_TICKS   = 5;
  localparam int unsigned STDP_WINDOW = LUT_HALF * BIN_TICKS; // 40 ticks
  localparam int STDP_A_P = 3670;   // 0.056 in Q16.16
  localparam int STDP_A_M = 3670;   // 0.056 in Q16.16
  localparam int STDP_E0  = 51039;  // exp(-0.5*BIN_TICKS/TAU), TAU = 10 ticks
  localparam int STDP_R   = 39750;  // exp(-BIN_TICKS/TAU)

  // Entry of the STDP table for spike-time bin b and weight level l.
  function automatic fix_t stdp_entry(int b, int l);
    longint e, wl, amp;
    e = longint'(STDP_E0);
    for (int k = 0; k < (b % LUT_HALF); k++) e = (e * STDP_R) >>> 16;
    wl = ((2 * l + 1) * 65536) / (2 * LUT_W_LVLS);
    if (b < LUT_HALF) begin
      amp = (STDP_A_P * (65536 - wl)) >>> 16;
      return fix_t'((amp * e) >>> 16);
    end else begin
      amp = (STDP_A_M * wl) >>> 16;
      return fix_t'(-((amp * e) >>> 16));
    end
  endfunction

  // Excitatory synapse k: presynaptic and postsynaptic neuron numbers.
  // k = i*N_HID + j for sensory i -> hippocampal j (k < 48),
  // k = 48 + i*N_OUT + j for hippocampal i -> motor j.
  function automatic int exc_pre(int k);
    if (k < N_IN * N_HID) return k / N_HID;
    return HID_BASE + (k - N_IN * N_HID) / N_OUT;
  endfunction

  function automatic int exc_post(int k);
    if (k < N_IN * N_HID) return HID_BASE + k % N_HID;
    return OUT_BASE + (k - N_IN * N_HID) % N_OUT;
  endfunction

  // Network phases, as reported by the scheduler.
  typedef enum logic [2:0] {
    PH_IDLE   = 3'd0,
    PH_INIT   = 3'd1,
    PH_WAIT   = 3'd2,
    PH_BEHAV  = 3'd3,
    PH_MOVE   = 3'd4,
    PH_RSTART = 3'd5,
    PH_REPLAY = 3'd6
  } phase_t;

  // Saturate a wide signed value to a Q16.16 word.
  function automatic fix_t sat32(longint v);
    if (v > 64'sd2147483647) return 32'sh7fffffff;
    if (v < -64'sd2147483648) return 32'sh80000000;
    return fix_t'(v);
  endfunction

endpackage
