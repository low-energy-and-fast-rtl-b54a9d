// lfsr: 32-bit Galois linear feedback shift register.
//
// Random source of the synapse initialisation. Uses the maximal-length
// polynomial x^32 + x^22 + x^2 + x + 1 (taps 0x80200003); polynomial and
// width are this implementation's choice. A zero seed is replaced by 1 so
// the register never locks up.
//
// Interface: load/seed set the state; en shifts once per cycle; q is the
// state. Timing: q changes the cycle after en.
module lfsr #(
  parameter int unsigned W    = 32,
  parameter logic [31:0] TAPS = 32'h8020_0003
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] seed,
  input  logic         en,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= W'(1);
    else if (load) q <= (seed == '0) ? W'(1) : seed;
    else if (en) q <= q[0] ? ((q >> 1) ^ TAPS[W-1:0]) : (q >> 1);
  end

endmodule
