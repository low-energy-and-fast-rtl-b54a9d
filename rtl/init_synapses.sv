// init_synapses: random initial values of the excitatory weights.
//
// On a start pulse from the scheduler it writes all N_SYN excitatory
// weights, N_LFSR at a time, each lane taking its random number from its own
// LFSR. A weight is the low 16 bits of the LFSR state used as a fraction,
// i.e. a value in [0, 1), shifted right by INIT_SHIFT to make it smaller.
// The seeds, the lane count and INIT_SHIFT = 0 are this implementation's
// choices. The inhibitory weights are fixed at 1 and need no initialisation.
//
// Interface: start pulse in; group write port (wr_en, wr_base, wr_data) to
// synapses_block; done pulses once all weights are written.
// Timing: N_SYN / N_LFSR write cycles (16), done in the cycle after the last.
module init_synapses
  import snn_pkg::*;
#(
  parameter int unsigned N_SYN      = N_EXC,
  parameter int unsigned N_LFSR     = 4,
  parameter int unsigned INIT_SHIFT = 0,
  parameter logic [31:0] SEED_BASE  = 32'h1234_5679
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            start,
  output logic                            wr_en,
  output logic [$clog2(N_SYN/N_LFSR)-1:0] wr_base,
  output fix_t                            wr_data [N_LFSR],
  output logic                            done
);

  localparam int unsigned N_GRP = N_SYN / N_LFSR;

  logic        busy;
  logic [31:0] rnd [N_LFSR];

  for (genvar k = 0; k < N_LFSR; k++) begin : g_lfsr
    lfsr u_lfsr (
      .clk   (clk),
      .rst_n (rst_n),
      .load  (start),
      .seed  (SEED_BASE ^ (32'h9E37_79B9 * (k + 1))),
      .en    (busy),
      .q     (rnd[k])
    );
    assign wr_data[k] = fix_t'({16'd0, rnd[k][15:0]} >> INIT_SHIFT);
  end

  assign wr_en = busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      wr_base <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy    <= 1'b1;
        wr_base <= '0;
      end else if (busy) begin
        if (int'(wr_base) == N_GRP - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          wr_base <= wr_base + 1'b1;
        end
      end
    end
  end

endmodule
