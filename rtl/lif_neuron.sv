// lif_neuron: multiplier-free leaky integrate-and-fire neuron.
//
// Each enabled tick the membrane follows the approximated LIF update
//   Vm[n+1] = Vm[n] + V[n] - V_leak
// built, as in the neuron's block diagram, from one adder (V[n] - V_leak)
// and one accumulator. When the new value exceeds V_th the neuron fires and
// the membrane is set to V_reset. Holding the membrane at V_reset when the
// sum would fall below it is this implementation's choice (the model has no
// lower bound), as are the synchronous clear and the enable.
//
// Interface: v_in is the input voltage V[n]; clr loads V_reset; en advances
// one time step. Timing: one tick per enabled clock; spike is registered and
// high for exactly one cycle, the cycle after the update that crossed V_th.
module lif_neuron
  import snn_pkg::*;
#(
  parameter fix_t P_V_TH    = V_TH,
  parameter fix_t P_V_RESET = V_RESET,
  parameter fix_t P_V_LEAK  = V_LEAK
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic en,
  input  fix_t v_in,
  output fix_t vm,
  output logic spike
);

  logic signed [DATA_W+1:0] add_out, acc_out;

  always_comb begin
    add_out = {{2{v_in[DATA_W-1]}}, v_in} - {{2{P_V_LEAK[DATA_W-1]}}, P_V_LEAK};
    acc_out = {{2{vm[DATA_W-1]}}, vm} + add_out;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vm    <= P_V_RESET;
      spike <= 1'b0;
    end else if (clr) begin
      vm    <= P_V_RESET;
      spike <= 1'b0;
    end else if (en) begin
      if (acc_out > signed'({{2{P_V_TH[DATA_W-1]}}, P_V_TH})) begin
        vm    <= P_V_RESET;
        spike <= 1'b1;
      end else begin
        spike <= 1'b0;
        if (acc_out < signed'({{2{P_V_RESET[DATA_W-1]}}, P_V_RESET})) vm <= P_V_RESET;
        else vm <= acc_out[DATA_W-1:0];
      end
    end else begin
      spike <= 1'b0;
    end
  end

endmodule
