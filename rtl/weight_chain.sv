// weight_chain: the serially connected weight/bias registers of a neuron.
// While shift is high, every clock moves each register one place on
// (weight_in -> regs[0] -> regs[1] -> ... -> regs[N_REGS-1]); otherwise the
// registers hold. So one Weight/Bias input loads all of them in N_REGS clocks,
// once, while the neuron is initialised: the value shifted in first ends in
// the last register. In a neuron regs[0..n-1] are W0..W(n-1) and, in a biased
// neuron, regs[n] is the bias (this position is this design's choice), so the
// load order is bias, W(n-1), ..., W0. Synchronous active-high reset clears
// all registers to +0.0.
module weight_chain
  import neuron_pkg::*;
#(
  parameter int unsigned N_REGS = 6
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   shift,
  input  float_t weight_in,
  output float_t regs [N_REGS]
);
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(N_REGS); i++) regs[i] <= '0;
    end else if (shift) begin
      regs[0] <= weight_in;
      for (int i = 1; i < int'(N_REGS); i++) regs[i] <= regs[i-1];
    end
  end
endmodule
