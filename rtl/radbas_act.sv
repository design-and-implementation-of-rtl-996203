// radbas_act: RadBas activation, f(x) = exp(-x^2), float in, float out.
// Chain: floating multiplier x*x (8 cycles), negation (0), exponent
// calculator (28), fixed-to-float converter (6): latency 42 cycles, one value
// per cycle. The chain is the published one; accurate for x^2 <= pi/4
// (|x| <= 0.886), beyond that the CORDIC leaves its range.
module radbas_act
  import neuron_pkg::*;
(
  input  logic   clk,
  input  float_t x,
  output float_t y
);
  float_t                  sq, nsq;
  logic signed [EXP_W-1:0] ex;

  fp_mul         u_sq  (.clk(clk), .a(x), .b(x), .y(sq));
  fp_negate      u_neg (.a(sq), .y(nsq));
  exp_unit       u_exp (.clk(clk), .x(nsq), .ex(ex));
  fixed_to_float u_x2f (.clk(clk), .a(ex), .y(y));
endmodule
