// tansig_act: TanSig activation, f(x) = 2/(1+exp(-2x)) - 1, float in/out.
// Chain: negation (0 cycles), exponent calculator giving e^-x (28),
// fixed-to-float (6), floating multiplier squaring it to e^-2x (8), floating
// adder + 1.0f (12), floating divider 2.0f / . (28), floating adder - 1.0f
// (12): latency 94 cycles, one value per cycle. Squaring e^-x instead of
// computing e^-2x keeps the CORDIC argument at |x| <= pi/4. The chain is the
// published one; the last adder is read as adding -1.0f.
module tansig_act
  import neuron_pkg::*;
(
  input  logic   clk,
  input  float_t x,
  output float_t y
);
  float_t                  nx, e1, e2, den, q;
  logic signed [EXP_W-1:0] ex;

  fp_negate      u_neg  (.a(x), .y(nx));
  exp_unit       u_exp  (.clk(clk), .x(nx), .ex(ex));
  fixed_to_float u_x2f  (.clk(clk), .a(ex), .y(e1));
  fp_mul         u_sq   (.clk(clk), .a(e1), .b(e1), .y(e2));
  fp_add         u_add1 (.clk(clk), .a(FP_ONE), .b(e2), .y(den));
  fp_div         u_div  (.clk(clk), .a(FP_TWO), .b(den), .y(q));
  fp_add         u_add2 (.clk(clk), .a(q), .b(FP_MIN_ONE), .y(y));
endmodule
