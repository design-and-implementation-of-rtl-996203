// logsig_act: LogSig activation, f(x) = 1/(1+exp(-x)), float in, float out.
// Chain: negation (0 cycles), exponent calculator (28), a second fixed adder
// adding the constant 1.0 (0, cascaded after the first), fixed-to-float (6),
// floating divider 1.0f / (1+e^-x) (28): latency 62 cycles, one value per
// cycle. The chain is the published one; accurate for |x| <= pi/4.
module logsig_act
  import neuron_pkg::*;
(
  input  logic   clk,
  input  float_t x,
  output float_t y
);
  localparam logic signed [EXP_W-1:0] FIX_ONE = EXP_W'(1) <<< EXP_FRAC;

  float_t                  nx, den;
  logic signed [EXP_W-1:0] ex, ex1;

  fp_negate      u_neg  (.a(x), .y(nx));
  exp_unit       u_exp  (.clk(clk), .x(nx), .ex(ex));
  fixed_add #(.W(EXP_W)) u_add1 (.a(ex), .b(FIX_ONE), .y(ex1));
  fixed_to_float u_x2f  (.clk(clk), .a(ex1), .y(den));
  fp_div         u_div  (.clk(clk), .a(FP_ONE), .b(den), .y(y));
endmodule
