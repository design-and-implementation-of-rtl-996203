// exp_unit: CORDIC-based exponent calculator, e^x = cosh(x) + sinh(x).
// Chain: float-to-fixed (32-bit float -> 18-bit s.2.15), hyperbolic CORDIC
// (18-bit cosh and sinh, s.1.16), a 2-bit sign extension of each to 20 bits
// (s.3.16), and a 20-bit fixed adder. The extension gives the sum room:
// e^(pi/4) = 2.19 does not fit the CORDIC's s.1.16 but fits s.3.16, and so
// does 1 + e^x for the LogSig path. Output is the 20-bit fixed e^x.
// Latency F2X_LAT + CORDIC_LAT = 28 cycles (the adder is combinational), one
// value per cycle. Valid for |x| up to pi/4 as published (the CORDIC reaches
// about 1.118).
module exp_unit
  import neuron_pkg::*;
(
  input  logic                    clk,
  input  float_t                  x,
  output logic signed [EXP_W-1:0] ex
);
  logic signed [PHASE_W-1:0] phase;
  logic signed [TRIG_W-1:0]  ch, sh;
  logic signed [EXP_W-1:0]   ch_ext, sh_ext;

  float_to_fixed u_f2x (.clk(clk), .a(x), .y(phase));

  cordic_hyp u_cordic (.clk(clk), .phase(phase), .cosh_o(ch), .sinh_o(sh));

  // 2-bit extensions: sign extension 18 -> 20 bits, same binary point
  assign ch_ext = EXP_W'(ch);
  assign sh_ext = EXP_W'(sh);

  fixed_add #(.W(EXP_W)) u_add (.a(ch_ext), .b(sh_ext), .y(ex));
endmodule
