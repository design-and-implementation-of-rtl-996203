// neuron_pkg: shared types, constants and latency arithmetic of the neuron
// datapath. All arithmetic between units is IEEE-754 single precision
// (32-bit float); the exponent calculator works in fixed point.
//
// Latencies: multiplier 8 and adder 12 cycles are the published values of the
// floating-point units. The remaining numbers (divider 28, float-to-fixed 6,
// CORDIC 22, fixed-to-float 6, negation and fixed adders 0) are this design's
// choice, picked so that the neuron latencies add up exactly to the published
// per-neuron latencies (62..138 cycles).
package neuron_pkg;

  typedef logic [31:0] float_t;

  typedef enum logic [1:0] {
    RADBAS = 2'd0,   // f(x) = exp(-x^2)
    LOGSIG = 2'd1,   // f(x) = 1/(1+exp(-x))
    TANSIG = 2'd2    // f(x) = 2/(1+exp(-2x)) - 1
  } act_e;

  localparam float_t FP_ONE     = 32'h3F80_0000;  //  1.0f
  localparam float_t FP_TWO     = 32'h4000_0000;  //  2.0f
  localparam float_t FP_MIN_ONE = 32'hBF80_0000;  // -1.0f
  localparam float_t FP_QNAN    = 32'h7FC0_0000;

  localparam int unsigned MUL_LAT = 8;
  localparam int unsigned ADD_LAT = 12;
  localparam int unsigned DIV_LAT = 28;
  localparam int unsigned F2X_LAT = 6;
  localparam int unsigned X2F_LAT = 6;
  localparam int unsigned CORDIC_ITER = 18;
  // one input register, ITER + 2 repeated iterations, one output register
  localparam int unsigned CORDIC_LAT = CORDIC_ITER + 4;

  // Fixed-point formats around the CORDIC
  localparam int unsigned PHASE_W    = 18;  // float-to-fixed output: s.2.15
  localparam int unsigned PHASE_FRAC = 15;
  localparam int unsigned TRIG_W     = 18;  // CORDIC outputs: s.1.16
  localparam int unsigned TRIG_FRAC  = 16;
  localparam int unsigned EXP_W      = 20;  // after 2-bit extension: s.3.16
  localparam int unsigned EXP_FRAC   = 16;

  localparam int unsigned EXP_LAT = F2X_LAT + CORDIC_LAT;  // fixed adder adds no cycle

  // Number of adder levels needed for n terms
  function automatic int unsigned clog2_terms(input int unsigned n);
    int unsigned l = 0;
    int unsigned c = n;
    while (c > 1) begin
      c = (c + 1) / 2;
      l++;
    end
    return l;
  endfunction

  function automatic int unsigned sum_latency(input int unsigned n_inputs, input bit bias);
    return MUL_LAT + ADD_LAT * clog2_terms(n_inputs + (bias ? 1 : 0));
  endfunction

  function automatic int unsigned act_latency(input act_e act);
    case (act)
      RADBAS:  return MUL_LAT + EXP_LAT + X2F_LAT;
      LOGSIG:  return EXP_LAT + X2F_LAT + DIV_LAT;
      default: return EXP_LAT + X2F_LAT + MUL_LAT + ADD_LAT + DIV_LAT + ADD_LAT;
    endcase
  endfunction

  function automatic int unsigned neuron_latency(input int unsigned n_inputs, input bit bias,
                                                 input act_e act);
    return sum_latency(n_inputs, bias) + act_latency(act);
  endfunction

endpackage
