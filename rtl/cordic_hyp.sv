// cordic_hyp: pipelined hyperbolic CORDIC in rotation mode. From an angle z it
// delivers cosh(z) and sinh(z), whose sum is exp(z).
//
// Each stage i rotates (x, y) by +-atanh(2^-i) towards z = 0:
//   d = sign(z);  x += d*(y >>> i);  y += d*(x >>> i);  z -= d*atanh(2^-i)
// starting from x = 1/K, y = 0, where K is the product of sqrt(1 - 2^-2i)
// over all stages, so that the gain is removed up front. Iterations run
// i = 1 .. ITER with i = 4 and i = 13 executed twice, as hyperbolic CORDIC
// needs for convergence; the result is accurate for |z| < 1.118. The
// published unit is specified for -pi/4 .. pi/4.
//
// Formats: phase s.2.15 (18 bits), cosh/sinh s.1.16 (18 bits), internal
// datapath GW = 24 bits with 20 fraction bits. The atanh constants and 1/K are
// computed at elaboration from their series (no table file).
// Timing: one input register, ITER+2 iteration registers and one output
// register, LATENCY = ITER + 4 cycles (22 by default); one angle per cycle.
// The 18-bit widths are published; iteration count, internal width and
// latency are this design's choices.
module cordic_hyp
  import neuron_pkg::*;
#(
  parameter int unsigned ITER = CORDIC_ITER
) (
  input  logic                     clk,
  input  logic signed [PHASE_W-1:0] phase,
  output logic signed [TRIG_W-1:0]  cosh_o,
  output logic signed [TRIG_W-1:0]  sinh_o
);
  localparam int unsigned NST = ITER + 2;         // stages incl. the two repeats
  localparam int unsigned GW  = 24;
  localparam int unsigned GF  = 20;

  // shift amount of stage s (0-based): 1,2,3,4,4,5,...,13,13,14,...
  function automatic int unsigned stage_shift(input int unsigned s);
    int unsigned i = s + 1;
    if (s >= 4)  i = i - 1;
    if (s >= 14) i = i - 1;
    return i;
  endfunction

  // atanh(t) = t + t^3/3 + t^5/5 + ... for t = 2^-i, i >= 1
  function automatic real atanh_pow2(input int unsigned i);
    real t, t2, term, acc;
    t    = 1.0 / real'(64'd1 << i);
    t2   = t * t;
    term = t;
    acc  = 0.0;
    for (int k = 0; k < 40; k++) begin
      acc  = acc + term / real'(2 * k + 1);
      term = term * t2;
    end
    return acc;
  endfunction

  // 1/K = product over stages of 1/sqrt(1 - 2^-2i); sqrt by Newton iteration
  function automatic real inv_gain(input int unsigned nst);
    real k2, s;
    k2 = 1.0;
    for (int unsigned st = 0; st < nst; st++) begin
      real t;
      t  = 1.0 / real'(64'd1 << stage_shift(st));
      k2 = k2 * (1.0 - t * t);
    end
    s = 1.0;
    for (int n = 0; n < 40; n++) s = 0.5 * (s + k2 / s);
    return 1.0 / s;
  endfunction

  function automatic logic signed [GW-1:0] to_fix(input real v);
    return GW'($rtoi(v * real'(64'd1 << GF) + 0.5));
  endfunction

  localparam logic signed [GW-1:0] X_INIT = to_fix(inv_gain(NST));

  logic signed [GW-1:0] xs [NST+1];
  logic signed [GW-1:0] ys [NST+1];
  logic signed [GW-1:0] zs [NST+1];

  // input register: angle to internal format
  always_ff @(posedge clk) begin
    xs[0] <= X_INIT;
    ys[0] <= '0;
    zs[0] <= GW'(phase) <<< (GF - PHASE_FRAC);
  end

  for (genvar s = 0; s < NST; s++) begin : g_stage
    localparam int unsigned SH = stage_shift(s);
    localparam logic signed [GW-1:0] ATANH = to_fix(atanh_pow2(SH));
    always_ff @(posedge clk) begin
      if (!zs[s][GW-1]) begin
        xs[s+1] <= xs[s] + (ys[s] >>> SH);
        ys[s+1] <= ys[s] + (xs[s] >>> SH);
        zs[s+1] <= zs[s] - ATANH;
      end else begin
        xs[s+1] <= xs[s] - (ys[s] >>> SH);
        ys[s+1] <= ys[s] - (xs[s] >>> SH);
        zs[s+1] <= zs[s] + ATANH;
      end
    end
  end

  // output register: round to s.1.16 and saturate
  function automatic logic signed [TRIG_W-1:0] to_out(input logic signed [GW-1:0] v);
    logic signed [GW-1:0] r;
    localparam int unsigned SH = GF - TRIG_FRAC;
    localparam logic signed [GW-1:0] HI = GW'((1 << (TRIG_W - 1)) - 1);
    localparam logic signed [GW-1:0] LO = -GW'(1 << (TRIG_W - 1));
    r = (v + GW'(1 << (SH - 1))) >>> SH;
    if (r > HI)      return TRIG_W'(HI);
    else if (r < LO) return TRIG_W'(LO);
    else             return TRIG_W'(r);
  endfunction

  always_ff @(posedge clk) begin
    cosh_o <= to_out(xs[NST]);
    sinh_o <= to_out(ys[NST]);
  end
endmodule
