// fixed_to_float: "Fixed to Float Converter" after the exponent calculator.
// Converts a signed IN_W-bit two's complement number with FRAC fraction bits
// (default 20 bits, s.3.16, the output of the fixed adder) into an IEEE-754
// single. IN_W is at most 24, so every value is exact and no rounding is
// needed. Zero gives +0. Latency LATENCY cycles, one conversion per cycle.
// The 20-bit width is the published one; the binary point and latency are
// this design's choices.
module fixed_to_float
  import neuron_pkg::*;
#(
  parameter int unsigned IN_W    = EXP_W,
  parameter int unsigned FRAC    = EXP_FRAC,
  parameter int unsigned LATENCY = X2F_LAT
) (
  input  logic                   clk,
  input  logic signed [IN_W-1:0] a,
  output float_t                 y
);
  if (IN_W > 24) begin : g_check
    $error("fixed_to_float: IN_W must not exceed 24");
  end

  float_t r;

  always_comb begin
    logic [IN_W-1:0] mag;
    logic [23:0]     sig;
    int              pos;

    mag = a[IN_W-1] ? IN_W'(-a) : IN_W'(a);
    pos = 0;
    for (int i = 0; i < int'(IN_W); i++) if (mag[i]) pos = i;
    sig = 24'(mag) << (23 - pos);
    if (mag == '0) r = 32'd0;
    else           r = {a[IN_W-1], 8'(127 + pos - int'(FRAC)), sig[22:0]};
  end

  delay_unit #(.W(32), .DEPTH(LATENCY)) u_pipe (.clk(clk), .d(r), .q(y));
endmodule
