// fp_mul: pipelined IEEE-754 single-precision multiplier, y = a * b.
// The neuron uses it for the input*weight products, for x*x in RadBas and for
// squaring exp(-x) in TanSig. Latency is LATENCY cycles (8, the published
// value): the result for operands presented before clock edge t appears after
// edge t+LATENCY-1 and is stable during the following cycle. One new operand
// pair per cycle.
// Arithmetic (this design's choice, the published text only names the format):
// round to nearest even; subnormal inputs and results are flushed to zero;
// overflow gives infinity; NaN, or 0*inf, gives the quiet NaN 0x7FC00000.
// The product is formed in one block of logic and followed by the register
// line; a synthesis tool can retime those registers into the logic.
module fp_mul
  import neuron_pkg::*;
#(
  parameter int unsigned LATENCY = MUL_LAT
) (
  input  logic   clk,
  input  float_t a,
  input  float_t b,
  output float_t y
);
  float_t r;

  always_comb begin
    logic        s;
    logic [7:0]  ea, eb;
    logic [23:0] ma, mb;
    logic [47:0] p;
    logic [22:0] frac;
    logic        g, st, up;
    logic [24:0] mr;
    logic signed [10:0] e;
    logic a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;

    s  = a[31] ^ b[31];
    ea = a[30:23];
    eb = b[30:23];
    ma = {1'b1, a[22:0]};
    mb = {1'b1, b[22:0]};
    a_nan  = (ea == 8'hFF) && (a[22:0] != 0);
    b_nan  = (eb == 8'hFF) && (b[22:0] != 0);
    a_inf  = (ea == 8'hFF) && (a[22:0] == 0);
    b_inf  = (eb == 8'hFF) && (b[22:0] == 0);
    a_zero = (ea == 8'h00);
    b_zero = (eb == 8'h00);

    p = ma * mb;
    if (p[47]) begin
      frac = p[46:24];
      g    = p[23];
      st   = |p[22:0];
      e    = 11'(signed'({3'b0, ea})) + 11'(signed'({3'b0, eb})) - 11'sd126;
    end else begin
      frac = p[45:23];
      g    = p[22];
      st   = |p[21:0];
      e    = 11'(signed'({3'b0, ea})) + 11'(signed'({3'b0, eb})) - 11'sd127;
    end
    up = g & (st | frac[0]);
    mr = {2'b01, frac} + 25'(up);
    if (mr[24]) e = e + 11'sd1;

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) r = FP_QNAN;
    else if (a_inf || b_inf)  r = {s, 8'hFF, 23'd0};
    else if (a_zero || b_zero) r = {s, 31'd0};
    else if (e >= 11'sd255)   r = {s, 8'hFF, 23'd0};
    else if (e <= 11'sd0)     r = {s, 31'd0};
    else                      r = {s, e[7:0], mr[24] ? mr[23:1] : mr[22:0]};
  end

  delay_unit #(.W(32), .DEPTH(LATENCY)) u_pipe (.clk(clk), .d(r), .q(y));
endmodule
