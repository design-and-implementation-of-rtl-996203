// fp_div: pipelined IEEE-754 single-precision divider, y = a / b.
// Used as the "Floating Divider" of LogSig (1.0f / (1+e^-x)) and TanSig
// (2.0f / (1+e^-2x)). Latency LATENCY cycles, one new operand pair per cycle.
// The latency of 28 is not published on its own; it is the value that makes
// the LogSig and TanSig neuron latencies come out as published.
// Arithmetic (this design's choice): the 24-bit significands are divided to a
// 27-bit quotient plus remainder (sticky) and rounded to nearest even.
// Subnormals flush to zero, x/0 = infinity, 0/0, inf/inf and NaN give NaN.
module fp_div
  import neuron_pkg::*;
#(
  parameter int unsigned LATENCY = DIV_LAT
) (
  input  logic   clk,
  input  float_t a,
  input  float_t b,
  output float_t y
);
  float_t r;

  always_comb begin
    logic        s;
    logic        a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
    logic [49:0] num;
    logic [49:0] q;
    logic [23:0] rem;
    logic [22:0] frac;
    logic        g, st, up;
    logic [24:0] mr;
    logic signed [10:0] e;

    s      = a[31] ^ b[31];
    a_nan  = (a[30:23] == 8'hFF) && (a[22:0] != 0);
    b_nan  = (b[30:23] == 8'hFF) && (b[22:0] != 0);
    a_inf  = (a[30:23] == 8'hFF) && (a[22:0] == 0);
    b_inf  = (b[30:23] == 8'hFF) && (b[22:0] == 0);
    a_zero = (a[30:23] == 8'h00);
    b_zero = (b[30:23] == 8'h00);

    num = {1'b1, a[22:0], 26'd0};
    q   = num / {26'd0, 1'b1, b[22:0]};
    rem = 24'(num % {26'd0, 1'b1, b[22:0]});
    e   = 11'(signed'({3'b0, a[30:23]})) - 11'(signed'({3'b0, b[30:23]})) + 11'sd127;
    if (q[26]) begin
      frac = q[25:3];
      g    = q[2];
      st   = (|q[1:0]) | (|rem);
    end else begin
      frac = q[24:2];
      g    = q[1];
      st   = q[0] | (|rem);
      e    = e - 11'sd1;
    end
    up = g & (st | frac[0]);
    mr = {2'b01, frac} + 25'(up);
    if (mr[24]) e = e + 11'sd1;

    if (a_nan || b_nan || (a_zero && b_zero) || (a_inf && b_inf)) r = FP_QNAN;
    else if (a_inf || b_zero)  r = {s, 8'hFF, 23'd0};
    else if (a_zero || b_inf)  r = {s, 31'd0};
    else if (e >= 11'sd255)    r = {s, 8'hFF, 23'd0};
    else if (e <= 11'sd0)      r = {s, 31'd0};
    else                       r = {s, e[7:0], mr[24] ? mr[23:1] : mr[22:0]};
  end

  delay_unit #(.W(32), .DEPTH(LATENCY)) u_pipe (.clk(clk), .d(r), .q(y));
endmodule
