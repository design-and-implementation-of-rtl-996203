// fp_add: pipelined IEEE-754 single-precision adder, y = a + b.
// Used for the adder tree of the neuron and for the +1.0 and -1.0 steps of
// TanSig. Latency LATENCY cycles (12, the published value), one new operand
// pair per cycle, same timing convention as fp_mul.
// Arithmetic (this design's choice): the smaller operand is aligned into a
// 50-bit field with a sticky bit, added or subtracted, normalised with a
// leading-one search and rounded to nearest even. Subnormals are flushed to
// zero, overflow gives infinity, inf-inf and NaN give 0x7FC00000. An exact
// zero sum is +0 (except -0 + -0).
module fp_add
  import neuron_pkg::*;
#(
  parameter int unsigned LATENCY = ADD_LAT
) (
  input  logic   clk,
  input  float_t a,
  input  float_t b,
  output float_t y
);
  float_t r;

  always_comb begin
    logic        a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
    logic        swap;
    float_t      big, sml;
    logic [7:0]  d;
    logic [49:0] fb, fs_full, fs;
    logic        sticky_in;
    logic [50:0] sum;
    int          pos;
    logic [50:0] nrm;
    logic [22:0] frac;
    logic        g, st, up;
    logic [24:0] mr;
    logic signed [10:0] e;

    a_nan  = (a[30:23] == 8'hFF) && (a[22:0] != 0);
    b_nan  = (b[30:23] == 8'hFF) && (b[22:0] != 0);
    a_inf  = (a[30:23] == 8'hFF) && (a[22:0] == 0);
    b_inf  = (b[30:23] == 8'hFF) && (b[22:0] == 0);
    a_zero = (a[30:23] == 8'h00);
    b_zero = (b[30:23] == 8'h00);

    swap = (b[30:0] > a[30:0]);
    big  = swap ? b : a;
    sml  = swap ? a : b;
    d    = big[30:23] - sml[30:23];

    fb      = {1'b1, big[22:0], 26'd0};
    fs_full = {1'b1, sml[22:0], 26'd0};
    if (d > 8'd49) begin
      fs        = '0;
      sticky_in = 1'b1;
    end else begin
      fs        = fs_full >> d;
      sticky_in = |(fs_full & ((50'd1 << d) - 50'd1));
    end
    fs[0] = fs[0] | sticky_in;

    if (big[31] == sml[31]) sum = {1'b0, fb} + {1'b0, fs};
    else                    sum = {1'b0, fb} - {1'b0, fs};

    pos = 0;
    for (int i = 0; i <= 50; i++) if (sum[i]) pos = i;
    nrm  = sum << (50 - pos);
    frac = nrm[49:27];
    g    = nrm[26];
    st   = |nrm[25:0];
    up   = g & (st | frac[0]);
    mr   = {2'b01, frac} + 25'(up);
    e    = 11'(signed'({3'b0, big[30:23]})) + 11'(pos) - 11'sd49;
    if (mr[24]) e = e + 11'sd1;

    if (a_nan || b_nan || (a_inf && b_inf && (a[31] != b[31]))) r = FP_QNAN;
    else if (a_inf)            r = a;
    else if (b_inf)            r = b;
    else if (a_zero && b_zero) r = {a[31] & b[31], 31'd0};
    else if (a_zero)           r = b;
    else if (b_zero)           r = a;
    else if (sum == '0)        r = 32'd0;
    else if (e >= 11'sd255)    r = {big[31], 8'hFF, 23'd0};
    else if (e <= 11'sd0)      r = {big[31], 31'd0};
    else                       r = {big[31], e[7:0], mr[24] ? mr[23:1] : mr[22:0]};
  end

  delay_unit #(.W(32), .DEPTH(LATENCY)) u_pipe (.clk(clk), .d(r), .q(y));
endmodule
