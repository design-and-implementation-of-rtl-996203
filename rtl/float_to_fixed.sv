// float_to_fixed: "Float to Fixed Converter" in front of the CORDIC. Converts
// an IEEE-754 single into a signed OUT_W-bit two's complement number with FRAC
// fraction bits (default 18 bits, s.2.15: range -4 .. +4-2^-15, which covers
// the CORDIC's useful range). The 18-bit width is the published one; the
// binary point, rounding (nearest even) and saturation of out-of-range values
// (including infinities; NaN saturates positive) are this design's choices.
// Latency LATENCY cycles, one conversion per cycle.
module float_to_fixed
  import neuron_pkg::*;
#(
  parameter int unsigned OUT_W   = PHASE_W,
  parameter int unsigned FRAC    = PHASE_FRAC,
  parameter int unsigned LATENCY = F2X_LAT
) (
  input  logic                    clk,
  input  float_t                  a,
  output logic signed [OUT_W-1:0] y
);
  localparam logic [63:0] MAX_POS = (64'd1 << (OUT_W - 1)) - 64'd1;
  localparam logic [63:0] MAX_NEG = (64'd1 << (OUT_W - 1));

  logic signed [OUT_W-1:0] r;

  always_comb begin
    logic [23:0] m;
    int          rs;     // right shift that turns the significand into the fixed value
    logic [63:0] ext;
    logic [63:0] mag;
    logic        g, st, sat;

    m   = {1'b1, a[22:0]};
    rs  = 150 - int'(FRAC) - int'(a[30:23]);
    mag = '0;
    sat = 1'b0;
    ext = '0;
    g   = 1'b0;
    st  = 1'b0;
    r   = '0;
    if (a[30:23] == 8'hFF) begin
      sat = 1'b1;
    end else if (a[30:23] == 8'h00) begin
      mag = '0;
    end else if (rs <= 0) begin
      if (-rs >= 40) sat = 1'b1;
      else           mag = {40'd0, m} << (-rs);
    end else if (rs <= 63) begin
      ext = {m, 40'd0} >> rs;
      g   = ext[39];
      st  = |ext[38:0];
      mag = {40'd0, ext[63:40]};
      mag = mag + {63'd0, g & (st | mag[0])};
    end
    if (a[31] && !(a[30:23] == 8'hFF && a[22:0] != 0)) begin
      if (sat || mag > MAX_NEG) r = OUT_W'(MAX_NEG);        // most negative
      else                      r = OUT_W'(-mag);
    end else begin
      if (sat || mag > MAX_POS) r = OUT_W'(MAX_POS);
      else                      r = OUT_W'(mag);
    end
  end

  delay_unit #(.W(OUT_W), .DEPTH(LATENCY)) u_pipe (.clk(clk), .d(r), .q(y));
endmodule
