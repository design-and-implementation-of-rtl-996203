// weighted_sum: the multiply and add sections of a neuron.
// Each input is multiplied by its weight in its own floating multiplier, then
// the products (and the bias, if BIAS) are summed by a tree of pipelined
// floating adders: at every level neighbouring terms are added in pairs; an
// odd term left over at the end of a level waits in a 12-cycle delay unit so
// that it meets its partner at the next level. The bias register is static
// while the neuron runs, so when the bias is the odd term it goes on without
// a delay unit. For 6 inputs this gives the published tree: adders over
// (I0,I1), (I2,I3), (I4,I5); the (I4,I5) sum waits in the delay unit (no bias)
// or is added to the bias (biased), and a last adder joins the two halves.
// Latency MUL_LAT + ADD_LAT * ceil(log2(N_INPUTS + BIAS)): 20, 32 or 44
// cycles. One input set per cycle.
module weighted_sum
  import neuron_pkg::*;
#(
  parameter int unsigned N_INPUTS = 6,
  parameter bit          BIAS     = 1'b0
) (
  input  logic   clk,
  input  float_t weights [N_INPUTS],
  input  float_t bias,
  input  float_t data_in [N_INPUTS],
  output float_t sum
);
  localparam int unsigned NT   = N_INPUTS + (BIAS ? 1 : 0);
  localparam int unsigned NLEV = clog2_terms(NT);

  // number of terms at level l
  function automatic int unsigned count_at(input int unsigned l);
    int unsigned c = NT;
    for (int unsigned k = 0; k < l; k++) c = (c + 1) / 2;
    return c;
  endfunction

  // index of the first term of level l in the flat node array
  function automatic int unsigned base_at(input int unsigned l);
    int unsigned b = 0;
    for (int unsigned k = 0; k < l; k++) b += count_at(k);
    return b;
  endfunction

  // true if the last term of level l is still the raw bias register
  function automatic bit bias_last(input int unsigned l);
    bit r = BIAS;
    for (int unsigned k = 0; k < l; k++) r = r && (count_at(k) % 2 == 1);
    return r;
  endfunction

  localparam int unsigned NNODE = base_at(NLEV + 1);

  float_t node [NNODE];

  // level 0: products and bias
  for (genvar i = 0; i < int'(N_INPUTS); i++) begin : g_mul
    fp_mul u_mul (.clk(clk), .a(weights[i]), .b(data_in[i]), .y(node[i]));
  end
  if (BIAS) begin : g_bias
    assign node[N_INPUTS] = bias;
  end

  for (genvar l = 0; l < int'(NLEV); l++) begin : g_lvl
    localparam int unsigned C  = count_at(l);
    localparam int unsigned B0 = base_at(l);
    localparam int unsigned B1 = base_at(l + 1);
    for (genvar j = 0; j < int'(C / 2); j++) begin : g_add
      fp_add u_add (.clk(clk), .a(node[B0 + 2*j]), .b(node[B0 + 2*j + 1]), .y(node[B1 + j]));
    end
    if (C % 2 == 1) begin : g_odd
      if (bias_last(l)) begin : g_static
        assign node[B1 + C/2] = node[B0 + C - 1];
      end else begin : g_delay
        delay_unit #(.W(32), .DEPTH(ADD_LAT)) u_dly (
          .clk(clk), .d(node[B0 + C - 1]), .q(node[B1 + C/2]));
      end
    end
  end

  assign sum = node[NNODE - 1];
endmodule
