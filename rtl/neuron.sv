// neuron: one artificial neural cell with N_INPUTS floating-point inputs, an
// optional bias and the activation function ACT (RadBas, LogSig or TanSig).
//
// Initialisation: with shift high, the weights and the bias are fed one per
// clock through weight_in into the serial weight registers (load order: bias
// if BIAS, then W(n-1) down to W0). Operation: a new input set may be given
// on data_in every clock, marked by input_ready. The set flows through the
// multipliers, the adder tree and the activation function; f_out carries the
// result and result_ready is high for exactly one cycle per input set,
// neuron_latency(N_INPUTS, BIAS, ACT) cycles after input_ready was sampled
// (62 .. 138 cycles, equal to the published values). result_ready can drive
// the input_ready of a following neuron.
// The datapath runs freely; only the ready bits are reset (synchronous,
// active high), together with the weight registers.
module neuron
  import neuron_pkg::*;
#(
  parameter int unsigned N_INPUTS = 6,
  parameter bit          BIAS     = 1'b0,
  parameter act_e        ACT      = RADBAS
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   shift,
  input  float_t weight_in,
  input  float_t data_in [N_INPUTS],
  input  logic   input_ready,
  output float_t f_out,
  output logic   result_ready
);
  localparam int unsigned NREG = N_INPUTS + (BIAS ? 1 : 0);
  localparam int unsigned LAT  = neuron_latency(N_INPUTS, BIAS, ACT);

  float_t regs [NREG];
  float_t weights [N_INPUTS];
  float_t bias, sum;

  weight_chain #(.N_REGS(NREG)) u_w (
    .clk(clk), .rst(rst), .shift(shift), .weight_in(weight_in), .regs(regs));

  for (genvar i = 0; i < int'(N_INPUTS); i++) begin : g_w
    assign weights[i] = regs[i];
  end
  assign bias = regs[NREG-1];

  weighted_sum #(.N_INPUTS(N_INPUTS), .BIAS(BIAS)) u_sum (
    .clk(clk), .weights(weights), .bias(bias), .data_in(data_in), .sum(sum));

  if (ACT == RADBAS) begin : g_radbas
    radbas_act u_f (.clk(clk), .x(sum), .y(f_out));
  end else if (ACT == LOGSIG) begin : g_logsig
    logsig_act u_f (.clk(clk), .x(sum), .y(f_out));
  end else begin : g_tansig
    tansig_act u_f (.clk(clk), .x(sum), .y(f_out));
  end

  // ready pipeline: input_ready delayed by the neuron latency
  logic [LAT-1:0] rdy;
  always_ff @(posedge clk) begin
    if (rst) rdy <= '0;
    else     rdy <= {rdy[LAT-2:0], input_ready};
  end
  assign result_ready = rdy[LAT-1];
endmodule
