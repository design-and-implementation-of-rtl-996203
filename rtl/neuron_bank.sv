// neuron_bank: all eighteen neuron variants side by side, every combination
// of activation (RadBas, LogSig, TanSig), input count (2, 4, 6) and bias (no,
// yes). Neuron k = act*6 + n*2 + b, with act 0/1/2 = RadBas/LogSig/TanSig,
// n 0/1/2 = 2/4/6 inputs, b 0/1 = non-biased/biased.
// All neurons share clock, reset, the Weight/Bias bus, the data inputs (a
// 2-input neuron sees data_in[0..1], a 4-input one data_in[0..3]) and
// input_ready; shift[k] loads the weights of neuron k only, so each can hold
// its own weights. f_out[k] and result_ready[k] are neuron k's outputs; their
// latencies differ per variant (62 .. 138 cycles). Grouping the variants in
// one bank is this design's choice; each neuron is self-contained.
module neuron_bank
  import neuron_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   [17:0] shift,
  input  float_t weight_in,
  input  float_t data_in [6],
  input  logic   input_ready,
  output float_t f_out [18],
  output logic   [17:0] result_ready
);
  for (genvar a = 0; a < 3; a++) begin : g_act
    for (genvar n = 0; n < 3; n++) begin : g_n
      for (genvar b = 0; b < 2; b++) begin : g_b
        localparam int   K  = a*6 + n*2 + b;
        localparam int   NI = 2*n + 2;
        localparam act_e AC = act_e'(a);
        float_t din [NI];
        for (genvar i = 0; i < NI; i++) begin : g_in
          assign din[i] = data_in[i];
        end
        neuron #(.N_INPUTS(NI), .BIAS(b[0]), .ACT(AC)) u_neuron (
          .clk(clk), .rst(rst), .shift(shift[K]), .weight_in(weight_in),
          .data_in(din), .input_ready(input_ready),
          .f_out(f_out[K]), .result_ready(result_ready[K]));
      end
    end
  end
endmodule
