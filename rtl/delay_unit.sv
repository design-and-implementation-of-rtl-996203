// delay_unit: a line of DEPTH registers that delays a W-bit word by exactly
// DEPTH clock cycles. In the neuron it balances the adder tree (the odd
// partial sum waits one adder latency, 12 cycles, for its partner); the
// floating-point and conversion units also use it as their pipeline register
// line. DEPTH = 0 is a plain wire. No reset: the data registers carry no
// control meaning, validity is tracked separately by the neuron.
module delay_unit #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 12
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] stage [DEPTH];
    always_ff @(posedge clk) begin
      stage[0] <= d;
      for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
    end
    assign q = stage[DEPTH-1];
  end
endmodule
