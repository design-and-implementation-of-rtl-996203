// fixed_add: the "Fixed Adder" of the exponent calculator, a W-bit two's
// complement adder (wrap-around, no saturation; the 2-bit extension in front
// of it leaves enough headroom). Combinational: the published latencies leave
// no cycle for the fixed adders, which is also why the LogSig neurons, with
// two of them in cascade, have the longer clock period.
module fixed_add #(
  parameter int unsigned W = 20
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] y
);
  assign y = a + b;
endmodule
