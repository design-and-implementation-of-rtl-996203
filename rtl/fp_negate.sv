// fp_negate: the "Negation" box of the activation functions. Returns -a for an
// IEEE-754 single-precision float by inverting the sign bit. Combinational,
// zero latency (the published neuron latencies leave no cycle for it).
module fp_negate (
  input  logic [31:0] a,
  output logic [31:0] y
);
  assign y = {~a[31], a[30:0]};
endmodule
