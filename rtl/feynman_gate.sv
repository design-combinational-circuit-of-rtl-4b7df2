// feynman_gate: the 2x2 reversible Feynman (controlled-NOT) gate.
//   p = a, q = a ^ b
// Used to invert the B operand of the adder/subtractor under the mode line,
// and to build XOR sums and line copies in the decoder and encoder. Purely
// combinational. Every use of this gate is this design's choice: the
// published units that use it give only their names and cost figures.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  always_comb begin
    p = a;
    q = a ^ b;
  end
endmodule
