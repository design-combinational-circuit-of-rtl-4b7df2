// peres_gate: the 3x3 reversible Peres gate (PG).
//   p = a, q = a ^ b, r = (a & b) ^ c
// With c tied to 0 it is a half adder: q is the sum and r the carry, while p
// is a garbage line. It is the building block of the double Peres gate (full
// adder) and of the half-adder cells of the multiplier's multi-operand adder.
// Purely combinational; the mapping (a,b,c) -> (p,q,r) is a bijection.
// The equations are those of the published two-gate full adder.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = a ^ b;
    r = (a & b) ^ c;
  end
endmodule
