// dpg: double Peres gate (DPG), a reversible full adder built from two Peres
// gates, as drawn in the design: the first gate takes (a, b, k) and gives
// (a, a^b, ab^k); the second takes (c, a^b, ab^k) and gives
//   p   = c                        (garbage)
//   sum = a ^ b ^ c
//   cy  = c(a^b) ^ ab ^ k
// With the constant input k = 0, cy is the full-adder carry. With k = 1 it
// is the inverted carry, which the multiplier uses in its top column to add
// the Baugh-Wooley constant 2^(2n-1). ga (the first gate's pass-through of a)
// and p are the two garbage lines. Purely combinational. The two-gate
// structure and its equations are the published ones; bringing k out as a
// port lets the multiplier set it to 1 where its adder array does so.
module dpg (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic k,
  output logic ga,
  output logic p,
  output logic sum,
  output logic cy
);
  logic ab_x, ab_and;

  peres_gate u_pg1 (.a(a), .b(b), .c(k),    .p(ga), .q(ab_x), .r(ab_and));
  peres_gate u_pg2 (.a(c), .b(ab_x), .c(ab_and), .p(p), .q(sum), .r(cy));
endmodule
