// toffoli_gate: the 3x3 reversible Toffoli gate (TG).
//   p = a, q = b, r = (a & b) ^ c
// With c = 0 the target line r carries a & b; with c = 1 it carries
// ~(a & b). The multiplier's partial-product array uses both forms: plain
// terms x_i*y_j and the complemented sign terms of the Baugh-Wooley scheme.
// a and b pass through unchanged so that X can run along a row and Y down a
// column of the array. Purely combinational. Its use with constants 0 and
// 1 follows the published partial-product array.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = b;
    r = (a & b) ^ c;
  end
endmodule
