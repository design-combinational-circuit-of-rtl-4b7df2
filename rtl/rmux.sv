// rmux: 4x1 reversible multiplexer (RMUX) of three R gates, no constant
// inputs and five garbage lines.
//   y = i[s]
// Gate 1 (select s[0]) picks between i[0] and i[1] and passes s[0] on to
// gate 2, which picks between i[2] and i[3] with the same select. Gate 3
// (select s[1]) picks between the two results. Garbage, in the order of the
// drawn circuit: g[0] = gate-1 unchosen input, g[1] = s[0] leaving gate 2,
// g[2] = gate-2 unchosen input, g[3] = s[1] leaving gate 3, g[4] = gate-3
// unchosen input. Purely combinational, three gate levels deep.
// The three-gate structure and the five garbage lines follow the published
// circuit; the equations of the R gate are this design's (see r_gate).
module rmux
  import rev_pkg::*;
(
  input  logic [3:0]        i,
  input  logic [1:0]        s,
  output logic              y,
  output logic [MUX_GW-1:0] g
);
  logic s0_fwd, m01, m23;

  r_gate u_r1 (.s(s[0]),   .i0(i[0]), .i1(i[1]), .p(s0_fwd), .q(g[0]), .r(m01));
  r_gate u_r2 (.s(s0_fwd), .i0(i[2]), .i1(i[3]), .p(g[1]),   .q(g[2]), .r(m23));
  r_gate u_r3 (.s(s[1]),   .i0(m01),  .i1(m23),  .p(g[3]),   .q(g[4]), .r(y));
endmodule
