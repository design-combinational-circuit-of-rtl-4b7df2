// rdemux: 1x4 reversible demultiplexer of three R gates, three constant-0
// inputs and two garbage lines.
//   y[k] = d when s == k, else 0
// Gate 1 (select s[0], inputs d and 0) splits d into d&s[0] and d&~s[0].
// Gates 2 and 3 (select s[1], the second fed with s[1] passed on by the
// first) split each of those again. Garbage: g[0] = s[0] leaving gate 1,
// g[1] = s[1] leaving gate 3. The structure is this design's choice; its
// counts (3 gates, 3 constant inputs, 2 garbage lines) agree with the
// published cost figures for the demultiplexer. Purely combinational.
module rdemux
  import rev_pkg::*;
(
  input  logic                d,
  input  logic [1:0]          s,
  output logic [3:0]          y,
  output logic [DEMUX_GW-1:0] g
);
  logic d_s0, d_ns0, s1_fwd;

  r_gate u_r1 (.s(s[0]),   .i0(d),     .i1(1'b0), .p(g[0]),   .q(d_s0), .r(d_ns0));
  r_gate u_r2 (.s(s[1]),   .i0(d_ns0), .i1(1'b0), .p(s1_fwd), .q(y[2]), .r(y[0]));
  r_gate u_r3 (.s(s1_fwd), .i0(d_s0),  .i1(1'b0), .p(g[1]),   .q(y[3]), .r(y[1]));
endmodule
