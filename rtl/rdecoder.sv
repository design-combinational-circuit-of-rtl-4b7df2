// rdecoder: 3-to-8 reversible decoder (one-hot output).
//   y[k] = (s == k)
// A Feynman gate with a constant 1 on its target turns s[0] into the pair of
// lines (s[0], ~s[0]). Two R gates with select s[1] and a constant 0 split
// those into the four minterms of s[1:0]; four R gates with select s[2] and
// a constant 0 split those into the eight minterms of s[2:0]. The select
// lines are passed from gate to gate; s[1] and s[2] leave the last gate of
// their level as the two garbage lines g[0], g[1]. 7 gates, 7 constant
// inputs. The structure is this design's choice: only the name and cost
// figures of a reversible decoder are given. Purely combinational.
module rdecoder
  import rev_pkg::*;
(
  input  logic [2:0]        s,
  output logic [7:0]        y,
  output logic [DEC_GW-1:0] g
);
  logic       l0, l1;       // ~s[0] and s[0]
  logic [3:0] m;            // minterms of s[1:0]
  logic       s1_fwd;
  logic [4:0] s2_fwd;

  feynman_gate u_fg (.a(s[0]), .b(1'b1), .p(l1), .q(l0));

  r_gate u_l2a (.s(s[1]),   .i0(l0), .i1(1'b0), .p(s1_fwd), .q(m[2]), .r(m[0]));
  r_gate u_l2b (.s(s1_fwd), .i0(l1), .i1(1'b0), .p(g[0]),   .q(m[3]), .r(m[1]));

  assign s2_fwd[0] = s[2];
  for (genvar k = 0; k < 4; k++) begin : g_l3
    r_gate u_r (.s(s2_fwd[k]), .i0(m[k]), .i1(1'b0),
                .p(s2_fwd[k+1]), .q(y[k+4]), .r(y[k]));
  end
  assign g[1] = s2_fwd[4];
endmodule
