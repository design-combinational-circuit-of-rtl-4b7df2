// r_gate: a 3x3 reversible selection gate, used as the R gate of the
// multiplexer and demultiplexer.
//   p = s                  (select passes through)
//   q = s ? i0 : i1        (the input not chosen)
//   r = s ? i1 : i0        (the chosen input)
// It is a controlled swap with the select on p, so it is its own inverse.
// As a 2:1 multiplexer r is the output and q a garbage line; with i1 tied to
// 0 it is a 1:2 demultiplexer (q = s & i0, r = ~s & i0). The exact equations
// of the R gate are this design's choice: only its use as the 2:1 selecting
// cell of a reversible 4x1 multiplexer, with no constant inputs, is given.
// Purely combinational.
module r_gate (
  input  logic s,
  input  logic i0,
  input  logic i1,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = s;
    q = s ? i0 : i1;
    r = s ? i1 : i0;
  end
endmodule
