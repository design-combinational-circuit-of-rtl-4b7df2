// ras: reversible N-bit adder/subtractor (RAS), N = 4 by default.
// sub = 0: {cout, s} = a + b.
// sub = 1: {cout, s} = a + ~b + 1 = a - b; cout = 1 means no borrow (a >= b
//          unsigned), and s is the two's-complement difference.
// The mode line runs through a chain of N Feynman gates, one per bit, that
// turn b[i] into b[i] ^ sub; the mode line leaving the chain then enters the
// first double Peres gate as the carry-in. The sum itself is the N-DPG ripple
// adder. The DPG ripple adder is the design's; the Feynman-gate
// complementing and the use of the mode line as carry-in are this design's
// choice, since only the name "adder/subtractor" is given for that part.
// Garbage: the 2N garbage lines of the ripple adder. Purely combinational.
module ras #(
  parameter int unsigned N = rev_pkg::ADD_W
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic           sub,
  output logic [N-1:0]   s,
  output logic           cout,
  output logic [2*N-1:0] garbage
);
  logic [N:0]   mode;
  logic [N-1:0] bx;

  assign mode[0] = sub;

  for (genvar i = 0; i < N; i++) begin : g_inv
    feynman_gate u_fg (.a(mode[i]), .b(b[i]), .p(mode[i+1]), .q(bx[i]));
  end

  dpg_adder #(.N(N)) u_add (
    .a(a), .b(bx), .cin(mode[N]), .sum(s), .cout(cout), .garbage(garbage)
  );
endmodule
