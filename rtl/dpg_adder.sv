// dpg_adder: N-bit reversible ripple-carry adder made of N chained double
// Peres gates (DPG), one per bit.
// Stage 0 takes (a[0], b[0], cin). Every later stage i takes the previous
// stage's carry on its first input, b[i] on its second and a[i] on its third,
// the order in which the chained structure feeds the carry into the next
// gate's first Peres gate. Each DPG's constant input is 0. Outputs:
//   sum[N-1:0], cout (carry of the last stage) and 2N garbage lines
//   (garbage[2i] = first-input pass-through, garbage[2i+1] = third input).
// Purely combinational; the carry ripples through N DPGs. N = 4 by default.
// The chain and the input order follow the published N-bit structure; the
// carry-in port and the garbage order are this design's choice.
module dpg_adder #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic           cin,
  output logic [N-1:0]   sum,
  output logic           cout,
  output logic [2*N-1:0] garbage
);
  logic [N:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_stage
    if (i == 0) begin : g_first
      dpg u_dpg (.a(a[0]), .b(b[0]), .c(carry[0]), .k(1'b0),
                 .ga(garbage[0]), .p(garbage[1]),
                 .sum(sum[0]), .cy(carry[1]));
    end else begin : g_next
      dpg u_dpg (.a(carry[i]), .b(b[i]), .c(a[i]), .k(1'b0),
                 .ga(garbage[2*i]), .p(garbage[2*i+1]),
                 .sum(sum[i]), .cy(carry[i+1]));
    end
  end

  assign cout = carry[N];
endmodule
