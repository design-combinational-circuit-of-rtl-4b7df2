// rm: 5x5 signed (two's-complement) reversible multiplier (RM).
// prod = x * y as a 10-bit two's-complement number.
// Two steps, both purely combinational: rm_pp forms all 25 partial products
// at once with Toffoli gates (Baugh-Wooley: the sign-row and sign-column
// terms are complemented), and rm_moa adds them column by column with double
// Peres gates and Peres gates. Garbage: 36 lines from the adder array
// (garbage[35:0]), then the 5 X lines and 5 Y lines of the Toffoli array
// (garbage[40:36] and garbage[45:41]). The unit has 46 constant inputs and
// 46 garbage outputs, 10 inputs and 10 result bits. The two-step structure
// and these counts follow the published multiplier; the garbage order is
// this design's choice.
module rm
  import rev_pkg::*;
(
  input  logic signed [MUL_W-1:0]  x,
  input  logic signed [MUL_W-1:0]  y,
  output logic signed [MUL_PW-1:0] prod,
  output logic [MUL_GW-1:0]        garbage
);
  logic [MUL_W-1:0][MUL_W-1:0] pp;

  rm_pp #(.W(MUL_W)) u_pp (
    .x(x), .y(y), .pp(pp),
    .gx(garbage[MOA_GW +: MUL_W]), .gy(garbage[MOA_GW + MUL_W +: MUL_W])
  );

  rm_moa u_moa (.pp(pp), .prod(prod), .garbage(garbage[MOA_GW-1:0]));
endmodule
