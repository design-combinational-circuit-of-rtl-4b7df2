// rm_moa: multi-operand addition (MOA) of the 5x5 Baugh-Wooley partial
// products, built only from double Peres gates (DPG, full adders) and Peres
// gates (PG with constant 0, half adders): 16 DPGs and 4 PGs in four rows.
//
// Column k holds the terms pp[i][j] with i + j = k. Baugh-Wooley needs two
// extra ones, at weights 2^5 and 2^9. The 2^5 one enters a column-5 DPG as a
// constant operand. The 2^9 one comes from the top column-8 DPG, whose
// constant input is 1: its carry output is then inverted, which is the same
// as adding 1 at weight 2^9 modulo 2^10.
//
//   row 1: PG c1, DPG c2..c6          (3:2 reduction of every column)
//   row 2: PG c2, DPG c3, c4, c5, c7
//   row 3: PG c3, DPG c4, c5, c6
//   row 4: PG c4, DPG c5, c6, c7, c8  (carry ripple, final result)
// Carries of row n are added in row n+1, so rows 1-3 are carry-save and row
// 4 is a ripple. prod[0] is pp[0][0], prod[k] for k = 1..4 is the PG sum in
// row k, prod[9:5] come from the row-4 ripple.
// The count of gates in each row follows the drawn structure; the assignment
// of terms to gate inputs is this design's. Garbage: two lines per DPG, one
// per PG (36). Purely combinational.
module rm_moa
  import rev_pkg::*;
(
  input  logic [MUL_W-1:0][MUL_W-1:0] pp,
  output logic [MUL_PW-1:0]           prod,
  output logic [MOA_GW-1:0]           garbage
);
  // row-1 sums (s1_k) and carries (c1_k, weight 2^(k+1)), and so on
  logic s1_2, s1_3, s1_4, s1_5, s1_6;
  logic c1_1, c1_2, c1_3, c1_4, c1_5, c1_6;
  logic s2_3, s2_4, s2_5, s2_7;
  logic c2_2, c2_3, c2_4, c2_5, c2_7;
  logic s3_4, s3_5, s3_6;
  logic c3_3, c3_4, c3_5, c3_6;
  logic c4_4, c4_5, c4_6, c4_7;

  assign prod[0] = pp[0][0];

  // ---- row 1 ----
  peres_gate u_r1_c1 (.a(pp[1][0]), .b(pp[0][1]), .c(1'b0),
                      .p(garbage[0]), .q(prod[1]), .r(c1_1));
  dpg u_r1_c2 (.a(pp[2][0]), .b(pp[1][1]), .c(pp[0][2]), .k(1'b0),
               .ga(garbage[1]), .p(garbage[2]), .sum(s1_2), .cy(c1_2));
  dpg u_r1_c3 (.a(pp[3][0]), .b(pp[2][1]), .c(pp[1][2]), .k(1'b0),
               .ga(garbage[3]), .p(garbage[4]), .sum(s1_3), .cy(c1_3));
  dpg u_r1_c4 (.a(pp[4][0]), .b(pp[3][1]), .c(pp[2][2]), .k(1'b0),
               .ga(garbage[5]), .p(garbage[6]), .sum(s1_4), .cy(c1_4));
  dpg u_r1_c5 (.a(pp[4][1]), .b(pp[3][2]), .c(pp[2][3]), .k(1'b0),
               .ga(garbage[7]), .p(garbage[8]), .sum(s1_5), .cy(c1_5));
  dpg u_r1_c6 (.a(pp[4][2]), .b(pp[3][3]), .c(pp[2][4]), .k(1'b0),
               .ga(garbage[9]), .p(garbage[10]), .sum(s1_6), .cy(c1_6));

  // ---- row 2 ----
  peres_gate u_r2_c2 (.a(s1_2), .b(c1_1), .c(1'b0),
                      .p(garbage[11]), .q(prod[2]), .r(c2_2));
  dpg u_r2_c3 (.a(s1_3), .b(pp[0][3]), .c(c1_2), .k(1'b0),
               .ga(garbage[12]), .p(garbage[13]), .sum(s2_3), .cy(c2_3));
  dpg u_r2_c4 (.a(s1_4), .b(pp[1][3]), .c(pp[0][4]), .k(1'b0),
               .ga(garbage[14]), .p(garbage[15]), .sum(s2_4), .cy(c2_4));
  // the Baugh-Wooley 2^5 constant is the third operand here
  dpg u_r2_c5 (.a(s1_5), .b(pp[1][4]), .c(1'b1), .k(1'b0),
               .ga(garbage[16]), .p(garbage[17]), .sum(s2_5), .cy(c2_5));
  dpg u_r2_c7 (.a(pp[4][3]), .b(pp[3][4]), .c(c1_6), .k(1'b0),
               .ga(garbage[18]), .p(garbage[19]), .sum(s2_7), .cy(c2_7));

  // ---- row 3 ----
  peres_gate u_r3_c3 (.a(s2_3), .b(c2_2), .c(1'b0),
                      .p(garbage[20]), .q(prod[3]), .r(c3_3));
  dpg u_r3_c4 (.a(s2_4), .b(c1_3), .c(c2_3), .k(1'b0),
               .ga(garbage[21]), .p(garbage[22]), .sum(s3_4), .cy(c3_4));
  dpg u_r3_c5 (.a(s2_5), .b(c1_4), .c(c2_4), .k(1'b0),
               .ga(garbage[23]), .p(garbage[24]), .sum(s3_5), .cy(c3_5));
  dpg u_r3_c6 (.a(s1_6), .b(c1_5), .c(c2_5), .k(1'b0),
               .ga(garbage[25]), .p(garbage[26]), .sum(s3_6), .cy(c3_6));

  // ---- row 4: ripple ----
  peres_gate u_r4_c4 (.a(s3_4), .b(c3_3), .c(1'b0),
                      .p(garbage[27]), .q(prod[4]), .r(c4_4));
  dpg u_r4_c5 (.a(s3_5), .b(c3_4), .c(c4_4), .k(1'b0),
               .ga(garbage[28]), .p(garbage[29]), .sum(prod[5]), .cy(c4_5));
  dpg u_r4_c6 (.a(s3_6), .b(c3_5), .c(c4_5), .k(1'b0),
               .ga(garbage[30]), .p(garbage[31]), .sum(prod[6]), .cy(c4_6));
  dpg u_r4_c7 (.a(s2_7), .b(c3_6), .c(c4_6), .k(1'b0),
               .ga(garbage[32]), .p(garbage[33]), .sum(prod[7]), .cy(c4_7));
  // constant input 1: inverted carry = bit 9 plus the 2^9 constant
  dpg u_r4_c8 (.a(pp[4][4]), .b(c2_7), .c(c4_7), .k(1'b1),
               .ga(garbage[34]), .p(garbage[35]), .sum(prod[8]), .cy(prod[9]));
endmodule
