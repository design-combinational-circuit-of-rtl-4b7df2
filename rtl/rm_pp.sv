// rm_pp: partial-product generation of the 5x5 signed reversible multiplier,
// a 5x5 array of Toffoli gates (TG) in Baugh-Wooley form.
// Row i handles multiplicand bit x[i], column j multiplier bit y[j]. x[i]
// enters the row at the y[0] end and passes from gate to gate along the row;
// y[j] enters column j at the x[4] row and passes down the column. The TG at
// (i, j) puts x[i]&y[j] ^ k on its target line, with constant k = 1 for the
// sign terms (i = 4 xor j = 4), which gives ~(x[i]&y[j]), and k = 0
// otherwise (including x[4]&y[4]). pp[i][j] has weight 2^(i+j).
// Garbage: the five X lines leaving the rows (gx) and the five Y lines
// leaving the columns (gy). 25 gates, 25 constant inputs. Combinational.
// The grid, its constants and the X/Y routing follow the published array;
// the width parameter W is this design's generalisation (default 5).
module rm_pp #(
  parameter int unsigned W = rev_pkg::MUL_W
) (
  input  logic [W-1:0]          x,
  input  logic [W-1:0]          y,
  output logic [W-1:0][W-1:0]   pp,
  output logic [W-1:0]          gx,
  output logic [W-1:0]          gy
);
  // xl[i][j]: X line entering gate (i, j); yl[i][j]: Y line entering (i, j)
  logic [W-1:0][W:0] xl;
  logic [W:0][W-1:0] yl;

  for (genvar i = 0; i < W; i++) begin : g_row
    assign xl[i][0] = x[i];
    assign gx[i]    = xl[i][W];
  end
  for (genvar j = 0; j < W; j++) begin : g_col_in
    assign yl[W][j] = y[j];
    assign gy[j]    = yl[0][j];
  end

  for (genvar i = 0; i < W; i++) begin : g_r
    for (genvar j = 0; j < W; j++) begin : g_c
      localparam logic K = ((i == W - 1) != (j == W - 1));
      toffoli_gate u_tg (
        .a(xl[i][j]), .b(yl[i+1][j]), .c(K),
        .p(xl[i][j+1]), .q(yl[i][j]), .r(pp[i][j])
      );
    end
  end
endmodule
