// rencoder: 8-to-3 reversible encoder for a one-hot input.
//   y = k when i == (1 << k)
// Each output bit starts as a constant-0 line and collects, through a chain
// of four Feynman gates, the XOR of the inputs whose index has that bit set
// (y[0]: i1,i3,i5,i7; y[1]: i2,i3,i6,i7; y[2]: i4..i7). For a one-hot input
// the XOR equals the OR of an ordinary encoder. An all-zero or multi-hot
// input gives the XOR of the indices' bits, not a priority code. The eight
// input lines leave unchanged as garbage g[7:0]. 12 gates, 3 constant
// inputs. The structure is this design's choice: only the name and cost
// figures of a reversible encoder are given. Purely combinational.
module rencoder
  import rev_pkg::*;
(
  input  logic [7:0]        i,
  output logic [2:0]        y,
  output logic [ENC_GW-1:0] g
);
  // acc[b][n]: output line b after n Feynman gates of its chain
  // ln[k][b]:  input line k entering the chain of output bit b
  logic [2:0][4:0] acc;
  logic [7:0][3:0] ln;

  for (genvar k = 0; k < 8; k++) begin : g_in
    assign ln[k][0] = i[k];
  end

  for (genvar b = 0; b < 3; b++) begin : g_bit
    assign acc[b][0] = 1'b0;
    assign y[b]      = acc[b][4];
    for (genvar k = 0; k < 8; k++) begin : g_line
      if (((k >> b) & 1) == 1) begin : g_use
        localparam int N = (k >> (b + 1)) * (1 << b) + (k % (1 << b));
        feynman_gate u_fg (.a(ln[k][b]), .b(acc[b][N]),
                           .p(ln[k][b+1]), .q(acc[b][N+1]));
      end else begin : g_pass
        assign ln[k][b+1] = ln[k][b];
      end
    end
  end

  for (genvar k = 0; k < 8; k++) begin : g_out
    assign g[k] = ln[k][3];
  end
endmodule
