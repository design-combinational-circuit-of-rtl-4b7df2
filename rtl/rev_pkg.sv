// rev_pkg: widths shared by the reversible combinational units and their
// testbenches. ADD_W is the 4-bit adder/subtractor width, MUL_W the 5-bit
// signed multiplier operand width (a 5x5 Toffoli partial-product array). The
// garbage widths follow from the gate counts of each unit: every Peres gate
// used as a half adder leaves one garbage line, every double Peres gate two,
// the Toffoli array leaves its five X and five Y lines.
package rev_pkg;
  localparam int unsigned ADD_W      = 4;
  localparam int unsigned MUL_W      = 5;
  localparam int unsigned MUL_PW     = 2 * MUL_W;
  localparam int unsigned MOA_DPG    = 16;
  localparam int unsigned MOA_PG     = 4;
  localparam int unsigned MOA_GW     = 2 * MOA_DPG + MOA_PG;   // 36
  localparam int unsigned PP_GW      = 2 * MUL_W;              // 10
  localparam int unsigned MUL_GW     = MOA_GW + PP_GW;         // 46
  localparam int unsigned MUX_GW     = 5;
  localparam int unsigned DEMUX_GW   = 2;
  localparam int unsigned DEC_GW     = 2;
  localparam int unsigned ENC_GW     = 8;
endpackage
