// tb_rm_pp: exhaustive check of the 5x5 Toffoli partial-product array: for
// all 1024 (x, y), pp[i][j] must be x[i]&y[j], complemented when exactly one
// of i, j is 4, and the X and Y lines must leave the array unchanged.
// Watchdog: fails the run after 10 us.
module tb_rm_pp;
  timeunit 1ns; timeprecision 1ps;
  import rev_pkg::*;
  int checks = 0, failures = 0;
  logic [MUL_W-1:0] x, y, gx, gy;
  logic [MUL_W-1:0][MUL_W-1:0] pp;
  logic e;

  rm_pp dut (.*);

  initial begin
    for (int v = 0; v < (1 << (2 * MUL_W)); v++) begin
      {x, y} = (2 * MUL_W)'(v);
      #1;
      for (int i = 0; i < MUL_W; i++)
        for (int j = 0; j < MUL_W; j++) begin
          e = x[i] & y[j];
          if ((i == MUL_W - 1) != (j == MUL_W - 1)) e = ~e;
          checks++;
          if (pp[i][j] !== e) begin
            failures++;
            $display("FAIL x=%b y=%b pp[%0d][%0d]=%b", x, y, i, j, pp[i][j]);
          end
        end
      checks++;
      if (gx !== x || gy !== y) begin failures++; $display("FAIL garbage lines"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
