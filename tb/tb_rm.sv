// tb_rm: exhaustive check of the 5x5 signed reversible multiplier: all 1024
// pairs of two's-complement x, y in [-16, 15] against the integer product,
// including the extreme case -16 * -16 = 256. Watchdog: fails the run after
// 10 us.
module tb_rm;
  timeunit 1ns; timeprecision 1ps;
  import rev_pkg::*;
  int checks = 0, failures = 0;
  logic signed [MUL_W-1:0] x, y;
  logic signed [MUL_PW-1:0] prod;
  logic [MUL_GW-1:0] garbage;
  int e;

  rm dut (.*);

  initial begin
    for (int v = 0; v < (1 << (2 * MUL_W)); v++) begin
      {x, y} = (2 * MUL_W)'(v);
      #1;
      e = int'(x) * int'(y);
      checks++;
      if (int'(prod) != e) begin
        failures++;
        $display("FAIL %0d * %0d = %0d, got %0d", x, y, e, prod);
      end
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
