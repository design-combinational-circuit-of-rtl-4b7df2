// tb_rmux: exhaustive check of the 4x1 reversible multiplexer: all 64
// combinations of i and s against y = i[s], and reversibility of the whole
// 6-in/6-out mapping (all 64 output words distinct). Watchdog: 1000 ns.
module tb_rmux;
  timeunit 1ns; timeprecision 1ps;
  import rev_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] i;
  logic [1:0] s;
  logic y;
  logic [MUX_GW-1:0] g;
  logic [63:0] seen;

  rmux dut (.*);

  initial begin
    seen = '0;
    for (int v = 0; v < 64; v++) begin
      {s, i} = 6'(v);
      #1;
      checks++;
      if (y !== i[s]) begin
        failures++;
        $display("FAIL i=%b s=%0d y=%b", i, s, y);
      end
      seen[{g, y}] = 1'b1;
    end
    checks++;
    if (seen !== '1) begin failures++; $display("FAIL not a bijection"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
