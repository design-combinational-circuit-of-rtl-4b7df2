// tb_ras: exhaustive check of the 4-bit reversible adder/subtractor. For
// every a, b and mode: sub = 0 gives {cout, s} = a + b; sub = 1 gives
// s = a - b (mod 16) with cout = 1 exactly when a >= b (no borrow).
// Watchdog: fails the run after 10 us.
module tb_ras;
  timeunit 1ns; timeprecision 1ps;
  import rev_pkg::*;
  int checks = 0, failures = 0;
  logic [ADD_W-1:0] a, b, s;
  logic sub, cout;
  logic [2*ADD_W-1:0] garbage;
  int exp_s, exp_c;

  ras dut (.*);

  initial begin
    for (int v = 0; v < (1 << (2 * ADD_W + 1)); v++) begin
      {sub, a, b} = (2 * ADD_W + 1)'(v);
      #1;
      if (!sub) begin
        exp_s = (int'(a) + int'(b)) % 16;
        exp_c = (int'(a) + int'(b)) / 16;
      end else begin
        exp_s = (int'(a) - int'(b) + 16) % 16;
        exp_c = (a >= b) ? 1 : 0;
      end
      checks++;
      if (int'(s) != exp_s || int'(cout) != exp_c) begin
        failures++;
        $display("FAIL sub=%b a=%0d b=%0d -> s=%0d cout=%b", sub, a, b, s, cout);
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
