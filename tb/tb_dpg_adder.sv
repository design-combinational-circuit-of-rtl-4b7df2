// tb_dpg_adder: exhaustive check of the 4-bit DPG ripple adder (default
// N = 4): all 512 combinations of a, b and cin against {cout, sum} =
// a + b + cin. Watchdog: fails the run after 10 us.
module tb_dpg_adder;
  timeunit 1ns; timeprecision 1ps;
  localparam int unsigned N = 4;
  int checks = 0, failures = 0;
  logic [N-1:0] a, b, sum;
  logic cin, cout;
  logic [2*N-1:0] garbage;
  logic [N:0] expect_v;

  dpg_adder dut (.*);

  initial begin
    for (int v = 0; v < (1 << (2 * N + 1)); v++) begin
      {cin, a, b} = (2 * N + 1)'(v);
      #1;
      expect_v = (N + 1)'(a) + (N + 1)'(b) + (N + 1)'(cin);
      checks++;
      if ({cout, sum} !== expect_v) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%b -> %0d, expected %0d", a, b, cin, {cout, sum}, expect_v);
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
