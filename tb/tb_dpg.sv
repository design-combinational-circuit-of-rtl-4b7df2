// tb_dpg: exhaustive check of the double Peres gate over all 16 inputs.
// k = 0: {cy, sum} must equal a + b + c (full adder) and p must be c.
// k = 1: cy must be the inverted carry. Also checks that the 4-in/4-out
// mapping is a bijection. Watchdog: fails the run after 1000 ns.
module tb_dpg;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic a, b, c, k, ga, p, sum, cy;
  logic [15:0] seen;
  logic [1:0] total;

  dpg dut (.*);

  initial begin
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      {k, a, b, c} = 4'(v);
      #1;
      total = 2'(a) + 2'(b) + 2'(c);
      checks++;
      if (sum !== total[0] || cy !== (total[1] ^ k) || p !== c || ga !== a) begin
        failures++;
        $display("FAIL k=%b a=%b b=%b c=%b -> ga=%b p=%b sum=%b cy=%b", k, a, b, c, ga, p, sum, cy);
      end
      seen[{ga, p, sum, cy}] = 1'b1;
    end
    checks++;
    if (seen !== 16'hFFFF) begin failures++; $display("FAIL not a bijection"); end
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
