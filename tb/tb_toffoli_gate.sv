// tb_toffoli_gate: exhaustive check of the Toffoli gate over all 8 inputs,
// against p = a, q = b, r = ab^c, and of reversibility (all 8 outputs
// distinct). Watchdog: fails the run if it has not ended after 1000 ns.
module tb_toffoli_gate;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic a, b, c, p, q, r;
  logic [7:0] seen;

  toffoli_gate dut (.*);

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({p, q, r} !== {a, b, (a & b) ^ c}) begin
        failures++;
        $display("FAIL in=%03b out=%b%b%b", v[2:0], p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin failures++; $display("FAIL not a bijection"); end
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
