// tb_rdecoder: exhaustive check of the 3-to-8 reversible decoder: for each
// s, y must be one-hot with bit s set, and the garbage lines must carry
// s[2:1]. Watchdog: 1000 ns.
module tb_rdecoder;
  timeunit 1ns; timeprecision 1ps;
  import rev_pkg::*;
  int checks = 0, failures = 0;
  logic [2:0] s;
  logic [7:0] y;
  logic [DEC_GW-1:0] g;

  rdecoder dut (.*);

  initial begin
    for (int v = 0; v < 8; v++) begin
      s = 3'(v);
      #1;
      checks++;
      if (y !== (8'd1 << s) || g !== s[2:1]) begin
        failures++;
        $display("FAIL s=%0d y=%b g=%b", s, y, g);
      end
    end
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
