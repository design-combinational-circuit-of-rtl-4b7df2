// tb_rdemux: exhaustive check of the 1x4 reversible demultiplexer: all 8
// combinations of d and s; y must be d on line s and 0 elsewhere, and the
// garbage lines must carry s. Watchdog: 1000 ns.
module tb_rdemux;
  timeunit 1ns; timeprecision 1ps;
  import rev_pkg::*;
  int checks = 0, failures = 0;
  logic d;
  logic [1:0] s;
  logic [3:0] y;
  logic [DEMUX_GW-1:0] g;

  rdemux dut (.*);

  initial begin
    for (int v = 0; v < 8; v++) begin
      {d, s} = 3'(v);
      #1;
      checks++;
      if (y !== (4'(d) << s) || g !== s) begin
        failures++;
        $display("FAIL d=%b s=%0d y=%b g=%b", d, s, y, g);
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
