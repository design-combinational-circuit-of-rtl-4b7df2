// tb_rencoder: checks the 8-to-3 reversible encoder on all eight one-hot
// inputs (y must be the index of the set bit) and on all 256 inputs against
// the XOR of the indices of the set bits, which is what the Feynman-gate
// chains compute; the input lines must leave unchanged as garbage.
// Watchdog: 10 us.
module tb_rencoder;
  timeunit 1ns; timeprecision 1ps;
  import rev_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] i;
  logic [2:0] y, e;
  logic [ENC_GW-1:0] g;

  rencoder dut (.*);

  initial begin
    for (int k = 0; k < 8; k++) begin
      i = 8'd1 << k;
      #1;
      checks++;
      if (y !== 3'(k) || g !== i) begin
        failures++;
        $display("FAIL one-hot i=%b y=%0d", i, y);
      end
    end
    for (int v = 0; v < 256; v++) begin
      i = 8'(v);
      #1;
      e = '0;
      for (int k = 0; k < 8; k++) if (i[k]) e ^= 3'(k);
      checks++;
      if (y !== e || g !== i) begin
        failures++;
        $display("FAIL i=%b y=%0d expected %0d", i, y, e);
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
