// tb_rm_moa: checks the multi-operand adder on its own. It is fed with
// random 25-bit partial-product patterns (and with all-zero and all-one
// patterns) and must return, modulo 2^10, the weighted sum of all bits
// pp[i][j] * 2^(i+j) plus the two Baugh-Wooley constants 2^5 and 2^9.
// Watchdog: fails the run after 100 us.
module tb_rm_moa;
  timeunit 1ns; timeprecision 1ps;
  import rev_pkg::*;
  int checks = 0, failures = 0;
  logic [MUL_W-1:0][MUL_W-1:0] pp;
  logic [MUL_PW-1:0] prod;
  logic [MOA_GW-1:0] garbage;
  int unsigned acc;

  rm_moa dut (.*);

  task automatic check_one();
    #1;
    acc = (1 << 5) + (1 << 9);
    for (int i = 0; i < MUL_W; i++)
      for (int j = 0; j < MUL_W; j++)
        if (pp[i][j]) acc += (1 << (i + j));
    checks++;
    if (prod !== MUL_PW'(acc)) begin
      failures++;
      $display("FAIL pp=%h prod=%h expected %h", pp, prod, MUL_PW'(acc));
    end
  endtask

  initial begin
    pp = '0;  check_one();
    pp = '1;  check_one();
    for (int n = 0; n < 20000; n++) begin
      pp = ($urandom() << 7) ^ $urandom();
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
