// tb_rev_hci_top: end-to-end test of the top level at its default sizes.
// One pass of 1024 vectors drives all six units at once from the bits of a
// counter, so the 5x5 multiplier sees every operand pair, the 4-bit
// adder/subtractor every (a, b, mode) twice, and the small units every
// input several times. Each output is compared with a reference computed
// here with ordinary integer arithmetic.
// It also counts how often each mechanism of the design occurred and fails
// if one never did: add mode, subtract mode, carry out of an addition,
// borrow in a subtraction, each multiplexer select value, each demultiplexer
// and decoder output line, each one-hot encoder input, a negative, a zero
// and a positive product, and a product with bit 9 set (the column that
// carries the Baugh-Wooley 2^9 constant). Watchdog: 100 us.
module tb_rev_hci_top;
  timeunit 1ns; timeprecision 1ps;
  import rev_pkg::*;

  int checks = 0, failures = 0;

  logic [3:0]               mux_i;
  logic [1:0]               mux_s;
  logic                     mux_y;
  logic [MUX_GW-1:0]        mux_g;
  logic                     dmx_d;
  logic [1:0]               dmx_s;
  logic [3:0]               dmx_y;
  logic [DEMUX_GW-1:0]      dmx_g;
  logic [2:0]               dec_s;
  logic [7:0]               dec_y;
  logic [DEC_GW-1:0]        dec_g;
  logic [7:0]               enc_i;
  logic [2:0]               enc_y;
  logic [ENC_GW-1:0]        enc_g;
  logic signed [MUL_W-1:0]  mul_x, mul_y;
  logic signed [MUL_PW-1:0] mul_p;
  logic [MUL_GW-1:0]        mul_g;
  logic [ADD_W-1:0]         as_a, as_b, as_s;
  logic                     as_sub, as_cout;
  logic [2*ADD_W-1:0]       as_g;

  rev_hci_top dut (.*);

  // mechanism counters
  int n_add, n_sub, n_carry, n_borrow, n_mul_neg, n_mul_zero, n_mul_pos, n_bit9;
  int n_mux_sel[4], n_dmx_line[4], n_dec_line[8], n_enc_in[8];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic need(input int count, input string what);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    int e_mul, e_sum;
    {n_add, n_sub, n_carry, n_borrow, n_mul_neg, n_mul_zero, n_mul_pos, n_bit9} = '0;
    foreach (n_mux_sel[k])  n_mux_sel[k]  = 0;
    foreach (n_dmx_line[k]) n_dmx_line[k] = 0;
    foreach (n_dec_line[k]) n_dec_line[k] = 0;
    foreach (n_enc_in[k])   n_enc_in[k]   = 0;

    for (int n = 0; n < 1024; n++) begin
      logic [9:0] v;
      v = 10'(n);
      {mul_x, mul_y}         = v;
      {as_sub, as_a, as_b}   = v[8:0];
      {mux_s, mux_i}         = v[5:0];
      {dmx_d, dmx_s}         = {1'b1, v[1:0]} ^ {v[9], 2'b00};
      dec_s                  = v[2:0];
      enc_i                  = 8'd1 << v[5:3];
      #1;

      // multiplier
      e_mul = int'(mul_x) * int'(mul_y);
      check(int'(mul_p) == e_mul, $sformatf("mul %0d*%0d -> %0d", mul_x, mul_y, mul_p));
      if (e_mul < 0) n_mul_neg++;
      else if (e_mul == 0) n_mul_zero++;
      else n_mul_pos++;
      if (mul_p[9]) n_bit9++;

      // adder / subtractor
      if (!as_sub) begin
        n_add++;
        e_sum = int'(as_a) + int'(as_b);
        check({as_cout, as_s} == 5'(e_sum), $sformatf("add %0d+%0d", as_a, as_b));
        if (e_sum > 15) n_carry++;
      end else begin
        n_sub++;
        e_sum = int'(as_a) - int'(as_b);
        check(int'(as_s) == ((e_sum + 16) % 16) && as_cout == (e_sum >= 0),
              $sformatf("sub %0d-%0d", as_a, as_b));
        if (e_sum < 0) n_borrow++;
      end

      // multiplexer
      check(mux_y == mux_i[mux_s], $sformatf("mux i=%b s=%0d", mux_i, mux_s));
      n_mux_sel[mux_s]++;

      // demultiplexer
      check(dmx_y == (4'(dmx_d) << dmx_s), $sformatf("demux d=%b s=%0d", dmx_d, dmx_s));
      if (dmx_d) n_dmx_line[dmx_s]++;

      // decoder
      check(dec_y == (8'd1 << dec_s), $sformatf("decoder s=%0d", dec_s));
      for (int k = 0; k < 8; k++) if (dec_y[k]) n_dec_line[k]++;

      // encoder (one-hot input)
      check(8'd1 << enc_y == enc_i, $sformatf("encoder i=%b y=%0d", enc_i, enc_y));
      n_enc_in[v[5:3]]++;
    end

    need(n_add, "add mode");
    need(n_sub, "subtract mode");
    need(n_carry, "carry out of an addition");
    need(n_borrow, "borrow in a subtraction");
    need(n_mul_neg, "negative product");
    need(n_mul_zero, "zero product");
    need(n_mul_pos, "positive product");
    need(n_bit9, "product bit 9 set");
    for (int k = 0; k < 4; k++) need(n_mux_sel[k], $sformatf("mux select %0d", k));
    for (int k = 0; k < 4; k++) need(n_dmx_line[k], $sformatf("demux line %0d", k));
    for (int k = 0; k < 8; k++) need(n_dec_line[k], $sformatf("decoder line %0d", k));
    for (int k = 0; k < 8; k++) need(n_enc_in[k], $sformatf("encoder input %0d", k));

    $display("add=%0d sub=%0d carry=%0d borrow=%0d neg=%0d zero=%0d pos=%0d bit9=%0d",
             n_add, n_sub, n_carry, n_borrow, n_mul_neg, n_mul_zero, n_mul_pos, n_bit9);
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
