// Self-checking testbench for approximate 4:2 compressor design 1: all 32 input cases.
// Expected outputs come from the defining equations (carry = cin, cout = x1x2 + x3x4,
// sum = 0 when cin = 1, else 1 when a pair differs). It also counts how often the
// result differs from the exact count (13 of 32), the largest error (2), and how often
// carry = cin agrees with the exact compressor's carry (24 of 32).
module tb_compressor_4_2_approx1;
  logic x1, x2, x3, x4, cin, sum, carry, cout;
  int checks = 0, failures = 0;
  int ones, approx_val, err, abs_err;
  int n_err = 0, max_err = 0, n_carry_same = 0;
  logic exact_carry;

  compressor_4_2_approx1 dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: x=%b%b%b%b cin=%b -> sum=%b carry=%b cout=%b", what, x1, x2, x3, x4, cin, sum, carry, cout);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      for (int c = 0; c < 2; c++) begin
        {x1, x2, x3, x4} = 4'(v);
        cin = c[0];
        #1;
        ones = $countones(v) + c;
        check(carry == cin, "carry");
        check(cout == ((v[3:2] == 2'b11) || (v[1:0] == 2'b11)), "cout");
        check(sum == (c == 0 && (v[3:2] inside {2'b01, 2'b10} || v[1:0] inside {2'b01, 2'b10})), "sum");
        approx_val = int'(sum) + 2 * (int'(carry) + int'(cout));
        err = approx_val - ones;
        if (err != 0) n_err++;
        abs_err = (err < 0) ? -err : err;
        if (abs_err > max_err) max_err = abs_err;
        exact_carry = ((x1 ^ x2 ^ x3 ^ x4) ? cin : x4);
        if (exact_carry == carry) n_carry_same++;
        if (v == 0) check(approx_val == 0 || c == 1, "zero in, zero out");
      end
    end
    check(n_err == 13, "number of erroneous cases");
    check(max_err == 2, "largest error");
    check(n_carry_same == 24, "carry = cin agreement with exact carry");
    $display("erroneous cases %0d/32, largest error %0d, carry agreement %0d/32", n_err, max_err, n_carry_same);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
