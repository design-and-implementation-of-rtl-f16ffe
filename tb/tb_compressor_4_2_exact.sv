// Self-checking testbench for the exact 4:2 compressor: all 32 input cases.
// Checks sum + 2*(carry + cout) against the number of ones, that cout does not depend on
// cin, and the closed-form equations of sum, carry and cout.
module tb_compressor_4_2_exact;
  logic x1, x2, x3, x4, cin, sum, carry, cout;
  int checks = 0, failures = 0;

  compressor_4_2_exact dut (.*);

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
    logic cout_cin0;
    int ones;
    for (int v = 0; v < 16; v++) begin
      for (int c = 0; c < 2; c++) begin
        {x1, x2, x3, x4} = 4'(v);
        cin = c[0];
        #1;
        ones = $countones(v) + c;
        check(int'(sum) + 2 * (int'(carry) + int'(cout)) == ones, "count");
        check(sum == ones[0], "sum parity");
        check(cout == ((x1 ^ x2) ? x3 : x1), "cout equation");
        check(carry == ((x1 ^ x2 ^ x3 ^ x4) ? cin : x4), "carry equation");
        if (c == 0) cout_cin0 = cout;
        else check(cout == cout_cin0, "cout independent of cin");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
