// Self-checking testbench for approximate 4:2 compressor design 2: all 16 input cases.
// Expected values follow from design 1 with cin = 0. It also checks that exactly 5
// cases differ from the exact count and by how much.
module tb_compressor_4_2_approx2;
  logic x1, x2, x3, x4, sum, carry;
  int checks = 0, failures = 0;

  compressor_4_2_approx2 dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: x=%b%b%b%b -> sum=%b carry=%b", what, x1, x2, x3, x4, sum, carry);
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
    int ones, approx_val, n_err, exp_val;
    n_err = 0;
    for (int v = 0; v < 16; v++) begin
      {x1, x2, x3, x4} = 4'(v);
      #1;
      ones = $countones(v);
      // Paired ones are counted exactly; two ones in different pairs read as 1 and
      // four ones read as 2.
      if (ones == 4) exp_val = 2;
      else if (ones == 2 && v[3:2] != 2'b11 && v[1:0] != 2'b11) exp_val = 1;
      else exp_val = ones;
      approx_val = int'(sum) + 2 * int'(carry);
      check(approx_val == exp_val, "value");
      check(carry == ((x1 & x2) | (x3 & x4)), "carry");
      if (approx_val != ones) n_err++;
    end
    check(n_err == 5, "number of erroneous cases");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
