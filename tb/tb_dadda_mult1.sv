// Self-checking testbench for the Dadda multiplier with design-1 compressors.
// Three instances share the operands:
//   dut_m1    - default parameters: multiplier 1, all compressors approximate
//   dut_m3    - APPROX_COLS = 7: multiplier 3, exact compressors in columns 7 and up
//   dut_exact - APPROX_COLS = 0: the same wiring with exact compressors only
// The exact instance is run over all 65536 operand pairs against a*b, which checks the
// wiring of the tree. The two approximate instances are compared with 600 reference
// products each (operands a, b and product per line: aabbpppp), computed by an
// independent bit-level model of the same reduction schedule.
module tb_dadda_mult1;
  import mult_pkg::*;
  localparam int NV = 600;
  operand_t a, b;
  product_t p_m1, p_m3, p_exact;
  logic [31:0] vec_m1 [NV];
  logic [31:0] vec_m3 [NV];
  int checks = 0, failures = 0;

  dadda_mult1                    dut_m1    (.a, .b, .p(p_m1));
  dadda_mult1 #(.APPROX_COLS(7)) dut_m3    (.a, .b, .p(p_m3));
  dadda_mult1 #(.APPROX_COLS(0)) dut_exact (.a, .b, .p(p_exact));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s: a=%0d b=%0d m1=%0d m3=%0d exact=%0d", what, a, b, p_m1, p_m3, p_exact);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_m1_err, n_m3_err;
    longint sum_abs_m1, sum_abs_m3;
    n_m1_err = 0; n_m3_err = 0; sum_abs_m1 = 0; sum_abs_m3 = 0;
    $readmemh("tb/dadda_mult1_vectors.hex", vec_m1);
    $readmemh("tb/dadda_mult3_vectors.hex", vec_m3);

    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = operand_t'(i);
        b = operand_t'(j);
        #1;
        check(p_exact == product_t'(i * j), "exact-mode product");
        if (p_m1 != product_t'(i * j)) n_m1_err++;
        if (p_m3 != product_t'(i * j)) n_m3_err++;
        sum_abs_m1 += (int'(p_m1) > i * j) ? int'(p_m1) - i * j : i * j - int'(p_m1);
        sum_abs_m3 += (int'(p_m3) > i * j) ? int'(p_m3) - i * j : i * j - int'(p_m3);
        if (i == 0 || j == 0) begin
          check(p_m1 == '0, "multiplier 1, zero operand");
          check(p_m3 == '0, "multiplier 3, zero operand");
        end
      end

    for (int k = 0; k < NV; k++) begin
      a = vec_m1[k][31:24];
      b = vec_m1[k][23:16];
      #1;
      check(p_m1 == vec_m1[k][15:0], "multiplier 1 reference product");
      a = vec_m3[k][31:24];
      b = vec_m3[k][23:16];
      #1;
      check(p_m3 == vec_m3[k][15:0], "multiplier 3 reference product");
    end

    // The approximation must show, and exact high columns must make multiplier 3 closer.
    check(n_m1_err > 0, "multiplier 1 approximates");
    check(n_m3_err > 0, "multiplier 3 approximates");
    check(sum_abs_m3 < sum_abs_m1, "multiplier 3 more accurate than multiplier 1");
    $display("multiplier 1: %0d/65536 products inexact, mean |error| %0.2f", n_m1_err, real'(sum_abs_m1) / 65536.0);
    $display("multiplier 3: %0d/65536 products inexact, mean |error| %0.2f", n_m3_err, real'(sum_abs_m3) / 65536.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
