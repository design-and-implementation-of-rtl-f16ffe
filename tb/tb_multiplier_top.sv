// End-to-end testbench for the four multipliers side by side, at their default sizes.
// It drives all 65536 operand pairs and checks:
//   - the Wallace product against a*b, every pair;
//   - the three Dadda products against reference products (aabbpppp per line) from an
//     independent bit-level model of each reduction schedule, 600 pairs each;
//   - that a zero operand gives 0 on every output.
// Each mechanism of the design is counted and must occur at least once: products that
// the design-1 approximation changes (multiplier 1), that design 2 changes
// (multiplier 2), that the mixed tree changes (multiplier 3), and exact Wallace
// products. It also prints the error statistics of the three approximate multipliers.
module tb_multiplier_top;
  import mult_pkg::*;
  localparam int NV = 600;
  operand_t a, b;
  product_t p_dadda1, p_dadda2, p_dadda3, p_wallace;
  logic [31:0] vec1 [NV];
  logic [31:0] vec2 [NV];
  logic [31:0] vec3 [NV];
  int checks = 0, failures = 0;
  int n_inexact1 = 0, n_inexact2 = 0, n_inexact3 = 0, n_exact_wallace = 0;
  longint abs1 = 0, abs2 = 0, abs3 = 0;

  multiplier_top dut (.a, .b, .p_dadda1, .p_dadda2, .p_dadda3, .p_wallace);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: a=%0d b=%0d d1=%0d d2=%0d d3=%0d w=%0d", what, a, b, p_dadda1, p_dadda2, p_dadda3, p_wallace);
    end
  endtask

  function automatic longint absdiff(input int x, input int y);
    return (x > y) ? longint'(x - y) : longint'(y - x);
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    $readmemh("tb/dadda_mult1_vectors.hex", vec1);
    $readmemh("tb/dadda_mult2_vectors.hex", vec2);
    $readmemh("tb/dadda_mult3_vectors.hex", vec3);

    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = operand_t'(i);
        b = operand_t'(j);
        #1;
        check(p_wallace == product_t'(i * j), "Wallace product");
        if (p_wallace == product_t'(i * j)) n_exact_wallace++;
        if (p_dadda1 != product_t'(i * j)) n_inexact1++;
        if (p_dadda2 != product_t'(i * j)) n_inexact2++;
        if (p_dadda3 != product_t'(i * j)) n_inexact3++;
        abs1 += absdiff(int'(p_dadda1), i * j);
        abs2 += absdiff(int'(p_dadda2), i * j);
        abs3 += absdiff(int'(p_dadda3), i * j);
        if (i == 0 || j == 0)
          check(p_dadda1 == '0 && p_dadda2 == '0 && p_dadda3 == '0 && p_wallace == '0, "zero operand");
      end

    for (int k = 0; k < NV; k++) begin
      {a, b} = vec1[k][31:16];
      #1;
      check(p_dadda1 == vec1[k][15:0], "multiplier 1 reference product");
      {a, b} = vec2[k][31:16];
      #1;
      check(p_dadda2 == vec2[k][15:0], "multiplier 2 reference product");
      {a, b} = vec3[k][31:16];
      #1;
      check(p_dadda3 == vec3[k][15:0], "multiplier 3 reference product");
    end

    check(n_inexact1 > 0, "design-1 approximation never showed");
    check(n_inexact2 > 0, "design-2 approximation never showed");
    check(n_inexact3 > 0, "mixed approximation never showed");
    check(n_exact_wallace == 65536, "Wallace exact on every pair");
    check(abs3 < abs1, "multiplier 3 closer to exact than multiplier 1");
    $display("inexact products: multiplier1 %0d, multiplier2 %0d, multiplier3 %0d (of 65536)",
             n_inexact1, n_inexact2, n_inexact3);
    $display("mean |error|: multiplier1 %0.2f, multiplier2 %0.2f, multiplier3 %0.2f",
             real'(abs1) / 65536.0, real'(abs2) / 65536.0, real'(abs3) / 65536.0);
    $display("exact Wallace products: %0d", n_exact_wallace);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
