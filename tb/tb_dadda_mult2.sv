// Self-checking testbench for the Dadda multiplier with design-2 compressors.
// Compares 600 products with reference values (aabbpppp per line) from an independent
// bit-level model of the same reduction schedule, checks that a zero operand gives 0,
// and reports how many of all 65536 products are inexact.
module tb_dadda_mult2;
  import mult_pkg::*;
  localparam int NV = 600;
  operand_t a, b;
  product_t p;
  logic [31:0] vec [NV];
  int checks = 0, failures = 0;

  dadda_mult2 dut (.a, .b, .p);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s: a=%0d b=%0d p=%0d", what, a, b, p);
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
    int n_err;
    longint sum_abs;
    n_err = 0; sum_abs = 0;
    $readmemh("tb/dadda_mult2_vectors.hex", vec);
    for (int k = 0; k < NV; k++) begin
      a = vec[k][31:24];
      b = vec[k][23:16];
      #1;
      check(p == vec[k][15:0], "reference product");
    end
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = operand_t'(i);
        b = operand_t'(j);
        #1;
        if (p != product_t'(i * j)) n_err++;
        sum_abs += (int'(p) > i * j) ? int'(p) - i * j : i * j - int'(p);
        if (i == 0 || j == 0) check(p == '0, "zero operand");
      end
    check(n_err > 0, "approximation visible");
    $display("multiplier 2: %0d/65536 products inexact, mean |error| %0.2f", n_err, real'(sum_abs) / 65536.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
