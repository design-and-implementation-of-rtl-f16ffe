// Self-checking testbench for the Wallace-tree multiplier: all 65536 operand pairs,
// each product compared with a*b.
module tb_wallace_mult;
  import mult_pkg::*;
  operand_t a, b;
  product_t p;
  int checks = 0, failures = 0;

  wallace_mult dut (.a, .b, .p);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = operand_t'(i);
        b = operand_t'(j);
        #1;
        checks++;
        if (p != product_t'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d, got %0d", i, j, i * j, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
