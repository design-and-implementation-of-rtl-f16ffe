// Self-checking testbench for the partial-product generator: 2000 random operand pairs
// plus corner values. Checks each pp[j][i] bit and that the weighted sum of the matrix
// equals a*b.
module tb_partial_product_gen;
  import mult_pkg::*;
  operand_t a, b;
  pp_matrix_t pp;
  int checks = 0, failures = 0;

  partial_product_gen dut (.a, .b, .pp);

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned total;
    for (int t = 0; t < 2004; t++) begin
      case (t)
        0: begin a = '0; b = '0; end
        1: begin a = '1; b = '1; end
        2: begin a = 8'h80; b = 8'h01; end
        3: begin a = 8'h01; b = 8'h80; end
        default: begin a = operand_t'($urandom); b = operand_t'($urandom); end
      endcase
      #1;
      total = 0;
      for (int j = 0; j < N; j++)
        for (int i = 0; i < N; i++) begin
          checks++;
          if (pp[j][i] !== (a[i] && b[j])) begin
            failures++;
            $display("FAIL pp[%0d][%0d] a=%h b=%h", j, i, a, b);
          end
          total += int'(pp[j][i]) << (i + j);
        end
      checks++;
      if (total != int'(a) * int'(b)) begin
        failures++;
        $display("FAIL weighted sum a=%h b=%h", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
