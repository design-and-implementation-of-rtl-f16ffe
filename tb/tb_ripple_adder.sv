// Self-checking testbench for the 16-bit ripple-carry adder: corner cases (carry
// through all bits) and 5000 random pairs, checking {cout, s} = x + y.
module tb_ripple_adder;
  localparam int unsigned W = 16;
  logic [W-1:0] x, y, s;
  logic cout;
  int checks = 0, failures = 0;

  ripple_adder #(.W(W)) dut (.x, .y, .s, .cout);

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0] expected;
    for (int t = 0; t < 5004; t++) begin
      case (t)
        0: begin x = '1; y = 16'd1; end
        1: begin x = '1; y = '1; end
        2: begin x = '0; y = '0; end
        3: begin x = 16'h5555; y = 16'haaaa; end
        default: begin x = W'($urandom); y = W'($urandom); end
      endcase
      #1;
      expected = {1'b0, x} + {1'b0, y};
      checks++;
      if ({cout, s} != expected) begin
        failures++;
        $display("FAIL %h + %h = %h, got %h", x, y, expected, {cout, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
