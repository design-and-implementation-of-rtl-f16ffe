// 4:2 compressor whose kind is chosen by a parameter: APPROX = 1 gives the approximate
// design 1, APPROX = 0 the exact compressor. Both have the same ports, so a tree can
// mix them column by column (multiplier 3 of the Dadda family does). This wrapper is
// this design's way of making the mix a parameter.
module compressor_4_2_sel #(
  parameter bit APPROX = 1'b1
) (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  if (APPROX) begin : g_approx
    compressor_4_2_approx1 u_cmp (.x1, .x2, .x3, .x4, .cin, .sum, .carry, .cout);
  end else begin : g_exact
    compressor_4_2_exact   u_cmp (.x1, .x2, .x3, .x4, .cin, .sum, .carry, .cout);
  end
endmodule
