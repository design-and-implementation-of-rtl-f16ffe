// Approximate 4:2 compressor, design 2. Design 1 with cin tied to 0, which removes
// the cin input and the carry output (carry = cin = 0). The remaining outputs are
//   sum   = (x1 ^ x2) | (x3 ^ x4)     weight 1
//   carry = x1 x2 + x3 x4             weight 2 (the cout of design 1)
// so four bits become two. The result differs from x1+x2+x3+x4 in 5 of the 16 cases
// (two ones in different pairs read as 1, four ones read as 2). Combinational.
// Follows the published design 2: design 1 with cin = 0.
module compressor_4_2_approx2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  output logic sum,
  output logic carry
);
  assign sum   = (x1 ^ x2) | (x3 ^ x4);
  assign carry = (x1 & x2) | (x3 & x4);
endmodule
