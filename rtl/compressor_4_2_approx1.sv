// Approximate 4:2 compressor, design 1. Same ports and weights as the exact compressor
// (sum weight 1, carry and cout weight 2), but with much simpler logic:
//   carry = cin                                   (passes straight through)
//   cout  = x1 x2 + x3 x4
//   sum   = ~cin & ((x1 ^ x2) | (x3 ^ x4))
// carry equals the exact carry in 24 of the 32 input cases. The result differs from
// x1+x2+x3+x4+cin in 13 of the 32 cases, by at most 2 in either direction; a zero
// input always gives zero outputs. Combinational, one level less than the exact
// compressor on the sum path.
// carry is cin by definition: this output is a wire, not a constant or a fault.
// The equations follow the published design 1.
module compressor_4_2_approx1 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic pair_differs;

  assign pair_differs = (x1 ^ x2) | (x3 ^ x4);
  assign carry        = cin;
  assign cout         = (x1 & x2) | (x3 & x4);
  assign sum          = ~cin & pair_differs;
endmodule
