// Exact 4:2 compressor. Five inputs of equal weight (x1..x4 and cin) are counted into
// sum (weight 1) and carry, cout (weight 2 each):
//   x1 + x2 + x3 + x4 + cin = sum + 2 * (carry + cout).
// It is built from XOR stages and two 2:1 multiplexers:
//   sum   = x1 ^ x2 ^ x3 ^ x4 ^ cin
//   cout  = (x1 ^ x2) ? x3 : x1
//   carry = (x1 ^ x2 ^ x3 ^ x4) ? cin : x4
// This is the same function as two cascaded full adders, the first adding x1, x2, x3
// (its carry is cout) and the second adding that sum, x4 and cin (its carry is carry).
// cout does not depend on cin, so a row of compressors has no ripple through cin.
// Combinational: three XOR levels on the sum path.
// The ports, the equations and the XOR/multiplexer construction follow the published
// design, with cout taken as the carry of the first full adder (the multiplexer
// selects x1 when x1 = x2).
module compressor_4_2_exact (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic x12, x34, x1234;

  assign x12   = x1 ^ x2;
  assign x34   = x3 ^ x4;
  assign x1234 = x12 ^ x34;

  assign sum   = x1234 ^ cin;
  assign cout  = x12 ? x3 : x1;
  assign carry = x1234 ? cin : x4;
endmodule
