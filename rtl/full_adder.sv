// Full adder (3:2 counter): s = a ^ b ^ ci, co = majority(a, b, ci). Combinational.
// It is the cell of the exact 4:2 compressor, of the reduction trees and of the
// final ripple-carry adder.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic p;
  assign p  = a ^ b;
  assign s  = p ^ ci;
  assign co = (a & b) | (p & ci);
endmodule
