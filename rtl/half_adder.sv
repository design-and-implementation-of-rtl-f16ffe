// Half adder: s = a ^ b, co = a & b. Combinational; used in the reduction trees
// wherever a column holds two bits that must be merged into one.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  assign s  = a ^ b;
  assign co = a & b;
endmodule
