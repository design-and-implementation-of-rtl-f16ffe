// Final carry-propagate adder: a ripple of W full adders, carry-in 0. It adds the two
// rows left by a reduction tree. The carry out of the top bit is given as cout; the
// multipliers drop it, since a 16-bit product cannot overflow (for the approximate
// trees, a result above 16 bits wraps). Combinational, W full-adder delays.
// The published design only asks for a conventional adder here; ripple carry is this
// design's choice, the simplest one.
module ripple_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = 1'b0;
  for (genvar k = 0; k < W; k++) begin : g_bit
    full_adder u_fa (.a(x[k]), .b(y[k]), .ci(c[k]), .s(s[k]), .co(c[k+1]));
  end
  assign cout = c[W];
endmodule
