// Partial-product generation: one AND gate per bit pair, pp[j][i] = b[j] & a[i],
// whose weight is 2**(i+j). 64 AND gates for 8x8, as in the
// published design. Combinational.
module partial_product_gen
  import mult_pkg::*;
(
  input  operand_t   a,
  input  operand_t   b,
  output pp_matrix_t pp
);
  always_comb begin
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++)
        pp[j][i] = b[j] & a[i];
  end
endmodule
