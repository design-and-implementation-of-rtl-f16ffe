// Shared sizes and types of the 8x8 unsigned multipliers built from 4:2 compressors.
// N is the operand width and PW the product width. The reduction trees are wired for
// N = 8 column by column, so N is a package constant, not a module parameter.
package mult_pkg;
  localparam int unsigned N  = 8;
  localparam int unsigned PW = 2 * N;

  typedef logic [N-1:0]  operand_t;
  typedef logic [PW-1:0] product_t;
  // pp[j][i] = b[j] & a[i]; the bit has weight 2**(i+j).
  typedef logic [N-1:0][N-1:0] pp_matrix_t;
endpackage
