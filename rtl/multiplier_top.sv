// The four 8x8 unsigned multipliers side by side on one pair of operands, so that their
// products can be compared directly:
//   p_dadda1  - Dadda tree, every 4:2 compressor approximate design 1 (multiplier 1)
//   p_dadda2  - Dadda tree with approximate design 2 compressors      (multiplier 2)
//   p_dadda3  - Dadda tree, design 1 in the N-1 = 7 least significant columns and exact
//               compressors in the others                             (multiplier 3)
//   p_wallace - Wallace tree with exact 4:2 compressors, exact product
// All paths are combinational; there is no clock. The three Dadda variants and the
// Wallace tree are alternatives, each with its own output; a and b are shared.
// The four multipliers follow the published designs; putting them in one module with
// shared operands is this design's choice, for side-by-side comparison.
module multiplier_top
  import mult_pkg::*;
(
  input  operand_t a,
  input  operand_t b,
  output product_t p_dadda1,
  output product_t p_dadda2,
  output product_t p_dadda3,
  output product_t p_wallace
);
  dadda_mult1 #(.APPROX_COLS(PW))    u_dadda1  (.a, .b, .p(p_dadda1));
  dadda_mult2                        u_dadda2  (.a, .b, .p(p_dadda2));
  dadda_mult1 #(.APPROX_COLS(N - 1)) u_dadda3  (.a, .b, .p(p_dadda3));
  wallace_mult                       u_wallace (.a, .b, .p(p_wallace));
endmodule
