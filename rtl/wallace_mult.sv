// 8x8 unsigned Wallace-tree multiplier using exact 4:2 compressors.
//
// Three stages, all combinational. Stage 1 splits the 8 partial-product rows into two
// groups of 4 (rows 0-3 and rows 4-7) and compresses each group on its own: per group a
// half adder on the 2-bit column, a full adder on the 3-bit column, a chain of six
// compressors on the 4-bit columns (the last of them gets 3 bits and x4 = 0) and a full
// adder that takes the column's 2 bits and the chain's last cout. Stage 2 brings the
// merged matrix (at most 4 rows) down to 2 rows with 5 compressors, 3 full adders and 5
// half adders; its half adders in columns 2 and 3 make product bit 2 final already, so
// bits 0-2 leave the tree as single bits. Stage 3 is the 16-bit ripple-carry adder.
// Stages 1 and 2 hold 17 compressors, 7 full adders and 7 half adders.
//
// The compressors are exact, so the product is exact: p = a * b.
// Interface: a, b operands; p = product, 16 bits.
//
// Three stages, 17 compressors, the row grouping of stage 1 and the cell totals follow
// the published design (counting the final adder as the cells it needs, 2 half adders
// and 11 full adders, gives 17 compressors, 18 full adders and 9 half adders); the
// placement of the cells and the cin/cout chaining are this design's own.
//
// Naming: sN_cC_xK is cell K of kind x (c = 4:2 compressor, f = full adder, h = half
// adder) in column C (weight 2**C) of reduction stage N (s1a/s1b: the two row groups of
// stage 1); _s, _c and _co are its sum, carry and cout. Each stage opens with a comment
// listing its cells per column (C, F, H). pp[j][i] = b[j] & a[i] sits in column i+j.
module wallace_mult
  import mult_pkg::*;
(
  input  operand_t a,
  input  operand_t b,
  output product_t p
);
  pp_matrix_t pp;
  product_t   row0, row1;
  logic       unused_cout;

  partial_product_gen u_ppg (.a, .b, .pp);

  // s1a: col 1: H, col 2: F, col 3: C, col 4: C, col 5: C, col 6: C, col 7: C, col 8: C, col 9: F
  logic s1a_c1_h0_s, s1a_c1_h0_c;
  logic s1a_c2_f0_s, s1a_c2_f0_c;
  logic s1a_c3_c0_s, s1a_c3_c0_c, s1a_c3_c0_co;
  logic s1a_c4_c0_s, s1a_c4_c0_c, s1a_c4_c0_co;
  logic s1a_c5_c0_s, s1a_c5_c0_c, s1a_c5_c0_co;
  logic s1a_c6_c0_s, s1a_c6_c0_c, s1a_c6_c0_co;
  logic s1a_c7_c0_s, s1a_c7_c0_c, s1a_c7_c0_co;
  logic s1a_c8_c0_s, s1a_c8_c0_c, s1a_c8_c0_co;
  logic s1a_c9_f0_s, s1a_c9_f0_c;
  half_adder u_s1a_c1_h0 (.a(pp[0][1]), .b(pp[1][0]), .s(s1a_c1_h0_s), .co(s1a_c1_h0_c));
  full_adder u_s1a_c2_f0 (.a(pp[0][2]), .b(pp[1][1]), .ci(pp[2][0]), .s(s1a_c2_f0_s), .co(s1a_c2_f0_c));
  compressor_4_2_exact u_s1a_c3_c0 (.x1(pp[0][3]), .x2(pp[1][2]), .x3(pp[2][1]), .x4(pp[3][0]), .cin(1'b0), .sum(s1a_c3_c0_s), .carry(s1a_c3_c0_c), .cout(s1a_c3_c0_co));
  compressor_4_2_exact u_s1a_c4_c0 (.x1(pp[0][4]), .x2(pp[1][3]), .x3(pp[2][2]), .x4(pp[3][1]), .cin(s1a_c3_c0_co), .sum(s1a_c4_c0_s), .carry(s1a_c4_c0_c), .cout(s1a_c4_c0_co));
  compressor_4_2_exact u_s1a_c5_c0 (.x1(pp[0][5]), .x2(pp[1][4]), .x3(pp[2][3]), .x4(pp[3][2]), .cin(s1a_c4_c0_co), .sum(s1a_c5_c0_s), .carry(s1a_c5_c0_c), .cout(s1a_c5_c0_co));
  compressor_4_2_exact u_s1a_c6_c0 (.x1(pp[0][6]), .x2(pp[1][5]), .x3(pp[2][4]), .x4(pp[3][3]), .cin(s1a_c5_c0_co), .sum(s1a_c6_c0_s), .carry(s1a_c6_c0_c), .cout(s1a_c6_c0_co));
  compressor_4_2_exact u_s1a_c7_c0 (.x1(pp[0][7]), .x2(pp[1][6]), .x3(pp[2][5]), .x4(pp[3][4]), .cin(s1a_c6_c0_co), .sum(s1a_c7_c0_s), .carry(s1a_c7_c0_c), .cout(s1a_c7_c0_co));
  compressor_4_2_exact u_s1a_c8_c0 (.x1(pp[1][7]), .x2(pp[2][6]), .x3(pp[3][5]), .x4(1'b0), .cin(s1a_c7_c0_co), .sum(s1a_c8_c0_s), .carry(s1a_c8_c0_c), .cout(s1a_c8_c0_co));
  full_adder u_s1a_c9_f0 (.a(pp[2][7]), .b(pp[3][6]), .ci(s1a_c8_c0_co), .s(s1a_c9_f0_s), .co(s1a_c9_f0_c));

  // s1b: col 5: H, col 6: F, col 7: C, col 8: C, col 9: C, col 10: C, col 11: C, col 12: C, col 13: F
  logic s1b_c5_h0_s, s1b_c5_h0_c;
  logic s1b_c6_f0_s, s1b_c6_f0_c;
  logic s1b_c7_c0_s, s1b_c7_c0_c, s1b_c7_c0_co;
  logic s1b_c8_c0_s, s1b_c8_c0_c, s1b_c8_c0_co;
  logic s1b_c9_c0_s, s1b_c9_c0_c, s1b_c9_c0_co;
  logic s1b_c10_c0_s, s1b_c10_c0_c, s1b_c10_c0_co;
  logic s1b_c11_c0_s, s1b_c11_c0_c, s1b_c11_c0_co;
  logic s1b_c12_c0_s, s1b_c12_c0_c, s1b_c12_c0_co;
  logic s1b_c13_f0_s, s1b_c13_f0_c;
  half_adder u_s1b_c5_h0 (.a(pp[4][1]), .b(pp[5][0]), .s(s1b_c5_h0_s), .co(s1b_c5_h0_c));
  full_adder u_s1b_c6_f0 (.a(pp[4][2]), .b(pp[5][1]), .ci(pp[6][0]), .s(s1b_c6_f0_s), .co(s1b_c6_f0_c));
  compressor_4_2_exact u_s1b_c7_c0 (.x1(pp[4][3]), .x2(pp[5][2]), .x3(pp[6][1]), .x4(pp[7][0]), .cin(1'b0), .sum(s1b_c7_c0_s), .carry(s1b_c7_c0_c), .cout(s1b_c7_c0_co));
  compressor_4_2_exact u_s1b_c8_c0 (.x1(pp[4][4]), .x2(pp[5][3]), .x3(pp[6][2]), .x4(pp[7][1]), .cin(s1b_c7_c0_co), .sum(s1b_c8_c0_s), .carry(s1b_c8_c0_c), .cout(s1b_c8_c0_co));
  compressor_4_2_exact u_s1b_c9_c0 (.x1(pp[4][5]), .x2(pp[5][4]), .x3(pp[6][3]), .x4(pp[7][2]), .cin(s1b_c8_c0_co), .sum(s1b_c9_c0_s), .carry(s1b_c9_c0_c), .cout(s1b_c9_c0_co));
  compressor_4_2_exact u_s1b_c10_c0 (.x1(pp[4][6]), .x2(pp[5][5]), .x3(pp[6][4]), .x4(pp[7][3]), .cin(s1b_c9_c0_co), .sum(s1b_c10_c0_s), .carry(s1b_c10_c0_c), .cout(s1b_c10_c0_co));
  compressor_4_2_exact u_s1b_c11_c0 (.x1(pp[4][7]), .x2(pp[5][6]), .x3(pp[6][5]), .x4(pp[7][4]), .cin(s1b_c10_c0_co), .sum(s1b_c11_c0_s), .carry(s1b_c11_c0_c), .cout(s1b_c11_c0_co));
  compressor_4_2_exact u_s1b_c12_c0 (.x1(pp[5][7]), .x2(pp[6][6]), .x3(pp[7][5]), .x4(1'b0), .cin(s1b_c11_c0_co), .sum(s1b_c12_c0_s), .carry(s1b_c12_c0_c), .cout(s1b_c12_c0_co));
  full_adder u_s1b_c13_f0 (.a(pp[6][7]), .b(pp[7][6]), .ci(s1b_c12_c0_co), .s(s1b_c13_f0_s), .co(s1b_c13_f0_c));

  // s2: col 2: H, col 3: H, col 4: F, col 5: F, col 6: C, col 7: C, col 8: C, col 9: C, col 10: C, col 11: F, col 12: H, col 13: H, col 14: H
  logic s2_c2_h0_s, s2_c2_h0_c;
  logic s2_c3_h0_s, s2_c3_h0_c;
  logic s2_c4_f0_s, s2_c4_f0_c;
  logic s2_c5_f0_s, s2_c5_f0_c;
  logic s2_c6_c0_s, s2_c6_c0_c, s2_c6_c0_co;
  logic s2_c7_c0_s, s2_c7_c0_c, s2_c7_c0_co;
  logic s2_c8_c0_s, s2_c8_c0_c, s2_c8_c0_co;
  logic s2_c9_c0_s, s2_c9_c0_c, s2_c9_c0_co;
  logic s2_c10_c0_s, s2_c10_c0_c, s2_c10_c0_co;
  logic s2_c11_f0_s, s2_c11_f0_c;
  logic s2_c12_h0_s, s2_c12_h0_c;
  logic s2_c13_h0_s, s2_c13_h0_c;
  logic s2_c14_h0_s, s2_c14_h0_c;
  half_adder u_s2_c2_h0 (.a(s1a_c1_h0_c), .b(s1a_c2_f0_s), .s(s2_c2_h0_s), .co(s2_c2_h0_c));
  half_adder u_s2_c3_h0 (.a(s1a_c2_f0_c), .b(s1a_c3_c0_s), .s(s2_c3_h0_s), .co(s2_c3_h0_c));
  full_adder u_s2_c4_f0 (.a(s1a_c3_c0_c), .b(s1a_c4_c0_s), .ci(pp[4][0]), .s(s2_c4_f0_s), .co(s2_c4_f0_c));
  full_adder u_s2_c5_f0 (.a(s1a_c4_c0_c), .b(s1a_c5_c0_s), .ci(s1b_c5_h0_s), .s(s2_c5_f0_s), .co(s2_c5_f0_c));
  compressor_4_2_exact u_s2_c6_c0 (.x1(s1a_c5_c0_c), .x2(s1a_c6_c0_s), .x3(s1b_c5_h0_c), .x4(s1b_c6_f0_s), .cin(1'b0), .sum(s2_c6_c0_s), .carry(s2_c6_c0_c), .cout(s2_c6_c0_co));
  compressor_4_2_exact u_s2_c7_c0 (.x1(s1a_c6_c0_c), .x2(s1a_c7_c0_s), .x3(s1b_c6_f0_c), .x4(s1b_c7_c0_s), .cin(s2_c6_c0_co), .sum(s2_c7_c0_s), .carry(s2_c7_c0_c), .cout(s2_c7_c0_co));
  compressor_4_2_exact u_s2_c8_c0 (.x1(s1a_c7_c0_c), .x2(s1a_c8_c0_s), .x3(s1b_c7_c0_c), .x4(s1b_c8_c0_s), .cin(s2_c7_c0_co), .sum(s2_c8_c0_s), .carry(s2_c8_c0_c), .cout(s2_c8_c0_co));
  compressor_4_2_exact u_s2_c9_c0 (.x1(s1a_c8_c0_c), .x2(s1a_c9_f0_s), .x3(s1b_c8_c0_c), .x4(s1b_c9_c0_s), .cin(s2_c8_c0_co), .sum(s2_c9_c0_s), .carry(s2_c9_c0_c), .cout(s2_c9_c0_co));
  compressor_4_2_exact u_s2_c10_c0 (.x1(s1a_c9_f0_c), .x2(pp[3][7]), .x3(s1b_c9_c0_c), .x4(s1b_c10_c0_s), .cin(s2_c9_c0_co), .sum(s2_c10_c0_s), .carry(s2_c10_c0_c), .cout(s2_c10_c0_co));
  full_adder u_s2_c11_f0 (.a(s1b_c10_c0_c), .b(s1b_c11_c0_s), .ci(s2_c10_c0_co), .s(s2_c11_f0_s), .co(s2_c11_f0_c));
  half_adder u_s2_c12_h0 (.a(s1b_c11_c0_c), .b(s1b_c12_c0_s), .s(s2_c12_h0_s), .co(s2_c12_h0_c));
  half_adder u_s2_c13_h0 (.a(s1b_c12_c0_c), .b(s1b_c13_f0_s), .s(s2_c13_h0_s), .co(s2_c13_h0_c));
  half_adder u_s2_c14_h0 (.a(s1b_c13_f0_c), .b(pp[7][7]), .s(s2_c14_h0_s), .co(s2_c14_h0_c));

  // Two rows left after the last reduction stage, MSB first.
  assign row0 = {s2_c14_h0_c, s2_c13_h0_c, s2_c12_h0_c, s2_c11_f0_c, s2_c10_c0_c, s2_c9_c0_c, s2_c8_c0_c, s2_c7_c0_c, s2_c6_c0_c, s2_c5_f0_c, s2_c4_f0_c, s2_c3_h0_c, s2_c2_h0_c, s2_c2_h0_s, s1a_c1_h0_s, pp[0][0]};
  assign row1 = {1'b0, s2_c14_h0_s, s2_c13_h0_s, s2_c12_h0_s, s2_c11_f0_s, s2_c10_c0_s, s2_c9_c0_s, s2_c8_c0_s, s2_c7_c0_s, s2_c6_c0_s, s2_c5_f0_s, s2_c4_f0_s, s2_c3_h0_s, 1'b0, 1'b0, 1'b0};

  ripple_adder #(.W(PW)) u_cpa (.x(row0), .y(row1), .s(p), .cout(unused_cout));
endmodule
