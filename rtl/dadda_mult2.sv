// 8x8 unsigned Dadda multiplier using approximate 4:2 compressor design 2 (multiplier 2).
//
// Design 2 has no cin and no cout: four bits of a column become one sum bit in the same
// column and one carry bit in the next. Partial products come from 64 AND gates; stage 1
// reduces the matrix to at most 4 rows with 7 compressors, 1 full adder and 4 half
// adders; stage 2 reduces it to 2 rows with 10 compressors and 2 half adders (17
// compressors, 1 full adder and 6 half adders in all); a 16-bit ripple-carry adder adds
// the last two rows. Without the cin/cout chain no signal runs sideways inside a stage.
//
// Interface: a, b operands; p = approximate product, 16 bits. Combinational.
//
// The total cell counts, the two stages and the compressor type follow the published
// design; the split of the cells between the stages, their columns and the order in
// which partial-product bits feed their inputs are this design's own.
//
// Naming: sN_cC_xK is cell K of kind x (c = 4:2 compressor, f = full adder, h = half
// adder) in column C (weight 2**C) of reduction stage N (s1a/s1b: the two row groups of
// stage 1); _s, _c and _co are its sum, carry and cout. Each stage opens with a comment
// listing its cells per column (C, F, H). pp[j][i] = b[j] & a[i] sits in column i+j.
module dadda_mult2
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

  // s1: col 4: H, col 5: C, col 6: CH, col 7: CC, col 8: CF, col 9: CH, col 10: C, col 11: H
  logic s1_c4_h0_s, s1_c4_h0_c;
  logic s1_c5_c0_s, s1_c5_c0_c;
  logic s1_c6_c0_s, s1_c6_c0_c;
  logic s1_c6_h0_s, s1_c6_h0_c;
  logic s1_c7_c0_s, s1_c7_c0_c;
  logic s1_c7_c1_s, s1_c7_c1_c;
  logic s1_c8_c0_s, s1_c8_c0_c;
  logic s1_c8_f0_s, s1_c8_f0_c;
  logic s1_c9_c0_s, s1_c9_c0_c;
  logic s1_c9_h0_s, s1_c9_h0_c;
  logic s1_c10_c0_s, s1_c10_c0_c;
  logic s1_c11_h0_s, s1_c11_h0_c;
  half_adder u_s1_c4_h0 (.a(pp[0][4]), .b(pp[1][3]), .s(s1_c4_h0_s), .co(s1_c4_h0_c));
  compressor_4_2_approx2 u_s1_c5_c0 (.x1(pp[0][5]), .x2(pp[1][4]), .x3(pp[2][3]), .x4(pp[3][2]), .sum(s1_c5_c0_s), .carry(s1_c5_c0_c));
  compressor_4_2_approx2 u_s1_c6_c0 (.x1(pp[0][6]), .x2(pp[1][5]), .x3(pp[2][4]), .x4(pp[3][3]), .sum(s1_c6_c0_s), .carry(s1_c6_c0_c));
  half_adder u_s1_c6_h0 (.a(pp[4][2]), .b(pp[5][1]), .s(s1_c6_h0_s), .co(s1_c6_h0_c));
  compressor_4_2_approx2 u_s1_c7_c0 (.x1(pp[0][7]), .x2(pp[1][6]), .x3(pp[2][5]), .x4(pp[3][4]), .sum(s1_c7_c0_s), .carry(s1_c7_c0_c));
  compressor_4_2_approx2 u_s1_c7_c1 (.x1(pp[4][3]), .x2(pp[5][2]), .x3(pp[6][1]), .x4(pp[7][0]), .sum(s1_c7_c1_s), .carry(s1_c7_c1_c));
  compressor_4_2_approx2 u_s1_c8_c0 (.x1(pp[1][7]), .x2(pp[2][6]), .x3(pp[3][5]), .x4(pp[4][4]), .sum(s1_c8_c0_s), .carry(s1_c8_c0_c));
  full_adder u_s1_c8_f0 (.a(pp[5][3]), .b(pp[6][2]), .ci(pp[7][1]), .s(s1_c8_f0_s), .co(s1_c8_f0_c));
  compressor_4_2_approx2 u_s1_c9_c0 (.x1(pp[2][7]), .x2(pp[3][6]), .x3(pp[4][5]), .x4(pp[5][4]), .sum(s1_c9_c0_s), .carry(s1_c9_c0_c));
  half_adder u_s1_c9_h0 (.a(pp[6][3]), .b(pp[7][2]), .s(s1_c9_h0_s), .co(s1_c9_h0_c));
  compressor_4_2_approx2 u_s1_c10_c0 (.x1(pp[3][7]), .x2(pp[4][6]), .x3(pp[5][5]), .x4(pp[6][4]), .sum(s1_c10_c0_s), .carry(s1_c10_c0_c));
  half_adder u_s1_c11_h0 (.a(pp[4][7]), .b(pp[5][6]), .s(s1_c11_h0_s), .co(s1_c11_h0_c));

  // s2: col 2: H, col 3: C, col 4: C, col 5: C, col 6: C, col 7: C, col 8: C, col 9: C, col 10: C, col 11: C, col 12: C, col 13: H
  logic s2_c2_h0_s, s2_c2_h0_c;
  logic s2_c3_c0_s, s2_c3_c0_c;
  logic s2_c4_c0_s, s2_c4_c0_c;
  logic s2_c5_c0_s, s2_c5_c0_c;
  logic s2_c6_c0_s, s2_c6_c0_c;
  logic s2_c7_c0_s, s2_c7_c0_c;
  logic s2_c8_c0_s, s2_c8_c0_c;
  logic s2_c9_c0_s, s2_c9_c0_c;
  logic s2_c10_c0_s, s2_c10_c0_c;
  logic s2_c11_c0_s, s2_c11_c0_c;
  logic s2_c12_c0_s, s2_c12_c0_c;
  logic s2_c13_h0_s, s2_c13_h0_c;
  half_adder u_s2_c2_h0 (.a(pp[0][2]), .b(pp[1][1]), .s(s2_c2_h0_s), .co(s2_c2_h0_c));
  compressor_4_2_approx2 u_s2_c3_c0 (.x1(pp[0][3]), .x2(pp[1][2]), .x3(pp[2][1]), .x4(pp[3][0]), .sum(s2_c3_c0_s), .carry(s2_c3_c0_c));
  compressor_4_2_approx2 u_s2_c4_c0 (.x1(s1_c4_h0_s), .x2(pp[2][2]), .x3(pp[3][1]), .x4(pp[4][0]), .sum(s2_c4_c0_s), .carry(s2_c4_c0_c));
  compressor_4_2_approx2 u_s2_c5_c0 (.x1(s1_c4_h0_c), .x2(s1_c5_c0_s), .x3(pp[4][1]), .x4(pp[5][0]), .sum(s2_c5_c0_s), .carry(s2_c5_c0_c));
  compressor_4_2_approx2 u_s2_c6_c0 (.x1(s1_c5_c0_c), .x2(s1_c6_c0_s), .x3(s1_c6_h0_s), .x4(pp[6][0]), .sum(s2_c6_c0_s), .carry(s2_c6_c0_c));
  compressor_4_2_approx2 u_s2_c7_c0 (.x1(s1_c6_c0_c), .x2(s1_c6_h0_c), .x3(s1_c7_c0_s), .x4(s1_c7_c1_s), .sum(s2_c7_c0_s), .carry(s2_c7_c0_c));
  compressor_4_2_approx2 u_s2_c8_c0 (.x1(s1_c7_c0_c), .x2(s1_c7_c1_c), .x3(s1_c8_c0_s), .x4(s1_c8_f0_s), .sum(s2_c8_c0_s), .carry(s2_c8_c0_c));
  compressor_4_2_approx2 u_s2_c9_c0 (.x1(s1_c8_c0_c), .x2(s1_c8_f0_c), .x3(s1_c9_c0_s), .x4(s1_c9_h0_s), .sum(s2_c9_c0_s), .carry(s2_c9_c0_c));
  compressor_4_2_approx2 u_s2_c10_c0 (.x1(s1_c9_c0_c), .x2(s1_c9_h0_c), .x3(s1_c10_c0_s), .x4(pp[7][3]), .sum(s2_c10_c0_s), .carry(s2_c10_c0_c));
  compressor_4_2_approx2 u_s2_c11_c0 (.x1(s1_c10_c0_c), .x2(s1_c11_h0_s), .x3(pp[6][5]), .x4(pp[7][4]), .sum(s2_c11_c0_s), .carry(s2_c11_c0_c));
  compressor_4_2_approx2 u_s2_c12_c0 (.x1(s1_c11_h0_c), .x2(pp[5][7]), .x3(pp[6][6]), .x4(pp[7][5]), .sum(s2_c12_c0_s), .carry(s2_c12_c0_c));
  half_adder u_s2_c13_h0 (.a(pp[6][7]), .b(pp[7][6]), .s(s2_c13_h0_s), .co(s2_c13_h0_c));

  // Two rows left after the last reduction stage, MSB first.
  assign row0 = {1'b0, s2_c13_h0_c, s2_c12_c0_c, s2_c11_c0_c, s2_c10_c0_c, s2_c9_c0_c, s2_c8_c0_c, s2_c7_c0_c, s2_c6_c0_c, s2_c5_c0_c, s2_c4_c0_c, s2_c3_c0_c, s2_c2_h0_c, s2_c2_h0_s, pp[0][1], pp[0][0]};
  assign row1 = {1'b0, pp[7][7], s2_c13_h0_s, s2_c12_c0_s, s2_c11_c0_s, s2_c10_c0_s, s2_c9_c0_s, s2_c8_c0_s, s2_c7_c0_s, s2_c6_c0_s, s2_c5_c0_s, s2_c4_c0_s, s2_c3_c0_s, pp[2][0], pp[1][0], 1'b0};

  ripple_adder #(.W(PW)) u_cpa (.x(row0), .y(row1), .s(p), .cout(unused_cout));
endmodule
