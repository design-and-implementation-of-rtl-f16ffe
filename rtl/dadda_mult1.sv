// 8x8 unsigned Dadda multiplier using approximate 4:2 compressors (multiplier 1), and
// with APPROX_COLS lowered, the mixed multiplier 3.
//
// Three phases, all combinational: 64 AND gates make the partial products; a Dadda tree
// reduces the 8-high bit matrix to at most 4 rows in stage 1 and to 2 rows in stage 2;
// a 16-bit ripple-carry adder adds the two rows.
//
// Stage 1 uses 8 compressors, 2 full adders and 2 half adders (columns 4..11); stage 2
// uses 10 compressors (columns 3..12), 1 full adder (column 13) and 1 half adder
// (column 2): 18 compressors, 3 full adders and 3 half adders in all. Within a stage the
// cout of a compressor in column c drives the cin of the compressor with the same index
// in column c+1; a cout with no compressor to take it joins column c+1 as a plain bit
// (columns 9, 11 and 13 feed it to a full adder). Compressors that start a chain get
// cin = 0. Column 8 of stage 1 has only 7 bits for its two compressors, so one x4 is 0.
//
// Compressors in columns below APPROX_COLS are the approximate design 1, the others
// exact. APPROX_COLS = 16 (default) is multiplier 1, all approximate; APPROX_COLS = 7
// (n-1 least significant columns approximate, the rest exact) is multiplier 3;
// APPROX_COLS = 0 gives an exact multiplier with the same wiring.
//
// Interface: a, b operands; p = approximate product, 16 bits (wraps if the
// approximation overshoots 65535).
//
// The cell counts per stage, the two-stage Dadda structure, the AND-gate partial
// products and the use of design 1 / exact compressors follow the published design; the
// column placement of each cell, the cin/cout chaining and the order in which
// partial-product bits are fed to cell inputs are this design's own.
//
// Naming: sN_cC_xK is cell K of kind x (c = 4:2 compressor, f = full adder, h = half
// adder) in column C (weight 2**C) of reduction stage N (s1a/s1b: the two row groups of
// stage 1); _s, _c and _co are its sum, carry and cout. Each stage opens with a comment
// listing its cells per column (C, F, H). pp[j][i] = b[j] & a[i] sits in column i+j.
module dadda_mult1
  import mult_pkg::*;
#(
  parameter int unsigned APPROX_COLS = 16
) (
  input  operand_t a,
  input  operand_t b,
  output product_t p
);
  pp_matrix_t pp;
  product_t   row0, row1;
  logic       unused_cout;

  partial_product_gen u_ppg (.a, .b, .pp);

  // s1: col 4: H, col 5: C, col 6: CH, col 7: CC, col 8: CC, col 9: CF, col 10: C, col 11: F
  logic s1_c4_h0_s, s1_c4_h0_c;
  logic s1_c5_c0_s, s1_c5_c0_c, s1_c5_c0_co;
  logic s1_c6_c0_s, s1_c6_c0_c, s1_c6_c0_co;
  logic s1_c6_h0_s, s1_c6_h0_c;
  logic s1_c7_c0_s, s1_c7_c0_c, s1_c7_c0_co;
  logic s1_c7_c1_s, s1_c7_c1_c, s1_c7_c1_co;
  logic s1_c8_c0_s, s1_c8_c0_c, s1_c8_c0_co;
  logic s1_c8_c1_s, s1_c8_c1_c, s1_c8_c1_co;
  logic s1_c9_c0_s, s1_c9_c0_c, s1_c9_c0_co;
  logic s1_c9_f0_s, s1_c9_f0_c;
  logic s1_c10_c0_s, s1_c10_c0_c, s1_c10_c0_co;
  logic s1_c11_f0_s, s1_c11_f0_c;
  half_adder u_s1_c4_h0 (.a(pp[0][4]), .b(pp[1][3]), .s(s1_c4_h0_s), .co(s1_c4_h0_c));
  compressor_4_2_sel #(.APPROX(5 < APPROX_COLS)) u_s1_c5_c0 (.x1(pp[0][5]), .x2(pp[1][4]), .x3(pp[2][3]), .x4(pp[3][2]), .cin(1'b0), .sum(s1_c5_c0_s), .carry(s1_c5_c0_c), .cout(s1_c5_c0_co));
  compressor_4_2_sel #(.APPROX(6 < APPROX_COLS)) u_s1_c6_c0 (.x1(pp[0][6]), .x2(pp[1][5]), .x3(pp[2][4]), .x4(pp[3][3]), .cin(s1_c5_c0_co), .sum(s1_c6_c0_s), .carry(s1_c6_c0_c), .cout(s1_c6_c0_co));
  half_adder u_s1_c6_h0 (.a(pp[4][2]), .b(pp[5][1]), .s(s1_c6_h0_s), .co(s1_c6_h0_c));
  compressor_4_2_sel #(.APPROX(7 < APPROX_COLS)) u_s1_c7_c0 (.x1(pp[0][7]), .x2(pp[1][6]), .x3(pp[2][5]), .x4(pp[3][4]), .cin(s1_c6_c0_co), .sum(s1_c7_c0_s), .carry(s1_c7_c0_c), .cout(s1_c7_c0_co));
  compressor_4_2_sel #(.APPROX(7 < APPROX_COLS)) u_s1_c7_c1 (.x1(pp[4][3]), .x2(pp[5][2]), .x3(pp[6][1]), .x4(pp[7][0]), .cin(1'b0), .sum(s1_c7_c1_s), .carry(s1_c7_c1_c), .cout(s1_c7_c1_co));
  compressor_4_2_sel #(.APPROX(8 < APPROX_COLS)) u_s1_c8_c0 (.x1(pp[1][7]), .x2(pp[2][6]), .x3(pp[3][5]), .x4(pp[4][4]), .cin(s1_c7_c0_co), .sum(s1_c8_c0_s), .carry(s1_c8_c0_c), .cout(s1_c8_c0_co));
  compressor_4_2_sel #(.APPROX(8 < APPROX_COLS)) u_s1_c8_c1 (.x1(pp[5][3]), .x2(pp[6][2]), .x3(pp[7][1]), .x4(1'b0), .cin(s1_c7_c1_co), .sum(s1_c8_c1_s), .carry(s1_c8_c1_c), .cout(s1_c8_c1_co));
  compressor_4_2_sel #(.APPROX(9 < APPROX_COLS)) u_s1_c9_c0 (.x1(pp[2][7]), .x2(pp[3][6]), .x3(pp[4][5]), .x4(pp[5][4]), .cin(s1_c8_c0_co), .sum(s1_c9_c0_s), .carry(s1_c9_c0_c), .cout(s1_c9_c0_co));
  full_adder u_s1_c9_f0 (.a(pp[6][3]), .b(pp[7][2]), .ci(s1_c8_c1_co), .s(s1_c9_f0_s), .co(s1_c9_f0_c));
  compressor_4_2_sel #(.APPROX(10 < APPROX_COLS)) u_s1_c10_c0 (.x1(pp[3][7]), .x2(pp[4][6]), .x3(pp[5][5]), .x4(pp[6][4]), .cin(s1_c9_c0_co), .sum(s1_c10_c0_s), .carry(s1_c10_c0_c), .cout(s1_c10_c0_co));
  full_adder u_s1_c11_f0 (.a(pp[4][7]), .b(pp[5][6]), .ci(pp[6][5]), .s(s1_c11_f0_s), .co(s1_c11_f0_c));

  // s2: col 2: H, col 3: C, col 4: C, col 5: C, col 6: C, col 7: C, col 8: C, col 9: C, col 10: C, col 11: C, col 12: C, col 13: F
  logic s2_c2_h0_s, s2_c2_h0_c;
  logic s2_c3_c0_s, s2_c3_c0_c, s2_c3_c0_co;
  logic s2_c4_c0_s, s2_c4_c0_c, s2_c4_c0_co;
  logic s2_c5_c0_s, s2_c5_c0_c, s2_c5_c0_co;
  logic s2_c6_c0_s, s2_c6_c0_c, s2_c6_c0_co;
  logic s2_c7_c0_s, s2_c7_c0_c, s2_c7_c0_co;
  logic s2_c8_c0_s, s2_c8_c0_c, s2_c8_c0_co;
  logic s2_c9_c0_s, s2_c9_c0_c, s2_c9_c0_co;
  logic s2_c10_c0_s, s2_c10_c0_c, s2_c10_c0_co;
  logic s2_c11_c0_s, s2_c11_c0_c, s2_c11_c0_co;
  logic s2_c12_c0_s, s2_c12_c0_c, s2_c12_c0_co;
  logic s2_c13_f0_s, s2_c13_f0_c;
  half_adder u_s2_c2_h0 (.a(pp[0][2]), .b(pp[1][1]), .s(s2_c2_h0_s), .co(s2_c2_h0_c));
  compressor_4_2_sel #(.APPROX(3 < APPROX_COLS)) u_s2_c3_c0 (.x1(pp[0][3]), .x2(pp[1][2]), .x3(pp[2][1]), .x4(pp[3][0]), .cin(1'b0), .sum(s2_c3_c0_s), .carry(s2_c3_c0_c), .cout(s2_c3_c0_co));
  compressor_4_2_sel #(.APPROX(4 < APPROX_COLS)) u_s2_c4_c0 (.x1(s1_c4_h0_s), .x2(pp[2][2]), .x3(pp[3][1]), .x4(pp[4][0]), .cin(s2_c3_c0_co), .sum(s2_c4_c0_s), .carry(s2_c4_c0_c), .cout(s2_c4_c0_co));
  compressor_4_2_sel #(.APPROX(5 < APPROX_COLS)) u_s2_c5_c0 (.x1(s1_c4_h0_c), .x2(s1_c5_c0_s), .x3(pp[4][1]), .x4(pp[5][0]), .cin(s2_c4_c0_co), .sum(s2_c5_c0_s), .carry(s2_c5_c0_c), .cout(s2_c5_c0_co));
  compressor_4_2_sel #(.APPROX(6 < APPROX_COLS)) u_s2_c6_c0 (.x1(s1_c5_c0_c), .x2(s1_c6_c0_s), .x3(s1_c6_h0_s), .x4(pp[6][0]), .cin(s2_c5_c0_co), .sum(s2_c6_c0_s), .carry(s2_c6_c0_c), .cout(s2_c6_c0_co));
  compressor_4_2_sel #(.APPROX(7 < APPROX_COLS)) u_s2_c7_c0 (.x1(s1_c6_c0_c), .x2(s1_c6_h0_c), .x3(s1_c7_c0_s), .x4(s1_c7_c1_s), .cin(s2_c6_c0_co), .sum(s2_c7_c0_s), .carry(s2_c7_c0_c), .cout(s2_c7_c0_co));
  compressor_4_2_sel #(.APPROX(8 < APPROX_COLS)) u_s2_c8_c0 (.x1(s1_c7_c0_c), .x2(s1_c7_c1_c), .x3(s1_c8_c0_s), .x4(s1_c8_c1_s), .cin(s2_c7_c0_co), .sum(s2_c8_c0_s), .carry(s2_c8_c0_c), .cout(s2_c8_c0_co));
  compressor_4_2_sel #(.APPROX(9 < APPROX_COLS)) u_s2_c9_c0 (.x1(s1_c8_c0_c), .x2(s1_c8_c1_c), .x3(s1_c9_c0_s), .x4(s1_c9_f0_s), .cin(s2_c8_c0_co), .sum(s2_c9_c0_s), .carry(s2_c9_c0_c), .cout(s2_c9_c0_co));
  compressor_4_2_sel #(.APPROX(10 < APPROX_COLS)) u_s2_c10_c0 (.x1(s1_c9_c0_c), .x2(s1_c9_f0_c), .x3(s1_c10_c0_s), .x4(pp[7][3]), .cin(s2_c9_c0_co), .sum(s2_c10_c0_s), .carry(s2_c10_c0_c), .cout(s2_c10_c0_co));
  compressor_4_2_sel #(.APPROX(11 < APPROX_COLS)) u_s2_c11_c0 (.x1(s1_c10_c0_c), .x2(s1_c11_f0_s), .x3(pp[7][4]), .x4(s1_c10_c0_co), .cin(s2_c10_c0_co), .sum(s2_c11_c0_s), .carry(s2_c11_c0_c), .cout(s2_c11_c0_co));
  compressor_4_2_sel #(.APPROX(12 < APPROX_COLS)) u_s2_c12_c0 (.x1(s1_c11_f0_c), .x2(pp[5][7]), .x3(pp[6][6]), .x4(pp[7][5]), .cin(s2_c11_c0_co), .sum(s2_c12_c0_s), .carry(s2_c12_c0_c), .cout(s2_c12_c0_co));
  full_adder u_s2_c13_f0 (.a(pp[6][7]), .b(pp[7][6]), .ci(s2_c12_c0_co), .s(s2_c13_f0_s), .co(s2_c13_f0_c));

  // Two rows left after the last reduction stage, MSB first.
  assign row0 = {1'b0, s2_c13_f0_c, s2_c12_c0_c, s2_c11_c0_c, s2_c10_c0_c, s2_c9_c0_c, s2_c8_c0_c, s2_c7_c0_c, s2_c6_c0_c, s2_c5_c0_c, s2_c4_c0_c, s2_c3_c0_c, s2_c2_h0_c, s2_c2_h0_s, pp[0][1], pp[0][0]};
  assign row1 = {1'b0, pp[7][7], s2_c13_f0_s, s2_c12_c0_s, s2_c11_c0_s, s2_c10_c0_s, s2_c9_c0_s, s2_c8_c0_s, s2_c7_c0_s, s2_c6_c0_s, s2_c5_c0_s, s2_c4_c0_s, s2_c3_c0_s, pp[2][0], pp[1][0], 1'b0};

  ripple_adder #(.W(PW)) u_cpa (.x(row0), .y(row1), .s(p), .cout(unused_cout));
endmodule
