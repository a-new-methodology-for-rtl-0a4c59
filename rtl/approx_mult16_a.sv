// 16x16 unsigned approximate multiplier, "Multiplier A".
//
// The N x N AND array is first rewritten: in every column of weight 3 to
// 27 each mirrored pair a[i][m], a[m][i] (i > m) becomes a propagate bit
// p = a[i][m] | a[m][i] and a generate bit g = a[i][m] & a[m][i] (see
// pp_transform). All generate bits of a column are merged by OR gates of at
// most four inputs, ceil(k/4) gates for k generate bits; this is where most
// of the error and most of the saving come from. The propagate bits, the
// diagonal bits a[i][i] and the untransformed corner bits are then reduced
// column by column with half adders, full adders and 4-2 compressors:
//   level 1 -> 2: sixteen rows down to six (groups of four go to 4-2
//            compressors, a remainder of three or two to a full or half adder);
//   level 2 -> 3: six rows down to four;
//   level 3 -> 4: four rows down to two.
// The last two rows are added by an exact ripple carry adder; its carry out
// of the top column is not used, the product being 32 bits wide.
//
// Within a column, the bits are listed top to bottom as: unit sums, bits that
// pass through, OR-ed generate bits, then carries from the column below, and
// each unit takes the next bits from the top. The order matters because the
// approximate full adder and compressor are not symmetric in their inputs.
// Levels 2 to 4 follow the published dot diagrams unit for unit. Level 1 is
// not drawn in the source; it is built by the rule of the 8-bit design (groups
// of four from the top, remainder three or two to a full or half adder, a
// single leftover bit passes), with the diagonal bit at weight 4 and at weight
// 28 left out as in the 8-bit design, which reproduces the level-2 rows that
// are drawn.
//
// Interface: b, c (16-bit unsigned operands) in; y (32-bit approximate
// product) out. Timing: purely combinational.
// This file is a flat netlist, one line per unit, following the column
// plans described above; the wire names say level, weight and unit
// (s2_w10_u0 is the sum of unit 0 in the weight-10 column of level 2).
module approx_mult16_a (
  input  logic [15:0]  b,
  input  logic [15:0]  c,
  output logic [31:0] y
);
  logic [15:0][15:0] a, p, g;
  pp_transform #(.N(16)) u_pp (.b(b), .c(c), .a(a), .p(p), .g(g));

  logic gor_w3_0, gor_w4_0, s1_w4_u0, c1_w4_u0, gor_w5_0, s1_w5_u0, c1_w5_u0, gor_w6_0;
  logic s1_w6_u0, c1_w6_u0, gor_w7_0, s1_w7_u0, c1_w7_u0, gor_w8_0, s1_w8_u0, c1_w8_u0;
  logic gor_w9_0, gor_w9_1, s1_w9_u0, c1_w9_u0, gor_w10_0, gor_w10_1, s1_w10_u0, c1_w10_u0;
  logic s1_w10_u1, c1_w10_u1, gor_w11_0, gor_w11_1, s1_w11_u0, c1_w11_u0, s1_w11_u1, c1_w11_u1;
  logic gor_w12_0, gor_w12_1, s1_w12_u0, c1_w12_u0, s1_w12_u1, c1_w12_u1, gor_w13_0, gor_w13_1;
  logic s1_w13_u0, c1_w13_u0, s1_w13_u1, c1_w13_u1, gor_w14_0, gor_w14_1, s1_w14_u0, c1_w14_u0;
  logic s1_w14_u1, c1_w14_u1, gor_w15_0, gor_w15_1, s1_w15_u0, c1_w15_u0, s1_w15_u1, c1_w15_u1;
  logic gor_w16_0, gor_w16_1, s1_w16_u0, c1_w16_u0, s1_w16_u1, c1_w16_u1, gor_w17_0, gor_w17_1;
  logic s1_w17_u0, c1_w17_u0, s1_w17_u1, c1_w17_u1, gor_w18_0, gor_w18_1, s1_w18_u0, c1_w18_u0;
  logic s1_w18_u1, c1_w18_u1, gor_w19_0, gor_w19_1, s1_w19_u0, c1_w19_u0, s1_w19_u1, c1_w19_u1;
  logic gor_w20_0, gor_w20_1, s1_w20_u0, c1_w20_u0, s1_w20_u1, c1_w20_u1, gor_w21_0, gor_w21_1;
  logic s1_w21_u0, c1_w21_u0, gor_w22_0, s1_w22_u0, c1_w22_u0, gor_w23_0, s1_w23_u0, c1_w23_u0;
  logic gor_w24_0, s1_w24_u0, c1_w24_u0, gor_w25_0, s1_w25_u0, c1_w25_u0, gor_w26_0, s1_w26_u0;
  logic c1_w26_u0, gor_w27_0, s1_w27_u0, c1_w27_u0, s1_w28_u0, c1_w28_u0, s2_w9_u0, c2_w9_u0;
  logic s2_w10_u0, c2_w10_u0, s2_w11_u0, c2_w11_u0, s2_w12_u0, c2_w12_u0, s2_w13_u0, c2_w13_u0;
  logic s2_w14_u0, c2_w14_u0, s2_w15_u0, c2_w15_u0, s2_w16_u0, c2_w16_u0, s2_w17_u0, c2_w17_u0;
  logic s2_w18_u0, c2_w18_u0, s2_w19_u0, c2_w19_u0, s2_w20_u0, c2_w20_u0, s2_w21_u0, c2_w21_u0;
  logic s2_w22_u0, c2_w22_u0, s3_w2_u0, c3_w2_u0, s3_w3_u0, c3_w3_u0, s3_w4_u0, c3_w4_u0;
  logic s3_w5_u0, c3_w5_u0, s3_w6_u0, c3_w6_u0, s3_w7_u0, c3_w7_u0, s3_w8_u0, c3_w8_u0;
  logic s3_w9_u0, c3_w9_u0, s3_w10_u0, c3_w10_u0, s3_w11_u0, c3_w11_u0, s3_w12_u0, c3_w12_u0;
  logic s3_w13_u0, c3_w13_u0, s3_w14_u0, c3_w14_u0, s3_w15_u0, c3_w15_u0, s3_w16_u0, c3_w16_u0;
  logic s3_w17_u0, c3_w17_u0, s3_w18_u0, c3_w18_u0, s3_w19_u0, c3_w19_u0, s3_w20_u0, c3_w20_u0;
  logic s3_w21_u0, c3_w21_u0, s3_w22_u0, c3_w22_u0, s3_w23_u0, c3_w23_u0, s3_w24_u0, c3_w24_u0;
  logic s3_w25_u0, c3_w25_u0, s3_w26_u0, c3_w26_u0, s3_w27_u0, c3_w27_u0, s3_w28_u0, c3_w28_u0;
  logic s3_w29_u0, c3_w29_u0;

  // ---- level 1: transformed partial products ----
  // weight 0
  // weight 1
  // weight 2
  // weight 3
  assign gor_w3_0 = g[3][0] | g[2][1];
  // weight 4
  assign gor_w4_0 = g[4][0] | g[3][1];
  approx_half_adder u_l1_w4_u0 (.y1(p[4][0]), .y2(p[3][1]), .sum(s1_w4_u0), .carry(c1_w4_u0));
  // weight 5
  assign gor_w5_0 = g[5][0] | g[4][1] | g[3][2];
  approx_full_adder u_l1_w5_u0 (.y1(p[5][0]), .y2(p[4][1]), .y3(p[3][2]), .sum(s1_w5_u0), .carry(c1_w5_u0));
  // weight 6
  assign gor_w6_0 = g[6][0] | g[5][1] | g[4][2];
  approx_compressor_4_2 u_l1_w6_u0 (.y1(p[6][0]), .y2(p[5][1]), .y3(p[4][2]), .y4(a[3][3]), .sum(s1_w6_u0), .carry(c1_w6_u0));
  // weight 7
  assign gor_w7_0 = g[7][0] | g[6][1] | g[5][2] | g[4][3];
  approx_compressor_4_2 u_l1_w7_u0 (.y1(p[7][0]), .y2(p[6][1]), .y3(p[5][2]), .y4(p[4][3]), .sum(s1_w7_u0), .carry(c1_w7_u0));
  // weight 8
  assign gor_w8_0 = g[8][0] | g[7][1] | g[6][2] | g[5][3];
  approx_compressor_4_2 u_l1_w8_u0 (.y1(p[8][0]), .y2(p[7][1]), .y3(p[6][2]), .y4(p[5][3]), .sum(s1_w8_u0), .carry(c1_w8_u0));
  // weight 9
  assign gor_w9_0 = g[9][0] | g[8][1] | g[7][2];
  assign gor_w9_1 = g[6][3] | g[5][4];
  approx_compressor_4_2 u_l1_w9_u0 (.y1(p[9][0]), .y2(p[8][1]), .y3(p[7][2]), .y4(p[6][3]), .sum(s1_w9_u0), .carry(c1_w9_u0));
  // weight 10
  assign gor_w10_0 = g[10][0] | g[9][1] | g[8][2];
  assign gor_w10_1 = g[7][3] | g[6][4];
  approx_compressor_4_2 u_l1_w10_u0 (.y1(p[10][0]), .y2(p[9][1]), .y3(p[8][2]), .y4(p[7][3]), .sum(s1_w10_u0), .carry(c1_w10_u0));
  approx_half_adder u_l1_w10_u1 (.y1(p[6][4]), .y2(a[5][5]), .sum(s1_w10_u1), .carry(c1_w10_u1));
  // weight 11
  assign gor_w11_0 = g[11][0] | g[10][1] | g[9][2];
  assign gor_w11_1 = g[8][3] | g[7][4] | g[6][5];
  approx_compressor_4_2 u_l1_w11_u0 (.y1(p[11][0]), .y2(p[10][1]), .y3(p[9][2]), .y4(p[8][3]), .sum(s1_w11_u0), .carry(c1_w11_u0));
  approx_half_adder u_l1_w11_u1 (.y1(p[7][4]), .y2(p[6][5]), .sum(s1_w11_u1), .carry(c1_w11_u1));
  // weight 12
  assign gor_w12_0 = g[12][0] | g[11][1] | g[10][2];
  assign gor_w12_1 = g[9][3] | g[8][4] | g[7][5];
  approx_compressor_4_2 u_l1_w12_u0 (.y1(p[12][0]), .y2(p[11][1]), .y3(p[10][2]), .y4(p[9][3]), .sum(s1_w12_u0), .carry(c1_w12_u0));
  approx_full_adder u_l1_w12_u1 (.y1(p[8][4]), .y2(p[7][5]), .y3(a[6][6]), .sum(s1_w12_u1), .carry(c1_w12_u1));
  // weight 13
  assign gor_w13_0 = g[13][0] | g[12][1] | g[11][2] | g[10][3];
  assign gor_w13_1 = g[9][4] | g[8][5] | g[7][6];
  approx_compressor_4_2 u_l1_w13_u0 (.y1(p[13][0]), .y2(p[12][1]), .y3(p[11][2]), .y4(p[10][3]), .sum(s1_w13_u0), .carry(c1_w13_u0));
  approx_full_adder u_l1_w13_u1 (.y1(p[9][4]), .y2(p[8][5]), .y3(p[7][6]), .sum(s1_w13_u1), .carry(c1_w13_u1));
  // weight 14
  assign gor_w14_0 = g[14][0] | g[13][1] | g[12][2] | g[11][3];
  assign gor_w14_1 = g[10][4] | g[9][5] | g[8][6];
  approx_compressor_4_2 u_l1_w14_u0 (.y1(p[14][0]), .y2(p[13][1]), .y3(p[12][2]), .y4(p[11][3]), .sum(s1_w14_u0), .carry(c1_w14_u0));
  approx_compressor_4_2 u_l1_w14_u1 (.y1(p[10][4]), .y2(p[9][5]), .y3(p[8][6]), .y4(a[7][7]), .sum(s1_w14_u1), .carry(c1_w14_u1));
  // weight 15
  assign gor_w15_0 = g[15][0] | g[14][1] | g[13][2] | g[12][3];
  assign gor_w15_1 = g[11][4] | g[10][5] | g[9][6] | g[8][7];
  approx_compressor_4_2 u_l1_w15_u0 (.y1(p[15][0]), .y2(p[14][1]), .y3(p[13][2]), .y4(p[12][3]), .sum(s1_w15_u0), .carry(c1_w15_u0));
  approx_compressor_4_2 u_l1_w15_u1 (.y1(p[11][4]), .y2(p[10][5]), .y3(p[9][6]), .y4(p[8][7]), .sum(s1_w15_u1), .carry(c1_w15_u1));
  // weight 16
  assign gor_w16_0 = g[15][1] | g[14][2] | g[13][3] | g[12][4];
  assign gor_w16_1 = g[11][5] | g[10][6] | g[9][7];
  approx_compressor_4_2 u_l1_w16_u0 (.y1(p[15][1]), .y2(p[14][2]), .y3(p[13][3]), .y4(p[12][4]), .sum(s1_w16_u0), .carry(c1_w16_u0));
  approx_compressor_4_2 u_l1_w16_u1 (.y1(p[11][5]), .y2(p[10][6]), .y3(p[9][7]), .y4(a[8][8]), .sum(s1_w16_u1), .carry(c1_w16_u1));
  // weight 17
  assign gor_w17_0 = g[15][2] | g[14][3] | g[13][4] | g[12][5];
  assign gor_w17_1 = g[11][6] | g[10][7] | g[9][8];
  approx_compressor_4_2 u_l1_w17_u0 (.y1(p[15][2]), .y2(p[14][3]), .y3(p[13][4]), .y4(p[12][5]), .sum(s1_w17_u0), .carry(c1_w17_u0));
  approx_full_adder u_l1_w17_u1 (.y1(p[11][6]), .y2(p[10][7]), .y3(p[9][8]), .sum(s1_w17_u1), .carry(c1_w17_u1));
  // weight 18
  assign gor_w18_0 = g[15][3] | g[14][4] | g[13][5];
  assign gor_w18_1 = g[12][6] | g[11][7] | g[10][8];
  approx_compressor_4_2 u_l1_w18_u0 (.y1(p[15][3]), .y2(p[14][4]), .y3(p[13][5]), .y4(p[12][6]), .sum(s1_w18_u0), .carry(c1_w18_u0));
  approx_full_adder u_l1_w18_u1 (.y1(p[11][7]), .y2(p[10][8]), .y3(a[9][9]), .sum(s1_w18_u1), .carry(c1_w18_u1));
  // weight 19
  assign gor_w19_0 = g[15][4] | g[14][5] | g[13][6];
  assign gor_w19_1 = g[12][7] | g[11][8] | g[10][9];
  approx_compressor_4_2 u_l1_w19_u0 (.y1(p[15][4]), .y2(p[14][5]), .y3(p[13][6]), .y4(p[12][7]), .sum(s1_w19_u0), .carry(c1_w19_u0));
  approx_half_adder u_l1_w19_u1 (.y1(p[11][8]), .y2(p[10][9]), .sum(s1_w19_u1), .carry(c1_w19_u1));
  // weight 20
  assign gor_w20_0 = g[15][5] | g[14][6] | g[13][7];
  assign gor_w20_1 = g[12][8] | g[11][9];
  approx_compressor_4_2 u_l1_w20_u0 (.y1(p[15][5]), .y2(p[14][6]), .y3(p[13][7]), .y4(p[12][8]), .sum(s1_w20_u0), .carry(c1_w20_u0));
  approx_half_adder u_l1_w20_u1 (.y1(p[11][9]), .y2(a[10][10]), .sum(s1_w20_u1), .carry(c1_w20_u1));
  // weight 21
  assign gor_w21_0 = g[15][6] | g[14][7] | g[13][8];
  assign gor_w21_1 = g[12][9] | g[11][10];
  approx_compressor_4_2 u_l1_w21_u0 (.y1(p[15][6]), .y2(p[14][7]), .y3(p[13][8]), .y4(p[12][9]), .sum(s1_w21_u0), .carry(c1_w21_u0));
  // weight 22
  assign gor_w22_0 = g[15][7] | g[14][8] | g[13][9] | g[12][10];
  approx_compressor_4_2 u_l1_w22_u0 (.y1(p[15][7]), .y2(p[14][8]), .y3(p[13][9]), .y4(p[12][10]), .sum(s1_w22_u0), .carry(c1_w22_u0));
  // weight 23
  assign gor_w23_0 = g[15][8] | g[14][9] | g[13][10] | g[12][11];
  approx_compressor_4_2 u_l1_w23_u0 (.y1(p[15][8]), .y2(p[14][9]), .y3(p[13][10]), .y4(p[12][11]), .sum(s1_w23_u0), .carry(c1_w23_u0));
  // weight 24
  assign gor_w24_0 = g[15][9] | g[14][10] | g[13][11];
  approx_compressor_4_2 u_l1_w24_u0 (.y1(p[15][9]), .y2(p[14][10]), .y3(p[13][11]), .y4(a[12][12]), .sum(s1_w24_u0), .carry(c1_w24_u0));
  // weight 25
  assign gor_w25_0 = g[15][10] | g[14][11] | g[13][12];
  approx_full_adder u_l1_w25_u0 (.y1(p[15][10]), .y2(p[14][11]), .y3(p[13][12]), .sum(s1_w25_u0), .carry(c1_w25_u0));
  // weight 26
  assign gor_w26_0 = g[15][11] | g[14][12];
  approx_full_adder u_l1_w26_u0 (.y1(p[15][11]), .y2(p[14][12]), .y3(a[13][13]), .sum(s1_w26_u0), .carry(c1_w26_u0));
  // weight 27
  assign gor_w27_0 = g[15][12] | g[14][13];
  approx_half_adder u_l1_w27_u0 (.y1(p[15][12]), .y2(p[14][13]), .sum(s1_w27_u0), .carry(c1_w27_u0));
  // weight 28
  approx_half_adder u_l1_w28_u0 (.y1(a[15][13]), .y2(a[13][15]), .sum(s1_w28_u0), .carry(c1_w28_u0));
  // weight 29
  // weight 30
  // ---- level 2 reduction ----
  approx_half_adder u_l2_w9_u0 (.y1(s1_w9_u0), .y2(p[5][4]), .sum(s2_w9_u0), .carry(c2_w9_u0));
  approx_full_adder u_l2_w10_u0 (.y1(s1_w10_u0), .y2(s1_w10_u1), .y3(gor_w10_0), .sum(s2_w10_u0), .carry(c2_w10_u0));
  approx_compressor_4_2 u_l2_w11_u0 (.y1(s1_w11_u0), .y2(s1_w11_u1), .y3(gor_w11_0), .y4(gor_w11_1), .sum(s2_w11_u0), .carry(c2_w11_u0));
  approx_compressor_4_2 u_l2_w12_u0 (.y1(s1_w12_u0), .y2(s1_w12_u1), .y3(gor_w12_0), .y4(gor_w12_1), .sum(s2_w12_u0), .carry(c2_w12_u0));
  approx_compressor_4_2 u_l2_w13_u0 (.y1(s1_w13_u0), .y2(s1_w13_u1), .y3(gor_w13_0), .y4(gor_w13_1), .sum(s2_w13_u0), .carry(c2_w13_u0));
  approx_compressor_4_2 u_l2_w14_u0 (.y1(s1_w14_u0), .y2(s1_w14_u1), .y3(gor_w14_0), .y4(gor_w14_1), .sum(s2_w14_u0), .carry(c2_w14_u0));
  approx_compressor_4_2 u_l2_w15_u0 (.y1(s1_w15_u0), .y2(s1_w15_u1), .y3(gor_w15_0), .y4(gor_w15_1), .sum(s2_w15_u0), .carry(c2_w15_u0));
  approx_compressor_4_2 u_l2_w16_u0 (.y1(s1_w16_u0), .y2(s1_w16_u1), .y3(gor_w16_0), .y4(gor_w16_1), .sum(s2_w16_u0), .carry(c2_w16_u0));
  approx_compressor_4_2 u_l2_w17_u0 (.y1(s1_w17_u0), .y2(s1_w17_u1), .y3(gor_w17_0), .y4(gor_w17_1), .sum(s2_w17_u0), .carry(c2_w17_u0));
  approx_compressor_4_2 u_l2_w18_u0 (.y1(s1_w18_u0), .y2(s1_w18_u1), .y3(gor_w18_0), .y4(gor_w18_1), .sum(s2_w18_u0), .carry(c2_w18_u0));
  approx_compressor_4_2 u_l2_w19_u0 (.y1(s1_w19_u0), .y2(s1_w19_u1), .y3(gor_w19_0), .y4(gor_w19_1), .sum(s2_w19_u0), .carry(c2_w19_u0));
  approx_compressor_4_2 u_l2_w20_u0 (.y1(s1_w20_u0), .y2(s1_w20_u1), .y3(gor_w20_0), .y4(gor_w20_1), .sum(s2_w20_u0), .carry(c2_w20_u0));
  approx_compressor_4_2 u_l2_w21_u0 (.y1(s1_w21_u0), .y2(p[11][10]), .y3(gor_w21_0), .y4(gor_w21_1), .sum(s2_w21_u0), .carry(c2_w21_u0));
  approx_half_adder u_l2_w22_u0 (.y1(s1_w22_u0), .y2(a[11][11]), .sum(s2_w22_u0), .carry(c2_w22_u0));
  // ---- level 3 reduction ----
  approx_full_adder u_l3_w2_u0 (.y1(a[2][0]), .y2(a[0][2]), .y3(a[1][1]), .sum(s3_w2_u0), .carry(c3_w2_u0));
  approx_full_adder u_l3_w3_u0 (.y1(p[3][0]), .y2(p[2][1]), .y3(gor_w3_0), .sum(s3_w3_u0), .carry(c3_w3_u0));
  approx_full_adder u_l3_w4_u0 (.y1(s1_w4_u0), .y2(a[2][2]), .y3(gor_w4_0), .sum(s3_w4_u0), .carry(c3_w4_u0));
  approx_full_adder u_l3_w5_u0 (.y1(s1_w5_u0), .y2(gor_w5_0), .y3(c1_w4_u0), .sum(s3_w5_u0), .carry(c3_w5_u0));
  approx_full_adder u_l3_w6_u0 (.y1(s1_w6_u0), .y2(gor_w6_0), .y3(c1_w5_u0), .sum(s3_w6_u0), .carry(c3_w6_u0));
  approx_full_adder u_l3_w7_u0 (.y1(s1_w7_u0), .y2(gor_w7_0), .y3(c1_w6_u0), .sum(s3_w7_u0), .carry(c3_w7_u0));
  approx_compressor_4_2 u_l3_w8_u0 (.y1(s1_w8_u0), .y2(a[4][4]), .y3(gor_w8_0), .y4(c1_w7_u0), .sum(s3_w8_u0), .carry(c3_w8_u0));
  approx_compressor_4_2 u_l3_w9_u0 (.y1(s2_w9_u0), .y2(gor_w9_0), .y3(gor_w9_1), .y4(c1_w8_u0), .sum(s3_w9_u0), .carry(c3_w9_u0));
  approx_compressor_4_2 u_l3_w10_u0 (.y1(s2_w10_u0), .y2(gor_w10_1), .y3(c1_w9_u0), .y4(c2_w9_u0), .sum(s3_w10_u0), .carry(c3_w10_u0));
  approx_compressor_4_2 u_l3_w11_u0 (.y1(s2_w11_u0), .y2(c1_w10_u0), .y3(c1_w10_u1), .y4(c2_w10_u0), .sum(s3_w11_u0), .carry(c3_w11_u0));
  approx_compressor_4_2 u_l3_w12_u0 (.y1(s2_w12_u0), .y2(c1_w11_u0), .y3(c1_w11_u1), .y4(c2_w11_u0), .sum(s3_w12_u0), .carry(c3_w12_u0));
  approx_compressor_4_2 u_l3_w13_u0 (.y1(s2_w13_u0), .y2(c1_w12_u0), .y3(c1_w12_u1), .y4(c2_w12_u0), .sum(s3_w13_u0), .carry(c3_w13_u0));
  approx_compressor_4_2 u_l3_w14_u0 (.y1(s2_w14_u0), .y2(c1_w13_u0), .y3(c1_w13_u1), .y4(c2_w13_u0), .sum(s3_w14_u0), .carry(c3_w14_u0));
  approx_compressor_4_2 u_l3_w15_u0 (.y1(s2_w15_u0), .y2(c1_w14_u0), .y3(c1_w14_u1), .y4(c2_w14_u0), .sum(s3_w15_u0), .carry(c3_w15_u0));
  approx_compressor_4_2 u_l3_w16_u0 (.y1(s2_w16_u0), .y2(c1_w15_u0), .y3(c1_w15_u1), .y4(c2_w15_u0), .sum(s3_w16_u0), .carry(c3_w16_u0));
  approx_compressor_4_2 u_l3_w17_u0 (.y1(s2_w17_u0), .y2(c1_w16_u0), .y3(c1_w16_u1), .y4(c2_w16_u0), .sum(s3_w17_u0), .carry(c3_w17_u0));
  approx_compressor_4_2 u_l3_w18_u0 (.y1(s2_w18_u0), .y2(c1_w17_u0), .y3(c1_w17_u1), .y4(c2_w17_u0), .sum(s3_w18_u0), .carry(c3_w18_u0));
  approx_compressor_4_2 u_l3_w19_u0 (.y1(s2_w19_u0), .y2(c1_w18_u0), .y3(c1_w18_u1), .y4(c2_w18_u0), .sum(s3_w19_u0), .carry(c3_w19_u0));
  approx_compressor_4_2 u_l3_w20_u0 (.y1(s2_w20_u0), .y2(c1_w19_u0), .y3(c1_w19_u1), .y4(c2_w19_u0), .sum(s3_w20_u0), .carry(c3_w20_u0));
  approx_compressor_4_2 u_l3_w21_u0 (.y1(s2_w21_u0), .y2(c1_w20_u0), .y3(c1_w20_u1), .y4(c2_w20_u0), .sum(s3_w21_u0), .carry(c3_w21_u0));
  approx_compressor_4_2 u_l3_w22_u0 (.y1(s2_w22_u0), .y2(gor_w22_0), .y3(c1_w21_u0), .y4(c2_w21_u0), .sum(s3_w22_u0), .carry(c3_w22_u0));
  approx_compressor_4_2 u_l3_w23_u0 (.y1(s1_w23_u0), .y2(gor_w23_0), .y3(c1_w22_u0), .y4(c2_w22_u0), .sum(s3_w23_u0), .carry(c3_w23_u0));
  approx_full_adder u_l3_w24_u0 (.y1(s1_w24_u0), .y2(gor_w24_0), .y3(c1_w23_u0), .sum(s3_w24_u0), .carry(c3_w24_u0));
  approx_full_adder u_l3_w25_u0 (.y1(s1_w25_u0), .y2(gor_w25_0), .y3(c1_w24_u0), .sum(s3_w25_u0), .carry(c3_w25_u0));
  approx_full_adder u_l3_w26_u0 (.y1(s1_w26_u0), .y2(gor_w26_0), .y3(c1_w25_u0), .sum(s3_w26_u0), .carry(c3_w26_u0));
  approx_full_adder u_l3_w27_u0 (.y1(s1_w27_u0), .y2(gor_w27_0), .y3(c1_w26_u0), .sum(s3_w27_u0), .carry(c3_w27_u0));
  approx_full_adder u_l3_w28_u0 (.y1(s1_w28_u0), .y2(a[14][14]), .y3(c1_w27_u0), .sum(s3_w28_u0), .carry(c3_w28_u0));
  approx_full_adder u_l3_w29_u0 (.y1(a[15][14]), .y2(a[14][15]), .y3(c1_w28_u0), .sum(s3_w29_u0), .carry(c3_w29_u0));

  // ---- final two rows into the ripple carry adder ----
  logic [31:0] row_a, row_b;
  logic       rca_cout;  // carry out of the top column, not part of the product
  assign row_a = {1'b0, a[15][15], s3_w29_u0, s3_w28_u0, s3_w27_u0, s3_w26_u0, s3_w25_u0, s3_w24_u0, s3_w23_u0, s3_w22_u0, s3_w21_u0, s3_w20_u0, s3_w19_u0, s3_w18_u0, s3_w17_u0, s3_w16_u0, s3_w15_u0, s3_w14_u0, s3_w13_u0, s3_w12_u0, s3_w11_u0, s3_w10_u0, s3_w9_u0, s3_w8_u0, s3_w7_u0, s3_w6_u0, s3_w5_u0, s3_w4_u0, s3_w3_u0, s3_w2_u0, a[1][0], a[0][0]};
  assign row_b = {1'b0, c3_w29_u0, c3_w28_u0, c3_w27_u0, c3_w26_u0, c3_w25_u0, c3_w24_u0, c3_w23_u0, c3_w22_u0, c3_w21_u0, c3_w20_u0, c3_w19_u0, c3_w18_u0, c3_w17_u0, c3_w16_u0, c3_w15_u0, c3_w14_u0, c3_w13_u0, c3_w12_u0, c3_w11_u0, c3_w10_u0, c3_w9_u0, c3_w8_u0, c3_w7_u0, c3_w6_u0, c3_w5_u0, c3_w4_u0, c3_w3_u0, c3_w2_u0, 1'b0, a[0][1], 1'b0};
  ripple_carry_adder #(.WIDTH(32)) u_rca (.a(row_a), .b(row_b), .sum(y), .cout(rca_cout));
endmodule
