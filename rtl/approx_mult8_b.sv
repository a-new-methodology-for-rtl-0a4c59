// 8x8 unsigned approximate multiplier, "Multiplier B".
//
// The N x N AND array is first rewritten: in every column of weight 3 to
// 11 each mirrored pair a[i][m], a[m][i] (i > m) becomes a propagate bit
// p = a[i][m] | a[m][i] and a generate bit g = a[i][m] & a[m][i] (see
// pp_transform). All generate bits of a column are merged by OR gates of at
// most four inputs, ceil(k/4) gates for k generate bits; this is where most
// of the error and most of the saving come from. The propagate bits, the
// diagonal bits a[i][i] and the untransformed corner bits are then reduced
// column by column with half adders, full adders and 4-2 compressors:
//   stage 1: compressors, full and half adders on the transformed bits,
//            leaving three rows;
//   stage 2: a half adder at weight 2 and a full adder at weights 3..13,
//            leaving two rows.
// The last two rows are added by an exact ripple carry adder; its carry out
// of the top column is not used, the product being 16 bits wide.
//
// Within a column, the bits are listed top to bottom as: unit sums, bits that
// pass through, OR-ed generate bits, then carries from the column below, and
// each unit takes the next bits from the top. The order matters because the
// approximate full adder and compressor are not symmetric in their inputs.
// The units of both stages and the bit order follow the published dot
// diagram of the 8-bit design, unit for unit.
// The 8-bit Multiplier B is only described in words; its exact columns are
// this design's reading of that description.
// Multiplier B differs from Multiplier A only in the units it uses: columns
// of weight 7 and up use exact half adders, full adders and 4-2 compressors,
// and the exact compressors of a level are chained, each passing its cout to
// the cin of the compressor in the same position one column higher (cin of
// the first one is 0). A 3-input unit that receives a cin becomes an exact
// compressor with x4 = 0, a 2-input one an exact full adder and a 1-input one
// an exact half adder, so the chain never adds a bit to any column. The
// merging of generate bits by OR gates is kept in every column, so the upper
// columns are not error-free.
//
// Interface: b, c (8-bit unsigned operands) in; y (16-bit approximate
// product) out. Timing: purely combinational.
// This file is a flat netlist, one line per unit, following the column
// plans described above; the wire names say level, weight and unit
// (s2_w10_u0 is the sum of unit 0 in the weight-10 column of level 2).
module approx_mult8_b (
  input  logic [7:0]  b,
  input  logic [7:0]  c,
  output logic [15:0] y
);
  logic [7:0][7:0] a, p, g;
  pp_transform #(.N(8)) u_pp (.b(b), .c(c), .a(a), .p(p), .g(g));

  logic gor_w3_0, gor_w4_0, s1_w4_u0, c1_w4_u0, gor_w5_0, s1_w5_u0, c1_w5_u0, gor_w6_0;
  logic s1_w6_u0, c1_w6_u0, gor_w7_0, s1_w7_u0, c1_w7_u0, co1_w7_u0, gor_w8_0, s1_w8_u0;
  logic c1_w8_u0, co1_w8_u0, gor_w9_0, s1_w9_u0, c1_w9_u0, co1_w9_u0, gor_w10_0, s1_w10_u0;
  logic c1_w10_u0, co1_w10_u0, gor_w11_0, s1_w11_u0, c1_w11_u0, s1_w12_u0, c1_w12_u0, s2_w2_u0;
  logic c2_w2_u0, s2_w3_u0, c2_w3_u0, s2_w4_u0, c2_w4_u0, s2_w5_u0, c2_w5_u0, s2_w6_u0;
  logic c2_w6_u0, s2_w7_u0, c2_w7_u0, s2_w8_u0, c2_w8_u0, s2_w9_u0, c2_w9_u0, s2_w10_u0;
  logic c2_w10_u0, s2_w11_u0, c2_w11_u0, s2_w12_u0, c2_w12_u0, s2_w13_u0, c2_w13_u0;

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
  exact_compressor_4_2 u_l1_w7_u0 (.x1(p[7][0]), .x2(p[6][1]), .x3(p[5][2]), .x4(p[4][3]), .cin(1'b0), .sum(s1_w7_u0), .carry(c1_w7_u0), .cout(co1_w7_u0));
  // weight 8
  assign gor_w8_0 = g[7][1] | g[6][2] | g[5][3];
  exact_compressor_4_2 u_l1_w8_u0 (.x1(p[7][1]), .x2(p[6][2]), .x3(p[5][3]), .x4(a[4][4]), .cin(co1_w7_u0), .sum(s1_w8_u0), .carry(c1_w8_u0), .cout(co1_w8_u0));
  // weight 9
  assign gor_w9_0 = g[7][2] | g[6][3] | g[5][4];
  exact_compressor_4_2 u_l1_w9_u0 (.x1(p[7][2]), .x2(p[6][3]), .x3(p[5][4]), .x4(1'b0), .cin(co1_w8_u0), .sum(s1_w9_u0), .carry(c1_w9_u0), .cout(co1_w9_u0));
  // weight 10
  assign gor_w10_0 = g[7][3] | g[6][4];
  exact_compressor_4_2 u_l1_w10_u0 (.x1(p[7][3]), .x2(p[6][4]), .x3(a[5][5]), .x4(1'b0), .cin(co1_w9_u0), .sum(s1_w10_u0), .carry(c1_w10_u0), .cout(co1_w10_u0));
  // weight 11
  assign gor_w11_0 = g[7][4] | g[6][5];
  exact_full_adder u_l1_w11_u0 (.x1(p[7][4]), .x2(p[6][5]), .x3(co1_w10_u0), .sum(s1_w11_u0), .carry(c1_w11_u0));
  // weight 12
  exact_half_adder u_l1_w12_u0 (.x1(a[7][5]), .x2(a[5][7]), .sum(s1_w12_u0), .carry(c1_w12_u0));
  // weight 13
  // weight 14
  // ---- level 2 reduction ----
  approx_half_adder u_l2_w2_u0 (.y1(a[2][0]), .y2(a[0][2]), .sum(s2_w2_u0), .carry(c2_w2_u0));
  approx_full_adder u_l2_w3_u0 (.y1(p[3][0]), .y2(p[2][1]), .y3(gor_w3_0), .sum(s2_w3_u0), .carry(c2_w3_u0));
  approx_full_adder u_l2_w4_u0 (.y1(s1_w4_u0), .y2(a[2][2]), .y3(gor_w4_0), .sum(s2_w4_u0), .carry(c2_w4_u0));
  approx_full_adder u_l2_w5_u0 (.y1(s1_w5_u0), .y2(gor_w5_0), .y3(c1_w4_u0), .sum(s2_w5_u0), .carry(c2_w5_u0));
  approx_full_adder u_l2_w6_u0 (.y1(s1_w6_u0), .y2(gor_w6_0), .y3(c1_w5_u0), .sum(s2_w6_u0), .carry(c2_w6_u0));
  exact_full_adder u_l2_w7_u0 (.x1(s1_w7_u0), .x2(gor_w7_0), .x3(c1_w6_u0), .sum(s2_w7_u0), .carry(c2_w7_u0));
  exact_full_adder u_l2_w8_u0 (.x1(s1_w8_u0), .x2(gor_w8_0), .x3(c1_w7_u0), .sum(s2_w8_u0), .carry(c2_w8_u0));
  exact_full_adder u_l2_w9_u0 (.x1(s1_w9_u0), .x2(gor_w9_0), .x3(c1_w8_u0), .sum(s2_w9_u0), .carry(c2_w9_u0));
  exact_full_adder u_l2_w10_u0 (.x1(s1_w10_u0), .x2(gor_w10_0), .x3(c1_w9_u0), .sum(s2_w10_u0), .carry(c2_w10_u0));
  exact_full_adder u_l2_w11_u0 (.x1(s1_w11_u0), .x2(gor_w11_0), .x3(c1_w10_u0), .sum(s2_w11_u0), .carry(c2_w11_u0));
  exact_full_adder u_l2_w12_u0 (.x1(s1_w12_u0), .x2(c1_w11_u0), .x3(a[6][6]), .sum(s2_w12_u0), .carry(c2_w12_u0));
  exact_full_adder u_l2_w13_u0 (.x1(a[7][6]), .x2(a[6][7]), .x3(c1_w12_u0), .sum(s2_w13_u0), .carry(c2_w13_u0));

  // ---- final two rows into the ripple carry adder ----
  logic [15:0] row_a, row_b;
  logic       rca_cout;  // carry out of the top column, not part of the product
  assign row_a = {1'b0, a[7][7], s2_w13_u0, s2_w12_u0, s2_w11_u0, s2_w10_u0, s2_w9_u0, s2_w8_u0, s2_w7_u0, s2_w6_u0, s2_w5_u0, s2_w4_u0, s2_w3_u0, s2_w2_u0, a[1][0], a[0][0]};
  assign row_b = {1'b0, c2_w13_u0, c2_w12_u0, c2_w11_u0, c2_w10_u0, c2_w9_u0, c2_w8_u0, c2_w7_u0, c2_w6_u0, c2_w5_u0, c2_w4_u0, c2_w3_u0, c2_w2_u0, a[1][1], a[0][1], 1'b0};
  ripple_carry_adder #(.WIDTH(16)) u_rca (.a(row_a), .b(row_b), .sum(y), .cout(rca_cout));
endmodule
