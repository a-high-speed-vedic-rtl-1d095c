// 8x8 unsigned multiplier built on the Urdhwa Tiryakbhyam ("vertically and
// crosswise") sutra, with the column additions done by 4:2 and 7:2
// compressors instead of chains of half and full adders.
//
// How it works. urdhwa_pp_gen forms all 64 partial products a[i] & b[j] at
// once. Product bit k is then the low bit of column k, the sum of every
// partial product with i + j = k plus the carries that earlier columns send
// up. Each column is reduced to a single bit by one counter, chosen by how
// many bits reach it:
//
//   column  partial products  carries in  total  reduced by
//      0           1               0         1    wire
//      1           2               0         2    half adder
//      2           3               1         4    4:2 compressor (cin = 0)
//      3           4               2         6    7:2 compressor
//      4           5               1         6    7:2 compressor
//      5           6               3         9    7:2 compressor
//      6           7               3        10    7:2 compressor
//      7           8               3        11    7:2 compressor + half adder
//      8           7               4        11    7:2 compressor + half adder
//      9           6               4        10    7:2 compressor
//     10           5               3         8    7:2 compressor
//     11           4               3         7    7:2 compressor
//     12           3               3         6    7:2 compressor
//     13           2               3         5    4:2 compressor
//     14           1               4         5    4:2 compressor
//     15           0               2         2    XOR
//
// A 4:2 compressor sends two carries to column k+1; a 7:2 compressor sends
// c2 to column k+1 and c1, c3 to column k+2; a half adder sends its carry to
// column k+1. Column 15 needs only an XOR: the product is below 2**16, so at
// most one of its two carries can be 1 and nothing is carried out of it.
// Unused compressor inputs are tied to 0.
//
// What follows the published design: unsigned 8-bit operands, a 16-bit
// product, a purely combinational datapath (16 input and 16 output pins, no
// clock), partial products formed by AND gates in parallel, and the column
// sums done by 4:2 and 7:2 compressors with plain XOR where a carry cannot
// occur. The assignment of each column to a compressor, the extra half
// adders in columns 7 and 8, and the routing of every carry are this
// design's own, since only the overall structure is published.
//
// Interface: a, b (8 bits, unsigned) in; p = a * b (16 bits) out, valid one
// combinational settling time after the inputs change.
module vedic_mult8
  import vedic_pkg::*;
(
  input  operand_t a,
  input  operand_t b,
  output product_t p
);
  logic [OPERAND_W-1:0][OPERAND_W-1:0] pp;

  urdhwa_pp_gen #(.N(OPERAND_W)) u_pp (.a(a), .b(b), .pp(pp));

  // Carries, named k<column that made them>_<output>.
  logic k1_h;
  logic k2_co, k2_ca;
  logic k3_c1, k3_c2, k3_c3;
  logic k4_c1, k4_c2, k4_c3;
  logic k5_c1, k5_c2, k5_c3;
  logic k6_c1, k6_c2, k6_c3;
  logic k7_c1, k7_c2, k7_c3, k7_h;
  logic k8_c1, k8_c2, k8_c3, k8_h;
  logic k9_c1, k9_c2, k9_c3;
  logic k10_c1, k10_c2, k10_c3;
  logic k11_c1, k11_c2, k11_c3;
  logic k12_c1, k12_c2, k12_c3;
  logic k13_co, k13_ca;
  logic k14_co, k14_ca;
  logic s7, s8;

  // Column 0
  assign p[0] = pp[0][0];

  // Column 1
  half_adder u_col1 (.a(pp[1][0]), .b(pp[0][1]), .sum(p[1]), .carry(k1_h));

  // Column 2
  compressor_4_2 u_col2 (
    .x0(pp[2][0]), .x1(pp[1][1]), .x2(pp[0][2]), .x3(k1_h), .cin(1'b0),
    .sum(p[2]), .cout(k2_co), .carry(k2_ca)
  );

  // Column 3
  compressor_7_2 u_col3 (
    .a({4'b0, pp[3][0], pp[2][1], pp[1][2], pp[0][3]}),
    .cin1(k2_co), .cin2(k2_ca),
    .sum(p[3]), .c1(k3_c1), .c2(k3_c2), .c3(k3_c3)
  );

  // Column 4
  compressor_7_2 u_col4 (
    .a({3'b0, pp[4][0], pp[3][1], pp[2][2], pp[1][3], pp[0][4]}),
    .cin1(k3_c2), .cin2(1'b0),
    .sum(p[4]), .c1(k4_c1), .c2(k4_c2), .c3(k4_c3)
  );

  // Column 5
  compressor_7_2 u_col5 (
    .a({1'b0, k4_c2, pp[5][0], pp[4][1], pp[3][2], pp[2][3], pp[1][4], pp[0][5]}),
    .cin1(k3_c1), .cin2(k3_c3),
    .sum(p[5]), .c1(k5_c1), .c2(k5_c2), .c3(k5_c3)
  );

  // Column 6
  compressor_7_2 u_col6 (
    .a({k5_c2, pp[6][0], pp[5][1], pp[4][2], pp[3][3], pp[2][4], pp[1][5], pp[0][6]}),
    .cin1(k4_c1), .cin2(k4_c3),
    .sum(p[6]), .c1(k6_c1), .c2(k6_c2), .c3(k6_c3)
  );

  // Column 7: eleven bits, the eleventh is added to the compressor's sum
  compressor_7_2 u_col7 (
    .a({pp[7][0], pp[6][1], pp[5][2], pp[4][3], pp[3][4], pp[2][5], pp[1][6], pp[0][7]}),
    .cin1(k5_c1), .cin2(k5_c3),
    .sum(s7), .c1(k7_c1), .c2(k7_c2), .c3(k7_c3)
  );
  half_adder u_col7_ha (.a(s7), .b(k6_c2), .sum(p[7]), .carry(k7_h));

  // Column 8: eleven bits, as column 7
  compressor_7_2 u_col8 (
    .a({k7_c2, pp[7][1], pp[6][2], pp[5][3], pp[4][4], pp[3][5], pp[2][6], pp[1][7]}),
    .cin1(k6_c1), .cin2(k6_c3),
    .sum(s8), .c1(k8_c1), .c2(k8_c2), .c3(k8_c3)
  );
  half_adder u_col8_ha (.a(s8), .b(k7_h), .sum(p[8]), .carry(k8_h));

  // Column 9
  compressor_7_2 u_col9 (
    .a({k8_h, k8_c2, pp[7][2], pp[6][3], pp[5][4], pp[4][5], pp[3][6], pp[2][7]}),
    .cin1(k7_c1), .cin2(k7_c3),
    .sum(p[9]), .c1(k9_c1), .c2(k9_c2), .c3(k9_c3)
  );

  // Column 10
  compressor_7_2 u_col10 (
    .a({2'b0, k9_c2, pp[7][3], pp[6][4], pp[5][5], pp[4][6], pp[3][7]}),
    .cin1(k8_c1), .cin2(k8_c3),
    .sum(p[10]), .c1(k10_c1), .c2(k10_c2), .c3(k10_c3)
  );

  // Column 11
  compressor_7_2 u_col11 (
    .a({3'b0, k10_c2, pp[7][4], pp[6][5], pp[5][6], pp[4][7]}),
    .cin1(k9_c1), .cin2(k9_c3),
    .sum(p[11]), .c1(k11_c1), .c2(k11_c2), .c3(k11_c3)
  );

  // Column 12
  compressor_7_2 u_col12 (
    .a({4'b0, k11_c2, pp[7][5], pp[6][6], pp[5][7]}),
    .cin1(k10_c1), .cin2(k10_c3),
    .sum(p[12]), .c1(k12_c1), .c2(k12_c2), .c3(k12_c3)
  );

  // Column 13
  compressor_4_2 u_col13 (
    .x0(pp[7][6]), .x1(pp[6][7]), .x2(k11_c1), .x3(k11_c3), .cin(k12_c2),
    .sum(p[13]), .cout(k13_co), .carry(k13_ca)
  );

  // Column 14
  compressor_4_2 u_col14 (
    .x0(pp[7][7]), .x1(k12_c1), .x2(k12_c3), .x3(k13_co), .cin(k13_ca),
    .sum(p[14]), .cout(k14_co), .carry(k14_ca)
  );

  // Column 15: at most one of the two carries is set
  assign p[15] = k14_co ^ k14_ca;
endmodule
