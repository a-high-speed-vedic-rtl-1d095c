// 7:2 compressor: reduces up to ten bits of one column (seven column bits,
// here generalised to a[7:0], plus the two carries cin1 and cin2 that
// earlier columns pass in) to four output bits, with
//     popcount(a) + cin1 + cin2 = sum + 2*c2 + 4*(c1 + c3).
// Structure: two 4:2 compressors, one half adder and two full adders.
//   * compressor u_lo adds a[3:0] + cin1, compressor u_hi adds a[7:4] + cin2;
//   * the half adder combines their two sum bits into the final sum and a
//     weight-2 carry;
//   * full adder 1 adds the two cout bits and the half-adder carry; its
//     carry leaves as c1 (weight 4), its sum goes on to full adder 2;
//   * full adder 2 adds the two carry bits and full adder 1's sum; its sum
//     leaves as c2 (weight 2) and its carry as c3 (weight 4).
// So sum belongs to the column itself, c2 to the next column and c1, c3 to
// the column after that. The component count and the order in which the
// adders follow one another are the published structure; which compressor
// output feeds which full adder, and the output weights that follow from
// it, are this design's own reading, chosen so that the sum is exact.
// Purely combinational: the longest path is 4:2 (3 gates), then half adder,
// then two full adders.
module compressor_7_2 (
  input  logic [7:0] a,
  input  logic       cin1,
  input  logic       cin2,
  output logic       sum,
  output logic       c1,
  output logic       c2,
  output logic       c3
);
  logic s_lo, co_lo, ca_lo;
  logic s_hi, co_hi, ca_hi;
  logic h_c, f1_s;

  compressor_4_2 u_lo (
    .x0(a[0]), .x1(a[1]), .x2(a[2]), .x3(a[3]), .cin(cin1),
    .sum(s_lo), .cout(co_lo), .carry(ca_lo)
  );

  compressor_4_2 u_hi (
    .x0(a[4]), .x1(a[5]), .x2(a[6]), .x3(a[7]), .cin(cin2),
    .sum(s_hi), .cout(co_hi), .carry(ca_hi)
  );

  half_adder u_ha (.a(s_lo), .b(s_hi), .sum(sum), .carry(h_c));

  full_adder u_fa1 (.a(co_lo), .b(co_hi), .c(h_c),  .sum(f1_s), .carry(c1));
  full_adder u_fa2 (.a(ca_lo), .b(ca_hi), .c(f1_s), .sum(c2),   .carry(c3));
endmodule
