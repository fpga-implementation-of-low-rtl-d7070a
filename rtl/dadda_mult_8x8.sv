// Unsigned 8 x 8 approximate Dadda multiplier.
//
// Three steps, as in any array multiplier: partial product generation,
// partial product reduction, final addition.
//   * Generation: pp[i][j] = a[j] & b[i], weight 2^(i+j). Column c holds
//     heights 1,2,...,8,...,2,1 for c = 0..14.
//   * Reduction: a two-stage Dadda tree. Stage 1 cuts every column to at most
//     four bits, stage 2 to at most two. In each column the tree uses as few
//     cells as that stage's target allows, counting the carries arriving from
//     the column below: approximate 4:2 compressors while three or more bits
//     must go, then one full adder for two, or one half adder for one. This
//     gives 17 compressors, 1 full adder and 6 half adders in total (stage 1:
//     7 compressors, 1 full adder, 4 half adders; stage 2: 10 compressors,
//     2 half adders), matching the cell count of the proposed multiplier.
//     Cells take the bits of a column in a fixed order: partial products by
//     ascending row i, then sums of the previous stage in this column, then
//     carries from the column below. A compressor's x1..x4 are four
//     consecutive bits of that order.
//   * Final addition: the two remaining rows are added with a plain 16-bit
//     carry-propagate adder (written as '+', left to synthesis).
//
// Because the compressors are approximate the product is not always exact.
// Each wrong compressor pattern lowers the product by 2 * 2^c, so the result is
// never larger than a*b. With one operand a power of two (or zero) no column
// holds more than one 1 and the product is exact.
//
// The tree's column schedule, the bit order and the final adder are this
// design's choices; only the cell counts and the 8-bit operand / 16-bit
// product widths are given.
//
// Interface: a, b unsigned operands; p the 16-bit product. Purely
// combinational, no clock.
module dadda_mult_8x8
  import approx_dadda_pkg::*;
(
  input  operand_t a,
  input  operand_t b,
  output product_t p
);
  logic [OP_W-1:0][OP_W-1:0] pp;   // pp[i][j] = b[i] & a[j]
  product_t row_a, row_b;

  always_comb begin
    for (int i = 0; i < OP_W; i++)
      for (int j = 0; j < OP_W; j++)
        pp[i][j] = b[i] & a[j];
  end

  // stage 1, column 4
  logic s1_c4_H0_sum, s1_c4_H0_carry;
  half_adder u_s1_c4_H0 (.a(pp[0][4]), .b(pp[1][3]), .sum(s1_c4_H0_sum), .carry(s1_c4_H0_carry));

  // stage 1, column 5
  logic s1_c5_C0_sum, s1_c5_C0_carry;
  approx_compressor_4_2 u_s1_c5_C0 (.x1(pp[0][5]), .x2(pp[1][4]), .x3(pp[2][3]), .x4(pp[3][2]),
      .sum(s1_c5_C0_sum), .carry(s1_c5_C0_carry));

  // stage 1, column 6
  logic s1_c6_C0_sum, s1_c6_C0_carry;
  approx_compressor_4_2 u_s1_c6_C0 (.x1(pp[0][6]), .x2(pp[1][5]), .x3(pp[2][4]), .x4(pp[3][3]),
      .sum(s1_c6_C0_sum), .carry(s1_c6_C0_carry));
  logic s1_c6_H1_sum, s1_c6_H1_carry;
  half_adder u_s1_c6_H1 (.a(pp[4][2]), .b(pp[5][1]), .sum(s1_c6_H1_sum), .carry(s1_c6_H1_carry));

  // stage 1, column 7
  logic s1_c7_C0_sum, s1_c7_C0_carry;
  approx_compressor_4_2 u_s1_c7_C0 (.x1(pp[0][7]), .x2(pp[1][6]), .x3(pp[2][5]), .x4(pp[3][4]),
      .sum(s1_c7_C0_sum), .carry(s1_c7_C0_carry));
  logic s1_c7_C1_sum, s1_c7_C1_carry;
  approx_compressor_4_2 u_s1_c7_C1 (.x1(pp[4][3]), .x2(pp[5][2]), .x3(pp[6][1]), .x4(pp[7][0]),
      .sum(s1_c7_C1_sum), .carry(s1_c7_C1_carry));

  // stage 1, column 8
  logic s1_c8_C0_sum, s1_c8_C0_carry;
  approx_compressor_4_2 u_s1_c8_C0 (.x1(pp[1][7]), .x2(pp[2][6]), .x3(pp[3][5]), .x4(pp[4][4]),
      .sum(s1_c8_C0_sum), .carry(s1_c8_C0_carry));
  logic s1_c8_F1_sum, s1_c8_F1_carry;
  full_adder u_s1_c8_F1 (.a(pp[5][3]), .b(pp[6][2]), .c(pp[7][1]), .sum(s1_c8_F1_sum), .carry(s1_c8_F1_carry));

  // stage 1, column 9
  logic s1_c9_C0_sum, s1_c9_C0_carry;
  approx_compressor_4_2 u_s1_c9_C0 (.x1(pp[2][7]), .x2(pp[3][6]), .x3(pp[4][5]), .x4(pp[5][4]),
      .sum(s1_c9_C0_sum), .carry(s1_c9_C0_carry));
  logic s1_c9_H1_sum, s1_c9_H1_carry;
  half_adder u_s1_c9_H1 (.a(pp[6][3]), .b(pp[7][2]), .sum(s1_c9_H1_sum), .carry(s1_c9_H1_carry));

  // stage 1, column 10
  logic s1_c10_C0_sum, s1_c10_C0_carry;
  approx_compressor_4_2 u_s1_c10_C0 (.x1(pp[3][7]), .x2(pp[4][6]), .x3(pp[5][5]), .x4(pp[6][4]),
      .sum(s1_c10_C0_sum), .carry(s1_c10_C0_carry));

  // stage 1, column 11
  logic s1_c11_H0_sum, s1_c11_H0_carry;
  half_adder u_s1_c11_H0 (.a(pp[4][7]), .b(pp[5][6]), .sum(s1_c11_H0_sum), .carry(s1_c11_H0_carry));

  // stage 2, column 2
  logic s2_c2_H0_sum, s2_c2_H0_carry;
  half_adder u_s2_c2_H0 (.a(pp[0][2]), .b(pp[1][1]), .sum(s2_c2_H0_sum), .carry(s2_c2_H0_carry));

  // stage 2, column 3
  logic s2_c3_C0_sum, s2_c3_C0_carry;
  approx_compressor_4_2 u_s2_c3_C0 (.x1(pp[0][3]), .x2(pp[1][2]), .x3(pp[2][1]), .x4(pp[3][0]),
      .sum(s2_c3_C0_sum), .carry(s2_c3_C0_carry));

  // stage 2, column 4
  logic s2_c4_C0_sum, s2_c4_C0_carry;
  approx_compressor_4_2 u_s2_c4_C0 (.x1(pp[2][2]), .x2(pp[3][1]), .x3(pp[4][0]), .x4(s1_c4_H0_sum),
      .sum(s2_c4_C0_sum), .carry(s2_c4_C0_carry));

  // stage 2, column 5
  logic s2_c5_C0_sum, s2_c5_C0_carry;
  approx_compressor_4_2 u_s2_c5_C0 (.x1(pp[4][1]), .x2(pp[5][0]), .x3(s1_c5_C0_sum), .x4(s1_c4_H0_carry),
      .sum(s2_c5_C0_sum), .carry(s2_c5_C0_carry));

  // stage 2, column 6
  logic s2_c6_C0_sum, s2_c6_C0_carry;
  approx_compressor_4_2 u_s2_c6_C0 (.x1(pp[6][0]), .x2(s1_c6_C0_sum), .x3(s1_c6_H1_sum), .x4(s1_c5_C0_carry),
      .sum(s2_c6_C0_sum), .carry(s2_c6_C0_carry));

  // stage 2, column 7
  logic s2_c7_C0_sum, s2_c7_C0_carry;
  approx_compressor_4_2 u_s2_c7_C0 (.x1(s1_c7_C0_sum), .x2(s1_c7_C1_sum), .x3(s1_c6_C0_carry), .x4(s1_c6_H1_carry),
      .sum(s2_c7_C0_sum), .carry(s2_c7_C0_carry));

  // stage 2, column 8
  logic s2_c8_C0_sum, s2_c8_C0_carry;
  approx_compressor_4_2 u_s2_c8_C0 (.x1(s1_c8_C0_sum), .x2(s1_c8_F1_sum), .x3(s1_c7_C0_carry), .x4(s1_c7_C1_carry),
      .sum(s2_c8_C0_sum), .carry(s2_c8_C0_carry));

  // stage 2, column 9
  logic s2_c9_C0_sum, s2_c9_C0_carry;
  approx_compressor_4_2 u_s2_c9_C0 (.x1(s1_c9_C0_sum), .x2(s1_c9_H1_sum), .x3(s1_c8_C0_carry), .x4(s1_c8_F1_carry),
      .sum(s2_c9_C0_sum), .carry(s2_c9_C0_carry));

  // stage 2, column 10
  logic s2_c10_C0_sum, s2_c10_C0_carry;
  approx_compressor_4_2 u_s2_c10_C0 (.x1(pp[7][3]), .x2(s1_c10_C0_sum), .x3(s1_c9_C0_carry), .x4(s1_c9_H1_carry),
      .sum(s2_c10_C0_sum), .carry(s2_c10_C0_carry));

  // stage 2, column 11
  logic s2_c11_C0_sum, s2_c11_C0_carry;
  approx_compressor_4_2 u_s2_c11_C0 (.x1(pp[6][5]), .x2(pp[7][4]), .x3(s1_c11_H0_sum), .x4(s1_c10_C0_carry),
      .sum(s2_c11_C0_sum), .carry(s2_c11_C0_carry));

  // stage 2, column 12
  logic s2_c12_C0_sum, s2_c12_C0_carry;
  approx_compressor_4_2 u_s2_c12_C0 (.x1(pp[5][7]), .x2(pp[6][6]), .x3(pp[7][5]), .x4(s1_c11_H0_carry),
      .sum(s2_c12_C0_sum), .carry(s2_c12_C0_carry));

  // stage 2, column 13
  logic s2_c13_H0_sum, s2_c13_H0_carry;
  half_adder u_s2_c13_H0 (.a(pp[6][7]), .b(pp[7][6]), .sum(s2_c13_H0_sum), .carry(s2_c13_H0_carry));

  // Two rows left after stage 2, one bit pair per column.
  assign row_a[0] = pp[0][0];
  assign row_b[0] = 1'b0;
  assign row_a[1] = pp[0][1];
  assign row_b[1] = pp[1][0];
  assign row_a[2] = pp[2][0];
  assign row_b[2] = s2_c2_H0_sum;
  assign row_a[3] = s2_c3_C0_sum;
  assign row_b[3] = s2_c2_H0_carry;
  assign row_a[4] = s2_c4_C0_sum;
  assign row_b[4] = s2_c3_C0_carry;
  assign row_a[5] = s2_c5_C0_sum;
  assign row_b[5] = s2_c4_C0_carry;
  assign row_a[6] = s2_c6_C0_sum;
  assign row_b[6] = s2_c5_C0_carry;
  assign row_a[7] = s2_c7_C0_sum;
  assign row_b[7] = s2_c6_C0_carry;
  assign row_a[8] = s2_c8_C0_sum;
  assign row_b[8] = s2_c7_C0_carry;
  assign row_a[9] = s2_c9_C0_sum;
  assign row_b[9] = s2_c8_C0_carry;
  assign row_a[10] = s2_c10_C0_sum;
  assign row_b[10] = s2_c9_C0_carry;
  assign row_a[11] = s2_c11_C0_sum;
  assign row_b[11] = s2_c10_C0_carry;
  assign row_a[12] = s2_c12_C0_sum;
  assign row_b[12] = s2_c11_C0_carry;
  assign row_a[13] = s2_c13_H0_sum;
  assign row_b[13] = s2_c12_C0_carry;
  assign row_a[14] = pp[7][7];
  assign row_b[14] = s2_c13_H0_carry;
  assign row_a[15] = 1'b0;
  assign row_b[15] = 1'b0;

  // Final carry-propagate addition.
  assign p = row_a + row_b;
endmodule
