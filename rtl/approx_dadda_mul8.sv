// approx_dadda_mul8: approximate 8x8 unsigned Dadda multiplier.
//
// p is an approximation of bits 15..4 of a*b. The product matrix is split
// into three sections by column (weight 2**k for column k):
//   * truncated, columns 0..3: no partial products, no output bits;
//   * approximate, columns 4..10: only 15 of the 44 partial products are
//     formed; approximate 4:2 compressors (carry = x1 & (x3 | x4), sum = 1)
//     reduce them, and constant-1 bits stand in for part of what is dropped;
//   * accurate, columns 11..14: all 10 partial products, reduced exactly by
//     a half adder, two exact 4:2 compressors and a full adder.
// In all 25 AND cells form partial products instead of 64.
//
// Reduction is in three stages, all combinational (no clock, no reset):
//   stage 1: approximate compressors in columns 7, 8 and 10, half adder in
//            column 11;
//   stage 2: approximate compressor in column 4, exact compressors in
//            columns 11 and 12 (the column-11 cout feeds the column-12 cin),
//            full adder in column 13;
//   stage 3: one ripple-carry chain from column 5 to column 15: full adders
//            with one or two inputs at logic 1 in columns 5..10, then a
//            four-bit ripple-carry adder in columns 11..14 whose carry out is
//            product bit 15.
// The critical path runs through one approximate compressor, one exact
// compressor and the final ripple chain.
//
// Which partial products are formed, where the compressors, adders and
// constant-1 bits sit, and the 12-bit output follow the published dot
// diagram of this multiplier. Every bit keeps its weight here; where the
// diagram's stage-2 to stage-3 arrows do not add up, bits stay in their own
// column, so column 5 of the final chain is a full adder with one input at
// logic 1 (the carry of the column-4 compressor is its second input), and
// column 11 adds a single bit to the ripple carry.
//
// Output bit p[0] (product bit 4) is the sum of the column-4 approximate
// compressor and is therefore always 1.
//
// Ports: a[7:0], b[7:0] unsigned operands -> p[11:0] = approx(a*b)[15:4].
module approx_dadda_mul8
  import approx_mul_pkg::*;
(
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [OUT_W-1:0] p
);

  // ---------------- partial products -----------------------------------
  logic [NUM_PP-1:0] pp;

  for (genvar n = 0; n < NUM_PP; n++) begin : g_pp
    mgdi_and2 u_and (.a(a[PP_COL[n] - PP_ROW[n]]), .b(b[PP_ROW[n]]), .y(pp[n]));
  end

  // ---------------- stage 1 --------------------------------------------
  logic ac1_sum, ac1_c;   // column 7
  logic ac2_sum, ac2_c;   // column 8
  logic ac3_sum, ac3_c;   // column 10
  logic ha_s, ha_c;       // column 11

  approx_compressor_4_2 u_ac1 (.x1(pp[pp_idx(7, 0)]),  .x3(pp[pp_idx(7, 2)]),
                               .x4(pp[pp_idx(7, 3)]),  .sum(ac1_sum), .carry(ac1_c));
  approx_compressor_4_2 u_ac2 (.x1(pp[pp_idx(8, 1)]),  .x3(pp[pp_idx(8, 3)]),
                               .x4(pp[pp_idx(8, 4)]),  .sum(ac2_sum), .carry(ac2_c));
  approx_compressor_4_2 u_ac3 (.x1(pp[pp_idx(10, 3)]), .x3(pp[pp_idx(10, 5)]),
                               .x4(pp[pp_idx(10, 6)]), .sum(ac3_sum), .carry(ac3_c));
  half_adder            u_ha  (.a(pp[pp_idx(11, 4)]),  .b(pp[pp_idx(11, 5)]),
                               .sum(ha_s), .cout(ha_c));

  // ---------------- stage 2 --------------------------------------------
  logic ac4_sum, ac4_c;             // column 4
  logic ec1_s, ec1_c, ec1_co;       // column 11
  logic ec2_s, ec2_c, ec2_co;       // column 12
  logic fa13_s, fa13_c;             // column 13

  approx_compressor_4_2 u_ac4 (.x1(pp[pp_idx(4, 2)]), .x3(pp[pp_idx(4, 3)]),
                               .x4(pp[pp_idx(4, 4)]), .sum(ac4_sum), .carry(ac4_c));

  exact_compressor_4_2 u_ec1 (.x1(ha_s), .x2(pp[pp_idx(11, 6)]), .x3(pp[pp_idx(11, 7)]),
                              .x4(ac3_c), .cin(1'b0),
                              .sum(ec1_s), .carry(ec1_c), .cout(ec1_co));
  exact_compressor_4_2 u_ec2 (.x1(pp[pp_idx(12, 5)]), .x2(pp[pp_idx(12, 6)]),
                              .x3(pp[pp_idx(12, 7)]), .x4(ha_c), .cin(ec1_co),
                              .sum(ec2_s), .carry(ec2_c), .cout(ec2_co));
  full_adder u_fa13 (.a(pp[pp_idx(13, 6)]), .b(pp[pp_idx(13, 7)]), .cin(ec2_co),
                     .sum(fa13_s), .cout(fa13_c));

  // ---------------- stage 3: final ripple-carry chain ------------------
  // Approximate columns 5..10: each holds one data bit, one bit at logic 1
  // (a constant, or the constant sum of a stage-1 compressor) and the
  // ripple carry. Column 7 holds two bits at logic 1.
  logic s5, s6, s7, s8, s9, s10;
  logic c5, c6, c7, c8, c9, c10;

  fa_const1  u_fa5  (.a(pp[pp_idx(5, 4)]),  .b(ac4_c), .sum(s5), .cout(c5));
  fa_const1  u_fa6  (.a(pp[pp_idx(6, 6)]),  .b(c5),    .sum(s6), .cout(c6));
  full_adder u_fa7  (.a(ac1_sum), .b(1'b1), .cin(c6),   .sum(s7), .cout(c7));
  full_adder u_fa8  (.a(ac1_c),   .b(ac2_sum), .cin(c7), .sum(s8), .cout(c8));
  fa_const1  u_fa9  (.a(ac2_c),   .b(c8),    .sum(s9), .cout(c9));
  full_adder u_fa10 (.a(pp[pp_idx(10, 7)]), .b(ac3_sum), .cin(c9), .sum(s10), .cout(c10));

  // Accurate columns 11..14.
  logic [3:0] s_hi;
  logic       c15;

  rca4 #(.N(4)) u_rca (
    .a   ({pp[pp_idx(14, 7)], fa13_s, ec2_s, ec1_s}),
    .b   ({fa13_c,            ec2_c,  ec1_c, 1'b0}),
    .cin (c10),
    .s   (s_hi),
    .cout(c15)
  );

  assign p = {c15, s_hi, s10, s9, s8, s7, s6, s5, ac4_sum};

endmodule
