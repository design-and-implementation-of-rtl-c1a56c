// vedic_mul4: 4x4-bit unsigned multiplier after the Urdhva Tiryakbhyam
// ("vertically and crosswise") method.
//
// All 16 partial products A_i*B_j are formed at once. Each column of equal
// weight i+j (one "step" of the method) is then reduced by its own adder,
// all columns in parallel, and a final row of full adders carries the
// column results from the S3 column up to S7:
//
//   S0      = A0B0
//   col 1   half adder  (A0B1, A1B0)            -> S1,  carry c0
//   col 2   full adder  (A0B2, A2B0, A1B1)      -> sum2, carry c1_fa
//           half adder  (sum2, c0)              -> S2,  carry c2_ha
//   col 3   4-bit adder (A3B0, A0B3, A1B2, A2B1)-> s3, C2 (to col 4), C1 (to col 5)
//           full adder  (s3, c1_fa, c2_ha)      -> S3,  carry r3
//   col 4   full adder  (A3B1, A1B3, A2B2)      -> s4,  carry C3
//           full adder  (s4, C2, r3)            -> S4,  carry r4
//   col 5   full adder  (A3B2, A2B3, C3)        -> s5,  carry c5
//           full adder  (s5, C1, r4)            -> S5,  carry r5
//   col 6   full adder  (A3B3, c5, r5)          -> S6,  carry S7
//
// This network, and the names S0..S7, C0..C3, follow the design's block
// diagram. Where the diagram marks the S5 adder's third input "C1=0", this
// design connects the 4-bit adder's second carry C1: it is 0 except when
// all four column-3 products are 1 (e.g. 15x15), and the product is wrong
// without it. The multiplier has no clock and no reset; s settles one
// combinational delay after a or b changes.
module vedic_mul4
  import vedic_pkg::*;
(
  input  operand_t a,
  input  operand_t b,
  output product_t s
);
  pp_t pp;

  // column sums and carries (names follow the block diagram)
  logic c0;                   // col 1 carry
  logic sum2, c1_fa, c2_ha;   // col 2
  logic s3, cc2, cc1, r3;     // col 3: 4-bit adder outputs, row carry
  logic s4, cc3, r4;          // col 4
  logic s5, c5, r5;           // col 5

  partial_products u_pp (.a(a), .b(b), .pp(pp));

  // step 1
  assign s[0] = pp[0][0];

  // step 2
  half_adder u_col1 (.a(pp[0][1]), .b(pp[1][0]), .s(s[1]), .c(c0));

  // step 3
  full_adder u_col2 (.a(pp[0][2]), .b(pp[2][0]), .ci(pp[1][1]), .s(sum2), .co(c1_fa));
  half_adder u_col2_ha (.a(sum2), .b(c0), .s(s[2]), .c(c2_ha));

  // step 4
  four_bit_adder u_col3 (
    .x ({pp[2][1], pp[1][2], pp[0][3], pp[3][0]}),
    .s (s3),
    .c2(cc2),
    .c1(cc1)
  );

  // step 5
  full_adder u_col4 (.a(pp[3][1]), .b(pp[1][3]), .ci(pp[2][2]), .s(s4), .co(cc3));

  // step 6
  full_adder u_col5 (.a(pp[3][2]), .b(pp[2][3]), .ci(cc3), .s(s5), .co(c5));

  // final carry row, right to left
  full_adder u_row3 (.a(s3), .b(c1_fa), .ci(c2_ha), .s(s[3]), .co(r3));
  full_adder u_row4 (.a(s4), .b(cc2),   .ci(r3),    .s(s[4]), .co(r4));
  full_adder u_row5 (.a(s5), .b(cc1),   .ci(r4),    .s(s[5]), .co(r5));

  // step 7
  full_adder u_row6 (.a(pp[3][3]), .b(c5), .ci(r5), .s(s[6]), .co(s[7]));
endmodule
