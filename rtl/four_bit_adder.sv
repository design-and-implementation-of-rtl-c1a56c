// four_bit_adder: counts four one-bit inputs of equal weight.
//
// In the 4x4 Vedic multiplier this block adds the four crosswise partial
// products of weight 2^3 (A3B0, A0B3, A1B2, A2B1). The count, 0 to 4, comes
// out as three bits: s (weight 1, product column S3), c2 (weight 2, passed
// to the S4 column) and c1 (weight 4, passed to the S5 column). The output
// names follow the multiplier's block diagram; the insides are this
// design's choice, the simplest counter from the adder cells: a full adder
// on three inputs, a half adder adding the fourth input to that sum, and a
// half adder merging the two weight-2 carries. c1 is 1 only when all four
// inputs are 1. Purely combinational.
module four_bit_adder (
  input  logic [3:0] x,
  output logic       s,
  output logic       c2,
  output logic       c1
);
  logic fa_s, fa_c, ha_c;

  full_adder u_fa (.a(x[0]), .b(x[1]), .ci(x[2]), .s(fa_s), .co(fa_c));
  half_adder u_ha0 (.a(fa_s), .b(x[3]), .s(s), .c(ha_c));
  half_adder u_ha1 (.a(fa_c), .b(ha_c), .s(c2), .c(c1));
endmodule
