// partial_products: the 16 one-bit partial products of a 4x4 multiply.
//
// pp[i][j] = A_i AND B_j, all formed at the same time by one AND per term,
// which is the "vertical and crosswise" product of two single bits. The
// multiplier later groups them by column i+j. Purely combinational; the
// AND-per-term form is this design's choice.
module partial_products
  import vedic_pkg::*;
(
  input  operand_t a,
  input  operand_t b,
  output pp_t      pp
);
  always_comb begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        pp[i][j] = a[i] & b[j];
  end
endmodule
