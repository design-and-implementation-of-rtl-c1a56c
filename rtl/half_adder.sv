// half_adder: one-bit half adder.
//
// Adds two bits: s is their exclusive OR, c their AND (the carry of weight
// two). Purely combinational. Two of these cells appear in the multiplier's
// adder network (the columns of product bits S1 and S2); the cell itself is
// the standard one, since only its name is given for this design.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
