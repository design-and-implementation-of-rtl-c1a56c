// full_adder: one-bit full adder.
//
// Adds three bits of equal weight: s is their parity, co the majority of
// the three (the carry of weight two). Purely combinational. It is the
// main cell of the multiplier's column adders and of its final carry row;
// the cell is the standard one, since only its name is given for this design.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (a & ci) | (b & ci);
endmodule
