// compressor_3to2: 3:2 compressor (full adder) of the partial product tree.
//
// Adds three bits of equal weight into a Sum bit of the same weight and a
// Carry bit of twice the weight. The original design builds it as a static mirror
// circuit whose Carry output is the fast one and whose Sum output is about a
// third slower; here it is written by its logic function. Inputs a and b are
// the ones the original design marks as slow, so the tree feeds carries from the
// previous level into them.
// Interface: purely combinational.
module compressor_3to2 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  assign sum   = a ^ b ^ c;
  assign carry = (a & b) | (a & c) | (b & c);

endmodule
