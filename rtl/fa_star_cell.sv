// fa_star_cell: signed-bit full adder (FA*) with two negatively weighted
// inputs and one positive input:
//
//     -an - bn + cp = -2*n + s
//
// The result (range -2..+1) is written as a negatively weighted carry n and a
// positive sum bit s.  It is an ordinary full adder on (~an, ~bn, cp) with
// the carry inverted.  Used for the most significant S-MB digit, where the
// sign bits of A and B enter with negative weight.  Combinational.
module fa_star_cell (
  input  logic an,
  input  logic bn,
  input  logic cp,
  output logic s,
  output logic n
);
  assign s = an ^ bn ^ cp;
  assign n = ~((~an & ~bn) | (~an & cp) | (~bn & cp));
endmodule
