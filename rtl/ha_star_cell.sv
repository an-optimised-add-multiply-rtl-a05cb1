// ha_star_cell: signed-output half adder (HA*).  Two positive input bits are
// written as a positive carry and a negatively weighted sum bit:
//
//     a + b = 2*c - s        c = a | b,  s = a ^ b
//
// This is what lets the odd position of an S-MB digit come out with the
// negative weight (-2) that the MB digit needs.  Combinational.
module ha_star_cell (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a | b;
endmodule
