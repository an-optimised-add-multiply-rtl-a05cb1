// ha_cell: conventional half adder, a + b = 2*c + s.  Combinational.
// First stage of the odd slice of the S-MB recoder.
module ha_cell (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
