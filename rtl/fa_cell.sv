// fa_cell: conventional full adder, a + b + ci = 2*co + s.
// Combinational.  Used in the even slice of the S-MB recoder and as the
// 3:2 counter of the carry-save rows.
module fa_cell (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (a & ci) | (b & ci);
endmodule
