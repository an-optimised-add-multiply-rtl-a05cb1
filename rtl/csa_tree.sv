// csa_tree: carry-save reduction of ROWS operands to a sum and a carry row.
//
// A linear array of ROWS-2 carry-save rows (3:2 counters): the first row adds
// operands 0, 1 and 2, and each further row adds the next operand to the
// running sum and carry.  No carry propagates inside the array; the final
// pair goes to the carry-lookahead adder.  All arithmetic is mod 2^W.
// Combinational.  The document reduces the partial products with a CSA; the
// linear (array) arrangement is this design's own choice.
module csa_tree #(
  parameter int unsigned ROWS = 10,              // operands, at least 3
  parameter int unsigned W    = 33               // operand width
) (
  input  logic [ROWS-1:0][W-1:0] op,
  output logic [W-1:0]           sum,
  output logic [W-1:0]           carry
);
  if (ROWS < 3) begin : g_bad_rows
    $error("csa_tree: ROWS must be at least 3");
  end

  // s_st[i], c_st[i]: running pair after operand i+2 has been added
  logic [W-1:0] s_st [ROWS-2];
  logic [W-1:0] c_st [ROWS-2];

  csa_row #(.W(W)) u_first (
    .x(op[0]),
    .y(op[1]),
    .z(op[2]),
    .s(s_st[0]),
    .c(c_st[0])
  );

  for (genvar i = 1; i < ROWS - 2; i++) begin : g_row
    csa_row #(.W(W)) u_row (
      .x(s_st[i-1]),
      .y(c_st[i-1]),
      .z(op[i+2]),
      .s(s_st[i]),
      .c(c_st[i])
    );
  end

  assign sum   = s_st[ROWS-3];
  assign carry = c_st[ROWS-3];
endmodule
