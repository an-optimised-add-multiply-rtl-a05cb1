// csa_row: one row of 3:2 counters (a carry-save adder), W bits wide.
//     x + y + z = s + c   (mod 2^W)
// Each bit is a full adder whose carry goes to bit i+1 of c; c[0] is 0.  The
// top bit only needs its sum, as its carry would leave the W-bit word, so it
// is a three-input XOR.  Combinational.
module csa_row #(
  parameter int unsigned W = 33
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  assign c[0] = 1'b0;

  for (genvar i = 0; i < W - 1; i++) begin : g_bit
    fa_cell u_fa (
      .a (x[i]),
      .b (y[i]),
      .ci(z[i]),
      .s (s[i]),
      .co(c[i+1])
    );
  end

  assign s[W-1] = x[W-1] ^ y[W-1] ^ z[W-1];
endmodule
