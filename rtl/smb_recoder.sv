// smb_recoder: straight Modified Booth recoding of a sum (S-MB recoder).
//
// Takes two N-bit two's complement operands A and B and produces the
// radix-4 MB digits of Y = A + B directly, with no carry-propagate adder in
// front of a Booth encoder.  Digit j (j < K = N/2) is
//
//     y_j = -2*s_odd[j] + s_even[j] + c_hs[j-1]
//
// built by the even slice (full adders) and the odd slice (half adder plus
// signed half adder).  Two carries leave each digit, one into the next even
// full adder and one straight into the next digit, so nothing ripples.
//
// A + B needs N+1 bits, so one more digit, y_K, is produced.  The lower
// slices treat A and B as unsigned; the sign bits, weight -2^N = -4^K, are
// folded into y_K by a signed full adder (FA*):
//
//     y_K = (-a[N-1] - b[N-1] + c_ha[K-1]) + c_hs[K-1]
//
// so sum_{j=0..K} y_j * 4^j == A + B exactly, for every input.
// Combinational.  The document gives the idea (merged adder and encoder,
// even and odd parts, FA/HA and signed FA*/HA* cells); the extra top digit
// and the cell arrangement are this design's own.
module smb_recoder
  import fam_pkg::*;
#(
  parameter int unsigned N = 16         // operand width, even
) (
  input  logic [N-1:0]            a,    // two's complement
  input  logic [N-1:0]            b,    // two's complement
  output smb_digit_t [N/2:0]      digit // MB digits of a + b, digit[0] least significant
);
  localparam int unsigned K = N / 2;

  if (N % 2 != 0 || N < 2) begin : g_bad_n
    $error("smb_recoder: N must be even and at least 2");
  end

  logic [K-1:0] a_even, b_even, a_odd, b_odd;
  logic [K-1:0] s_even, s_odd, c_in, c_mid, c_ha, c_hs;

  always_comb begin
    for (int j = 0; j < K; j++) begin
      a_even[j] = a[2*j];
      b_even[j] = b[2*j];
      a_odd[j]  = a[2*j+1];
      b_odd[j]  = b[2*j+1];
    end
  end

  // half-adder carries move up one digit into the even full adders
  if (K == 1) begin : g_c_in1
    assign c_in = 1'b0;
  end else begin : g_c_in
    assign c_in = {c_ha[K-2:0], 1'b0};
  end

  smb_even_part #(.K(K)) u_even (
    .a_even(a_even),
    .b_even(b_even),
    .c_in  (c_in),
    .s_even(s_even),
    .c_mid (c_mid)
  );

  smb_odd_part #(.K(K)) u_odd (
    .a_odd (a_odd),
    .b_odd (b_odd),
    .c_mid (c_mid),
    .s_odd (s_odd),
    .c_ha  (c_ha),
    .c_hs  (c_hs)
  );

  always_comb begin
    for (int j = 0; j < K; j++) begin
      digit[j].s_odd  = s_odd[j];
      digit[j].s_even = s_even[j];
      digit[j].c      = (j == 0) ? 1'b0 : c_hs[(j == 0) ? 0 : j-1];
    end
  end

  // most significant digit: sign bits with negative weight
  logic top_s, top_n;

  fa_star_cell u_top (
    .an(a[N-1]),
    .bn(b[N-1]),
    .cp(c_ha[K-1]),
    .s (top_s),
    .n (top_n)
  );

  assign digit[K].s_odd  = top_n;
  assign digit[K].s_even = top_s;
  assign digit[K].c      = c_hs[K-1];

endmodule
