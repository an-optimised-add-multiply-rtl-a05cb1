// smb_even_part: even-position slice of the S-MB recoder, for all K digits.
//
// For digit j the bits a[2j] and b[2j] are added to the carry c_in[j] that
// the odd slice of digit j-1 produced from its half adder (c_in[0] is 0 for
// the lowest digit):
//
//     a[2j] + b[2j] + c_in[j] = 2*c_mid[j] + s_even[j]
//
// s_even[j] is the even bit of MB digit j; c_mid[j] goes to the odd slice of
// the same digit.  The carry c_in never ripples further than one digit, so
// the delay is that of one full adder regardless of K.  Combinational.
// The document names the even part and builds it from full and half adders;
// the exact cell arrangement here is this design's own.
module smb_even_part #(
  parameter int unsigned K = 8          // number of MB digits (N/2)
) (
  input  logic [K-1:0] a_even,          // a[2j], j = 0..K-1
  input  logic [K-1:0] b_even,          // b[2j]
  input  logic [K-1:0] c_in,            // half-adder carry from odd slice of digit j-1
  output logic [K-1:0] s_even,          // even bit of MB digit j
  output logic [K-1:0] c_mid            // carry into odd position of digit j
);
  for (genvar j = 0; j < K; j++) begin : g_dig
    fa_cell u_fa (
      .a (a_even[j]),
      .b (b_even[j]),
      .ci(c_in[j]),
      .s (s_even[j]),
      .co(c_mid[j])
    );
  end
endmodule
