// smb_odd_part: odd-position slice of the S-MB recoder, for all K digits.
//
// For digit j a half adder first adds the odd bits of the operands,
//
//     a[2j+1] + b[2j+1] = 2*c_ha[j] + t
//
// and c_ha[j] (weight 4^(j+1)) leaves for the even slice of digit j+1.  A
// signed-output half adder (HA*) then adds t and the carry c_mid[j] from the
// even slice of this digit:
//
//     t + c_mid[j] = 2*c_hs[j] - s_odd[j]
//
// s_odd[j] is the negatively weighted odd bit of MB digit j and c_hs[j]
// (weight 4^(j+1)) enters MB digit j+1 directly as its c term.  Every output
// is at most two cells deep.  Combinational.  The document names the odd
// part and its signed half adders; the arrangement is this design's own.
module smb_odd_part #(
  parameter int unsigned K = 8          // number of MB digits (N/2)
) (
  input  logic [K-1:0] a_odd,           // a[2j+1]
  input  logic [K-1:0] b_odd,           // b[2j+1]
  input  logic [K-1:0] c_mid,           // carry from even slice of digit j
  output logic [K-1:0] s_odd,           // odd (weight -2) bit of MB digit j
  output logic [K-1:0] c_ha,            // carry to even slice of digit j+1
  output logic [K-1:0] c_hs             // carry straight into MB digit j+1
);
  logic [K-1:0] t;

  for (genvar j = 0; j < K; j++) begin : g_dig
    ha_cell u_ha (
      .a(a_odd[j]),
      .b(b_odd[j]),
      .s(t[j]),
      .c(c_ha[j])
    );
    ha_star_cell u_hs (
      .a(t[j]),
      .b(c_mid[j]),
      .s(s_odd[j]),
      .c(c_hs[j])
    );
  end
endmodule
