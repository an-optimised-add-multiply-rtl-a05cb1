// fam_pkg: types and helpers shared by the fused add-multiply (FAM) operator.
//
// The operator computes Z = X * (A + B) without first forming the sum A + B.
// Instead the sum is recoded straight into radix-4 Modified Booth (MB) digits
// (the S-MB recoding).  Each S-MB digit is carried as three bits:
//
//     y_j = -2*s_odd + s_even + c          (y_j in {-2,-1,0,+1,+2})
//
// where s_odd is the negatively weighted odd-position bit, s_even the even
// position bit and c the carry that enters the digit from the digit below.
// The partial product generator turns a digit into the usual MB selection
// signals (one, two, neg).  The three-bit digit form follows the document;
// the exact one/two/neg equations are this design's own.
package fam_pkg;

  // One S-MB digit, value -2*s_odd + s_even + c.
  typedef struct packed {
    logic s_odd;
    logic s_even;
    logic c;
  } smb_digit_t;

  // Radix-4 MB selection: the multiple is +/-X (one), +/-2X (two) or 0;
  // neg requests the negated multiple.
  typedef struct packed {
    logic neg;
    logic two;
    logic one;
  } mb_sel_t;

  // Value of an S-MB digit (used by the testbenches and assertions).
  function automatic int smb_value(smb_digit_t d);
    return -2 * int'(d.s_odd) + int'(d.s_even) + int'(d.c);
  endfunction

  // S-MB digit to MB selection signals.  A zero digit coded as (1,1,1) is
  // mapped to a plain zero (neg = 0) so no negative zero reaches the rows.
  function automatic mb_sel_t smb_to_sel(smb_digit_t d);
    mb_sel_t s;
    s.one = d.s_even ^ d.c;
    s.two = (d.s_odd & ~d.s_even & ~d.c) | (~d.s_odd & d.s_even & d.c);
    s.neg = d.s_odd & ~(d.s_even & d.c);
    return s;
  endfunction

endpackage
