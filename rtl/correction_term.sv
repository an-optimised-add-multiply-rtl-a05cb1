// correction_term: the correction term (CT) row of the multiplier.
//
// Two things are owed to the sum of the partial product rows:
//  * +1 at bit 2j for every negative digit j, because the generator took the
//    one's complement of the multiple (neg[j]);
//  * -2^(N+2j) for every row j, because the generator inverted the row's
//    sign bit instead of sign-extending it.
// Both are gathered in one W = 2N+1 bit row:
//
//     ct = SIGN_CONST + sum_j neg[j] * 4^j,  SIGN_CONST = -sum_{j=0..K} 2^(N+2j) mod 2^W
//
// The neg bits sit at bits 0,2,..,2K and the constant at bits N and up; they
// only meet at bit N = 2K, which the addition resolves.  Combinational.
// The document adds a CT to the partial products; its contents here follow
// from the row format chosen for the partial product generator.
module correction_term #(
  parameter int unsigned N = 16                  // operand width, even
) (
  input  logic [N/2:0] neg,                      // negative-digit flags
  output logic [2*N:0] ct                        // correction row, W = 2N+1 bits
);
  localparam int unsigned K = N / 2;
  localparam int unsigned W = 2 * N + 1;

  function automatic logic [W-1:0] sign_const();
    logic [W-1:0] acc = '0;
    for (int j = 0; j <= K; j++) acc = acc - (W'(1) << (N + 2 * j));
    return acc;
  endfunction

  localparam logic [W-1:0] SIGN_CONST = sign_const();

  logic [W-1:0] neg_row;
  always_comb begin
    neg_row = '0;
    for (int j = 0; j <= K; j++) neg_row[2*j] = neg[j];
  end

  assign ct = SIGN_CONST + neg_row;

endmodule
