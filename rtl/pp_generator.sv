// pp_generator: radix-4 partial product generator driven by S-MB digits.
//
// For each of the K+1 digits of Y = A + B (K = N/2) the digit is turned into
// MB selection signals (one, two, neg) and the multiple M in {0, X, 2X} is
// chosen as an (N+1)-bit two's complement value.  A negative digit takes the
// one's complement of M; the missing +1 is collected by the correction term
// (output neg).  So that no sign extension is needed, the sign bit of every
// row is inverted; the constant this costs is also part of the correction
// term.  Row j is then placed at bit 2j of a W = 2N+1 bit word:
//
//     row[j] = { ~p[N], p[N-1:0] } << 2j,   p = neg ? ~M : M
//
// Combinational.  The document places a partial product generator between
// the recoder and the CSA; the row format is this design's own choice.
module pp_generator
  import fam_pkg::*;
#(
  parameter int unsigned N = 16                  // operand width, even
) (
  input  logic [N-1:0]                   x,      // multiplicand, two's complement
  input  smb_digit_t [N/2:0]             digit,  // S-MB digits of A + B
  output logic [N/2:0][2*N:0]            row,    // partial product rows, W = 2N+1 bits
  output logic [N/2:0]                   neg     // digit j negative: +1 owed at bit 2j
);
  localparam int unsigned K = N / 2;
  localparam int unsigned W = 2 * N + 1;

  logic [N:0] x1, x2;                            // X and 2X, N+1 bits
  assign x1 = {x[N-1], x};
  assign x2 = {x, 1'b0};

  mb_sel_t    sel [K+1];
  logic [N:0] m   [K+1];
  logic [N:0] p   [K+1];

  always_comb begin
    for (int j = 0; j <= K; j++) begin
      sel[j] = smb_to_sel(digit[j]);
      m[j]   = ({(N+1){sel[j].one}} & x1) | ({(N+1){sel[j].two}} & x2);
      p[j]   = m[j] ^ {(N+1){sel[j].neg}};
      neg[j] = sel[j].neg;
      row[j] = W'({~p[j][N], p[j][N-1:0]}) << (2 * j);
    end
  end

endmodule
