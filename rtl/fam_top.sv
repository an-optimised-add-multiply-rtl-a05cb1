// fam_top: fused add-multiply operator, Z = X * (A + B).
//
// A, B and X are N-bit two's complement numbers; Z is exact, 2N+1 bits.
// The sum A + B is never formed.  Datapath, all combinational:
//
//   smb_recoder      A, B  -> K+1 radix-4 MB digits of A + B (K = N/2)
//   pp_generator     X, digits -> K+1 partial product rows (sign bit inverted)
//   correction_term  negative-digit flags -> one correction row (CT)
//   csa_tree         K+2 rows -> sum and carry rows (carry-save array)
//   cla_adder        sum + carry -> Z
//
// There are no registers; the result is valid one combinational delay after
// the inputs settle.  The order of the blocks follows the published S-MB
// architecture; the widths, the extra top digit and the absence of registers
// are this design's own choices.
module fam_top
  import fam_pkg::*;
#(
  parameter int unsigned N = 16                  // operand width, even, >= 4
) (
  input  logic [N-1:0] a,                        // addend A
  input  logic [N-1:0] b,                        // addend B
  input  logic [N-1:0] x,                        // multiplicand X
  output logic [2*N:0] z                         // Z = X * (A + B)
);
  localparam int unsigned K    = N / 2;
  localparam int unsigned W    = 2 * N + 1;
  localparam int unsigned ROWS = K + 2;

  smb_digit_t [K:0]        digit;
  logic [K:0][W-1:0]       row;
  logic [K:0]              neg;
  logic [W-1:0]            ct;
  logic [ROWS-1:0][W-1:0]  op;
  logic [W-1:0]            csa_s, csa_c;
  logic                    unused_cout;

  smb_recoder #(.N(N)) u_recoder (
    .a    (a),
    .b    (b),
    .digit(digit)
  );

  pp_generator #(.N(N)) u_ppg (
    .x    (x),
    .digit(digit),
    .row  (row),
    .neg  (neg)
  );

  correction_term #(.N(N)) u_ct (
    .neg(neg),
    .ct (ct)
  );

  assign op = {ct, row};

  csa_tree #(.ROWS(ROWS), .W(W)) u_csa (
    .op   (op),
    .sum  (csa_s),
    .carry(csa_c)
  );

  // the carry out of bit W-1 is discarded: the product fits in W bits
  cla_adder #(.W(W)) u_cla (
    .a   (csa_s),
    .b   (csa_c),
    .cin (1'b0),
    .sum (z),
    .cout(unused_cout)
  );

endmodule
