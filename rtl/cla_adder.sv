// cla_adder: W-bit carry-lookahead adder, sum = a + b + cin.
//
// Bits are grouped by 4.  Inside a group every carry is formed directly from
// the bit generate (g = a & b) and propagate (p = a ^ b) signals and the
// group carry-in, as a two-level sum of products.  Each group also forms a
// group generate and propagate, and the group carries are chained through
// them, so a carry crosses a whole group in one AND-OR step.
// Combinational.  The document ends the multiplier with a CLA; group size
// and the chaining of groups are this design's own choice.
module cla_adder #(
  parameter int unsigned W = 33
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned G  = 4;                 // group size
  localparam int unsigned NG = (W + G - 1) / G;   // number of groups
  localparam int unsigned WP = NG * G;            // padded width

  logic [WP-1:0] g, p;
  logic [WP:0]   c;                               // carry into each bit, c[WP] out
  logic [NG:0]   gc;                              // group carries
  logic [NG-1:0] gg, gp;                          // group generate / propagate

  assign g = WP'(a & b);
  assign p = WP'(a ^ b);

  // group generate and propagate
  always_comb begin
    for (int k = 0; k < NG; k++) begin
      gp[k] = &p[k*G +: G];
      gg[k] = 1'b0;
      for (int m = 0; m < G; m++) begin
        logic t;
        t = g[k*G+m];
        for (int l = m + 1; l < G; l++) t = t & p[k*G+l];
        gg[k] = gg[k] | t;
      end
    end
  end

  // carries between groups
  always_comb begin
    logic cy;
    cy    = cin;
    gc[0] = cy;
    for (int k = 0; k < NG; k++) begin
      cy      = gg[k] | (gp[k] & cy);
      gc[k+1] = cy;
    end
  end

  // carries inside each group, from the group carry-in
  always_comb begin
    for (int k = 0; k < NG; k++) begin
      for (int i = 0; i < G; i++) begin
        logic t, cc;
        t = gc[k];
        for (int l = 0; l < i; l++) t = t & p[k*G+l];
        cc = t;
        for (int m = 0; m < i; m++) begin
          logic u;
          u = g[k*G+m];
          for (int l = m + 1; l < i; l++) u = u & p[k*G+l];
          cc = cc | u;
        end
        c[k*G+i] = cc;
      end
    end
    c[WP] = gc[NG];
  end

  assign sum  = p[W-1:0] ^ c[W-1:0];
  assign cout = c[W];
endmodule
