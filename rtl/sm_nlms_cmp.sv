// sm_nlms_cmp: set-membership comparison of SM-NLMS.
//
// The SM-NLMS step size is mu(k) = 1 - gamma/|e(k)| when |e(k)| > gamma and 0
// otherwise, so the product mu(k)*e(k) needs no division: it is
// e(k) - gamma when e(k) > gamma, e(k) + gamma when e(k) < -gamma, and 0
// inside the bound. The block holds one adder (e -/+ gamma), one magnitude
// comparator and the multiplexer with the zero input, as in the document's
// SM-NLMS comparison block. hit tells whether the error left the bound (an
// update is due). With en low the operands are gated to zero.
// Follows the document: equation (4), the e -/+ gamma form of the mode
// table, the adder/comparator/zero-mux structure. This design's own choice:
// the strict comparison |e| > gamma (the figure prints a >= comparator; the two
// give the same update factor, since at |e| = gamma the factor is zero).
// Interface: e is N-bit signed, gamma N-bit unsigned with the same K
// fraction bits; purely combinational.
module sm_nlms_cmp #(
  parameter int unsigned N = 8
) (
  input  logic                en,
  input  logic signed [N-1:0] e,
  input  logic        [N-1:0] gamma,
  output logic signed [N-1:0] phi,
  output logic                hit
);
  logic signed [N-1:0] e_g;
  logic        [N-1:0] g_g;
  logic        [N-1:0] mag;
  logic signed [N+1:0] shifted;

  assign e_g = en ? e : '0;
  assign g_g = en ? gamma : '0;
  assign mag = e_g[N-1] ? N'(-e_g) : N'(e_g);
  assign hit = en && (mag > g_g);

  // |e - sign(e)*gamma| < |e| <= 2^(N-1), so the result always fits in N bits.
  assign shifted = e_g[N-1] ? (N+2)'(e_g) + (N+2)'({2'b00, g_g})
                            : (N+2)'(e_g) - (N+2)'({2'b00, g_g});
  assign phi     = hit ? N'(shifted) : '0;
endmodule
