// signed_rev_mult: two's-complement multiplier around the unsigned
// reversible Wallace tree.
//
// The operands' magnitudes (N bits each, so -2^(N-1) is still representable)
// go through the N x N reversible Wallace tree multiplier, and the product is
// negated when the operand signs differ. Sign-magnitude handling around the
// unsigned tree is this design's choice: the document uses 8x8 unsigned trees
// inside a signed fixed-point datapath without saying how signs are handled.
// Interface: p = a * b as a 2N-bit signed number, purely combinational.
module signed_rev_mult #(
  parameter int unsigned N = 8
) (
  input  logic signed [N-1:0]   a,
  input  logic signed [N-1:0]   b,
  output logic signed [2*N-1:0] p
);
  logic [N-1:0]   mag_a, mag_b;
  logic [2*N-1:0] mag_p;
  logic           neg;

  assign mag_a = a[N-1] ? N'(-a) : N'(a);
  assign mag_b = b[N-1] ? N'(-b) : N'(b);
  assign neg   = a[N-1] ^ b[N-1];

  rev_wallace_mult #(.W(N)) u_tree (.a(mag_a), .b(mag_b), .p(mag_p));

  assign p = neg ? -$signed(mag_p) : $signed(mag_p);
endmodule
