// restoring_divider: combinational array restoring divider.
//
// Computes q = n / d and r = n % d for unsigned operands. One row per
// quotient bit, most significant first: the partial remainder is shifted
// left by one dividend bit, the divisor is subtracted, and when the result is
// negative the previous remainder is restored and the quotient bit is 0,
// otherwise the difference is kept and the bit is 1. The document names a
// restoring divider for the normalisation step; the array (single-cycle)
// form is this design's choice, so that the division fits in one step of the
// four-step schedule. A zero divisor gives an all-ones quotient and a zero remainder.
// Interface: NW-bit dividend n, DW-bit divisor d, NW-bit quotient q, DW-bit
// remainder r; purely combinational.
module restoring_divider #(
  parameter int unsigned NW = 14,
  parameter int unsigned DW = 11
) (
  input  logic [NW-1:0] n,
  input  logic [DW-1:0] d,
  output logic [NW-1:0] q,
  output logic [DW-1:0] r
);
  always_comb begin
    logic [DW:0] rem;     // partial remainder, one spare bit for the shift
    logic [DW:0] trial;
    rem = '0;
    q   = '0;
    for (int i = NW - 1; i >= 0; i--) begin
      rem   = {rem[DW-1:0], n[i]};
      trial = rem - {1'b0, d};
      if (!trial[DW]) begin
        rem  = trial;        // difference is non-negative: keep it
        q[i] = 1'b1;
      end                    // otherwise restore: keep rem unchanged
    end
    r = rem[DW-1:0];
    if (d == '0) begin
      q = '1;
      r = '0;
    end
  end
endmodule
