// update_control: normalisation of the update factor (NLMS family).
//
// For NLMS, PU-NLMS and SM-NLMS the update factor is divided by the input
// power plus a small regulariser: phi_out = phi / (BETA + alpha). phi is
// signed N-bit fixed point with K fraction bits, alpha = X^T X is unsigned
// with K fraction bits, BETA is in the same units. The magnitude of phi is
// shifted left by K and divided by the restoring divider, the sign is put
// back and the result saturates to N bits. In LMS mode the block is not
// used: the divider's operands are gated to zero and phi passes straight
// through the output multiplexer.
// Follows the document: equations (2) and (3), the divider with the R/beta
// input of the update block, the output multiplexer. This design's own
// choices: BETA = 8 (0.125 with K = 6), rounding toward zero of the
// quotient, saturation.
// Interface: purely combinational; the top registers phi_out at the end of
// step 3.
module update_control
  import afilter_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter int unsigned K    = 6,
  parameter int unsigned AW   = 2 * N - K + 1,
  parameter int unsigned BETA = 8
) (
  input  logic                en,
  input  mode_e               mode,
  input  logic signed [N-1:0] phi,
  input  logic        [AW-1:0] alpha,
  output logic signed [N-1:0] phi_out
);
  localparam int unsigned NW = N + K;    // dividend: |phi| << K
  localparam int unsigned DW = AW + 1;   // divisor: BETA + alpha

  logic          div_en;
  logic [N-1:0]  mag;
  logic [NW-1:0] num;
  logic [DW-1:0] den;
  logic [NW-1:0] quo;
  logic [DW-1:0] rem;
  logic [N-1:0]  qsat;

  assign div_en = en && (mode != MODE_LMS);
  assign mag    = phi[N-1] ? N'(-phi) : N'(phi);
  assign num    = div_en ? {mag, {K{1'b0}}} : '0;
  assign den    = div_en ? DW'(alpha) + DW'(BETA) : '0;

  restoring_divider #(.NW(NW), .DW(DW)) u_div (.n(num), .d(den), .q(quo), .r(rem));

  // Saturate the magnitude to 2^(N-1)-1 before the sign is restored.
  assign qsat = (quo > NW'(2 ** (N - 1) - 1)) ? N'(2 ** (N - 1) - 1) : N'(quo);

  always_comb begin
    if (mode == MODE_LMS) phi_out = phi;
    else if (!div_en)     phi_out = '0;
    else                  phi_out = phi[N-1] ? -$signed(qsat) : $signed(qsat);
  end
endmodule
