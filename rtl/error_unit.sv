// error_unit: estimation error and step-size scaling.
//
// e(k) = d(k) - y(k), saturated to N bits, and phi = mu * e(k) with the step
// size mu = 2^-MU_SHIFT realised as an arithmetic right shift (the shift
// operator of the error block). phi is the update factor of LMS, and the
// numerator that NLMS and PU-NLMS later normalise. When en is low both
// operands are forced to zero (data gating), so nothing switches.
// Follows the document: the subtraction and the shift. This design's own
// choices: power-of-two mu with MU_SHIFT = 2, saturation of e.
// Interface: purely combinational; the top registers e and phi at the end of
// step 2.
module error_unit #(
  parameter int unsigned N        = 8,
  parameter int unsigned MU_SHIFT = 2
) (
  input  logic                en,
  input  logic signed [N-1:0] d,
  input  logic signed [N-1:0] y,
  output logic signed [N-1:0] e,
  output logic signed [N-1:0] phi
);
  logic signed [N-1:0] d_g, y_g;
  logic signed [N:0]   diff;

  assign d_g  = en ? d : '0;
  assign y_g  = en ? y : '0;
  assign diff = (N+1)'(d_g) - (N+1)'(y_g);

  localparam logic signed [N:0] EMAX = (N+1)'((2 ** (N - 1)) - 1);
  localparam logic signed [N:0] EMIN = -EMAX - (N+1)'(1);

  always_comb begin
    if (diff > EMAX)      e = {1'b0, {(N-1){1'b1}}};
    else if (diff < EMIN) e = {1'b1, {(N-1){1'b0}}};
    else                  e = N'(diff);
  end

  assign phi = e >>> MU_SHIFT;
endmodule
