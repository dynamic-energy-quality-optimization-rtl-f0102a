// rev_half_adder: reversible half adder made of one Peres gate.
//
// Sum = A xor B on the gate's Q output, carry = A and B on its R output with
// the constant input tied to 0; P (a copy of A) is a garbage output. This is
// the half-adder cell of the multiplier's reduction tree. Combinational.
module rev_half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  logic garbage_p;

  rev_peres_gate u_pg (.a(a), .b(b), .c(1'b0), .p(garbage_p), .q(sum), .r(carry));
endmodule
