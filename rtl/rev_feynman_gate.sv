// rev_feynman_gate: 2x2 reversible Feynman (controlled-NOT) gate.
//
// P = A, Q = A xor B. With B tied to 0 it copies A, which is how the
// reversible multiplier makes fan-out copies of an operand bit. The gate
// equations are the standard definition of the Feynman gate; the document
// names the gate but does not print them. Purely combinational.
module rev_feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
