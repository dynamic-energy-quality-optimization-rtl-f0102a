// rev_peres_gate: 3x3 reversible Peres gate.
//
// P = A, Q = A xor B, R = (A and B) xor C. With C tied to 0 it is a
// reversible half adder (sum on Q, carry on R), the "Peres gate half adder"
// of the multiplier's reduction tree. Standard Peres definition (the document
// names the gate only). Purely combinational.
module rev_peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
