// rev_toffoli_gate: 3x3 reversible Toffoli gate.
//
// P = A, Q = B, R = (A and B) xor C. With C tied to 0 the R output is the
// AND of A and B, which is how the reversible multiplier forms each partial
// product bit. Standard Toffoli definition (the document names the gate
// only). Purely combinational.
module rev_toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
