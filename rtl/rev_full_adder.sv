// rev_full_adder: reversible full adder with four outputs P, Q, R, S.
//
// Outputs follow the proposed full adder: P = A, Q = A xor B,
// R = A xor B xor C (the sum) and S = (A xor B)C xor AB (the carry), so
// P and Q are garbage outputs and R/S are the adder result. Internally a
// Feynman gate forms A xor B, a Peres gate with a zero constant forms AB,
// and a second Peres gate combines A xor B, C and AB into R and S. The
// output equations are the document's; the gate arrangement inside is this
// design's choice. Purely combinational.
module rev_full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic fg_p, fg_q;      // A and A xor B
  logic pg1_p, pg1_q;    // garbage of the AND-forming Peres gate
  logic ab;              // A and B
  logic pg2_p;           // garbage: copy of A xor B

  rev_feynman_gate u_fg  (.a(a), .b(b), .p(fg_p), .q(fg_q));
  rev_peres_gate   u_pg1 (.a(a), .b(b), .c(1'b0), .p(pg1_p), .q(pg1_q), .r(ab));
  rev_peres_gate   u_pg2 (.a(fg_q), .b(c), .c(ab), .p(pg2_p), .q(r), .r(s));

  assign p = fg_p;
  assign q = fg_q;
endmodule
