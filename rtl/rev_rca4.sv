// rev_rca4: four-bit reversible ripple-carry adder.
//
// Four reversible full adders in a carry chain: s = a + b + cin, with the
// carry out of bit 3 on cout. It is the building block of the final
// carry-propagate adder of the reversible Wallace tree multiplier (the
// "four bit reversible full adder" of the multiplier figure); ripple carry
// inside the block is this design's choice. Purely combinational.
module rev_rca4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic       cout
);
  logic [4:0] c;
  logic [3:0] garbage_p, garbage_q;

  assign c[0] = cin;
  for (genvar i = 0; i < 4; i++) begin : g_bit
    rev_full_adder u_fa (
      .a(a[i]), .b(b[i]), .c(c[i]),
      .p(garbage_p[i]), .q(garbage_q[i]), .r(s[i]), .s(c[i+1])
    );
  end
  assign cout = c[4];
endmodule
