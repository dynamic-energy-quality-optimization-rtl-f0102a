// rev_wallace_mult: W x W unsigned reversible Wallace tree multiplier.
//
// Three parts, all built from reversible gates:
//   1. rev_pp_gen forms the W*W partial products with Toffoli gates
//      (Feynman gates make the operand fan-out copies).
//   2. A Wallace reduction tree: in every stage each column's bits are taken
//      in groups of three by reversible full adders (Feynman + Peres gates),
//      a leftover pair by a Peres-gate half adder, and a single leftover bit
//      passes on. Sums stay in the column, carries move one column up. Stages
//      repeat until no column holds more than two bits; for W = 8 this takes
//      four stages (column heights 8, 6, 4, 3, 2), the stages 0..3 of the
//      document's multiplier figure.
//   3. A final carry-propagate adder built from four-bit reversible
//      ripple-carry blocks (rev_rca4) adds the two remaining rows.
// The tree's wiring is derived at elaboration time from the column heights
// by the constant functions below, so W is a parameter (even, >= 4); the
// document's size is 8x8. The one bit the tree carries into column 2W is
// always zero for an unsigned product and is not used.
// Interface: p = a * b, purely combinational.
module rev_wallace_mult #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  localparam int NC = 2 * W + 1;   // columns kept in the tree

  // Number of bits in column c after s reduction stages.
  function automatic int height(input int s, input int c);
    int h [0:127];
    int nh [0:127];
    for (int k = 0; k < NC; k++) h[k] = (k < 2 * W - 1) ? ((k < W) ? k + 1 : 2 * W - 1 - k) : 0;
    for (int t = 0; t < s; t++) begin
      for (int k = 0; k < NC; k++) nh[k] = 0;
      for (int k = 0; k < NC; k++) begin
        nh[k] += h[k] / 3 + ((h[k] % 3 != 0) ? 1 : 0);
        if (k + 1 < NC) nh[k+1] += h[k] / 3 + ((h[k] % 3 == 2) ? 1 : 0);
      end
      for (int k = 0; k < NC; k++) h[k] = nh[k];
    end
    return h[c];
  endfunction

  // Bits that column c keeps (sums and a passed bit) when reduced in stage s.
  function automatic int kept(input int s, input int c);
    int h;
    h = height(s, c);
    return h / 3 + ((h % 3 != 0) ? 1 : 0);
  endfunction

  function automatic int num_stages();
    int s;
    int mx;
    s = 0;
    do begin
      mx = 0;
      for (int k = 0; k < NC; k++) if (height(s, k) > mx) mx = height(s, k);
      if (mx > 2) s++;
    end while (mx > 2);
    return s;
  endfunction

  localparam int NS = num_stages();

  // bits0[c][k]: bit k of column c entering stage 0; each stage keeps its own
  // input and output arrays (unused positions are 0).
  logic [W-1:0] bits0 [NC];
  logic [W-1:0] pp [W];

  // ---------------- partial products ----------------
  rev_pp_gen #(.W(W)) u_pp (.a(a), .b(b), .pp(pp));

  for (genvar i = 0; i < W; i++) begin : g_pp_row
    for (genvar j = 0; j < W; j++) begin : g_pp_col
      localparam int C  = i + j;
      localparam int LO = (C > W - 1) ? C - (W - 1) : 0;
      assign bits0[C][i-LO] = pp[i][j];
    end
  end
  for (genvar c = 0; c < NC; c++) begin : g_fill0
    for (genvar k = height(0, c); k < W; k++) begin : g_zero
      assign bits0[c][k] = 1'b0;
    end
  end

  // ---------------- reduction stages ----------------
  for (genvar s = 0; s < NS; s++) begin : g_stage
    logic [W-1:0] bin  [NC];
    logic [W-1:0] bout [NC];

    if (s == 0) begin : g_src
      assign bin = bits0;
    end else begin : g_src
      assign bin = g_stage[s-1].bout;
    end

    for (genvar c = 0; c < NC; c++) begin : g_column
      localparam int H    = height(s, c);
      localparam int NFA  = H / 3;
      localparam int NHA  = (H % 3 == 2) ? 1 : 0;
      localparam int PASS = (H % 3 == 1) ? 1 : 0;
      localparam int COFF = (c + 1 < NC) ? kept(s, c + 1) : 0;  // carry slot offset in column c+1

      for (genvar g = 0; g < NFA; g++) begin : g_fa
        logic carry, gp, gq;
        rev_full_adder u_fa (
          .a(bin[c][3*g]), .b(bin[c][3*g+1]), .c(bin[c][3*g+2]),
          .p(gp), .q(gq), .r(bout[c][g]), .s(carry)
        );
        if (c + 1 < NC) begin : g_cout
          assign bout[c+1][COFF+g] = carry;
        end
      end
      if (NHA == 1) begin : g_ha
        logic carry;
        rev_half_adder u_ha (
          .a(bin[c][3*NFA]), .b(bin[c][3*NFA+1]),
          .sum(bout[c][NFA]), .carry(carry)
        );
        if (c + 1 < NC) begin : g_cout
          assign bout[c+1][COFF+NFA] = carry;
        end
      end
      if (PASS == 1) begin : g_pass
        assign bout[c][NFA] = bin[c][3*NFA];
      end
      for (genvar k = height(s + 1, c); k < W; k++) begin : g_zero
        assign bout[c][k] = 1'b0;
      end
    end
  end

  // ---------------- final carry-propagate adder ----------------
  localparam int NB = (2 * W) / 4;   // four-bit blocks
  logic [2*W-1:0] row_a, row_b;
  logic [NB:0]    blk_c;

  for (genvar c = 0; c < 2 * W; c++) begin : g_rows
    assign row_a[c] = g_stage[NS-1].bout[c][0];
    assign row_b[c] = g_stage[NS-1].bout[c][1];
  end

  assign blk_c[0] = 1'b0;
  for (genvar n = 0; n < NB; n++) begin : g_cpa
    rev_rca4 u_rca (
      .a(row_a[4*n +: 4]), .b(row_b[4*n +: 4]), .cin(blk_c[n]),
      .s(p[4*n +: 4]), .cout(blk_c[n+1])
    );
  end

  initial begin
    assert (W % 2 == 0 && W >= 4) else $error("rev_wallace_mult: W must be even and at least 4");
  end
endmodule
