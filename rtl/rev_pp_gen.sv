// rev_pp_gen: partial-product array of the reversible multiplier.
//
// A W x W grid of Toffoli gates forms every partial product
// pp[i][j] = a[j] & b[i] on the gates' R output (constant input 0). The
// gates' pass-through outputs carry the operand bits on: P carries a[j] down
// to the next row and Q carries b[i] along to the next column. A row of
// Feynman gates (second input 0) makes the first copy of each a[j], and a
// column of Feynman gates the first copy of each b[i]. For W = 8 this gives
// the 64 partial products of the 8x8 multiplier. The grid of Toffoli gates
// with Feynman gates along two edges follows the partial-product figure of the
// document; the exact chaining of the copies is this design's choice.
// Purely combinational.
module rev_pp_gen #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] pp [W]   // pp[i][j] = a[j] & b[i], weight 2^(i+j)
);
  // a_chain[i][j]: copy of a[j] entering row i; b_chain[i][j]: copy of b[i]
  // entering column j.
  logic [W-1:0] a_chain [W+1];
  logic [W:0]   b_chain [W];
  logic [W-1:0] fg_a_garbage;
  logic [W-1:0] fg_b_garbage;

  for (genvar j = 0; j < W; j++) begin : g_fg_a
    rev_feynman_gate u_fg (.a(a[j]), .b(1'b0), .p(fg_a_garbage[j]), .q(a_chain[0][j]));
  end
  for (genvar i = 0; i < W; i++) begin : g_fg_b
    rev_feynman_gate u_fg (.a(b[i]), .b(1'b0), .p(fg_b_garbage[i]), .q(b_chain[i][0]));
  end

  for (genvar i = 0; i < W; i++) begin : g_row
    for (genvar j = 0; j < W; j++) begin : g_col
      rev_toffoli_gate u_tg (
        .a(a_chain[i][j]),
        .b(b_chain[i][j]),
        .c(1'b0),
        .p(a_chain[i+1][j]),
        .q(b_chain[i][j+1]),
        .r(pp[i][j])
      );
    end
  end
endmodule
