// tb_rev_pp_gen: checks the reversible partial-product array.
//
// Random and corner operand pairs are applied to the 8x8 array; every one of
// the 64 partial products must equal a[j] & b[i], and the weighted sum of all
// partial products must equal a * b.
module tb_rev_pp_gen;
  localparam int W = 8;
  int checks = 0;
  int failures = 0;

  logic [W-1:0] a, b;
  logic [W-1:0] pp [W];

  rev_pp_gen #(.W(W)) dut (.a(a), .b(b), .pp(pp));

  task automatic apply(input logic [W-1:0] va, input logic [W-1:0] vb);
    int total;
    a = va; b = vb;
    #1;
    total = 0;
    for (int i = 0; i < W; i++) begin
      for (int j = 0; j < W; j++) begin
        checks++;
        if (pp[i][j] !== (va[j] & vb[i])) begin
          failures++;
          $display("FAIL a=%0d b=%0d pp[%0d][%0d]=%0d", va, vb, i, j, pp[i][j]);
        end
        total += int'(pp[i][j]) << (i + j);
      end
    end
    checks++;
    if (total != int'(va) * int'(vb)) begin
      failures++;
      $display("FAIL a=%0d b=%0d weighted sum %0d", va, vb, total);
    end
  endtask

  initial begin
    apply(8'h00, 8'h00);
    apply(8'hFF, 8'hFF);
    apply(8'hAA, 8'h55);
    apply(8'h01, 8'h80);
    for (int n = 0; n < 200; n++) apply(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
