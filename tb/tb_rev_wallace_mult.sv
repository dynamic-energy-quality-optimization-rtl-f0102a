// tb_rev_wallace_mult: exhaustive check of the 8x8 reversible Wallace tree
// multiplier, plus the signed wrapper used by the filter core.
//
// All 65536 operand pairs of the unsigned 8x8 tree are compared with the
// integer product (as in the multiplier simulation of the document, which
// sweeps operand pairs). A 6x6 instance checks that the tree generator also
// works at another width, and the signed wrapper is checked on all 65536
// two's-complement operand pairs.
module tb_rev_wallace_mult;
  int checks = 0;
  int failures = 0;

  logic [7:0]         a, b;
  logic [15:0]        p;
  logic [5:0]         a6, b6;
  logic [11:0]        p6;
  logic signed [7:0]  sa, sb;
  logic signed [15:0] sp;

  rev_wallace_mult #(.W(8)) dut   (.a(a), .b(b), .p(p));
  rev_wallace_mult #(.W(6)) dut6  (.a(a6), .b(b6), .p(p6));
  signed_rev_mult  #(.N(8)) dut_s (.a(sa), .b(sb), .p(sp));

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        sa = 8'(i); sb = 8'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d", i, j, p);
        end
        checks++;
        if (int'(sp) != int'(sa) * int'(sb)) begin
          failures++;
          if (failures < 10) $display("FAIL signed %0d * %0d = %0d", sa, sb, sp);
        end
      end
    end
    for (int i = 0; i < 64; i++) begin
      for (int j = 0; j < 64; j++) begin
        a6 = 6'(i); b6 = 6'(j);
        #1;
        checks++;
        if (int'(p6) != i * j) begin
          failures++;
          if (failures < 10) $display("FAIL 6x6 %0d * %0d = %0d", i, j, p6);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
