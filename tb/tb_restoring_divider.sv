// tb_restoring_divider: checks the array restoring divider.
//
// Exhaustive over a 8-bit dividend and 5-bit divisor instance (including
// the zero divisor, which must give an all-ones quotient), then random
// operands on the default 14/11-bit instance used by the filter. Quotient
// and remainder are compared with integer division.
module tb_restoring_divider;
  int checks = 0;
  int failures = 0;

  logic [7:0]  n8;  logic [4:0]  d5;  logic [7:0]  q8;  logic [4:0]  r5;
  logic [13:0] n14; logic [10:0] d11; logic [13:0] q14; logic [10:0] r11;

  restoring_divider #(.NW(8), .DW(5)) dut_s (.n(n8), .d(d5), .q(q8), .r(r5));
  restoring_divider dut (.n(n14), .d(d11), .q(q14), .r(r11));

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 32; j++) begin
        n8 = 8'(i); d5 = 5'(j);
        #1;
        checks++;
        if (j == 0) begin
          if (q8 !== 8'hFF) begin
            failures++;
            $display("FAIL %0d / 0 gave %0d", i, q8);
          end
        end else if (int'(q8) != i / j || int'(r5) != i % j) begin
          failures++;
          if (failures < 10) $display("FAIL %0d / %0d = %0d r %0d", i, j, q8, r5);
        end
      end
    end
    for (int k = 0; k < 20000; k++) begin
      int ni, di;
      ni = int'($urandom_range(0, 16383));
      di = int'($urandom_range(1, 2047));
      n14 = 14'(ni); d11 = 11'(di);
      #1;
      checks++;
      if (int'(q14) != ni / di || int'(r11) != ni % di) begin
        failures++;
        if (failures < 10) $display("FAIL %0d / %0d = %0d r %0d", ni, di, q14, r11);
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
