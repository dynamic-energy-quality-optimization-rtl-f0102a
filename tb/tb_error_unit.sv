// tb_error_unit: checks e = sat(d - y) and phi = e >>> MU_SHIFT.
//
// Exhaustive over all 8-bit d and y with the unit enabled, including the
// saturating corners; with the unit disabled both outputs must be zero.
module tb_error_unit;
  int checks = 0;
  int failures = 0;

  logic              en;
  logic signed [7:0] d, y, e, phi;

  error_unit #(.N(8), .MU_SHIFT(2)) dut (.en(en), .d(d), .y(y), .e(e), .phi(phi));

  initial begin
    en = 1'b1;
    #1;
    for (int i = -128; i < 128; i++) begin
      for (int j = -128; j < 128; j++) begin
        int diff, exp_e, exp_phi;
        d = 8'(i); y = 8'(j);
        #1;
        diff = i - j;
        exp_e = diff > 127 ? 127 : (diff < -128 ? -128 : diff);
        // floor(exp_e / 4) for negative numbers too
        exp_phi = (exp_e >= 0) ? exp_e / 4 : -((-exp_e + 3) / 4);
        checks++;
        if (int'(e) != exp_e || int'(phi) != exp_phi) begin
          failures++;
          if (failures < 10) $display("FAIL d=%0d y=%0d: e=%0d phi=%0d exp %0d %0d", i, j, e, phi, exp_e, exp_phi);
        end
      end
    end
    en = 1'b0;
    for (int k = 0; k < 100; k++) begin
      d = 8'($urandom); y = 8'($urandom);
      #1;
      checks++;
      if (e !== 8'sd0 || phi !== 8'sd0) begin
        failures++;
        $display("FAIL gated unit switched: e=%0d phi=%0d", e, phi);
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
