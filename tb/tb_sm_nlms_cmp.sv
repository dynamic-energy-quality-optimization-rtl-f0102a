// tb_sm_nlms_cmp: checks the set-membership comparison.
//
// Exhaustive over every 8-bit error and every 7-bit bound: phi must be
// mu(k)*e(k) with mu(k) = 1 - gamma/|e| outside the bound, i.e. e - gamma or
// e + gamma, and 0 with hit low inside it. With the block disabled phi and
// hit must stay 0.
module tb_sm_nlms_cmp;
  int checks = 0;
  int failures = 0;

  logic              en;
  logic signed [7:0] e, phi;
  logic [7:0]        gamma;
  logic              hit;

  sm_nlms_cmp #(.N(8)) dut (.en(en), .e(e), .gamma(gamma), .phi(phi), .hit(hit));

  initial begin
    en = 1'b1;
    #1;
    for (int i = -128; i < 128; i++) begin
      for (int g = 0; g < 128; g++) begin
        int mag, exp_phi;
        logic exp_hit;
        e = 8'(i); gamma = 8'(g);
        #1;
        mag = i < 0 ? -i : i;
        exp_hit = mag > g;
        exp_phi = !exp_hit ? 0 : (i > 0 ? i - g : i + g);
        checks++;
        if (hit !== exp_hit || int'(phi) != exp_phi) begin
          failures++;
          if (failures < 10) $display("FAIL e=%0d gamma=%0d: phi=%0d hit=%0d", i, g, phi, hit);
        end
      end
    end
    en = 1'b0;
    for (int k = 0; k < 100; k++) begin
      e = 8'($urandom); gamma = 8'($urandom_range(0, 10));
      #1;
      checks++;
      if (hit !== 1'b0 || phi !== 8'sd0) begin
        failures++;
        $display("FAIL gated block active");
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
