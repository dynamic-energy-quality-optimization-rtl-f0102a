// tb_update_control: checks the normalisation phi / (beta + alpha).
//
// For the NLMS-family modes every 8-bit phi is combined with a spread of
// alpha values; the expected result is sign(phi) * min(127,
// floor(|phi| * 64 / (8 + alpha))). In LMS mode phi must pass through
// unchanged; with the block disabled in a NLMS-family mode the output is 0.
module tb_update_control;
  import afilter_pkg::*;
  int checks = 0;
  int failures = 0;

  logic              en;
  mode_e             mode;
  logic signed [7:0] phi, phi_out;
  logic [10:0]       alpha;

  update_control #(.N(8), .K(6), .AW(11), .BETA(8)) dut (
    .en(en), .mode(mode), .phi(phi), .alpha(alpha), .phi_out(phi_out));

  int alphas [10] = '{0, 1, 7, 56, 64, 100, 255, 512, 1000, 2047};

  initial begin
    en = 1'b1;
    #1;
    for (int m = 1; m < 4; m++) begin
      mode = mode_e'(m);
      for (int i = -128; i < 128; i++) begin
        for (int k = 0; k < 10; k++) begin
          int mag, q, exp_v;
          phi = 8'(i); alpha = 11'(alphas[k]);
          #1;
          mag = i < 0 ? -i : i;
          q = (mag * 64) / (8 + alphas[k]);
          if (q > 127) q = 127;
          exp_v = i < 0 ? -q : q;
          checks++;
          if (int'(phi_out) != exp_v) begin
            failures++;
            if (failures < 10) $display("FAIL mode=%0d phi=%0d alpha=%0d: %0d exp %0d", m, i, alphas[k], phi_out, exp_v);
          end
        end
      end
    end
    mode = MODE_LMS;
    for (int i = -128; i < 128; i++) begin
      phi = 8'(i); alpha = 11'($urandom);
      #1;
      checks++;
      if (int'(phi_out) != i) begin
        failures++;
        $display("FAIL LMS pass-through %0d -> %0d", i, phi_out);
      end
    end
    en = 1'b0; mode = MODE_NLMS;
    for (int k = 0; k < 50; k++) begin
      phi = 8'($urandom); alpha = 11'($urandom);
      #1;
      checks++;
      if (phi_out !== 8'sd0) begin
        failures++;
        $display("FAIL gated divider output %0d", phi_out);
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
