// tb_energy_quality: per-mode energy/quality comparison of the filter.
//
// Runs the same noisy system-identification task (unknown h = (48, -26)/64,
// random +/-40 symbols with +/-6 LSB input noise, +/-4 LSB measurement noise
// on d) in each of the four modes from reset, 400 samples each, at the
// filter's default parameters. Two figures are measured per mode:
//   activity: bit toggles on the multiplier and divider operand buses, a
//             proxy for the dynamic power that data gating is meant to save;
//   quality:  mean squared error over the last 200 samples and the final
//             weight distance from h.
// Expected ordering, from the way the modes share the datapath: LMS never
// toggles the divider; PU-NLMS (M = 4) and SM-NLMS (gamma = 6 LSB) toggle
// the multipliers less than NLMS; every mode converges (final weights within
// 12 LSB of h, steady-state MSE below 64 LSB^2).
module tb_energy_quality;
  int checks = 0;
  int failures = 0;

  localparam int H0 = 48, H1 = -26;

  logic clk = 1'b0;
  logic rst_n;
  logic [1:0] sel;
  logic [7:0] gamma;
  logic [3:0] step_m;
  logic in_valid, in_ready, out_valid;
  logic signed [7:0] x_in, d_in, y_out, e_out, w0, w1;

  reconfig_adaptive_filter dut (
    .clk, .rst_n, .sel, .gamma, .step_m, .in_valid, .in_ready,
    .x_in, .d_in, .out_valid, .y_out, .e_out, .w0, .w1);

  always #5 clk = ~clk;

  // ---------------- activity monitor ----------------
  logic [31:0] mul_bus, mul_bus_q;
  logic [24:0] div_bus, div_bus_q;
  longint mul_toggles, div_toggles;
  assign mul_bus = {dut.u_core.opa0, dut.u_core.opb0, dut.u_core.opa1, dut.u_core.opb1};
  assign div_bus = {dut.u_uc.num, dut.u_uc.den};
  always @(posedge clk) begin
    mul_toggles += longint'($countones(mul_bus ^ mul_bus_q));
    div_toggles += longint'($countones(div_bus ^ div_bus_q));
    mul_bus_q <= mul_bus;
    div_bus_q <= div_bus;
  end

  int xs;
  function automatic int fdiv(input int a, input int b);
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction
  function automatic int sat8(input int v);
    return v > 127 ? 127 : (v < -128 ? -128 : v);
  endfunction
  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  longint act_mul [4], act_div [4];
  real    mse [4];
  string  names [4] = '{"LMS", "NLMS", "PU-NLMS", "SM-NLMS"};

  task automatic run_mode(input int m);
    longint sq;
    int xv, dv;
    rst_n = 1'b0; in_valid = 1'b0; sel = 2'(m); xs = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    mul_toggles = 0; div_toggles = 0; sq = 0;
    for (int s = 0; s < 400; s++) begin
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      xv = (($urandom_range(0, 1) == 1) ? 40 : -40) + int'($urandom_range(0, 12)) - 6;
      dv = fdiv(H0 * xv + H1 * xs, 64) + int'($urandom_range(0, 8)) - 4;
      xs = xv;
      x_in = 8'(xv); d_in = 8'(sat8(dv)); in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      @(posedge clk); #1;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL out_valid missing"); end
      if (s >= 200) sq += longint'(int'(e_out) * int'(e_out));
    end
    repeat (3) @(posedge clk);
    act_mul[m] = mul_toggles;
    act_div[m] = div_toggles;
    mse[m] = real'(sq) / 200.0;
    $display("%-8s multiplier toggles %7d  divider toggles %6d  MSE %6.2f LSB^2  w = (%0d, %0d)",
             names[m], act_mul[m], act_div[m], mse[m], w0, w1);
    checks++;
    if (iabs(int'(w0) - H0) > 12 || iabs(int'(w1) - H1) > 12 || mse[m] > 64.0) begin
      failures++;
      $display("FAIL %s did not converge", names[m]);
    end
  endtask

  initial begin
    mul_toggles = 0; div_toggles = 0; mul_bus_q = '0; div_bus_q = '0;
    gamma = 8'd6; step_m = 4'd4; x_in = '0; d_in = '0; sel = '0;
    for (int m = 0; m < 4; m++) run_mode(m);
    checks++;
    if (act_div[0] != 0) begin failures++; $display("FAIL LMS toggled the divider"); end
    checks++;
    if (act_mul[2] >= act_mul[1]) begin failures++; $display("FAIL PU-NLMS multiplier activity not below NLMS"); end
    checks++;
    if (act_mul[3] >= act_mul[1]) begin failures++; $display("FAIL SM-NLMS multiplier activity not below NLMS"); end
    checks++;
    if (act_div[2] >= act_div[1] || act_div[3] >= act_div[1]) begin
      failures++; $display("FAIL PU/SM-NLMS divider activity not below NLMS");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
