// tb_reconfig_adaptive_filter: end-to-end test of the reconfigurable
// adaptive filter at its default parameters (N = 8, K = 6, mu = 1/4,
// beta = 8/64).
//
// Task: identify an unknown two-tap system h = (48, -26)/64 from a noisy
// symbol stream. x(k) is a random +/-40 symbol (about +/-0.63) plus uniform
// noise of +/-6 LSB; d(k) = h^T X(k) plus +/-2 LSB of measurement noise.
// The TB holds an integer reference model of every algorithm (floor
// division by 2^K, saturation, the PU-NLMS sample counter, the SM-NLMS bound)
// and compares y(k) and e(k) at out_valid and both weights after every
// sample, exactly.
// Phases: each of LMS, NLMS, PU-NLMS (M = 3) and SM-NLMS (gamma = 4 LSB) runs
// from reset and must bring both weights within 10 LSB of h; a phase with a
// random mode on every sample checks run-time reconfiguration; a phase that
// changes Select in the middle of samples checks the handshake only, then the
// model is re-synchronised. in_valid has random gaps (stalls) in some phases.
// Timing checks: back-to-back samples are accepted exactly every 4 cycles and
// out_valid comes exactly 2 cycles after the accepting cycle. Data gating
// checks: divider operands are zero outside normalisation steps and in LMS
// mode, the SM comparison's operands are zero outside SM-NLMS, and the
// multipliers' operands are zero on PU-NLMS skip samples after step 1.
// Every mechanism (each mode, mode switches, stalls, PU skip and update
// samples, SM skip and update samples, gating checks) must be seen at least
// once.
module tb_reconfig_adaptive_filter;
  import afilter_pkg::*;
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

  // ---------------- coverage counters ----------------
  int n_mode [4];
  int n_switch = 0, n_stall = 0, n_pu_skip = 0, n_pu_upd = 0, n_sm_skip = 0, n_sm_upd = 0;
  int n_gate_div = 0, n_gate_sm = 0, n_gate_mult = 0, n_midswitch = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  // ---------------- reference model ----------------
  int m_w0, m_w1, m_x0, m_x1, m_alpha, m_cnt;
  int m_y, m_e;
  logic check_model;
  int last_mode;

  function automatic int fdiv(input int a, input int b);
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction
  function automatic int sat8(input int v);
    return v > 127 ? 127 : (v < -128 ? -128 : v);
  endfunction
  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  task automatic model_reset();
    m_w0 = 0; m_w1 = 0; m_x0 = 0; m_x1 = 0; m_alpha = 0; m_cnt = 0;
  endtask

  // One sample of the chosen algorithm; returns y and e in m_y, m_e.
  task automatic model_sample(input int mode, input int x, input int d, input int g, input int mm);
    int phi, q, den, due, hit, mag;
    m_x1 = m_x0; m_x0 = x;
    m_y = sat8(fdiv(m_w0 * m_x0 + m_w1 * m_x1, 64));
    m_e = sat8(d - m_y);
    phi = fdiv(m_e, 4);
    due = 0; hit = 0;
    if (mode == 2) begin
      if (m_cnt + 1 >= ((mm == 0) ? 1 : mm)) begin m_cnt = 0; due = 1; n_pu_upd++; end
      else begin m_cnt++; n_pu_skip++; end
    end
    if (mode == 3) begin
      hit = iabs(m_e) > g;
      if (hit) begin phi = (m_e > 0) ? m_e - g : m_e + g; n_sm_upd++; end
      else n_sm_skip++;
    end
    if (mode == 0) begin
      m_w0 = sat8(m_w0 + fdiv(phi * m_x0, 64));
      m_w1 = sat8(m_w1 + fdiv(phi * m_x1, 64));
    end else if (mode == 1 || due || hit) begin
      m_alpha = fdiv(m_x0 * m_x0 + m_x1 * m_x1, 64);
      den = 8 + m_alpha;
      q = (iabs(phi) * 64) / den;
      if (q > 127) q = 127;
      if (phi < 0) q = -q;
      m_w0 = sat8(m_w0 + fdiv(q * m_x0, 64));
      m_w1 = sat8(m_w1 + fdiv(q * m_x1, 64));
    end
  endtask

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("FAIL cycle %0d %s: got %0d expected %0d", cycle, what, got, exp);
    end
  endtask

  // ---------------- data-gating monitor ----------------
  always @(negedge clk) if (rst_n) begin
    if (dut.step != ST_NORM || sel == 2'b00) begin
      n_gate_div++;
      expect_eq("divider operands gated", int'(dut.u_uc.num != 0 || dut.u_uc.den != 0), 0);
    end
    if (sel != 2'b11) begin
      n_gate_sm++;
      expect_eq("SM comparison operands gated", int'(dut.u_sm.e_g != 0 || dut.u_sm.g_g != 0), 0);
    end
    if (sel == 2'b10 && !dut.pu_due && dut.step != ST_OUT) begin
      n_gate_mult++;
      expect_eq("multiplier operands gated", int'(dut.u_core.opa0 != 0 || dut.u_core.opb0 != 0 ||
                                                  dut.u_core.opa1 != 0 || dut.u_core.opb1 != 0), 0);
    end
  end

  // ---------------- stimulus ----------------
  int xs, ds;
  task automatic gen_sample();
    int xv, yv;
    xv = (($urandom_range(0, 1) == 1) ? 40 : -40) + int'($urandom_range(0, 12)) - 6;
    // desired signal from the unknown system (uses the new and previous x)
    yv = fdiv(H0 * xv + H1 * xs, 64) + int'($urandom_range(0, 4)) - 2;
    xs = xv;
    x_in = 8'(xv);
    d_in = 8'(sat8(yv));
  endtask

  // Run n samples in the given mode (-1 = random mode per sample).
  task automatic run(input int mode, input int n, input int gaps);
    int acc_cycle, prev_acc, md;
    prev_acc = -100;
    for (int s = 0; s < n; s++) begin
      md = (mode < 0) ? int'($urandom_range(0, 3)) : mode;
      // wait for step 1, possibly with an idle gap (stall)
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      if (gaps && $urandom_range(0, 2) == 0) begin
        in_valid = 1'b0;
        repeat ($urandom_range(1, 3)) begin @(negedge clk); n_stall++; end
      end
      if (md != last_mode && last_mode >= 0) n_switch++;
      last_mode = md;
      sel = 2'(md);
      n_mode[md]++;
      gen_sample();
      in_valid = 1'b1;
      if (check_model) model_sample(md, int'(x_in), int'(d_in), int'(gamma), int'(step_m));
      @(posedge clk);
      acc_cycle = cycle;
      if (!gaps && prev_acc >= 0) expect_eq("accept interval", acc_cycle - prev_acc, 4);
      prev_acc = acc_cycle;
      @(negedge clk);
      in_valid = 1'b0;
      if (mode == -2 && $urandom_range(0, 1) == 1) begin
        sel = 2'($urandom_range(0, 3));   // change Select inside the sample
        n_midswitch++;
      end
      @(posedge clk);
      #1;
      expect_eq("out_valid two cycles after accept", int'(out_valid), 1);
      if (check_model) begin
        expect_eq("y", int'(y_out), m_y);
        expect_eq("e", int'(e_out), m_e);
      end
      @(posedge clk); @(posedge clk);
      #1;
      if (check_model) begin
        expect_eq("w0", int'(w0), m_w0);
        expect_eq("w1", int'(w1), m_w1);
      end
    end
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    in_valid = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    model_reset();
    xs = 0;
  endtask

  task automatic check_converged(input string name);
    checks++;
    if (iabs(int'(w0) - H0) > 10 || iabs(int'(w1) - H1) > 10) begin
      failures++;
      $display("FAIL %s did not converge: w0=%0d w1=%0d (target %0d %0d)", name, w0, w1, H0, H1);
    end else
      $display("%s converged: w0=%0d w1=%0d (target %0d %0d)", name, w0, w1, H0, H1);
  endtask

  initial begin
    sel = 2'b00; gamma = 8'd4; step_m = 4'd3; x_in = '0; d_in = '0;
    last_mode = -1; check_model = 1'b1;
    do_reset();

    run(0, 250, 0);  check_converged("LMS");
    do_reset();
    run(1, 150, 1);  check_converged("NLMS");
    do_reset();
    run(2, 300, 0);  check_converged("PU-NLMS");
    do_reset();
    run(3, 200, 1);  check_converged("SM-NLMS");
    do_reset();
    step_m = 4'd2;
    run(-1, 300, 1); check_converged("random mode per sample");

    // Select changed inside samples: handshake only, then resynchronise.
    check_model = 1'b0;
    run(-2, 60, 0);
    m_w0 = int'(w0); m_w1 = int'(w1); m_x0 = int'(dut.x0); m_x1 = int'(dut.x1);
    m_alpha = int'(dut.alpha); m_cnt = int'(dut.u_fsm.pu_cnt);
    check_model = 1'b1;
    run(1, 60, 0);   check_converged("NLMS after mid-sample switching");

    // ---------------- coverage ----------------
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (n_mode[m] == 0) begin failures++; $display("FAIL mode %0d never used", m); end
    end
    checks++;
    if (n_switch == 0 || n_stall == 0 || n_pu_skip == 0 || n_pu_upd == 0 || n_sm_skip == 0 ||
        n_sm_upd == 0 || n_gate_div == 0 || n_gate_sm == 0 || n_gate_mult == 0 || n_midswitch == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("modes LMS=%0d NLMS=%0d PU=%0d SM=%0d switches=%0d mid-sample switches=%0d stalls=%0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_switch, n_midswitch, n_stall);
    $display("PU skip=%0d update=%0d  SM skip=%0d update=%0d  gating checks div=%0d sm=%0d mult=%0d",
             n_pu_skip, n_pu_upd, n_sm_skip, n_sm_upd, n_gate_div, n_gate_sm, n_gate_mult);
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
