// reconfig_adaptive_filter: energy-quality scalable, reconfigurable 2-tap
// adaptive filter (LMS / NLMS / PU-NLMS / SM-NLMS) on one shared datapath.
//
// The four algorithms share a core of two reversible Wallace tree
// multipliers and one adder (core_logic), an error block (error_unit), the
// SM-NLMS comparison block (sm_nlms_cmp) and the update control with its
// restoring divider (update_control). A four-step controller (afilter_fsm)
// runs each sample through: 1) y(k) = W^T X(k); 2) e(k) = d(k) - y(k) and
// the update factor (mu*e, or e -/+ gamma for SM-NLMS), plus the input power
// alpha = X^T X; 3) normalisation phi / (beta + alpha); 4) weight update
// w_i += phi * x_i. Select picks the algorithm at run time; blocks the
// chosen algorithm does not use are data-gated (zero operands, registers
// held) so that they do not switch, which is what saves dynamic power in the
// simpler modes. gamma is the SM-NLMS error bound, step_m the PU-NLMS update
// period M.
// Fixed point: N = 8 bit two's complement (the document's 8x8 multipliers)
// with K = 6 fraction bits; mu = 2^-MU_SHIFT; BETA in units of 2^-K. K,
// MU_SHIFT, BETA and STEP_W are this design's choices.
// Interface: a sample (x_in, d_in) is taken when in_valid and in_ready are
// both high; in_ready is high only in step 1, so the filter takes at most one
// sample every four cycles. y_out and e_out of that sample are valid while
// out_valid is high, two cycles after the accepting cycle. w0/w1 show the
// current weights. Asynchronous active-low reset clears weights, delay line
// and controller.
module reconfig_adaptive_filter
  import afilter_pkg::*;
#(
  parameter int unsigned N        = 8,
  parameter int unsigned K        = 6,
  parameter int unsigned MU_SHIFT = 2,
  parameter int unsigned BETA     = 8,
  parameter int unsigned STEP_W   = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [1:0]          sel,       // 00 LMS, 01 NLMS, 10 PU-NLMS, 11 SM-NLMS
  input  logic [N-1:0]        gamma,     // SM-NLMS error bound
  input  logic [STEP_W-1:0]   step_m,    // PU-NLMS update period M
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [N-1:0] x_in,      // reference input x(k)
  input  logic signed [N-1:0] d_in,      // desired signal d(k)
  output logic                out_valid,
  output logic signed [N-1:0] y_out,
  output logic signed [N-1:0] e_out,
  output logic signed [N-1:0] w0,
  output logic signed [N-1:0] w1
);
  localparam int unsigned AW = 2 * N - K + 1;

  mode_e               mode;
  step_e               step;
  core_op_e            core_op;
  logic                core_shift, accept;
  logic [1:0]          upd_mask;
  logic                err_en, sm_en, uc_en, ld_err, ld_norm, pu_due, hit_q, sm_hit;
  logic signed [N-1:0] y, e, phi_mu, phi_sm, phi_num, phi_uc, core_phi;
  logic [AW-1:0]       alpha;
  logic signed [N-1:0] x0, x1;
  logic signed [N-1:0] d_q, e_q, phi_err_q, phi_norm_q;

  assign mode = mode_e'(sel);

  afilter_fsm #(.STEP_W(STEP_W)) u_fsm (
    .clk, .rst_n, .mode, .step_m, .in_valid, .sm_hit,
    .in_ready, .accept, .step, .core_op, .core_shift, .upd_mask,
    .err_en, .sm_en, .uc_en, .ld_err, .ld_norm, .out_valid, .pu_due, .hit_q
  );

  // Step 4 uses the normalised factor; LMS's step-3 update of w0 uses mu*e.
  assign core_phi = (step == ST_NORM) ? phi_err_q : phi_norm_q;

  core_logic #(.N(N), .K(K), .AW(AW)) u_core (
    .clk, .rst_n, .op(core_op), .shift_x(core_shift), .upd_mask,
    .x_in, .phi(core_phi), .y, .alpha, .w0, .w1, .x0, .x1
  );

  error_unit #(.N(N), .MU_SHIFT(MU_SHIFT)) u_err (
    .en(err_en), .d(d_q), .y(y), .e(e), .phi(phi_mu)
  );

  sm_nlms_cmp #(.N(N)) u_sm (
    .en(sm_en), .e(e), .gamma(gamma), .phi(phi_sm), .hit(sm_hit)
  );

  // Update-factor selector in front of the update control.
  assign phi_num = (mode == MODE_SMNLMS) ? phi_sm : phi_mu;

  update_control #(.N(N), .K(K), .AW(AW), .BETA(BETA)) u_uc (
    .en(uc_en), .mode, .phi(phi_err_q), .alpha, .phi_out(phi_uc)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_q        <= '0;
      e_q        <= '0;
      phi_err_q  <= '0;
      phi_norm_q <= '0;
    end else begin
      if (accept)  d_q        <= d_in;
      if (ld_err)  begin
        e_q       <= e;
        phi_err_q <= phi_num;
      end
      if (ld_norm) phi_norm_q <= phi_uc;
    end
  end

  assign y_out = y;
  assign e_out = e_q;
endmodule
