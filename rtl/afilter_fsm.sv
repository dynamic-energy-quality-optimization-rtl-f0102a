// afilter_fsm: four-step controller of the reconfigurable adaptive filter.
//
// Every input sample goes through four clock steps (ST_OUT, ST_ERR,
// ST_NORM, ST_UPD). In ST_OUT the controller waits for in_valid; the cycle
// in which a sample is accepted computes y(k) and shifts the sample into the
// delay line. The controller decodes the Select mode and the step into the
// operation of the core and the enables of the other blocks, following the
// mode table:
//   mode     ST_ERR            ST_NORM                  ST_UPD
//   LMS      e, mu*e           w0 update (core)         w1 update (core)
//   NLMS     e, mu*e, alpha    phi/(beta+alpha) (U.C.)  w0, w1 update
//   PU-NLMS  e, mu*e, alpha*   phi/(beta+alpha)*        w0, w1 update*
//   SM-NLMS  e, e-/+gamma,     phi/(beta+alpha)**       w0, w1 update**
//            alpha**
//   *  only on every M-th sample (M = step_m); otherwise the core and the
//      divider stay gated and the weights and alpha hold.
//   ** only when the error left the bound (sm_hit); otherwise gated.
// Blocks not needed in a step get en = 0 (their operands are gated to
// zero). The mode is decoded directly, so Select may change at any time
// without resetting the controller; a change takes effect from the next step.
// Follows the document: the four-clock-cycle schedule, the mode encoding,
// the PU-NLMS counter compared with M, the SM-NLMS conditional update.
// This design's own choices: the valid/ready input handshake, that PU-NLMS
// updates the weights only on every M-th sample, step_m = 0 acting as 1, and
// the LMS weight updates in steps 3 and 4.
// Timing: one sample per four cycles at full rate; out_valid is high during
// ST_NORM, when y(k) and e(k) of the accepted sample are registered.
module afilter_fsm
  import afilter_pkg::*;
#(
  parameter int unsigned STEP_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  mode_e             mode,
  input  logic [STEP_W-1:0] step_m,     // PU-NLMS update period M
  input  logic              in_valid,
  input  logic              sm_hit,     // combinational, valid in ST_ERR
  output logic              in_ready,
  output logic              accept,
  output step_e             step,
  output core_op_e          core_op,
  output logic              core_shift,
  output logic [1:0]        upd_mask,
  output logic              err_en,
  output logic              sm_en,
  output logic              uc_en,
  output logic              ld_err,
  output logic              ld_norm,
  output logic              out_valid,
  output logic              pu_due,     // this sample is a PU-NLMS update sample
  output logic              hit_q       // registered sm_hit of this sample
);
  logic [STEP_W-1:0] pu_cnt;
  logic [STEP_W-1:0] m_eff;

  assign m_eff    = (step_m == '0) ? STEP_W'(1) : step_m;
  assign in_ready = (step == ST_OUT);
  assign accept   = in_ready && in_valid;
  assign out_valid = (step == ST_NORM);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step   <= ST_OUT;
      pu_cnt <= '0;
      pu_due <= 1'b0;
      hit_q  <= 1'b0;
    end else begin
      unique case (step)
        ST_OUT: if (accept) begin
          step <= ST_ERR;
          if (mode == MODE_PUNLMS) begin
            if (pu_cnt + STEP_W'(1) >= m_eff) begin
              pu_cnt <= '0;
              pu_due <= 1'b1;
            end else begin
              pu_cnt <= pu_cnt + STEP_W'(1);
              pu_due <= 1'b0;
            end
          end else begin
            pu_due <= 1'b0;
          end
        end
        ST_ERR: begin
          step  <= ST_NORM;
          hit_q <= sm_hit;
        end
        ST_NORM: step <= ST_UPD;
        ST_UPD:  step <= ST_OUT;
        default: step <= ST_OUT;
      endcase
    end
  end

  always_comb begin
    core_op    = CORE_IDLE;
    core_shift = 1'b0;
    upd_mask   = 2'b00;
    err_en     = 1'b0;
    sm_en      = 1'b0;
    uc_en      = 1'b0;
    ld_err     = 1'b0;
    ld_norm    = 1'b0;
    unique case (step)
      ST_OUT: if (accept) begin
        core_op    = CORE_FIR;
        core_shift = 1'b1;
      end
      ST_ERR: begin
        err_en = 1'b1;
        ld_err = 1'b1;
        sm_en  = (mode == MODE_SMNLMS);
        if (mode == MODE_NLMS || (mode == MODE_PUNLMS && pu_due) ||
            (mode == MODE_SMNLMS && sm_hit))
          core_op = CORE_POWER;
      end
      ST_NORM: begin
        ld_norm = 1'b1;
        uc_en   = (mode == MODE_NLMS) || (mode == MODE_PUNLMS && pu_due) ||
                  (mode == MODE_SMNLMS && hit_q);
        if (mode == MODE_LMS) begin
          core_op  = CORE_UPD;
          upd_mask = 2'b01;
        end
      end
      ST_UPD: begin
        unique case (mode)
          MODE_LMS:    begin core_op = CORE_UPD; upd_mask = 2'b10; end
          MODE_NLMS:   begin core_op = CORE_UPD; upd_mask = 2'b11; end
          MODE_PUNLMS: if (pu_due) begin core_op = CORE_UPD; upd_mask = 2'b11; end
          MODE_SMNLMS: if (hit_q)  begin core_op = CORE_UPD; upd_mask = 2'b11; end
          default: ;
        endcase
      end
      default: ;
    endcase
  end
endmodule
