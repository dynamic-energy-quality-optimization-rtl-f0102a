// afilter_pkg: types and constants shared by the reconfigurable adaptive filter.
//
// The filter runs one of four LMS-family algorithms, chosen by the 2-bit Select
// input with the encoding of the operating-mode table (00 LMS, 01 NLMS,
// 10 PU-NLMS, 11 SM-NLMS). Each input sample is processed in four clock steps
// (output, error, normalisation, weight update). The step encoding and the
// fixed-point saturation helper are this design's own choices.
package afilter_pkg;

  typedef enum logic [1:0] {
    MODE_LMS    = 2'b00,
    MODE_NLMS   = 2'b01,
    MODE_PUNLMS = 2'b10,
    MODE_SMNLMS = 2'b11
  } mode_e;

  // The four steps of the per-sample schedule.
  typedef enum logic [1:0] {
    ST_OUT  = 2'd0,  // step 1: y(k) = W^T X(k)
    ST_ERR  = 2'd1,  // step 2: e(k), phi = mu*e or e -/+ gamma, alpha = X^T X
    ST_NORM = 2'd2,  // step 3: phi = phi / (beta + alpha)
    ST_UPD  = 2'd3   // step 4: w_i(k+1) = w_i(k) + phi * x_i(k)
  } step_e;

  // Core operation requested by the controller in the current step.
  typedef enum logic [1:0] {
    CORE_IDLE  = 2'd0,  // multiplier operands gated to zero
    CORE_FIR   = 2'd1,  // w0*x0 + w1*x1
    CORE_POWER = 2'd2,  // x0*x0 + x1*x1
    CORE_UPD   = 2'd3   // phi*x0 and phi*x1 added to the weights
  } core_op_e;

endpackage
