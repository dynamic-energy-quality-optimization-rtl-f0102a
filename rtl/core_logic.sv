// core_logic: shared arithmetic core of the reconfigurable adaptive filter.
//
// Two signed multipliers (each built on an 8x8 reversible Wallace tree), the
// operand multiplexers in front of them, one adder behind them, the two-tap
// input delay line X(k) = [x0, x1] and the weight registers w0, w1. The same
// two multipliers serve every step of every mode, selected by op:
//   CORE_FIR   y    = w0*x(k) + w1*x(k-1)      (step 1; uses the incoming
//                                              sample x_in, and shifts it into
//                                              the delay line when shift_x)
//   CORE_POWER alpha = x0*x0 + x1*x1           (step 2 of NLMS/PU-NLMS/SM-NLMS)
//   CORE_UPD   w_i  = w_i + phi*x_i            for each i with upd_mask[i]
//   CORE_IDLE  both multipliers' operands are forced to zero
// Data gating: a multiplier whose result is not needed in a step gets zero
// operands through its operand multiplexer, so it does not switch.
// Numbers are signed fixed point, N bits with K fraction bits. A product is
// rescaled by an arithmetic right shift of K (rounding toward minus
// infinity); y and the weights saturate to N bits, alpha (never negative)
// is kept unsaturated in AW bits. y and alpha are registered at the end of
// their step; weights and the delay line reset to zero.
// Follows the document: two shared multipliers with operand multiplexers,
// one adder, the x(k-1) delay, the step operations of the mode table. This
// design's own choices: rounding, saturation, the per-tap weight adders and
// the register placement.
module core_logic
  import afilter_pkg::*;
#(
  parameter int unsigned N  = 8,
  parameter int unsigned K  = 6,
  parameter int unsigned AW = 2 * N - K + 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  core_op_e            op,
  input  logic                shift_x,     // with CORE_FIR: x_in enters the delay line
  input  logic [1:0]          upd_mask,    // with CORE_UPD: which weights to update
  input  logic signed [N-1:0] x_in,
  input  logic signed [N-1:0] phi,         // update factor for CORE_UPD
  output logic signed [N-1:0] y,           // registered filter output
  output logic        [AW-1:0] alpha,      // registered input power X^T X
  output logic signed [N-1:0] w0,
  output logic signed [N-1:0] w1,
  output logic signed [N-1:0] x0,
  output logic signed [N-1:0] x1
);
  localparam int unsigned PW = 2 * N;        // product width
  localparam int unsigned SW = PW + 1 - K;   // width of the rescaled sum

  logic signed [N-1:0]  opa0, opb0, opa1, opb1;
  logic signed [PW-1:0] prod0, prod1;
  logic signed [PW:0]   sum;
  logic signed [SW-1:0] sum_q;
  logic signed [PW-K-1:0] dw0, dw1;          // rescaled phi*x_i

  // ---------- operand multiplexers (4:1, with the zero input for gating) ----
  always_comb begin
    opa0 = '0; opb0 = '0; opa1 = '0; opb1 = '0;
    unique case (op)
      CORE_FIR: begin
        opa0 = w0;  opb0 = x_in;
        opa1 = w1;  opb1 = x0;
      end
      CORE_POWER: begin
        opa0 = x0;  opb0 = x0;
        opa1 = x1;  opb1 = x1;
      end
      CORE_UPD: begin
        if (upd_mask[0]) begin opa0 = phi; opb0 = x0; end
        if (upd_mask[1]) begin opa1 = phi; opb1 = x1; end
      end
      default: ;  // CORE_IDLE: zero operands
    endcase
  end

  signed_rev_mult #(.N(N)) u_mul0 (.a(opa0), .b(opb0), .p(prod0));
  signed_rev_mult #(.N(N)) u_mul1 (.a(opa1), .b(opb1), .p(prod1));

  assign sum   = (PW+1)'(prod0) + (PW+1)'(prod1);
  assign sum_q = SW'(sum >>> K);
  assign dw0   = (PW-K)'(prod0 >>> K);
  assign dw1   = (PW-K)'(prod1 >>> K);

  localparam logic signed [SW:0] VMAX = (SW+1)'((2 ** (N - 1)) - 1);
  localparam logic signed [SW:0] VMIN = -VMAX - (SW+1)'(1);

  function automatic logic signed [N-1:0] sat(input logic signed [SW:0] v);
    if (v > VMAX)      return {1'b0, {(N-1){1'b1}}};
    else if (v < VMIN) return {1'b1, {(N-1){1'b0}}};
    else               return N'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y     <= '0;
      alpha <= '0;
      w0    <= '0;
      w1    <= '0;
      x0    <= '0;
      x1    <= '0;
    end else begin
      unique case (op)
        CORE_FIR: begin
          y <= sat((SW+1)'(sum_q));
          if (shift_x) begin
            x0 <= x_in;
            x1 <= x0;
          end
        end
        CORE_POWER: alpha <= AW'(sum_q);
        CORE_UPD: begin
          if (upd_mask[0]) w0 <= sat((SW+1)'(w0) + (SW+1)'(dw0));
          if (upd_mask[1]) w1 <= sat((SW+1)'(w1) + (SW+1)'(dw1));
        end
        default: ;
      endcase
    end
  end
endmodule
