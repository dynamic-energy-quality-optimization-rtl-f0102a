// tb_afilter_fsm: checks the four-step controller.
//
// Random in_valid (with idle gaps), random mode per sample, random PU-NLMS
// period M and random SM-NLMS hits. Each cycle the TB's own step counter and
// a decode table written out below give the expected in_ready, core
// operation, update mask and block enables, which are compared with the
// controller's outputs. PU-NLMS update samples must come exactly every M-th
// PU-NLMS sample. Checks that each sample takes four cycles and that stalls,
// PU-NLMS skips/updates and SM-NLMS skips/updates all occurred.
module tb_afilter_fsm;
  import afilter_pkg::*;
  int checks = 0;
  int failures = 0;
  int n_stall = 0, n_pu_upd = 0, n_pu_skip = 0, n_sm_upd = 0, n_sm_skip = 0, n_samples = 0;

  logic clk = 1'b0;
  logic rst_n;
  mode_e mode;
  logic [3:0] step_m;
  logic in_valid, sm_hit;
  logic in_ready, accept, core_shift, err_en, sm_en, uc_en, ld_err, ld_norm, out_valid, pu_due, hit_q;
  step_e step;
  core_op_e core_op;
  logic [1:0] upd_mask;

  afilter_fsm #(.STEP_W(4)) dut (
    .clk, .rst_n, .mode, .step_m, .in_valid, .sm_hit,
    .in_ready, .accept, .step, .core_op, .core_shift, .upd_mask,
    .err_en, .sm_en, .uc_en, .ld_err, .ld_norm, .out_valid, .pu_due, .hit_q);

  always #5 clk = ~clk;

  int   m_step;      // 0..3
  int   m_cnt;       // PU-NLMS samples since last update
  logic m_due, m_hit;
  int   acc_cycle, last_acc;

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("FAIL t=%0t step=%0d mode=%0d %s: got %0d expected %0d", $time, m_step, mode, what, got, exp);
    end
  endtask

  initial begin
    int cyc;
    rst_n = 1'b0; mode = MODE_LMS; step_m = 4'd3; in_valid = 1'b0; sm_hit = 1'b0;
    m_step = 0; m_cnt = 0; m_due = 0; m_hit = 0; last_acc = -1; cyc = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < 4000; k++) begin
      int e_op, e_mask, e_uc, e_pow;
      @(negedge clk);
      cyc++;
      if (m_step == 0) begin
        in_valid = ($urandom_range(0, 3) != 0);
        mode = mode_e'($urandom_range(0, 3));
        if ($urandom_range(0, 50) == 0) step_m = 4'($urandom_range(0, 6));
      end
      sm_hit = 1'($urandom) && (mode == MODE_SMNLMS) && (m_step == 1);
      #1;
      // ----- expected decode -----
      e_op = CORE_IDLE; e_mask = 0; e_uc = 0;
      unique case (m_step)
        0: if (in_valid) e_op = CORE_FIR;
        1: begin
          e_pow = (mode == MODE_NLMS) || (mode == MODE_PUNLMS && m_due) || (mode == MODE_SMNLMS && sm_hit);
          if (e_pow) e_op = CORE_POWER;
        end
        2: begin
          e_uc = (mode == MODE_NLMS) || (mode == MODE_PUNLMS && m_due) || (mode == MODE_SMNLMS && m_hit);
          if (mode == MODE_LMS) begin e_op = CORE_UPD; e_mask = 1; end
        end
        default: begin
          if (mode == MODE_LMS) begin e_op = CORE_UPD; e_mask = 2; end
          else if (mode == MODE_NLMS || (mode == MODE_PUNLMS && m_due) || (mode == MODE_SMNLMS && m_hit)) begin
            e_op = CORE_UPD; e_mask = 3;
          end
        end
      endcase
      expect_eq("step", int'(step), m_step);
      expect_eq("in_ready", int'(in_ready), int'(m_step == 0));
      expect_eq("core_op", int'(core_op), e_op);
      expect_eq("upd_mask", int'(upd_mask), e_mask);
      expect_eq("core_shift", int'(core_shift), int'(m_step == 0 && in_valid));
      expect_eq("err_en", int'(err_en), int'(m_step == 1));
      expect_eq("ld_err", int'(ld_err), int'(m_step == 1));
      expect_eq("sm_en", int'(sm_en), int'(m_step == 1 && mode == MODE_SMNLMS));
      expect_eq("uc_en", int'(uc_en), e_uc);
      expect_eq("ld_norm", int'(ld_norm), int'(m_step == 2));
      expect_eq("out_valid", int'(out_valid), int'(m_step == 2));
      // ----- advance the model at the clock edge -----
      if (m_step == 0) begin
        if (in_valid) begin
          n_samples++;
          if (last_acc >= 0) expect_eq("cycles between back-to-back samples", (cyc - last_acc) >= 4 ? 1 : 0, 1);
          last_acc = cyc;
          if (mode == MODE_PUNLMS) begin
            if (m_cnt + 1 >= ((step_m == 0) ? 1 : int'(step_m))) begin m_cnt = 0; m_due = 1; n_pu_upd++; end
            else begin m_cnt++; m_due = 0; n_pu_skip++; end
          end else m_due = 0;
          m_step = 1;
        end else n_stall++;
      end else if (m_step == 1) begin
        m_hit = sm_hit;
        if (mode == MODE_SMNLMS) begin if (sm_hit) n_sm_upd++; else n_sm_skip++; end
        m_step = 2;
      end else m_step = (m_step + 1) % 4;
      @(posedge clk);
      #1;
      expect_eq("pu_due", int'(pu_due), int'(m_due));
    end
    checks++;
    if (n_stall == 0 || n_pu_upd == 0 || n_pu_skip == 0 || n_sm_upd == 0 || n_sm_skip == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("samples=%0d stalls=%0d pu_upd=%0d pu_skip=%0d sm_upd=%0d sm_skip=%0d",
             n_samples, n_stall, n_pu_upd, n_pu_skip, n_sm_upd, n_sm_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
