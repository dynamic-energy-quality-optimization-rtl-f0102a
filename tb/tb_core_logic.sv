// tb_core_logic: checks the shared arithmetic core against an integer model.
//
// Random sequences of core operations (FIR with and without delay-line
// shift, input power, weight updates with every update mask, idle) are
// applied at N = 8, K = 6. After every clock edge y, alpha, the weights and
// the delay line are compared with a model written with plain integer
// arithmetic (floor division by 2^K, saturation to [-128, 127]). Every
// operation kind, including weight saturation, must occur.
module tb_core_logic;
  import afilter_pkg::*;
  int checks = 0;
  int failures = 0;
  int n_fir = 0, n_pow = 0, n_upd = 0, n_idle = 0, n_sat = 0;

  logic clk = 1'b0;
  logic rst_n;
  core_op_e op;
  logic shift_x;
  logic [1:0] upd_mask;
  logic signed [7:0] x_in, phi, y, w0, w1, x0, x1;
  logic [10:0] alpha;

  core_logic #(.N(8), .K(6), .AW(11)) dut (
    .clk, .rst_n, .op, .shift_x, .upd_mask, .x_in, .phi,
    .y, .alpha, .w0, .w1, .x0, .x1);

  always #5 clk = ~clk;

  function automatic int fdiv(input int a, input int b);
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction
  function automatic int sat8(input int v);
    return v > 127 ? 127 : (v < -128 ? -128 : v);
  endfunction

  int m_y, m_alpha, m_w0, m_w1, m_x0, m_x1;

  task automatic compare();
    checks++;
    if (int'(y) != m_y || int'(alpha) != m_alpha || int'(w0) != m_w0 ||
        int'(w1) != m_w1 || int'(x0) != m_x0 || int'(x1) != m_x1) begin
      failures++;
      if (failures < 10)
        $display("FAIL op=%s: y %0d/%0d alpha %0d/%0d w %0d,%0d/%0d,%0d x %0d,%0d/%0d,%0d",
                 op.name(), y, m_y, alpha, m_alpha, w0, w1, m_w0, m_w1, x0, x1, m_x0, m_x1);
    end
  endtask

  initial begin
    rst_n = 1'b0; op = CORE_IDLE; shift_x = 1'b0; upd_mask = 2'b00; x_in = '0; phi = '0;
    m_y = 0; m_alpha = 0; m_w0 = 0; m_w1 = 0; m_x0 = 0; m_x1 = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    compare();
    for (int k = 0; k < 3000; k++) begin
      int r, nw0, nw1;
      @(negedge clk);
      r = int'($urandom_range(0, 9));
      x_in = 8'($urandom);
      phi  = (k % 7 == 0) ? 8'sd127 : 8'($urandom);
      shift_x = 1'($urandom);
      upd_mask = 2'($urandom);
      op = (r < 3) ? CORE_FIR : (r < 5) ? CORE_POWER : (r < 9) ? CORE_UPD : CORE_IDLE;
      // model update
      unique case (op)
        CORE_FIR: begin
          n_fir++;
          m_y = sat8(fdiv(m_w0 * int'(x_in) + m_w1 * m_x0, 64));
          if (shift_x) begin m_x1 = m_x0; m_x0 = int'(x_in); end
        end
        CORE_POWER: begin
          n_pow++;
          m_alpha = fdiv(m_x0 * m_x0 + m_x1 * m_x1, 64);
        end
        CORE_UPD: begin
          n_upd++;
          nw0 = m_w0 + fdiv(int'(phi) * m_x0, 64);
          nw1 = m_w1 + fdiv(int'(phi) * m_x1, 64);
          if (upd_mask[0]) begin if (sat8(nw0) != nw0) n_sat++; m_w0 = sat8(nw0); end
          if (upd_mask[1]) begin if (sat8(nw1) != nw1) n_sat++; m_w1 = sat8(nw1); end
        end
        default: n_idle++;
      endcase
      @(posedge clk);
      #1 compare();
    end
    checks++;
    if (n_fir == 0 || n_pow == 0 || n_upd == 0 || n_idle == 0 || n_sat == 0) begin
      failures++;
      $display("FAIL coverage fir=%0d pow=%0d upd=%0d idle=%0d sat=%0d", n_fir, n_pow, n_upd, n_idle, n_sat);
    end
    $display("coverage fir=%0d pow=%0d upd=%0d idle=%0d sat=%0d", n_fir, n_pow, n_upd, n_idle, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
