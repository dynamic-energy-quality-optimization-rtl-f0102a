// tb_rev_gates: exhaustive self-check of the reversible gates and of the
// Peres-gate half adder.
//
// Every input combination of the Feynman, Toffoli and Peres gates and of the
// half adder is applied, and each output is compared with the gate's
// defining equation. The gates are combinational; a 1 ns settling delay
// separates vectors. A watchdog ends the run with a failure if it stalls.
module tb_rev_gates;
  int checks = 0;
  int failures = 0;

  logic a, b, c;
  logic fg_p, fg_q;
  logic tg_p, tg_q, tg_r;
  logic pg_p, pg_q, pg_r;
  logic ha_s, ha_c;

  rev_feynman_gate dut_fg (.a(a), .b(b), .p(fg_p), .q(fg_q));
  rev_toffoli_gate dut_tg (.a(a), .b(b), .c(c), .p(tg_p), .q(tg_q), .r(tg_r));
  rev_peres_gate   dut_pg (.a(a), .b(b), .c(c), .p(pg_p), .q(pg_q), .r(pg_r));
  rev_half_adder   dut_ha (.a(a), .b(b), .sum(ha_s), .carry(ha_c));

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%0d b=%0d c=%0d: got %0d expected %0d", what, a, b, c, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      check("FG.P", fg_p, a);
      check("FG.Q", fg_q, a ^ b);
      check("TG.P", tg_p, a);
      check("TG.Q", tg_q, b);
      check("TG.R", tg_r, (a & b) ^ c);
      check("PG.P", pg_p, a);
      check("PG.Q", pg_q, a ^ b);
      check("PG.R", pg_r, (a & b) ^ c);
      check("HA.S", ha_s, 1'((32'(a) + 32'(b)) & 1));
      check("HA.C", ha_c, 1'((32'(a) + 32'(b)) >> 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
