// tb_rev_full_adder: checks the reversible full adder against its truth table.
//
// All eight input combinations are applied; P, Q, R and S are compared with a
// truth table written out literally below (P = A, Q = A xor B,
// R = A xor B xor C, S = (A xor B)C xor AB), and R/S are additionally
// checked to be the sum and carry of A + B + C.
module tb_rev_full_adder;
  int checks = 0;
  int failures = 0;

  logic a, b, c, p, q, r, s;

  rev_full_adder dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r), .s(s));

  // Rows indexed by {A,B,C}: expected {P,Q,R,S}.
  logic [3:0] table_pqrs [8] = '{4'b0000, 4'b0010, 4'b0110, 4'b0101,
                                 4'b1110, 4'b1101, 4'b1001, 4'b1011};

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({p, q, r, s} !== table_pqrs[v]) begin
        failures++;
        $display("FAIL abc=%03b: PQRS=%04b expected %04b", v[2:0], {p, q, r, s}, table_pqrs[v]);
      end
      checks++;
      if (2'({s, r}) != 2'(32'(a) + 32'(b) + 32'(c))) begin
        failures++;
        $display("FAIL abc=%03b: carry/sum %0d%0d", v[2:0], s, r);
      end
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
