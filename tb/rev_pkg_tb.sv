// rev_pkg_tb: checks the quarter-turn quantum line algebra of rev_pkg on every line value:
// V followed by V gives NOT, V followed by V+ gives back the input, CNOT is its own
// inverse, nothing happens with the control at |0>, and the four values cycle
// |0> -> V|0> -> |1> -> V|1> under V. Also checks the binary test, the conversions and
// the cost and depth constants of the gate set.
module rev_pkg_tb;
  import rev_pkg::*;

  int checks = 0, failures = 0;

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    qline_t one, zero;
    one  = q_from_bit(1'b1);
    zero = q_from_bit(1'b0);
    check(int'(one), 2, "|1> encoding");
    check(int'(zero), 0, "|0> encoding");
    check(int'(q_cv(one, QL_0)), int'(QL_V0), "V|0>");
    check(int'(q_cv(one, QL_V0)), int'(QL_1), "V V|0> = |1>");
    check(int'(q_cv(one, QL_1)), int'(QL_V1), "V|1>");
    check(int'(q_cv(one, QL_V1)), int'(QL_0), "V V|1> = |0>");
    for (int v = 0; v < 4; v++) begin
      automatic qline_t x = qline_t'(v);
      check(int'(q_cv(one, q_cv(one, x))), int'(q_cnot(one, x)), "V.V = NOT");
      check(int'(q_cvp(one, q_cvp(one, x))), int'(q_cnot(one, x)), "V+.V+ = NOT");
      check(int'(q_cvp(one, q_cv(one, x))), v, "V+.V = identity");
      check(int'(q_cnot(one, q_cnot(one, x))), v, "CNOT self-inverse");
      check(int'(q_cv(zero, x)), v, "V with control 0");
      check(int'(q_cvp(zero, x)), v, "V+ with control 0");
      check(int'(q_cnot(zero, x)), v, "CNOT with control 0");
      check(int'(q_is_binary(x)), int'(v == 0 || v == 2), "binary test");
    end
    check(int'(q_to_bit(QL_1)), 1, "read |1>");
    check(int'(q_to_bit(QL_0)), 0, "read |0>");
    check(int'(FG_QC + PG_QC + F_QC + TG_QC), 15, "gate costs");
    check(int'(FG_DEPTH), 1, "Feynman depth");
    check(int'(PG_DEPTH), 4, "Peres depth");
    check(int'(F_DEPTH), 5, "Fredkin depth");
    check(int'(TG_DEPTH), 5, "Toffoli depth");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
