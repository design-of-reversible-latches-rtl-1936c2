// feynman_gate_tb: exhaustive check of feynman_gate (P = A, Q = A xor B), including the
// two uses the latches make of it: copying (B = 0) and complementing (B = 1).
module feynman_gate_tb;

  logic a, b, p, q;
  int checks = 0, failures = 0;

  feynman_gate dut (.a, .b, .p, .q);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: in=%b%b got %b expected %b", what, a, b, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      check(p, a, "P");
      check(q, (a && !b) || (!a && b), "Q");
      if (!b) check(q, a, "copy");
      else    check(q, !a, "complement");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
