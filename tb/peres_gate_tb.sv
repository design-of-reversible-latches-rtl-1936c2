// peres_gate_tb: exhaustive check of peres_gate against the gate's Boolean mapping.
//
// Peres: P = A, Q = A xor B, R = A.B xor C.
// All eight input vectors are applied; each output is compared with the mapping written
// out independently below. A second pass checks reversibility: the eight output vectors
// must all differ (the mapping is a permutation).
module peres_gate_tb;

  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  logic [7:0] seen;

  peres_gate dut (.a, .b, .c, .p, .q, .r);

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
      $display("FAIL %s: in=%b%b%b got %b expected %b", what, a, b, c, got, exp);
    end
  endtask

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      check(p, a, "P");
      check(q, a ^ b, "Q");
      check(r, (a & b) ^ c, "R");
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin
      failures++;
      $display("FAIL mapping is not one-to-one: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
