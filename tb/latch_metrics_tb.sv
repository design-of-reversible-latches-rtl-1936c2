// latch_metrics_tb: reproduces the cost figures of the proposed latches on the full
// design at default gate depths: quantum cost, delay in Delta and garbage outputs.
//
//   latch            QC  delay  garbage   delay measured from -> to
//   SR, no enable     8     8      2      S' falling -> Q rising
//   gated SR         16    12      5      S rising (E high) -> Q rising
//   D                 6     6      2      D -> Q (E high)
//   D with Q'         7     7      2      D -> Q and Q' (E high)
//   T                 5     5      2      E rising (T high) -> Q
//   T with Q'         6     6      2      E rising (T high) -> Q and Q'
//   JK                12    12      3      K -> end of the NOT-Fredkin-Fredkin-Feynman
//                                          chain (the Feynman output fed back to Q)
//   JK with Q'        13    13      3      K -> Q'
// The quantum cost is read from each latch's QUANTUM_COST constant (the sum of its
// gates' costs), the garbage count from the width of its garbage port, and the delay is
// counted in clock periods (one per Delta) on the running circuit.
module latch_metrics_tb;

  logic       clk = 1'b0;
  logic       sr_s_n, sr_r_n, sr_q, sr_q_n;
  logic [1:0] sr_garbage;
  logic       gsr_e, gsr_s, gsr_r, gsr_q, gsr_q_n;
  logic [4:0] gsr_garbage;
  logic       d_e, d_d, d_q;
  logic [1:0] d_garbage;
  logic       dqn_e, dqn_d, dqn_q, dqn_q_n;
  logic [1:0] dqn_garbage;
  logic       t_e, t_t, t_q;
  logic [1:0] t_garbage;
  logic       tqn_e, tqn_t, tqn_q, tqn_q_n;
  logic [1:0] tqn_garbage;
  logic       jk_e, jk_j, jk_k, jk_q;
  logic [2:0] jk_garbage;
  logic       jkqn_e, jkqn_j, jkqn_k, jkqn_q, jkqn_q_n;
  logic [2:0] jkqn_garbage;
  logic       tg_a, tg_b, tg_c, tg_p, tg_q, tg_r;

  int checks = 0, failures = 0;

  reversible_latches_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_int(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d, expected %0d", what, got, exp);
    end
    else $display("%-28s %0d", what, got);
  endtask

  task automatic tick(input int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic cycles_until(ref logic out, input logic v, output int n);
    n = 0;
    while (out !== v && n <= 100) begin
      tick(1);
      n++;
    end
  endtask

  initial begin
    sr_s_n = 1; sr_r_n = 1;
    gsr_e = 0; gsr_s = 0; gsr_r = 0;
    d_e = 0; d_d = 0; dqn_e = 0; dqn_d = 0;
    t_e = 0; t_t = 0; tqn_e = 0; tqn_t = 0;
    jk_e = 0; jk_j = 0; jk_k = 0; jkqn_e = 0; jkqn_j = 0; jkqn_k = 0;
    tg_a = 0; tg_b = 0; tg_c = 0;

    expect_int(dut.u_sr.QUANTUM_COST,   8,  "SR quantum cost");
    expect_int(dut.u_gsr.QUANTUM_COST,  16, "gated SR quantum cost");
    expect_int(dut.u_d.QUANTUM_COST,    6,  "D quantum cost");
    expect_int(dut.u_dqn.QUANTUM_COST,  7,  "D/Q' quantum cost");
    expect_int(dut.u_t.QUANTUM_COST,    5,  "T quantum cost");
    expect_int(dut.u_tqn.QUANTUM_COST,  6,  "T/Q' quantum cost");
    expect_int(dut.u_jk.QUANTUM_COST,   12, "JK quantum cost");
    expect_int(dut.u_jkqn.QUANTUM_COST, 13, "JK/Q' quantum cost");

    expect_int($bits(sr_garbage),   2, "SR garbage outputs");
    expect_int($bits(gsr_garbage),  5, "gated SR garbage outputs");
    expect_int($bits(d_garbage),    2, "D garbage outputs");
    expect_int($bits(dqn_garbage),  2, "D/Q' garbage outputs");
    expect_int($bits(t_garbage),    2, "T garbage outputs");
    expect_int($bits(tqn_garbage),  2, "T/Q' garbage outputs");
    expect_int($bits(jk_garbage),   3, "JK garbage outputs");
    expect_int($bits(jkqn_garbage), 3, "JK/Q' garbage outputs");

    // Settle every latch in the 0 state with its enable high where it has one.
    sr_r_n = 0; tick(20); sr_r_n = 1;
    gsr_r = 1; tick(1); gsr_e = 1; tick(20); gsr_r = 0;
    d_e = 1; dqn_e = 1;
    jk_k = 1; jkqn_k = 1; tick(8); jk_e = 1; jkqn_e = 1; tick(30);
    jk_k = 0; jkqn_k = 0; jk_j = 1; jkqn_j = 1; tick(40);  // now set: Q = 1
    jk_j = 0; jkqn_j = 0; tick(40);
    tick(40);

    fork
      begin int c; sr_s_n = 0; cycles_until(sr_q, 1'b1, c); expect_int(c, 8, "SR delay"); end
      begin int c; gsr_s = 1; cycles_until(gsr_q, 1'b1, c); expect_int(c, 12, "gated SR delay"); end
      begin int c; d_d = 1; cycles_until(d_q, 1'b1, c); expect_int(c, 6, "D delay"); end
      begin
        int m;
        dqn_d = 1;
        fork
          begin int c; cycles_until(dqn_q, 1'b1, c); expect_int(c, 7, "D/Q' delay to Q"); end
          begin cycles_until(dqn_q_n, 1'b0, m); expect_int(m, 7, "D/Q' delay to Q'"); end
        join
      end
      begin
        logic q0;
        int   c;
        t_t = 1; tick(1); q0 = t_q; t_e = 1;
        cycles_until(t_q, ~q0, c); expect_int(c, 5, "T delay");
        t_e = 0;
      end
      begin
        logic q0;
        int   nt;
        tqn_t = 1; tick(1); q0 = tqn_q; tqn_e = 1;
        nt = 0;
        repeat (5) begin
          tick(1);
          nt++;
          if (tqn_q != q0) break;
        end
        tqn_e = 0;  // exactly one loop trip: one toggle
        if (tqn_q == q0) begin
          tick(1);
          nt++;
        end
        expect_int((tqn_q == ~q0 && tqn_q_n == q0) ? nt : 0, 6, "T/Q' delay");
      end
      begin int c; jk_k = 1; cycles_until(dut.u_jk.q_loop, 1'b0, c); expect_int(c, 12, "JK delay"); end
      begin int c; jkqn_k = 1; cycles_until(jkqn_q_n, 1'b1, c); expect_int(c, 13, "JK/Q' delay"); end
    join

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
