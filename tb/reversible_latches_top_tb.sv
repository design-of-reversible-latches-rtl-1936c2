// reversible_latches_top_tb: end-to-end test of the whole latch set at default gate
// depths (no parameters overridden).
//
// One clock period per Delta; inputs change and outputs are checked on falling edges.
// Each latch is taken through its operations in turn while the others sit idle:
//   SR (no enable)  set, reset, hold, forbidden input, 8-period delay
//   gated SR        set, reset, hold with E low, 12-period delay
//   D / D with Q'   write 0 and 1, hold, 6- and 7-period delays
//   T / T with Q'   toggle with a 5-period pulse, no-op pulse, race-around, 5/6 delays
//   JK / JK with Q' set, reset, toggle, hold, delay from K (Q' of the second: 13)
//   Toffoli gate    all eight input vectors
// Expected values come from each latch's characteristic equation, written out below.
// Every mechanism is counted; one that never happened counts as a failure.
module reversible_latches_top_tb;

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
  int n_set = 0, n_reset = 0, n_hold = 0, n_toggle = 0, n_race = 0;
  int n_forbidden = 0, n_delay = 0, n_gate = 0;

  reversible_latches_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic tick(input int n);
    repeat (n) @(negedge clk);
  endtask

  // Cycles until out first equals v, or limit+1 if it never does.
  task automatic cycles_until(ref logic out, input logic v, input int limit, output int n);
    n = 0;
    while (out !== v && n <= limit) begin
      tick(1);
      n++;
    end
  endtask

  initial begin
    int n;
    sr_s_n = 1; sr_r_n = 1;
    gsr_e = 0; gsr_s = 0; gsr_r = 0;
    d_e = 0; d_d = 0; dqn_e = 0; dqn_d = 0;
    t_e = 0; t_t = 0; tqn_e = 0; tqn_t = 0;
    jk_e = 0; jk_j = 0; jk_k = 0; jkqn_e = 0; jkqn_j = 0; jkqn_k = 0;
    tg_a = 0; tg_b = 0; tg_c = 0;
    tick(40);

    // ---------------- SR latch, no enable ----------------
    sr_r_n = 0; tick(16); sr_r_n = 1; tick(24);
    check(sr_q, 0, "SR reset Q"); check(sr_q_n, 1, "SR reset Q'"); n_reset++;
    sr_s_n = 0;
    cycles_until(sr_q, 1'b1, 40, n);
    checks++; if (n != 8) begin failures++; $display("FAIL SR set delay %0d", n); end
    n_delay++;
    tick(8); sr_s_n = 1; tick(24);
    check(sr_q, 1, "SR set Q"); check(sr_q_n, 0, "SR set Q'"); n_set++;
    tick(20); check(sr_q, 1, "SR hold"); n_hold++;
    sr_s_n = 0; sr_r_n = 0; tick(24);
    check(sr_q, 1, "SR forbidden Q"); check(sr_q_n, 1, "SR forbidden Q'"); n_forbidden++;
    sr_s_n = 1; tick(24); sr_r_n = 1; tick(24);
    check(sr_q, 0, "SR after forbidden");

    // ---------------- gated SR latch ----------------
    gsr_r = 1; tick(1); gsr_e = 1; tick(24); gsr_e = 0; tick(8); gsr_r = 0; tick(24);
    check(gsr_q, 0, "GSR reset"); check(gsr_q_n, 1, "GSR reset Q'"); n_reset++;
    gsr_s = 1; tick(16);
    check(gsr_q, 0, "GSR E low hold"); n_hold++;
    gsr_s = 0; tick(1);
    gsr_e = 1; tick(24);
    gsr_s = 1;
    cycles_until(gsr_q, 1'b1, 40, n);
    checks++; if (n != 12) begin failures++; $display("FAIL GSR set delay %0d", n); end
    n_delay++;
    tick(12); gsr_e = 0; tick(8); gsr_s = 0; tick(24);
    check(gsr_q, 1, "GSR set"); check(gsr_q_n, 0, "GSR set Q'"); n_set++;

    // ---------------- D latches ----------------
    for (int v = 0; v < 2; v++) begin
      d_d = 1'(v); dqn_d = 1'(v); d_e = 1; dqn_e = 1; tick(14);
      d_e = 0; dqn_e = 0; d_d = ~d_d; dqn_d = ~dqn_d; tick(14);
      check(d_q, 1'(v), "D write"); check(dqn_q, 1'(v), "DQ write");
      check(dqn_q_n, ~1'(v), "DQ write Q'");
      if (v == 1) n_set++; else n_reset++;
      n_hold++;
    end
    d_e = 1; dqn_e = 1; d_d = 1; dqn_d = 1; tick(14);
    d_d = 0; dqn_d = 0;
    begin
      int nd, ndq;
      fork
        cycles_until(d_q, 1'b0, 40, nd);
        cycles_until(dqn_q, 1'b0, 40, ndq);
      join
      checks += 2;
      if (nd != 6)  begin failures++; $display("FAIL D delay %0d", nd); end
      if (ndq != 7) begin failures++; $display("FAIL DQ delay %0d", ndq); end
      n_delay += 2;
    end
    tick(14); d_e = 0; dqn_e = 0; tick(14);

    // ---------------- T latches ----------------
    begin
      logic q0, q1;
      t_t = 1; tqn_t = 1; tick(1);
      q0 = t_q; q1 = tqn_q;
      t_e = 1; tqn_e = 1; tick(5); t_e = 0; tqn_e = 0; tick(12);
      check(t_q, ~q0, "T toggle"); check(tqn_q, ~q1, "TQ toggle");
      check(tqn_q_n, q1, "TQ toggle Q'"); n_toggle += 2;
      t_t = 0; tqn_t = 0; tick(1);
      t_e = 1; tqn_e = 1; tick(5); t_e = 0; tqn_e = 0; tick(12);
      check(t_q, ~q0, "T no-op"); check(tqn_q, ~q1, "TQ no-op"); n_hold += 2;
      // race-around: E held high for four loop trips
      t_t = 1; tick(1); q0 = t_q;
      t_e = 1;
      cycles_until(t_q, ~q0, 20, n);
      checks++; if (n != 5) begin failures++; $display("FAIL T delay %0d", n); end
      n_delay++;
      tick(5); check(t_q, q0, "T race-around 2");
      tick(5); check(t_q, ~q0, "T race-around 3");
      tick(5); check(t_q, q0, "T race-around 4");
      t_e = 0; t_t = 0; n_race++;
      tick(12); check(t_q, q0, "T after four toggles");
    end

    // ---------------- JK latches ----------------
    // set, reset, toggle, hold; J/K set up 8 periods ahead, 8-period enable pulses
    for (int op = 0; op < 4; op++) begin
      logic jv, kv, q_prev, exp_q;
      {jv, kv} = (op == 0) ? 2'b10 : (op == 1) ? 2'b01 : (op == 2) ? 2'b11 : 2'b00;
      q_prev = jk_q;
      exp_q = (jv & ~q_prev) | (~kv & q_prev);
      jk_j = jv; jk_k = kv; jkqn_j = jv; jkqn_k = kv; tick(8);
      jk_e = 1; jkqn_e = 1; tick(8); jk_e = 0; jkqn_e = 0; tick(40);
      check(jk_q, exp_q, "JK op"); check(jkqn_q, exp_q, "JKQ op");
      check(jkqn_q_n, ~exp_q, "JKQ op Q'");
      case (op)
        0: n_set++;
        1: n_reset++;
        2: n_toggle++;
        default: n_hold++;
      endcase
    end
    // delay from K to Q' of the Q/Q' JK latch (13 periods), E held high
    jkqn_j = 1; jkqn_k = 0; tick(8); jkqn_e = 1; tick(40);
    jkqn_j = 0; tick(40);
    jkqn_k = 1;
    cycles_until(jkqn_q_n, 1'b1, 40, n);
    checks++; if (n != 13) begin failures++; $display("FAIL JK K-to-Q' delay %0d", n); end
    n_delay++;
    tick(20); jkqn_e = 0; jkqn_k = 0; tick(40);
    check(jkqn_q, 0, "JKQ reset under E");

    // ---------------- Toffoli gate ----------------
    for (int v = 0; v < 8; v++) begin
      {tg_a, tg_b, tg_c} = 3'(v);
      tick(1);
      check(tg_p, tg_a, "TG P"); check(tg_q, tg_b, "TG Q");
      check(tg_r, (tg_a & tg_b) ^ tg_c, "TG R");
      n_gate++;
    end

    $display("COUNT set=%0d reset=%0d hold=%0d toggle=%0d race_around=%0d forbidden=%0d delay=%0d gate_vectors=%0d",
             n_set, n_reset, n_hold, n_toggle, n_race, n_forbidden, n_delay, n_gate);
    checks++;
    if (n_set == 0 || n_reset == 0 || n_hold == 0 || n_toggle == 0 || n_race == 0 ||
        n_forbidden == 0 || n_delay == 0 || n_gate == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
