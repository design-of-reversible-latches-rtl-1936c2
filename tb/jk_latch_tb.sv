// jk_latch_tb: self-checking test of the Fredkin/Feynman JK latch (output Q).
//
// One clock period per Delta; inputs change and outputs are checked on falling edges.
// J and K are set up SETUP periods before E rises (NOT 1 + Fredkin 5 must see them).
// Checks: set (J=1,K=0), reset (J=0,K=1), toggle (J=K=1) and hold (J=K=0) with enable
// pulses of 6 to 11 periods, the window in which a toggle happens exactly once; with E
// held high and the latch settled, Q rises exactly LAT_J periods after J and falls
// exactly LAT_K periods after K; J and K are ignored while E is low; the garbage outputs
// in steady state (first Fredkin R = Q.J + Q'.K', second Fredkin P = E and
// Q = E ? Q : J.Q' + K'.Q); random sequences against a reference JK model.
module jk_latch_tb;

  localparam int SETUP = 8;
  localparam int W_MIN = 6;   // hold loop: Fredkin 5 + Feynman 1
  localparam int W_MAX = 11;  // toggle returns after Fredkin 5 + Fredkin 5 + Feynman 1
  localparam int LAT_J = 16;
  localparam int LAT_K = 17;
  localparam int SETTLE = 2 * LAT_K;

  logic       clk = 1'b0;
  logic       e, j, k, q;
  logic [2:0] garbage;
  logic       ref_q;
  int checks = 0, failures = 0;
  int toggles = 0;

  jk_latch dut (.clk, .e, .j, .k, .q, .garbage);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
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

  task automatic check_state(input string what);
    check(q, ref_q, what);
    check(garbage[2], (q & j) | (~q & ~k), "garbage first Fredkin R");
    check(garbage[1], e, "garbage E");
    check(garbage[0], e ? q : ((~q & j) | (q & ~k)), "garbage second Fredkin Q");
  endtask

  task automatic op(input logic jv, input logic kv, input int w);
    j = jv; k = kv; tick(SETUP);
    e = 1'b1; tick(w);
    e = 1'b0; tick(SETTLE);
    case ({jv, kv})
      2'b10: ref_q = 1'b1;
      2'b01: ref_q = 1'b0;
      2'b11: begin ref_q = ~ref_q; toggles++; end
      default: ;
    endcase
  endtask

  initial begin
    e = 1'b0; j = 1'b0; k = 1'b0; ref_q = 1'b0;
    tick(SETTLE);
    check_state("power-up");

    op(1'b1, 1'b0, W_MIN); check_state("set");
    op(1'b0, 1'b1, W_MIN); check_state("reset");
    op(1'b1, 1'b1, W_MIN); check_state("toggle, shortest pulse");
    op(1'b1, 1'b1, W_MAX); check_state("toggle, longest pulse");
    op(1'b0, 1'b0, W_MAX); check_state("hold");
    j = 1'b1; k = 1'b1; tick(SETTLE); check_state("J=K=1 with E low");

    // delays with E held high
    op(1'b0, 1'b1, W_MIN);
    j = 1'b0; k = 1'b0; tick(SETUP);
    e = 1'b1; tick(SETTLE);
    check(q, 1'b0, "E high, hold");
    j = 1'b1;
    for (int n = 1; n <= LAT_J; n++) begin
      tick(1);
      check(q, n >= LAT_J, "J-to-Q delay");
    end
    j = 1'b0; tick(SETTLE);
    k = 1'b1;
    for (int n = 1; n <= LAT_K; n++) begin
      tick(1);
      check(q, n < LAT_K, "K-to-Q delay");
    end
    k = 1'b0; tick(SETTLE);
    e = 1'b0; tick(SETTLE); ref_q = 1'b0;
    check_state("after delays");

    // E low: J and K ignored
    for (int n = 0; n < 40; n++) begin
      j = 1'($urandom); k = 1'($urandom);
      tick(1);
      check(q, ref_q, "E low hold");
    end

    for (int n = 0; n < 60; n++) begin
      op(1'($urandom), 1'($urandom), int'($urandom_range(W_MIN, W_MAX)));
      check_state("random");
    end

    checks++;
    if (toggles == 0) begin
      failures++;
      $display("FAIL no toggle exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
