// t_latch_tb: self-checking test of the Peres/Feynman T latch (output Q).
//
// One clock period per Delta; inputs change and outputs are checked on falling edges.
// The loop is LOOP = 5 periods deep (Peres 4 + Feynman 1). Checks: power-up value 0; an
// enable pulse of exactly LOOP periods with T = 1 toggles Q once, and Q changes exactly
// LOOP periods after E rises; pulses with T = 0, and T changes with E low, leave Q
// alone; with E and T held high Q toggles every LOOP periods (race-around); the garbage
// outputs (Peres P = E, Peres Q = E xor T) in steady state; random pulse sequences
// against a one-bit reference.
module t_latch_tb;

  localparam int LOOP = 5;

  logic       clk = 1'b0;
  logic       e, t, q;
  logic [1:0] garbage;
  logic       ref_q;
  int checks = 0, failures = 0;

  t_latch dut (.clk, .e, .t, .q, .garbage);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  // One enable pulse of exactly LOOP periods, then a settle time.
  task automatic pulse(input logic tv);
    t = tv; tick(1);
    e = 1'b1; tick(LOOP);
    e = 1'b0; tick(2 * LOOP);
    ref_q = ref_q ^ tv;
  endtask

  initial begin
    e = 1'b0; t = 1'b0; ref_q = 1'b0;
    tick(2 * LOOP);
    check(q, 1'b0, "power-up");
    check(garbage[1], 1'b0, "garbage P = E");
    check(garbage[0], 1'b0, "garbage Q = E xor T");

    // toggle and its delay
    t = 1'b1; tick(1);
    e = 1'b1;
    for (int k = 1; k <= LOOP; k++) begin
      tick(1);
      check(q, (k == LOOP), "E-to-Q delay");
    end
    check(garbage[1], 1'b1, "garbage P = E");
    check(garbage[0], 1'b0, "garbage Q = E xor T");
    e = 1'b0; ref_q = 1'b1;
    for (int k = 0; k < 3 * LOOP; k++) begin
      tick(1);
      check(q, ref_q, "after toggle");
    end

    // T = 0 pulse and T moving while E is low
    pulse(1'b0); check(q, ref_q, "pulse with T = 0");
    for (int k = 0; k < 20; k++) begin
      t = 1'($urandom);
      tick(1);
      check(q, ref_q, "hold with E low");
    end

    // race-around: E and T held high, Q toggles once per loop trip
    t = 1'b1; tick(1);
    e = 1'b1;
    tick(LOOP);
    for (int n = 1; n <= 4; n++) begin
      check(q, ref_q ^ 1'(n), "race-around");
      tick(LOOP);
    end
    e = 1'b0;
    tick(2 * LOOP);
    ref_q = q;

    // random pulse sequences
    for (int n = 0; n < 60; n++) begin
      pulse(1'($urandom));
      check(q, ref_q, "random pulse");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
