// gated_sr_latch_tb: self-checking test of the four-Peres-gate gated SR latch.
//
// One clock period per Delta; inputs change and outputs are checked on falling edges.
// Checks: set and reset under E; with E high and the latch settled, Q rises exactly 12
// periods after S (three Peres gates) and Q' falls 16 after, and R acts the same way on
// Q' and Q; with E low S and R do nothing; S = R = 1 under E gives Q = Q' = 1; garbage
// outputs in steady state (E xor S, E, E xor R, NAND(E,S) xor Q', NAND(E,R) xor Q);
// random sequences against a reference. S and R are set up one period before E rises
// and held for 2 * PG_DELAY periods after it falls, since E reaches the R input gate
// through the S input gate.
module gated_sr_latch_tb;

  localparam int PG   = 4;
  localparam int LAT  = 12;
  localparam int LAT2 = 16;

  logic       clk = 1'b0;
  logic       e, s, r, q, q_n;
  logic [4:0] garbage;
  logic       ref_q;
  int checks = 0, failures = 0;

  gated_sr_latch dut (.clk, .e, .s, .r, .q, .q_n, .garbage);

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

  task automatic check_state(input string what);
    check(q, ref_q, what);
    check(q_n, ~ref_q, what);
    check(garbage[4], e ^ s, "garbage E xor S");
    check(garbage[3], e, "garbage E");
    check(garbage[2], e ^ r, "garbage E xor R");
    check(garbage[1], ~(e & s) ^ q_n, "garbage NAND(E,S) xor Q'");
    check(garbage[0], ~(e & r) ^ q, "garbage NAND(E,R) xor Q");
  endtask

  task automatic op(input logic set, input int w);
    s = set; r = ~set; tick(1);
    e = 1'b1; tick(w);
    e = 1'b0; tick(2 * PG);
    s = 1'b0; r = 1'b0; tick(2 * LAT);
    ref_q = set;
  endtask

  initial begin
    e = 1'b0; s = 1'b0; r = 1'b0;
    op(1'b0, 2 * LAT); check_state("reset");
    op(1'b1, 2 * LAT); check_state("set");
    op(1'b0, 2 * LAT); check_state("reset again");

    // delays with E held high
    e = 1'b1; tick(2 * LAT);
    check_state("E high, hold");
    s = 1'b1;
    for (int k = 1; k <= LAT2; k++) begin
      tick(1);
      check(q, k >= LAT, "S-to-Q delay");
      check(q_n, k < LAT2, "S-to-Q' delay");
    end
    s = 1'b0; tick(2 * LAT); ref_q = 1'b1;
    r = 1'b1;
    for (int k = 1; k <= LAT2; k++) begin
      tick(1);
      check(q_n, k >= LAT, "R-to-Q' delay");
      check(q, k < LAT2, "R-to-Q delay");
    end
    r = 1'b0; tick(2 * LAT); ref_q = 1'b0;
    e = 1'b0; tick(2 * LAT);
    check_state("after delays");

    // E low: S and R are ignored
    for (int k = 0; k < 40; k++) begin
      s = 1'($urandom); r = 1'($urandom);
      tick(1);
      check(q, ref_q, "E low hold");
      check(q_n, ~ref_q, "E low hold");
    end
    s = 1'b0; r = 1'b0; tick(2 * LAT);

    // forbidden input under E
    s = 1'b1; r = 1'b1; tick(1);
    e = 1'b1; tick(3 * LAT);
    check(q, 1'b1, "S=R=1: Q");
    check(q_n, 1'b1, "S=R=1: Q'");
    e = 1'b0; s = 1'b0; r = 1'b0; tick(3 * LAT);
    op(1'b1, 2 * LAT); check_state("set after forbidden input");

    for (int n = 0; n < 40; n++) begin
      op(1'($urandom), LAT + int'($urandom_range(0, LAT)));
      check_state("random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
