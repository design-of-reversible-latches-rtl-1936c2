// sr_latch_tb: self-checking test of the two-Peres-gate SR latch (active-low inputs).
//
// One clock period per Delta; inputs change and outputs are checked on falling edges.
// Checks: set (S' low) gives Q = 1, Q' = 0 and reset (R' low) the opposite; from a
// settled state the driven output changes exactly 8 periods after the input (two Peres
// gates) and the other output 12 periods after; both inputs high hold; both low give
// Q = Q' = 1; garbage outputs equal S' xor Q' and R' xor Q (the Peres Q outputs) in
// steady state; random set/reset/hold sequences against a reference.
module sr_latch_tb;

  localparam int LAT  = 8;
  localparam int LAT2 = 12;

  logic       clk = 1'b0;
  logic       s_n, r_n, q, q_n;
  logic [1:0] garbage;
  logic       ref_q;
  int checks = 0, failures = 0;

  sr_latch dut (.clk, .s_n, .r_n, .q, .q_n, .garbage);

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
    check(garbage[1], s_n ^ q_n, "garbage S' xor Q'");
    check(garbage[0], r_n ^ q, "garbage R' xor Q");
  endtask

  // Drive S'/R' low for a pulse of w periods, then return to hold and settle.
  task automatic op(input logic set, input int w);
    if (set) s_n = 1'b0; else r_n = 1'b0;
    tick(w);
    s_n = 1'b1; r_n = 1'b1;
    tick(3 * LAT);
    ref_q = set;
  endtask

  initial begin
    s_n = 1'b1; r_n = 1'b1;
    op(1'b0, 2 * LAT); check_state("reset");
    op(1'b1, 2 * LAT); check_state("set");
    op(1'b0, 2 * LAT); check_state("reset again");

    // delay of set: Q after 8, Q' after 12
    s_n = 1'b0;
    for (int k = 1; k <= LAT2; k++) begin
      tick(1);
      check(q, k >= LAT, "S'-to-Q delay");
      check(q_n, k < LAT2, "S'-to-Q' delay");
    end
    s_n = 1'b1; tick(3 * LAT); ref_q = 1'b1;
    check_state("after set");

    // delay of reset: Q' after 8, Q after 12
    r_n = 1'b0;
    for (int k = 1; k <= LAT2; k++) begin
      tick(1);
      check(q_n, k >= LAT, "R'-to-Q' delay");
      check(q, k < LAT2, "R'-to-Q delay");
    end
    r_n = 1'b1; tick(3 * LAT); ref_q = 1'b0;
    check_state("after reset");

    // hold
    for (int k = 0; k < 30; k++) begin
      tick(1);
      check(q, ref_q, "hold");
    end

    // forbidden input: both low drives both outputs high
    s_n = 1'b0; r_n = 1'b0; tick(3 * LAT);
    check(q, 1'b1, "S'=R'=0: Q");
    check(q_n, 1'b1, "S'=R'=0: Q'");
    s_n = 1'b1; tick(3 * LAT);  // leave through a defined set
    r_n = 1'b1; tick(3 * LAT); ref_q = 1'b0;
    check_state("leave forbidden state by releasing S' first");

    // random sequences, pulses at least 8 periods long
    for (int n = 0; n < 40; n++) begin
      op(1'($urandom), LAT + int'($urandom_range(0, LAT)));
      check_state("random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
