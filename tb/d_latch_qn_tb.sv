// d_latch_qn_tb: self-checking test of the D latch with outputs Q and Q'.
//
// Drives E and D on falling clock edges and checks on falling edges, one clock period
// per Delta. Checks: Q' is the complement of Q on every cycle after the first; writes of
// 0 and 1; the D-to-Q delay with E high, which must be exactly 7 periods (Fredkin 5 +
// two Feynman 1); hold while E is low and D changes; the
// garbage outputs in steady state (Fredkin P = E, Fredkin Q = E'.D + E.Q); random
// write/hold sequences against a one-bit reference; and a too-short enable pulse, which
// leaves a storage ring of 6 values of which exactly as many hold the new value as the pulse
// was long.
module d_latch_qn_tb;

  localparam int LAT  = 7;  // D to Q and Q': Fredkin 5 + two Feynman 1
  localparam int LOOP = 6;  // storage ring: Fredkin 5 + first Feynman 1

  logic       clk = 1'b0;
  logic       e, d, q, q_n;
  logic [1:0] garbage;
  logic       ref_q;
  int checks = 0, failures = 0;

  d_latch_qn dut (.clk, .e, .d, .q, .q_n, .garbage);

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

  // Q' must mirror Q once the second Feynman gate has produced its first output.
  initial begin : complement_check
    tick(2);
    forever begin
      tick(1);
      check(q_n, ~q, "Q' = not Q");
    end
  end

  task automatic tick(input int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic write(input logic v);
    e = 1'b1; d = v; tick(2 * LAT);
    e = 1'b0; tick(2 * LAT);
    ref_q = v;
  endtask

  initial begin
    e = 1'b0; d = 1'b0;
    tick(2 * LAT);
    check(q, 1'b0, "power-up");

    write(1'b1); check(q, 1'b1, "write 1");
    check(garbage[1], 1'b0, "garbage P = E");
    check(garbage[0], d, "garbage Q = D when E low");
    write(1'b0); check(q, 1'b0, "write 0");

    // transparent phase: delay from D to Q
    e = 1'b1; tick(2 * LAT);
    check(garbage[1], 1'b1, "garbage P = E");
    check(garbage[0], q, "garbage Q = Q when E high");
    d = 1'b1;
    for (int k = 1; k <= LAT; k++) begin
      tick(1);
      check(q, (k == LAT), "D-to-Q delay");
    end
    tick(2 * LAT);
    e = 1'b0; ref_q = 1'b1;

    // hold: D moves, Q must not
    for (int k = 0; k < 40; k++) begin
      d = 1'($urandom);
      tick(1);
      check(q, ref_q, "hold");
    end

    // random writes with pulses of at least the loop length
    for (int n = 0; n < 40; n++) begin
      automatic logic v = 1'($urandom);
      automatic int   w = LAT + int'($urandom_range(0, 2 * LAT));
      e = 1'b1; d = v; tick(w);
      e = 1'b0; ref_q = v;
      for (int k = 0; k < 3 * LAT; k++) begin
        d = 1'($urandom);
        tick(1);
        check(q, ref_q, "random write/hold");
      end
    end

    // enable pulse shorter than the loop: ring holds a mix
    write(1'b0);
    begin
      int ones;
      e = 1'b1; d = 1'b1; tick(3);
      e = 1'b0; d = 1'b0; tick(2 * LAT);
      ones = 0;
      for (int k = 0; k < LOOP; k++) begin
        tick(1);
        ones += int'(q);
      end
      checks++;
      if (ones != 3) begin
        failures++;
        $display("FAIL short pulse: %0d of %0d ring values set, expected 3", ones, LOOP);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
