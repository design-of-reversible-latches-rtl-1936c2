// gate_delay_tb: checks that gate_delay shows its input exactly DEPTH clock edges later,
// for a one-bit instance at depth 1 and an 8-bit instance at depth 5, against a record
// of the driven values kept in the testbench. Also checks the all-zero power-up value.
module gate_delay_tb;

  localparam int unsigned D_WIDE = 5;

  logic       clk = 1'b0;
  logic       d1, q1;
  logic [7:0] d8, q8;
  logic [7:0] hist8 [$];
  logic       hist1 [$];
  int checks = 0, failures = 0;

  gate_delay #(.W(1), .DEPTH(1))      dut1 (.clk, .d(d1), .q(q1));
  gate_delay #(.W(8), .DEPTH(D_WIDE)) dut8 (.clk, .d(d8), .q(q8));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d1 = 1'b0;
    d8 = '0;
    #1;
    checks++;
    if (q1 !== 1'b0 || q8 !== '0) begin
      failures++;
      $display("FAIL power-up value not zero");
    end
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      if (n >= D_WIDE) begin
        checks++;
        if (q8 !== hist8[n - D_WIDE]) begin
          failures++;
          $display("FAIL wide: cycle %0d got %h expected %h", n, q8, hist8[n - D_WIDE]);
        end
      end
      if (n >= 1) begin
        checks++;
        if (q1 !== hist1[n - 1]) begin
          failures++;
          $display("FAIL narrow: cycle %0d", n);
        end
      end
      d1 = 1'($urandom);
      d8 = 8'($urandom);
      hist1.push_back(d1);
      hist8.push_back(d8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
