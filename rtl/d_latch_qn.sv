// d_latch_qn: reversible D latch with both Q and Q', from one Fredkin gate and two
// Feynman gates.
//
// As d_latch, the Fredkin gate forms E.D + E'.Q and a first Feynman gate (second input
// 0) copies it: one copy returns to the Fredkin gate's C input, the other enters a second
// Feynman gate whose second input is tied to 1, giving Q on its P output and Q' on its
// Q output. Garbage outputs: Fredkin P (= E) and Q. Quantum cost 5 + 1 + 1 = 7, delay
// 7 Delta, the same two garbage outputs as the single-output latch.
//
// Timing model: every gate output is delayed by the gate's depth (gate_delay), one clk
// period per Delta. A change on D with E high reaches q and q_n after
// F_DELAY + 2*FG_DELAY periods. The storage loop (Fredkin plus first Feynman gate) is a
// ring of F_DELAY + FG_DELAY stages, which is the minimum width of a write pulse on E.
// No reset: the stored value is arbitrary until the first write.
module d_latch_qn
  import rev_pkg::*;
#(
  parameter int unsigned F_DELAY  = F_DEPTH,
  parameter int unsigned FG_DELAY = FG_DEPTH
) (
  input  logic       clk,
  input  logic       e,
  input  logic       d,
  output logic       q,
  output logic       q_n,
  output logic [1:0] garbage
);

  localparam int unsigned QUANTUM_COST = F_QC + 2 * FG_QC;
  localparam int unsigned DELAY        = F_DELAY + 2 * FG_DELAY;

  logic f_p, f_q, f_r, f_p_d, f_q_d, f_r_d;
  logic fg1_p, fg1_q, fg1_p_d, q_fb;
  logic fg2_p, fg2_q;

  fredkin_gate u_f (.a(e), .b(d), .c(q_fb), .p(f_p), .q(f_q), .r(f_r));
  gate_delay #(.W(3), .DEPTH(F_DELAY)) u_f_dly (
    .clk, .d({f_p, f_q, f_r}), .q({f_p_d, f_q_d, f_r_d}));

  feynman_gate u_fg1 (.a(f_r_d), .b(1'b0), .p(fg1_p), .q(fg1_q));
  gate_delay #(.W(2), .DEPTH(FG_DELAY)) u_fg1_dly (
    .clk, .d({fg1_p, fg1_q}), .q({fg1_p_d, q_fb}));

  feynman_gate u_fg2 (.a(fg1_p_d), .b(1'b1), .p(fg2_p), .q(fg2_q));
  gate_delay #(.W(2), .DEPTH(FG_DELAY)) u_fg2_dly (
    .clk, .d({fg2_p, fg2_q}), .q({q, q_n}));

  assign garbage = {f_p_d, f_q_d};

endmodule
