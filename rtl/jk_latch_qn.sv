// jk_latch_qn: reversible JK latch with Q and Q'.
//
// Same structure as jk_latch (NOT on K, a Fredkin gate forming J.Q' + K'.Q, a second
// Fredkin gate selecting it or the held value under E, a Feynman gate copying the
// result), plus a second Feynman gate with its second input tied to 1. The first Feynman
// gate's copies go back to the second Fredkin gate's C input and into the second Feynman
// gate; that gate's P output (Q) goes back to the first Fredkin gate's select input, and
// its Q output is Q'. The latch's Q output is the first Fredkin gate's pass-through P.
// Garbage outputs: first Fredkin R, second Fredkin P (= E) and Q.
// Quantum cost 1 + 5 + 5 + 1 + 1 = 13; delay from K to q_n 13 Delta.
//
// Timing model: every gate output is delayed by the gate's depth (gate_delay), one clk
// period per Delta. K to q_n is NOT_DELAY + 2*F_DELAY + 2*FG_DELAY = 13 periods, K to q
// 18 (the pass-through adds F_DELAY), J 12 and 17, E 7 and 12. The hold loop is
// F_DELAY + FG_DELAY = 6 stages, the minimum enable pulse. In toggle mode the new value
// returns to the second Fredkin gate after 2*F_DELAY + 2*FG_DELAY = 12 periods, so a
// pulse of 6 to 12 periods toggles exactly once.
// No reset: the stored value is arbitrary until the first set or reset.
module jk_latch_qn
  import rev_pkg::*;
#(
  parameter int unsigned F_DELAY   = F_DEPTH,
  parameter int unsigned FG_DELAY  = FG_DEPTH,
  parameter int unsigned NOT_DELAY = NOT_DEPTH
) (
  input  logic       clk,
  input  logic       e,
  input  logic       j,
  input  logic       k,
  output logic       q,
  output logic       q_n,
  output logic [2:0] garbage
);

  localparam int unsigned QUANTUM_COST = NOT_QC + 2 * F_QC + 2 * FG_QC;
  localparam int unsigned DELAY        = NOT_DELAY + 2 * F_DELAY + 2 * FG_DELAY;

  logic k_n_d;
  logic f1_p, f1_q, f1_r, f1_q_d, f1_r_d;
  logic f2_p, f2_q, f2_r, f2_p_d, f2_q_d, f2_r_d;
  logic fg1_p, fg1_q, fg1_p_d, q_fb;
  logic fg2_p, fg2_q, q_loop;

  gate_delay #(.W(1), .DEPTH(NOT_DELAY)) u_not_dly (.clk, .d(~k), .q(k_n_d));

  fredkin_gate u_f1 (.a(q_loop), .b(j), .c(k_n_d), .p(f1_p), .q(f1_q), .r(f1_r));
  gate_delay #(.W(3), .DEPTH(F_DELAY)) u_f1_dly (
    .clk, .d({f1_p, f1_q, f1_r}), .q({q, f1_q_d, f1_r_d}));

  fredkin_gate u_f2 (.a(e), .b(f1_q_d), .c(q_fb), .p(f2_p), .q(f2_q), .r(f2_r));
  gate_delay #(.W(3), .DEPTH(F_DELAY)) u_f2_dly (
    .clk, .d({f2_p, f2_q, f2_r}), .q({f2_p_d, f2_q_d, f2_r_d}));

  feynman_gate u_fg1 (.a(f2_r_d), .b(1'b0), .p(fg1_p), .q(fg1_q));
  gate_delay #(.W(2), .DEPTH(FG_DELAY)) u_fg1_dly (
    .clk, .d({fg1_p, fg1_q}), .q({fg1_p_d, q_fb}));

  feynman_gate u_fg2 (.a(fg1_p_d), .b(1'b1), .p(fg2_p), .q(fg2_q));
  gate_delay #(.W(2), .DEPTH(FG_DELAY)) u_fg2_dly (
    .clk, .d({fg2_p, fg2_q}), .q({q_loop, q_n}));

  assign garbage = {f1_r_d, f2_p_d, f2_q_d};

endmodule
