// jk_latch: reversible JK latch, Q+ = (J.Q' + K'.Q).E + E'.Q, with output Q.
//
// A first Fredkin gate takes the fed-back Q on its select input A, J on B and K' on C
// (K passes a NOT gate first), so its Q output is Q'.J + Q.K'. That value is the D
// input of the Fredkin/Feynman D latch (see d_latch): the second Fredkin gate selects it
// when E is high and the recirculated Q when E is low, and a Feynman gate with its
// second input tied to 0 copies the result. One copy returns to the second Fredkin
// gate's C input, the other to the first Fredkin gate's A input; the first gate passes
// that line through unchanged on its P output, which is the latch's Q output.
// Garbage outputs: first Fredkin R, second Fredkin P (= E) and Q.
// Quantum cost 1 + 5 + 5 + 1 = 12; the NOT-Fredkin-Fredkin-Feynman chain is 12 Delta deep.
//
// Timing model: every gate output is delayed by the gate's depth (gate_delay), one clk
// period per Delta. Measured at the q port, which sits behind the first Fredkin gate's
// pass-through, a change needs F_DELAY more: K to q is NOT_DELAY + 3*F_DELAY + FG_DELAY
// periods (17), J to q 16, E to q 11. The hold loop (second Fredkin plus Feynman) is a
// ring of F_DELAY + FG_DELAY = 6 stages: an enable pulse must last at least that long.
// For J = K = 1 (toggle) the new value comes back round to the second Fredkin gate's
// B input 2*F_DELAY + FG_DELAY = 11 periods after the pulse starts, so a pulse of 6 to
// 11 periods toggles Q exactly once; a longer one toggles again (race-around).
// No reset: the stored value is arbitrary until the first set or reset.
module jk_latch
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
  output logic [2:0] garbage
);

  localparam int unsigned QUANTUM_COST = NOT_QC + 2 * F_QC + FG_QC;
  localparam int unsigned DELAY        = NOT_DELAY + 2 * F_DELAY + FG_DELAY;

  logic k_n_d;
  logic f1_p, f1_q, f1_r, f1_q_d, f1_r_d;
  logic f2_p, f2_q, f2_r, f2_p_d, f2_q_d, f2_r_d;
  logic fg_p, fg_q, q_loop, q_fb;

  // K enters in complement form through a NOT gate.
  gate_delay #(.W(1), .DEPTH(NOT_DELAY)) u_not_dly (.clk, .d(~k), .q(k_n_d));

  // Next-state function J.Q' + K'.Q
  fredkin_gate u_f1 (.a(q_loop), .b(j), .c(k_n_d), .p(f1_p), .q(f1_q), .r(f1_r));
  gate_delay #(.W(3), .DEPTH(F_DELAY)) u_f1_dly (
    .clk, .d({f1_p, f1_q, f1_r}), .q({q, f1_q_d, f1_r_d}));

  // D latch: select next state or hold
  fredkin_gate u_f2 (.a(e), .b(f1_q_d), .c(q_fb), .p(f2_p), .q(f2_q), .r(f2_r));
  gate_delay #(.W(3), .DEPTH(F_DELAY)) u_f2_dly (
    .clk, .d({f2_p, f2_q, f2_r}), .q({f2_p_d, f2_q_d, f2_r_d}));

  feynman_gate u_fg (.a(f2_r_d), .b(1'b0), .p(fg_p), .q(fg_q));
  gate_delay #(.W(2), .DEPTH(FG_DELAY)) u_fg_dly (
    .clk, .d({fg_p, fg_q}), .q({q_loop, q_fb}));

  assign garbage = {f1_r_d, f2_p_d, f2_q_d};

endmodule
