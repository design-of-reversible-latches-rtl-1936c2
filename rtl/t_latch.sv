// t_latch: reversible T latch, Q+ = (T.E) xor Q, from one Peres gate and one Feynman gate.
//
// The Peres gate takes E on A, T on B and the fed-back Q on C; its R output is
// E.T xor Q. A Feynman gate with its second input tied to 0 copies it onto the Q output
// and back to the Peres gate's C input. Peres outputs P (= E) and Q (= E xor T) are the
// two garbage outputs. Quantum cost 4 + 1 = 5, delay 4 + 1 = 5 Delta.
//
// Timing model: every gate output is delayed by the gate's depth (gate_delay), one clk
// period per Delta, so the loop is a ring of LOOP = PG_DELAY + FG_DELAY stages and a
// change appears on q LOOP periods after it is made. While E and T are both high each
// value in the ring is inverted once per trip round the loop: the latch toggles every
// LOOP periods for as long as E stays high (the race-around of any T latch). An enable
// pulse of exactly LOOP periods toggles Q once. With E or T low, q holds.
// No reset: the stored value is arbitrary until the latch is first set up.
module t_latch
  import rev_pkg::*;
#(
  parameter int unsigned PG_DELAY = PG_DEPTH,
  parameter int unsigned FG_DELAY = FG_DEPTH
) (
  input  logic       clk,
  input  logic       e,
  input  logic       t,
  output logic       q,
  output logic [1:0] garbage
);

  localparam int unsigned QUANTUM_COST = PG_QC + FG_QC;
  localparam int unsigned LOOP         = PG_DELAY + FG_DELAY;

  logic pg_p, pg_q, pg_r, pg_p_d, pg_q_d, pg_r_d;
  logic fg_p, fg_q, q_fb;

  peres_gate u_pg (.a(e), .b(t), .c(q_fb), .p(pg_p), .q(pg_q), .r(pg_r));
  gate_delay #(.W(3), .DEPTH(PG_DELAY)) u_pg_dly (
    .clk, .d({pg_p, pg_q, pg_r}), .q({pg_p_d, pg_q_d, pg_r_d}));

  feynman_gate u_fg (.a(pg_r_d), .b(1'b0), .p(fg_p), .q(fg_q));
  gate_delay #(.W(2), .DEPTH(FG_DELAY)) u_fg_dly (
    .clk, .d({fg_p, fg_q}), .q({q, q_fb}));

  assign garbage = {pg_p_d, pg_q_d};

endmodule
