// t_latch_qn: reversible T latch with Q and Q', from one Peres gate and two Feynman gates.
//
// As t_latch, the Peres gate forms E.T xor Q and a first Feynman gate (second input 0)
// copies it back into the loop and on to a second Feynman gate whose second input is
// tied to 1; that gate gives Q and Q'. Garbage outputs: Peres P (= E) and Q (= E xor T).
// Quantum cost 4 + 1 + 1 = 6, delay 6 Delta.
//
// Timing model: every gate output is delayed by the gate's depth (gate_delay), one clk
// period per Delta. The loop is a ring of LOOP = PG_DELAY + FG_DELAY stages; q and q_n
// follow the ring FG_DELAY periods later. With E and T high the latch toggles once per
// LOOP periods; an enable pulse of exactly LOOP periods toggles it once.
// No reset: the stored value is arbitrary until the latch is first set up.
module t_latch_qn
  import rev_pkg::*;
#(
  parameter int unsigned PG_DELAY = PG_DEPTH,
  parameter int unsigned FG_DELAY = FG_DEPTH
) (
  input  logic       clk,
  input  logic       e,
  input  logic       t,
  output logic       q,
  output logic       q_n,
  output logic [1:0] garbage
);

  localparam int unsigned QUANTUM_COST = PG_QC + 2 * FG_QC;
  localparam int unsigned LOOP         = PG_DELAY + FG_DELAY;

  logic pg_p, pg_q, pg_r, pg_p_d, pg_q_d, pg_r_d;
  logic fg1_p, fg1_q, fg1_p_d, q_fb;
  logic fg2_p, fg2_q;

  peres_gate u_pg (.a(e), .b(t), .c(q_fb), .p(pg_p), .q(pg_q), .r(pg_r));
  gate_delay #(.W(3), .DEPTH(PG_DELAY)) u_pg_dly (
    .clk, .d({pg_p, pg_q, pg_r}), .q({pg_p_d, pg_q_d, pg_r_d}));

  feynman_gate u_fg1 (.a(pg_r_d), .b(1'b0), .p(fg1_p), .q(fg1_q));
  gate_delay #(.W(2), .DEPTH(FG_DELAY)) u_fg1_dly (
    .clk, .d({fg1_p, fg1_q}), .q({fg1_p_d, q_fb}));

  feynman_gate u_fg2 (.a(fg1_p_d), .b(1'b1), .p(fg2_p), .q(fg2_q));
  gate_delay #(.W(2), .DEPTH(FG_DELAY)) u_fg2_dly (
    .clk, .d({fg2_p, fg2_q}), .q({q, q_n}));

  assign garbage = {pg_p_d, pg_q_d};

endmodule
