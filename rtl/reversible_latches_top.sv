// reversible_latches_top: the reversible latch set, side by side on one Delta clock.
//
// The latches are independent circuits; this top places one of each next to the others
// with its own ports, prefixed by the latch's name:
//   sr_*   SR latch without enable, two Peres gates, active-low inputs
//   gsr_*  gated SR latch, four Peres gates
//   d_*    D latch, Fredkin + Feynman, output Q
//   dqn_*  D latch, Fredkin + 2 Feynman, outputs Q and Q'
//   t_*    T latch, Peres + Feynman, output Q
//   tqn_*  T latch, Peres + 2 Feynman, outputs Q and Q'
//   jk_*   JK latch, NOT + 2 Fredkin + Feynman, output Q
//   jkqn_* JK latch, NOT + 2 Fredkin + 2 Feynman, outputs Q and Q'
//   tg_*   a stand-alone Toffoli gate (combinational), the one gate of the basic set
//          that none of these latches needs
// Every *_garbage port carries that latch's garbage outputs, the lines a reversible
// circuit must produce but does not use.
//
// Timing: clk ticks once per unit gate delay (Delta). Each gate inside a latch delays its
// outputs by its logic depth in clk periods (Feynman 1, Peres 4, Fredkin 5, NOT 1), so
// the latches' loops behave as rings and their delays are those of the gate chains.
// The gate depths are the defaults of rev_pkg and are not overridden here.
module reversible_latches_top (
  input  logic       clk,

  input  logic       sr_s_n,
  input  logic       sr_r_n,
  output logic       sr_q,
  output logic       sr_q_n,
  output logic [1:0] sr_garbage,

  input  logic       gsr_e,
  input  logic       gsr_s,
  input  logic       gsr_r,
  output logic       gsr_q,
  output logic       gsr_q_n,
  output logic [4:0] gsr_garbage,

  input  logic       d_e,
  input  logic       d_d,
  output logic       d_q,
  output logic [1:0] d_garbage,

  input  logic       dqn_e,
  input  logic       dqn_d,
  output logic       dqn_q,
  output logic       dqn_q_n,
  output logic [1:0] dqn_garbage,

  input  logic       t_e,
  input  logic       t_t,
  output logic       t_q,
  output logic [1:0] t_garbage,

  input  logic       tqn_e,
  input  logic       tqn_t,
  output logic       tqn_q,
  output logic       tqn_q_n,
  output logic [1:0] tqn_garbage,

  input  logic       jk_e,
  input  logic       jk_j,
  input  logic       jk_k,
  output logic       jk_q,
  output logic [2:0] jk_garbage,

  input  logic       jkqn_e,
  input  logic       jkqn_j,
  input  logic       jkqn_k,
  output logic       jkqn_q,
  output logic       jkqn_q_n,
  output logic [2:0] jkqn_garbage,

  input  logic       tg_a,
  input  logic       tg_b,
  input  logic       tg_c,
  output logic       tg_p,
  output logic       tg_q,
  output logic       tg_r
);

  sr_latch u_sr (
    .clk, .s_n(sr_s_n), .r_n(sr_r_n), .q(sr_q), .q_n(sr_q_n), .garbage(sr_garbage));

  gated_sr_latch u_gsr (
    .clk, .e(gsr_e), .s(gsr_s), .r(gsr_r), .q(gsr_q), .q_n(gsr_q_n), .garbage(gsr_garbage));

  d_latch u_d (
    .clk, .e(d_e), .d(d_d), .q(d_q), .garbage(d_garbage));

  d_latch_qn u_dqn (
    .clk, .e(dqn_e), .d(dqn_d), .q(dqn_q), .q_n(dqn_q_n), .garbage(dqn_garbage));

  t_latch u_t (
    .clk, .e(t_e), .t(t_t), .q(t_q), .garbage(t_garbage));

  t_latch_qn u_tqn (
    .clk, .e(tqn_e), .t(tqn_t), .q(tqn_q), .q_n(tqn_q_n), .garbage(tqn_garbage));

  jk_latch u_jk (
    .clk, .e(jk_e), .j(jk_j), .k(jk_k), .q(jk_q), .garbage(jk_garbage));

  jk_latch_qn u_jkqn (
    .clk, .e(jkqn_e), .j(jkqn_j), .k(jkqn_k), .q(jkqn_q), .q_n(jkqn_q_n),
    .garbage(jkqn_garbage));

  toffoli_gate u_tg (.a(tg_a), .b(tg_b), .c(tg_c), .p(tg_p), .q(tg_q), .r(tg_r));

endmodule
