// gated_sr_latch: reversible gated SR latch, from four Peres gates.
//
// The conventional gated SR latch has four NAND gates: two gate S and R with the enable
// E, two form the cross-coupled storage pair. Each NAND is replaced by a Peres gate with
// its C input tied to 1 (R output = NAND(A, B)):
//   input gate S : A = E, B = S          R = NAND(E, S), P passes E on
//   input gate R : A = E (from the S gate's P output), B = R     R = NAND(E, R)
//   storage gate Q : A = Q', B = NAND(E, S)   R = Q,  P = Q' (output)
//   storage gate Q': A = Q,  B = NAND(E, R)   R = Q', P = Q  (output)
// E reaches the second input gate through the first gate's pass-through, since fan-out
// is not allowed. Garbage outputs: the Q output of every gate and the P output of the
// R input gate, five in all. Quantum cost 4 * 4 = 16, delay 12 Delta (three gates in
// series), 5 garbage outputs.
//
// Inputs are active high: with E = 1, S = 1 sets and R = 1 resets; E = 0 holds.
// S = R = 1 with E = 1 is the forbidden input (Q = Q' = 1).
//
// Timing model: every gate output is delayed by the gate's depth (gate_delay), one clk
// period per Delta. With E high and the latch settled, S rising makes q rise after
// 3*PG_DELAY = 12 periods and q_n fall after 16; R acts on q_n and q the same way.
// E reaches the R input gate PG_DELAY periods later than the S input gate.
// No reset: the state is arbitrary until the first set or reset.
module gated_sr_latch
  import rev_pkg::*;
#(
  parameter int unsigned PG_DELAY = PG_DEPTH
) (
  input  logic       clk,
  input  logic       e,
  input  logic       s,
  input  logic       r,
  output logic       q,
  output logic       q_n,
  output logic [4:0] garbage
);

  localparam int unsigned QUANTUM_COST = 4 * PG_QC;
  localparam int unsigned DELAY        = 3 * PG_DELAY;

  logic gs_p, gs_q, gs_r, e_d, gs_q_d, s_nand;
  logic gr_p, gr_q, gr_r, gr_p_d, gr_q_d, r_nand;
  logic sq_p, sq_q, sq_r, sq_q_d, q_int;
  logic sn_p, sn_q, sn_r, sn_q_d, qn_int;

  // Input gates: NAND(E, S) and NAND(E, R)
  peres_gate u_pg_s (.a(e), .b(s), .c(1'b1), .p(gs_p), .q(gs_q), .r(gs_r));
  gate_delay #(.W(3), .DEPTH(PG_DELAY)) u_s_dly (
    .clk, .d({gs_p, gs_q, gs_r}), .q({e_d, gs_q_d, s_nand}));

  peres_gate u_pg_r (.a(e_d), .b(r), .c(1'b1), .p(gr_p), .q(gr_q), .r(gr_r));
  gate_delay #(.W(3), .DEPTH(PG_DELAY)) u_r_dly (
    .clk, .d({gr_p, gr_q, gr_r}), .q({gr_p_d, gr_q_d, r_nand}));

  // Cross-coupled storage pair
  peres_gate u_pg_q (.a(qn_int), .b(s_nand), .c(1'b1), .p(sq_p), .q(sq_q), .r(sq_r));
  gate_delay #(.W(3), .DEPTH(PG_DELAY)) u_q_dly (
    .clk, .d({sq_p, sq_q, sq_r}), .q({q_n, sq_q_d, q_int}));

  peres_gate u_pg_qn (.a(q_int), .b(r_nand), .c(1'b1), .p(sn_p), .q(sn_q), .r(sn_r));
  gate_delay #(.W(3), .DEPTH(PG_DELAY)) u_qn_dly (
    .clk, .d({sn_p, sn_q, sn_r}), .q({q, sn_q_d, qn_int}));

  assign garbage = {gs_q_d, gr_p_d, gr_q_d, sq_q_d, sn_q_d};

endmodule
