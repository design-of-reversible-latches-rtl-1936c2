// d_latch: reversible D latch, Q+ = D.E + E'.Q, from one Fredkin gate and one Feynman gate.
//
// The Fredkin gate takes E on its select input A, D on B and the fed-back Q on C, so
// its R output is E.D + E'.Q. A Feynman gate with its second input tied to 0 copies that
// value onto two lines: one is the Q output, the other goes back to the Fredkin gate's
// C input (reversible logic allows no fan-out, so the copy needs a gate of its own).
// Fredkin outputs P (= E) and Q (= E'.D + E.Q) are the two garbage outputs.
// Quantum cost 5 + 1 = 6, delay 5 + 1 = 6 Delta.
//
// Timing model (a choice of this RTL, not of the circuit): every gate output is delayed
// by the gate's logic depth through gate_delay, one clk period per Delta. A change on D
// with E high reaches q after F_DELAY + FG_DELAY periods. The feedback loop is a ring of
// that length, so E must stay high for at least that many periods, with D steady, for
// every stage of the ring to take the new value. With E low the ring recirculates and
// q holds. There is no reset: the stored value is arbitrary until the first write.
module d_latch
  import rev_pkg::*;
#(
  parameter int unsigned F_DELAY  = F_DEPTH,
  parameter int unsigned FG_DELAY = FG_DEPTH
) (
  input  logic       clk,
  input  logic       e,
  input  logic       d,
  output logic       q,
  output logic [1:0] garbage
);

  localparam int unsigned QUANTUM_COST = F_QC + FG_QC;
  localparam int unsigned DELAY        = F_DELAY + FG_DELAY;

  logic f_p, f_q, f_r, f_p_d, f_q_d, f_r_d;
  logic fg_p, fg_q, fg_p_d, q_fb;

  fredkin_gate u_f (.a(e), .b(d), .c(q_fb), .p(f_p), .q(f_q), .r(f_r));
  gate_delay #(.W(3), .DEPTH(F_DELAY)) u_f_dly (
    .clk, .d({f_p, f_q, f_r}), .q({f_p_d, f_q_d, f_r_d}));

  feynman_gate u_fg (.a(f_r_d), .b(1'b0), .p(fg_p), .q(fg_q));
  gate_delay #(.W(2), .DEPTH(FG_DELAY)) u_fg_dly (
    .clk, .d({fg_p, fg_q}), .q({fg_p_d, q_fb}));

  assign q       = fg_p_d;
  assign garbage = {f_p_d, f_q_d};

endmodule
