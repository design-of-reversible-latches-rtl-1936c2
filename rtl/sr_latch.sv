// sr_latch: reversible SR latch without enable, from two Peres gates.
//
// A Peres gate with its C input tied to 1 gives NAND(A, B) on its R output, so two of
// them make the classic cross-coupled NAND latch with active-low inputs S' and R'. The
// upper gate takes Q' on A and S' on B; its R output, NAND(Q', S'), is Q and drives the
// lower gate's A input. The lower gate takes R' on B; its R output, NAND(Q, R'), is Q'
// and drives the upper gate's A input. Each gate's pass-through P output carries the
// value on its A input: the lower gate's P is the Q output and the upper gate's P the Q'
// output, so neither signal is fanned out. The two Q outputs (A xor B) are garbage.
// Quantum cost 4 + 4 = 8, delay 8 Delta, 2 garbage outputs.
//
// Inputs: S' = 0 sets (Q = 1), R' = 0 resets, both 1 holds. Both 0 drives Q and Q' to 1,
// the forbidden input of any NAND latch.
//
// Timing model: every gate output is delayed by the gate's depth (gate_delay), one clk
// period per Delta. From a settled state, S' falling makes q rise after 2*PG_DELAY = 8
// periods and q_n fall after 12; R' likewise for q_n and q. An input pulse must last at
// least 2*PG_DELAY periods for the other side of the latch to answer before it ends.
// No reset: the state is arbitrary until the first set or reset.
module sr_latch
  import rev_pkg::*;
#(
  parameter int unsigned PG_DELAY = PG_DEPTH
) (
  input  logic       clk,
  input  logic       s_n,
  input  logic       r_n,
  output logic       q,
  output logic       q_n,
  output logic [1:0] garbage
);

  localparam int unsigned QUANTUM_COST = 2 * PG_QC;
  localparam int unsigned DELAY        = 2 * PG_DELAY;

  logic up_p, up_q, up_r, up_q_d, q_int;
  logic lo_p, lo_q, lo_r, lo_q_d, qn_int;

  peres_gate u_pg_up (.a(qn_int), .b(s_n), .c(1'b1), .p(up_p), .q(up_q), .r(up_r));
  gate_delay #(.W(3), .DEPTH(PG_DELAY)) u_up_dly (
    .clk, .d({up_p, up_q, up_r}), .q({q_n, up_q_d, q_int}));

  peres_gate u_pg_lo (.a(q_int), .b(r_n), .c(1'b1), .p(lo_p), .q(lo_q), .r(lo_r));
  gate_delay #(.W(3), .DEPTH(PG_DELAY)) u_lo_dly (
    .clk, .d({lo_p, lo_q, lo_r}), .q({q, lo_q_d, qn_int}));

  assign garbage = {up_q_d, lo_q_d};

endmodule
