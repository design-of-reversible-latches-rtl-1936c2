// toffoli_gate: the 3x3 Toffoli gate, (A, B, C) -> (P = A, Q = B, R = A.B xor C).
//
// Built as its quantum cascade of five primitives, each acting on one pair of lines
// (quantum cost 5, logic depth 5, so delay 5 Delta):
//   1. controlled-V,  control A, target C
//   2. CNOT,          control B, target A    (line A now holds A xor B)
//   3. controlled-V,  control B, target C
//   4. controlled-V+, control A (= A xor B), target C
//   5. CNOT,          control B, target A    (restores A)
// Line C is turned by A + B - (A xor B) = 2AB quarter turns, i.e. inverted exactly when
// A = B = 1. Lines are evaluated in the four-valued algebra of rev_pkg.
//
// Purely combinational; in this design the gate is not used by any latch and stands
// on its own in the top level.
module toffoli_gate
  import rev_pkg::*;
(
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  qline_t la, lb, lc;

  always_comb begin
    la = q_from_bit(a);
    lb = q_from_bit(b);
    lc = q_from_bit(c);
    lc = q_cv (la, lc);  // 1
    la = q_cnot(lb, la); // 2
    lc = q_cv (lb, lc);  // 3
    lc = q_cvp(la, lc);  // 4
    la = q_cnot(lb, la); // 5
    p = q_to_bit(la);
    q = q_to_bit(lb);
    r = q_to_bit(lc);
  end

  // The cascade must leave every line in a binary state.
  always_comb assert (q_is_binary(la) && q_is_binary(lb) && q_is_binary(lc))
    else $error("toffoli_gate: non-binary output line");

endmodule
