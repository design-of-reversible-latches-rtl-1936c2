// peres_gate: the 3x3 Peres gate, (A, B, C) -> (P = A, Q = A xor B, R = A.B xor C).
//
// Built as its quantum cascade of four primitives (quantum cost 4, delay 4 Delta), the
// cheapest 3x3 gate of the set:
//   1. controlled-V+, control A, target C
//   2. controlled-V+, control B, target C
//   3. CNOT,          control A, target B    (line B now holds A xor B)
//   4. controlled-V,  control B (= A xor B), target C
// Line C is turned by (A xor B) - A - B = -2AB quarter turns: inverted when A = B = 1.
// With C tied to 1 the R output is NAND(A, B), which is how the SR latches use it.
//
// Purely combinational; the delay is added by the instantiating circuit (gate_delay).
module peres_gate
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
    lc = q_cvp(la, lc);  // 1
    lc = q_cvp(lb, lc);  // 2
    lb = q_cnot(la, lb); // 3
    lc = q_cv (lb, lc);  // 4
    p = q_to_bit(la);
    q = q_to_bit(lb);
    r = q_to_bit(lc);
  end

  always_comb assert (q_is_binary(la) && q_is_binary(lb) && q_is_binary(lc))
    else $error("peres_gate: non-binary output line");

endmodule
