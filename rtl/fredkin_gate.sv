// fredkin_gate: the 3x3 Fredkin (controlled-swap) gate,
// (A, B, C) -> (P = A, Q = A'.B + A.C, R = A.B + A'.C): B and C swap when A = 1.
//
// Built as its quantum cascade, grouped in five time steps (logic depth 5, delay
// 5 Delta). Steps 2 and 5 each pair a CNOT with a controlled-V on the same two lines;
// such a pair is one 2x2 gate of unit cost, so the quantum cost is 5 as well.
//   1. CNOT,          control A, target C
//   2. CNOT,          control B, target C;  then controlled-V+, control C, target B
//   3. CNOT,          control A, target C
//   4. controlled-V,  control A, target B
//   5. controlled-V,  control C, target B;  then CNOT, control B, target C
// With A in the select position it is a 2:1 multiplexer on R (A ? B : C), which is how
// the D latch uses it, and a conditional swap that keeps both data values.
//
// Purely combinational; the delay is added by the instantiating circuit (gate_delay).
module fredkin_gate
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
    lc = q_cnot(la, lc); // 1
    lc = q_cnot(lb, lc); // 2
    lb = q_cvp (lc, lb);
    lc = q_cnot(la, lc); // 3
    lb = q_cv  (la, lb); // 4
    lb = q_cv  (lc, lb); // 5
    lc = q_cnot(lb, lc);
    p = q_to_bit(la);
    q = q_to_bit(lb);
    r = q_to_bit(lc);
  end

  always_comb assert (q_is_binary(la) && q_is_binary(lb) && q_is_binary(lc))
    else $error("fredkin_gate: non-binary output line");

endmodule
