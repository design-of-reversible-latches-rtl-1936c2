// feynman_gate: the 2x2 Feynman gate, also called controlled-NOT (CNOT).
//
// Mapping (A, B) -> (P = A, Q = A xor B). It is a single quantum primitive: quantum
// cost 1, delay 1 Delta. With B tied to 0 it copies A onto two lines, which is how the
// latches fan a signal out (plain fan-out is not reversible); with B tied to 1 it
// produces A and its complement.
//
// Purely combinational; the delay is added by the instantiating circuit (gate_delay).
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  always_comb begin
    p = a;
    q = a ^ b;
  end

endmodule
