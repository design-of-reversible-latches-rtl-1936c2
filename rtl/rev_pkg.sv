// rev_pkg: constants and helper functions shared by the reversible gates and latches.
//
// Cost model. Every reversible gate is decomposed into 1x1 and 2x2 quantum primitives
// (NOT, CNOT, controlled-V, controlled-V+), each of unit quantum cost and unit delay,
// written Delta. The quantum cost of a gate is the number of primitives; its delay is the
// logic depth of its cascade. The values below are the standard ones for these gates.
// In the RTL, one period of the latches' clock stands for one Delta.
//
// Quantum line algebra. Inside a cascade a line can carry |0>, |1>, or the two states
// V|0> and V|1> that a controlled-V leaves behind (V*V = NOT). These four values are
// encoded as a phase in quarter turns: 0 = |0>, 1 = V|0>, 2 = |1>, 3 = V|1>.
// V adds one quarter turn, V+ subtracts one, NOT adds two. A control line must carry a
// binary value (0 or 2); the cascades of the gates below only ever use binary controls,
// and every output they produce is binary again. The control functions therefore read
// only the upper bit of a control line; lint reports the lower bit as unused.
package rev_pkg;

  // Logic depth (delay in Delta) of each gate.
  localparam int unsigned NOT_DEPTH = 1;
  localparam int unsigned FG_DEPTH  = 1;  // Feynman (CNOT)
  localparam int unsigned PG_DEPTH  = 4;  // Peres
  localparam int unsigned TG_DEPTH  = 5;  // Toffoli
  localparam int unsigned F_DEPTH   = 5;  // Fredkin

  // Quantum cost of each gate.
  localparam int unsigned NOT_QC = 1;
  localparam int unsigned FG_QC  = 1;
  localparam int unsigned PG_QC  = 4;
  localparam int unsigned TG_QC  = 5;
  localparam int unsigned F_QC   = 5;

  // One quantum line: phase in quarter turns.
  typedef logic [1:0] qline_t;

  localparam qline_t QL_0  = 2'd0;  // |0>
  localparam qline_t QL_V0 = 2'd1;  // V|0>
  localparam qline_t QL_1  = 2'd2;  // |1>
  localparam qline_t QL_V1 = 2'd3;  // V|1>

  // Binary value onto a line.
  function automatic qline_t q_from_bit(input logic b);
    return b ? QL_1 : QL_0;
  endfunction

  // A line holds a binary value when its phase is even.
  function automatic logic q_is_binary(input qline_t x);
    return ~x[0];
  endfunction

  // Binary value read from a line (meaningful only when q_is_binary).
  function automatic logic q_to_bit(input qline_t x);
    return x[1];
  endfunction

  // CNOT: inverts the target when the control is |1>.
  function automatic qline_t q_cnot(input qline_t ctrl, input qline_t tgt);
    return tgt + (ctrl[1] ? 2'd2 : 2'd0);
  endfunction

  // Controlled-V: one quarter turn forward when the control is |1>.
  function automatic qline_t q_cv(input qline_t ctrl, input qline_t tgt);
    return tgt + {1'b0, ctrl[1]};
  endfunction

  // Controlled-V+: one quarter turn back when the control is |1>.
  function automatic qline_t q_cvp(input qline_t ctrl, input qline_t tgt);
    return tgt - {1'b0, ctrl[1]};
  endfunction

endpackage
