// gate_delay: a W-bit delay of DEPTH clock periods.
//
// The reversible gates are written as zero-delay logic. Each gate instance in a latch
// passes all of its outputs through one gate_delay whose DEPTH is the gate's logic depth,
// so a signal needs as many clock periods (Delta) to cross a gate as the gate has time
// steps in its quantum cascade. This is what makes the feedback loops of the latches
// well defined: a loop of total depth L behaves as an L-stage ring.
//
// Interface: d is sampled on every rising edge of clk; q shows it DEPTH edges later.
// No reset port: the stages start at 0, so every line of a latch powers up at 0 (an
// initial value, as FPGA flip-flops support). This gives each latch a defined start
// state; the T latch in particular has no input that could clear a ring of arbitrary
// contents, since it can only invert what circulates. Lint notes that the stages have
// both an initial value and clocked assignments; that combination is intended here.
module gate_delay #(
  parameter int unsigned W     = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (DEPTH < 1) begin : g_bad_depth
    $error("gate_delay: DEPTH must be at least 1");
  end

  logic [W-1:0] stage [DEPTH] = '{default: '0};

  always_ff @(posedge clk) begin
    stage[0] <= d;
    for (int unsigned i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
  end

  assign q = stage[DEPTH-1];

endmodule
