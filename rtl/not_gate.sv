// Reversible NOT gate (1x1).
//
// The simplest reversible gate: one line in, one line out, P = ~A. It is
// its own inverse and has zero quantum cost. In this design it turns the
// XOR output of a TR gate into an "equal" line and inverts the
// "greater" line of the more significant half inside a decision block.
//
// The equations are the published definitions of the gate.
//
// Ports: a (A) -> p (P). Purely combinational.
module not_gate (
  input  logic a,
  output logic p
);
  assign p = ~a;
endmodule
