// Feynman gate (FG, 2x2 controlled NOT).
//
// P = A, Q = A ^ B. A passes through unchanged and controls an XOR on B.
// With B tied to 0 it copies A, the usual way to fan a signal out in
// reversible logic. Quantum cost 1.
//
// The equations are the published definitions of the gate.
//
// Ports: a, b (A, B) -> p, q (P, Q). Purely combinational.
module fg_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
