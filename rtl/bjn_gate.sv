// BJN gate (3x3 reversible gate).
//
// P = A, Q = B, R = (A | B) ^ C. Quantum cost 5.
// It is the last gate of both comparators: with A = "greater", B = "equal"
// and C tied to 1 it passes those two lines through and produces
// R = ~(greater | equal) = "less than" on the third line.
//
// The equations are the published definitions of the gate.
//
// Ports: a, b, c -> p, q, r. Purely combinational.
module bjn_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a | b) ^ c;
endmodule
