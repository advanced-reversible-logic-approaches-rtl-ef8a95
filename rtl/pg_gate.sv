// Peres gate (PG, 3x3 reversible gate).
//
// P = A, Q = A ^ B, R = (A & B) ^ C. Quantum cost 4. Part of the gate
// library of the design; neither comparator tree uses it, and the top
// level brings it out on ports of its own.
//
// The equations are the published definitions of the gate.
//
// Ports: a, b, c -> p, q, r. Purely combinational.
module pg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
