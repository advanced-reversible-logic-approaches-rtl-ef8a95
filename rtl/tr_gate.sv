// TR gate (3x3 reversible gate).
//
// P = A, Q = A ^ B, R = (A & ~B) ^ C. Quantum cost 4.
// With C tied to 0 the gate is a one-bit comparator: R = A & ~B is
// "A greater than B" and Q = A ^ B is "A differs from B" (inverted by a
// NOT gate it becomes "A equals B"). The 2-bit comparator uses it that way.
// The R equation carries the inverted B of the usual TR gate definition;
// without it TR would be the same function as the Peres gate.
//
// Ports: a, b, c -> p, q, r. Purely combinational.
module tr_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & ~b) ^ c;
endmodule
