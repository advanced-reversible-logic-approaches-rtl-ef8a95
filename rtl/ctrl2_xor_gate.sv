// Two-control XOR stage (3x3 reversible gate).
//
// P = A, Q = B, R = (A & B) ^ C: the two control lines pass unchanged and
// their AND is XORed onto the target line. This is the stage drawn three
// times in the decision block (two control dots and one XOR target on a
// constant line). Helper of decision_block.
//
// Ports: a, b (controls), c (target) -> p, q, r. Purely combinational.
module ctrl2_xor_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
