// Decision block: merges two sub-comparisons into one.
//
// Given the (greater, equal) result x of the more significant half and y of
// the less significant half of a slice, it produces the result for the
// whole slice:
//   AEB = EX & EY
//   AGB = GX | (EX & GY)
// as a 7-line reversible circuit. Lines, top to bottom:
//   0: GY   1: EY   2: GX   3: EX   4: constant 0   5: constant 1   6: constant 1
// Stages, in order:
//   NOT on line 2                           -> ~GX
//   two-control XOR, controls 1,3, target 4 -> AEB = EY & EX
//   two-control XOR, controls 0,3, target 5 -> t = ~(GY & EX)
//   two-control XOR, controls 2,5, target 6 -> AGB = ~(~GX & t) = GX | (EX & GY)
// The gate arrangement and the constants follow the published circuit; that
// X must be the more significant half is what makes the result a correct
// comparison, and is how this design connects it. The other five lines
// (GY, EY, ~GX, EX, t) leave as garbage outputs.
//
// Ports: x, y (cmp_t) -> z (cmp_t: gt = AGB, eq = AEB), garbage[4:0] =
// {GY, EY, ~GX, EX, t}. Purely combinational.
module decision_block
  import rev_cmp_pkg::*;
(
  input  cmp_t       x,        // more significant half
  input  cmp_t       y,        // less significant half
  output cmp_t       z,
  output logic [4:0] garbage
);

  logic gx_n;          // line 2 after the NOT
  logic t_ngy;         // line 5 after its stage: ~(GY & EX)
  logic gy_o, ey_o, gx_o, ex_a, ex_b, ex_o, t_o;

  not_gate u_not (.a(x.gt), .p(gx_n));

  // AEB = EY & EX onto constant 0
  ctrl2_xor_gate u_eq (.a(y.eq), .b(x.eq), .c(1'b0), .p(ey_o), .q(ex_a), .r(z.eq));

  // ~(GY & EX) onto constant 1
  ctrl2_xor_gate u_gy (.a(y.gt), .b(ex_a), .c(1'b1), .p(gy_o), .q(ex_b), .r(t_ngy));

  // AGB = ~(~GX & ~(GY & EX)) onto constant 1
  ctrl2_xor_gate u_gt (.a(gx_n), .b(t_ngy), .c(1'b1), .p(gx_o), .q(t_o), .r(z.gt));

  assign ex_o    = ex_b;
  assign garbage = {gy_o, ey_o, gx_o, ex_o, t_o};

endmodule
