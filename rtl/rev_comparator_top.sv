// Top level: reversible-logic magnitude comparators and their gate library.
//
// Four independent parts stand side by side, each with its own ports:
//   * the 16-bit reversible comparator (a16, b16 -> agb16, aeb16, alb16),
//   * the 32-bit reversible comparator (a32, b32 -> agb32, aeb32, alb32),
//   * the 4-bit sum-of-products comparator that introduces the problem
//     (a4, b4 -> agb4, aeb4, alb4; bit 0 of a4/b4 is the MSB),
//   * the Peres and Feynman gates of the reversible gate library, which
//     neither comparator uses (pg_in -> pg_out, fg_in -> fg_out; bus bit 2,
//     1, 0 = gate line A, B, C and P, Q, R respectively).
// The NOT, TR and BJN gates and the decision block are reached through the
// comparators. Everything is combinational: no clock, no reset, no latency.
module rev_comparator_top (
  input  logic [15:0] a16,
  input  logic [15:0] b16,
  output logic        agb16,
  output logic        aeb16,
  output logic        alb16,

  input  logic [31:0] a32,
  input  logic [31:0] b32,
  output logic        agb32,
  output logic        aeb32,
  output logic        alb32,

  input  logic [0:3]  a4,
  input  logic [0:3]  b4,
  output logic        agb4,
  output logic        aeb4,
  output logic        alb4,

  input  logic [2:0]  pg_in,
  output logic [2:0]  pg_out,
  input  logic [1:0]  fg_in,
  output logic [1:0]  fg_out
);

  rev_mag_comp16 u_cmp16 (.a(a16), .b(b16), .agb(agb16), .aeb(aeb16), .alb(alb16));

  rev_mag_comp32 u_cmp32 (.a(a32), .b(b32), .agb(agb32), .aeb(aeb32), .alb(alb32));

  mag_comp4 u_cmp4 (.a(a4), .b(b4), .agb(agb4), .aeb(aeb4), .alb(alb4));

  pg_gate u_pg (.a(pg_in[2]), .b(pg_in[1]), .c(pg_in[0]),
                .p(pg_out[2]), .q(pg_out[1]), .r(pg_out[0]));

  fg_gate u_fg (.a(fg_in[1]), .b(fg_in[0]), .p(fg_out[1]), .q(fg_out[0]));

endmodule
