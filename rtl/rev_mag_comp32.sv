// 32-bit reversible magnitude comparator.
//
// Compares two unsigned 32-bit numbers and raises exactly one of agb
// (a > b), aeb (a == b) and alb (a < b). The structure is the published
// one: sixteen 2-bit comparators, fifteen decision blocks (four levels) and one BJN gate.
//   * Leaf k, a mag_comp2, compares bit pair a[2k+1:2k] with b[2k+1:2k] and
//     gives (greater, equal) for that pair.
//   * A tree of decision blocks merges neighbouring results, the more
//     significant one on each block's X side, up to one (greater, equal)
//     pair for the whole word.
//   * The BJN gate with C = 1 passes greater and equal through as agb and
//     aeb and makes alb = ~(agb | aeb).
// Every gate is reversible; the lines that carry no result (the operands'
// pass-through copies, the decision blocks' garbage lines) are left open.
// Which half feeds which side of a decision block, and the insides of the
// 2-bit leaf, are this design's choices (see decision_block, mag_comp2).
//
// Ports: a, b [31:0] -> agb, aeb, alb. Purely combinational: the
// critical path is one leaf plus log2(WIDTH/2) decision blocks and the BJN gate.
module rev_mag_comp32
  import rev_cmp_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic  agb,
  output logic  aeb,
  output logic  alb
);

  localparam int unsigned WIDTH = 32;
  localparam int unsigned PAIRS = WIDTH / 2;

  cmp_t pair_cmp [PAIRS];   // pair_cmp[k]: bits 2k+1:2k
  cmp_t word_cmp;

  for (genvar k = 0; k < PAIRS; k++) begin : g_pair
    mag_comp2 u_leaf (
      .a (a[2*k +: 2]),
      .b (b[2*k +: 2]),
      .r (pair_cmp[k])
    );
  end

  dcb_tree #(.LEAVES(PAIRS)) u_tree (
    .leaf (pair_cmp),
    .root (word_cmp)
  );

  bjn_gate u_bjn (
    .a (word_cmp.gt),
    .b (word_cmp.eq),
    .c (1'b1),
    .p (agb),
    .q (aeb),
    .r (alb)
  );

endmodule
