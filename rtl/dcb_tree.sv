// Balanced tree of decision blocks.
//
// Reduces LEAVES sub-comparisons to one. leaf[j] is the (greater, equal)
// result for the j-th slice, j = 0 being the least significant. The tree
// is a binary heap of LEAVES-1 decision blocks: node n has children 2n+1
// (more significant, fed to the block's X side) and 2n+2 (less significant,
// Y side); the leaves occupy heap positions LEAVES-1 .. 2*LEAVES-2 with the
// most significant slice leftmost. For LEAVES = 8 this is the 7-block,
// 3-level tree of the 16-bit comparator; for 16 the 15-block, 4-level tree
// of the 32-bit one. LEAVES must be a power of two.
//
// Ports: leaf[LEAVES] -> root (cmp_t). Purely combinational, log2(LEAVES)
// decision blocks deep.
module dcb_tree
  import rev_cmp_pkg::*;
#(
  parameter int unsigned LEAVES = 8
) (
  input  cmp_t leaf [LEAVES],
  output cmp_t root
);

  localparam int unsigned NODES = 2 * LEAVES - 1;

  cmp_t node [NODES];

  initial begin
    assert (LEAVES >= 2 && (LEAVES & (LEAVES - 1)) == 0)
      else $error("dcb_tree: LEAVES (%0d) must be a power of two, at least 2", LEAVES);
  end

  for (genvar j = 0; j < LEAVES; j++) begin : g_leaf
    assign node[NODES - 1 - j] = leaf[j];
  end

  for (genvar n = 0; n < LEAVES - 1; n++) begin : g_node
    logic [4:0] garbage;
    decision_block u_dcb (
      .x       (node[2*n + 1]),
      .y       (node[2*n + 2]),
      .z       (node[n]),
      .garbage (garbage)
    );
  end

  assign root = node[0];

endmodule
