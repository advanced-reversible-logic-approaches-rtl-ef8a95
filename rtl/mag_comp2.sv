// 2-bit magnitude comparator, the leaf of the comparator tree.
//
// Produces (greater, equal) for a[1:0] against b[1:0]. Each bit is compared
// by a TR gate with C = 0: R = a & ~b is "this bit of A is greater", and
// Q = a ^ b, inverted by a NOT gate, is "this bit is equal". One decision
// block then merges the two bit results, bit 1 being the more significant.
// The published design names this block without giving its insides; this
// construction, which keeps the leaf built from the same reversible gates
// as the rest of the tree, is this design's own.
//
// Ports: a[1:0], b[1:0] -> r (cmp_t). Purely combinational.
module mag_comp2
  import rev_cmp_pkg::*;
(
  input  logic [1:0] a,
  input  logic [1:0] b,
  output cmp_t       r
);

  cmp_t       bit_cmp [2];   // bit_cmp[i]: comparison of bit i
  logic [1:0] a_pass, diff;
  logic [4:0] dcb_garbage;

  for (genvar i = 0; i < 2; i++) begin : g_bit
    tr_gate  u_tr  (.a(a[i]), .b(b[i]), .c(1'b0),
                    .p(a_pass[i]), .q(diff[i]), .r(bit_cmp[i].gt));
    not_gate u_not (.a(diff[i]), .p(bit_cmp[i].eq));
  end

  decision_block u_dcb (
    .x       (bit_cmp[1]),
    .y       (bit_cmp[0]),
    .z       (r),
    .garbage (dcb_garbage)
  );

endmodule
