// Shared types of the reversible magnitude comparator.
//
// Every sub-comparison in the comparator tree produces the same pair of
// lines: "A is greater than B" and "A equals B" over the bits it covers.
// "A is less than B" is never carried through the tree; it is formed once,
// at the very end, by the BJN gate as ~(greater | equal).
package rev_cmp_pkg;

  // Result of comparing one slice of A against the same slice of B.
  typedef struct packed {
    logic gt;  // slice of A > slice of B
    logic eq;  // slice of A == slice of B
  } cmp_t;

endpackage
