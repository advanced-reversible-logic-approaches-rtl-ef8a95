// 4-bit magnitude comparator in sum-of-products form.
//
// The textbook comparator that introduces the problem: outputs agb, aeb
// and alb are written directly as the three equations
//   A>B = A0B0' + x0[A1B1' + x1{A2B2' + x2 A3B3'}]
//   A<B = A0'B0 + x0[A1'B1 + x1{A2'B2 + x2 A3'B3}]
//   A=B = x0 x1 x2 x3,         xi = Ai XNOR Bi
// where A0 is the most significant bit. The ports are declared [0:3] so
// that index 0 is the MSB and a, b still read as unsigned numbers.
// Each output has its own equation; none is derived from the others.
//
// Ports: a[0:3], b[0:3] -> agb, aeb, alb. Purely combinational.
module mag_comp4 (
  input  logic [0:3] a,
  input  logic [0:3] b,
  output logic       agb,
  output logic       aeb,
  output logic       alb
);

  logic [0:3] x;   // bitwise equality

  always_comb begin
    x   = ~(a ^ b);
    agb = (a[0] & ~b[0]) |
          (x[0] & ((a[1] & ~b[1]) |
                   (x[1] & ((a[2] & ~b[2]) | (x[2] & a[3] & ~b[3])))));
    alb = (~a[0] & b[0]) |
          (x[0] & ((~a[1] & b[1]) |
                   (x[1] & ((~a[2] & b[2]) | (x[2] & ~a[3] & b[3])))));
    aeb = &x;
  end

endmodule
