// Self-checking testbench for decision_block.
// Part 1: for every pair of 2-bit numbers {ax, ay} and {bx, by} (ax, bx the
// more significant bits) it forms the per-bit results x and y, and checks
// the block's output against the comparison of the two 2-bit numbers.
// Part 2: for all 16 raw input patterns it checks the five garbage lines
// {GY, EY, ~GX, EX, ~(GY & EX)} and the two result lines.
module tb_decision_block;
  import rev_cmp_pkg::*;

  cmp_t       x, y, z;
  logic [4:0] garbage;
  int         checks = 0, failures = 0;

  decision_block dut (.x(x), .y(y), .z(z), .garbage(garbage));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] na, nb;
    for (int i = 0; i < 16; i++) begin
      {na, nb} = 4'(i);
      x = '{gt: na[1] > nb[1], eq: na[1] == nb[1]};
      y = '{gt: na[0] > nb[0], eq: na[0] == nb[0]};
      #1;
      checks++;
      if (z.gt !== (na > nb) || z.eq !== (na == nb)) begin
        failures++;
        $display("FAIL a=%02b b=%02b: gt=%b eq=%b", na, nb, z.gt, z.eq);
      end
    end
    for (int i = 0; i < 16; i++) begin
      {x, y} = 4'(i);
      #1;
      checks++;
      if (garbage !== {y.gt, y.eq, !x.gt, x.eq, !(y.gt && x.eq)} ||
          z.eq !== (x.eq && y.eq) || z.gt !== (x.gt || (x.eq && y.gt))) begin
        failures++;
        $display("FAIL x=%02b y=%02b: z=%02b garbage=%05b", x, y, z, garbage);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
