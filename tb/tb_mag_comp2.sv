// Self-checking testbench for mag_comp2: all 16 pairs of 2-bit operands,
// greater and equal checked against the integer comparison.
module tb_mag_comp2;
  import rev_cmp_pkg::*;

  logic [1:0] a, b;
  cmp_t       r;
  int         checks = 0, failures = 0;

  mag_comp2 dut (.a(a), .b(b), .r(r));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a, b} = 4'(i);
      #1;
      checks++;
      if (r.gt !== (int'(a) > int'(b)) || r.eq !== (int'(a) == int'(b))) begin
        failures++;
        $display("FAIL a=%0d b=%0d: gt=%b eq=%b", a, b, r.gt, r.eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
