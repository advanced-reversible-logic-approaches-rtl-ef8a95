// Self-checking testbench for mag_comp4: all 256 pairs of 4-bit operands.
// Operands are formed from integers with the first bit the most
// significant; each output is compared with the integer comparison.
module tb_mag_comp4;
  logic [0:3] a, b;
  logic       agb, aeb, alb;
  int         checks = 0, failures = 0;

  mag_comp4 dut (.a(a), .b(b), .agb(agb), .aeb(aeb), .alb(alb));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < 16; ia++) begin
      for (int ib = 0; ib < 16; ib++) begin
        // a[0] is the MSB: bit 3 of the integer goes to index 0
        for (int k = 0; k < 4; k++) begin
          a[k] = ia[3-k];
          b[k] = ib[3-k];
        end
        #1;
        checks++;
        if (agb !== (ia > ib) || aeb !== (ia == ib) || alb !== (ia < ib)) begin
          failures++;
          $display("FAIL a=%0d b=%0d: agb=%b aeb=%b alb=%b", ia, ib, agb, aeb, alb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
