// Self-checking testbench for not_gate: both inputs, P must be the
// inverse of A.
module tb_not_gate;
  logic a, p;
  int   checks = 0, failures = 0;

  not_gate dut (.a(a), .p(p));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2; i++) begin
      a = 1'(i);
      #1;
      checks++;
      if (p !== (i == 0)) begin
        failures++;
        $display("FAIL a=%b p=%b", a, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
