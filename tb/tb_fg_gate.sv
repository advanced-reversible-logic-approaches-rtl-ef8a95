// Self-checking testbench for fg_gate: all 4 input combinations against
// P = A, Q = A xor B, and a check that the 4 output patterns differ.
module tb_fg_gate;
  logic a, b, p, q;
  int   checks = 0, failures = 0;
  bit   seen [4];

  fg_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (p !== a || q !== (a != b)) begin
        failures++;
        $display("FAIL ab=%02b: pq=%b%b", {a, b}, p, q);
      end
      checks++;
      if (seen[{p, q}]) begin
        failures++;
        $display("FAIL ab=%02b: output repeats", {a, b});
      end
      seen[{p, q}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
