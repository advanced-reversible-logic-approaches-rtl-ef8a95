// Self-checking testbench for tr_gate: applies all 8 input combinations,
// compares P, Q, R with the gate's truth table (P=A, Q=A xor B, R=A and not B, xor C), and checks that the
// gate is reversible, i.e. the 8 output patterns are all different.
module tb_tr_gate;
  logic a, b, c, p, q, r;
  int   checks = 0, failures = 0;
  bit   seen [8];

  tr_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ep, eq, er;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      ep = a; eq = (a != b); er = ((a == 1'b1 && b == 1'b0) != c);
      checks++;
      if ({p, q, r} !== {ep, eq, er}) begin
        failures++;
        $display("FAIL abc=%03b: pqr=%b%b%b expected %b%b%b", {a, b, c}, p, q, r, ep, eq, er);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL abc=%03b: output %b%b%b repeats, gate not reversible", {a, b, c}, p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
