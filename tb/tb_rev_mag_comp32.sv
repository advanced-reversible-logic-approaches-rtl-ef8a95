// Self-checking testbench for rev_mag_comp32.
// Stimulus: the three operand pairs of the published waveform
// (a = 0x...0A against b = 0x...09, 0x...0A, 0x...0B); for every bit j, an
// operand pair that agrees above bit j and differs at bit j in both
// directions (so every leaf and every decision block decides once);
// equal operands; the extreme values; and random pairs. Each result is
// checked against the integer comparison, and exactly one of agb, aeb, alb
// must be high.
module tb_rev_mag_comp32;
  localparam int W = 32;

  logic [W-1:0] a, b;
  logic         agb, aeb, alb;
  int           checks = 0, failures = 0;

  rev_mag_comp32 dut (.a(a), .b(b), .agb(agb), .aeb(aeb), .alb(alb));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] ta, input logic [W-1:0] tb_);
    a = ta;
    b = tb_;
    #1;
    checks++;
    if (agb !== (ta > tb_) || aeb !== (ta == tb_) || alb !== (ta < tb_) ||
        int'(agb) + int'(aeb) + int'(alb) != 1) begin
      failures++;
      $display("FAIL a=%h b=%h: agb=%b aeb=%b alb=%b", ta, tb_, agb, aeb, alb);
    end
  endtask

  initial begin
    logic [W-1:0] r, s;
    check(W'(32'h0A), W'(32'h09));
    check(W'(32'h0A), W'(32'h0A));
    check(W'(32'h0A), W'(32'h0B));
    for (int j = 0; j < W; j++) begin
      r = W'($urandom());
      s = r;
      s[j] = ~r[j];
      // below bit j anything may differ
      for (int k = 0; k < j; k++) s[k] = 1'($urandom());
      check(r, s);
      check(s, r);
    end
    check('0, '0);
    check('1, '1);
    check('1, '0);
    check('0, '1);
    for (int n = 0; n < 2000; n++) begin
      r = W'({$urandom(), $urandom()});
      s = (n % 4 == 0) ? r : W'({$urandom(), $urandom()});
      check(r, s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
