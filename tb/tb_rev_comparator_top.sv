// End-to-end testbench for rev_comparator_top, at its default (and only)
// size. It drives all four parts of the top at once:
//   * 16-bit and 32-bit comparators: the published waveform operands, then
//     random pairs whose first difference is placed at a random bit, plus
//     equal pairs, each checked against the integer comparison;
//   * 4-bit comparator: all 256 operand pairs;
//   * Peres and Feynman gates: all input patterns against their equations.
// It counts how often each mechanism occurred: each of the three outcomes
// per comparator, and, for the reversible comparators, the 2-bit leaf that
// held the most significant difference (so that every leaf and every path
// through the decision-block tree decided at least once). A mechanism that
// never occurred counts as a failure.
module tb_rev_comparator_top;
  logic [15:0] a16, b16;
  logic        agb16, aeb16, alb16;
  logic [31:0] a32, b32;
  logic        agb32, aeb32, alb32;
  logic [0:3]  a4, b4;
  logic        agb4, aeb4, alb4;
  logic [2:0]  pg_in, pg_out;
  logic [1:0]  fg_in, fg_out;

  int checks = 0, failures = 0;
  int outcome16 [3], outcome32 [3], outcome4 [3];   // gt, eq, lt
  int leaf16 [8], leaf32 [16];                       // deciding 2-bit leaf

  rev_comparator_top dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int first_diff(input logic [31:0] x, input logic [31:0] y);
    for (int i = 31; i >= 0; i--) if (x[i] != y[i]) return i;
    return -1;
  endfunction

  function automatic int outcome(input logic gt, input logic eq);
    return gt ? 0 : (eq ? 1 : 2);
  endfunction

  task automatic step(input logic [15:0] x16, input logic [15:0] y16,
                      input logic [31:0] x32, input logic [31:0] y32);
    int d;
    a16 = x16; b16 = y16; a32 = x32; b32 = y32;
    #1;
    checks++;
    if (agb16 !== (x16 > y16) || aeb16 !== (x16 == y16) || alb16 !== (x16 < y16)) begin
      failures++;
      $display("FAIL 16-bit a=%h b=%h: %b%b%b", x16, y16, agb16, aeb16, alb16);
    end
    checks++;
    if (agb32 !== (x32 > y32) || aeb32 !== (x32 == y32) || alb32 !== (x32 < y32)) begin
      failures++;
      $display("FAIL 32-bit a=%h b=%h: %b%b%b", x32, y32, agb32, aeb32, alb32);
    end
    outcome16[outcome(x16 > y16, x16 == y16)]++;
    outcome32[outcome(x32 > y32, x32 == y32)]++;
    d = first_diff({16'h0, x16}, {16'h0, y16});
    if (d >= 0) leaf16[d / 2]++;
    d = first_diff(x32, y32);
    if (d >= 0) leaf32[d / 2]++;
  endtask

  initial begin
    logic [31:0] r, s;
    int          j;
    pg_in = '0;
    fg_in = '0;
    a4 = '0;
    b4 = '0;

    // Published waveform operands
    step(16'h000A, 16'h0009, 32'h0000_000A, 32'h0000_0009);
    step(16'h000A, 16'h000A, 32'h0000_000A, 32'h0000_000A);
    step(16'h000A, 16'h000B, 32'h0000_000A, 32'h0000_000B);

    for (int n = 0; n < 4000; n++) begin
      r = $urandom();
      s = r;
      if (n % 5 != 0) begin
        j = int'($urandom_range(31, 0));
        s[j] = ~r[j];
        for (int k = 0; k < j; k++) s[k] = 1'($urandom());
      end
      // the 16-bit operands use their own first-difference position
      step(r[31:16] ^ r[15:0], (r[31:16] ^ r[15:0]) ^ (s[15:0] ^ r[15:0]), r, s);
    end

    for (int ia = 0; ia < 16; ia++) begin
      for (int ib = 0; ib < 16; ib++) begin
        for (int k = 0; k < 4; k++) begin
          a4[k] = ia[3-k];
          b4[k] = ib[3-k];
        end
        #1;
        checks++;
        if (agb4 !== (ia > ib) || aeb4 !== (ia == ib) || alb4 !== (ia < ib)) begin
          failures++;
          $display("FAIL 4-bit a=%0d b=%0d: %b%b%b", ia, ib, agb4, aeb4, alb4);
        end
        outcome4[outcome(ia > ib, ia == ib)]++;
      end
    end

    for (int i = 0; i < 8; i++) begin
      pg_in = 3'(i);
      #1;
      checks++;
      if (pg_out !== {pg_in[2], pg_in[2] ^ pg_in[1], (pg_in[2] & pg_in[1]) ^ pg_in[0]}) begin
        failures++;
        $display("FAIL Peres in=%03b out=%03b", pg_in, pg_out);
      end
    end
    for (int i = 0; i < 4; i++) begin
      fg_in = 2'(i);
      #1;
      checks++;
      if (fg_out !== {fg_in[1], fg_in[1] ^ fg_in[0]}) begin
        failures++;
        $display("FAIL Feynman in=%02b out=%02b", fg_in, fg_out);
      end
    end

    foreach (outcome16[i]) if (outcome16[i] == 0) begin failures++; $display("16-bit outcome %0d never seen", i); end
    foreach (outcome32[i]) if (outcome32[i] == 0) begin failures++; $display("32-bit outcome %0d never seen", i); end
    foreach (outcome4[i])  if (outcome4[i]  == 0) begin failures++; $display("4-bit outcome %0d never seen", i); end
    foreach (leaf16[i])    if (leaf16[i]    == 0) begin failures++; $display("16-bit leaf %0d never decided", i); end
    foreach (leaf32[i])    if (leaf32[i]    == 0) begin failures++; $display("32-bit leaf %0d never decided", i); end
    $display("outcomes gt/eq/lt: 16-bit %0d/%0d/%0d, 32-bit %0d/%0d/%0d, 4-bit %0d/%0d/%0d",
             outcome16[0], outcome16[1], outcome16[2], outcome32[0], outcome32[1], outcome32[2],
             outcome4[0], outcome4[1], outcome4[2]);
    $display("deciding leaf counts 16-bit: %p", leaf16);
    $display("deciding leaf counts 32-bit: %p", leaf32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
