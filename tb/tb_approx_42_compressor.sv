// tb_approx_42_compressor -- exhaustive self-check of the approximate 4-2
// compressor against its reference truth table.
//
// The three 32-entry output columns of the reference table are held as bit
// masks: bit i is the expected output for the input pattern
// i = {a, b, c, d, cin}. Every pattern is applied and all three outputs are
// compared. The testbench then counts, per output, the patterns that differ
// from an exact 4-2 compressor (sum = parity of the five bits,
// cout = M(c, d, cin), carry = the rest of the carry weight) and requires
// 12, 16 and 12 differences respectively. It also checks that cout never
// depends on cin (no ripple between columns).
module tb_approx_42_compressor;
  localparam logic [31:0] SUM_COL   = 32'h7771_7111;
  localparam logic [31:0] CARRY_COL = 32'h888e_8eee;
  localparam logic [31:0] COUT_COL  = 32'hfff0_f000;

  logic a, b, c, d, cin, sum, carry, cout;
  int checks = 0, failures = 0;
  int sum_err = 0, carry_err = 0, cout_err = 0;

  approx_42_compressor dut (
    .a(a), .b(b), .c(c), .d(d), .cin(cin),
    .sum(sum), .carry(carry), .cout(cout)
  );

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    logic ex_sum, ex_cout, ex_carry;
    logic [31:0] cout_seen;
    for (int v = 0; v < 32; v++) begin
      {a, b, c, d, cin} = 5'(v);
      #1;
      checks += 3;
      if (sum !== SUM_COL[v] || carry !== CARRY_COL[v] || cout !== COUT_COL[v]) begin
        failures++;
        $display("FAIL abcd,cin=%05b got sum=%0b carry=%0b cout=%0b want %0b %0b %0b",
                 5'(v), sum, carry, cout, SUM_COL[v], CARRY_COL[v], COUT_COL[v]);
      end
      cout_seen[v] = cout;
      ones     = int'(a) + int'(b) + int'(c) + int'(d) + int'(cin);
      ex_sum   = ones[0];
      ex_cout  = (int'(c) + int'(d) + int'(cin)) >= 2;
      ex_carry = ((ones >> 1) - int'(ex_cout)) != 0;
      if (sum   != ex_sum)   sum_err++;
      if (carry != ex_carry) carry_err++;
      if (cout  != ex_cout)  cout_err++;
    end
    for (int v = 0; v < 32; v += 2) begin
      checks++;
      if (cout_seen[v] != cout_seen[v+1]) begin
        failures++;
        $display("FAIL cout depends on cin for abcd=%04b", 4'(v >> 1));
      end
    end
    checks += 3;
    if (sum_err != 12)   begin failures++; $display("FAIL sum errors %0d", sum_err); end
    if (carry_err != 16) begin failures++; $display("FAIL carry errors %0d", carry_err); end
    if (cout_err != 12)  begin failures++; $display("FAIL cout errors %0d", cout_err); end
    $display("differences from exact: sum %0d/32, carry %0d/32, cout %0d/32",
             sum_err, carry_err, cout_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
