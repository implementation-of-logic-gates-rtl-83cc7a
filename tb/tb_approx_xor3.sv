// tb_approx_xor3 -- exhaustive self-check of the approximate three-input XOR.
// Expected output: the exact parity, except that 000 gives 1 and 111 gives 0
// (the two documented error cases). The testbench also counts the patterns
// where the gate differs from exact XOR and requires exactly 2 of 8
// (25 % error rate, 75 % pass rate).
module tb_approx_xor3;
  logic a, b, c, y;
  int checks = 0, failures = 0, errors = 0;

  approx_xor3 dut (.a(a), .b(b), .c(c), .y(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exact, expected;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      exact    = ^3'(v);
      expected = (v == 0) ? 1'b1 : (v == 7) ? 1'b0 : exact;
      checks++;
      if (y !== expected) begin
        failures++;
        $display("FAIL abc=%03b y=%0b expected %0b", 3'(v), y, expected);
      end
      if (y != exact) errors++;
    end
    checks++;
    if (errors != 2) begin
      failures++;
      $display("FAIL error count %0d, expected 2 of 8", errors);
    end
    $display("approximate XOR3: %0d of 8 patterns differ from exact XOR", errors);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
