// tb_approx_xor5 -- exhaustive self-check of the approximate five-input XOR.
// Expected output: 1 when three or more of the five inputs are 1. The
// testbench also counts the patterns that differ from the exact five-input
// parity and requires exactly 10 of 32 (31.25 % error rate).
module tb_approx_xor5;
  logic a, b, c, d, e, y;
  int checks = 0, failures = 0, errors = 0;

  approx_xor5 dut (.a(a), .b(b), .c(c), .d(d), .e(e), .y(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    for (int v = 0; v < 32; v++) begin
      {a, b, c, d, e} = 5'(v);
      #1;
      ones = 0;
      for (int i = 0; i < 5; i++) ones += v[i];
      checks++;
      if (y !== (ones >= 3)) begin
        failures++;
        $display("FAIL abcde=%05b y=%0b", 5'(v), y);
      end
      if (y != ones[0]) errors++;
    end
    checks++;
    if (errors != 10) begin
      failures++;
      $display("FAIL error count %0d, expected 10 of 32", errors);
    end
    $display("approximate XOR5: %0d of 32 patterns differ from exact parity", errors);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
