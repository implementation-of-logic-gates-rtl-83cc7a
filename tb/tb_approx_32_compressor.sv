// tb_approx_32_compressor -- exhaustive self-check of the approximate full
// adder. For each of the 8 patterns the carry must equal the exact carry
// (ones >= 2) and the sum must equal the exact sum bit except for 000 (1)
// and 111 (0). It also checks that the weighted result sum + 2*carry is off
// by exactly +1 for 000 and -1 for 111 and exact elsewhere, and that the
// carry has a 0 % error rate.
module tb_approx_32_compressor;
  logic a, b, c, sum, carry;
  int checks = 0, failures = 0, carry_errors = 0;

  approx_32_compressor dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones, value, want_diff;
    logic want_sum;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      ones      = int'(a) + int'(b) + int'(c);
      want_sum  = (ones == 0) ? 1'b1 : (ones == 3) ? 1'b0 : ones[0];
      want_diff = (ones == 0) ? 1 : (ones == 3) ? -1 : 0;
      value     = int'(sum) + 2 * int'(carry);
      checks += 3;
      if (carry !== (ones >= 2)) begin
        failures++;
        $display("FAIL abc=%03b carry=%0b", 3'(v), carry);
      end
      if (sum !== want_sum) begin
        failures++;
        $display("FAIL abc=%03b sum=%0b", 3'(v), sum);
      end
      if (value - ones != want_diff) begin
        failures++;
        $display("FAIL abc=%03b value=%0d ones=%0d", 3'(v), value, ones);
      end
      if (carry != (ones >= 2)) carry_errors++;
    end
    checks++;
    if (carry_errors != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
