// tb_qca_or2 -- exhaustive self-check of the majority-based two-input OR gate.
// The expected value for each of the 4 input patterns is computed from the
// pattern's integer value, not from the gate's construction.
module tb_qca_or2;
  logic a, b, y;
  int checks = 0, failures = 0;

  qca_or2 dut (.a(a), .b(b), .y(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (y !== (v != 0)) begin
        failures++;
        $display("FAIL ab=%02b y=%0b", 2'(v), y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
