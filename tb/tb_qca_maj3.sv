// tb_qca_maj3 -- exhaustive self-check of the three-input majority gate.
// All 8 input patterns are applied; the expected value is "at least two
// inputs are 1", computed by counting ones. The gate is combinational, so
// each output is checked one time step after its inputs change.
module tb_qca_maj3;
  logic a, b, c, y;
  int checks = 0, failures = 0;

  qca_maj3 dut (.a(a), .b(b), .c(c), .y(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (y !== ($countones(3'(v)) >= 2)) begin
        failures++;
        $display("FAIL abc=%03b y=%0b", 3'(v), y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
