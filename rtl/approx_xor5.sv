// approx_xor5 -- approximate five-input XOR.
//
// The five-input XOR is approximated by a single five-input majority gate:
//   y = M(a, b, c, d, e), i.e. 1 when at least three inputs are 1.
// It differs from the exact parity in 10 of the 32 input patterns
// (31.25 % error rate): the 5 patterns with exactly one input high (parity 1,
// majority 0) and the 5 with exactly four high (parity 0, majority 1). With
// zero, two, three or five inputs high the two functions agree.
// The QCA cell arrangement of the five-input majority gate is not reproduced;
// the gate is written from its Boolean function.
//
// Interface: 1-bit inputs a..e; 1-bit output y.
// Timing: purely combinational (0.25 of a QCA clock cycle in the layout).
module approx_xor5 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic y
);
  logic [2:0] ones;

  always_comb begin
    ones = 3'(a) + 3'(b) + 3'(c) + 3'(d) + 3'(e);
    y    = (ones >= 3'd3);
  end
endmodule
