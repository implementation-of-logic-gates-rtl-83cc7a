// approx_42_compressor -- approximate 4-2 compressor.
//
// A 4-2 compressor takes four operand bits a, b, c, d and a carry-in cin,
// all of weight 1, and produces sum (weight 1) plus carry and cout
// (both weight 2); cout goes to the next column's cin. It is the building
// block of multiplier partial-product trees.
//
// This version cascades two approximate 3-2 compressors:
//   stage 1: (a, b, c)        -> s1, cout
//   stage 2: (s1, d, cin)     -> sum, carry
// Each stage is one majority gate plus an inverter. cout depends only on
// a, b, c and never on cin, so there is no carry ripple between columns.
// Compared with exact addition the sum bit is wrong for 12 of the 32 input
// patterns, carry for 16 and cout for 12 (against the exact compressor in
// which cout = M(c, d, cin)); the wiring of the stages is this design's
// reading of the block diagram, chosen because it reproduces the reference
// truth table row for row.
//
// Interface: 1-bit inputs a, b, c, d, cin; 1-bit outputs sum, carry, cout.
// Timing: purely combinational. In the QCA layout cout is ready first, then
// carry (half a QCA clock cycle) and sum (three quarters).
module approx_42_compressor (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic s1;

  approx_32_compressor u_stage1 (.a(a),  .b(b), .c(c),   .sum(s1),  .carry(cout));
  approx_32_compressor u_stage2 (.a(s1), .b(d), .c(cin), .sum(sum), .carry(carry));
endmodule
