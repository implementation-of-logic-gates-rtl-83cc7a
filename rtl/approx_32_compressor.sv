// approx_32_compressor -- approximate full adder (3-2 compressor).
//
// A full adder reduces three bits of equal weight to a sum (weight 1) and a
// carry (weight 2). Here the sum comes from the approximate XOR
// NOT(M(a, b, c)) and the carry is the exact majority M(a, b, c). Both share
// one majority gate: the carry is tapped off before the inverter, so in the
// QCA layout it is ready one clock zone before the sum.
// The carry is always exact; the sum is wrong for 000 and 111, so the
// weighted result sum + 2*carry is off by +1 for 000 and -1 for 111.
//
// Interface: 1-bit inputs a, b, c; 1-bit outputs sum and carry.
// Timing: purely combinational.
module approx_32_compressor (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  qca_maj3 u_maj (.a(a), .b(b), .c(c), .y(carry));
  qca_inv  u_inv (.a(carry), .y(sum));
endmodule
