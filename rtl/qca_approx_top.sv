// qca_approx_top -- approximate QCA arithmetic gates, side by side.
//
// The design is a small library of approximate logic for quantum-dot
// cellular automata, all built from majority gates and inverters:
//   * an approximate 4-2 compressor (two cascaded approximate full adders),
//     the largest unit and the one the other gates exist to serve;
//   * an approximate three-input XOR, NOT(M(a, b, c)), 25 % error rate;
//   * an approximate five-input XOR, M(a, b, c, d, e), 31.25 % error rate;
//   * two-input AND and OR gates, i.e. majority gates with one input fixed.
// The units are independent: each has its own ports and they share nothing.
// Bundling them in one top is this design's choice, so that all of them can
// be compiled and exercised together.
//
// Interface: cmp_* are the compressor's inputs and outputs; x3_in = {a,b,c}
// and x5_in = {a,b,c,d,e} (a in the most significant bit) feed the XORs;
// g_a and g_b feed both the AND and the OR gate.
// Timing: purely combinational, no clock or reset.
module qca_approx_top (
  input  logic       cmp_a,
  input  logic       cmp_b,
  input  logic       cmp_c,
  input  logic       cmp_d,
  input  logic       cmp_cin,
  output logic       cmp_sum,
  output logic       cmp_carry,
  output logic       cmp_cout,
  input  logic [2:0] x3_in,
  output logic       x3_y,
  input  logic [4:0] x5_in,
  output logic       x5_y,
  input  logic       g_a,
  input  logic       g_b,
  output logic       and_y,
  output logic       or_y
);
  approx_42_compressor u_cmp42 (
    .a(cmp_a), .b(cmp_b), .c(cmp_c), .d(cmp_d), .cin(cmp_cin),
    .sum(cmp_sum), .carry(cmp_carry), .cout(cmp_cout)
  );

  approx_xor3 u_xor3 (.a(x3_in[2]), .b(x3_in[1]), .c(x3_in[0]), .y(x3_y));

  approx_xor5 u_xor5 (
    .a(x5_in[4]), .b(x5_in[3]), .c(x5_in[2]), .d(x5_in[1]), .e(x5_in[0]),
    .y(x5_y)
  );

  qca_and2 u_and (.a(g_a), .b(g_b), .y(and_y));
  qca_or2  u_or  (.a(g_a), .b(g_b), .y(or_y));
endmodule
