// approx_xor3 -- approximate three-input XOR.
//
// An exact three-input XOR in QCA needs several majority gates and inverters.
// This gate replaces it with a single majority gate followed by an inverter:
//   y = NOT(M(a, b, c)).
// For inputs with one or two ones this equals a ^ b ^ c. It is wrong only for
// 000 (gives 1) and 111 (gives 0): 2 of 8 input patterns, a 25 % error rate,
// which error-tolerant arithmetic accepts in exchange for far fewer cells.
//
// Interface: 1-bit inputs a, b, c; 1-bit output y.
// Timing: purely combinational (in the QCA layout the output appears after
// three clock zones, 0.75 of a QCA clock cycle).
module approx_xor3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);
  logic maj;

  qca_maj3 u_maj (.a(a), .b(b), .c(c), .y(maj));
  qca_inv  u_inv (.a(maj), .y(y));
endmodule
