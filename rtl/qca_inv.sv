// qca_inv -- QCA inverter.
//
// In a QCA layout the input wire splits in two and the branches rejoin
// diagonally at the output cell, which by Coulomb repulsion takes the
// opposite polarisation. Logically the output is the complement of the input.
//
// Interface: one 1-bit input a, one 1-bit output y = ~a.
// Timing: purely combinational.
module qca_inv (
  input  logic a,
  output logic y
);
  always_comb y = ~a;
endmodule
