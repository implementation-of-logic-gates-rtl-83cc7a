// qca_and2 -- two-input AND gate made from a majority gate.
//
// A three-input majority gate with its third input held at logic 0
// (a fixed cell of polarisation -1) computes M(a, b, 0) = ab. This is the
// standard way of obtaining AND in QCA, and the module builds it exactly so,
// by instantiating qca_maj3 with a constant third input.
//
// Interface: 1-bit inputs a, b; 1-bit output y = a & b.
// Timing: purely combinational.
module qca_and2 (
  input  logic a,
  input  logic b,
  output logic y
);
  qca_maj3 u_maj (.a(a), .b(b), .c(1'b0), .y(y));
endmodule
