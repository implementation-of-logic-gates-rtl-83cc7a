// qca_maj3 -- three-input majority gate.
//
// The majority gate is the basic logic primitive of quantum-dot cellular
// automata (QCA): a central cell settles to the polarisation held by at least
// two of its three neighbours. In Boolean terms the output is
// y = ab + ac + bc. Fixing one input at 0 gives an AND gate, fixing it at 1
// gives an OR gate (see qca_and2, qca_or2).
//
// Interface: three 1-bit inputs, one 1-bit output. Logic 1 stands for cell
// polarisation +1 and logic 0 for polarisation -1.
// Timing: purely combinational. In a QCA layout all three inputs must arrive
// in the same clock zone; that constraint has no counterpart here.
module qca_maj3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);
  always_comb y = (a & b) | (a & c) | (b & c);
endmodule
