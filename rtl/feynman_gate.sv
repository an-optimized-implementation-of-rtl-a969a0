// feynman_gate - 2-input, 2-output reversible Feynman (controlled-NOT) gate.
//
// The gate passes its control input straight through (p = a) and flips its
// target input when the control is set (q = a ^ b). The mapping is one-to-one,
// so the inputs can always be recovered from the outputs. With b tied to 0 the
// gate copies a onto both outputs, which is how reversible logic builds fan-out;
// with b used as data it is a two-input XOR.
//
// Interface: a (control), b (target) in; p, q out. Purely combinational.
// The gate equations and truth table are those of the published Feynman gate.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
