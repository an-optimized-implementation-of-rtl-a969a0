// rev_full_adder - one-bit full adder whose XOR path is made of Feynman gates.
//
// The sum a ^ b ^ cin comes out of two cascaded Feynman gates: the first forms
// a ^ b on its target output, the second XORs that with cin. The carry is the
// usual majority function, written as (a & b) | (cin & (a ^ b)) and reusing the
// propagate signal from the first gate. A Feynman gate is linear, so it cannot
// form the AND terms of the carry; those are ordinary gates. This split between
// reversible XORs and conventional carry logic is a choice of this design.
//
// Interface: a, b, cin in; s, cout out. Purely combinational.
module rev_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic a_pass, prop, prop_pass;

  feynman_gate u_fg_ab (.a(a),    .b(b),   .p(a_pass),    .q(prop));
  feynman_gate u_fg_pc (.a(prop), .b(cin), .p(prop_pass), .q(s));

  assign cout = (a_pass & b) | (prop_pass & cin);
endmodule
