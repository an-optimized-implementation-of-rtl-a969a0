// ripple_adder - W-bit ripple-carry adder built from rev_full_adder cells.
//
// The carry runs from bit 0 to bit W-1 through one full adder per bit. It is
// the building block of each group in the carry-select adder (csla).
//
// Interface: a, b (W bits), cin in; sum (W bits), cout out. Combinational.
module ripple_adder #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    rev_full_adder u_fa (
      .a(a[i]), .b(b[i]), .cin(carry[i]), .s(sum[i]), .cout(carry[i+1])
    );
  end

  assign cout = carry[W];
endmodule
