// array_multiplier - unsigned N x N array multiplier with a carry-select final
// adder.
//
// How it works: every partial-product bit is a[j] & b[i]. The partial products
// are reduced in a carry-save array of N-1 rows of N full adders. Row i adds
// partial product i, the sum bits of the row above shifted down by one place,
// and the carry bits of the row above; no carry travels sideways inside a row.
// Each row retires one product bit (the lowest sum bit of the row above), so
// product bits 0..N-1 fall out of the array. The sum and carry vectors left by
// the last row are then added by an N-bit carry-select adder (csla), which
// yields product bits N..2N-1. The carry-save array plus carry-select final
// stage is the "partial product unit with CSLA final adder" of the design.
//
// Interface: a, b (N bits, unsigned) in; p (2N bits) out. Purely
// combinational; the MAC registers the product behind it. N must be >= 2.
module array_multiplier #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  // s[i][j]: sum bit j of row i (weight 2^(i+j)); c[i][j]: carry bit j of
  // row i (weight 2^(i+j+1)).
  logic [N-1:0] s [N];
  logic [N-1:0] c [N];

  // Row 0 is partial product 0 itself, with no carries.
  assign s[0] = a & {N{b[0]}};
  assign c[0] = '0;

  for (genvar i = 1; i < N; i++) begin : g_row
    logic [N-1:0] pp;
    logic [N-1:0] s_in;

    assign pp   = a & {N{b[i]}};
    assign s_in = {1'b0, s[i-1][N-1:1]};

    for (genvar j = 0; j < N; j++) begin : g_col
      rev_full_adder u_fa (
        .a(pp[j]), .b(s_in[j]), .cin(c[i-1][j]), .s(s[i][j]), .cout(c[i][j])
      );
    end

    assign p[i-1] = s[i-1][0];
  end

  assign p[N-1] = s[N-1][0];

  // Final adder: remaining sum bits (shifted) plus carries of the last row.
  // Their total is the product divided by 2^N, which is below 2^N, so the
  // N-bit sum holds it exactly and the adder's carry-out is always 0.
  logic [N-1:0] fin_a;
  logic         fin_cout_unused;

  assign fin_a = {1'b0, s[N-1][N-1:1]};

  csla #(.W(N)) u_final (
    .a(fin_a), .b(c[N-1]), .cin(1'b0), .sum(p[2*N-1:N]), .cout(fin_cout_unused)
  );
endmodule
