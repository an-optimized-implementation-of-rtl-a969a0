// csla - W-bit carry-select adder.
//
// The operands are cut into groups of BLK bits (the last group takes whatever
// is left over). The lowest group is a plain ripple adder fed by cin. Every
// higher group holds two ripple adders working in parallel, one assuming a
// carry-in of 0 and one assuming 1; when the real carry arrives from the group
// below, a multiplexer picks the matching sum and carry-out. The carry thus
// crosses one multiplexer per group instead of BLK full adders, which is what
// shortens the critical path against a ripple-carry adder.
//
// The carry-select principle and its use as final adder follow the design
// description; the uniform group size BLK = 4 is this design's choice.
//
// Interface: a, b (W bits), cin in; sum (W bits), cout out. Combinational.
module csla #(
  parameter int unsigned W   = 32,
  parameter int unsigned BLK = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned NGRP = (W + BLK - 1) / BLK;

  // carry[g] is the carry into group g
  logic [NGRP:0] carry;

  assign carry[0] = cin;

  for (genvar g = 0; g < NGRP; g++) begin : g_grp
    localparam int unsigned LO = g * BLK;
    localparam int unsigned GW = (LO + BLK > W) ? (W - LO) : BLK;

    if (g == 0) begin : g_first
      ripple_adder #(.W(GW)) u_rca (
        .a(a[LO +: GW]), .b(b[LO +: GW]), .cin(carry[0]),
        .sum(sum[LO +: GW]), .cout(carry[1])
      );
    end else begin : g_sel
      logic [GW-1:0] sum0, sum1;
      logic          cout0, cout1;

      ripple_adder #(.W(GW)) u_rca0 (
        .a(a[LO +: GW]), .b(b[LO +: GW]), .cin(1'b0), .sum(sum0), .cout(cout0)
      );
      ripple_adder #(.W(GW)) u_rca1 (
        .a(a[LO +: GW]), .b(b[LO +: GW]), .cin(1'b1), .sum(sum1), .cout(cout1)
      );

      assign sum[LO +: GW] = carry[g] ? sum1  : sum0;
      assign carry[g+1]    = carry[g] ? cout1 : cout0;
    end
  end

  assign cout = carry[NGRP];
endmodule
