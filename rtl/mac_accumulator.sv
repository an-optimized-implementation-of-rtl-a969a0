// mac_accumulator - accumulation stage of the MAC: adder, feedback register
// and accumulator register.
//
// How it works: when valid_i is high the registered product prod_i is added
// to the running sum and the result is stored. When first_i is also high the
// running sum is replaced by 0 before the addition, so the product starts a
// new sum. The adder is a carry-select adder (csla) of AW bits. Because
// reversible logic has no fan-out, the adder result is duplicated by a row of
// Feynman gates used as copying gates (target input 0): one copy loads the
// accumulator register that drives the output, the other loads the feedback
// register that returns the sum to the adder. The two registers therefore
// always hold the same value and the feedback loop closes in one clock.
// The sum wraps modulo 2^AW; there is no overflow flag.
//
// The structure (product register -> accumulator adder -> accumulator
// register, with a separate feedback register) follows the published MAC
// architecture, whose 8-bit version has a 17-bit product register and 18-bit
// feedback and accumulator registers. The first_i restart, the valid_i hold,
// the asynchronous active-low reset to 0 and the Feynman-gate copy are this
// design's choices.
//
// Interface: clk, rst_n; valid_i, first_i, prod_i (PW bits) in; acc_o (AW bits)
// and valid_o out. Timing: acc_o and valid_o change on the clock edge that
// samples valid_i, i.e. one cycle of latency.
module mac_accumulator #(
  parameter int unsigned PW = 65,   // product register width, 2N+1
  parameter int unsigned AW = 66    // accumulator width, 2N+2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid_i,
  input  logic          first_i,
  input  logic [PW-1:0] prod_i,
  output logic [AW-1:0] acc_o,
  output logic          valid_o
);
  logic [AW-1:0] fb_q;       // 18-bit Register of the figure (feedback)
  logic [AW-1:0] acc_q;      // 18-bit Accumulator Register (output)
  logic [AW-1:0] addend;
  logic [AW-1:0] sum;
  logic [AW-1:0] sum_to_acc, sum_to_fb;
  logic          sum_cout_unused;

  assign addend = first_i ? '0 : fb_q;

  csla #(.W(AW)) u_add (
    .a(addend), .b(AW'(prod_i)), .cin(1'b0), .sum(sum), .cout(sum_cout_unused)
  );

  for (genvar k = 0; k < AW; k++) begin : g_copy
    feynman_gate u_copy (
      .a(sum[k]), .b(1'b0), .p(sum_to_acc[k]), .q(sum_to_fb[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q   <= '0;
      fb_q    <= '0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) begin
        acc_q <= sum_to_acc;
        fb_q  <= sum_to_fb;
      end
    end
  end

  assign acc_o = acc_q;

  // The output and feedback copies never differ. The check is switched off
  // while rst_n is low, which is why lint reports rst_n as used both as an
  // asynchronous reset and as a synchronous signal.
  a_copies_match: assert property (@(posedge clk) disable iff (!rst_n) acc_q == fb_q);
endmodule
