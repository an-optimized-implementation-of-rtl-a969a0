// mac_top - N-bit multiply-accumulate unit, F = sum of a_i * b_i.
//
// How it works: an unsigned N x N array multiplier (carry-save array with a
// carry-select final adder) forms the 2N-bit product of a_i and b_i. The
// product, widened to 2N+1 bits, is captured in the product register together
// with its valid and first flags. In the next cycle the accumulator stage adds
// it to the running sum with a carry-select adder and stores the result, 2N+2
// bits wide, in the accumulator register (the output) and in the feedback
// register. first_i marks the first operand pair of a new sum; cycles with
// valid_i low leave the sum unchanged.
//
// The block structure and the register widths (2N+1 product register, 2N+2
// accumulator and feedback registers; 17 and 18 bits for N = 8) follow the
// published MAC architecture; the default N = 32 is the 32-bit MAC with a
// 64-bit product that the design targets. Unsigned operands, the valid/first
// handshake and the reset are this design's choices.
//
// Interface: clk, rst_n (asynchronous, active low); valid_i, first_i,
// a_i, b_i (N bits) in; acc_o (2N+2 bits), valid_o out.
// Timing: operands sampled at clock edge t appear in acc_o after edge t+1
// (two-stage pipeline); valid_o is high in the cycle acc_o carries a new sum.
// One operand pair can be accepted every clock.
module mac_top #(
  parameter int unsigned N = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid_i,
  input  logic             first_i,
  input  logic [N-1:0]     a_i,
  input  logic [N-1:0]     b_i,
  output logic [2*N+1:0]   acc_o,
  output logic             valid_o
);
  localparam int unsigned PW = 2 * N + 1;
  localparam int unsigned AW = 2 * N + 2;

  logic [2*N-1:0] product;
  logic [PW-1:0]  prod_q;      // product register
  logic           prod_valid_q;
  logic           prod_first_q;

  array_multiplier #(.N(N)) u_mult (
    .a(a_i), .b(b_i), .p(product)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_q       <= '0;
      prod_valid_q <= 1'b0;
      prod_first_q <= 1'b0;
    end else begin
      prod_valid_q <= valid_i;
      prod_first_q <= valid_i & first_i;
      if (valid_i) prod_q <= PW'(product);
    end
  end

  mac_accumulator #(.PW(PW), .AW(AW)) u_acc (
    .clk    (clk),
    .rst_n  (rst_n),
    .valid_i(prod_valid_q),
    .first_i(prod_first_q),
    .prod_i (prod_q),
    .acc_o  (acc_o),
    .valid_o(valid_o)
  );
endmodule
