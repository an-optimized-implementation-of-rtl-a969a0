// tb_csla - checks the carry-select adder against the integer sum.
// Two instances: the default 32-bit adder with 4-bit groups, and a 13-bit
// adder with 5-bit groups whose last group is short. Corner operands that
// push a carry through every group come first, then random operands with
// both carry-in values.
module tb_csla;
  logic [31:0] a32, b32, s32;
  logic        ci32, co32;
  logic [12:0] a13, b13, s13;
  logic        ci13, co13;
  int          checks = 0, failures = 0;

  csla dut32 (.a(a32), .b(b32), .cin(ci32), .sum(s32), .cout(co32));
  csla #(.W(13), .BLK(5)) dut13 (.a(a13), .b(b13), .cin(ci13), .sum(s13), .cout(co13));

  task automatic check32(input logic [31:0] x, input logic [31:0] y, input logic c);
    logic [32:0] exp;
    a32 = x; b32 = y; ci32 = c;
    #1;
    exp = 33'(x) + 33'(y) + 33'(c);
    checks++;
    if ({co32, s32} !== exp) begin
      failures++;
      $display("FAIL32 %h + %h + %0b: got %h exp %h", x, y, c, {co32, s32}, exp);
    end
  endtask

  task automatic check13(input logic [12:0] x, input logic [12:0] y, input logic c);
    logic [13:0] exp;
    a13 = x; b13 = y; ci13 = c;
    #1;
    exp = 14'(x) + 14'(y) + 14'(c);
    checks++;
    if ({co13, s13} !== exp) begin
      failures++;
      $display("FAIL13 %h + %h + %0b: got %h exp %h", x, y, c, {co13, s13}, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check32(32'hFFFF_FFFF, 32'h0, 1'b1);
    check32(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    check32(32'h0, 32'h0, 1'b0);
    check32(32'h7FFF_FFFF, 32'h1, 1'b0);
    for (int g = 0; g < 8; g++) check32(32'hFFFF_FFFF >> (4 * g), 32'h1, 1'b0);
    check13(13'h1FFF, 13'h0, 1'b1);
    check13(13'h1FFF, 13'h1FFF, 1'b1);
    check13(13'h0FFF, 13'h1, 1'b0);
    for (int i = 0; i < 20000; i++) begin
      check32($urandom, $urandom, 1'($urandom));
      check13(13'($urandom), 13'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
