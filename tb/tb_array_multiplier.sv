// tb_array_multiplier - checks the array multiplier against the integer
// product: exhaustively for the 8-bit multiplier (all 65536 operand pairs),
// and for the default 32-bit multiplier with corner operands and random
// operands of random bit density.
module tb_array_multiplier;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [31:0] a32, b32;
  logic [63:0] p32;
  int          checks = 0, failures = 0;

  array_multiplier #(.N(8)) dut8 (.a(a8), .b(b8), .p(p8));
  array_multiplier dut32 (.a(a32), .b(b32), .p(p32));

  task automatic check32(input logic [31:0] x, input logic [31:0] y);
    logic [63:0] exp;
    a32 = x; b32 = y;
    #1;
    exp = 64'(x) * 64'(y);
    checks++;
    if (p32 !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL32 %h * %h: got %h exp %h", x, y, p32, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        checks++;
        if (p8 !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL8 %0d * %0d: got %0d", i, j, p8);
        end
      end
    end
    check32(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    check32(32'hFFFF_FFFF, 32'h1);
    check32(32'h8000_0000, 32'h8000_0000);
    check32(32'h0, 32'hDEAD_BEEF);
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] x, y;
      x = $urandom; y = $urandom;
      case (i % 3)
        0: begin x = x | $urandom; y = y | $urandom; end
        1: begin x = x & $urandom; y = y & $urandom; end
        default: ;
      endcase
      check32(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
