// tb_feynman_gate - exhaustive check of the Feynman gate against its truth
// table (p = a, q = a xor b), written out row by row.
module tb_feynman_gate;
  logic a, b, p, q;
  int   checks = 0, failures = 0;

  // Expected {p, q} for inputs {a, b} = 00, 01, 10, 11.
  localparam logic [1:0] EXP [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({p, q} !== EXP[i]) begin
        failures++;
        $display("FAIL a=%0b b=%0b got p=%0b q=%0b", a, b, p, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
