// tb_mac_accumulator - checks the accumulation stage at its default widths
// (65-bit product in, 66-bit sum) against a reference model of the running
// sum. Random streams mix accumulating cycles, restarts (first_i), idle cycles
// (valid_i low) and large products so that the sum wraps around 2^66; each of
// these is counted and must occur. The one-cycle latency from valid_i to
// valid_o and acc_o is checked every cycle.
module tb_mac_accumulator;
  localparam int unsigned PW = 65;
  localparam int unsigned AW = 66;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          valid_i, first_i;
  logic [PW-1:0] prod_i;
  logic [AW-1:0] acc_o;
  logic          valid_o;

  logic [AW-1:0] model;
  logic [AW:0]   wide;
  int checks = 0, failures = 0;
  int n_acc = 0, n_first = 0, n_idle = 0, n_wrap = 0;

  mac_accumulator dut (
    .clk(clk), .rst_n(rst_n), .valid_i(valid_i), .first_i(first_i),
    .prod_i(prod_i), .acc_o(acc_o), .valid_o(valid_o)
  );

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [PW-1:0] rand_prod(input bit big);
    logic [PW-1:0] v;
    v = {1'($urandom), $urandom, $urandom};
    if (big) v = v | {1'b0, 32'hFFFF_FFFF, 32'h0};
    return v;
  endfunction

  initial begin
    // Start high so that the reset below is a real falling edge.
    rst_n = 1'b1;
    #1 rst_n = 1'b0; valid_i = 1'b0; first_i = 1'b0; prod_i = '0;
    model = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (acc_o !== '0 || valid_o !== 1'b0) begin
      failures++;
      $display("FAIL reset: acc_o=%h valid_o=%0b", acc_o, valid_o);
    end
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      // Drive this cycle's inputs.
      valid_i = ($urandom % 4) != 0;
      first_i = ($urandom % 8) == 0;
      prod_i  = rand_prod(($urandom % 2) == 0);
      // Model the edge.
      if (valid_i) begin
        wide = (first_i ? '0 : {1'b0, model}) + (AW + 1)'(prod_i);
        if (first_i) n_first++;
        else         n_acc++;
        if (wide[AW]) n_wrap++;
        model = wide[AW-1:0];
      end else begin
        n_idle++;
      end
      @(negedge clk);
      checks++;
      if (acc_o !== model || valid_o !== valid_i) begin
        failures++;
        if (failures < 10)
          $display("FAIL cyc %0d: acc_o=%h exp=%h valid_o=%0b exp=%0b",
                   cyc, acc_o, model, valid_o, valid_i);
      end
    end
    $display("accumulate=%0d restart=%0d idle=%0d wrap=%0d", n_acc, n_first, n_idle, n_wrap);
    checks++;
    if (n_acc == 0 || n_first == 0 || n_idle == 0 || n_wrap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
