// tb_mac_top - end-to-end test of the MAC at its default parameters: 32-bit operands,
// 64-bit product, 66-bit accumulator.
// A reference model forms each product and running sum with integer
// arithmetic; acc_o and valid_o are compared every cycle against the model
// value from two clocks earlier, which checks the two-cycle latency and the
// one-operand-pair-per-clock rate. The stream mixes sums of random length,
// restarts (first_i), idle cycles (valid_i low), all-ones operands and sums
// that wrap around 2^(2N+2); each of these is counted and must occur.
module tb_mac_top;
  localparam int unsigned N    = 32;
  localparam int unsigned AW   = 2 * N + 2;
  localparam int unsigned NCYC = 20000;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          valid_i, first_i;
  logic [N-1:0]  a_i, b_i;
  logic [AW-1:0] acc_o;
  logic          valid_o;

  int checks = 0, failures = 0;
  int n_acc = 0, n_first = 0, n_idle = 0, n_wrap = 0, n_max = 0;

  mac_top dut (
    .clk(clk), .rst_n(rst_n), .valid_i(valid_i), .first_i(first_i),
    .a_i(a_i), .b_i(b_i), .acc_o(acc_o), .valid_o(valid_o)
  );

  always #5 clk = ~clk;

  initial begin
    #((NCYC + 100) * 10);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Random operand: all ones, dense (two words ORed) or uniform.
  function automatic logic [N-1:0] rand_op();
    logic [63:0] r;
    case ($urandom % 4)
      0:       return '1;
      1:       r = {$urandom | $urandom, $urandom | $urandom};
      default: r = {$urandom, $urandom};
    endcase
    return N'(r);
  endfunction

  // Running sum of the model after each sampled edge, kept two edges deep.
  logic [AW-1:0] model;
  logic [AW-1:0] hist [2];
  logic          hist_v [2];

  initial begin
    logic [AW:0] wide;
    // Start high so that the reset below is a real falling edge.
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    valid_i = 1'b0; first_i = 1'b0; a_i = '0; b_i = '0;
    model = '0;
    for (int k = 0; k < 2; k++) begin hist[k] = '0; hist_v[k] = 1'b0; end
    repeat (2) @(negedge clk);
    checks++;
    if (acc_o !== '0 || valid_o !== 1'b0) begin
      failures++;
      $display("FAIL reset: acc_o=%h valid_o=%0b", acc_o, valid_o);
    end
    rst_n = 1'b1;
    for (int cyc = 0; cyc < NCYC; cyc++) begin
      valid_i = ($urandom % 5) != 0;
      first_i = ($urandom % 10) == 0;
      a_i     = rand_op();
      b_i     = rand_op();

      // Model the edge that samples these inputs.
      hist[1] = hist[0]; hist_v[1] = hist_v[0];
      if (valid_i) begin
        wide = (first_i ? '0 : {1'b0, model}) + (AW + 1)'((2 * N)'(a_i) * (2 * N)'(b_i));
        if (first_i) n_first++; else n_acc++;
        if (wide[AW]) n_wrap++;
        if (a_i == '1 && b_i == '1) n_max++;
        model = wide[AW-1:0];
      end else begin
        n_idle++;
      end
      hist[0] = model; hist_v[0] = valid_i;

      @(negedge clk);
      // The outputs now reflect the inputs sampled one edge earlier.
      if (cyc >= 1) begin
        checks++;
        if (acc_o !== hist[1] || valid_o !== hist_v[1]) begin
          failures++;
          if (failures < 10)
            $display("FAIL cyc %0d: acc_o=%h exp=%h valid_o=%0b exp=%0b",
                     cyc, acc_o, hist[1], valid_o, hist_v[1]);
        end
      end
    end
    $display("N=%0d: accumulate=%0d restart=%0d idle=%0d wrap=%0d all_ones=%0d",
             N, n_acc, n_first, n_idle, n_wrap, n_max);
    checks++;
    if (n_acc == 0 || n_first == 0 || n_idle == 0 || n_wrap == 0 || n_max == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
