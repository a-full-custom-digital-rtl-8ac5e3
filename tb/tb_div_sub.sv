// tb_div_sub: checks the subtractive divider in the way the unit uses it:
// a 13-bit dividend fed MSB first, then 15 zero bits, divided by a 13-bit
// divisor, must give floor(dividend * 2^15 / divisor) in 28 steps. Also
// checks the zero-divisor / zero-dividend case (all ones) and that step
// low holds the state.
module tb_div_sub;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, step = 1'b0, d_bit = 1'b0;
  logic [12:0] divisor = '0;
  logic [27:0] quotient;

  div_sub #(.WD(13), .WQ(28)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [12:0] dd, logic [12:0] dv);
    longint unsigned q_ref;
    q_ref = (dv == 0) ? ((64'd1 << 28) - 1) : ((64'(dd) << 15) / dv);
    @(negedge clk); load = 1'b1; divisor = dv;
    @(negedge clk); load = 1'b0;
    for (int k = 0; k < 28; k++) begin
      if ($urandom_range(0, 4) == 0) begin step = 1'b0; d_bit = 1'b1; @(negedge clk); end
      step = 1'b1; d_bit = (k < 13) ? dd[12-k] : 1'b0;
      @(negedge clk);
    end
    step = 1'b0;
    checks++;
    if (quotient !== q_ref[27:0]) begin
      failures++; $display("%0d/%0d: got %h exp %h", dd, dv, quotient, q_ref);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1'b1;
    run(0, 0); run(0, 5); run(13'h1FFF, 1); run(6375, 6375); run(1, 6375); run(8191, 8191);
    for (int n = 0; n < 3000; n++) run(13'($urandom), 13'($urandom_range(1, 8191)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
