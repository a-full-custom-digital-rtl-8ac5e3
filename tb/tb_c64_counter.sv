// tb_c64_counter: checks the 6-bit period counter: counts on inc only,
// wraps after 63, and clear wins over inc.
module tb_c64_counter;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, inc = 1'b0;
  logic [5:0] count;

  c64_counter #(.W(6)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_c = 0;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      checks++;
      if (count !== 6'(exp_c)) begin failures++; $display("step %0d: %0d exp %0d", n, count, exp_c); end
      inc = ($urandom_range(0, 2) != 0); clear = (n % 150 == 149);
      @(negedge clk);
      if (clear) exp_c = 0; else if (inc) exp_c = (exp_c + 1) % 64;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
