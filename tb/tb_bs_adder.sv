// tb_bs_adder: checks the bit-serial adder and subtractor on random 16-bit
// two's complement words fed LSB first (17 result bits per word), with
// the clock enable dropped at random cycles in the middle of a word.
module tb_bs_adder;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, start = 1'b0, a = 1'b0, b = 1'b0;
  logic s_add, s_sub;

  bs_adder #(.SUB(1'b0)) u_add (.clk, .rst_n, .en, .start, .a, .b, .s(s_add));
  bs_adder #(.SUB(1'b1)) u_sub (.clk, .rst_n, .en, .start, .a, .b, .s(s_sub));
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      logic signed [16:0] x, y, sum_ref, dif_ref, sum_got, dif_got;
      x = 17'(signed'(16'($urandom))); y = 17'(signed'(16'($urandom)));
      if (n == 0) begin x = 17'h1FFFF; y = 17'h00001; end
      sum_ref = x + y; dif_ref = x - y;
      for (int k = 0; k < 17; k++) begin
        // a gated cycle: inputs change but nothing must be stored
        if ($urandom_range(0, 3) == 0) begin
          @(negedge clk); en = 1'b0; start = 1'b0; a = ~a; b = ~b;
        end
        @(negedge clk);
        en = 1'b1; start = (k == 0); a = x[k]; b = y[k];
        #1 sum_got[k] = s_add; dif_got[k] = s_sub;
      end
      checks++;
      if (sum_got !== sum_ref || dif_got !== dif_ref) begin
        failures++;
        $display("%0d,%0d: sum %0d (exp %0d) diff %0d (exp %0d)", x, y, sum_got, sum_ref, dif_got, dif_ref);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
