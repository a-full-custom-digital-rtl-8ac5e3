// tb_bs_const_mult: checks the bit-serial multiply by 25 on all 21-bit
// extremes and random words; the product bit k appears in the same cycle
// as input bit k, 26 product bits per word. Words follow each other
// without gaps, so a missing clear of the delay line shows up.
module tb_bs_const_mult;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, start = 1'b0, x = 1'b0, y;

  bs_const_mult #(.M(25)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      logic [20:0] v;
      logic [25:0] got, exp_p;
      v = (n == 0) ? 21'h1FFFFF : (n == 1) ? 21'd1 : 21'($urandom);
      exp_p = 26'(v) * 26'd25;
      for (int k = 0; k < 26; k++) begin
        @(negedge clk);
        en = 1'b1; start = (k == 0); x = (k < 21) ? v[k] : 1'b0;
        #1 got[k] = y;
      end
      // leave garbage on the input between words
      @(negedge clk); en = 1'b1; start = 1'b0; x = 1'b1;
      checks++;
      if (got !== exp_p) begin
        failures++; $display("25*%0d: got %0d", v, got);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
