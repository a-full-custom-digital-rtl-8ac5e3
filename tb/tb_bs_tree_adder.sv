// tb_bs_tree_adder: checks the 6-input and 5-input bit-serial adders on
// random unsigned words (up to 21 bits, zero-padded to 24 cycles) and on
// all-ones inputs; the registered sum bit k must appear one cycle after
// input bit k.
module tb_bs_tree_adder;
  localparam int WB = 24;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, start = 1'b0;
  logic [5:0] x6 = '0;
  logic [4:0] x5 = '0;
  logic s6, s5;

  bs_tree_adder #(.NIN(6)) u6 (.clk, .rst_n, .en, .start, .x(x6), .s(s6));
  bs_tree_adder #(.NIN(5)) u5 (.clk, .rst_n, .en, .start, .x(x5), .s(s5));
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [20:0] v [6];
    logic [WB-1:0] r6, r5, g6, g5;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < 6; i++) v[i] = (n == 0) ? 21'h1FFFFF : 21'($urandom);
      r6 = 0; r5 = 0;
      for (int i = 0; i < 6; i++) r6 += WB'(v[i]);
      for (int i = 0; i < 5; i++) r5 += WB'(v[i]);
      for (int k = 0; k <= WB; k++) begin
        @(negedge clk);
        if (k > 0) begin g6[k-1] = s6; g5[k-1] = s5; end
        en = 1'b1; start = (k == 0);
        for (int i = 0; i < 6; i++) x6[i] = (k < 21) ? v[i][k] : 1'b0;
        for (int i = 0; i < 5; i++) x5[i] = (k < 21) ? v[i][k] : 1'b0;
      end
      checks++;
      if (g6 !== r6 || g5 !== r5) begin
        failures++; $display("sum6 %h exp %h, sum5 %h exp %h", g6, r6, g5, r5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
