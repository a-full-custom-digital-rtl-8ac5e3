// tb_c9_shift: checks that C9 starts at bit 0 after reset and restart,
// steps through bits 0..8 (one per enabled cycle), then stays all-zero.
module tb_c9_shift;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, restart = 1'b0;
  logic [8:0] row;

  c9_shift #(.LEN(9)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1'b1;
    for (int rep = 0; rep < 5; rep++) begin
      int pos;
      pos = 0;
      for (int n = 0; n < 14; n++) begin
        checks++;
        if (row !== ((pos < 9) ? 9'(1) << pos : 9'd0)) begin
          failures++; $display("rep %0d step %0d: %b", rep, n, row);
        end
        en = (rep % 2 == 0) ? 1'b1 : 1'($urandom_range(0, 1));
        @(negedge clk);
        if (en) pos++;
      end
      en = 1'b0; restart = 1'b1; @(negedge clk); restart = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
