// tb_c30_ring: checks that the one-hot cycle ring visits bits 0..29 in
// order and wraps, holds when run is low, and restarts at bit 0 on sync.
module tb_c30_ring;
  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0, sync = 1'b0;
  logic [29:0] state;

  c30_ring #(.LEN(30)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pos = 0;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      checks++;
      if (state !== 30'(1) << pos) begin failures++; $display("cycle %0d: %b, expected bit %0d", n, state, pos); end
      run  = ($urandom_range(0, 5) != 0);
      sync = (n == 200);
      @(negedge clk);
      if (sync) pos = 0;
      else if (run) pos = (pos + 1) % 30;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
