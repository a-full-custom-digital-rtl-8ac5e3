// tb_sqrt_nr: checks the non-restoring square root against an exact
// integer square root for edge values and random 26-bit radicands, and
// checks that the 13 digits come out MSB first, one per cycle, with the
// unit done exactly 13 cycles after load.
module tb_sqrt_nr;
  localparam int WQ = 13;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, load = 1'b0;
  logic [2*WQ-1:0] radicand = '0;
  logic q_bit, q_valid, done;
  logic [WQ-1:0] root;

  sqrt_nr #(.WQ(WQ)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned isqrt(longint unsigned v);
    longint unsigned lo = 0, hi = 1 << WQ;
    while (hi - lo > 1) begin
      longint unsigned m = (lo + hi) / 2;
      if (m * m <= v) lo = m; else hi = m;
    end
    return int'(lo);
  endfunction

  task automatic run(logic [2*WQ-1:0] v);
    logic [WQ-1:0] digits = '0;
    int unsigned ref_root = isqrt(v);
    int n = 0;
    @(negedge clk); radicand = v; load = 1'b1; en = 1'b1;
    @(negedge clk); load = 1'b0;
    for (int i = 0; i < WQ + 2; i++) begin
      @(posedge clk); #1;
      if (q_valid) begin digits = {digits[WQ-2:0], q_bit}; n++; end
      if (i == WQ - 1) begin
        checks++;
        if (!done) begin failures++; $display("not done after %0d cycles", WQ); end
      end
    end
    checks++;
    if (root !== WQ'(ref_root) || digits !== WQ'(ref_root) || n != WQ) begin
      failures++;
      $display("sqrt(%0d): root=%0d digits=%0d n=%0d expected %0d", v, root, digits, n, ref_root);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1'b1;
    run(0); run(1); run(2); run(3); run(4); run(24); run(25); run(26);
    run(26'h3FFFFFF); run(26'(40640625)); run(26'(8191 * 8191)); run(26'(8191 * 8191 - 1));
    for (int i = 0; i < 2000; i++) run(26'($urandom));
    for (int i = 0; i < 500; i++) begin
      int unsigned r = $urandom_range(0, 8191);
      run(26'(r * r)); run(26'(r * r - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
