// tb_bs_squarer: checks the 8-bit and 13-bit bit-serial squarers.
// All 256 8-bit values and random 13-bit values are squared back to back;
// bit k of the square must appear one cycle after input bit k, the output
// must be zero after 2W bits, input bits beyond W must be ignored, and the
// stored word (value) must keep the previous word's bit k until bit k of
// the next word arrives.
module tb_bs_squarer;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, start = 1'b0, clear = 1'b0;
  logic x8 = 1'b0, x13 = 1'b0, y8, y13;
  logic [7:0]  v8;
  logic [12:0] v13;

  bs_squarer #(.W(8))  u8  (.clk, .rst_n, .en, .start, .clear, .x(x8),  .y(y8),  .value(v8));
  bs_squarer #(.W(13)) u13 (.clk, .rst_n, .en, .start, .clear, .x(x13), .y(y13), .value(v13));
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [12:0] prev13 = '0;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    @(negedge clk); clear = 1'b1; @(negedge clk); clear = 1'b0;
    for (int n = 0; n < 600; n++) begin
      logic [7:0]  a;
      logic [12:0] b;
      logic [29:0] g8, g13;
      a = 8'(n); b = (n == 1) ? 13'h1FFF : 13'($urandom);
      g8 = '0; g13 = '0;
      for (int k = 0; k <= 29; k++) begin
        @(negedge clk);
        if (k > 0) begin g8[k-1] = y8; g13[k-1] = y13; end
        // the stored bit k still holds the previous word before bit k arrives
        if (k < 13) begin
          checks++;
          if (v13[k] !== prev13[k]) begin failures++; $display("value bit %0d lost early", k); end
        end
        en = 1'b1; start = (k == 0);
        x8  = (k < 8)  ? a[k] : 1'b1;   // bits past the width must be ignored
        x13 = (k < 13) ? b[k] : 1'b1;
      end
      checks += 2;
      if (g8 !== 30'(a) * 30'(a)) begin failures++; $display("%0d^2: got %0d", a, g8); end
      if (g13 !== 30'(b) * 30'(b)) begin failures++; $display("%0d^2: got %0d", b, g13); end
      checks++;
      if (v13 !== b || v8 !== a) begin failures++; $display("stored word wrong"); end
      prev13 = b;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
