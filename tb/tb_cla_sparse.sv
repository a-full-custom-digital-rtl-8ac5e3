// tb_cla_sparse: checks the sparse radix-4 carry-lookahead adder against
// the '+' operator, exhaustively for 6 bits and on random and corner
// operands (including the longest carry chain) for 15 and 14 bits.
module tb_cla_sparse;
  logic [14:0] a15, b15, s15; logic c15, ci15;
  logic [13:0] a14, b14, s14; logic c14, ci14;
  logic [5:0]  a6, b6, s6;    logic c6, ci6;

  cla_sparse #(.W(15)) u15 (.a(a15), .b(b15), .cin(ci15), .s(s15), .cout(c15));
  cla_sparse #(.W(14)) u14 (.a(a14), .b(b14), .cin(ci14), .s(s14), .cout(c14));
  cla_sparse #(.W(6))  u6  (.a(a6),  .b(b6),  .cin(ci6),  .s(s6),  .cout(c6));

  int checks = 0, failures = 0;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) for (int j = 0; j < 64; j++) for (int c = 0; c < 2; c++) begin
      a6 = 6'(i); b6 = 6'(j); ci6 = 1'(c); #1;
      checks++;
      if ({c6, s6} !== 7'(i) + 7'(j) + 7'(c)) begin failures++; $display("6b %0d+%0d+%0d", i, j, c); end
    end
    for (int n = 0; n < 20000; n++) begin
      a15 = 15'($urandom); b15 = 15'($urandom); ci15 = 1'($urandom);
      a14 = 14'($urandom); b14 = 14'($urandom); ci14 = 1'($urandom);
      if (n == 0) begin a15 = 15'b000000000000010; b15 = 15'b111111111111101; ci15 = 1'b1; end
      if (n == 1) begin a15 = 15'h7FFF; b15 = 15'h0002; ci15 = 1'b1; a14 = 14'h3FFF; b14 = 14'h0; ci14 = 1'b1; end
      #1;
      checks += 2;
      if ({c15, s15} !== 16'(a15) + 16'(b15) + 16'(ci15)) begin failures++; $display("15b %h+%h", a15, b15); end
      if ({c14, s14} !== 15'(a14) + 15'(b14) + 15'(ci14)) begin failures++; $display("14b %h+%h", a14, b14); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
