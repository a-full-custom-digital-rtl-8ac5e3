// tb_dec5to32: exhaustive check of the 5-to-32 decoder and of the R
// output (high for addresses 0..4).
module tb_dec5to32;
  logic [4:0] a; logic [31:0] y; logic r;
  dec5to32 dut (.*);
  int checks = 0, failures = 0;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 32; i++) begin
      a = 5'(i); #1;
      checks++;
      if (y !== 32'(1) << i || r !== (i < 5)) begin failures++; $display("a=%0d y=%b r=%b", i, y, r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
