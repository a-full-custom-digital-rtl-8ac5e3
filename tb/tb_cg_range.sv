// tb_cg_range: checks single-cycle, range and wrapping clock-gating
// signals against the cycle numbers they should cover, and the gate input.
module tb_cg_range;
  logic [29:0] c30; logic gate; logic e1, e2, e3;
  cg_range #(.LEN(30), .X(7),  .Y(7))  u1 (.c30, .gate, .en(e1));
  cg_range #(.LEN(30), .X(2),  .Y(28)) u2 (.c30, .gate, .en(e2));
  cg_range #(.LEN(30), .X(27), .Y(3))  u3 (.c30, .gate, .en(e3));
  int checks = 0, failures = 0;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int g = 0; g < 2; g++) for (int c = 0; c < 30; c++) begin
      c30 = 30'(1) << c; gate = 1'(g); #1;
      checks++;
      if (e1 !== (g == 1 && c == 7) || e2 !== (g == 1 && c >= 2 && c <= 28) ||
          e3 !== (g == 1 && (c >= 27 || c <= 3))) begin
        failures++; $display("g=%0d c=%0d: %b%b%b", g, c, e1, e2, e3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
