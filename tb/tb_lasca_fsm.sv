// tb_lasca_fsm: runs one scan of the controller and checks, cycle by
// cycle, the C30 cycle, the C9 bit-row select (bits 0..8 in cycles 0..8 of
// periods 0..31, zero otherwise), the column select and R, the stage
// flags, busy for 33 periods, done, and that start is ignored while busy.
module tb_lasca_fsm;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [29:0] c30; logic [8:0] row_sel; logic [31:0] col_sel;
  logic sub_zero, busy, ready, done, stage1, stage2, scan_first, tail;
  logic [5:0] period;

  lasca_fsm #(.COLS(32), .PERIOD(30), .ROWS(9)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what, int p, int c);
    checks++;
    if (!cond) begin failures++; $display("period %0d cycle %0d: %s", p, c, what); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1'b1;
    for (int scan = 0; scan < 2; scan++) begin
      @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
      for (int p = 0; p < 33; p++) begin
        for (int c = 0; c < 30; c++) begin
          if (p == 10 && c == 3) start = 1'b1;   // must be ignored
          else start = 1'b0;
          chk(busy, "not busy", p, c);
          chk(c30 == 30'(1) << c, "C30", p, c);
          chk(period == 6'(p), "C64", p, c);
          chk(row_sel == ((p < 32 && c < 9) ? 9'(1) << c : 9'd0), "C9", p, c);
          chk(col_sel == ((p < 32) ? 32'(1) << p : 32'd0), "column select", p, c);
          chk(sub_zero == (p < 5), "R", p, c);
          chk(stage1 == (p < 32) && stage2 == (p > 0), "stage flags", p, c);
          chk(scan_first == (p == 0 && c == 0), "scan_first", p, c);
          chk(!done, "early done", p, c);
          chk(ready == (p == 31 && c >= 9), "ready", p, c);
          chk(!tail, "tail without a chained start", p, c);
          @(negedge clk);
        end
      end
      start = 1'b0;
      chk(done && !busy, "done / busy at end", 33, 0);
      @(negedge clk);
      chk(!done, "done longer than one cycle", 33, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
