// tb_pixel_sram: writes five random pixel rows, then for every column
// select reads all bit rows and checks that each block's ADD bus gives the
// selected column's pixel and the SUB bus the pixel five columns to the
// left (zero while R is high), LSB first, one cycle after the select, and
// that the discharge row reads zero.
module tb_pixel_sram;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [4:0] wr_en = '0;
  logic [31:0][7:0] wr_data = '0;
  logic [8:0] row_sel = '0;
  logic [31:0] col_sel = '0;
  logic sub_zero = 1'b0;
  logic [4:0] add_bit, sub_bit;

  pixel_sram #(.COLS(32), .BLOCKS(5), .PIX_W(8), .WIN(5)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] img [5][32];

  initial begin
    repeat (2) @(negedge clk); rst_n = 1'b1;
    for (int b = 0; b < 5; b++) begin
      for (int c = 0; c < 32; c++) begin img[b][c] = 8'($urandom); wr_data[c] = img[b][c]; end
      wr_en = 5'(1) << b; @(negedge clk); wr_en = '0; @(negedge clk);
    end
    for (int p = 0; p < 32; p++) begin
      logic [7:0] ga [5], gs [5];
      col_sel = 32'(1) << p; sub_zero = (p < 5);
      for (int k = 0; k <= 9; k++) begin
        row_sel = (k < 9) ? 9'(1) << k : 9'd0;
        @(negedge clk);
        for (int b = 0; b < 5; b++) begin
          if (k < 8) begin ga[b][k] = add_bit[b]; gs[b][k] = sub_bit[b]; end
          else begin
            checks++;
            if (add_bit[b] || sub_bit[b]) begin failures++; $display("bus not zero at row %0d", k); end
          end
        end
      end
      for (int b = 0; b < 5; b++) begin
        checks += 2;
        if (ga[b] !== img[b][p]) begin failures++; $display("col %0d blk %0d ADD %h exp %h", p, b, ga[b], img[b][p]); end
        if (gs[b] !== ((p < 5) ? 8'd0 : img[b][p-5])) begin failures++; $display("col %0d blk %0d SUB %h", p, b, gs[b]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
