// pixel_sram: window memory with bit-serial ADD/SUB readout.
//
// BLOCKS blocks of PIX_W bit-rows by COLS columns; each block holds one row
// of pixels. The sensor writes a whole pixel row at once: wr_data carries
// all COLS pixels and wr_en selects the block, so after five row writes
// the memory holds the last five image rows, in any block order (the window
// sums do not depend on it).
//
// Reading is bit-serial without shift registers: row_sel (C9) selects bit
// row k of every block, and in each block one column is switched onto the
// ADD bus (the column entering the window, col_sel) and the column five
// places to the left onto the SUB bus (the column leaving it). sub_zero
// (decoder output R) forces the SUB bus to zero for the first five columns.
// row_sel[PIX_W] is the bus discharge cycle and reads zero. Each bus bit is
// sampled by a flip-flop (the sense-amplifier flip-flop), so the bit selected
// in cycle k appears on add_bit/sub_bit in cycle k+1.
//
// The array is not reset: only written pixels are ever read.
module pixel_sram #(
  parameter int unsigned COLS   = 32,
  parameter int unsigned BLOCKS = 5,
  parameter int unsigned PIX_W  = 8,
  parameter int unsigned WIN    = 5
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [BLOCKS-1:0]          wr_en,
  input  logic [COLS-1:0][PIX_W-1:0] wr_data,
  input  logic [PIX_W:0]             row_sel,
  input  logic [COLS-1:0]            col_sel,
  input  logic                       sub_zero,
  output logic [BLOCKS-1:0]          add_bit,
  output logic [BLOCKS-1:0]          sub_bit
);
  logic [PIX_W-1:0] mem [BLOCKS][COLS];
  logic [COLS-1:0]  sub_sel;
  logic [BLOCKS-1:0] add_bus, sub_bus;

  always_ff @(posedge clk) begin
    for (int b = 0; b < int'(BLOCKS); b++) begin
      if (wr_en[b]) begin
        for (int c = 0; c < int'(COLS); c++) mem[b][c] <= wr_data[c];
      end
    end
  end

  // SUB column = ADD column - WIN
  always_comb begin
    sub_sel = '0;
    for (int c = 0; c + int'(WIN) < int'(COLS); c++) sub_sel[c] = col_sel[c + int'(WIN)] & ~sub_zero;
  end

  always_comb begin
    for (int b = 0; b < int'(BLOCKS); b++) begin
      add_bus[b] = 1'b0;
      sub_bus[b] = 1'b0;
      for (int c = 0; c < int'(COLS); c++) begin
        add_bus[b] |= col_sel[c] & |(row_sel[PIX_W-1:0] & mem[b][c]);
        sub_bus[b] |= sub_sel[c] & |(row_sel[PIX_W-1:0] & mem[b][c]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      add_bit <= '0;
      sub_bit <= '0;
    end else begin
      add_bit <= add_bus;
      sub_bit <= sub_bus;
    end
  end

  assert property (@(posedge clk) $onehot0(col_sel))
    else $error("pixel_sram: more than one column selected");
endmodule
