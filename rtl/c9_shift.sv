// c9_shift: C9, the one-hot bit-row select of the pixel memory.
//
// In cycles 0..7 of a period bit k selects memory row k, i.e. bit k of
// every pixel, so pixels are read bit-serially LSB first; in cycle 8 bit 8
// is high and discharges the read buses. The token then shifts out and the
// register stays all-zero (its clock stops) until restart loads bit 0
// again for the next period. Reset also loads bit 0, so the first read
// after power-up is bit 0.
module c9_shift #(
  parameter int unsigned LEN = 9
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic           restart,
  output logic [LEN-1:0] row
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       row <= LEN'(1);
    else if (restart) row <= LEN'(1);
    else if (en)      row <= {row[LEN-2:0], 1'b0};
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(row))
    else $error("c9_shift: more than one row selected");
endmodule
