// c64_counter: C64, a synchronous binary up-counter (6 bits by default).
//
// The low five bits number the memory column read in the current period
// (0..31); the top bit becomes 1 after the last column and marks the extra
// period that moves the last window through the second pipeline stage.
// It counts once per period (inc is high in one cycle of the period) and
// clear returns it to zero for the start of a scan; reset also clears it.
module c64_counter #(
  parameter int unsigned W = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         inc,
  output logic [W-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     count <= '0;
    else if (clear) count <= '0;
    else if (inc)   count <= count + 1'b1;
  end
endmodule
