// c30_ring: C30, the one-hot cycle counter of the 30-cycle pipeline period.
//
// A ring shift register with a single '1': bit c is high in cycle c of the
// period (c = 0 .. LEN-1) and the token wraps from LEN-1 back to 0. One-hot
// coding lets every control and clock-gating signal be taken straight from
// one bit (or an OR of a few bits) without decoding. sync forces the token
// to bit 0 for the next cycle; the ring advances only while run is high.
// Reset puts the token on bit 0.
module c30_ring #(
  parameter int unsigned LEN = 30
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           run,
  input  logic           sync,
  output logic [LEN-1:0] state
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state <= LEN'(1);
    else if (sync)  state <= LEN'(1);
    else if (run)   state <= {state[LEN-2:0], state[LEN-1]};
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot(state))
    else $error("c30_ring: state is not one-hot");
endmodule
