// bs_adder: bit-serial two's complement adder / subtractor, LSB first.
//
// One full adder plus a carry register. With SUB = 1 the b operand is
// inverted and the carry starts at 1, so s = a - b. A word of any length is
// processed one bit per enabled cycle; the number of cycles equals the
// width of the result. The sum bit is combinational from a, b and the
// stored carry (the next register in the bit-serial chain samples it).
//
// start marks the cycle that carries bit 0: the stored carry is ignored in
// that cycle and replaced by the initial carry (0 for add, 1 for subtract).
// en is the clock enable that stands for the gated clock of the block.
module bs_adder #(
  parameter bit SUB = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic start,
  input  logic a,
  input  logic b,
  output logic s
);
  logic carry_q, cin, bx;

  assign bx  = b ^ SUB;
  assign cin = start ? SUB : carry_q;
  assign s   = a ^ bx ^ cin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  carry_q <= 1'b0;
    else if (en) carry_q <= (a & bx) | (a & cin) | (bx & cin);
  end
endmodule
