// div_sub: subtractive radix-2 divider with a bit-serial dividend.
//
// Long division as done by hand: each step appends the next dividend bit
// (MSB first) to the partial remainder and subtracts the divisor with a
// (WD+1)-bit sparse carry-lookahead adder. A non-negative difference gives
// quotient bit 1 and becomes the new remainder; otherwise the quotient bit
// is 0 and the shifted remainder is kept. After the dividend bits run out,
// feeding zeros continues the division into fraction bits, so the number
// of steps sets the precision: 13 integer and 15 fraction steps give the
// Q13.15 speckle contrast.
//
// Interface and timing: load latches the divisor and clears remainder and
// quotient. Each cycle with step high consumes d_bit and shifts one
// quotient bit into quotient (MSB first, so after WQ steps quotient holds
// the full result). A zero divisor gives an all-ones quotient for a zero
// dividend.
module div_sub #(
  parameter int unsigned WD = 13,
  parameter int unsigned WQ = 28
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [WD-1:0] divisor,
  input  logic          step,
  input  logic          d_bit,
  output logic [WQ-1:0] quotient
);
  logic [WD-1:0] rem_q, div_q;
  logic [WD:0]   trial, diff;
  logic          no_borrow;

  assign trial = {rem_q, d_bit};
  cla_sparse #(.W(WD + 1)) u_sub (
    .a(trial), .b(~{1'b0, div_q}), .cin(1'b1), .s(diff), .cout(no_borrow)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem_q <= '0; div_q <= '0; quotient <= '0;
    end else if (load) begin
      rem_q <= '0; div_q <= divisor; quotient <= '0;
    end else if (step) begin
      rem_q    <= no_borrow ? diff[WD-1:0] : trial[WD-1:0];
      quotient <= {quotient[WQ-2:0], no_borrow};
    end
  end
endmodule
