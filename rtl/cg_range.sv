// cg_range: clock-gating signal of one latch group.
//
// Latch groups of the bit-serial datapath only need their clock in the
// cycles where their word is passing through. phi[X] enables a group in
// cycle X of the period only, phi[X:Y] in cycles X..Y (wrapping past 29 if
// Y < X). The enable is an OR of the matching C30 one-hot bits, qualified by
// gate (the group's pipeline stage is active in this period). In this RTL
// the enable drives the registers' clock-enable inputs; in a physical
// design it would drive a clock-gating cell.
module cg_range #(
  parameter int unsigned LEN = 30,
  parameter int unsigned X   = 0,
  parameter int unsigned Y   = 0
) (
  input  logic [LEN-1:0] c30,
  input  logic           gate,
  output logic           en
);
  logic [LEN-1:0] mask;

  always_comb begin
    for (int c = 0; c < int'(LEN); c++) begin
      if (X <= Y) mask[c] = (c >= int'(X)) && (c <= int'(Y));
      else        mask[c] = (c >= int'(X)) || (c <= int'(Y));
    end
  end

  assign en = gate & |(c30 & mask);
endmodule
