// bs_const_mult: bit-serial multiplier by a fixed constant M, LSB first.
//
// Multiplication by a constant is shift-and-add: every '1' at bit k of M
// adds the input delayed by k cycles (a left shift by k in a bit-serial
// stream). For M = 25 = 11001b the taps are 0, 3 and 4, so two bit-serial
// adders and a four-stage delay line do the work. The product bit is
// combinational from the input bit of the same cycle, the delay registers
// and the carry registers; the delay line is cleared on start so that no
// bits of the previous word leak into the new one.
module bs_const_mult #(
  parameter int unsigned M = 25
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic start,
  input  logic x,
  output logic y
);
  localparam int unsigned TAPS = $clog2(M + 1);  // bits of M

  // xd[k] = input delayed by k cycles (zero before start)
  logic [TAPS-1:0] xd;
  logic [TAPS-1:1] dly_q;
  assign xd[0] = x;
  for (genvar k = 1; k < TAPS; k++) begin : g_xd
    assign xd[k] = start ? 1'b0 : dly_q[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dly_q <= '0;
    else if (en) begin
      for (int k = 1; k < TAPS; k++) dly_q[k] <= xd[k-1];
    end
  end

  // acc[k]: serial sum of the taps of M at bits 0..k
  logic [TAPS-1:0] acc;
  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    if (k == 0) begin : g_first
      assign acc[0] = M[0] ? xd[0] : 1'b0;
    end else if (M[k] && (M & ((1 << k) - 1)) != 0) begin : g_add
      bs_adder #(.SUB(1'b0)) u_add (
        .clk, .rst_n, .en, .start,
        .a(acc[k-1]), .b(xd[k]), .s(acc[k])
      );
    end else if (M[k]) begin : g_only
      assign acc[k] = xd[k];
    end else begin : g_pass
      assign acc[k] = acc[k-1];
    end
  end

  assign y = acc[TAPS-1];
endmodule
