// sqrt_nr: radix-2 non-restoring integer square root, one digit per cycle.
//
// The radicand is scanned two bits at a time from the MSB. Each iteration
// appends the next two radicand bits to the partial remainder R and
//   if R >= 0: R = 4R + d - (4Q + 1)     (try the digit 1)
//   if R <  0: R = 4R + d + (4Q + 3)     (undo the previous over-subtraction)
// and the new root digit is 1 when the new R is non-negative. Only one
// adder/subtractor of WQ+2 bits is needed (15 bits for a 13-bit root): the
// subtract is done by inverting the partial-root operand in front of the
// adder, a sparse radix-4 carry-lookahead adder (cla_sparse).
//
// Interface and timing: load (with radicand) starts a root; the next WQ
// enabled cycles each produce one digit, MSB first, on q_bit with q_valid
// high in the following cycle. root holds the digits produced so far and
// the full floor(sqrt(radicand)) after WQ iterations; done is then high.
// q_bit and q_valid are 0 in every cycle after one without an iteration
// (not enabled, or all digits done), so a digit is never seen twice.
module sqrt_nr #(
  parameter int unsigned WQ = 13
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic            load,
  input  logic [2*WQ-1:0] radicand,
  output logic            q_bit,
  output logic            q_valid,
  output logic [WQ-1:0]   root,
  output logic            done
);
  localparam int unsigned WR = WQ + 2;   // partial remainder / adder width
  localparam int unsigned CNTW = $clog2(WQ + 1);

  logic [2*WQ-1:0] rad_q;
  logic [WR-1:0]   r_q, r_d, opa, opb;
  logic [WQ-1:0]   root_q;
  logic [CNTW-1:0] cnt_q;
  logic            neg, digit, unused_cout;

  assign neg = r_q[WR-1];
  assign opa = {r_q[WR-3:0], rad_q[2*WQ-1 -: 2]};
  // subtract {Q,0,1} when R >= 0 (invert + carry-in), add {Q,1,1} otherwise
  assign opb = neg ? {root_q, 1'b1, 1'b1} : ~{root_q, 1'b0, 1'b1};

  cla_sparse #(.W(WR)) u_add (
    .a(opa), .b(opb), .cin(~neg), .s(r_d), .cout(unused_cout)
  );
  assign digit = ~r_d[WR-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rad_q <= '0; r_q <= '0; root_q <= '0; cnt_q <= '0;
      q_bit <= 1'b0; q_valid <= 1'b0;
    end else if (load) begin
      rad_q <= radicand; r_q <= '0; root_q <= '0; cnt_q <= CNTW'(WQ);
      q_bit <= 1'b0; q_valid <= 1'b0;
    end else if (en && cnt_q != 0) begin
      rad_q   <= {rad_q[2*WQ-3:0], 2'b00};
      r_q     <= r_d;
      root_q  <= {root_q[WQ-2:0], digit};
      cnt_q   <= cnt_q - 1'b1;
      q_bit   <= digit;
      q_valid <= 1'b1;
    end else begin
      q_bit   <= 1'b0;
      q_valid <= 1'b0;
    end
  end

  assign root = root_q;
  assign done = (cnt_q == 0);
endmodule
