// bs_squarer: bit-serial LSB-first squarer of a W-bit unsigned word.
//
// Writing x = x0 + 2*y, x^2 = x0 + 4*x0*y + 4*y^2: the first bit squared is
// itself, the cross term is x0 ANDed with every later bit and shifted left,
// and the last term is the same problem one bit shorter. Unrolled, this
// becomes a chain of W-1 bit slices and one AND gate (cell W-1). Cell k:
//   - stores bit x_k in its own latch in cycle k, when that bit arrives. The
//     slices are thus reset one after another by the arriving word, not
//     cleared together. Until cycle k the latch still holds the previous word;
//   - in cycle k a multiplexer passes x_k itself (its square, weight 2^2k);
//   - afterwards it ANDs its stored bit with each later input bit x_t and
//     delays the product by one cycle (the x2 of the cross term, weight
//     2^(t+k+1));
//   - adds that term, the partial sum of cell k+1 and its own carry in a
//     full adder. The sum goes to cell k-1 the next cycle, and the carry stays.
// A partial sum loses one cell of position per cycle it gains in time, so
// every term reaches cell 0 exactly in the cycle of its weight, and cell 0
// gives x^2 one bit per cycle.
//
// Clock gating: cell k only ever holds live data in cycles k .. 2W-1-k. Its
// sum and carry latches are enabled in that window only, its store latch
// only in cycle k, and its product latch in cycles k+1 .. W. The total is
// about half of the W*2W latch-cycles an ungated chain would clock. Values
// a cell reads from a neighbour outside that neighbour's window are masked
// to zero, so latches left holding old data need no reset.
//
// Timing: bit k of x is presented in cycle k after start (start marks bit
// 0); bit k of x^2 appears on y one cycle after bit k of x was presented,
// for k = 0 .. 2W-1, and y is 0 afterwards. Input bits after bit W-1 are
// ignored. value is the word held in the store latches; value[k] still
// shows the previous word until cycle k after the next start. clear zeroes
// the store latches. en gates the whole unit.
//
// The slice structure, the sequential reset and the per-slice gating follow
// the original design. The exact gating windows follow from this RTL's
// cell timing and are its own.
module bs_squarer #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         start,
  input  logic         clear,
  input  logic         x,
  output logic         y,
  output logic [W-1:0] value
);
  localparam int unsigned TW = $clog2(2 * W + 1);

  logic [TW-1:0] t_q, t;
  logic          x_live;
  logic [W-1:0]  xs_q;            // store latch of each cell
  logic [W-1:0]  and_q;           // delayed cross product of each cell
  logic [W-1:1]  sum_q;           // partial sum leaving each cell (cell 0: y)
  logic [W-1:0]  carry_q;         // carry kept in each cell
  logic [W-1:0]  pp, sin, cin, s, c;
  logic [W-1:0]  win, ld, and_en;

  assign t      = start ? '0 : t_q;
  assign x_live = (t < TW'(W)) ? x : 1'b0;

  for (genvar k = 0; k < W; k++) begin : g_cell
    if (k == 0) begin : g_win0
      assign win[k] = en && (t <= TW'(2 * W - 1));
    end else begin : g_win
      assign win[k] = en && (t >= TW'(k)) && (t <= TW'(2 * W - 1 - k));
    end
    assign ld[k]     = en && (t == TW'(k));
    assign and_en[k] = en && (t > TW'(k)) && (t <= TW'(W));

    // own square in cycle k, delayed cross product afterwards
    assign pp[k]  = (t == TW'(k)) ? x_live : and_q[k];
    assign cin[k] = (t > TW'(k)) ? carry_q[k] : 1'b0;
    if (k == W - 1) begin : g_and
      assign sin[k] = 1'b0;
    end else begin : g_sin
      assign sin[k] = (t >= TW'(k + 2)) ? sum_q[k+1] : 1'b0;
    end
    assign s[k] = pp[k] ^ sin[k] ^ cin[k];
    assign c[k] = (pp[k] & sin[k]) | (pp[k] & cin[k]) | (sin[k] & cin[k]);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        xs_q[k]    <= 1'b0;
        and_q[k]   <= 1'b0;
        carry_q[k] <= 1'b0;
      end else begin
        if (clear)            xs_q[k] <= 1'b0;
        else if (ld[k])       xs_q[k] <= x_live;
        if (and_en[k])        and_q[k] <= (t < TW'(W)) ? xs_q[k] & x_live : 1'b0;
        if (win[k])           carry_q[k] <= c[k];
      end
    end

    if (k > 0) begin : g_sum
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)       sum_q[k] <= 1'b0;
        else if (win[k])  sum_q[k] <= s[k];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_q <= '0;
      y   <= 1'b0;
    end else if (en) begin
      if (t < TW'(2 * W)) t_q <= t + 1'b1;
      else                t_q <= t;
      y <= (t < TW'(2 * W)) ? s[0] : 1'b0;
    end
  end

  assign value = xs_q;
endmodule
