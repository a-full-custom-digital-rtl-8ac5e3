// lasca_dsp: speckle-contrast DSP unit for laser speckle imaging.
//
// For every 5x5 window of 8-bit pixels it computes
//   K = sqrt(N*S2 - S1^2) / S1,   S1 = sum I, S2 = sum I^2, N = 25
// as an unsigned Q13.15 number. It works on a strip of COLS = 32 image
// columns held in pixel_sram (five rows of pixels) and slides the window
// left to right: each 30-cycle period reads one new column (the ADD
// column, five pixels) and the column that leaves the window (the SUB
// column), updates the running sums S1 and S2 and emits one K. A scan of
// the 32 columns yields 28 windows (columns 0-4 .. 27-31); the first four
// periods only fill the sums.
//
// Pipeline (c = cycle of the 30-cycle period, bit k of a word):
//  stage 1, bit-serial LSB first, period p:
//   c=k    C9 selects bit k of the ADD and SUB pixels
//   c=k+1  sampled bits; ten 8-bit squarers and two 6/5-input adders start
//   c=k+2  S1_new = S1_old + sum(ADD) - sum(SUB) (13 bits, stored in the
//          slice latches of the 13-bit squarer, which also squares it)
//   c=k+3  S2_new = S2_old + sum(ADD^2) - sum(SUB^2) (21 bits, kept in a
//          21-bit delay register), times 25, minus S1^2 = D (26 bits),
//          collected into a 26-bit register by c=28
//   c=29   D is loaded into the square root, S1 into the divider
//  stage 2, digit-serial MSB first, period p+1:
//   c=0..12  13 root digits (non-restoring square root)
//   c=1..28  28 quotient digits (divider fed by the root digits, then 0s)
//   c=29     K is registered: k_valid pulses in cycle 0 of period p+2
// One K per 30 cycles; 60 cycles from the first read of a column to K.
//
// The running sums are updated, not recomputed: only 10 of the 25 window
// pixels are read per result. Each latch group has a clock enable that is
// high only in the cycles it works (cg_range), standing for the gated
// clocks.
//
// Interface: write the five pixel rows with wr_en/wr_data, then pulse
// start. k_valid/k_out/k_col give the 28 results, k_col being the leftmost
// column of the window, and done pulses after the last one. A lone scan
// keeps busy high for 33 periods (990 cycles). ready is high when idle and
// in cycles 9..29 of period 31, after the last memory read of a scan: a
// sensor writes its next row and pulses start then, and the next scan
// follows without a gap while the last window of the old one finishes,
// one image row per 32 periods (960 cycles). Write the memory only while
// ready is high.
module lasca_dsp
  import lasca_pkg::*;
#(
  parameter int unsigned COLS = lasca_pkg::COLS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [BLOCKS-1:0]          wr_en,
  input  logic [COLS-1:0][PIX_W-1:0] wr_data,
  input  logic                       start,
  output logic                       busy,
  output logic                       ready,
  output logic                       done,
  output logic                       k_valid,
  output logic [OUT_W-1:0]           k_out,
  output logic [4:0]                 k_col
);
  // ---------------------------------------------------------------- control
  logic [PERIOD-1:0] c30;
  logic [PIX_W:0]    row_sel;
  logic [COLS-1:0]   col_sel;
  logic              sub_zero, stage1, stage2, scan_first, tail;
  logic [5:0]        period;

  lasca_fsm #(.COLS(COLS), .PERIOD(PERIOD), .ROWS(PIX_W + 1)) u_fsm (
    .clk, .rst_n, .start, .c30, .row_sel, .col_sel, .sub_zero, .period,
    .busy, .ready, .done, .stage1, .stage2, .scan_first, .tail
  );

  // clock-gating groups (cycles of the period in which each is clocked)
  logic en_sq8, en_s1, en_s2, en_sqrt, en_div, st1, st2, st3, ld;
  cg_range #(.LEN(PERIOD), .X(1), .Y(18)) u_cg_sq8  (.c30, .gate(stage1), .en(en_sq8));
  cg_range #(.LEN(PERIOD), .X(1), .Y(15)) u_cg_s1   (.c30, .gate(stage1), .en(en_s1));
  cg_range #(.LEN(PERIOD), .X(2), .Y(28)) u_cg_s2   (.c30, .gate(stage1), .en(en_s2));
  cg_range #(.LEN(PERIOD), .X(0), .Y(12)) u_cg_sqrt (.c30, .gate(stage2), .en(en_sqrt));
  cg_range #(.LEN(PERIOD), .X(1), .Y(28)) u_cg_div  (.c30, .gate(stage2), .en(en_div));
  cg_range #(.LEN(PERIOD), .X(1), .Y(1))  u_cg_st1  (.c30, .gate(stage1), .en(st1));
  cg_range #(.LEN(PERIOD), .X(2), .Y(2))  u_cg_st2  (.c30, .gate(stage1), .en(st2));
  cg_range #(.LEN(PERIOD), .X(3), .Y(3))  u_cg_st3  (.c30, .gate(stage1), .en(st3));
  cg_range #(.LEN(PERIOD), .X(29), .Y(29)) u_cg_ld  (.c30, .gate(stage1), .en(ld));

  // ----------------------------------------------------------------- memory
  logic [BLOCKS-1:0] add_bit, sub_bit;

  pixel_sram #(.COLS(COLS), .BLOCKS(BLOCKS), .PIX_W(PIX_W), .WIN(WIN)) u_sram (
    .clk, .rst_n, .wr_en, .wr_data, .row_sel, .col_sel, .sub_zero,
    .add_bit, .sub_bit
  );

  // -------------------------------------------------------- S1 = sum of I
  logic [SI_W-1:0] s1_value;
  logic            s1_old, s1_add, s1_sub, s1_new, s1_sq;

  // previous S1, bit k in cycle k+1, read from the squarer's slice latches
  assign s1_old = |(s1_value & c30[SI_W:1]);

  bs_tree_adder #(.NIN(BLOCKS + 1)) u_s1_add (
    .clk, .rst_n, .en(en_s1), .start(st1), .x({s1_old, add_bit}), .s(s1_add)
  );
  bs_tree_adder #(.NIN(BLOCKS)) u_s1_sub (
    .clk, .rst_n, .en(en_s1), .start(st1), .x(sub_bit), .s(s1_sub)
  );
  bs_adder #(.SUB(1'b1)) u_s1_diff (
    .clk, .rst_n, .en(en_s1), .start(st2), .a(s1_add), .b(s1_sub), .s(s1_new)
  );
  // 13-bit squarer: S1^2, and the store of S1 for the next window
  bs_squarer #(.W(SI_W)) u_s1_sq (
    .clk, .rst_n, .en(en_s2), .start(st2), .clear(scan_first),
    .x(s1_new), .y(s1_sq), .value(s1_value)
  );

  // ----------------------------------------------------- S2 = sum of I^2
  logic [BLOCKS-1:0] add_sq, sub_sq;
  for (genvar b = 0; b < BLOCKS; b++) begin : g_sq8
    bs_squarer #(.W(PIX_W)) u_sq_add (
      .clk, .rst_n, .en(en_sq8), .start(st1), .clear(1'b0),
      .x(add_bit[b]), .y(add_sq[b]), .value(/* unused */)
    );
    bs_squarer #(.W(PIX_W)) u_sq_sub (
      .clk, .rst_n, .en(en_sq8), .start(st1), .clear(1'b0),
      .x(sub_bit[b]), .y(sub_sq[b]), .value(/* unused */)
    );
  end

  logic [SI2_W-1:0] s2_q;
  logic             s2_old, s2_add, s2_sub, s2_new;

  // previous S2, bit k in cycle k+2; the new bit k is written in cycle k+3
  assign s2_old = |(s2_q & c30[SI2_W+1:2]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s2_q <= '0;
    else if (scan_first) s2_q <= '0;
    else if (stage1) begin
      for (int k = 0; k < int'(SI2_W); k++) if (c30[k+3]) s2_q[k] <= s2_new;
    end
  end

  bs_tree_adder #(.NIN(BLOCKS + 1)) u_s2_add (
    .clk, .rst_n, .en(en_s2), .start(st2), .x({s2_old, add_sq}), .s(s2_add)
  );
  bs_tree_adder #(.NIN(BLOCKS)) u_s2_sub (
    .clk, .rst_n, .en(en_s2), .start(st2), .x(sub_sq), .s(s2_sub)
  );
  bs_adder #(.SUB(1'b1)) u_s2_diff (
    .clk, .rst_n, .en(en_s2), .start(st3), .a(s2_add), .b(s2_sub), .s(s2_new)
  );

  // ------------------------------------------- D = 25*S2 - S1^2 (26 bits)
  logic ns2, d_bit;
  logic [D_W-1:0] d_q;

  bs_const_mult #(.M(N)) u_mul (
    .clk, .rst_n, .en(en_s2), .start(st3), .x(s2_new), .y(ns2)
  );
  bs_adder #(.SUB(1'b1)) u_d_diff (
    .clk, .rst_n, .en(en_s2), .start(st3), .a(ns2), .b(s1_sq), .s(d_bit)
  );

  // LSB-first to parallel: bit k arrives in cycle k+3, k = 0..25
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) d_q <= '0;
    else if (stage1 && |c30[D_W+2:3]) d_q <= {d_bit, d_q[D_W-1:1]};
  end

  // ------------------------------------------------ stage 2: sqrt, divide
  logic            q_bit, q_valid, sqrt_done;
  logic [ROOT_W-1:0] root;
  logic [OUT_W-1:0]  quotient;

  sqrt_nr #(.WQ(ROOT_W)) u_sqrt (
    .clk, .rst_n, .en(en_sqrt), .load(ld), .radicand(d_q),
    .q_bit, .q_valid, .root, .done(sqrt_done)
  );

  div_sub #(.WD(SI_W), .WQ(OUT_W)) u_div (
    .clk, .rst_n, .load(ld), .divisor(s1_value), .step(en_div),
    .d_bit(q_bit), .quotient
  );

  // --------------------------------------------------------------- output
  logic [5:0] win;   // window finishing stage 2 in this period
  assign win = tail ? 6'(COLS - 1) : period - 6'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k_valid <= 1'b0;
      k_out   <= '0;
      k_col   <= '0;
    end else begin
      k_valid <= 1'b0;
      if (stage2 && c30[PERIOD-1] && win >= 6'(WIN - 1)) begin
        k_valid <= 1'b1;
        k_out   <= quotient;
        k_col   <= 5'(win - 6'(WIN - 1));
      end
    end
  end

  // the root must be complete before the divider has consumed its digits
  assert property (@(posedge clk) disable iff (!rst_n)
                   (stage2 && c30[14]) |-> sqrt_done)
    else $error("lasca_dsp: square root not finished in time");
endmodule
