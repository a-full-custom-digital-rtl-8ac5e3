// lasca_fsm: state controller of the speckle-contrast unit.
//
// Built from three counters and a decoder:
//   C30  one-hot cycle within the 30-cycle period (c30_ring)
//   C9   one-hot memory bit-row select for cycles 0..8 (c9_shift)
//   C64  binary period counter = memory column being read (c64_counter)
//   DEC  5-to-32 decoder of the column number (dec5to32)
// A scan starts on start. Period p = 0..31 reads column p into the first
// pipeline stage; stage 2 works on the window of the previous period.
// ready is high when idle and, during a scan, from cycle 9 of period 31
// (column 31 has been read) to the end of that period. A start given then
// is remembered and the next scan follows at once: the old scan's last
// window finishes stage 2 in the new scan's period 0 (tail is high), so
// back-to-back scans take 32 periods (960 cycles) each. Without such a
// start, period 32 (drain) finishes the last window and the unit goes idle;
// a lone scan takes 33 periods. done pulses in the cycle after the period
// in which a scan's last window finished. C64 advances, and C9 reloads, at
// the end of each period (cycle 29), so both are valid from cycle 0.
//
// stage1 / stage2 say whether the first / second pipeline stage holds a
// window in this period (stage 2 also during a tail); scan_first marks cycle 0 of period 0, when the
// running sums are cleared.
module lasca_fsm #(
  parameter int unsigned COLS   = 32,
  parameter int unsigned PERIOD = 30,
  parameter int unsigned ROWS   = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic [PERIOD-1:0] c30,
  output logic [ROWS-1:0]   row_sel,
  output logic [COLS-1:0]   col_sel,
  output logic              sub_zero,
  output logic [5:0]        period,
  output logic              busy,
  output logic              ready,
  output logic              done,
  output logic              stage1,
  output logic              stage2,
  output logic              scan_first,
  output logic              tail
);
  logic        launch, chain, last_cycle, scan_end, last_col, pend_q;
  logic [31:0] dec_y;
  logic        dec_r;

  assign last_cycle = busy & c30[PERIOD-1];
  assign last_col   = busy & (period == 6'(COLS - 1));
  // end of the drain period of a scan that is not followed by another
  assign scan_end   = last_cycle & (period == 6'(COLS));
  // a start seen after the last memory read of a scan (cycles 9..29 of the
  // period that reads the last column) launches the next scan at the end
  // of that period; the old scan's last window then finishes stage 2 during
  // period 0 of the new scan (tail), so no drain period is spent
  assign chain      = last_cycle & last_col & (pend_q | start);
  assign launch     = (start & ~busy) | chain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      pend_q <= 1'b0;
      tail   <= 1'b0;
    end else begin
      done <= scan_end | (last_cycle & tail);
      if (launch)        busy <= 1'b1;
      else if (scan_end) busy <= 1'b0;
      if (launch)                pend_q <= 1'b0;
      else if (start && busy && ready) pend_q <= 1'b1;
      if (chain)                 tail <= 1'b1;
      else if (last_cycle)       tail <= 1'b0;
    end
  end

  c30_ring #(.LEN(PERIOD)) u_c30 (
    .clk, .rst_n, .run(busy), .sync(launch), .state(c30)
  );

  c64_counter #(.W(6)) u_c64 (
    .clk, .rst_n, .clear(launch), .inc(last_cycle), .count(period)
  );

  c9_shift #(.LEN(ROWS)) u_c9 (
    .clk, .rst_n,
    .en(stage1 & |c30[ROWS-1:0]),
    .restart(launch | (last_cycle & (period < 6'(COLS - 1)))),
    .row(row_sel)
  );

  dec5to32 u_dec (.a(period[4:0]), .y(dec_y), .r(dec_r));

  assign ready      = ~busy | (last_col & ~|c30[ROWS-1:0]);
  assign stage1     = busy & (period < 6'(COLS));
  assign stage2     = busy & ((period != 0) | tail);
  assign scan_first = stage1 & (period == 0) & c30[0];
  assign col_sel    = stage1 ? COLS'(dec_y) : '0;
  assign sub_zero   = stage1 & dec_r;
endmodule
