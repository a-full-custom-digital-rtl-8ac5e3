// lasca_tb_core: stimulus, reference model and checker shared by the
// end-to-end testbenches of lasca_dsp (instantiated by a port-less top).
//
// It plays the image sensor and the host: the image is NROWS rows of COLS
// pixels; row r is written into memory block r mod 5. After row 4 a scan
// is started; after each later row another scan runs on the last five
// rows. The first IDLE_SCANS scans are started from idle (row written
// after done); the rest are chained: the row is written and start pulsed
// while ready is high near the end of the running scan.
//
// Every result is compared with a reference computed from a snapshot of
// the memory contents of its scan:
//   D = 25*sum(I^2) - (sum I)^2,  K = floor(floor(sqrt(D)) * 2^15 / sum I)
// (all ones when sum I = 0), and its column number is checked. Timing:
// first result 181 cycles after the edge that samples an idle start, or
// 150 cycles after the last result of the previous scan when chained (the
// next scan starts 30 cycles before that last result); 30 cycles between
// results, so chained scans end 960 cycles apart. The image
// contains random speckle, a flat region (D = 0, K = 0), a dark region
// (sum I = 0) and full-scale pixels; each of these, the SUB-bus zeroing,
// the rolling overwrite of blocks, chained starts and clock gating are
// counted and must each occur. MAX_CYCLES bounds the whole run; with
// FRAME_BUDGET > 0 the time from the first start to the last result must
// not exceed it.
module lasca_tb_core #(
  parameter int NROWS      = 12,
  parameter int IDLE_SCANS = 3,
  parameter int MAX_CYCLES = 50000,
  parameter int FRAME_BUDGET = 0     // if > 0: cycles allowed from first start to last result
) ();
  import lasca_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [BLOCKS-1:0]          wr_en = '0;
  logic [COLS-1:0][PIX_W-1:0] wr_data = '0;
  logic start = 1'b0, busy, ready, done, k_valid;
  logic [OUT_W-1:0] k_out;
  logic [4:0] k_col;

  lasca_dsp dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_flat = 0, n_dark = 0, n_full = 0, n_roll = 0, n_subzero = 0, n_gated = 0, n_chain = 0;
  int cycle = 0, scans_done = 0, t_last_start = 0, t_prev = -1;
  int got = 0;
  bit chained_cur = 0;
  bit finished = 0;

  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (start && !busy) t_last_start <= cycle;
  int t_first_start = -1;
  always @(posedge clk) if (start && t_first_start < 0) t_first_start <= cycle;

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d cycles", MAX_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (busy && dut.stage2 && !dut.en_sqrt) n_gated++;
  always @(posedge clk) if (busy && dut.stage1 && dut.sub_zero && dut.c30[0]) n_subzero++;

  logic [PIX_W-1:0] blk  [BLOCKS][COLS];   // memory model
  logic [PIX_W-1:0] sblk [BLOCKS][COLS];   // snapshot of the running scan
  logic [PIX_W-1:0] nblk [BLOCKS][COLS];   // snapshot of the scan started next

  function automatic logic [PIX_W-1:0] pix(int r, int c);
    int rr = r % 40;
    if (c >= 8 && c < 14 && rr >= 2 && rr < 8)  return 8'd200;                   // flat
    if (c >= 20 && c < 26 && rr >= 3 && rr < 12) return 8'd0;                   // dark
    if (c >= 28 && rr >= 4 && rr < 14) return ((r + c) % 2 == 0) ? 8'd255 : 8'd0; // full-scale
    if (c >= 16 && c < 19 && rr >= 5 && rr < 9)  return 8'd255;
    return 8'($urandom_range(0, 255));
  endfunction

  function automatic int unsigned isqrt(longint unsigned v);
    longint unsigned lo = 0, hi = 8192;
    while (hi - lo > 1) begin
      longint unsigned m = (lo + hi) / 2;
      if (m * m <= v) lo = m; else hi = m;
    end
    return int'(lo);
  endfunction

  // ------------------------------------------------------------ checker
  always @(posedge clk) begin
    #1;
    if (k_valid) begin
      longint unsigned s1, s2, d, kref;
      int w;
      w = got;
      s1 = 0; s2 = 0;
      for (int b = 0; b < BLOCKS; b++)
        for (int c = w; c < w + 5; c++) begin
          s1 += sblk[b][c]; s2 += sblk[b][c] * sblk[b][c];
        end
      d = 25 * s2 - s1 * s1;
      kref = (s1 == 0) ? ((64'd1 << OUT_W) - 1) : ((64'(isqrt(d)) << Q_FRAC) / s1);
      if (s1 == 0) n_dark++;
      if (d == 0 && s1 != 0) n_flat++;
      if (s2 > 25 * 128 * 255) n_full++;
      checks++;
      if (k_out !== kref[OUT_W-1:0] || k_col !== 5'(w)) begin
        failures++;
        $display("scan %0d window %0d: got K=%h col=%0d, expected K=%h (S1=%0d S2=%0d)",
                 scans_done, w, k_out, k_col, kref, s1, s2);
      end
      checks++;
      if (w == 0) begin
        int exp_t, ref_t;
        exp_t = chained_cur ? 150 : 181;
        ref_t = chained_cur ? t_prev : t_last_start;
        if (cycle - ref_t != exp_t) begin
          failures++; $display("scan %0d: first result after %0d cycles", scans_done, cycle - ref_t);
        end
      end else if (cycle - t_prev != 30) begin
        failures++; $display("scan %0d: result interval %0d", scans_done, cycle - t_prev);
      end
      t_prev = cycle;
      got++;
      if (got == COLS - 4) begin
        got = 0;
        scans_done++;
        sblk = nblk;
      end
    end
  end

  task automatic write_row(int r);
    @(negedge clk);
    for (int c = 0; c < COLS; c++) begin
      wr_data[c] = pix(r, c);
      blk[r % BLOCKS][c] = wr_data[c];
    end
    wr_en = BLOCKS'(1) << (r % BLOCKS);
    @(negedge clk);
    wr_en = '0;
    if (r >= BLOCKS) n_roll++;
  endtask

  task automatic pulse_start();
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
  endtask

  // ------------------------------------------------------------- driver
  initial begin
    int scans_started;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < BLOCKS; r++) write_row(r);
    sblk = blk;
    chained_cur = 0;
    pulse_start();
    scans_started = 1;
    for (int r = BLOCKS; r < NROWS; r++) begin
      if (scans_started < IDLE_SCANS) begin
        // wait for the scan to finish, then write and start from idle
        while (busy) @(negedge clk);
        write_row(r);
        sblk = blk;
        chained_cur = 0;
        pulse_start();
      end else begin
        // chained: write and start in the drain period of the running scan
        while (!(busy && ready)) @(negedge clk);
        write_row(r);
        nblk = blk;
        pulse_start();
        chained_cur = 1;
        n_chain++;
        while (ready) @(negedge clk);   // one row per scan
      end
      scans_started++;
    end
    while (busy || k_valid) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (scans_done != NROWS - 4) begin
      failures++; $display("%0d scans completed instead of %0d", scans_done, NROWS - 4);
    end
    checks++; if (n_roll == 0)    begin failures++; $display("no rolling overwrite"); end
    checks++; if (n_subzero == 0) begin failures++; $display("SUB bus never zeroed"); end
    checks++; if (n_gated == 0)   begin failures++; $display("clock gating never active"); end
    checks++; if (n_flat == 0)    begin failures++; $display("no flat window"); end
    checks++; if (n_dark == 0)    begin failures++; $display("no dark window"); end
    checks++; if (n_full == 0)    begin failures++; $display("no full-scale window"); end
    if (NROWS - 4 > IDLE_SCANS) begin
      checks++; if (n_chain == 0) begin failures++; $display("no chained scan"); end
    end
    if (FRAME_BUDGET > 0) begin
      checks++;
      if (t_prev - t_first_start > FRAME_BUDGET) begin
        failures++; $display("frame took %0d cycles, budget %0d", t_prev - t_first_start, FRAME_BUDGET);
      end
      $display("frame: %0d cycles from first start to last result (budget %0d)", t_prev - t_first_start, FRAME_BUDGET);
    end
    $display("rows=%0d scans=%0d cycles=%0d rolling=%0d chained=%0d subzero=%0d gated=%0d flat=%0d dark=%0d fullscale=%0d",
             NROWS, scans_done, cycle, n_roll, n_chain, n_subzero, n_gated, n_flat, n_dark, n_full);
    finished = 1;
  end
endmodule
