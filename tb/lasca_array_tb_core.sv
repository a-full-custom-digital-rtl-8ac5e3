// lasca_array_tb_core: stimulus, reference model and checker shared by the
// end-to-end testbenches of lasca_array (instantiated by a port-less top).
//
// It plays a column-parallel image sensor of IMG_W = 900 columns and its
// host. Row r of the image is written into memory block r mod 5 of every
// unit at once. After row 4 a scan is started; after each later row
// another scan runs on the last five rows. The first IDLE_SCANS scans are
// started from idle, the rest are chained (row written and start pulsed
// while ready is high near the end of the running scan).
//
// Each k_valid delivers one contrast per unit. Unit u's result is compared
// with a reference computed from the image columns 28u+w .. 28u+w+4 of a
// snapshot of the scan's five rows:
//   D = 25*sum(I^2) - (sum I)^2,  K = floor(floor(sqrt(D)) * 2^15 / sum I)
// (all ones when sum I = 0). Windows that reach into the four columns a
// unit shares with its right-hand neighbour are counted. Timing is checked
// as for a single unit: first result 181 cycles after an idle start or 150
// cycles after the previous scan's last result when chained, then one
// every 30 cycles. The image holds random speckle, flat (K = 0), dark
// (sum I = 0) and full-scale regions placed across unit boundaries. Each
// of these, the shared columns, rolling overwrite and chaining must occur.
// MAX_CYCLES bounds the run; with FRAME_BUDGET > 0 the time from the first
// start to the last result must not exceed it.
module lasca_array_tb_core #(
  parameter int NROWS        = 8,
  parameter int IDLE_SCANS   = 2,
  parameter int MAX_CYCLES   = 20000,
  parameter int FRAME_BUDGET = 0
) ();
  import lasca_pkg::*;
  localparam int NU    = UNITS;
  localparam int IMG_W = (WIN - 1) + NU * STEP;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [BLOCKS-1:0]           wr_en = '0;
  logic [IMG_W-1:0][PIX_W-1:0] wr_data = '0;
  logic start = 1'b0, busy, ready, done, k_valid;
  logic [NU-1:0][OUT_W-1:0] k_out;
  logic [4:0] k_col;

  lasca_array dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_flat = 0, n_dark = 0, n_full = 0, n_roll = 0, n_chain = 0, n_shared = 0;
  int cycle = 0, scans_done = 0, t_last_start = 0, t_prev = -1, t_first_start = -1;
  int got = 0;
  bit chained_cur = 0;
  bit finished = 0;

  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (start && !busy) t_last_start <= cycle;
  always @(posedge clk) if (start && t_first_start < 0) t_first_start <= cycle;

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d cycles", MAX_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [PIX_W-1:0] blk  [BLOCKS][IMG_W];   // memory contents, as written
  logic [PIX_W-1:0] sblk [BLOCKS][IMG_W];   // snapshot of the running scan
  logic [PIX_W-1:0] nblk [BLOCKS][IMG_W];   // snapshot of the scan started next

  // test image: special regions straddle the unit boundaries at columns
  // 28, 56 and 84 (shared columns 28..31 etc.)
  function automatic logic [PIX_W-1:0] pix(int r, int c);
    int rr;
    rr = r % 40;
    if (c >= 26 && c < 34 && rr >= 2 && rr < 8)  return 8'd200;                    // flat
    if (c >= 54 && c < 60 && rr >= 3 && rr < 12) return 8'd0;                      // dark
    if (c >= 82 && c < 90 && rr >= 4 && rr < 14) return ((r + c) % 2 == 0) ? 8'd255 : 8'd0;
    return 8'($urandom_range(0, 255));
  endfunction

  function automatic int unsigned isqrt(longint unsigned v);
    longint unsigned lo, hi, m;
    lo = 0; hi = 8192;
    while (hi - lo > 1) begin
      m = (lo + hi) / 2;
      if (m * m <= v) lo = m; else hi = m;
    end
    return int'(lo);
  endfunction

  // ------------------------------------------------------------ checker
  always @(posedge clk) begin
    #1;
    if (k_valid) begin
      int w, bad;
      w = got;
      bad = 0;
      for (int u = 0; u < NU; u++) begin
        longint unsigned s1, s2, d, kref;
        s1 = 0; s2 = 0;
        for (int b = 0; b < BLOCKS; b++)
          for (int c = u * STEP + w; c < u * STEP + w + WIN; c++) begin
            s1 += 64'(sblk[b][c]); s2 += 64'(sblk[b][c]) * 64'(sblk[b][c]);
          end
        d = 25 * s2 - s1 * s1;
        kref = (s1 == 0) ? ((64'd1 << OUT_W) - 1) : ((64'(isqrt(d)) << Q_FRAC) / s1);
        if (s1 == 0) n_dark++;
        if (d == 0 && s1 != 0) n_flat++;
        if (s2 > 25 * 128 * 255) n_full++;
        if (u < NU - 1 && w + WIN > STEP) n_shared++;
        checks++;
        if (k_out[u] !== kref[OUT_W-1:0]) begin
          failures++;
          if (bad++ < 4)
            $display("scan %0d unit %0d window %0d: got K=%h, expected K=%h (S1=%0d S2=%0d)",
                     scans_done, u, w, k_out[u], kref, s1, s2);
        end
      end
      checks++;
      if (k_col !== 5'(w)) begin
        failures++; $display("scan %0d: k_col %0d, expected %0d", scans_done, k_col, w);
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
      if (got == STEP) begin
        got = 0;
        scans_done++;
        sblk = nblk;
      end
    end
  end

  task automatic write_row(int r);
    @(negedge clk);
    for (int c = 0; c < IMG_W; c++) begin
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
        while (busy) @(negedge clk);
        write_row(r);
        sblk = blk;
        chained_cur = 0;
        pulse_start();
      end else begin
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
    checks++; if (n_roll == 0)   begin failures++; $display("no rolling overwrite"); end
    checks++; if (n_flat == 0)   begin failures++; $display("no flat window"); end
    checks++; if (n_dark == 0)   begin failures++; $display("no dark window"); end
    checks++; if (n_full == 0)   begin failures++; $display("no full-scale window"); end
    checks++; if (n_shared == 0) begin failures++; $display("no window on shared columns"); end
    if (NROWS - 4 > IDLE_SCANS) begin
      checks++; if (n_chain == 0) begin failures++; $display("no chained scan"); end
    end
    if (FRAME_BUDGET > 0) begin
      checks++;
      if (t_prev - t_first_start > FRAME_BUDGET) begin
        failures++; $display("frame took %0d cycles, budget %0d", t_prev - t_first_start, FRAME_BUDGET);
      end
      $display("frame: %0d cycles from first start to last result (budget %0d)",
               t_prev - t_first_start, FRAME_BUDGET);
    end
    $display("units=%0d columns=%0d rows=%0d scans=%0d cycles=%0d rolling=%0d chained=%0d shared=%0d flat=%0d dark=%0d fullscale=%0d",
             NU, IMG_W, NROWS, scans_done, cycle, n_roll, n_chain, n_shared, n_flat, n_dark, n_full);
    finished = 1;
  end
endmodule
