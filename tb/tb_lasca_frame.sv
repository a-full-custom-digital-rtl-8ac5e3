// tb_lasca_frame: workload test. The unit's share of a 1024-row image
// (a strip of 32 columns, 28 output columns) is streamed through it row by
// row, with back-to-back scans, as a column-parallel sensor would do. All
// 1020 x 28 speckle contrasts are checked, and the frame must finish
// within 1,000,000 cycles: one frame time at 30 frames/s with a 30 MHz
// clock.
module tb_lasca_frame;
  lasca_tb_core #(.NROWS(1024), .IDLE_SCANS(1), .MAX_CYCLES(1100000),
                  .FRAME_BUDGET(1000000)) core ();
  initial begin
    wait (core.finished);
    $display("TB_RESULT checks=%0d failures=%0d", core.checks, core.failures);
    $finish;
  end
endmodule
