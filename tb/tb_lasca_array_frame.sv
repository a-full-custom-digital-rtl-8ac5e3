// tb_lasca_array_frame: frame workload on the full array. A 1024 x 900
// image is streamed through the 32 units row by row, with chained scans,
// as a column-parallel sensor with a rolling readout would do. All
// 1020 x 896 speckle contrasts are checked, and the frame must finish
// within 1,000,000 cycles: one frame time at 30 frames/s with a 30 MHz
// clock.
module tb_lasca_array_frame;
  lasca_array_tb_core #(.NROWS(1024), .IDLE_SCANS(1), .MAX_CYCLES(1100000),
                        .FRAME_BUDGET(1000000)) core ();
  initial begin
    wait (core.finished);
    $display("TB_RESULT checks=%0d failures=%0d", core.checks, core.failures);
    $finish;
  end
endmodule
