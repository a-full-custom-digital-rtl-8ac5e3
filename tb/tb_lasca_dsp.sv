// tb_lasca_dsp: end-to-end test of the speckle-contrast unit at its
// default parameters: a 12-row image strip of 32 columns, 8 scans (3
// started from idle, 5 chained back to back), 224 speckle contrasts, each
// checked bit-exactly and for its timing. See lasca_tb_core for the
// stimulus and the reference model.
module tb_lasca_dsp;
  lasca_tb_core #(.NROWS(12), .IDLE_SCANS(3), .MAX_CYCLES(20000)) core ();
  int checks_total;
  initial begin
    wait (core.finished);
    $display("TB_RESULT checks=%0d failures=%0d", core.checks, core.failures);
    $finish;
  end
endmodule
