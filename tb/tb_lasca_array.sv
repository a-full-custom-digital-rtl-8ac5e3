// tb_lasca_array: end-to-end test of the column-parallel array at its
// default size (32 units, 900-column image). Eight sensor rows give four
// scans, two started from idle and two chained; all 32 x 28 contrasts of
// each scan are checked against the reference model, together with the
// result timing (see lasca_array_tb_core).
module tb_lasca_array;
  lasca_array_tb_core #(.NROWS(8), .IDLE_SCANS(2), .MAX_CYCLES(20000)) core ();
  initial begin
    wait (core.finished);
    $display("TB_RESULT checks=%0d failures=%0d", core.checks, core.failures);
    $finish;
  end
endmodule
