// lasca_array: column-parallel array of speckle-contrast units.
//
// NU lasca_dsp units sit side by side under a column-parallel image
// sensor. Each unit holds 32 memory columns but produces only 28 output
// columns, because a 5-wide window needs four columns of its right-hand
// neighbour. Unit u is therefore wired to image columns 28u .. 28u+31, and
// neighbouring units store the four shared columns twice. An image row is
// IMG_W = 4 + 28*NU pixels wide: 900 for the default 32 units.
//
// All units share the row write strobes, the start signal and the reset,
// so they run in lockstep. busy, ready and done come from unit 0, and an
// assertion checks that every unit agrees. Each result period delivers NU
// contrasts at once, one per unit. k_out[u] belongs to the window whose
// leftmost image column is 28u + k_col.
//
// Interface and timing are those of lasca_dsp:
//   - write a row into one of the five blocks with wr_en/wr_data;
//   - pulse start while ready is high;
//   - results follow every 30 cycles.
// Every sensor row costs 960 cycles when scans are chained. A 1024-row
// frame therefore needs just under 10^6 cycles, one frame time at 30
// frames/s and 30 MHz.
// The 32-to-28 column packing with duplicated edge columns and the 32-unit,
// 900-column configuration follow the original design. Sharing one start
// and taking the status from unit 0 are this implementation's choices.
module lasca_array
  import lasca_pkg::*;
#(
  parameter int unsigned NU = lasca_pkg::UNITS,
  localparam int unsigned IMG_W = (WIN - 1) + NU * STEP
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [BLOCKS-1:0]             wr_en,
  input  logic [IMG_W-1:0][PIX_W-1:0]   wr_data,
  input  logic                          start,
  output logic                          busy,
  output logic                          ready,
  output logic                          done,
  output logic                          k_valid,
  output logic [NU-1:0][OUT_W-1:0]      k_out,
  output logic [4:0]                    k_col
);
  logic [NU-1:0]      u_busy, u_ready, u_done, u_valid;
  logic [NU-1:0][4:0] u_col;

  for (genvar u = 0; u < NU; u++) begin : g_unit
    lasca_dsp u_dsp (
      .clk, .rst_n, .wr_en,
      .wr_data (wr_data[u*STEP +: COLS]),
      .start,
      .busy    (u_busy[u]),
      .ready   (u_ready[u]),
      .done    (u_done[u]),
      .k_valid (u_valid[u]),
      .k_out   (k_out[u]),
      .k_col   (u_col[u])
    );
  end

  assign busy    = u_busy[0];
  assign ready   = u_ready[0];
  assign done    = u_done[0];
  assign k_valid = u_valid[0];
  assign k_col   = u_col[0];

  // the units run in lockstep
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    u_busy == {NU{u_busy[0]}} && u_ready == {NU{u_ready[0]}} && u_done == {NU{u_done[0]}}
    && u_valid == {NU{u_valid[0]}} && u_col == {NU{u_col[0]}});
endmodule
