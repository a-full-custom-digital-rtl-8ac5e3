// lasca_pkg: constants shared by the speckle-contrast DSP unit.
//
// The unit computes, for every 5x5 window of 8-bit pixels,
//   K = sqrt(N*sum(I^2) - (sum I)^2) / sum(I)
// which is the spatial speckle contrast sigma/mean up to the factor
// sqrt((N-1)/N). The widths below are the worst-case widths of each
// intermediate term for N = 25 and 8-bit pixels; the 30-cycle period and
// the Q13.15 output format are the unit's throughput and precision targets.
// UNITS units side by side serve an image of WIN-1 + UNITS*STEP = 900
// columns.
package lasca_pkg;
  localparam int unsigned N       = 25;  // pixels per window (5x5)
  localparam int unsigned WIN     = 5;   // window side
  localparam int unsigned PIX_W   = 8;   // pixel width
  localparam int unsigned SQ_W    = 16;  // I^2
  localparam int unsigned SI_W    = 13;  // sum I
  localparam int unsigned SI2_W   = 21;  // sum I^2
  localparam int unsigned D_W     = 26;  // N*sum I^2 - (sum I)^2
  localparam int unsigned ROOT_W  = 13;  // sqrt(D)
  localparam int unsigned Q_INT   = 13;  // integer bits of K
  localparam int unsigned Q_FRAC  = 15;  // fraction bits of K
  localparam int unsigned OUT_W   = Q_INT + Q_FRAC;
  localparam int unsigned PERIOD  = 30;  // cycles per speckle contrast
  localparam int unsigned COLS    = 32;  // memory columns per unit
  localparam int unsigned BLOCKS  = 5;   // memory blocks (pixel rows)
  localparam int unsigned STEP    = COLS - (WIN - 1);  // output columns per unit
  localparam int unsigned UNITS   = 32;  // units side by side in the array
endpackage
