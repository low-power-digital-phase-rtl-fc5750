// adpll_pkg: constants and types shared by the all-digital PLL.
//
// The numbers here follow the design specification: a 4 MHz reference, a
// 1.4 GHz output (divide ratio 350 = 175 x 2), a 19-bit MASH 1-1 delta-sigma
// modulator, and final loop-filter gains alpha = 1, beta = 8.  The target DCO
// tuning line (1.3 GHz at code 0, 400 MHz over the full 2^19 code range) is
// this design's own choice, picked so that 1.4 GHz sits at code 2^17.
package adpll_pkg;

  timeunit 1ps;
  timeprecision 1fs;

  // Delta-sigma modulator word length (19 bits).
  localparam int unsigned DSM_W   = 19;
  // Width of the calibration modulus K: one more bit than the modulator so
  // that K = 2^19 (no normalisation) is representable.
  localparam int unsigned K_W     = DSM_W + 1;
  // Signed width of the loop-filter output and of the offset L.
  localparam int unsigned DLF_W   = 21;
  // Width of the shared f_OUT counter (five 2-bit stages).
  localparam int unsigned CNT_W   = 10;

  // Loop gains as unsigned integers.
  localparam int unsigned GAIN_W  = 8;

  // Frequency plan (Hz).
  localparam longint unsigned F_REF_HZ     = 64'd4_000_000;
  localparam longint unsigned F_MIN_HZ     = 64'd1_300_000_000;
  localparam longint unsigned F_RANGE_HZ   = 64'd400_000_000;

  // Top-level mode of the loop.
  typedef enum logic [1:0] {
    MODE_IDLE  = 2'd0,   // held in reset
    MODE_CAL   = 2'd1,   // DCC running, loop open, counter is a frequency detector
    MODE_TRACK = 2'd2    // loop closed, counter is the divide-by-175
  } pll_mode_e;

  // One set of loop-filter gains.
  typedef struct packed {
    logic [GAIN_W-1:0] alpha;
    logic [GAIN_W-1:0] beta;
  } dlf_gain_t;

endpackage
