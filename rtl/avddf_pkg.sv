// Shared types and fixed-point formats of the AVDDF (adaptive vector
// directional distance filter) coprocessor.
//
// Pixels are 24-bit RGB words, R in bits 23:16, G in 15:8, B in 7:0, the
// order the filter's datapath lists the channels in. The window is 3x3, so
// every output pixel is chosen from nine candidate vectors; candidate 4 (the
// fifth, counting from 0) is the centre pixel.
//
// The published filter works in floating point. This implementation is
// fixed point throughout, a choice of its own:
//   * magnitude distance ||xi - xj||      : unsigned, DIST_FRAC fraction bits
//   * angular distance A(xi, xj) (radian) : unsigned, ANG_FRAC fraction bits
//   * accumulated distances over a window : the same formats, three bits wider
package avddf_pkg;

  typedef logic [7:0] chan_t;

  typedef struct packed {
    chan_t r;
    chan_t g;
    chan_t b;
  } rgb_t;

  localparam int unsigned WIN      = 9;  // pixels in the 3x3 window
  localparam int unsigned CENTER   = 4;  // index of the centre pixel
  localparam int unsigned NPAIRS   = 36; // unordered pairs i<j of the window

  typedef logic [3:0] idx_t;             // index of a window pixel, 0..8

  // Magnitude distance: sqrt of at most 3*255^2 = 195075 is below 442, so
  // 9 integer bits.
  localparam int unsigned DIST_FRAC = 8;
  localparam int unsigned DIST_W    = 9 + DIST_FRAC;
  typedef logic [DIST_W-1:0] dist_t;

  // Angular distance: RGB vectors have no negative component, so the angle
  // lies in [0, pi/2] and needs 1 integer bit.
  localparam int unsigned ANG_FRAC = 14;
  localparam int unsigned ANG_W    = 1 + ANG_FRAC;
  typedef logic [ANG_W-1:0] ang_t;

  // Sums over the 8 other pixels of the window (the term j = i is zero).
  localparam int unsigned DSUM_W = DIST_W + 3;
  localparam int unsigned ASUM_W = ANG_W + 3;
  typedef logic [DSUM_W-1:0] dsum_t;
  typedef logic [ASUM_W-1:0] asum_t;

  // Pipeline depths of the two distance units (cycles from input to
  // output). The angular unit has two product stages, a 52-bit square root
  // (26 stages), a normalising shift and a CORDIC_ITERS-stage CORDIC.
  localparam int unsigned CORDIC_ITERS = ANG_FRAC + 1;
  localparam int unsigned MAG_LAT = 1 + DIST_W;
  localparam int unsigned ANG_LAT = 2 + 26 + 1 + CORDIC_ITERS;
  // Decision stage: from the cycle its inputs are valid to out_valid (one
  // load cycle, WIN issue cycles, three multiplier stages, the comparator,
  // the threshold products and the output register).
  localparam int unsigned DEC_LAT = WIN + 6;

  // One pairwise result as it leaves the distance units.
  typedef struct packed {
    idx_t  i;
    idx_t  j;
    logic  last;   // last pair of its window
    rgb_t  xi;
    rgb_t  xj;
  } pair_tag_t;

endpackage
