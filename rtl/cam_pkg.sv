// cam_pkg: types and constants shared by the camera control blocks.
//
// The colour chip quantises every primary pixel into one of five bands with
// four comparators (normalised thresholds 0.86, 0.93, 1.00 and 1.07 of full
// scale). band_t holds the band number 0..4. The exposure judgement uses the
// comparators at 0.93 ("well exposed") and 1.00 ("very bright"). The
// judge_t struct is the two-wire command (enable, down/up) that the exposure
// and colour balance judgements hand to the arithmetic units.
package cam_pkg;

  typedef logic [2:0] band_t;   // 0 .. 4

  typedef struct packed {
    logic en;     // 1: change the value this frame
    logic down;   // 1: decrease, 0: increase
  } judge_t;

  // Serial interface header codes (4-bit header of the 16-bit message).
  typedef enum logic [3:0] {
    HDR_FREE    = 4'b0000,
    HDR_SETUP   = 4'b0001,
    HDR_EXP     = 4'b0010,
    HDR_GAIN    = 4'b0011,
    HDR_ROFF    = 4'b0100,
    HDR_BOFF    = 4'b0101,
    HDR_CX      = 4'b0110,
    HDR_CY      = 4'b0111
  } hdr_e;

  // Set-up code bit positions.
  localparam int unsigned SU_AGC = 2;
  localparam int unsigned SU_AEC = 4;
  localparam int unsigned SU_CHQ = 5;
  localparam int unsigned SU_AWC = 9;

  // Converts four thermometer comparator outputs (cmp[0] lowest threshold)
  // into the band number.
  function automatic band_t therm2band(input logic [3:0] cmp);
    band_t b;
    b = '0;
    for (int k = 0; k < 4; k++) if (cmp[k]) b = band_t'(k + 1);
    return b;
  endfunction

endpackage
