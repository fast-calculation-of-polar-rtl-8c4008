// polar_pkg: constants and types shared by the polar encoder and the
// split-channel (frozen-bit location) calculator.
//
// Code length N = 2^n. The default N = 1024 (n = 10) is the frame length the
// design is dimensioned for; the hardware is parameterised and works for any
// power of two from 2 upwards.
//
// Split-channel parameters (Bhattacharyya bounds or average bit-error
// probabilities) are unsigned fixed-point numbers with FRAC fractional bits
// and one integer bit, so that every value of the closed range [0, 1] is
// representable: 1.0 is (1 << FRAC). FRAC = 16 is this design's choice.
package polar_pkg;

  localparam int unsigned N_DEFAULT    = 1024;
  localparam int unsigned FRAC_DEFAULT = 16;

  // Threshold 0.4 on the error probability of a split channel:
  // round(0.4 * 2^16) = 26214.
  localparam int unsigned PTE_DEFAULT_Q16 = 26214;

  // How the location memory is filled: one split channel per clock cycle
  // through a single tree, or all split channels at once through N trees.
  typedef enum logic {
    CALC_SERIAL   = 1'b0,
    CALC_PARALLEL = 1'b1
  } calc_mode_e;

endpackage
