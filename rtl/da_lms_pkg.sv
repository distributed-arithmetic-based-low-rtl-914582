// Shared constants and helpers of the DA-based delayed-LMS adaptive FIR filter.
//
// The filter is built from four-point inner-product blocks; TAPS_PER_BLOCK is
// that block size (sixteen addresses, fifteen stored partial sums). The
// default word length of 8 bits and filter length of 4 taps are the design's
// main configuration.
package da_lms_pkg;

  localparam int unsigned TAPS_PER_BLOCK = 4;
  localparam int unsigned DEFAULT_L      = 8;
  localparam int unsigned DEFAULT_N      = 4;

endpackage
