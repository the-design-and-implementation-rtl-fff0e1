// lattice_pkg: number formats and default sizes shared by the folded
// adaptive lattice LMS filter.
//
// All signals (reference input, primary input, prediction errors, filter
// output, error, reflection coefficients) are signed Q1.15 words. The LMS
// tap weights are kept in a wider signed Q2.22 word so that small updates
// 2*mu*e*b are not lost to rounding. None of these widths is given by the
// source design; they are this implementation's choice. The tap count (8) and
// the folding factor (K = 2, the first of the two folded versions) are the
// source's main configuration.
package lattice_pkg;
  localparam int unsigned DATA_W        = 16;  // Q1.15 samples and errors
  localparam int unsigned DATA_FB       = 15;  // fraction bits of DATA_W words
  localparam int unsigned WEIGHT_W      = 24;  // Q2.22 LMS weights
  localparam int unsigned WEIGHT_FB     = 22;  // fraction bits of weights
  localparam int unsigned TAPS_DEF      = 8;   // filter order (taps)
  localparam int unsigned FOLD_DEF      = 2;   // folding factor K
  localparam int unsigned MU_SHIFT_DEF  = 5;   // 2*mu = 2^-MU_SHIFT
endpackage
