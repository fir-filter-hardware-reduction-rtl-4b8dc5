// Shared constants of the adaptive delta-modulation FIR filter (ADMF).
//
// The defaults are the sizes of the filter the design is built around: 64 taps,
// 8-bit two's-complement coefficients, 12-bit accumulators, four step sizes
// (1, 2, 4 and 8 times the minimum step, so the step exponent runs 0..3) and an
// 8-bit output D/A. The width of the delta modulator's own feedback code and the
// choice of which 8 of the 12 accumulator bits drive the output D/A are this
// design's choices. Single decision bits use the encoding 1 = +1, 0 = -1.
package admf_pkg;

  localparam int unsigned P_N       = 64; // filter order N
  localparam int unsigned P_B       = 8;  // coefficient word B, sign included
  localparam int unsigned P_ACC_W     = 12; // accumulator width
  localparam int unsigned P_LMAX      = 3;  // largest step exponent (step = 8 x minimum)
  localparam int unsigned P_XHAT_W    = 8;  // delta-modulator feedback code width
  localparam int unsigned P_DAC_W     = 8;  // output D/A width
  localparam int unsigned P_DAC_SHIFT = 4;  // accumulator bits dropped below the D/A LSB

  // Width of a step exponent that can hold 0..lmax.
  function automatic int unsigned lvl_width(int unsigned lmax);
    return (lmax < 1) ? 1 : $clog2(lmax + 1);
  endfunction

endpackage
