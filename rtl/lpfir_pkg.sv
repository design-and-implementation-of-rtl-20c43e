// lpfir_pkg: sizes shared by the two low-power FIR filters and their top level.
//
// Two independent 8-tap filters are built. The variable-precision (VP) filter
// takes unsigned 8-bit samples and coefficients and splits each multiplier
// into two clock-gated pipeline stages. The DPDT filter (data transition
// power diminution) takes 8-bit signed samples and 16-bit signed coefficients,
// multiplies them in 16x16 radix-4 Booth multipliers and produces a 32-bit
// output. Tap counts, the 8-bit VP word, the two multiplier stages, the 16-bit
// Booth operands and the 32-bit DPDT output follow the published design; the
// accumulator width of the VP filter is derived here.
package lpfir_pkg;

  // Variable-precision pipelined FIR
  localparam int unsigned VP_TAPS        = 8;
  localparam int unsigned VP_W           = 8;
  localparam int unsigned VP_MULT_STAGES = 2;
  localparam int unsigned VP_ACC_W       = 2 * VP_W + $clog2(VP_TAPS);

  // DPDT FIR
  localparam int unsigned DP_TAPS = 8;
  localparam int unsigned DP_XW   = 8;
  localparam int unsigned DP_HW   = 16;
  localparam int unsigned DP_YW   = 32;

endpackage
