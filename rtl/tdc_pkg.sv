// Shared sizes of the ring-oscillator time-to-digital converter.
//
// The converter measures the time between a start and a stop edge with a
// free-running 32-tap multipath ring oscillator (5 fine bits) and a 5-bit
// gray counter of oscillator cycles (5 coarse bits), giving a 10-bit code.
// The default sizes below are the ones of the presented design; every module
// takes them as parameters so the structure can be resized.
`timescale 1ps / 1fs
package tdc_pkg;
  // Number of oscillator phase taps; must be a power of two.
  localparam int unsigned N_PHASES   = 32;
  localparam int unsigned PHASE_BITS = $clog2(N_PHASES);
  // Tap-index step between consecutive rising edges (phase rearrangement).
  localparam int unsigned SKEW       = 3;
  // Gray counter width (coarse bits).
  localparam int unsigned CNT_BITS   = 5;
endpackage
