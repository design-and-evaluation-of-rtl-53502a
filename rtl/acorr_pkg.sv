// acorr_pkg -- types and constants shared by the 2-bit autocorrelator.
//
// The autocorrelator works on 2-bit samples from an A/D converter. A sample
// is an unsigned quantisation level 0..3, and the correlation of two samples
// is again a 2-bit level 0..3 (3 = identical, 0 = opposite extremes). The
// numbers below are the ones of the 4-channel test system: lags of 1, 3, 5
// and 7 clocks (odd lags, step 2, built from a 16-flip-flop delay line), a
// 5-bit integrating counter per channel, 10-stage test shift registers and a
// 12-pulse clock burst. The clock-burst length and the test register depth
// come from the system's floor plan; how they are used is this design's own
// reading (see the modules that use them).
package acorr_pkg;

  // Width of one A/D sample and of one correlation value.
  localparam int unsigned SAMPLE_W = 2;
  typedef logic [SAMPLE_W-1:0] sample_t;

  // Number of lag channels; channel k measures lag FIRST_LAG + k*LAG_STEP.
  localparam int unsigned N_CH      = 4;
  localparam int unsigned FIRST_LAG = 1;
  localparam int unsigned LAG_STEP  = 2;

  // Width of the integrating binary counter of each channel.
  localparam int unsigned CNT_W = 5;

  // Depth of the on-chip input and output test shift registers.
  localparam int unsigned TEST_DEPTH = 10;

  // Number of high-speed clock pulses in one burst of the clock generator.
  localparam int unsigned CG_PULSES = 12;

endpackage
