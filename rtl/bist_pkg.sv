// bist_pkg: shared types and default sizes of the DDS-based analog BIST.
//
// The BIST generates test tones with a direct digital synthesizer (DDS),
// sends them through DAC -> circuit under test -> ADC, and analyses the
// returned samples with multiplier/accumulators.  This package holds the
// default word sizes every module of the design uses, and the operating-mode
// type that selects between frequency-response and two-tone linearity test.
//
// Sizes: D = 8 bit samples and an accumulator of 2D+M bits follow the
// design description; the frequency word, phase truncation and M are this
// design's own choices (see each module's header).
package bist_pkg;

  // D: sample width of DDS output, DAC and ADC (8 of the 12 converter bits).
  localparam int unsigned D_DEF      = 8;
  // n: frequency / phase accumulator width.
  localparam int unsigned FREQ_W_DEF = 16;
  // p: phase bits kept after truncation, i.e. look-up table address width.
  localparam int unsigned P_DEF      = 10;
  // M: accumulation count is below 2^M samples.
  localparam int unsigned M_DEF      = 17;
  // Width of the phase result of the analyzer (binary angle, 2^W = 360 deg).
  localparam int unsigned ANG_W_DEF  = 16;

  // Test being run.
  typedef enum logic {
    MODE_FREQ_RESP = 1'b0,  // single tone, cos/sin references (I/Q)
    MODE_LINEARITY = 1'b1   // two tones f1+f2, references f2 and 2f2-f1
  } bist_mode_e;

  // Frequency sweep law of the controller.
  typedef enum logic {
    SWEEP_LINEAR = 1'b0,    // Fr <- Fr + step
    SWEEP_OCTAVE = 1'b1     // Fr <- 2 * Fr
  } sweep_e;

endpackage
