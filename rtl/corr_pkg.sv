// Shared constants and types of the parallel-slide cross-correlator.
//
// The correlator stores each sequence eight samples to a RAM word and
// multiplies a whole word of X against a whole word of Y (plus the previous
// Y word kept in register C) in every clock, so one clock advances eight
// lags at once. The sizes below are the reference configuration: two
// sequences of 8000 signed 12-bit samples, packed into 1000 words of 96 bits.
// CORR_ACC_W is wide enough for a sum of CORR_N_SAMPLES products of two
// full-scale samples without overflow.
package corr_pkg;

  localparam int unsigned CORR_LANES     = 8;     // samples per RAM word = multiplier groups
  localparam int unsigned CORR_SAMPLE_W  = 12;    // signed sample width
  localparam int unsigned CORR_N_SAMPLES = 8000;  // samples per sequence
  localparam int unsigned CORR_N_WORDS   = CORR_N_SAMPLES / CORR_LANES;  // RAM depth (1000)

  // Accumulator for a sum of CORR_the number of samples' products of two signed samples (37 bits).
  localparam int unsigned CORR_ACC_W = 2 * CORR_SAMPLE_W + $clog2(CORR_N_SAMPLES);

  // Slide direction of the sliding sequence.
  //  SLIDE_RIGHT: X leads, Y slides right; lags tau = 0 .. N_SAMPLES-1.
  //  SLIDE_LEFT : roles of the two RAMs swapped; lags tau = 0 .. -(N_SAMPLES-1).
  typedef enum logic {
    SLIDE_RIGHT = 1'b0,
    SLIDE_LEFT  = 1'b1
  } slide_dir_e;

endpackage
