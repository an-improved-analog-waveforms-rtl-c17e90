// dds_pkg: types and default sizes shared by the direct digital synthesizer.
//
// The phase accumulator width of 32 bits is the one used in the worked
// tuning-word example (500 Hz from a 100 MHz reference).  The number of
// phase bits that address the waveform table and the amplitude width are
// this design's own choice: 12 phase bits (a 1024-entry quarter-wave table)
// and 12-bit two's-complement samples.
package dds_pkg;

  localparam int unsigned DEF_ACC_W   = 32;  // phase accumulator word length m
  localparam int unsigned DEF_PHASE_W = 12;  // phase bits that reach the table
  localparam int unsigned DEF_AMP_W   = 12;  // signed sample width

  // Output waveform selection.
  typedef enum logic [1:0] {
    WAVE_SINE     = 2'd0,
    WAVE_COSINE   = 2'd1,
    WAVE_SQUARE   = 2'd2,
    WAVE_SAWTOOTH = 2'd3
  } wave_sel_e;

endpackage
