// cdr_pkg: widths and lane counts shared by the blocks of the blind
// baud-rate ADC-based CDR receiver.
//
// The receiver samples 10Gb/s data once per UI with a free-running
// (blind) clock. Four interleaved 1UI integrate-and-dump / 5-bit ADC
// channels are demultiplexed into 16 samples per 625MHz cycle, and the
// digital CDR produces 15, 16 or 17 recovered bits per cycle depending on
// whether the interpolation phase wrapped. The lane counts and bit widths
// below are the ones printed on the receiver block diagram; the phase
// accumulator fraction width is this design's own choice.
package cdr_pkg;

  // Parallel blind samples per CDR clock cycle (4:16 demux).
  localparam int unsigned N_PAR  = 16;
  // Maximum interpolated samples per cycle (one extra on a backward wrap).
  localparam int unsigned N_OUT  = N_PAR + 1;
  // Number of interleaved I&D/ADC channels.
  localparam int unsigned N_ADC  = 4;

  localparam int unsigned ADC_W  = 5;   // 1UI I&D ADC code, unsigned
  localparam int unsigned S_W    = 6;   // signed 1UI sample: 2*code-31
  localparam int unsigned Y_W    = 7;   // signed 2UI I&D sample
  localparam int unsigned PHI_W  = 5;   // average interpolation phase, 32 steps per UI
  localparam int unsigned X_W    = 13;  // interpolated sample
  localparam int unsigned XPD_W  = 10;  // interpolated sample / 8, to the MMPD
  localparam int unsigned XDFE_W = 9;   // interpolated sample / 16, to the DFE
  localparam int unsigned PD_W   = 11;  // MMPD output per sample
  localparam int unsigned N_PD   = 16;  // MMPD outputs per cycle
  localparam int unsigned CNT_W  = 5;   // holds 0..17

  // What the interpolation phase did at the start of a cycle.
  typedef enum logic [1:0] {
    WRAP_NONE = 2'd0,  // 16 samples
    WRAP_FWD  = 2'd1,  // phase passed 1UI upward: one sample dropped, 15 out
    WRAP_BWD  = 2'd2   // phase passed 0 downward: one sample added, 17 out
  } wrap_e;

endpackage
