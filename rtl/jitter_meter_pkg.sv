// jitter_meter_pkg: shared constants of the coherent-sampling jitter meter.
//
// The values are the operating point at which the method is demonstrated:
// a 5 ns (200 MHz) oscillator under test, a second oscillator 40 ps slower,
// and an 8-bit beat-period counter. Times are kept as integer femtoseconds so
// that picosecond-scale period differences and jitter stay exact.
// JITTER_FS = 7 ps is the case whose histogram is shown for the method; the
// method is evaluated for 6 to 10 ps.
package jitter_meter_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  // Width of the beat-period counter (8 bits in the reference design).
  localparam int unsigned COUNT_W = 8;

  // Ideal period of the oscillator under test, T_ro1 (5 ns).
  localparam int unsigned RO1_PERIOD_FS = 5_000_000;

  // Ideal period difference Delta = T_ro2 - T_ro1 (40 ps).
  localparam int unsigned DELTA_FS = 40_000;

  // RMS period jitter of each oscillator (7 ps).
  localparam int unsigned JITTER_FS = 7_000;
endpackage
