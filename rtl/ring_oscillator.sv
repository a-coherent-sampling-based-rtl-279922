// ring_oscillator: BEHAVIOURAL MODEL of a free-running ring oscillator with
// random (Gaussian) period jitter. Not synthesizable: a real ring oscillator
// is a loop of inverters placed by hand, whose period is set by gate and
// routing delays.
//
// Every period is drawn independently as T = PERIOD_FS + N(0, JITTER_FS)
// femtoseconds, so edge times accumulate the jitter like a real free-running
// oscillator driven by thermal noise (a random walk of the phase). The output
// is high for the first half of the drawn period and low for the rest.
//
// Interface: while en is 0 the output is held low. When en rises, the
// oscillator waits START_FS and then starts with a rising edge. Clearing en
// stops it at the end of the current period. SEED selects the random sequence,
// so two instances with different seeds have independent jitter.
//
// The Gaussian period model follows the jitter model used for the method;
// the enable input, the start delay and the 50 % duty cycle are this model's
// choices. Delays are computed at run time, so a lint tool may warn that a
// delay could be zero; the drawn period is always positive in practice
// (PERIOD_FS is hundreds of standard deviations above zero).
module ring_oscillator #(
  parameter int unsigned PERIOD_FS = jitter_meter_pkg::RO1_PERIOD_FS,  // ideal period
  parameter int unsigned JITTER_FS = jitter_meter_pkg::JITTER_FS,      // RMS period jitter
  parameter int          SEED      = 1,                                // random sequence
  parameter int unsigned START_FS  = 0                                 // delay after en rises
) (
  input  logic en,   // oscillator enable
  output logic clk   // jittered clock
);
  timeunit 1ps;
  timeprecision 1fs;

  int seed;
  int period_fs;
  int high_fs;

  initial begin
    seed = SEED;
    clk  = 1'b0;
    forever begin
      clk = 1'b0;
      wait (en);
      #(real'(START_FS) * 1.0e-3);
      while (en) begin
        period_fs = $dist_normal(seed, int'(PERIOD_FS), int'(JITTER_FS));
        if (period_fs < 2) period_fs = 2;
        high_fs = period_fs / 2;
        clk = 1'b1;
        #(real'(high_fs) * 1.0e-3);
        clk = 1'b0;
        #(real'(period_fs - high_fs) * 1.0e-3);
      end
    end
  end
endmodule
