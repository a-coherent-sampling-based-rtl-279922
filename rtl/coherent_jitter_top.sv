// coherent_jitter_top: on-chip measurement of the random jitter of a ring
// oscillator by coherent sampling.
//
// Two ring oscillators built alike run at nearly the same period: T_ro1 and
// T_ro2 = T_ro1 + Delta. The first is sampled by the second in a D flip-flop,
// which produces a slow beat signal; a counter clocked by the second
// oscillator reports the length of every beat period in T_ro2 cycles. The
// mean count is T_ro1/Delta and, with the same RMS period jitter sigma on
// both oscillators, the standard deviation of the counts is
//   sigma_beat = sqrt(2 * T_ro1/Delta) * sigma / Delta,
// so sigma = sigma_beat * Delta / sqrt(2 * T_ro1/Delta). The statistics are
// meant to be computed outside the chip from the count stream.
//
// The oscillators are behavioural models (see ring_oscillator); the rest is
// synthesizable. Defaults are the reference operating point: T_ro1 = 5 ns,
// Delta = 40 ps, 7 ps RMS jitter, 8-bit counter (mean count 125).
//
// Interface: en starts both oscillators; rst_n resets the counter (release it
// synchronously to clk_ro2, which is brought out). count, count_valid and
// overflow are in the clk_ro2 domain, one strobe per beat period.
// Giving both oscillators the same jitter and starting the second one a
// quarter period after the first (to avoid sampling exactly on an edge at
// start-up) are this design's choices.
module coherent_jitter_top #(
  parameter int unsigned RO1_PERIOD_FS = jitter_meter_pkg::RO1_PERIOD_FS,
  parameter int unsigned DELTA_FS      = jitter_meter_pkg::DELTA_FS,
  parameter int unsigned JITTER_FS     = jitter_meter_pkg::JITTER_FS,
  parameter int          SEED_RO1      = 11,
  parameter int          SEED_RO2      = 29,
  parameter int unsigned COUNT_W       = jitter_meter_pkg::COUNT_W
) (
  input  logic               en,           // enables both oscillators
  input  logic               rst_n,        // active-low counter reset
  output logic               clk_ro2,      // T_ro2, clock of the outputs below
  output logic               tbeat,        // beat signal
  output logic [COUNT_W-1:0] count,        // beat period in T_ro2 cycles
  output logic               count_valid,  // count updated
  output logic               overflow      // count saturated
);
  timeunit 1ps;
  timeprecision 1fs;

  logic ro1;

  ring_oscillator #(
    .PERIOD_FS (RO1_PERIOD_FS),
    .JITTER_FS (JITTER_FS),
    .SEED      (SEED_RO1),
    .START_FS  (0)
  ) u_ro1 (
    .en  (en),
    .clk (ro1)
  );

  ring_oscillator #(
    .PERIOD_FS (RO1_PERIOD_FS + DELTA_FS),
    .JITTER_FS (JITTER_FS),
    .SEED      (SEED_RO2),
    .START_FS  (RO1_PERIOD_FS / 4)
  ) u_ro2 (
    .en  (en),
    .clk (clk_ro2)
  );

  jitter_meter_core #(.COUNT_W(COUNT_W)) u_core (
    .clk_ro2     (clk_ro2),
    .ro1         (ro1),
    .rst_n       (rst_n),
    .tbeat       (tbeat),
    .count       (count),
    .count_valid (count_valid),
    .overflow    (overflow)
  );
endmodule
