// jitter_meter_core: the digital part of the coherent-sampling jitter meter.
//
// ro1 (the clock under test) is sampled by clk_ro2 in beat_sampler; the
// resulting beat signal is timed by beat_counter, also clocked by clk_ro2.
// Each count_valid strobe delivers the length of one beat period in clk_ro2
// cycles. With ideal periods T_ro1 and T_ro2 = T_ro1 + Delta the value is
// T_ro1/Delta; random jitter of RMS sigma on both clocks spreads the values
// with a standard deviation of sqrt(2*T_ro1/Delta)*sigma/Delta cycles, which
// is how sigma is recovered from a population of counts.
//
// Everything here runs in the clk_ro2 domain; rst_n is asserted
// asynchronously and should be released synchronously to clk_ro2. The
// grouping of the flip-flop and the counter follows the reference circuit.
module jitter_meter_core #(
  parameter int unsigned COUNT_W = jitter_meter_pkg::COUNT_W
) (
  input  logic               clk_ro2,      // sampling clock T_ro2
  input  logic               ro1,          // clock under test T_ro1
  input  logic               rst_n,        // active-low reset
  output logic               tbeat,        // beat signal
  output logic [COUNT_W-1:0] count,        // beat period in clk_ro2 cycles
  output logic               count_valid,  // count updated
  output logic               overflow      // count saturated
);
  timeunit 1ps;
  timeprecision 1fs;

  beat_sampler u_sampler (
    .clk_ro2 (clk_ro2),
    .ro1     (ro1),
    .tbeat   (tbeat)
  );

  beat_counter #(.COUNT_W(COUNT_W)) u_counter (
    .clk         (clk_ro2),
    .rst_n       (rst_n),
    .tbeat       (tbeat),
    .count       (count),
    .count_valid (count_valid),
    .overflow    (overflow)
  );
endmodule
