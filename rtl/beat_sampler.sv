// beat_sampler: the coherent sampler of the jitter meter.
//
// A single rising-edge D flip-flop samples the oscillator under test (ro1)
// with the second oscillator (clk_ro2). Because the two periods differ by a
// small Delta, each sample lands Delta later in the ro1 waveform than the one
// before, so the flip-flop output is a slow square wave, the beat signal,
// whose period is about T_ro1/Delta cycles of clk_ro2 (125 at 5 ns and 40 ps).
// Jitter on either oscillator moves the points where the beat signal toggles.
//
// Interface: ro1 is asynchronous to clk_ro2; tbeat changes one flip-flop delay
// after a rising edge of clk_ro2 and is synchronous to it from then on.
// The single flip-flop without reset or synchronizer follows the reference
// circuit; its power-up value is ignored by the counter behind it. A sample
// taken while ro1 is changing may be metastable in silicon; no extra stage
// is added because that would only delay the beat signal by whole cycles.
module beat_sampler (
  input  logic clk_ro2,  // sampling clock T_ro2
  input  logic ro1,      // signal under test T_ro1
  output logic tbeat     // beat signal
);
  timeunit 1ps;
  timeprecision 1fs;

  always_ff @(posedge clk_ro2) begin
    tbeat <= ro1;
  end
endmodule
