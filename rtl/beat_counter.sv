// beat_counter: measures each period of the beat signal in sampling-clock cycles.
//
// The counter runs on the sampling clock T_ro2, which makes every beat period
// an integer number of cycles. The beat signal is registered once more and a
// rising edge is seen as a 0 followed by a 1. At each rising edge the number
// of cycles since the previous rising edge is output with a one-cycle
// count_valid strobe and the running count restarts at 1. The spread of these
// values is what the jitter estimate is computed from.
//
// Interface and timing:
//   count/count_valid/overflow are registered; count_valid is high for the
//   cycle after the clock edge that first samples the new high level of
//   tbeat, and count holds its value until the next strobe.
//   The partial period between reset and the first rising edge is never
//   reported (the edge register resets to 1 so the reset level is not taken
//   for an edge).
//   A period longer than 2**COUNT_W-1 cycles is reported as 2**COUNT_W-1 with
//   overflow set for that strobe.
// The 8-bit width and counting on T_ro2 follow the reference design; the
// full-period (rising to rising) measurement, the strobe, the discarded first
// period and the saturating overflow are this design's choices.
module beat_counter #(
  parameter int unsigned COUNT_W = jitter_meter_pkg::COUNT_W
) (
  input  logic               clk,          // T_ro2
  input  logic               rst_n,        // active-low, asynchronous assert
  input  logic               tbeat,        // beat signal from the sampler
  output logic [COUNT_W-1:0] count,        // last complete beat period in cycles
  output logic               count_valid,  // one-cycle strobe: count updated
  output logic               overflow      // period exceeded the counter range
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam logic [COUNT_W-1:0] CntMax = '1;

  logic               tbeat_q;   // previous beat level
  logic               armed;     // a rising edge has been seen since reset
  logic [COUNT_W-1:0] run_cnt;   // cycles since the last rising edge
  logic               run_ovf;   // run_cnt has saturated in this period
  logic               rise;

  assign rise = tbeat & ~tbeat_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tbeat_q     <= 1'b1;
      armed       <= 1'b0;
      run_cnt     <= '0;
      run_ovf     <= 1'b0;
      count       <= '0;
      count_valid <= 1'b0;
      overflow    <= 1'b0;
    end else begin
      tbeat_q     <= tbeat;
      count_valid <= 1'b0;
      if (rise) begin
        armed   <= 1'b1;
        run_cnt <= COUNT_W'(1);
        run_ovf <= 1'b0;
        if (armed) begin
          count       <= run_cnt;
          overflow    <= run_ovf;
          count_valid <= 1'b1;
        end
      end else if (run_cnt == CntMax) begin
        run_ovf <= 1'b1;
      end else begin
        run_cnt <= run_cnt + 1'b1;
      end
    end
  end
endmodule
