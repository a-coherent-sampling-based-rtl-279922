// ring_oscillator_tb: self-checking test of the jittered oscillator model.
//
// Instance "jit" runs at 5 ns with 7 ps RMS period jitter; 4000 periods are
// timed and their mean and standard deviation must be within 0.5 ps of 5 ns
// and 7 ps (the statistical error at this size is about 0.1 ps), and the
// mean high time must be half a period. Instance "ideal" runs at 5.04 ns
// with no jitter and must produce exact periods and start START_FS after
// enable. Both must stay low while disabled and restart when enabled again.
module ring_oscillator_tb;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int NPER = 4000;

  logic en = 1'b0;
  logic clk_jit, clk_ideal;
  int   checks = 0, failures = 0;

  ring_oscillator #(.PERIOD_FS(5_000_000), .JITTER_FS(7_000), .SEED(3), .START_FS(0))
    u_jit (.en(en), .clk(clk_jit));
  ring_oscillator #(.PERIOD_FS(5_040_000), .JITTER_FS(0), .SEED(5), .START_FS(1_000_000))
    u_ideal (.en(en), .clk(clk_ideal));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  realtime t_en, t_prev, t_now, t_fall;
  real     sum, sumsq, sumhi, mean, sd, hi_mean;
  int      ideal_bad;

  // exact periods of the jitter-free instance
  initial begin
    realtime tp;
    ideal_bad = 0;
    wait (en);
    t_en = $realtime;
    @(posedge clk_ideal);
    check($realtime - t_en > 999.999 && $realtime - t_en < 1000.001, "start delay of ideal oscillator");
    tp = $realtime;
    repeat (200) begin
      @(posedge clk_ideal);
      if ($realtime - tp < 5039.999 || $realtime - tp > 5040.001) ideal_bad++;
      tp = $realtime;
    end
    check(ideal_bad == 0, "ideal oscillator period is 5040 ps");
  end

  initial begin
    #20000;
    check(clk_jit == 1'b0 && clk_ideal == 1'b0, "outputs low before enable");
    en = 1'b1;
    @(posedge clk_jit);
    t_prev = $realtime;
    sum = 0.0; sumsq = 0.0; sumhi = 0.0;
    for (int i = 0; i < NPER; i++) begin
      @(negedge clk_jit);
      t_fall = $realtime;
      @(posedge clk_jit);
      t_now = $realtime;
      sum   += t_now - t_prev;
      sumsq += (t_now - t_prev) * (t_now - t_prev);
      sumhi += t_fall - t_prev;
      t_prev = t_now;
    end
    mean    = sum / NPER;
    sd      = $sqrt(sumsq / NPER - mean * mean);
    hi_mean = sumhi / NPER;
    $display("jittered oscillator: mean period %.3f ps, RMS jitter %.3f ps, mean high %.3f ps",
             mean, sd, hi_mean);
    check(mean > 4999.5 && mean < 5000.5, "mean period 5000 ps");
    check(sd > 6.5 && sd < 7.5, "RMS period jitter 7 ps");
    check(hi_mean > 2499.5 && hi_mean < 2500.5, "50% duty cycle");

    // disable: both must stop and stay low
    en = 1'b0;
    #20000;
    t_now = $realtime;
    #50000;
    check(clk_jit == 1'b0 && clk_ideal == 1'b0, "outputs low while disabled");
    fork
      begin @(clk_jit); check(0, "edge on jittered output while disabled"); end
      begin @(clk_ideal); check(0, "edge on ideal output while disabled"); end
      #50000;
    join_any
    disable fork;
    // re-enable
    en = 1'b1;
    t_en = $realtime;
    @(posedge clk_ideal);
    check($realtime - t_en > 999.999 && $realtime - t_en < 1000.001, "ideal oscillator restarts");
    repeat (3) @(posedge clk_jit);
    check(1'b1, "jittered oscillator restarts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(real'(NPER) * 5000.0 + 500000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
