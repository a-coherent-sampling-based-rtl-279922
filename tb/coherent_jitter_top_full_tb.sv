// coherent_jitter_top_full_tb: one complete measurement with the design at
// its default configuration (5 ns oscillator, 40 ps period difference, 7 ps
// RMS jitter on each oscillator, 8-bit counter).
//
// 8000 beat periods are collected, the size of a typical measurement
// population. The testbench builds the histogram of the counts, their mean
// and standard deviation, and the jitter estimate
//   sigma = sigma_beat * Delta / sqrt(2 * T_ro1 / Delta).
// Checks: no overflow, mean within 0.5 of T_ro1/Delta = 125, estimate within
// 1 ps of the injected 7 ps, and every count within 125 +/- 8 sigma_beat
// (about 103..147), i.e. no chattering edge was counted as a period.
module coherent_jitter_top_full_tb;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int  NMEAS = 8000;
  localparam real T1 = 5000.0, DELTA = 40.0, SIGMA = 7.0;

  logic       en = 1'b0;
  logic       rst_n = 1'b0;
  logic       clk_ro2, tbeat, count_valid, overflow;
  logic [7:0] count;

  int checks = 0, failures = 0;
  int hist [256];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  coherent_jitter_top dut (
    .en(en), .rst_n(rst_n), .clk_ro2(clk_ro2), .tbeat(tbeat),
    .count(count), .count_valid(count_valid), .overflow(overflow)
  );

  initial begin
    real sum, sumsq, mean, sd_beat, est;
    int  v, n, n_ovf, n_out, vmin, vmax;
    foreach (hist[i]) hist[i] = 0;
    #10000;
    en = 1'b1;
    repeat (3) @(posedge clk_ro2);
    #1 rst_n = 1'b1;
    sum = 0.0; sumsq = 0.0; n = 0; n_ovf = 0; n_out = 0; vmin = 255; vmax = 0;
    while (n < NMEAS) begin
      @(posedge clk_ro2);
      #1;
      if (count_valid) begin
        v = int'(count);
        hist[v]++;
        if (overflow) n_ovf++;
        if (v < 103 || v > 147) n_out++;
        if (v < vmin) vmin = v;
        if (v > vmax) vmax = v;
        sum += real'(v); sumsq += real'(v) * real'(v); n++;
      end
    end
    mean    = sum / n;
    sd_beat = $sqrt(sumsq / n - mean * mean);
    est     = sd_beat * DELTA / $sqrt(2.0 * T1 / DELTA);
    $display("histogram of %0d beat periods (count: occurrences)", n);
    for (int i = vmin; i <= vmax; i++)
      if (hist[i] > 0) $display("  %3d: %0d", i, hist[i]);
    $display("mean %.3f  sigma_beat %.3f  jitter estimate %.2f ps (injected %.1f ps)",
             mean, sd_beat, est, SIGMA);
    check(n_ovf == 0, "no overflow");
    check(n_out == 0, $sformatf("%0d counts outside 103..147", n_out));
    check(mean > 124.5 && mean < 125.5, "mean count is T_ro1/Delta");
    check(est > SIGMA - 1.0 && est < SIGMA + 1.0, "jitter estimate within 1 ps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(T1 * 130.0 * (NMEAS + 100));
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
