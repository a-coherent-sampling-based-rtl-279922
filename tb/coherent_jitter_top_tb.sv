// coherent_jitter_top_tb: end-to-end test of the jitter meter.
//
// Copy "meas" is the reference configuration (T_ro1 = 5 ns, Delta = 40 ps,
// 7 ps RMS jitter on both oscillators, 8-bit counter). It is run for 2000
// beat periods; the testbench computes the mean and standard deviation of
// the counts and the jitter estimate
//   sigma = sigma_beat * Delta / sqrt(2 * T_ro1 / Delta),
// which must be within 1 ps of the injected 7 ps, with a mean count within
// 1 of T_ro1/Delta = 125. The oscillators are then stopped, the counter is
// reset and everything restarted: the first value after the restart must be
// a whole period again. Copy "ovf" uses Delta = 15 ps, a beat period of
// about 333 cycles, which the 8-bit counter must report as saturated; its
// jitter is lowered to 1 ps so that the beat signal does not chatter at its
// edges (with 7 ps against a 15 ps Delta it often would).
// Each mechanism (count strobe, restart with discarded first period,
// overflow) is counted and must occur at least once.
module coherent_jitter_top_tb;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int  NMEAS = 2000;
  localparam real T1 = 5000.0, DELTA = 40.0, SIGMA = 7.0;

  logic       en = 1'b0;
  logic       rst_n = 1'b0;
  logic       clk_a, tbeat_a, valid_a, ovf_a;
  logic [7:0] count_a;
  logic       rst_b_n = 1'b0;
  logic       clk_b, tbeat_b, valid_b, ovf_b;
  logic [7:0] count_b;

  int checks = 0, failures = 0;
  int n_strobe = 0, n_restart = 0, n_ovf = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  coherent_jitter_top u_meas (
    .en(en), .rst_n(rst_n), .clk_ro2(clk_a), .tbeat(tbeat_a),
    .count(count_a), .count_valid(valid_a), .overflow(ovf_a)
  );

  coherent_jitter_top #(.DELTA_FS(15_000), .JITTER_FS(1_000), .SEED_RO1(7), .SEED_RO2(8)) u_ovf (
    .en(en), .rst_n(rst_b_n), .clk_ro2(clk_b), .tbeat(tbeat_b),
    .count(count_b), .count_valid(valid_b), .overflow(ovf_b)
  );

  // overflow copy: every value must be saturated
  int nb = 0;
  initial begin
    wait (en);
    repeat (3) @(posedge clk_b);
    #1 rst_b_n = 1'b1;
    while (nb < 20) begin
      @(posedge clk_b);
      #1;
      if (valid_b) begin
        nb++;
        if (ovf_b) n_ovf++;
        check(count_b == 8'hFF && ovf_b, $sformatf("overflow copy: count %0d ovf %b", count_b, ovf_b));
      end
    end
  end

  initial begin
    real sum, sumsq, mean, sd_beat, est;
    int  v, n;
    #10000;
    en = 1'b1;
    repeat (3) @(posedge clk_a);
    #1 rst_n = 1'b1;
    sum = 0.0; sumsq = 0.0; n = 0;
    while (n < NMEAS) begin
      @(posedge clk_a);
      #1;
      if (valid_a) begin
        n_strobe++;
        v = int'(count_a);
        check(!ovf_a && v > 90 && v < 160, $sformatf("count %0d in range", v));
        sum += real'(v); sumsq += real'(v) * real'(v); n++;
      end
    end
    mean    = sum / n;
    sd_beat = $sqrt(sumsq / n - mean * mean);
    est     = sd_beat * DELTA / $sqrt(2.0 * T1 / DELTA);
    $display("reference copy: %0d periods, mean %.2f, sigma_beat %.3f, jitter estimate %.2f ps (injected %.1f)",
             n, mean, sd_beat, est, SIGMA);
    check(mean > 124.0 && mean < 126.0, "mean count T_ro1/Delta");
    check(est > SIGMA - 1.0 && est < SIGMA + 1.0, "jitter estimate within 1 ps");

    // stop, reset, restart
    en = 1'b0;
    #20000;
    rst_n = 1'b0;
    #20000;
    en = 1'b1;
    repeat (3) @(posedge clk_a);
    #1 rst_n = 1'b1;
    do begin
      @(posedge clk_a);
      #1;
    end while (!valid_a);
    n_restart++;
    check(count_a > 90 && count_a < 160, $sformatf("first count after restart %0d is a whole period", count_a));

    wait (nb >= 20);
    check(n_strobe > 0, "count strobes occurred");
    check(n_restart > 0, "restart occurred");
    check(n_ovf > 0, "overflow occurred");
    $display("mechanisms: strobes=%0d restarts=%0d overflows=%0d", n_strobe, n_restart, n_ovf);
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
