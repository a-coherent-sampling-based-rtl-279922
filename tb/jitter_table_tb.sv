// jitter_table_tb: jitter sweep of the measurement method.
//
// Five copies of the complete design run side by side with 10, 9, 8, 7 and
// 6 ps RMS jitter injected on both oscillators (T_ro1 = 5 ns, Delta = 40 ps).
// From 4000 beat periods each, the testbench computes the mean and standard
// deviation of the counts and the jitter estimate
//   sigma = sigma_beat * Delta / sqrt(2 * T_ro1 / Delta),
// prints one table row per copy, and checks that every estimate is within
// 1 ps of the injected jitter and every mean within 1 of 125.
module jitter_table_tb;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int  NCASE = 5;
  localparam int  NMEAS = 4000;
  localparam real T1 = 5000.0, DELTA = 40.0;
  localparam int  JIT_FS [NCASE] = '{10_000, 9_000, 8_000, 7_000, 6_000};

  logic en = 1'b0;
  int   checks = 0, failures = 0;
  bit   done [NCASE];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  for (genvar c = 0; c < NCASE; c++) begin : g_case
    logic       rst_n = 1'b0;
    logic       clk_ro2, tbeat, count_valid, overflow;
    logic [7:0] count;

    coherent_jitter_top #(.JITTER_FS(JIT_FS[c]), .SEED_RO1(100 + 2 * c), .SEED_RO2(101 + 2 * c)) dut (
      .en(en), .rst_n(rst_n), .clk_ro2(clk_ro2), .tbeat(tbeat),
      .count(count), .count_valid(count_valid), .overflow(overflow)
    );

    initial begin
      real sum, sumsq, mean, sd_beat, est, inj;
      int  n;
      done[c] = 1'b0;
      wait (en);
      repeat (3) @(posedge clk_ro2);
      #1 rst_n = 1'b1;
      sum = 0.0; sumsq = 0.0; n = 0;
      while (n < NMEAS) begin
        @(posedge clk_ro2);
        #1;
        if (count_valid) begin
          sum += real'(count); sumsq += real'(count) * real'(count); n++;
        end
      end
      mean    = sum / n;
      sd_beat = $sqrt(sumsq / n - mean * mean);
      est     = sd_beat * DELTA / $sqrt(2.0 * T1 / DELTA);
      inj     = real'(JIT_FS[c]) / 1000.0;
      $display("injected %5.1f ps | mean %7.2f | sigma_beat %5.2f | estimate %6.2f ps",
               inj, mean, sd_beat, est);
      check(mean > 124.0 && mean < 126.0, $sformatf("mean count at %.0f ps", inj));
      check(est > inj - 1.0 && est < inj + 1.0, $sformatf("estimate at %.0f ps", inj));
      done[c] = 1'b1;
    end
  end

  initial begin
    #10000 en = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
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
