// beat_counter_tb: self-checking test of the beat-period counter.
//
// The testbench drives tbeat directly, synchronous to the clock, as a series
// of periods with random lengths (2 to 400 cycles, so some exceed the 8-bit
// range) and random high times. A queue holds the expected values: each
// period after the first is reported as min(length, 255) with overflow set
// exactly when the length exceeds 255. The first, partial period after reset
// must not be reported, the strobe must last one cycle, and it must come one
// cycle after the clock edge that samples the new high level.
module beat_counter_tb;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned W   = 8;
  localparam int unsigned MAX = (1 << W) - 1;
  localparam int NPER = 400;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         tbeat = 1'b1;   // high during reset: not an edge
  logic [W-1:0] count;
  logic         count_valid;
  logic         overflow;

  int checks = 0, failures = 0;
  int exp_q[$];
  int rise_cycle[$];
  int cycle = 0;
  int n_ovf = 0, n_strobes = 0;

  beat_counter #(.COUNT_W(W)) dut (
    .clk(clk), .rst_n(rst_n), .tbeat(tbeat),
    .count(count), .count_valid(count_valid), .overflow(overflow)
  );

  always #2520 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // stimulus: random periods, driven just after each clock edge
  initial begin
    int len, hi;
    repeat (3) @(posedge clk);
    #100 rst_n = 1'b1;
    // partial first period: stays high, then low for a while
    repeat (5) @(posedge clk);
    #100 tbeat = 1'b0;
    repeat (7) @(posedge clk);
    for (int p = 0; p <= NPER; p++) begin
      len = (p % 7 == 3) ? int'($urandom_range(400, 256)) : int'($urandom_range(255, 2));
      if (p % 50 == 0) len = 255;            // edge of the range
      if (p % 50 == 1) len = 256;            // first overflowing length
      hi  = int'($urandom_range(len - 1, 1));
      #100 tbeat = 1'b1;
      rise_cycle.push_back(cycle + 1);       // sampled at the next edge
      repeat (hi) @(posedge clk);
      #100 tbeat = 1'b0;
      repeat (len - hi) @(posedge clk);
      if (p < NPER) exp_q.push_back(len);
    end
    repeat (3) @(posedge clk);
    checks++;
    if (n_strobes != NPER) begin
      failures++;
      $display("FAIL: %0d strobes, expected %0d", n_strobes, NPER);
    end
    checks++;
    if (n_ovf == 0) begin
      failures++;
      $display("FAIL: overflow never reported");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker: compare each strobe with the expected length
  int exp_len;
  initial begin
    int ridx;
    ridx = 0;
    forever begin
      @(posedge clk);
      #50;
      if (count_valid) begin
        n_strobes++;
        exp_len = (exp_q.size() > 0) ? exp_q.pop_front() : -1;
        checks++;
        if (exp_len <= 0) begin
          failures++;
          $display("FAIL: unexpected strobe at cycle %0d", cycle);
        end else begin
          if (count !== W'(exp_len > int'(MAX) ? MAX : exp_len) ||
              overflow !== (exp_len > int'(MAX))) begin
            failures++;
            $display("FAIL: count=%0d ovf=%b, expected length %0d", count, overflow, exp_len);
          end
        end
        if (overflow) n_ovf++;
        // latency: strobe registered by the edge that samples the rise
        ridx++;
        checks++;
        if (ridx >= rise_cycle.size() || rise_cycle[ridx] != cycle) begin
          failures++;
          $display("FAIL: strobe at cycle %0d, rise sampled at %0d", cycle,
                   ridx < rise_cycle.size() ? rise_cycle[ridx] : -1);
        end
        @(posedge clk);
        #50;
        checks++;
        if (count_valid) begin
          failures++;
          $display("FAIL: strobe longer than one cycle");
        end
      end
    end
  end

  initial begin : watchdog
    repeat (NPER * 420 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
