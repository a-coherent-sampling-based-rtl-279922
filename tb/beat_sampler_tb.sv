// beat_sampler_tb: self-checking test of the coherent sampler flip-flop.
//
// The sampling clock runs at 5.04 ns; ro1 is driven with random levels at
// random instants between clock edges. After every rising edge the output
// must equal the level ro1 had just before that edge, and it must not change
// between edges.
module beat_sampler_tb;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk_ro2 = 1'b0;
  logic ro1     = 1'b0;
  logic tbeat;
  int   checks   = 0;
  int   failures = 0;
  logic expected;

  beat_sampler dut (.clk_ro2(clk_ro2), .ro1(ro1), .tbeat(tbeat));

  always #2520 clk_ro2 = ~clk_ro2;

  // ro1 changes away from the sampling edge
  initial begin
    forever begin
      @(negedge clk_ro2);
      #($urandom_range(2000, 100));
      ro1 = 1'($urandom);
    end
  end

  initial begin
    repeat (3) @(posedge clk_ro2);
    repeat (2000) begin
      @(negedge clk_ro2);
      #2400;                 // just before the rising edge
      expected = ro1;
      @(posedge clk_ro2);
      #100;
      checks++;
      if (tbeat !== expected) begin
        failures++;
        $display("FAIL: tbeat=%b expected %b at %t", tbeat, expected, $realtime);
      end
      #2000;                 // mid low phase: still holding
      checks++;
      if (tbeat !== expected) begin
        failures++;
        $display("FAIL: tbeat changed between edges at %t", $realtime);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk_ro2);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
