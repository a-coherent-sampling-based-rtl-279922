// jitter_meter_core_tb: self-checking test of sampler plus counter with
// jitter-free clocks.
//
// Four copies of the core are driven by ideal clocks T_ro1 = 5 ns and
// T_ro2 = T_ro1 + Delta, with Delta = 40, 50, 30 and 10 ps. By coherent
// sampling, each sample falls Delta further along the T_ro1 waveform, so the
// beat period is exactly T_ro1/Delta samples when that ratio is an integer:
// 125 and 100; for 30 ps it must alternate between 166 and 167 with a mean
// of 166.67; for 10 ps it is 500, beyond the 8-bit range, so every value
// must be 255 with overflow set. Copy 0 also gets a reset in mid-run: no
// value may be reported until a full period has been seen again.
module jitter_meter_core_tb;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int NCASE = 4;
  localparam real T1 = 5000.0;
  localparam real DELTA [NCASE] = '{40.0, 50.0, 30.0, 10.0};
  localparam int  NPER = 60;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic       ro1 [NCASE];
  logic       ro2 [NCASE];
  logic       rst_n [NCASE];
  logic       tbeat [NCASE];
  logic [7:0] count [NCASE];
  logic       valid [NCASE];
  logic       ovf [NCASE];
  int         nval [NCASE];
  int         nbad [NCASE];
  real        csum [NCASE];
  bit         done [NCASE];

  for (genvar c = 0; c < NCASE; c++) begin : g_case
    jitter_meter_core #(.COUNT_W(8)) dut (
      .clk_ro2(ro2[c]), .ro1(ro1[c]), .rst_n(rst_n[c]), .tbeat(tbeat[c]),
      .count(count[c]), .count_valid(valid[c]), .overflow(ovf[c])
    );

    initial begin
      ro1[c] = 1'b0;
      forever begin
        #(T1 / 2.0) ro1[c] = ~ro1[c];
      end
    end
    initial begin
      ro2[c] = 1'b0;
      #1253.0;
      forever begin
        ro2[c] = 1'b1;
        #((T1 + DELTA[c]) / 2.0);
        ro2[c] = 1'b0;
        #((T1 + DELTA[c]) / 2.0);
      end
    end

    initial begin
      int v;
      nval[c] = 0; nbad[c] = 0; csum[c] = 0.0; done[c] = 1'b0;
      rst_n[c] = 1'b0;
      repeat (3) @(posedge ro2[c]);
      #1 rst_n[c] = 1'b1;
      while (nval[c] < NPER) begin
        @(posedge ro2[c]);
        #1;
        if (valid[c]) begin
          v = int'(count[c]);
          nval[c]++;
          csum[c] += real'(v);
          case (c)
            0: if (v != 125 || ovf[c]) nbad[c]++;
            1: if (v != 100 || ovf[c]) nbad[c]++;
            2: if ((v != 166 && v != 167) || ovf[c]) nbad[c]++;
            default: if (v != 255 || !ovf[c]) nbad[c]++;
          endcase
        end
      end
      check(nbad[c] == 0, $sformatf("case %0d: all %0d counts as expected", c, NPER));
      if (c == 2)
        check(csum[c] / NPER > 166.6 && csum[c] / NPER < 166.75,
              $sformatf("case 2: mean count %.3f is 5000/30", csum[c] / NPER));
      done[c] = 1'b1;
    end
  end

  // mid-run reset of copy 0, checked after its main run
  initial begin
    int cyc;
    wait (done[0]);
    @(posedge ro2[0]);
    #1 rst_n[0] = 1'b0;
    @(posedge ro2[0]);
    #1 rst_n[0] = 1'b1;
    // first strobe must come after the next rising edge of the beat is armed
    // and a whole period has passed: at least 125 and at most 250 cycles later
    cyc = 0;
    do begin
      @(posedge ro2[0]);
      #1;
      cyc++;
    end while (!valid[0] && cyc < 400);
    check(valid[0] && count[0] == 8'd125 && cyc >= 125 && cyc <= 251,
          $sformatf("after reset first count %0d after %0d cycles", count[0], cyc));
  end

  initial begin
    wait (done[0] && done[1] && done[2] && done[3]);
    #(T1 * 300.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(T1 * 600.0 * (NPER + 5));
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
