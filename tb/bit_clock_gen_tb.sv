// Self-checking testbench for bit_clock_gen.
//
// Four instances: the default one (reload 2621, derived from 25.175 MHz and
// 9600 bps), the slow-clock simulation setting (19200 Hz clock, reload 1),
// a reload of 6, and a 25 MHz clock (reload 2603). For each, every nextbit pulse must be exactly one
// cycle long and come exactly reload+1 cycles after the previous pulse or
// after the last cycle of a load pulse; loads arrive at random moments.
module bit_clock_gen_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0;
  always #20 clk = ~clk;

  localparam int NI = 4;
  localparam int PERIOD [NI] = '{2622, 2, 7, 2604};   // cycles between pulses

  logic          load = 1'b0;
  logic [NI-1:0] nextbit;
  int checks = 0, failures = 0;
  int pulses [NI];
  int since  [NI];   // cycles since the last pulse or load
  int loads = 0;

  bit_clock_gen                                    dut0 (.clk(clk), .load(load), .nextbit(nextbit[0]));
  bit_clock_gen #(.CLK_HZ(19_200), .BAUD(9_600))   dut1 (.clk(clk), .load(load), .nextbit(nextbit[1]));
  bit_clock_gen #(.COUNT_MAX(6))                   dut2 (.clk(clk), .load(load), .nextbit(nextbit[2]));
  bit_clock_gen #(.CLK_HZ(25_000_000))             dut3 (.clk(clk), .load(load), .nextbit(nextbit[3]));

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NI; k++) begin pulses[k] = 0; since[k] = 0; end
    // Start every divider from a load so that the reference is aligned.
    @(negedge clk) load = 1'b1;
    @(negedge clk) load = 1'b0;
    // Here the counters hold their reload value, which is one cycle after a
    // pulse: since = 1.
    for (int k = 0; k < NI; k++) since[k] = 1;
    for (int c = 0; c < 60_000; c++) begin
      @(negedge clk);
      // since[k] counts the cycles elapsed since the last pulse/load edge.
      for (int k = 0; k < NI; k++) begin
        since[k]++;
        checks++;
        if (nextbit[k] !== (since[k] == PERIOD[k])) begin
          failures++;
          $display("FAIL inst %0d cycle %0d: nextbit=%0d since=%0d", k, c, nextbit[k], since[k]);
        end
        if (nextbit[k]) begin pulses[k]++; since[k] = 0; end
      end
      // Occasional load pulse of 1..3 cycles, at a random point.
      if ($urandom_range(0, 9999) < 3) begin
        automatic int len = $urandom_range(1, 3);
        loads++;
        load = 1'b1;
        for (int j = 0; j < len; j++) begin
          @(negedge clk);
          for (int k = 0; k < NI; k++) begin
            checks++;
            // Each clock edge with load high puts the counter at its reload
            // value, so no nextbit can appear during the pulse.
            if (nextbit[k] !== 1'b0) begin
              failures++;
              $display("FAIL inst %0d: nextbit during load", k);
            end
            since[k] = 1;
          end
        end
        load = 1'b0;
      end
    end
    for (int k = 0; k < NI; k++) begin
      checks++;
      if (pulses[k] < 10) begin
        failures++;
        $display("FAIL inst %0d: only %0d pulses", k, pulses[k]);
      end
    end
    checks++;
    if (loads == 0) begin failures++; $display("FAIL no load exercised"); end
    $display("pulses %0d %0d %0d %0d, loads %0d", pulses[0], pulses[1], pulses[2], pulses[3], loads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
