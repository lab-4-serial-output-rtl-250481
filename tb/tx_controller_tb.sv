// Self-checking testbench for tx_controller.
//
// Drives random nextbit and load pulses and compares bitselect and done,
// cycle by cycle, with a reference sequencer written from the state list:
// load -> start bit from any state; nextbit steps start, bit 0..7, stop,
// idle; idle holds. Counts how often each state was entered, how often a
// load interrupted a character, and how often load and nextbit coincided.
module tx_controller_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import serial_port_pkg::*;

  logic clk = 1'b0;
  always #20 clk = ~clk;

  logic      load = 1'b0, nextbit = 1'b0;
  tx_state_e bitselect;
  logic      done;
  int        ref_code = 0;                 // 0 idle, 1 start, 2..9 bits, 10 stop
  int checks = 0, failures = 0;
  int entered [11];
  int restarts = 0, collisions = 0;

  tx_controller dut (.clk(clk), .load(load), .nextbit(nextbit),
                     .bitselect(bitselect), .done(done));

  initial begin
    repeat (50_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (entered[i]) entered[i] = 0;
    #1;
    checks++;
    if (bitselect !== ST_IDLE || done !== 1'b1) begin
      failures++;
      $display("FAIL power-up state %0d done=%0d", bitselect, done);
    end
    for (int c = 0; c < 20_000; c++) begin
      @(negedge clk);
      nextbit = ($urandom_range(0, 2) == 0);
      load    = ($urandom_range(0, 39) == 0);
      @(posedge clk);
      if (load) begin
        if (ref_code != 0) restarts++;
        if (nextbit) collisions++;
        ref_code = 1;
      end else if (nextbit) begin
        if (ref_code == 10)     ref_code = 0;
        else if (ref_code != 0) ref_code = ref_code + 1;
      end
      entered[ref_code]++;
      #1;
      checks += 2;
      if (int'(bitselect) != ref_code) begin
        failures++;
        $display("FAIL cycle %0d: bitselect=%0d expected %0d", c, bitselect, ref_code);
      end
      if (done !== (ref_code == 0)) begin
        failures++;
        $display("FAIL cycle %0d: done=%0d in state %0d", c, done, ref_code);
      end
    end
    foreach (entered[i]) begin
      checks++;
      if (entered[i] == 0) begin failures++; $display("FAIL state %0d never reached", i); end
    end
    checks += 2;
    if (restarts == 0)   begin failures++; $display("FAIL no mid-character load"); end
    if (collisions == 0) begin failures++; $display("FAIL load never met nextbit"); end
    $display("restarts %0d, load+nextbit %0d", restarts, collisions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
