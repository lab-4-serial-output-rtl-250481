// Self-checking testbench for status_port.
//
// Applies every combination of output enable and done flag, many times in
// random order, and checks the driven byte (0000000d while enabled) and the
// bus enable (equal to oe).
module status_port_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import serial_port_pkg::*;

  logic clk = 1'b0;
  always #20 clk = ~clk;

  logic              oe = 1'b0, done = 1'b0;
  logic [DATA_W-1:0] bus_out;
  logic              bus_oe;
  int checks = 0, failures = 0;

  status_port dut (.oe(oe), .done(done), .bus_out(bus_out), .bus_oe(bus_oe));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      oe   = (i < 4) ? i[0] : 1'($urandom);
      done = (i < 4) ? i[1] : 1'($urandom);
      #1;
      checks += 2;
      if (bus_oe !== oe) begin
        failures++;
        $display("FAIL bus_oe=%0d oe=%0d", bus_oe, oe);
      end
      if (oe && bus_out !== {7'b0000000, done}) begin
        failures++;
        $display("FAIL bus_out=%b done=%0d", bus_out, done);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
