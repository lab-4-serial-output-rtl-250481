// Self-checking testbench for tx_data_reg.
//
// Drives random bus data with random load pulses for 2000 clock cycles and
// compares the register output after each edge with a reference that holds
// the last value present on the bus while load was high. Also checks the
// zero power-up value and that a multi-cycle load keeps the last bus value.
module tx_data_reg_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import serial_port_pkg::*;

  logic clk = 1'b0;
  always #20 clk = ~clk;

  logic              load = 1'b0;
  logic [DATA_W-1:0] d = '0;
  logic [DATA_W-1:0] q;
  logic [DATA_W-1:0] ref_q = '0;
  int checks = 0, failures = 0;
  int loads = 0, holds = 0;

  tx_data_reg dut (.clk(clk), .load(load), .d(d), .q(q));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (q !== ref_q) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, ref_q);
    end
  endtask

  initial begin
    #1 check("power-up");
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      load = ($urandom_range(0, 3) == 0);
      d    = DATA_W'($urandom);
      @(posedge clk);
      if (load) begin ref_q = d; loads++; end
      else holds++;
      #1 check("cycle");
    end
    checks++;
    if (loads == 0 || holds == 0) begin
      failures++;
      $display("FAIL stimulus: loads=%0d holds=%0d", loads, holds);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
