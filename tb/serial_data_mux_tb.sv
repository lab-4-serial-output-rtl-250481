// Self-checking testbench for serial_data_mux.
//
// For random data bytes it applies all sixteen select codes and compares the
// output with the line levels worked out by hand: code 1 (start) high,
// codes 2..9 the inverted data bit 0..7, every other code low (stop, idle).
module serial_data_mux_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import serial_port_pkg::*;

  logic clk = 1'b0;
  always #20 clk = ~clk;

  tx_state_e         bitselect = ST_IDLE;
  logic [DATA_W-1:0] data = '0;
  logic              txd;
  logic              expected;
  int checks = 0, failures = 0;

  serial_data_mux dut (.bitselect(bitselect), .data(data), .txd(txd));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      data = (n == 0) ? 8'h00 : (n == 1) ? 8'hFF : (n == 2) ? 8'h01 : DATA_W'($urandom);
      for (int s = 0; s < 16; s++) begin
        @(negedge clk);
        bitselect = tx_state_e'(s);
        if (s == 1)                expected = 1'b1;
        else if (s >= 2 && s <= 9) expected = !data[s-2];
        else                       expected = 1'b0;
        #1;
        checks++;
        if (txd !== expected) begin
          failures++;
          $display("FAIL sel=%0d data=%h txd=%0d expected %0d", s, data, txd, expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
