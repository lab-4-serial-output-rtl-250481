// Self-checking testbench for addr_decoder.
//
// Instantiates the two decoders of the serial port (220H, 221H) and sweeps
// all 1024 addresses with the strobe high and low, comparing `sel` with the
// rule "strobe low and address equal". Each decoder must match exactly one
// address; the testbench counts the matches it sees.
module addr_decoder_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import serial_port_pkg::*;

  logic clk = 1'b0;
  always #20 clk = ~clk;

  logic [ADDR_W-1:0] addr = '0;
  logic              strobe_n = 1'b1;
  logic              sel_wr, sel_rd;
  int checks = 0, failures = 0;
  int hits_wr = 0, hits_rd = 0;

  addr_decoder #(.ADDR(10'h220)) dut_wr (.addr(addr), .strobe_n(strobe_n), .sel(sel_wr));
  addr_decoder #(.ADDR(10'h221)) dut_rd (.addr(addr), .strobe_n(strobe_n), .sel(sel_rd));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++) begin
      for (int a = 0; a < 1024; a++) begin
        @(negedge clk);
        addr = ADDR_W'(a);
        strobe_n = s[0];
        #1;
        checks += 2;
        if (sel_wr !== (s == 0 && a == 'h220)) begin
          failures++;
          $display("FAIL wr decoder addr=%h strobe_n=%0d sel=%0d", a, s, sel_wr);
        end
        if (sel_rd !== (s == 0 && a == 'h221)) begin
          failures++;
          $display("FAIL rd decoder addr=%h strobe_n=%0d sel=%0d", a, s, sel_rd);
        end
        hits_wr += int'(sel_wr);
        hits_rd += int'(sel_rd);
      end
    end
    checks++;
    if (hits_wr != 1 || hits_rd != 1) begin
      failures++;
      $display("FAIL match counts wr=%0d rd=%0d (expected 1 each)", hits_wr, hits_rd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
