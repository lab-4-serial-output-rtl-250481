// Testbench of serial_port with the system clock assumed to be 19200 Hz, so
// that one bit lasts two clock cycles and a whole character can be seen in
// a short waveform.
//
// Sequence: a status read returning done, a write of one character, a
// status read returning not-done, then the line is recorded for the whole
// character while the status port stays selected, and finally a status
// read returning done again. The recorded line is compared cycle by cycle
// with the frame worked out from the character: start bit high, the data
// bits least significant first and inverted (RS-232 space = high), stop
// bit low, then idle low; done must rise exactly 20 clocks after the write.
// This is repeated for several characters, including 00H and FFH.
module serial_port_slowclk_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import serial_port_pkg::*;

  localparam int CLK_HZ     = 19_200;
  localparam int BIT_CYCLES = CLK_HZ / 9_600;     // 2
  localparam int FRAME      = 10 * BIT_CYCLES;

  logic clk = 1'b0;
  always #26042 clk = ~clk;                       // 19.2 kHz

  logic [ADDR_W-1:0] addr = '0;
  logic              iow_n = 1'b1, ior_n = 1'b1;
  logic [DATA_W-1:0] data_in = '0;
  logic [DATA_W-1:0] data_out;
  logic              data_oe;
  logic              txd;

  serial_port #(.CLK_HZ(CLK_HZ)) dut (
    .sysclk(clk), .addr(addr), .iow_n(iow_n), .ior_n(ior_n),
    .data_in(data_in), .data_out(data_out), .data_oe(data_oe), .txd(txd)
  );

  int checks = 0, failures = 0;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // One-cycle status read; returns bit 0.
  task automatic read_status(output logic done);
    @(negedge clk) begin addr = 10'h221; ior_n = 1'b0; end
    #1;
    check(data_oe === 1'b1, "status read drives the bus");
    check(data_out[7:1] === 7'b0, "status bits 7..1 are zero");
    done = data_out[0];
    @(negedge clk) ior_n = 1'b1;
  endtask

  task automatic send_and_watch(logic [7:0] c);
    logic done;
    logic exp_line;
    read_status(done);
    check(done === 1'b1, "status reads done before the write");
    // One-cycle write strobe.
    @(negedge clk) begin addr = 10'h220; data_in = c; iow_n = 1'b0; end
    @(negedge clk) begin iow_n = 1'b1; data_in = 8'h00; end
    // From here on the cycle index k counts clocks after the write edge.
    // Keep the status port selected and record line and done each cycle.
    addr = 10'h221; ior_n = 1'b0;
    for (int k = 0; k < FRAME + 4; k++) begin
      if (k > 0) @(negedge clk);
      if (k / BIT_CYCLES == 0)      exp_line = 1'b1;
      else if (k / BIT_CYCLES <= 8) exp_line = !c[k / BIT_CYCLES - 1];
      else                          exp_line = 1'b0;
      checks += 2;
      if (txd !== exp_line) begin
        failures++;
        $display("FAIL char %h cycle %0d: txd=%0d expected %0d", c, k, txd, exp_line);
      end
      if (data_out[0] !== (k >= FRAME)) begin
        failures++;
        $display("FAIL char %h cycle %0d: done=%0d", c, k, data_out[0]);
      end
      if (k == 1) check(data_out[0] === 1'b0, "status reads not-done after the write");
    end
    @(negedge clk) ior_n = 1'b1;
    read_status(done);
    check(done === 1'b1, "status reads done after the stop bit");
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    send_and_watch(8'h41);            // 'A'
    send_and_watch(8'h00);
    send_and_watch(8'hFF);
    send_and_watch(8'h96);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
