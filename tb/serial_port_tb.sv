// End-to-end testbench of serial_port at its default parameters
// (25.175 MHz system clock, 9600 bps, 2622 clocks per bit).
//
// A host model plays the part of the program on the bus: for each
// character of a text it polls the status port at 221H until bit 0 reads
// 1, then writes the character to 220H, using multi-cycle IOR*/IOW*
// strobes. A reference built from the bus traffic alone (the cycle of the
// last write strobe and the character written) predicts the serial line
// level in every clock cycle, and the done flag at every status read; both
// are compared cycle by cycle. A receiver model samples each bit period in
// its middle and rebuilds the text, which must equal the one sent.
// Besides plain transmission it exercises: status reads returning done and
// not-done, a write that restarts a character in mid-transmission, and
// reads and writes of other addresses, which must leave the port alone.
// Each of these is counted; one that never happens counts as a failure.
module serial_port_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import serial_port_pkg::*;

  localparam int CLK_HZ     = 25_175_000;
  localparam int BAUD       = 9_600;
  localparam int BIT_CYCLES = CLK_HZ / BAUD;      // 2622
  localparam int CHAR_CYCLES = 10 * BIT_CYCLES;
  localparam int STROBE_CYCLES = 6;               // IOR*/IOW* low time

  logic clk = 1'b0;
  always #20 clk = ~clk;                          // ~25 MHz

  logic [ADDR_W-1:0] addr = '0;
  logic              iow_n = 1'b1, ior_n = 1'b1;
  logic [DATA_W-1:0] data_in = '0;
  logic [DATA_W-1:0] data_out;
  logic              data_oe;
  logic              txd;

  serial_port dut (
    .sysclk(clk), .addr(addr), .iow_n(iow_n), .ior_n(ior_n),
    .data_in(data_in), .data_out(data_out), .data_oe(data_oe), .txd(txd)
  );

  int checks = 0, failures = 0;
  int n_done_reads = 0, n_busy_reads = 0, n_restarts = 0;
  int n_foreign_writes = 0, n_foreign_reads = 0, n_chars_rx = 0;

  // ---------------- reference built from the bus traffic ----------------
  int          since = 1 << 30;     // cycles since the last 220H write edge
  logic [7:0]  cur_char = '0;
  always @(posedge clk) begin
    if (!iow_n && addr == 10'h220) begin
      if (since < CHAR_CYCLES && since > 0) n_restarts++;
      since    <= 0;
      cur_char <= data_in;
    end else if (since < (1 << 30)) begin
      since <= since + 1;
    end
  end

  function automatic logic expected_txd(int s, logic [7:0] c);
    int b = s / BIT_CYCLES;
    if (b == 0)      return 1'b1;          // start bit: space, high
    else if (b <= 8) return !c[b-1];       // data bit, LS first, inverted
    else             return 1'b0;          // stop bit and idle: mark, low
  endfunction

  always @(negedge clk) begin
    checks++;
    if (txd !== expected_txd(since, cur_char)) begin
      failures++;
      if (failures < 20)
        $display("FAIL t=%0t txd=%0d expected %0d (since=%0d char=%h)",
                 $time, txd, expected_txd(since, cur_char), since, cur_char);
    end
  end

  // ---------------- receiver: mid-bit sampling ----------------
  byte        rx_text [$];
  logic [7:0] rx_shift;
  always @(negedge clk) begin
    if (since < CHAR_CYCLES && since % BIT_CYCLES == BIT_CYCLES / 2) begin
      automatic int b = since / BIT_CYCLES;
      if (b == 0 && txd !== 1'b1) begin
        failures++; $display("FAIL rx: start bit not high");
      end
      if (b >= 1 && b <= 8) rx_shift[b-1] = !txd;
      if (b == 9) begin
        checks++;
        if (txd !== 1'b0) begin failures++; $display("FAIL rx: stop bit not low"); end
        rx_text.push_back(byte'(rx_shift));
        n_chars_rx++;
      end
    end
  end

  // ---------------- host bus cycles ----------------
  task automatic io_write(logic [9:0] a, logic [7:0] d);
    @(negedge clk);
    addr = a; data_in = d;
    @(negedge clk) iow_n = 1'b0;
    repeat (STROBE_CYCLES) @(negedge clk);
    iow_n = 1'b1;
    @(negedge clk) data_in = 8'h00;
  endtask

  task automatic io_read(logic [9:0] a, output logic [7:0] d, output logic oe);
    @(negedge clk) addr = a;
    @(negedge clk) ior_n = 1'b0;
    repeat (STROBE_CYCLES) @(negedge clk);
    d = data_out; oe = data_oe;
    ior_n = 1'b1;
  endtask

  // Status read with the done flag predicted from the reference.
  task automatic read_status(output logic done);
    logic [7:0] d;
    logic       oe;
    io_read(10'h221, d, oe);
    checks += 2;
    if (!oe) begin failures++; $display("FAIL status read not driven"); end
    if (d !== {7'b0, (since >= CHAR_CYCLES)}) begin
      failures++;
      $display("FAIL status=%b at since=%0d", d, since);
    end
    done = d[0];
    if (done) n_done_reads++; else n_busy_reads++;
  endtask

  task automatic send_char(byte c);
    logic done;
    do begin
      read_status(done);
      repeat (3) @(negedge clk);
    end while (!done);
    io_write(10'h220, 8'(c));
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  string text = "Serial port @220H: 0123456789";
  byte   sent [$];

  initial begin
    logic [7:0] d;
    logic       oe, done;
    repeat (5) @(negedge clk);

    // Foreign accesses while idle: nothing is driven, nothing is sent.
    io_read(10'h220, d, oe);
    checks++; n_foreign_reads++;
    if (oe) begin failures++; $display("FAIL port drove the bus on a 220H read"); end
    io_read(10'h321, d, oe);
    checks++; n_foreign_reads++;
    if (oe) begin failures++; $display("FAIL port drove the bus on a 321H read"); end
    io_write(10'h221, 8'h55); n_foreign_writes++;
    io_write(10'h020, 8'h55); n_foreign_writes++;

    // The text, one character at a time, polling the status port.
    for (int i = 0; i < text.len(); i++) begin
      send_char(text[i]);
      sent.push_back(text[i]);
    end

    // Mid-character restart: the second write replaces the first character.
    send_char("X");
    repeat (4 * BIT_CYCLES + 100) @(negedge clk);
    io_write(10'h220, 8'h59);               // 'Y', without polling
    sent.push_back("Y");
    // A foreign write during transmission must not disturb it.
    io_write(10'h222, 8'hA5); n_foreign_writes++;

    // Wait for the end and read done once more.
    do begin
      read_status(done);
      repeat (3) @(negedge clk);
    end while (!done);
    repeat (BIT_CYCLES) @(negedge clk);

    checks++;
    if (rx_text.size() != sent.size()) begin
      failures++;
      $display("FAIL received %0d characters, sent %0d", rx_text.size(), sent.size());
    end else begin
      foreach (sent[i]) begin
        checks++;
        if (rx_text[i] != sent[i]) begin
          failures++;
          $display("FAIL char %0d: received %h sent %h", i, rx_text[i], sent[i]);
        end
      end
    end

    checks += 5;
    if (n_done_reads == 0)     begin failures++; $display("FAIL no done status read"); end
    if (n_busy_reads == 0)     begin failures++; $display("FAIL no not-done status read"); end
    if (n_restarts == 0)       begin failures++; $display("FAIL no mid-character restart"); end
    if (n_foreign_writes == 0 || n_foreign_reads == 0)
                               begin failures++; $display("FAIL no foreign access"); end
    if (n_chars_rx == 0)       begin failures++; $display("FAIL nothing received"); end
    $display("chars received %0d, done reads %0d, not-done reads %0d, restarts %0d, foreign writes %0d, foreign reads %0d",
             n_chars_rx, n_done_reads, n_busy_reads, n_restarts, n_foreign_writes, n_foreign_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
