// Bit clock generator: divides the system clock down to the bit rate.
//
// A down-counter runs from COUNT_MAX = CLK_HZ/BAUD - 1 to 0 and reloads.
// `nextbit` is high during the clock period in which the count is 0, so it
// is a one-cycle pulse every COUNT_MAX+1 system clocks (2622 cycles, i.e.
// 9601 bps from 25.175 MHz, with the default parameters). `load` forces the
// counter back to COUNT_MAX so that the first bit period of a character
// starts with the write that delivered it.
//
// Timing: with `load` high in cycle t, the counter is COUNT_MAX in t+1 and
// `nextbit` is high in cycle t+1+COUNT_MAX. The divider arithmetic and the
// reload on load follow the specification; the power-up count is this
// design's choice (COUNT_MAX).
module bit_clock_gen
  import serial_port_pkg::*;
#(
  parameter int unsigned CLK_HZ    = SYSCLK_HZ,
  parameter int unsigned BAUD      = BAUD_HZ,
  parameter int unsigned COUNT_MAX = CLK_HZ / BAUD - 1,
  localparam int unsigned CNT_W    = (COUNT_MAX > 0) ? $clog2(COUNT_MAX + 1) : 1
) (
  input  logic clk,      // system clock
  input  logic load,     // restart the bit period
  output logic nextbit   // one-cycle pulse at the bit rate
);

  timeunit 1ns;
  timeprecision 1ps;

  localparam logic [CNT_W-1:0] RELOAD = CNT_W'(COUNT_MAX);

  logic [CNT_W-1:0] count = RELOAD;

  always_ff @(posedge clk) begin
    if (load || count == '0) count <= RELOAD;
    else                     count <= count - 1'b1;
  end

  assign nextbit = (count == '0);

  // The count stays within 0..COUNT_MAX, and a load restarts a full period.
  a_count_range: assert property (@(posedge clk) count <= RELOAD);
  a_load_reload: assert property (@(posedge clk) load |=> count == RELOAD);

endmodule
