// Status input port: the read side of the serial port on the data bus.
//
// While `oe` (from the 221H read decoder) is high, the port drives the
// controller's `done` flag on D0 and zeros on D7-D1; otherwise the bus is
// left released. The tri-state bus driver is represented by a value and an
// output-enable pair (`bus_out`, `bus_oe`); the pad buffer that combines
// them onto the bidirectional D7-D0 pins belongs to the FPGA's I/O cells.
// That split is this design's choice, so the logic simulates with two-state
// tools and synthesises without internal tri-states.
//
// Timing: combinational, from `oe` and `done` to the bus.
module status_port
  import serial_port_pkg::*;
(
  input  logic              oe,       // status read in progress
  input  logic              done,     // controller idle, ready for a character
  output logic [DATA_W-1:0] bus_out,  // value for D7-D0
  output logic              bus_oe    // 1: drive D7-D0, 0: high impedance
);

  timeunit 1ns;
  timeprecision 1ps;

  assign bus_out = oe ? {{(DATA_W-1){1'b0}}, done} : '0;
  assign bus_oe  = oe;

endmodule
