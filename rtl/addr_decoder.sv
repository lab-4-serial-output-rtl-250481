// I/O address decoder for one port address on the PC-104 bus.
//
// Asserts `sel` while the active-low bus strobe (IOW* or IOR*) is low and
// the 10-bit address A9-A0 equals ADDR. The serial port uses two copies:
// ADDR = 220H with IOW* produces the transmit-register load signal, and
// ADDR = 221H with IOR* enables the status driver.
//
// Timing: purely combinational. `sel` follows the bus for as long as the
// strobe is held, which on the PC-104 bus is many system-clock cycles; the
// logic that consumes it is built so that a long strobe does no harm (the
// register reloads the same value, the controller stays in its start state).
// Decoding the full ten address bits is this design's choice; the address
// values themselves are the ones the port is specified at.
module addr_decoder
  import serial_port_pkg::*;
#(
  parameter logic [ADDR_W-1:0] ADDR = TX_DATA_ADDR
) (
  input  logic [ADDR_W-1:0] addr,      // A9-A0
  input  logic              strobe_n,  // IOW* or IOR*, active low
  output logic              sel        // address match while strobe active
);

  timeunit 1ns;
  timeprecision 1ps;

  assign sel = !strobe_n && (addr == ADDR);

endmodule
