// Shared constants and types of the PC-104 serial output port.
//
// The port sits at two I/O addresses: a write to TX_DATA_ADDR loads a
// character to send, a read of STATUS_ADDR returns the "done" flag in bit 0.
// The transmit controller has eleven states; their encoding doubles as the
// select code of the serial data multiplexer, so the state register drives
// the 4-bit bitselect bus directly. Idle is the all-zero code, which is the
// power-up value of the state register, so no reset input is needed.
package serial_port_pkg;

  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned ADDR_W = 10;               // A9-A0
  localparam int unsigned DATA_W = 8;                // D7-D0, character width

  localparam logic [ADDR_W-1:0] TX_DATA_ADDR = 10'h220;
  localparam logic [ADDR_W-1:0] STATUS_ADDR  = 10'h221;

  // Default system clock and bit rate: the divider reload value
  // CLK_HZ/BAUD - 1 is 2621 for these numbers.
  localparam int unsigned SYSCLK_HZ = 25_175_000;
  localparam int unsigned BAUD_HZ   = 9_600;

  // Line levels at the output pin (RS-232 sense: space = high).
  localparam logic LEVEL_SPACE = 1'b1;               // start bit
  localparam logic LEVEL_MARK  = 1'b0;               // stop bit and idle

  // Controller states = bitselect codes.
  typedef enum logic [3:0] {
    ST_IDLE  = 4'd0,
    ST_START = 4'd1,
    ST_BIT0  = 4'd2,
    ST_BIT1  = 4'd3,
    ST_BIT2  = 4'd4,
    ST_BIT3  = 4'd5,
    ST_BIT4  = 4'd6,
    ST_BIT5  = 4'd7,
    ST_BIT6  = 4'd8,
    ST_BIT7  = 4'd9,
    ST_STOP  = 4'd10
  } tx_state_e;

endpackage
