// Serial data multiplexer: chooses the level of the serial output pin.
//
// A 10-to-1 multiplexer selected by the controller's 4-bit bitselect code
// (the controller state). Its inputs are the start-bit level, the eight bits
// of the transmit data register in order from least to most significant, and
// the stop/idle level. The pin uses RS-232 line sense: a space (start bit,
// logic-0 data bit) is a high level and a mark (logic-1 data bit, stop bit,
// idle line) is a low level, so data bits are output inverted.
//
// Timing: combinational; the output changes with the state register.
// Unused select codes 11-15 give the idle level (this design's choice).
module serial_data_mux
  import serial_port_pkg::*;
(
  input  tx_state_e         bitselect,  // controller state
  input  logic [DATA_W-1:0] data,       // transmit data register
  output logic              txd         // serial data out
);

  timeunit 1ns;
  timeprecision 1ps;

  logic [2:0] bit_index;                  // 0..7 while a data bit is selected

  always_comb begin
    bit_index = 3'(4'(bitselect) - 4'(ST_BIT0));
    unique case (bitselect)
      ST_START: txd = LEVEL_SPACE;
      ST_BIT0, ST_BIT1, ST_BIT2, ST_BIT3,
      ST_BIT4, ST_BIT5, ST_BIT6, ST_BIT7:
                txd = ~data[bit_index];
      default:  txd = LEVEL_MARK;         // ST_STOP, ST_IDLE, unused codes
    endcase
  end

endmodule
