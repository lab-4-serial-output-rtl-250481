// Transmit controller: the eleven-state sequencer of the serial port.
//
// States: idle, start bit, data bits 0 to 7, stop bit. `load` (a write to
// the data register) puts the controller in the start-bit state from any
// state, also in the middle of a character. Otherwise each `nextbit` pulse
// from the bit clock generator advances it by one state, from the stop-bit
// state to idle, where it stays until the next load. `done` is high in the
// idle state only. The state code is the multiplexer's bitselect code
// (see serial_port_pkg); idle is all zeros, the power-up value of the state
// register, so the controller needs no reset input.
//
// Timing: one state register on the system clock; `bitselect` and `done`
// come straight from it. After the last cycle of a load pulse the
// controller spends one full bit period in each of the ten transmit states.
// Load having priority over nextbit is this design's choice.
module tx_controller
  import serial_port_pkg::*;
(
  input  logic      clk,        // system clock
  input  logic      load,       // character written: go to start bit
  input  logic      nextbit,    // bit period elapsed: advance
  output tx_state_e bitselect,  // state, selects the serial output level
  output logic      done        // idle: ready for the next character
);

  timeunit 1ns;
  timeprecision 1ps;

  tx_state_e state = ST_IDLE;
  tx_state_e state_next;

  always_comb begin
    state_next = state;
    if (load) begin
      state_next = ST_START;
    end else if (nextbit) begin
      unique case (state)
        ST_IDLE:  state_next = ST_IDLE;
        ST_STOP:  state_next = ST_IDLE;
        ST_START, ST_BIT0, ST_BIT1, ST_BIT2, ST_BIT3,
        ST_BIT4, ST_BIT5, ST_BIT6, ST_BIT7:
                  state_next = tx_state_e'(state + 4'd1);
        default:  state_next = ST_IDLE;   // unused codes recover to idle
      endcase
    end
  end

  always_ff @(posedge clk) state <= state_next;

  assign bitselect = state;
  assign done      = (state == ST_IDLE);

  // A load always leaves the controller in the start-bit state, and the
  // state register never holds an unused code.
  a_load_starts: assert property (@(posedge clk) load |=> state == ST_START);
  a_valid_state: assert property (@(posedge clk) state <= ST_STOP);

endmodule
