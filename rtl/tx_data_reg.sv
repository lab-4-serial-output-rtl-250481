// Transmit data register.
//
// An 8-bit register clocked by the system clock. A 2-to-1 multiplexer in
// front of it selects the data bus D7-D0 while `load` is high and the
// register's own output otherwise, so the register captures the bus on every
// clock edge of the load pulse and then holds the character while it is
// shifted out by the serial data multiplexer.
//
// Timing: `q` shows the bus value one clock edge after `load` is sampled
// high. The power-up value is zero (the design has no reset input); this
// initial value is this design's choice.
module tx_data_reg
  import serial_port_pkg::*;
(
  input  logic              clk,    // system clock
  input  logic              load,   // from the 220H write decoder
  input  logic [DATA_W-1:0] d,      // D7-D0 from the bus
  output logic [DATA_W-1:0] q       // character being transmitted
);

  timeunit 1ns;
  timeprecision 1ps;

  logic [DATA_W-1:0] q_r = '0;
  logic [DATA_W-1:0] q_next;

  always_comb q_next = load ? d : q_r;

  always_ff @(posedge clk) q_r <= q_next;

  assign q = q_r;

endmodule
