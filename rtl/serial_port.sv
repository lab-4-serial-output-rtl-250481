// Serial output port on the PC-104 bus: top level.
//
// The host writes a character to I/O address 220H; the port sends it on
// `txd` as one start bit, eight data bits least significant first and one
// stop bit, at CLK_HZ/(COUNT_MAX+1) bits per second (9601 bps from a
// 25.175 MHz system clock). Reading I/O address 221H returns the status
// byte 0000000d, where d = 1 means the transmitter is idle and the next
// character may be written.
//
// Structure: the 220H write decoder produces `load`, which loads the
// transmit data register, restarts the bit clock generator and sends the
// controller to its start-bit state. The bit clock generator's `nextbit`
// pulses step the controller through the data bits and the stop bit; the
// controller state selects the serial data multiplexer input. The 221H read
// decoder enables the status driver, which puts the controller's `done`
// flag on D0.
//
// Interface: the bidirectional data bus D7-D0 is split into `data_in` (bus
// to port) and `data_out`/`data_oe` (port to bus, the tri-state driver's
// value and enable); the FPGA pad joins them. `txd` uses RS-232 line sense:
// high for a space (start bit, data 0), low for a mark (data 1, stop, idle).
// All registers use the one system clock `sysclk`; there is no reset input,
// the registers power up to idle. The strobes and address are used as they
// come from the bus, without synchronisers, as the specification draws it.
module serial_port
  import serial_port_pkg::*;
#(
  parameter int unsigned CLK_HZ    = SYSCLK_HZ,
  parameter int unsigned BAUD      = BAUD_HZ,
  parameter int unsigned COUNT_MAX = CLK_HZ / BAUD - 1
) (
  input  logic              sysclk,    // system clock
  input  logic [ADDR_W-1:0] addr,      // A9-A0
  input  logic              iow_n,     // IOW*, active low
  input  logic              ior_n,     // IOR*, active low
  input  logic [DATA_W-1:0] data_in,   // D7-D0 as driven by the host
  output logic [DATA_W-1:0] data_out,  // D7-D0 as driven by the port
  output logic              data_oe,   // 1: port drives D7-D0
  output logic              txd        // serial data out
);

  timeunit 1ns;
  timeprecision 1ps;

  logic              load;
  logic              status_oe;
  logic              nextbit;
  logic              done;
  tx_state_e         bitselect;
  logic [DATA_W-1:0] tx_data;

  addr_decoder #(.ADDR(TX_DATA_ADDR)) u_wr_dec (
    .addr(addr), .strobe_n(iow_n), .sel(load)
  );

  addr_decoder #(.ADDR(STATUS_ADDR)) u_rd_dec (
    .addr(addr), .strobe_n(ior_n), .sel(status_oe)
  );

  tx_data_reg u_data_reg (
    .clk(sysclk), .load(load), .d(data_in), .q(tx_data)
  );

  bit_clock_gen #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .COUNT_MAX(COUNT_MAX)) u_bitclk (
    .clk(sysclk), .load(load), .nextbit(nextbit)
  );

  tx_controller u_ctrl (
    .clk(sysclk), .load(load), .nextbit(nextbit),
    .bitselect(bitselect), .done(done)
  );

  serial_data_mux u_mux (
    .bitselect(bitselect), .data(tx_data), .txd(txd)
  );

  status_port u_status (
    .oe(status_oe), .done(done), .bus_out(data_out), .bus_oe(data_oe)
  );

endmodule
