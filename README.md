# Serial output port for the PC-104 bus

A write-only asynchronous serial transmitter that a PC-104 (ISA-style) host
drives through two I/O addresses. The host writes a character to **220H**;
the port sends it as one start bit, eight data bits least significant first
and one stop bit, at 9600 bps. Reading **221H** returns a status byte whose
bit 0 says whether the transmitter is idle and can take the next character.
There is no buffering: software polls the status port before every write.

The whole port is a handful of registers on one system clock: an 8-bit data
register, a 12-bit bit-rate divider and a 4-bit state register. It has no
reset input. The idle state is the all-zero code, which is the registers'
power-up value.

## Programmer's view

| Address | Access | Meaning |
|---------|--------|---------|
| 220H | write (IOW*) | character to transmit. Starts a new frame at once, even if one is in progress |
| 221H | read (IOR*) | `0000000d`: d = 1 means idle (done), d = 0 means a frame is on the line |

All ten address lines A9-A0 are decoded. No other address, and no read of 220H
or write of 221H, has any effect. The intended driver loop is:

```
for each character c of the string (stop at 0):
    wait until (in 221H) bit 0 == 1
    out 220H, c
```

## The frame on the wire, and its polarity

`txd` uses **RS-232 line sense**, not TTL UART sense. A *space* is a high
level and a *mark* is a low level:

| Part of the frame | Level on `txd` |
|-------------------|----------------|
| idle (no character) | low (mark) |
| start bit | high (space) |
| data bit = 0 | high (space) |
| data bit = 1 | low (mark) |
| stop bit | low (mark) |

So the data bits leave the port **inverted** compared with the register
contents. This lets the pin drive an RS-232 receiver input directly, without
an inverting level shifter (for example a PC's COM port RxD and ground). To
feed a TTL-level UART instead, invert `txd` outside the port.

Example: `'A'` = 41H = 0100_0001. The line shows, one bit period each:
`1` (start), then data bits 0..7 = 1,0,0,0,0,0,1,0 inverted = `0 1 1 1 1 1 0 1`,
then `0` (stop), then `0` until the next write.

## Timing

The bit rate comes from a down-counter that runs from
`COUNT_MAX = CLK_HZ/BAUD - 1` to 0 and then reloads. `nextbit` is high in the
one clock in which the count is 0. With the defaults (`CLK_HZ = 25_175_000`,
`BAUD = 9_600`) that is a reload of 2621 and a period of 2622 clocks, giving
9601.5 bps (+0.016 %). If the board clock is exactly 25 MHz instead, the
same reload gives 9534.7 bps (-0.7 %). Most receivers accept that. Setting
`CLK_HZ = 25_000_000` gives a reload of 2603 and the exact rate.

A write strobe does three things in every clock in which it is seen:
it loads the data register from the bus, it forces the controller into the
start-bit state, and it reloads the divider. The bus strobe lasts many system
clocks, so these actions simply repeat while it is held. The frame therefore
starts from the **last** clock of the strobe. If load was high in clock
`L`, then:

* clocks `L+1 .. L+2622` carry the start bit, including any clocks still
  under the strobe;
* each following bit lasts exactly 2622 clocks;
* the stop bit ends after clock `L + 10*2622`, and from then on status bit 0
  reads 1.

A character takes 26,220 clocks, about 1.04 ms. Because the divider is
reloaded by every write, the first bit period is always a full one: it is
not shortened by a free-running bit clock.

A write while a frame is in progress abandons that frame and starts the new
character with a fresh start bit. A receiver then sees a corrupted
character, which is why software should poll first.

## Controller

Eleven states, whose 4-bit code is also the select code of the output
multiplexer (`serial_port_pkg::tx_state_e`):

| Code | State | `txd` |
|------|-------|-------|
| 0 | idle (done = 1) | low |
| 1 | start bit | high |
| 2..9 | data bit 0..7 | inverted data bit |
| 10 | stop bit | low |
| 11..15 | unused | low. They fall back to idle on the next `nextbit` |

Load moves any state to start bit. Otherwise each `nextbit` steps
start → bit 0 → … → bit 7 → stop → idle, and idle waits for the next load.
When load and `nextbit` coincide, load wins. Because the state code is
the mux select, `bitselect` and `done` come straight from the state register.

## Structure

```
 A9-A0, IOW* ──► addr_decoder(220H) ── load ──┬──► tx_data_reg ◄── D7-D0 (data_in)
                                              ├──► bit_clock_gen ── nextbit ──► tx_controller
                                              └──────────────────────────────► tx_controller
 tx_controller ── bitselect[3:0] ──► serial_data_mux ◄── tx_data_reg.q  ──► txd
 tx_controller ── done ──► status_port ──► data_out / data_oe (D7-D0)
 A9-A0, IOR* ──► addr_decoder(221H) ── oe ──► status_port
```

| File (`rtl/`) | Role |
|---------------|------|
| `serial_port_pkg.sv` | addresses, widths, default clock and bit rate, line levels, state enum |
| `addr_decoder.sv` | strobe-qualified full address compare. Used twice |
| `tx_data_reg.sv` | 8-bit register with load/hold multiplexer |
| `bit_clock_gen.sv` | bit-rate down-counter, reloaded by load |
| `tx_controller.sv` | eleven-state sequencer |
| `serial_data_mux.sv` | 10-to-1 line-level multiplexer |
| `status_port.sv` | status byte and its bus enable |
| `serial_port.sv` | top level |

### Top-level ports

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `sysclk` | in | 1 | system clock (25.175 MHz by default) |
| `addr` | in | 10 | A9-A0 |
| `iow_n`, `ior_n` | in | 1 | IOW*, IOR*, active low |
| `data_in` | in | 8 | D7-D0 as driven by the host |
| `data_out` | out | 8 | value the port drives on D7-D0 |
| `data_oe` | out | 1 | 1 while the port drives D7-D0 (status read) |
| `txd` | out | 1 | serial output, RS-232 sense |

The bidirectional data bus is split into an input, an output and an enable.
Join them in the FPGA pad ring, for example
`assign D = data_oe ? data_out : 'z;` with `data_in = D`. `data_out[7:1]` is
always zero by definition, and synthesis reports those bits as constant.

Parameters of `serial_port`: `CLK_HZ` (25_175_000), `BAUD` (9_600) and
`COUNT_MAX` (derived, 2621). Override `COUNT_MAX` only to set the divider
directly.

## Where this RTL makes its own choices

The behaviour described above follows the port's specification: the
addresses, the status format, the frame and its polarity, the divider
arithmetic, the reload on write, and the all-zero idle state. These
details are this implementation's own:

* **Tri-state bus driver** is expressed as `data_out`/`data_oe` rather than an
  internal `'z`, so the design simulates in two-state simulators.
* **Data inversion.** The block diagram shows the data register feeding the
  multiplexer without an inverter. The RS-232 requirement that a 0 data bit
  be sent high is implemented inside the multiplexer.
* **State codes** 2..9 for the data bits and 10 for stop, and load priority over
  `nextbit`.
* **Power-up values** come from variable initialisers: state idle, data
  register 0, divider at its reload value. FPGA flows honour these.
  An ASIC would need a reset.
* **No synchronisers** on IOR*, IOW*, the address or the data. The strobes
  are sampled directly on the system clock, as in the original block
  diagram. That is safe as long as the bus holds address and data stable
  around the strobe edges, as ISA/PC-104 timing does. A metastable first
  sample of IOW* only moves the frame start by one clock.

Not included: the optional control register that would select other bit
rates, word lengths, parity and a second stop bit. No register layout is
defined for it.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle-count watchdog.

| Testbench | What it checks |
|-----------|----------------|
| `addr_decoder_tb` | all 1024 addresses × strobe for 220H and 221H, exactly one match each |
| `tx_data_reg_tb` | random load/hold against a reference register, power-up zero |
| `status_port_tb` | the `0000000d` byte and the enable |
| `serial_data_mux_tb` | all 16 select codes × random, all-0 and all-1 bytes |
| `bit_clock_gen_tb` | pulse spacing and reload-on-load for reloads 2621, 1, 6 and 2603 (25 MHz clock) |
| `tx_controller_tb` | random load/`nextbit` against a reference sequencer, all states reached, loads in mid-frame and loads that coincide with `nextbit` |
| `serial_port_tb` | full default size, end to end. A polling host sends a 29-character text, then a character that is replaced in mid-frame. `txd` is compared in every clock with a reference computed from the bus traffic alone, and every status read is checked to the clock. A mid-bit receiver model rebuilds the text. It also counts done and not-done reads, the restart, and foreign reads and writes, and fails if any of them never happened |
| `serial_port_slowclk_tb` | `CLK_HZ = 19200` (2 clocks per bit): status done, write, status not-done, the whole frame compared clock by clock, done exactly 20 clocks after the write, status done again. Run for 41H, 00H, FFH and 96H |

Every testbench was also run against a deliberately broken copy of its
module, and each one failed: A9 ignored, load ignored, done inverted, data
not inverted, bit pulse one clock early, stop bit skipped, divider off by one.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl --top-module serial_port_tb \
          rtl/serial_port_pkg.sv tb/serial_port_tb.sv -o sim
./obj_dir/sim
```

Substitute any other testbench name. The package is given explicitly and
the other modules are found through `-Irtl`. The full-size end-to-end run
covers about 800,000 clocks and takes well under a second. Lint with
`verilator --lint-only -Wall -Irtl rtl/serial_port_pkg.sv rtl/serial_port.sv`.
The only remaining warnings are about unused package constants, and about
registers that have both an initial value and a clocked assignment, which is
how the power-up state is expressed.
