# A VGA text monitor for watching signals inside an FPGA

When you debug a design on an FPGA board, the handful of LEDs and
seven-segment digits on the board are a very narrow window into it. This
design turns a VGA monitor into that window instead: the screen is a grid of
300 character locations, and any location can be *attached* to a register of
the design under test, so its value is redrawn live, sixty times a second,
with no software and no UART in the loop. Locations that are not attached hold
text, such as labels, written once.

Around that display sit the pieces needed to use it from both sides of a
hardware/software system: twenty 32-bit registers shared between a soft-core
processor and the hardware, a multiplexer that lets software or the switches
choose which signal is being observed, and two example instruments that show
their results on the screen:

* a **frequency counter** that measures a signal in hertz, as eight decimal
  digits, over a one-second gate, and
* a **program cycle counter** that measures how many 50 MHz clock cycles a
  piece of software takes, started and stopped by the software itself through
  a shared register.

The target is a Spartan-3E board (Digilent Nexys2) with a 50 MHz oscillator,
8 switches, push buttons and an 8-pin resistor-ladder VGA port. The processor
(a MicroBlaze on its PLB bus) is not part of this RTL; its register accesses
arrive on the top level's `bus_*` ports.

## How a pixel is produced

Everything runs on the 50 MHz clock; `clock_divider` produces a one-cycle
enable every second clock, and the whole display path advances only on that
enable (25 MHz pixel rate). Using an enable instead of a divided clock avoids
logic-generated clocks altogether.

```
 monitor_interface ──cell_col,cell_row──▶ display_ram ──byte──▶ char_converter ──glyph──▶ char_rom
   (scan counters)  ──glyph_row,glyph_col──────────────────────────────────────────────────▶ │
         ▲                                                                                  │
         └───────────────────────── pixel_on (one pixel period later) ◀────────────────────┘
```

1. **`monitor_interface`** scans a standard 640x480 picture: 800 pixel
   periods per line, 525 lines per frame, which is 59.5 frames/s at 25 MHz,
   with active-low sync pulses. Each glyph pixel is drawn as a 4x4 block, so
   an 8x8 glyph covers 32x32 screen pixels and the picture is exactly 20
   columns by 15 rows = 300 locations. With that scale the coordinates are
   just bit fields of the scan counters: `hcount[9:5]` is the character
   column, `hcount[4:2]` the pixel column inside the glyph, and likewise for
   the rows.
2. **`display_ram`** returns the byte of the scanned location
   combinationally, as a LUT (distributed) RAM does.
3. **`char_converter`** turns that byte into one of 64 glyphs:
   `0x00`–`0x0F` are drawn as the hex digits `0`–`F`, so a counter nibble can
   be attached to a location as it is; `0x20`–`0x5F` are drawn as the ASCII
   character they encode (space, punctuation, digits, upper-case letters);
   anything else is blank.
4. **`char_rom`** holds the 64 glyphs, eight bytes each (glyph *g*, row *r*
   at address `8g + r`, bit 7 = leftmost pixel), and returns the one pixel
   being scanned. It is read synchronously, like a block RAM, so its answer
   arrives one pixel period later; `monitor_interface` delays its sync and
   blanking by the same pixel period so that colour and sync line up.
5. The pixel selects the **font** or **background** colour, 8-bit RGB 3:3:2
   for the board's 3 red, 3 green and 2 blue pins. Blanking is black.

The font file `rtl/char_rom_font.hex` holds 64 lines of eight bytes, one
line per glyph in ASCII order from `0x20`; each glyph is a 5x7 shape placed in
columns 1–5 and rows 0–6 of its 8x8 cell.

## Attaching signals to the screen

`display_ram` keeps one stored byte per location, written through a simple
port (`we`, `waddr`, `wdata`) and loaded on reset with a start-up screen
(`monitor_pkg::default_screen`). In addition, the locations listed in the
`PROBE_CELLS` parameter are *probes*: each reads its byte from a live input,
`probe_data[p]`, instead of from storage. A write to a probe location changes
only the hidden stored byte, and the probe keeps showing its signal. This is
how an application's result registers appear on the screen without any
copying or software.

Location numbers run row by row: `address = row * 20 + column`.
`monitor_pkg::cell_addr(row, col)` and `digit_cell(row, d)` compute them.

The start-up screen of the top level:

| row | columns 1–2 | columns 3–10 (probes, most significant left) | columns 12– |
|-----|-------------|-----------------------------------------------|-------------|
| 1   | `FREQUENCY COUNTER` (columns 1–17) | | |
| 3   | `F=`        | frequency, 8 decimal digits                   | `HZ`        |
| 6   | `CYCLE COUNTER` (columns 1–13) | | |
| 8   | `N=`        | cycle count, 8 hex digits                     | `CLKS`      |

## Shared registers and the processor side

`shared_registers` holds 20 registers of 32 bits. The software side is a
plain register-access interface, one request at a time: raise `bus_wr` or
`bus_rd` for one cycle with the register index on `bus_addr` (and data and
byte enables for a write); `bus_ack` answers in the next cycle, with read data
on `bus_rdata` in the same cycle. An assertion flags a read and a write
requested together. The hardware side sees all registers at once (`hw_regs`)
and can overwrite any register with `hw_we[i]`/`hw_wdata[i]`; in a collision
with a software write the hardware wins. The PLB bus protocol itself is not
implemented: a bus attachment would drive these request signals.

Register map used by `monitor_system_top`:

| reg | bits | meaning | written by |
|-----|------|---------|------------|
| 0   | 0 start, 1 done | `Done_Start` flag of the program cycle counter | software |
| 1   | 1:0 source, 31 software-select | frequency counter source; with bit 31 clear the switch-set source applies | software |
| 2   | 31:0 | last cycle count, updated when counting stops | hardware |
| 3   | 31:0 | last frequency, 8 BCD digits, updated every second | hardware |
| 4–19 | | free for user designs | either |

## The two instruments

**Frequency counter** (`frequency_counter`). Eight cascaded decade digits
(digit 0 least significant, each carrying into the next as it wraps from 9)
count the rising edges of the observed signal. A gate timer clears the digits
every `GATE_CYCLES` clocks (50,000,000: one second), and at that moment the
count, including an edge in the last cycle, is copied to `frq_value`, which
holds it through the following second; `valid` pulses once per second. The
observed signal is asynchronous, so it passes a two-flip-flop synchronizer
and its edges are detected in the 50 MHz domain. **Consequence: signals must
stay below 25 MHz**, with each level lasting at least one clock period. A
count past 99,999,999 wraps.

Its input comes from `signal_mux`, a 4-input multiplexer:
source 0 the guest pin `guest_sig`, 1 the monitor's own vertical sync,
2 the pixel enable, 3 the second pin `aux_sig`. The selection is either set
by software (register 1, bit 31 set) or loaded from switches 1:0 by button 2.
The top level uses one multiplexer, in front of the frequency counter; the
same module can be put in front of any probe of the display RAM to make the
register shown at a location switchable at run time.

**Program cycle counter** (`program_cycle_counter`). Software writes
`Done_Start = 01` just before the function it wants to time and
`Done_Start = 10` just after. The counter clears and starts on the rising
edge of `start`, counts one per clock while `start` is high, and stops on its
falling edge (or as soon as `done` is seen). The result, the number of clocks
the flag was high, holds until the next start and is written to register 2.
It is shown in hexadecimal; 32 bits cover 85.9 s at 50 MHz before wrapping.
The count includes the processor's own bus-write overhead, which is a useful
thing to measure in itself: time an empty function.

## Switches and buttons

`io_interface` synchronizes the 8 switches and 3 buttons. Each button acts
once per press, on its rising edge: button 0 loads the switches as the font
colour, button 1 as the background colour, button 2 loads switches 1:0 as the
switch-set frequency source. After reset the text is white on blue and the
source is 0. Bouncing is harmless, since a bounce only reloads the same value.

## Files

| file | contents |
|------|----------|
| `rtl/monitor_pkg.sv` | grid and VGA constants, colour type, register map, screen layout |
| `rtl/monitor_system_top.sv` | the whole system |
| `rtl/monitor_interface.sv`, `clock_divider.sv`, `display_ram.sv`, `char_converter.sv`, `char_rom.sv`, `char_rom_font.hex` | display path |
| `rtl/shared_registers.sv`, `signal_mux.sv`, `io_interface.sv` | processor side and board I/O |
| `rtl/frequency_counter.sv`, `program_cycle_counter.sv` | the two instruments |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_monitor_system_top.sv` | end-to-end test with a shortened gate |
| `tb/tb_monitor_system_full.sv` | one full-size measurement, default parameters |
| `tb/vga_frame_checker.sv` | testbench helper: renders the expected screen and compares every pixel of a frame |

Top-level parameters: `CLK_HZ` (clock frequency = gate length, default
50,000,000) and `PIXEL_DIV` (default 2). The `display_ram` probe list, the
VGA timing of `monitor_interface`, the number of shared registers and the
counter widths are parameters of their modules.

## Simulating

The font file is read by the relative path `rtl/char_rom_font.hex`, so run
simulations from the directory that holds `rtl/` and `tb/`. For example:

```
verilator --binary --timing --top-module tb_monitor_system_top \
    -y rtl -y tb +libext+.sv rtl/monitor_pkg.sv tb/tb_monitor_system_top.sv
./obj_dir/Vtb_monitor_system_top
```

Every testbench ends by printing `TB_RESULT checks=N failures=M` and has a
watchdog. What they cover:

* each module against an independent model: every converter input, every
  pixel of several glyphs against shapes drawn in the testbench, all 300
  locations with random writes and probes, two full frames of scan timing
  and colours, random bus traffic with byte enables and hardware collisions,
  random flag pulses of 1 to 2000 cycles, square waves from 2 to 500 clocks
  per period;
* `tb_monitor_system_top` (gate shortened to 100,000 clocks, real VGA
  timing): guest pin, pixel enable and second pin measured through switch and
  software selection, results read from registers 2 and 3, a cycle count
  started and stopped by two register writes, colour changes from the
  switches, user writes to the screen including one onto a probe, and one
  whole frame compared pixel by pixel with an independent rendering. It
  counts each of these mechanisms and fails if one never happened. About
  3 million clocks; a few seconds.
* `tb_monitor_system_full` (default parameters): a 6.25 MHz signal is
  measured over a real one-second gate, read back from register 3, and its
  eight digits are checked on screen over a whole frame; then the vertical
  sync is selected and must measure 59 or 60 frames per second. About 200
  million clocks; roughly two minutes with Verilator.

## Where this design makes its own choices

The system is described at block level: the blocks, how data flows between
them, the numbers (50 MHz, 60 frames/s, 300 locations, 64 glyphs of 8x8, 20
shared registers, eight decimal digits, a one-second gate, 32-bit cycle
counts) and the behaviour of the two instruments. Everything below is this
implementation's own, and is where you should look first if you need to match
a different system:

* 640x480 timing, 4x glyph magnification and the resulting 20x15 grid;
* RGB 3:3:2 colours, black blanking, active-low syncs;
* the glyph set and shapes in the ROM, and the byte encoding of the
  converter;
* the probe mechanism, write port and start-up screen of the display RAM;
* the register-access interface standing in for the processor bus, the
  register map, and hardware priority on collisions;
* the multiplexer's four sources, and buttons choosing which colour the
  switches set;
* sampling the frequency counter's input in the system clock domain (hence
  the 25 MHz limit) rather than clocking the first digit from the signal;
* stopping the cycle counter on `done` as well as on the falling flag, and
  wrapping of both counters.

Not included: the processor and its bus, the board's resistor ladder, and the
seven-segment display, which this system leaves unused.
