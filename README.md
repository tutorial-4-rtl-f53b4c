# Character-LCD interfaces for an 8051-class CPU

This design attaches a 2-line by 16-character LCD module to the
external data (XDATA) bus of an 8051-compatible soft CPU, in two ways:

* **Controller interface.** An LCD controller does the display protocol:
  power-up initialisation, instruction timing and cursor addressing. The
  CPU sees 32 bus addresses, one per screen character, plus a BUSY flag.
  The glue logic here is only an address decoder, a write strobe and a
  one-bit read path.
* **Direct interface.** There is no controller. The CPU drives the LCD
  module's RS, RW, E and 8-bit data bus itself, through a small latch and
  some routing logic. The hardware is simpler, but software must
  initialise the LCD, poll its busy flag before every access and manage
  the cursor address.

Side by side, the two show the usual trade-off: more capable interface
hardware means less and simpler driver software. Both systems are built
and can be simulated together in one top module.

## The CPU bus seen by both interfaces

| signal   | width | meaning |
|----------|-------|---------|
| memaddr  | 16    | external data address |
| memdatao | 8     | write data from the CPU |
| memwr    | 1     | write strobe, active high |
| memrd    | 1     | read strobe, active high |
| memdatai | 8     | read data to the CPU |

A C program reaches the LCD through a pointer into the external data
space, e.g. `__xdata volatile char *LCD = 0x0000;`. After that, `LCD[i] = c`
is a bus write to address `i` and `x = LCD[i]` is a bus read.

Neither interface drives a tri-state bus back to the CPU. Each returns
its read data together with a select signal (`rd_sel`), and a multiplexer
(in the system modules) picks the device. When no device is read, the
read data is 0.

## Controller interface (`lcd_controller_int`, `lcd_ctrl_system`)

Address map: **0x0000–0x001F**, one address per character.

| address bits | goes to |
|--------------|---------|
| `memaddr[3:0]` | controller ADDR (column 0–15) |
| `memaddr[4]`   | controller LINE (0 = top line, 1 = bottom line) |
| `memaddr[15:5]`| decoded: all zero selects the controller |

* **Write.** A write anywhere in the range gives `strobe = memwr`. The
  CPU write data goes straight to the controller's DATA input. The
  controller samples STROBE on its clock, which is the CPU clock
  (`clk_brd`). The controller also takes the CPU's reset.
* **Read.** A read anywhere in the range returns the controller's BUSY
  flag on data bit 0. Bits 7:1 are always 0. Software must read 0 in
  bit 0 before each character write:

  ```c
  while ((LCD[0] & 0x01) == 1) {}   // wait while BUSY
  LCD[i] = string[i];               // i = 0..31 -> line i/16, column i%16
  ```

`lcd_controller_int` is purely combinational (four gates).
`lcd_ctrl_system` adds the following around it:

* the reset generator;
* the program RAM;
* the fixed wiring to the controller pins, with the backlight tied on.

The LCD controller is not part of this RTL. Its pins (`lcd_ctrl_data`,
`lcd_ctrl_addr`, `lcd_ctrl_line`, `lcd_ctrl_strobe`, `lcd_ctrl_busy`) are
ports of `lcd_ctrl_system`. That controller in turn drives the LCD
module, through an 8-bit bidirectional pad buffer.

## Direct interface (`lcd_int`, `lcd_direct_system`)

### Why a latch is needed

The LCD module needs RS and RW to be stable for a setup time *before* E
rises. It also needs a minimum E pulse width. Taking RW from MEMRD would
miss the setup time. Delaying E to make room for it would cut the pulse
too short.

So RS and RW come from a latch that software writes first. E and the data
bus can then follow the CPU's own strobe directly. Only RW strictly needs
the latch, since RS could come from an address line, but both are latched
for consistency.

### Address map

| address | write | read |
|---------|-------|------|
| 0x0000  | byte goes to the LCD (instruction register if RS=0, data RAM if RS=1); E is high while MEMWR is | LCD data bus returned (busy flag + address counter if RS=0, data RAM if RS=1); E is high while MEMRD is |
| 0x0001  | latch: bit 1 → RW, bit 0 → RS | — (returns 0) |

Anything outside 0x0000–0x0001 is ignored.

### Timing

* **The latch.** It loads on the *falling edge of MEMWR* with 0x0001
  addressed. The write data must therefore still be valid when the
  strobe ends. This is an edge-triggered register clocked by the CPU
  strobe, not by `clk_brd`. Constrain it as its own clock domain in an
  FPGA flow.
* **E.** `lcd_e = (address == 0x0000) & (memrd | memwr)`. It has the
  width of the CPU strobe.

### Protection against data-bus clashes

The interface drives LCD_DB (`lcd_db_oe`) only while 0x0000 is addressed
*and* the latched RW is 0. It returns LCD_DB to the CPU only on a read of
0x0000 *with* RW = 1.

Suppose software reads 0x0000 with RW = 0, or writes 0x0000 with RW = 1.
In either case at most one side drives the bus. The access goes nowhere,
but nothing is damaged. Write-data drive deliberately does not look at
MEMWR: the bus is driven for the whole time 0x0000 is addressed in write
mode.

### Software protocol

The direct interface needs this software sequence:

```c
char read_control(void) { LCD[1] = 2; return LCD[0]; }          // RW=1 RS=0
void wait_busy(void)    { while (read_control() & 0x80) {} }     // bit 7 = busy
void write_control(char v) { wait_busy(); LCD[1] = 0; LCD[0] = v; }
void write_data(char v)    { wait_busy(); LCD[1] = 1; LCD[0] = v; }
```

Initialise the LCD with instructions 0x01 (clear), 0x06 (increment, no
shift), 0x0C (display on, no cursor), 0x38 (8-bit, 2 lines) and 0x80
(address 0).

The LCD's data RAM has 40 positions per line, but only the first 16 of
each line are visible. After the 16th character, a string writer must
therefore jump to position 40 with instruction `0x80 + 40`.

### Data-bus pins

LCD_DB is bidirectional on the board. Here it is split into three
signals:

* `lcd_db_o`: data out;
* `lcd_db_oe`: output enable;
* `lcd_db_i`: data in.

These connect to an 8-bit I/O pad buffer outside the module. The design
contains no tri-state logic.

### Reset

The RS/RW latch is cleared by the system reset (RS = RW = 0, LCD in write
mode). A design without that reset would also work: the latch content
does nothing until E is pulsed, and software always writes the latch
before accessing the LCD. The reset is there only so that the power-up
state is defined.

## System modules and the top

Both system modules contain the parts the board schematics put around the
CPU:

* **`fpga_startup8`.** It holds `init` high for `delay` clocks after FPGA
  configuration, with `delay` tied to 0xFF. The counter's power-up value
  comes from a declaration initialiser, so the module has no reset input.
* **Reset gate.** `cpu_rst = init | ~test_button`. The push button is
  active low. The same reset goes to the CPU, and also to the LCD
  controller or to the RS/RW latch.
* **`rams_8x1k`.** 1024 × 8 program RAM on the CPU's ROM bus. It uses
  `romaddr[9:0]`, has synchronous write and one clock of read latency,
  and reads before it writes. Its contents are not initialised: a debugger
  loads the program.
* **`lcd_light`.** Tied to 1 (backlight on).

The CPU itself is not part of this RTL. Its ROM-bus and XDATA-bus pins
are ports of each system module.

`lcd_io_top` instantiates `lcd_ctrl_system` (ports prefixed `ctl_`) and
`lcd_direct_system` (ports prefixed `dir_`). The two systems share
nothing: not even the clock.

Shared constants (address maps, latch bit positions, memory size, start-up
delay) are in `lcd_io_pkg`.

### Size after coarse synthesis

| module | logic | flip-flops | memory bits |
|--------|-------|------------|-------------|
| `lcd_controller_int` | 4 cells | 0 | 0 |
| `lcd_int` | 13 cells | 2 | 0 |
| `lcd_io_top` (both systems) | 34 cells | 18 | 16384 |

## What follows the source specification and what is this design's own

**From the specification:**

* both address maps;
* the decode of the upper address bits;
* STROBE gated from MEMWR;
* BUSY returned at every address of the controller range;
* the latch bit assignment (RW = D1, RS = D0) and its falling-edge load;
* the E equation;
* the clash rules;
* the controller wiring: column on bits 3:0, LINE on bit 4, read data on
  bit 0 with bits 7:1 grounded;
* the reset gate;
* the program-RAM size;
* the tied-on backlight.

**This design's choices:**

* **Read path.** A read multiplexer with `rd_sel` replaces tri-state read
  returns. This follows the general advice to avoid tri-states on chip.
* **LCD data bus.** Split into out / enable / in signals.
* **Latch reset.** The RS/RW latch has a reset.
* **Program RAM.** One-cycle, read-before-write behaviour.
* **`fpga_startup8`.** Its pulse behaviour, which is known only from its
  pin names.
* **One top.** Putting both systems into one top.

**Not in this RTL:**

* the CPU;
* the LCD controller;
* the LCD module;
* the I/O pad buffer;
* the JTAG debug connection.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it covers |
|-----------|----------------|
| `tb_lcd_controller_int` | A timed BUSY-read / write / BUSY-read sequence. Then every upper-address value × all MEMWR/MEMRD/BUSY combinations, plus random addresses, against a reference of the address map. |
| `tb_lcd_int` | Reset. A timed "set register" sequence: latch ← 2, busy-flag read, latch ← 0, write 0x01. Then 4000 random bus operations against a reference model of the latch and routing rules, including reads with RW = 0. |
| `tb_rams_8x1k` | Fill and read back all 1024 words. The one-clock latency, `we = 0`, and read-before-write. |
| `tb_fpga_startup8` | Pulse lengths for delays 0, 1, 7 and 255. |
| `tb_lcd_ctrl_system` | Power-up reset length and the program RAM. The flashing-message program: BUSY polling, the 32-character message, then "....." over it. Screen contents, out-of-range accesses, push-button reset. |
| `tb_lcd_direct_system` | The full direct-interface driver: init sequence, message with the jump to position 40, ".....", data-RAM read-back. Register state, no write while busy, no bus clash, out-of-range accesses, reset of the latch. |
| `tb_lcd_io_top` | Both programs running at once on the top at default parameters, each twice. Counts each mechanism and fails if one never occurs: BUSY seen while polling, bottom-line writes, busy flag seen set, latch writes, jumps to position 40, push-button resets. |

### Helper modules

The helper modules in `tb/` are not synthesizable RTL:

* **`xbus_bfm`.** A bus-cycle model of the CPU. Each read or write takes
  4 clocks, with a 1-clock strobe.
* **`lcd16x2a_model`.** A model of the LCD controller. It stores a
  character at (LINE, ADDR) when it sees STROBE on its clock. It is then
  busy for 12 clocks, and after reset for 40 clocks.
* **`lcd_char_model`.** A model of the LCD module, with the instruction
  set used above. It has 80 data-RAM positions with the second line at
  position 40. After each write it is busy for 10 clocks, or 30 after a
  clear. It counts any write made while busy and any data-bus clash.

The busy times of both models are arbitrary. They only make sure the
polling paths are exercised.

### Running a testbench with Verilator

Run from the folder that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps --top-module tb_lcd_io_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/lcd_io_pkg.sv tb/tb_lcd_io_top.sv
./obj_dir/Vtb_lcd_io_top
```

Replace `tb_lcd_io_top` with any other testbench name. All of them finish
in well under a second.

### Lint notes

Verilator warns about three things, all intentional:

* the initialised counter in `fpga_startup8` (PROCASSINIT);
* the unused upper ROM-address bits (UNUSEDSIGNAL);
* the unconnected `lcd_cs` debug outputs (PINCONNECTEMPTY).
