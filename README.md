# A Commodore 64 on one shared bus

This is a Commodore 64 for an FPGA, written in synthesizable SystemVerilog.
The machine keeps the real C64's structure. There are two bus masters:

- a 6510 processor (a 6502 with an on-chip I/O port);
- the VIC-II video chip.

The two masters share one memory bus. Behind the bus sit 64 KB of RAM, a
20 KB system ROM, a cartridge ROM and a set of memory-mapped chips.

The original machine timed the bus with a two-phase clock. This design does
not. It runs everything from one fast clock and cuts each 6510 cycle into
32 clock "sub-cycles", and each master owns a fixed range of them. Most of
what is subtle here follows from that scheme:

- how the VIC steals cycles;
- when the CPU may advance;
- when read data is valid.

The sections below follow the path of a memory access. Read them in order.

What is built:

| Part | Status |
| --- | --- |
| 6510 core (all legal instructions with exact cycle counts, decimal mode, IRQ/NMI/BRK, I/O port) | complete |
| C64 bank switching | complete |
| Sub-cycle bus | complete |
| RAM, colour RAM, system ROM, cartridge ROM | complete |
| VIC-II text and bitmap modes, bad lines, raster interrupt | complete |
| VIC-II sprites, with expansion, multicolour, priority and collisions | complete |
| PS/2 keyboard receiver, key translation with numeric-pad joystick | complete |
| Pixel latch with RGB palette | complete |
| SID sound chip, the two CIAs, frame buffer/DVI | not here; the top has ports for them |

## The sub-cycle bus (`c64_bus`)

One machine cycle is `SUBCYCLES` = 32 clocks, numbered 1..32 below. The
RTL counter `sub` counts from 0.

```
sub-cycle   1 ........ 12 | 13 .. 16 | 17 .................... 32
owner          idle       |   VIC    |  CPU  (or VIC when stealing)
```

Each master makes exactly one access in its window, every cycle. A master
with nothing useful to do reads a dummy address: the VIC reads $3FFF while it
is idle.

- The bus multiplexes the owner's address, write enable and write data onto
  one memory-side set (`mem_addr`, `mem_we`, `mem_wdata`).
- The bank decoder adds a chip select to that set.
- The selected device's read data goes back to both masters on one `rdata`
  bus.

All memories are synchronous block RAMs with one clock of read latency, so
data are taken on the last clock of a window:

- `cpu_ce` is high on clock 32. The CPU registers the data and moves to its
  next bus cycle.
- `vic_ack` is high on clock 16. It is also high on clock 32 when the VIC has
  stolen the CPU window; `vic_ack_b` marks that case.
- A write is issued once, on the first clock of the window.

**Stealing.** The VIC raises `vic_steal` when it needs a second access in a
cycle. The bus samples this request just before clock 17. If it is set, the
VIC gets clocks 17..32 as well, and `cpu_ce` is not given in that cycle. The
CPU then does not advance at all: reads, writes and internal cycles all wait.
The VIC can keep the request up for as many cycles as it needs:

- 40 cycles in a row on a bad line;
- two cycles in a row for each sprite that has data on the coming line.

This is simpler than the real chip in one way. The real chip warns the CPU
three cycles ahead (BA) and lets pending writes finish. Here the CPU stops at
once. Programs that count cycles around bad lines or sprite fetches can see a
difference of up to three cycles.

The schedule is a set of parameters (`NSUB`, `VIC_FROM`, `VIC_TO`,
`CPU_FROM`, `CPU_TO`). An elaboration-time assertion checks that the VIC
window comes before the CPU window and that each window is at least two
clocks long.

## Bank switching (`bank_decode`)

The 6510 sees 64 KB, but ROMs and I/O lie over parts of the RAM. Five lines
choose what is visible:

- LORAM, HIRAM and CHAREN are bits 0–2 of the CPU's own I/O port at $0001.
- GAME and EXROM come from the cartridge. On a board they are switches or
  pins.

For the CPU, the decoder follows the standard C64 table:

| Mode | LORAM HIRAM GAME EXROM | $8000 | $A000 | $D000 | $E000 |
| --- | --- | --- | --- | --- | --- |
| Default | 1 1 1 1 | RAM | BASIC | I/O or CHAR | KERNAL |
| All RAM | 0 0 x x, and similar | RAM | RAM | RAM | RAM |
| 8 KB cartridge | 1 1 1 0 | ROML | BASIC | I/O or CHAR | KERNAL |
| 16 KB cartridge | 1 1 0 0 | ROML | ROMH | I/O or CHAR | KERNAL |
| Ultimax | x x 0 1 | ROML | unmapped | I/O | ROMH |

CHAREN chooses between I/O and the character ROM at $D000.

Writes to an address that shows ROM go to the RAM underneath, except in
Ultimax mode. This is a property of the real machine.

The I/O page is split as follows:

| Address | Device |
| --- | --- |
| $D000 | VIC registers (47, mirrored every 64 bytes) |
| $D400 | SID |
| $D800 | colour RAM |
| $DC00 | CIA 1 |
| $DD00 | CIA 2 |
| $DE00, $DF00 | cartridge I/O 1 and 2 |

The VIC sees memory differently. It uses 14-bit addresses inside a 16 KB bank
chosen by `vic_bank`, and it always sees RAM, except:

- the character ROM at $1000–$1FFF and $9000–$9FFF;
- in Ultimax mode, the cartridge's ROMH at $3000–$3FFF of every bank.

The decoder's `vic` input selects this view.

## The 6510 core (`cpu6510`, `cpu6510_pkg`)

The core does one bus cycle per `ce` pulse, and every cycle is a memory
access, as on the real part.

Decoding has two layers:

1. A 256-entry decode function (`cpu6510_pkg::decode`) maps each opcode to:
   - an operation;
   - an addressing mode;
   - an access kind: read, write or read-modify-write.
2. A state machine walks through the bus cycles of that addressing mode, one
   state per cycle. The read-modify-write kind makes the state machine add
   the NMOS dummy write.

The cycle counts are those of the NMOS 6502:

- the extra cycle when indexing crosses a page (reads only);
- the two or three extra cycles of a taken branch;
- the dummy reads of implied instructions;
- 7 cycles for BRK, IRQ and NMI;
- 6 cycles each for JSR, RTS and RTI.

The next opcode fetch coincides with the last cycle of the state sequence. A
register result is written back in that same cycle.

Behaviour worth knowing:

- **Reset.** Reset runs as a three-cycle pseudo `JMP ($FFFC)`: a dummy cycle,
  then the low vector byte, then the high byte. Fetching starts at the vector.
  The stack pointer starts at $FF, so the stack top is $01FF. A, X and Y start
  at 0, and I is set.
- **Interrupts.**
  - IRQ is a level and is masked by I.
  - NMI is latched on its falling edge.
  - Both are taken at an instruction boundary.
  - They push PC and P with B clear. BRK pushes B set.
  - The vectors are $FFFA (NMI) and $FFFE (IRQ and BRK).
- **Decimal mode.** A and C follow the NMOS chip. N, V and Z come from the
  binary sum, as the NMOS chip does for Z. The NMOS N and V quirks in decimal
  mode are not reproduced.
- **Undocumented opcodes** execute as two-cycle NOPs. Software that relies on
  illegal opcodes will not run correctly.
- **The I/O port.** $0000 is the data-direction register and $0001 the
  output register. `port_out = (ddr & data) | ~ddr`: an input pin floats
  high through its pull-up. A CPU read of $0000 or $0001 returns the port.
  Writes also reach the RAM underneath. After reset the DDR is 0, so all pins
  read high and the machine starts in the default bank.

## VIC-II (`vic2`)

The VIC-II uses NTSC 6567 geometry: `CYCLES` = 65 cycles per line and
`LINES` = 263 lines per frame. It produces eight pixels per machine cycle,
one every 4 clocks, as a 4-bit colour index with `pix_valid`.

Every cycle the VIC makes one access in its own window:

- In the display area, this is the **g-access**: a character-generator byte
  (text modes) or a bitmap byte.
- Elsewhere it reads $3FFF.

On a **bad line** the VIC also needs the 40 screen codes of the next text
row. A bad line is a raster line in $30–$F7 whose low three bits equal
YSCROLL, with the display enabled in line $30. The VIC then:

- steals the CPU window for cycles 15–54;
- reads the 40 codes there (the **c-access**);
- reads the colour nibble from the colour RAM's second port in the same
  cycle.

Screen codes and colours are held in a 40-entry line buffer and reused for
the next seven lines.

### Sprites

Each of the eight sprites has two fixed fetch cycles per line:

- sprites 0–3 in cycles 57–64 of the line before the one they are shown on;
- sprites 4–7 in cycles 0–7 of their own line.

This timing is this design's own. All fetches are finished before the first
sprite pixel can appear, which is at cycle 14.

| Fetch cycle | VIC window | CPU window (stolen) |
| --- | --- | --- |
| First | pointer byte at screen base + $3F8 + *n* | data byte 0 |
| Second | data byte 1 | data byte 2 |

The CPU window is stolen only when the sprite is enabled and has a row on
that line. The pointer is always read. Data byte *k* comes from
`pointer*64 + row*3 + k`.

The row is `line - Y - 1`, halved when the sprite is Y-expanded. So Y = 50
puts the first sprite row on the first display line (51). The real chip keeps
a byte counter per sprite instead. The two differ only if software changes Y
expansion while a sprite is being drawn.

The fetched rows are copied into display buffers at cycle 13. Placement and
drawing:

- X (9 bits, with the MSBs in $D010) is compared with the beam position.
  X = 24 is the first column of the display window.
- A sprite is 24 pixels wide, 48 when X-expanded.
- In multicolour mode, pixel pairs select transparent, $D025, the sprite's
  own colour, or $D026.

Priority and collisions:

- Among overlapping sprites the lowest number wins.
- The winner is then hidden behind foreground graphics if its $D01B bit is
  set. Foreground means a 1 pixel, or a 10/11 pair in multicolour modes.
- The border covers sprites.
- Collisions are gathered inside the display window. Sprite–sprite
  collisions go to $D01E and sprite–graphics collisions to $D01F.
- The first collision after a register was read sets bit 2 or bit 1 of
  $D019, which can raise the interrupt.
- Reading a collision register clears it.

Column *i* is fetched in cycle 16+*i* and shown in cycle 17+*i*. The
visible window is lines 51–250 and cycles 17–56: 25 rows of 40 characters
(320 × 200). The border colour shows outside the window. The display modes
are selected by ECM, BMM and MCM:

- standard text;
- multicolour text;
- extended-background text;
- standard bitmap;
- multicolour bitmap.

The three invalid combinations display black.

Registers: all 47 registers ($D000–$D02E) can be written and read back,
except that $D01E and $D01F return the collision latches.

- The raster counter reads from $D011 bit 7 and $D012. Writing those
  addresses sets the raster compare line.
- A compare match sets bit 0 of $D019 at the start of the line.
- Writing ones to $D019 clears the latched bits.
- `irq_n` is low while any bit enabled in $D01A is set.

Not modelled:

- **The light pen.** Its registers are stored but nothing ever sets them.
- **The 24-row and 38-column modes, and horizontal fine scroll.** XSCROLL and
  RSEL/CSEL are stored but have no effect. Vertical scroll does work, through
  the bad-line condition.
- **Clock generation and DRAM refresh.** The FPGA does not need them.

`hsync` is high in cycles 0–3 of each line and `vsync` in lines 0–2. These
positions are this design's own and only have to be consistent for the frame
buffer.

## Memories

- **`dp_ram`** is a true dual-port RAM with synchronous reads.
  - It holds the 64 KB main RAM. Port A is on the bus. Port B is the load and
    inspection port at the top level.
  - It also holds the 1 K × 4 colour RAM. The CPU writes it at $D800 through
    port A, and the VIC reads it on port B beside its main-RAM access.
- **`system_rom`** is one 20 KB array:

  | Offset | Contents |
  | --- | --- |
  | 0 | BASIC (8 KB, seen at $A000) |
  | 8192 | KERNAL (8 KB, seen at $E000) |
  | 16384 | character generator (4 KB, seen at $D000 or by the VIC) |

  Its address translation adds the part's offset to the low address bits.
- **`cart_rom`** holds two 8 KB banks: ROML at $8000 and ROMH at $A000 or
  $E000. This covers the 8 KB, 16 KB and Ultimax cartridge formats, but not
  bank-switched cartridges.

No ROM image ships with the RTL. They are written through the top-level load
port before reset is released:

- `load_sel` = 0: RAM;
- `load_sel` = 1: system ROM, with a linear offset as in the table above;
- `load_sel` = 2: cartridge, ROML then ROMH.

The load port can also preload a program into RAM.

## Keyboard and joystick (`ps2_rx`, `keymap`)

`ps2_rx` receives one PS/2 frame at a time:

1. Two-flop synchronisers bring both lines into the clock domain.
2. A glitch filter makes a line change only after `FILTER` equal samples.
3. On each falling edge of the PS/2 clock, one bit is taken: a start bit,
   then eight data bits (LSB first), then odd parity.
4. A good frame pulses `ready` with the byte. A bad one pulses `parity_err`,
   which the top brings out as `key_error`.

A frame whose clock stalls for `TIMEOUT` clocks is abandoned.

`keymap` is a large case table from PS/2 set-2 codes to the C64 keyboard
matrix position, given as `row*8 + column` (0..63). This is the code the
KERNAL's keyboard tables use.

- It follows the F0 (release) and E0 (extended) prefixes and emits
  `key_valid` / `key_pressed` / `key_code`.
- Esc is RUN/STOP, Tab is CTRL, Backspace is INST/DEL and the cursor keys map
  to the C64 cursor keys.
- The numeric pad does not make key events. It drives the five active-low
  joystick lines `joy_n`: 8 up, 2 down, 4 left, 6 right, and 0 or 5 for fire.

Neither output is used inside this design. A CIA model attached to the top
would put them into its keyboard matrix and joystick port.

## Video out (`video_latch`)

The VIC changes its pixel every 4 clocks. The frame buffer that follows
wants a stable value that it can sample on any clock, so `video_latch`:

- holds the colour index and both syncs from one `pix_valid` to the next;
- turns the index into 24-bit RGB through a 16-entry palette (a common
  measured C64 palette);
- pulses `new_pix` for each new pixel.

Crossing into the display clock domain belongs to the frame buffer.

## Top level (`c64_top`)

The top level connects everything above. The CPU's IRQ is the AND of the
VIC's and the CIAs' IRQ lines.

The parts that are not implemented here connect through top-level ports:

- **SID and CIAs.**
  - Select lines: `sid_sel`, `cia1_sel`, `cia2_sel`, `io1_sel`, `io2_sel`.
  - A register bus: `io_we`, `io_addr`, `io_wdata` out, and `io_rdata` in.
  - `io_we` is a single-clock strobe per write.
- **CIA interrupts and VIC bank.** `cia_irq_n`, `cia_nmi_n`, and `vic_bank`,
  which CIA 2 port A drives on a real C64.
- **Frame buffer.** `red`, `green`, `blue`, `hsync`, `vsync` and `new_pix`.
- **Audio.** The SID's PWM output would go through an RC low-pass filter
  (3.3 kΩ, 4.7 nF) to the audio jack.

Debug outputs: `cpu_port` shows the 6510 port pins and `cpu_sync` shows the
opcode fetches.

## Where this departs from the original FPGA design

This RTL follows a C64 that was first built on a Virtex-5 board. Where that
design's own description and the real machine disagree, or where it gave no
detail, these choices were made:

- **ROM split.** The ROM is split 8 KB BASIC, 8 KB KERNAL and 4 KB
  character set. A 9 KB / 7 KB split was also stated, but the memory map and
  the per-part address spaces both need 8 KB each.
- **Colour RAM size.** The colour RAM is 1 K × 4 (0.5 KB).
- **How ROMs are filled.** ROMs are filled through a load port. They are not
  compiled in as constant arrays, so no copyrighted image is part of the
  source.
- **Pixel rate.** The VIC makes a pixel every 4 system clocks. This follows
  from 32 sub-cycles per machine cycle; the original pixel rate was tied to
  its own clock.
- **Stealing.** A steal stops the CPU at once, with no BA warning. The
  original FPGA bus did not model the two-phase clock either.
- **Own choices where no detail was given.** These include:
  - the exact cycles of sprite fetches inside a line;
  - the sync positions;
  - the palette;
  - which PC key maps to which C64 key;
  - the keypad keys used for the joystick;
  - what undocumented opcodes do.
- **Parts used as-is in the original.** The SID model, the frame buffer with
  its DVI output, and the RC audio filter were taken from elsewhere and are
  not part of this RTL. The same holds for the CIAs, which were not
  described.

## How far it can be trusted

Every module has its own self-checking testbench in `tb/`. Each compares the
module's outputs with values computed independently in the testbench:

| Testbench | What it checks |
| --- | --- |
| `tb_cpu6510` | Runs a hand-assembled program and checks results and the cycle count of each instruction. Covers every addressing mode, page crossing, branches, decimal ADC/SBC, shifts, stack, JSR/RTS, BRK/RTI, IRQ masking, NMI and the I/O port. |
| `tb_cpu6510_cycles` | The cycle count of all 256 opcodes against a table of NMOS 6502 timings: once without page crossing, once with X and Y at $FF so indexed reads cross a page and branches are taken, and once with taken branches landing on the next page. Undocumented opcodes are checked to execute as 2-cycle no-ops. |
| `tb_bank_decode` | Every 4 KB region in every combination of the five banking lines, for the CPU and the VIC. |
| `tb_c64_bus` | Window timing, the write strobe, the stall of the CPU during a steal, and read-data routing. |
| `tb_vic2` | Every pixel of whole frames against a reference model in the testbench: text mode, bitmap mode, and text mode with six sprites using expansion, multicolour, X above 255, priority, overlap and both borders. Also the number of stolen cycles with and without sprites, the collision registers and their interrupts, and the raster interrupt. |
| `tb_ps2_rx` | Frames with good and bad parity, with glitches on the lines. |
| `tb_keymap` | Presses, releases, extended keys and the joystick keys. |
| `tb_video_latch` | Holding behaviour and the palette. |
| `tb_dp_ram`, `tb_system_rom`, `tb_cart_rom` | Memory contents and address translation. |

`tb_c64_top` runs the whole machine at its default parameters for three
frames. A small KERNAL-area program:

- sets up the CPU port and writes a text row with colours;
- programs the VIC and enables a raster interrupt;
- turns on a sprite in the upper border, where it is fetched but hidden;
- reads the cartridge and BASIC ROMs;
- writes under BASIC and banks BASIC out;
- writes a SID register and reads a CIA register.

The testbench also types a key on the PS/2 lines. It checks:

- the stored values;
- the interrupt count;
- the key code;
- every pixel of the screen against the expected text.

It also counts that each mechanism actually happened: bad-line steals,
sprite-fetch steals, raster IRQs, bank switches, cartridge reads, I/O writes
and key events.

Nothing here has booted a real KERNAL. That needs the CIAs for the
keyboard scan and the 60 Hz timer interrupt. Cycle-exact behaviour around bad
lines and sprite fetches differs from a real C64, as described under the bus
and under sprites.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. Each
also has a watchdog. The packages must come first on the command line:

```
verilator --binary --timing -Wno-fatal -Irtl \
    rtl/c64_pkg.sv rtl/cpu6510_pkg.sv rtl/*.sv tb/tb_c64_top.sv \
    --top-module tb_c64_top -o sim
./obj_dir/sim
```

Replace the top module to run another testbench. The whole-machine test
takes about a second.

The ROM images used in the tests are generated by formulas inside the
testbenches. To run real software, load BASIC, KERNAL, character and
cartridge images through the load port, attach SID and CIA models to the I/O
ports, and release `rst_n`.
