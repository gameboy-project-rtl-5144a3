# An original Game Boy in SystemVerilog

This is a register-transfer model of the monochrome Game Boy: an 8-bit
Z80-like CPU, the tile-and-sprite video hardware, a DMA engine, timer,
interrupt controller, joypad, 8 KiB work RAM and a 32 KiB cartridge ROM. It
renders 160x144 pixels in four grey shades and hands them out line by line
through a double line buffer. Sound and the link cable are not built. It
follows a university FPGA project whose goal was to run small unbanked
games such as Tetris.

The organising idea is a **single-master bus with asynchronous reads**.
Every memory and device answers a read combinationally, in the same clock,
and writes on the clock edge. The CPU is the only bus master. The DMA engine
is not a second master: it sits in line between the CPU and the bus, and
passes the CPU through or takes the bus over itself. Most of what follows
comes from that choice.

## Block diagram and memory map

```
 PS/2 scancodes ──► joypad ─┐
                            │      ┌────────── bus (b_*) ──────────────┐
 cpu_core ◄──► dma ◄────────┴──────┤ cart_rom  0000-7FFF (32 KiB)      │
  (cpu_alu)   (high memory         │ ppu       8000-9FFF VRAM          │
     ▲         FF80-FFFE,          │           FE00-FE9F OAM           │
     │         FF46, FF51-FF55)    │           FF40-FF4B registers     │
     │                             │ wram      C000-DFFF               │
   irq ◄── intc FF0F/FFFF ◄────────┤ timer     FF04-FF07               │
                                   │ joypad    FF00                    │
                                   │ ext_* port FF01-FF02, FF10-FF3F   │
                                   └───────────────────────────────────┘
 ppu pixels ──► fb_if (two line banks) ──► fb_* reader port
```

Every device decodes its own addresses and raises `hit`. The top level
takes the read data of the first device that answers. Unmapped addresses
read FFh. The interrupt requests are V-blank (bit 0), LCD STAT (1), timer
(2), serial (3, from the `ext_serial_irq` input) and joypad (4).

## Clocking

There is one clock, the 4.194304 MHz dot clock. The video hardware, timer
and DMA run on every clock. The CPU runs one *machine cycle* per
`CLKS_PER_MCYCLE` clocks (default 4) through a clock enable. Instructions
therefore take 4 to 24 clocks, as on the real machine. While a VRAM DMA is
running, the DMA engine holds that clock enable low.

In the CPU, the bus address, write data and write enable depend only on
registers, so they stay stable for the whole machine cycle. The read data
is sampled at the edge where the enable is high. The write strobe is gated
with the enable, so a device sees exactly one write clock. An assertion in
the top checks that.

## The CPU (`cpu_core`, `cpu_alu`)

### Sequencing

Each instruction is a short run of machine cycles, counted by `step`. A
cycle does one bus access or none. The key rule: **the last cycle of every
instruction fetches the next opcode.** That cycle also finishes the
instruction's own work. For example, `ADD A,B` adds and fetches in the same
single cycle. `LD A,(HL)` reads memory in its first cycle and fetches in the
second. As a result:

* an instruction's cycle count is the number of its steps, and it matches
  the Game Boy table (NOP 1, `LD rr,nn` 3, `CALL` 6, `RET cc` 5 or 2, and
  so on);
* `pc` always holds the address of the next byte to fetch;
* after reset, `ir` holds a NOP and `pc` is 0100h, so the first cycle
  fetches the cartridge entry point. No boot ROM is modelled. The
  registers start with the values a boot ROM would leave.

### Decode and register update

One combinational block looks at the opcode, the CB-prefix byte and `step`.
It selects the bus address (PC, BC, DE, HL, SP-1 for pushes, WZ for
absolute addresses, FF00+n, FF00+C), the write data and the next value of
every register. A separate small block selects the ALU operands. One
clocked block then stores everything when `ce` is high. A byte read from
the bus goes straight from `din` into the register that needs it: IR, the
CB byte, the temporaries Z/W, or A. This is done with load flags, so that
no combinational path runs from read data back to the address.

The ALU (`cpu_alu`) does all 8-bit work and the flag rules: ADD through CP,
INC/DEC, the eight rotates and shifts, BIT/RES/SET, DAA, CPL, SCF and CCF.
RLCA, RRCA, RLA and RRA reuse the CB rotates with Z forced to 0. The ALU
takes three bits of the opcode as an index. For BIT, RES and SET that is
the bit number. For RST it is the target, which the ALU turns into an
address (index x 8). The core does the 16-bit arithmetic itself: INC/DEC
rr, ADD HL,rr, ADD SP,e, LD HL,SP+e and relative jumps.

### Interrupt entry

At the fetch cycle of an instruction boundary, the core checks `irq` (high
when IE & IF is non-zero). If IME is set and an interrupt is pending, it
does not fetch. Instead it enters a three-cycle interrupt sequence over the
ordinary bus:

1. read IE (FFFF) into Z;
2. read IF (FF0F) into W;
3. pick the lowest pending enabled bit (V-blank has the highest priority),
   write IF back with that bit cleared, clear IME, and load IR with the
   matching `RST` opcode. A one-bit flag also tells the ALU to move the RST
   target into the interrupt table at 40h, 48h, 50h, 58h or 60h.

The generated RST then runs as a normal instruction: it pushes the
unincremented PC and jumps. Entry takes 3 + 4 machine cycles, not the
real machine's 5. Other rules:

* EI takes effect after the next instruction; DI takes effect at once.
* HALT waits for `irq`: if IME is set it dispatches, otherwise it just
  continues. The HALT bug is not modelled.
* STOP skips its operand byte and then waits like HALT.
* Undefined opcodes execute as NOP.

## Video hardware (`ppu`)

The block holds the 8 KiB VRAM, the 160-byte OAM and the registers LCDC,
STAT, SCY, SCX, LY, LYC, BGP, OBP0, OBP1, WY and WX. A dot counter splits
each 456-clock line into three modes:

| mode | clocks | what happens |
|------|--------|--------------|
| 2 OAM search | 80 | every other clock one of the 40 sprites is tested against LY |
| 3 drawing | 160 | one pixel per clock |
| 0 H-blank | 216 | idle |

Lines 144 to 153 are V-blank (mode 1, 4560 clocks), so a frame takes 70224
clocks.

**Mode 2.** A sprite that covers the current line goes into a 10-entry line
buffer if the buffer has room. The buffer keeps its X position, its
attributes and the two pattern bytes of the row it shows on this line,
with Y-flip and 8x16 sprites already taken into account. Reading the
pattern here means that drawing needs no VRAM access for sprites.

**Mode 3.** For pixel x, the block reads the background map entry under
(x+SCX, LY+SCY). If the window covers the pixel (LCDC.5, LY >= WY,
x+7 >= WX), it reads the window map entry at (x+7-WX, LY-WY) instead.
It then reads the tile row (see below) and takes the 2-bit colour index.
All ten line-buffer entries are compared with x in parallel. The
non-transparent sprite pixel with the smallest X wins; on a tie, the
lower OAM index wins. That pixel replaces the background unless its
priority bit is set and the background colour is not 0. The colour then
goes through BGP, OBP0 or OBP1, and the shade leaves on `pix_*` one clock
later.

Tile rows come from one of two areas, chosen by LCDC bit 4:

* bit 4 set: unsigned tile numbers from 8000h;
* bit 4 clear: signed tile numbers around 9000h.

While the LCD is on:

* VRAM reads return FFh and writes are ignored in mode 3.
* OAM behaves the same way in modes 2 and 3.
* This applies to DMA writes too, because the DMA uses the same bus.

`irq_vblank` pulses on entering line 144. `irq_stat` pulses on a rising
edge of the STAT condition: a mode 0, 1 or 2 entry with its enable bit set,
or LY=LYC with bit 6 set. Game Boy Color features (colour palettes, VRAM
bank 1, map attributes) are not built.

## DMA engine and high memory (`dma`)

The bus has one master, so the DMA engine works in line. When idle, it
passes the CPU's signals through in both directions. While a transfer runs
(`bytes_left` non-zero), it drives the bus itself. Each byte takes two
clocks: the first reads the source, the second writes the destination.

* **OAM DMA** (write v to FF46): copies 160 bytes from v*100h to FE00h. The
  CPU keeps running, but it only reaches high memory (FF80-FFFE), which is
  why high memory lives inside this block. Other CPU reads return FFh and
  other writes are dropped. Programs copy a short wait loop into high
  memory and run it from there.
* **General VRAM DMA** (FF51/FF52 source, FF53/FF54 destination in VRAM,
  write v with bit 7 clear to FF55): copies (v+1)*16 bytes. The CPU is
  stopped for the whole transfer. FF55 reads back the remaining blocks
  minus one, or FFh when idle. H-blank DMA (bit 7 set) is not supported,
  and such a write is ignored.

The original project planned two bytes per clock, but it built the
one-byte-in-two-clocks version, and so does this block. An OAM DMA
therefore takes 320 clocks, which is half of the real chip's 640. A
high-memory wait loop sized for the real chip still covers it.

## Timer, interrupt controller, joypad, memories

* **`timer`**: DIV is the top byte of a 16-bit clock counter (16384 Hz);
  any write clears it. TIMA does not use the real chip's DIV-bit edge
  detector. It is advanced by its own cycle counter, which runs while TAC.2
  is set and wraps after 1024, 16, 64 or 256 clocks (4096, 262144, 65536 or
  16384 Hz). On overflow, TIMA reloads from TMA and an interrupt is raised.
  Writing TAC restarts the cycle counter.
* **`intc`**: IF and IE registers. A request pulse sets its IF bit, winning
  over a simultaneous write. `irq` is IF & IE non-zero.
* **`joypad`**: a PS/2 keyboard stands in for the buttons. A make code marks
  a key pressed. F0h followed by the code releases it. The E0h prefix is
  ignored. The key mapping is: arrows = direction pad, X = A, Z = B,
  Enter = Start, right Shift = Select. P1 reads as a 2x4 matrix selected by
  bits 4 and 5, with a pressed key reading 0. Every change in the set of
  pressed keys raises the joypad interrupt.
* **`wram`**: 8 KiB, not reset, echo area not decoded.
* **`cart_rom`**: 32 KiB, no bank controller and no cartridge RAM. Writes
  into the ROM range are ignored. The ROM is filled through a load port
  (`rom_we/rom_addr/rom_data` on the top) while the system is in reset, or
  by `$readmemh` when `INIT_FILE` is set.

## Framebuffer interface (`fb_if`)

On the original board the display memory is filled by software, which
cannot keep pace with the pixel stream. `fb_if` therefore holds two
160-pixel line banks:

1. The video hardware fills one bank.
2. At pixel 159 that bank is marked full with its line number, and writing
   moves to the other bank.
3. The reader sees `fb_ready` and `fb_line`, reads pixels through
   `fb_addr`/`fb_data` at any pace, and frees the bank with `fb_done`.

If a line starts while the bank it needs is still full, the whole line is
dropped and counted in `fb_overruns`. The line the reader holds is never
overwritten.

## Departures and limits

* **Only the monochrome Game Boy.** No sound, no serial link (their
  registers appear on the `ext_*` port), no Game Boy Color features, no
  cartridge banking, no H-blank VRAM DMA, no boot ROM.
* **Memories are plain arrays with asynchronous read.** That is the timing
  the whole bus assumes. On an FPGA with synchronous block RAM, these arrays
  need a faster clock (or a redesign of the bus). VRAM has six read ports:
  one for the CPU, two for the sprite pattern fetch, and three for drawing
  (map entry and two tile bytes).
* **Timing is close to, but not exactly, the real machine:**
  * mode 3 is always 160 clocks;
  * interrupt entry is 7 machine cycles;
  * DMA runs at one byte per two clocks;
  * the STAT interrupt, window line and sprite priority rules are
    simplified.
  Games that count cycles against these details may misbehave.
* **The sprite path is built and tested here.** It was the weakest part of
  the original project, so it is this design's own working-out of the
  described mode-2/line-buffer scheme.
* **Not simulated:** a commercial ROM image. Only hand-written programs
  have been run.

## Testbenches and simulation

Every testbench checks itself and ends by printing `TB_RESULT checks=N
failures=M`. Each one has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_cpu_alu` | 6000 random operations against a reference model, plus the RST vectors |
| `tb_cpu_core` | a small program (arithmetic, DAA, loops, CALL/RET, PUSH/POP, CB ops); the machine-cycle count of every instruction; an interrupt taken from HALT (IE/IF reads, IF write-back, return address, RETI) |
| `tb_ppu` | two full frames (8x8 then 8x16 sprites, unsigned then signed tiles, window, flips, priority, 10-per-line limit), compared pixel by pixel with a reference renderer; mode lengths; frame period; interrupts; CPU lock-out |
| `tb_dma` | pass-through, high memory, OAM and VRAM DMA contents and durations, the CPU stall |
| `tb_timer`, `tb_intc`, `tb_joypad`, `tb_wram`, `tb_cart_rom`, `tb_fb_if` | the register behaviour described above |
| `tb_gameboy_top` | whole system at default sizes (see below) |

`tb_gameboy_top` loads a hand-assembled program into the ROM. The program:

1. builds a background with CPU stores;
2. moves a sprite tile into VRAM with a VRAM DMA;
3. copies a sprite table with an OAM DMA started from high memory;
4. turns on the window, timer and interrupts, and sleeps in HALT.

Interrupt handlers count V-blank and timer interrupts and read the joypad,
reporting on the external port. The testbench acts as the framebuffer
software and compares every delivered pixel with the expected picture. It
deliberately stalls once to force a line-buffer overrun. It also counts
every mechanism: both DMAs, HALT, interrupt entries, each interrupt source,
sprite and window pixels, delivered and dropped lines. A mechanism that
never happened counts as a failure. Three frames take well under a second.

To build and run one testbench with Verilator (the package goes first):

```
verilator --binary --timing --assert -Wno-fatal rtl/gb_pkg.sv \
    $(ls rtl/*.sv | grep -v gb_pkg) tb/tb_gameboy_top.sv --top-module tb_gameboy_top
./obj_dir/Vtb_gameboy_top
```

Verilator has only two signal states, so every register that is read is
reset. The work RAM is the exception: programs must write it before they
read it.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `gameboy_top` | `CLKS_PER_MCYCLE` | 4 | clocks per CPU machine cycle |
| `ppu` | `LINE_CYCLES`, `OAM_CYCLES` | 456, 80 | line length, mode-2 length |
| `ppu` | `WIDTH`, `HEIGHT`, `LINES` | 160, 144, 154 | screen and frame size |
| `ppu` | `NSPRITES`, `LINE_SPR` | 40, 10 | sprites in OAM, sprites per line |
| `dma` | `OAM_BYTES`, `HRAM_SIZE` | 160, 127 | OAM DMA length, high-memory bytes |
| `wram` | `SIZE` | 8192 | work RAM bytes |
| `cart_rom` | `SIZE`, `INIT_FILE` | 32768, "" | ROM bytes, optional `$readmemh` image |
| `fb_if` | `WIDTH` | 160 | pixels per line |

Types and addresses shared between blocks (ALU operations, flags,
interrupt bit numbers, I/O register addresses) are in `rtl/gb_pkg.sv`.
