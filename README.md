# A video processor that makes VGA in software

This design generates a 640 x 480, 60 Hz VGA text display (80 x 30
characters, 8 x 16 pixel font) without a hardware video timing generator.
A small pipelined MIPS processor runs a program that produces every HSYNC,
VSYNC and BLANK edge and every byte of pixels itself. The program only
needs to be fast enough. Exact timing comes from one hardware addition,
the **wait register**: register 31 is a down-counter, and a write to it
cannot complete until the interval set by the previous write has run out.
A program that writes `N` to register 31 right before each video store
therefore spaces those stores exactly `N` clock cycles apart, whatever the
code in between does, as long as that code takes fewer than `N` cycles.

The processor runs at the 25 MHz pixel clock, so one cycle is one pixel.
A VGA line is 800 cycles and a frame is 800 x 525 = 420 000 cycles.

```
             +------------------------------------------------------+
             | minimips                                             |
  it_mat --->|  PF -> EI -> DI -> EX -> MEM ---> banc (r31 = wait)  |
             |         ^      ^ renvoi (bypass)    |                |
             |         |      syscop (exceptions)  | stop_all       |
             |   bus_ctrl: program/data RAM, character RAM,         |
             |             font ROM, video strobe decode            |
             +-----|--------|---------|---------|---------|---------+
                 load     byte      hsync     vsync     blank
                   v        v         v         v         v
             +------------------------------------------------------+
             | video_controller: shift register + sync flip-flops   |
             +------------------------------------------------------+
                 vidout_red/green/blue[9:0], blank_n, hsync_n, vsync_n
                 (to an external video DAC)
```

## The wait register

`banc` is the register file (registers 1 to 30, with register 0 reading
zero), plus register 31, which is a counter:

* Writing `N` (normally `addi $31, $0, N`) loads the counter. The counter
  then decrements by one every cycle until it reaches 0.
* A write to register 31 arriving while the counter is still above 1
  raises `stop_all` for as long as that is true. `stop_all` freezes every
  pipeline register, the ALU's HI/LO register, every memory write and every
  video strobe. The write stays on the register file's write port and
  completes in the first cycle in which the counter is 0 or 1.
* As a result, two consecutive writes to register 31 complete exactly `N`
  cycles apart, where `N` is the first of them. If the program took longer
  than `N` cycles to get there, the write completes immediately; the wait
  register can stretch an interval but never shorten it.
* Reading register 31 returns the remaining count.

The typical pattern is "wait, then act":

```
addi $31, $0, 96        ; the next write to $31 will be 96 cycles after this one
sw   $0, 0x4002($0)     ; toggle HSYNC
...                     ; up to 95 cycles of other work
addi $31, $0, 704       ; completes exactly 96 cycles after the previous one
sw   $0, 0x4002($0)     ; toggle HSYNC again
```

The store behind the wait sits in the memory stage during the stall, so the
bus controller must not act on it until the stall ends. It issues strobes
and memory writes only when `stop_all` is low.

`stop_all` is combinational: it is computed from the memory stage output
register and the counter. It is not registered, which means the stalled
write never has to be saved anywhere. The original design registered it and
had to latch the lost write, which it never got to work. Making the
interval exactly `N` (release when the counter reaches 1) is also this
design's choice. It matches the original's intent of one font byte "every
8 cycles" with `wait 8`.

Register 31 is also MIPS's link register. `JAL`, `BGEZAL` and `BLTZAL`
write it, and so they start a wait interval. Programs for this processor
should link through `JALR` with another register.

## The special stores

All video output is done with ordinary `sw` instructions to decoded
addresses. Each one produces a one-cycle strobe on the cycle after the
store leaves the memory stage.

| Address           | Effect of a store                                              |
|-------------------|----------------------------------------------------------------|
| `0x4001`          | toggle BLANK                                                   |
| `0x4002`          | toggle HSYNC                                                   |
| `0x4003`          | toggle VSYNC                                                   |
| `0x4004`          | toggle HSYNC and VSYNC together                                |
| `0x2000`-`0x200F` | font lookup and pixel load (below)                             |

**Font lookup and load in one instruction.** The store `sw rC, 0x2000(rL)`
does three things:

* its store data (`rC`, an ASCII code) selects the glyph, `rC - 32`;
* its address bits 3:0 (`rL`, the pixel line 0..15 inside the character
  row, added to 0x2000) select the line;
* the bus controller reads that byte from the font ROM and hands it to the
  video controller together with the LOAD strobe.

So a single instruction replaces a load from the font memory, a wait for it
and a store to the video port. Without this, the inner loop could not get
under 8 cycles per character. Codes outside 32..127 load a blank byte.

The original program listing stores its LOAD to 0x4000, while the design
description uses the 0x2000 form above. This design follows the
description. The two LOAD stores in the bundled program were changed to
0x2000, and 0x4000 is not decoded.

## Memory map

| Address           | Contents                                                    |
|-------------------|-------------------------------------------------------------|
| `0x0000`-`0x03FF` | instruction fetch: 256 x 32 RAM, word = address bits 9:2     |
| `0x0000`-`0x01FF` | loads/stores: same RAM, word index = address bits 7:0        |
| `0x1000`-`0x19FF` | character RAM, 2560 bytes, one ASCII code per screen cell    |
| `0x2000`-`0x200F` | font lookup and load (stores only)                           |
| `0x4001`-`0x4004` | video strobes (stores only)                                  |

Instruction and data share one dual-port RAM (`instr_data_ram`). Port A
fetches and port B serves loads and stores, so a load or store never
stalls the fetch. Data addresses are used as word indexes without the byte
shift, as in the original: `lw $x, 200($0)` reads word 200. The character
RAM returns its byte zero-extended, ORed onto the same load data bus. All
loads and fetches return data in the same cycle; only the font ROM is read
at the clock edge, so that its byte arrives together with the registered
LOAD strobe.

The character RAM holds row-major ASCII codes: cell (row, col) is at
`0x1000 + 80*row + col`. The font ROM holds 96 glyphs of 16 bytes, one
byte per pixel line, MSB leftmost. By default it contains a computed test
pattern, byte = ASCII code XOR (17 x line), which the testbenches predict.
A real 8 x 16 console font is loaded by passing a 1536-line hex file as
`FONT_FILE`.

## The processor

`minimips` is a five-stage MIPS-I integer pipeline:

* `pps_pf`: program counter.
* `pps_ei`: instruction fetch register.
* `pps_di`: table-driven decode.
* `pps_ex`: ALU, branch and address computation.
* `pps_mem`: bus request and write-back selection.

These are supported by `renvoi` (bypass and hazard unit), `banc` (register
file with the wait register), `syscop` (system coprocessor for exceptions)
and `bus_ctrl` (memories and video port). It implements the usual integer
instruction set without byte/halfword loads or division. See the header of
`rtl/pps_di.sv` for the list.

Points that matter when writing timed code for it:

* **No delay slot.** While a branch is in decode or execute, fetch is held
  and NOPs are inserted. A branch is resolved in execute: a taken branch
  costs 3 extra cycles, a branch not taken 2. The offset of a conditional branch is
  counted in words from the branch itself, not from the next instruction.
* **Bypassing.** Results are forwarded from the decode, execute and memory
  stage outputs. Each in-flight result is tagged with the stage at which it
  exists. A dependent instruction that needs a value earlier than that
  stage stalls (`alea`):
  * a load result used by the next instruction costs 2 stall cycles;
  * an ALU result used by the next instruction costs 1 stall cycle.
* **Exceptions.** Overflow on `add`/`addi`/`sub`, `syscall`, `break` and
  undefined opcodes jump to the address in coprocessor register 15
  (VECTIT). The faulting instruction's address goes into register 14 and
  the cause into register 13; the faulting instruction and those behind it
  are cancelled. Writing to coprocessor register 0 is a command: 1 masks
  interrupts, 2 unmasks them, 4 returns to the saved address. The
  `it_mat` interrupt input is sampled by a register and taken when enabled
  in register 12.
* **Coprocessor moves.** `mfc0` names the coprocessor register in the `rt`
  field and the general register in `rd`.

## The video controller

`video_controller` holds the three sync outputs as toggle flip-flops. They
reset high (inactive) and invert on each strobe, so the program marks both
edges of every pulse.

The pixel path is an 8-bit register. A LOAD strobe loads it with the font
byte; otherwise it rotates left by one each cycle. Its MSB, registered once
more, drives all 30 RGB bits (white or black). One byte therefore covers
exactly 8 pixels, and the next LOAD must come exactly 8 cycles later.
`vidout_clk` is the pixel clock passed to the DAC.

The original describes this block both as a Mealy state machine and as
registered toggles. The registered form is used here.

## Does the original program keep up?

The bundled program (`rtl/rtproc_prog.hex`) is the original video program:

* vertical sync, vertical back porch, 480 active lines and the front porch;
* waits of 96 and 704 for the horizontal sync;
* 81 font loads per active line (one blank byte plus 80 characters).

Simulating a full frame of the complete design shows the following:

* **Sync timing is exact.** HSYNC# is low 96 and high 704 cycles, and
  VSYNC# is low for 1600 cycles, as VGA requires.
* **The active line is too slow.** The character loop needs 14 cycles per
  character, made up of:
  * 7 instructions;
  * 4 stall cycles, in which an instruction waits for a result from the
    one just before it;
  * 3 cycles for the loop branch.

  At 8 cycles per character, 80 characters fit in 640 pixels. At 14, a text
  line takes about 1130 cycles, and the frame takes 645 179 cycles instead
  of 420 000. The picture is therefore correct in content but not a valid
  60 Hz VGA signal. The original timing argument counted one cycle per
  instruction (seven per loop, plus one cycle of waiting), which ignores the
  pipeline's stalls.

The hardware itself can meet the rate. A straight-line sequence of
`addi $31,$0,8` / `sw rC, 0x2000(rL)` pairs loads exactly every 8 cycles
(tested). A program that keeps the per-character work under 8 cycles, for
example by unrolling the loop and scheduling the character loads ahead,
would produce real-time video. That program is not included.

## Parameters

| Module           | Parameter   | Default               | Meaning                                  |
|------------------|-------------|-----------------------|------------------------------------------|
| `rtproc_top`, `minimips`, `bus_ctrl` | `PROG_FILE` | `rtl/rtproc_prog.hex` | program image (hex words) |
| `rtproc_top`, `minimips`, `bus_ctrl` | `FONT_FILE` | empty (test pattern)  | font image (1536 hex bytes) |
| `instr_data_ram` | `DEPTH`     | 256                   | words of program/data RAM                |
| `char_ram`       | `DEPTH`     | 2560                  | bytes of character RAM                   |

File paths are relative to the directory the simulator is started in (the
one holding `rtl/` and `tb/`). Font size (96 glyphs x 16 lines), the
address map and the instruction encodings are constants in
`rtl/mips_pkg.sv`.

## Departures from the original

* The LOAD store uses address 0x2000 (the description), not 0x4000 (the
  original listing); the bundled program is patched accordingly.
* The wait register stalls with a combinational `stop_all` and releases at a
  count of 1, giving exact `N`-cycle intervals. The original registered
  stall lost writes and never worked on hardware.
* Video strobes and the font lookup require an actual store request and are
  blocked during `stop_all`. The original decoded the address alone.
* Memories answer in the same cycle, except the font ROM. The original's
  block RAMs were synchronous, with a handshake added around them.
* One 256 x 32 program/data RAM, as in the original board's pair of
  256 x 16 block RAMs. The original address table's 128 + 128 byte split
  could not hold the 63-word program.
* The font ROM contains a test pattern instead of the 8 x 16 console font;
  a real font is supplied through `FONT_FILE`.
* The pixel shift register resets to 0 (the original reset it to 0xAB).
* HI/LO are not written during a stall or a flush.
* Not included:
  * the FPGA's clock generator: the design takes a 25 MHz clock and a reset;
  * the board's video DAC: its digital inputs are the `vidout_*` ports.

## Simulating

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and stops, and it has a watchdog. Run from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/mips_pkg.sv \
          tb/tb_rtproc_full.sv --top-module tb_rtproc_full -o sim && ./obj_dir/sim
```

(`-Wno-fatal` because the testbenches assign `$urandom` to narrower
signals and let it truncate; Verilator warns about that. Any other
testbench is built the same way with its own name. The full frame runs in
under a second.)

| Testbench           | What it shows                                                        |
|---------------------|----------------------------------------------------------------------|
| `tb_rtproc_full`    | one whole frame at default sizes: sync timing, all 38 880 font loads against the character RAM contents, every pixel, LED bar; prints the frame length |
| `tb_rtproc_top`     | the same checks over the first lines of a frame (fast)               |
| `tb_minimips`       | a test program (`tb/minimips_test.hex`): arithmetic, bypass, load-use stall, loops, jump-and-link, loads exactly 8 cycles apart under `wait 8`, sync strobe spacing, overflow exception, masked and unmasked hardware interrupt with return |
| `tb_banc`           | register file and the exact `N`-cycle wait interval                  |
| `tb_bus_ctrl`       | address decode, memory reads/writes, strobes, font bytes, stall blocking |
| `tb_video_controller` | sync toggles and pixel shifting against a model                    |
| `tb_alu`, `tb_renvoi`, `tb_syscop`, `tb_pps_*` | each unit against a reference model |
| `tb_instr_data_ram`, `tb_char_ram`, `tb_font_rom` | memory behaviour and read latency     |

`tb/rtproc_monitor.sv` is the shared checker of the two top-level benches.
It also counts wait stalls, hazard stalls, bypasses, taken branches,
multiplies, character reads and sync toggles, and fails if any of them
never happened.

`tb/minimips_test.hex` is a hand-assembled program whose expected results
are listed in the testbench header.
