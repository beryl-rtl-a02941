# Beryl: an out-of-order ARM core in a small PC

Beryl is a 32-bit ARM processor that executes instructions out of order
using Tomasulo's algorithm. It sits in a small computer built around a
128-bit wishbone bus. The computer has an HDMI display (a 720x480 frame
buffer or a text view of the registers), a PS/2 keyboard receiver,
timers and an interrupt controller. The core started from an in-order
ARMv2-class design. That core had a slow 34-cycle multiplier and stalled on
every dependency. Beryl keeps the instruction set and changes three things:

- Decoded instructions wait in reservation stations until their operands
  arrive.
- A tag identifies every result still in flight.
- Three execution units (an ALU, a pipelined multiplier and a memory unit)
  each broadcast one result per cycle on their own tag bus.

The work of a long multiply, a slow load or a stalled branch condition then
overlaps with the independent instructions that follow it.

Everything here is synthesizable SystemVerilog (IEEE 1800-2017), except the
testbenches. Every parameter defaults to the original system's sizes. Where
the original leaves a detail open, the choice made here is stated in the
first comment of the file concerned and summarised under
[Departures and own choices](#departures-and-own-choices).

## The system

```
            +-------------------------- beryl_core --------------------------+
  irq/firq->| fetch(+icache) -> decode -> dispatch -> ALU / MUL / MEM units   |
            |   fetch wishbone port               data wishbone port         |
            +------------|---------------------------------|-----------------+
                         +---------- wishbone_arbiter -----+
      slot 0       1          3        4             6        7          2,5
   boot_mem    data mem     PS/2   frame_buffer    timers   interrupt    (empty)
   (wb_ram,    (wb_ram,      |         |             |      controller
    8 kB)       64 kB)       |     hdmi_controller   |        ^
                             +--- irq ------------------------+----> core irq/firq
```

`beryl_system` is the top. It has one clock and a synchronous, active-high
reset. Its ports:

- Inputs: `ps2_clk`, `ps2_data`, `ext_irq`, `ext_firq` and `text_mode`.
- Outputs: the raw HDMI pixel stream `hdmi_tx_data[35:0]` (12 bits per
  colour), plus `hdmi_tx_hs`, `hdmi_tx_vs`, `hdmi_tx_de` and `hdmi_tx_clk`.
- `core_idle` is an observation output.

The HDMI transmitter chip, its I2C set-up and the PLL are board parts.
They are not part of this RTL.

### Address map

The slave number is three bits, so there are eight slots. The top address
nibble selects the slot:

| address | slot | device |
|---|---|---|
| `0x0000_0000`-`0x0000_FFFF` | 0 | boot memory: 8 kB, read-only; programs start at 0 |
| `0x0001_0000`-`0x0FFF_FFFF` | 1 | data memory: 64 kB block RAM, mirrored |
| `0x1xxx_xxxx` | 4 | frame buffer: 720x480 4-bit pixels, 32 per 128-bit word |
| `0x2xxx_xxxx` | 3 | PS/2 receiver: word 0 data (reading clears), word 1 status `{error, valid}` |
| `0x3xxx_xxxx` | 6 | timers: per timer k at `0x10*k`: load, counter, control `{periodic, enable}`, interrupt clear |
| `0x4xxx_xxxx` | 7 | interrupt controller: see `rtl/interrupt_controller.sv` |
| anything else | 5 | empty; the arbiter answers with zero data one cycle later |

Every device acknowledges one cycle after the request. The data master
wins a tie with the fetch master. A master keeps the bus until its
acknowledge.

The interrupt sources, from bit 0 up, are:

| bit | source |
|---|---|
| 0 | software |
| 1-3 | timers 0-2 |
| 4 | PS/2 |
| 5 | `ext_irq` |
| 6 | `ext_firq` |

Each source can be enabled onto `irq`, onto `firq`, or onto both.

## The core

### Fetch and decode

`fetch` keeps a PC and reads one instruction per cycle through `icache`.
The cache is direct-mapped with 64 lines. Each line is 128 bits, four
instructions, which is one wishbone beat. A miss fills the whole line.

A redirect comes from a taken branch, a PC write or an exception. It
replaces whatever fetch is holding with the never-executed instruction
`0xF0000000`, and fetching restarts at the target.

`decode` is combinational. It turns an instruction word into a `dec_t`
record: class, opcode, registers, shift, immediate, addressing mode and
branch target. A register at the decode/dispatch boundary holds the record
while dispatch stalls.

### Tags: the central idea

Every result that is still being computed is named by a six-bit **tag**:

- The top two bits give the unit that will produce it: `00` or `11` for
  the ALU, `01` for the multiplier, `10` for memory.
- The low four bits make it unique within that class.

So the ALU has 32 tags, and the multiplier and memory unit have 16 each.

`tag_store` hands out the lowest free tag of a class. It takes the tag back
when that tag appears on a bus.

Renaming works like this:

- Every architectural register holds `{valid, tag, data}`. So does every
  operand slot in a reservation station, and so do the NZCV flags.
- When an instruction is dispatched, its destination register and, for an
  S-form, the flags are marked invalid and given the new tag.
- Anything that reads them later copies the tag instead of the value.
- When the tag is broadcast, the register file, the flags and every waiting
  operand whose tag matches take the data.
- The tag store frees the tag in the same cycle.

A later writer simply renames the register again. The older result still
reaches the operands that were waiting for it, but the register ignores it
because it now waits on another tag. So write-after-write and
write-after-read hazards need no extra logic.

Three tag buses (ALU, multiplier, memory) run in parallel. Up to three
instructions can therefore complete in one cycle. Dispatch reads operands
with the current cycle's broadcasts forwarded, so a value that arrives in
the same cycle as its reader is never missed.

### Dispatch

`dispatch` contains:

- the tag store;
- the banked register file (`regfile`): 26 physical registers, with FIQ
  R8-R12 and R13/R14 for FIQ, IRQ and SVC;
- the flags and the control part of the CPSR;
- one SPSR;
- the two reservation stations and the memory queue.

In each cycle, dispatch does one of three things with the decoded
instruction: accepts it, stalls it, or redirects fetch. The rules, in
priority order:

1. **PC writes.** An operation that writes R15 stops dispatch until its tag
   is broadcast. Fetch then restarts at the broadcast value. An S-form also
   copies the SPSR into the CPSR (`MOVS PC, LR`).
2. **Interrupts.** A pending FIQ (F clear) or IRQ (I clear) replaces the
   instruction:
   - the CPSR goes to the SPSR;
   - the mode and mask bits change;
   - the banked R14 gets the instruction address + 4;
   - fetch goes to `0x1C` (FIQ) or `0x18` (IRQ).
3. **Flags.** An instruction that needs the flags waits while the flags are
   pending. Such an instruction is:
   - anything with a condition other than "always";
   - ADC, SBC or RSC;
   - an RRX operand;
   - a logical or multiply S-form, which keeps C or V;
   - MRS, SWI, or exception entry.

   When the flags are known, an instruction whose condition fails is
   dropped.
4. **Done in dispatch.** B, BL, SWI, MRS and MSR never reach a station:
   - A branch redirects at once; BL also writes R14.
   - SWI enters SVC mode at `0x08`.
   - MSR waits for its source register.
5. **Into the stations.**
   - Data processing takes an ALU tag.
   - MUL and MLA take a multiplier tag.
   - SWP takes a memory tag.
   - LDR and STR are split in two. The ALU computes the address; that
     result is also the written-back base, which is why the ALU station is
     twice the size of the others. The memory operation waits on the
     address tag.

   If any needed tag or slot is missing, the instruction stalls.

Because branches resolve in dispatch, there is no speculation and nothing
to roll back. The price is a stall whenever a condition depends on a
result that is still in flight.

### Reservation stations and the memory queue

`reservation_station` is used twice: 32 slots for the ALU and 16 for the
multiplier.

- Entries are kept in arrival order, compacting as entries leave.
- Each cycle the oldest entry whose operands are all valid is issued.
- If no entry is ready but the newcomer is, the newcomer goes straight to
  the unit without being stored. This is the "bypass" the testbenches
  count.

`mem_queue` (16 entries) issues strictly in order. Only its head may issue,
once the head's operands are valid and the memory unit is idle. So loads
and stores never pass one another.

### Execution units

- **`alu`** with **`barrel_shifter`**: the 16 ARM data-processing
  operations, with LSL, LSR, ASR, ROR and RRX shifts of an immediate amount.
  The result and NZCV are on the ALU bus the cycle after issue.
- **`multiplier`**: a six-stage pipeline, accepting one multiply per cycle.
  For MLA, the accumulator is added after the last stage. The result
  appears six cycles after issue.
- **`mem_unit`**: LDR/LDRB/STR/STRB/SWP/SWPB, one at a time. A load
  broadcasts its data two cycles after issue, and a store its completion
  three cycles after issue, when the slave answers in one cycle. SWP reads
  and then writes the same address without releasing the bus. This keeps
  it atomic.

There is no data cache. Data accesses go straight to the bus, ahead of
instruction fetch.

### Supported instructions

- All data-processing instructions, with an immediate operand or a register
  shifted by an immediate amount.
- MUL and MLA, with or without S.
- LDR, STR, LDRB and STRB, with pre- or post-indexing, up or down, and
  write-back.
- SWP and SWPB.
- B and BL.
- SWI.
- MRS and MSR, for the CPSR or SPSR, whole register or flags only.

Not supported:

- Register-specified shift amounts.
- LDM and STM.
- Halfword transfers.
- Coprocessor instructions.
- Unaligned word loads. The address is taken as aligned; there is no
  rotation.

Undefined encodings are treated as never-executed.

The CPSR uses the ARMv2 layout:

| bits | field | meaning |
|---|---|---|
| 31:28 | NZCV | condition flags |
| 27 | I | IRQ mask |
| 26 | F | FIQ mask |
| 1:0 | mode | USR 0, FIQ 1, IRQ 2, SVC 3 |

Reset enters SVC mode with both interrupts masked, at address 0.

## Display

`frame_buffer` stores a 4-bit colour index per pixel instead of a 36-bit
colour, which is 1,382,400 bits for a 720x480 frame. Pixel `p` (row-major)
is nibble `p % 32` of 128-bit word `p / 32`. The bus writes it with byte
selects. The display reads it through a second port.

`hdmi_controller` generates standard 480p timing: 858x525 in total,
porches 16/62/60 pixels and 9/6/30 lines, with negative syncs. It works in
one of two modes:

- **PIXEL_MODE** (`text_mode = 0`): each index goes through a fixed
  16-colour map.
- **TEXT_MODE** (`text_mode = 1`): the screen shows R0-R15. Text row *r*
  shows register *r* as eight hex digits in 8x8 cells, white on black.

The glyphs come from `font_rom`, which is loaded from `rtl/font_hex.mem`
(glyph *g*, row *r* at line 8*g*+*r*). It holds 64 characters:

| codes | characters |
|---|---|
| 0-9 | digits |
| 10-35 | `A`-`Z` |
| 36-61 | `a`-`z` |
| 62 | space |
| 63 | solid block |

A hex digit's value is therefore its own character code. The pixel data and syncs are
registered and appear two cycles after the pixel counters.

## PS/2

`ps2_controller` synchronises both lines into the system clock. It samples
data on each falling PS/2 clock edge and assembles 11-bit frames: a 0
start bit, eight data bits LSB first, odd parity and a 1 stop bit.

- A good frame sets `valid`, which is also its interrupt request.
- A bad frame sets `error`.
- A frame whose clock stops for `TIMEOUT` cycles is dropped. That is about
  1 ms at 27 MHz.

Sending to the keyboard is not implemented.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `beryl_system` | `BOOT_WORDS` | 512 | boot memory, 128-bit words (8 kB) |
| | `MAIN_WORDS` | 4096 | data memory, 128-bit words (64 kB) |
| | `H_RES`, `V_RES` | 720, 480 | frame size |
| `beryl_core` | `ALU_SLOTS` | 32 | ALU reservation station |
| | `MUL_SLOTS` | 16 | multiply reservation station |
| | `MEM_SLOTS` | 16 | memory queue |
| | `MUL_STAGES` | 6 | multiplier pipeline depth |
| | `ICACHE_LINES` | 64 | instruction cache lines of 128 bits |
| `timer_module` | `NTIMERS` | 3 | number of timers |
| `ps2_controller` | `TIMEOUT` | 27000 | idle PS/2 clock cycles before a frame is dropped |

The following sizes are fixed by the tag format: 32 ALU tags, 16
multiplier tags and 16 memory tags. The ALU and memory stations cannot
usefully be larger than those counts.

## Departures and own choices

These follow the original design:

- the four-stage core and Tomasulo dispatch;
- the six-bit class-prefixed tags;
- the station sizes (32/16/16);
- issue priority: oldest first, with direct issue of a ready newcomer;
- the split of memory instructions into an ALU part and a memory part;
- the latencies: ALU 1 cycle, multiplier 6 cycles, load 2 cycles, store 3
  cycles;
- the atomic SWP;
- one dedicated CPSR and SPSR, handled in dispatch, with MRS and MSR done
  there;
- the flush instruction `0xF0000000`;
- the 128-bit bus with eight slave slots, and the frame buffer in the
  former UART 1 slot;
- the 4-bit frame buffer with a colour map;
- the text and pixel display modes;
- the PS/2 frame format.

This design's own choices:

- **Register maps.** The address map and the register layout of every
  device.
- **Memory sizes.** The data memory size and the cache organisation.
- **Exceptions.** Interrupts replace the instruction at dispatch, where
  the CPSR lives. The original injected its branch to the vector one
  stage earlier, in decode. Exception entry waits for the flags. With one
  SPSR shared by all modes, a nested exception overwrites the saved
  status.
- **Stalls and arbitration.** Flag readers stall rather than wait in a
  station. Data wins bus ties.
- **Display.** The 480p timing values, the palette and the text layout.
- **Font.** The font ROM holds digits and upper- and lower-case letters,
  as the original did. The glyph shapes and the code order are new. The
  text view uses only the sixteen hexadecimal digits.
- **Clocking.** A single clock domain with a synchronised PS/2 input. The
  original ran the keyboard clock as a second clock.

The original also partly implemented LDM/STM. That is not included.

Two later cores are not included here:

- a four-wide superscalar derivative;
- a core that can switch between out-of-order and multithreaded in-order
  execution.

The original left both unfinished.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench:

- compares against values computed independently (a reference model in
  the testbench, or hand-worked results);
- checks the specified latencies;
- has a watchdog;
- ends by printing `TB_RESULT checks=<n> failures=<m>`.

The main ones:

- **`tb_dispatch` and `tb_beryl_core`** generate random ARM programs. The
  programs cover dependent ALU chains, flag-setting and conditional
  instructions, RRX, MUL/MLA, byte and word loads and stores with every
  indexing mode, SWP, forward branches, MSR to user mode, and SWI with its
  handler. The testbenches run each program on an instruction-set model
  built into the testbench and on the hardware. They then compare all
  registers, the CPSR and memory.
- **`tb_beryl_system`** runs a hand-assembled program on the full system
  at default sizes. It covers loops, multiplies, loads and stores with
  write-back, SWP, subroutine call and return, a store burst that runs out
  of memory tags, SWI, MRS/MSR, a timer interrupt and handler, a
  frame-buffer write, a PS/2 byte sent by the testbench, and a fast
  interrupt from `ext_firq` whose handler uses the banked R8-R14. It counts
  each mechanism and fails if any never happened:
  - tag, flag and PC stalls;
  - failed conditions;
  - exceptions, and FIQ entries among them;
  - redirects;
  - cache fills;
  - station bypasses;
  - out-of-order issue;
  - renaming;
  - atomic swaps;
  - pipelined multiplies;
  - bus conflicts;
  - PS/2 frames;
  - cycles that retire two results.

  It takes about 770 cycles. It also checks that a display line carries
  720 active pixels. The TEXT_MODE characters themselves are checked
  pixel by pixel in `tb_hdmi_controller`.

- **`tb_workloads`** runs seven instruction-group programs on the full
  system: add, and, bcc, sub, teq, tst and strb. These are the groups the
  original system was timed with, but the programs are this testbench's
  own:
  - each ALU group applies its instruction, with S, to 25 operand pairs
    with preset flags;
  - bcc tries all 14 conditions under six flag settings;
  - strb writes every byte lane and reads it back.

  A model in the testbench checks every result and flag word. The
  testbench also prints cycle counts from reset, with cold caches:

  | program | instructions | cycles |
  |---|---|---|
  | add, and, sub | 202 | 386 |
  | teq, tst | 177 | 334 |
  | bcc | 350 | 666 |
  | strb | 78 | 203 |

  These programs are larger than the original tests. Their counts
  therefore cannot be compared one for one with published figures.

The random-program tests keep `irq` and `firq` low. Interrupts are
exercised by the system test.

To simulate one testbench with Verilator 5, run from the directory that
holds `rtl/` and `tb/` (the font file is read by the relative path
`rtl/font_hex.mem`):

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
    rtl/beryl_pkg.sv rtl/*.sv tb/tb_beryl_system.sv \
    --top-module tb_beryl_system -o sim
./obj_dir/sim
```

Some unit testbenches override parameters to stay short:

| testbench | override |
|---|---|
| `tb_icache` | 8 lines |
| `tb_reservation_station` | 6 slots |
| `tb_frame_buffer` | 16x4 |
| `tb_hdmi_controller` | reduced frame |
| `tb_ps2_controller` | 200-cycle timeout |
