# Hardened internal configuration scrubber (ICAP + Frame ECC)

An SRAM-based FPGA holds its configuration in memory cells that radiation can
flip (single-event upsets, SEUs). A *scrubber* reads the configuration back,
finds flipped bits and writes the correct values back before they pile up.
This design is an **internal** scrubber: it runs inside the FPGA it protects,
reads configuration frames through the device's internal configuration access
port (ICAP), lets the device's hard Frame ECC block compute a SECDED syndrome
for each frame, flips the bit the syndrome points at and writes the frame back.
No external memory, controller or pins are needed.

The catch is that the scrubber is itself made of configuration memory and can
be upset too. The design therefore hardens itself:

* the control logic and the ICAP DMA (with its frame buffer) are triplicated
  with **feedback TMR**: three copies of each register, a majority voter per
  copy, and next-state logic that works from the voted value, so an upset
  copy is both outvoted and overwritten on the next clock;
* the processor's program memory is kept in **three copies** with a
  dedicated **BRAM scrubber** that walks them and rewrites any word that
  disagrees with the other two;
* the ICAP and the Frame ECC are single hard primitives and are not
  mitigated; the three DMA copies are voted into the one ICAP.

The scrubbing program runs on an 8-bit PicoBlaze (KCPSM3) processor, three
copies in the hardened build. The processor is a vendor core and is not part
of this RTL: its I/O bus and instruction-fetch port are the top level's ports.

## How a scrub works

The program (outside this RTL) follows this flow, and the hardware is shaped
around it:

1. **Initialise**: clear flags, start the watchdog.
2. **Initial walk**: read every frame one at a time (`DMA_READ` at each frame
   address) and look at its syndrome. A frame that already shows an error at
   start-up is not a fault to repair but content that legitimately differs
   from the code (for example memory used by the design). It is **patched**:
   the program changes the frame's check bits so that the frame as it stands
   reads clean, and writes it back.
3. **Run**: one `DMA_RUN` command streams *all* frames through the ICAP in a
   single readback without storing them; the Frame ECC checks each frame as it
   passes, and the control logic only records whether any frame was bad. This
   is fast (about 244 k words for the default device, 2.4 ms at 100 MHz) but
   does not say where the error is.
4. Repeat runs. When a run reports an error, **walk** again: read each frame,
   and for each frame with an error read the syndrome, **correct** the bit in
   the DMA frame buffer (byte accesses through the control logic) and
   `DMA_WRITE` the frame back. Each event is reported over the UART.

### The frame code and its syndrome

A frame is 41 words of 32 bits (1312 bits, bit `p = word*32 + bit`). The
Frame ECC syndrome is 12 bits: bit 11 is the overall parity of the frame, bits
10:0 the XOR of the position codes of all set bits, where bit `p` has code
`p + 1` and the last bit (p = 1311) is the parity bit with no position code.
Hence:

| syndrome | meaning | action |
|---|---|---|
| `0` | clean | none |
| `{1, c}`, c ≠ 0 | one upset at p = c − 1 | flip bit p |
| `{1, 0}` | the parity bit itself | flip bit 1311 |
| `{0, c}`, c ≠ 0 | even number of upsets (e.g. two) | **cannot be located**: reported as a multi-bit upset (MBU) |

The `mbu` status flag is exactly the last row. Multi-bit upsets inside a frame
are the scrubber's real limit: they are detected but stay in place.

The exact bit-to-code assignment of a real device's Frame ECC is not part of
this design: the control logic only passes the syndrome on, and the processor
program must use the device's own mapping. The testbench model uses the
mapping above.

## Feedback TMR, concretely

`tmr_state` holds a W-bit register in three copies `r[0..2]`. Domain *i* sees
`q[i] = majority(r[0], r[1], r[2])` through its own voter and computes its next
state `d[i]` from `q[i]`; `r[i]` loads `d[i]`. `scrub_ctrl` and `icap_dma`
pack all their state into one struct, run three copies of their next-state
logic (a `for` generate over the domains), and keep the state in a
`tmr_state`. With parameter `TMR = 0` the same modules build the unmitigated
circuit: one register, all domains see it. The top then also keeps a single
DMA BRAM and a single program BRAM without the BRAM scrubber, i.e. 2 block
RAMs against 6 in the hardened build, and uses only processor domain 0.

Each processor domain has its own I/O bus into its own control-logic copy and
its own DMA copy and DMA BRAM copy. Voting happens at:

* every state register (feedback voters inside `tmr_state`);
* the ICAP inputs `{CE, R/W, DATA}` of the three DMA copies (`icap_dma`);
* the DMA BRAM: each copy feeds only its own domain, whose ICAP output is
  then voted;
* the program memory fetch address and fetch data (`bram_scrubber`);
* the I/O bus that drives the single UART and watchdog (top level).

**Synthesis note.** The three copies of every register compute identical
functions of identical inputs, so a synthesis tool that merges equivalent
logic will collapse them into one. A real build must keep them apart (keep /
don't-touch attributes or a TMR-aware flow). The RTL is written so that the
copies are structurally separate.

## Blocks

| module | role |
|---|---|
| `hirel_scrubber_top` | wires everything; I/O read mux; votes the bus to UART and watchdog |
| `scrub_ctrl` | control logic: byte-wide I/O registers, command hand-off to the DMA, Frame ECC capture and flags |
| `icap_dma` | ICAP DMA: header / data / trailer sequencer that feeds the ICAP a word per clock; contains the DMA BRAM copies |
| `dma_bram` | dual-port 512 × 32 frame buffer |
| `bram_scrubber` | three program memories, voted fetch, address counter + voter + write-back repair |
| `prog_bram` | one dual-port 1024 × 18 program memory copy |
| `tmr_state` | feedback-TMR register |
| `tmr_voter` | bitwise 2-of-3 majority |
| `watchdog_timer` | flags a processor that stops kicking it |
| `uart_tx` | 8N1 transmitter for reports to a host PC |
| `scrub_pkg` | shared constants, command codes, port map, status byte, ICAP packet words |

## Processor interface

The processor sees 8-bit I/O ports (PicoBlaze `OUTPUT` / `INPUT`). A write
takes effect on the clock where `write_strobe` is high; `in_port` is
combinational from `port_id`.

| port | dir | content |
|---|---|---|
| 0x00–0x03 | W | frame address (FAR), byte 0 (LSB) to byte 3 |
| 0x04 | W | command: 1 read frame, 2 write frame, 3 run scan, 4 clear flags |
| 0x05 | W | DMA BRAM word address |
| 0x08–0x0B | W | BRAM write data bytes 0–3; writing byte 3 stores the word |
| 0x10 | R | status: bit0 busy, 1 done, 2 syndrome valid, 3 ECC error, 4 MBU, 5 run error, 6 watchdog expired |
| 0x11, 0x12 | R | last syndrome bits 7:0, 11:8 |
| 0x14–0x17 | R | BRAM read data bytes 0–3 of the word at the address (valid two clocks after the address write) |
| 0x20 / 0x21 | W / R | UART byte to send / bit0 UART busy |
| 0x22 / 0x23 | W / R | watchdog kick / bit0 watchdog expired |

A command is held in the control logic until the DMA is idle; `busy` covers
that wait. A new read, write or run command clears the per-frame flags; a run
also clears `run error`. During a run, only frames with an error update the
syndrome register.

## ICAP transactions and timing

The DMA drives the ICAP's CE (active low), R/W (low = write) and DATA in,
and reads DATA out when BUSY is low. Every command is one transaction:

* header, 10 words, one per clock: dummy `FFFFFFFF`, sync `AA995566`, NOOP,
  write CMD (`RCFG` = 4 or `WCFG` = 1), write FAR and its value, then for a
  read: type-1 read FDRO + type-2 read with the word count + NOOP; for a write:
  NOOP + type-1 write FDRI + type-2 write with the word count;
* data: a write sends the 41 BRAM words on 41 consecutive clocks; a read
  deselects the ICAP for one clock, switches R/W and captures a word in every
  clock where BUSY is low (41 words, or `NUM_FRAMES × 41` for a run);
* trailer: one deselect clock (in which R/W returns to write), then write CMD
  `DESYNC` and a NOOP.

R/W therefore only ever changes in a clock where CE is high; an assertion in
`icap_dma` checks this, and the testbenches' ICAP model counts any violation.

A frame write keeps the DMA busy for 10 + 41 + 1 + 3 + 1 = 56 clocks. A run
over the default 5960 frames moves 244,360 words, about 2.4 ms at 100 MHz
plus any ICAP stall clocks (263,182 clocks in the full-size test, whose ICAP
model stalls one word in 14). A walk over the same device took 527,072 clocks
in that test (about 88 clocks per frame, 5.3 ms at 100 MHz), but there the
processor is a stand-in that spends only its I/O cycles; a real program adds
its instruction time on top, so expect walks several times slower. The packet
words follow the Virtex-4 configuration interface; the pad frames that real
readback and write-back need are not generated, so check them against the
target device's configuration guide before use on hardware.

## Parameters

| parameter (top) | default | meaning |
|---|---|---|
| `TMR` | 1 | 1 = hardened, 0 = single copy of control logic, DMA, frame buffer and program memory |
| `NUM_FRAMES` | 5960 | frames streamed by a run scan; an estimate for a Virtex-4 LX25 (about 7.8 Mbit / 1312 bits) |
| `DMA_BRAM_DEPTH` | 512 | frame buffer words (one 18-kbit block RAM) |
| `PROG_DEPTH` | 1024 | program memory words (KCPSM3 size) |
| `PROG_INIT` | "" | hex file with the program image |
| `CLK_HZ`, `BAUD` | 50 MHz, 115200 | UART bit time; the reference test ran its scrubber at 50 MHz |
| `WDT_TIMEOUT` | 2^25 | watchdog period in clocks (0.67 s at 50 MHz) |

For the original design's scale: the hardened scrubber used about 1082 flip-flops, 1308
slices and 6 block RAMs on a Virtex-4 LX25, against 680, 736 and 2 unhardened;
most of that is the processor, which is not in this RTL. Six block RAMs are
what this RTL uses in its hardened build (three program copies, three frame
buffers), and two in its `TMR = 0` build.

## Where this RTL is its own

The overall structure (processor with its program BRAM, control logic, ICAP
DMA with DMA BRAM, Frame ECC feeding the control logic, TMR of processor,
control logic and DMA BRAM, memory scrubbing of the program BRAM, UART,
watchdog) follows the reference architecture. The following are this
design's own choices and should be reviewed for a real device:

* the I/O port map, command codes and status bits;
* the DMA's command set and packet sequences, including the single-stream
  run scan and the missing pad frames;
* frame size 41 words, 12-bit syndrome and the device frame count;
* the BRAM scrubber's two-clock step and its untriplicated address counter;
* single copies of the UART and the watchdog, driven through a bus voter.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/scrub_pkg.sv tb/tb_hirel_scrubber_top.sv --top-module tb_hirel_scrubber_top -o sim
./obj_dir/sim
```

Substitute any other testbench name. With `--assert`, the assertions in
`icap_dma` (R/W changes only while CE is high) and `scrub_ctrl` (a DMA command
is held until the DMA takes it, then dropped) stop the simulation on a
violation. The memory tests read
`tb/prog_test.hex` by a path relative to that directory.

| testbench | what it shows |
|---|---|
| `tb_tmr_voter` | exhaustive majority on 3-bit words, one bad copy masked |
| `tb_tmr_state` | upsets in one copy hidden and repaired next clock; baseline shows them |
| `tb_dma_bram`, `tb_prog_bram` | memories against a reference model, read latency, init file |
| `tb_bram_scrubber` | voted fetch with one bad copy and one wrong address; each upset repaired within one pass (2 × DEPTH clocks) and counted once; two equal bad copies win (the limit) |
| `tb_icap_dma` | frame read into all BRAM copies, syndromes, frame write content and 56-clock latency, run scan over all frames, an upset in one DMA state copy mid-transfer, ICAP stalls |
| `tb_scrub_ctrl` | FAR assembly, command hold-off, BRAM byte access, syndrome capture, MBU and run flags, clear, an upset state copy |
| `tb_watchdog_timer`, `tb_uart_tx` | timeout period and sticky flag; serial frames decoded independently |
| `tb_hirel_scrubber_top` | end to end on an 8-frame device: initial walk with patching, clean and failing runs, corrections (including the parity bit), an MBU that is detected but stays, upsets in the DMA and control state copies and in a program copy during scrubbing, one processor domain writing wrong values, UART reports checked byte by byte, watchdog expiry; each mechanism is counted |
| `tb_hirel_plain` | the same scenario on the `TMR = 0` build, without the upsets inside the scrubber, which this build cannot mask |
| `tb_hirel_full` | the same scenario with all parameters at their defaults (5960 frames, 115200 baud, 2^25-clock watchdog); about 30 s |
| `tb_seu_campaign` | 300 DMA transactions per build, each with one random state-bit upset during the transfer: the `TMR = 1` build completes all of them correctly, the `TMR = 0` build fails about a third (108 of 300 with the default seed) |

The ICAP, configuration memory and Frame ECC are modelled together in
`tb/icap_model.sv`; the processor is replaced by tasks in
`tb/scrub_e2e.svh` that make PicoBlaze-timed bus cycles and run the flow above.
