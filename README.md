# SOI pixel chip readout core (pix_2015_b)

This core reads out an SOI (silicon-on-insulator) pixel detector chip. It turns
the chip's data sources into one stream of 32-bit words grouped in whole
event frames, and leaves that stream in a FIFO that a soft processor polls.
Each frame starts with a short header holding its frame number and a 64-bit
time stamp. The processor copies frames into a large buffer in external
memory and sends them out over Ethernet. That software side is not part of
this RTL.

The core has four event sources, each with its own framing problem:

| source | digitised by | word | frame |
|---|---|---|---|
| MX ("big") matrix | external 12-bit ADC | 12 bits | 576 words (36 rows x 16 columns), framed by the chip |
| Y matrix | external 12-bit ADC | 12 bits | 128 words, framed by the chip |
| on-chip ADC | the chip | 10 bits | none: the core cuts 1024-word frames with a counter |
| self-triggering (ST) matrix | the chip, sent serially | 20 bits (10 position, 10 time) | none: the core cuts 128-word events at a FIFO threshold |

Two test modes add frames made of an internal count pattern, or of external
ADC samples that the core frames itself.

## Data path and clock domains

```
            st_clk domain            pk_clk domain (front end)                 sys_clk domain (125 MHz)
 ST serial -> st_deserializer -> st_event_fifo --+
                                  (1k x 20)      |
 chip frame, wr_en -> adc_pipe_delay ------------+-> frame_writer -> async_fifo ==> pk_to_pfifo -> sync_fifo -> processor
 ext ADC[11:0] ----------------------------------+   (select, header,  "pk_fifo"     (transfer)    "PFIFO"
 chip AD[9:0] -> frame_gen (1024) ---------------+    skip, count)     16k x 32                    2k x 32
 test pattern / ext ADC -> frame_gen ------------+
 trigger clock, reset -> timestamp_counter ------+
                                                                      pix_slv_regs (8 x 32) <-> processor
                                                                      pix_clock_gen -> pk_clk, ADC/int clocks
```

* **sys_clk** (125 MHz): slave registers, clock generator, transfer state
  machine, PFIFO.
* **pk_clk**: the front-end clock, made by dividing sys_clk. The matrices
  and the on-chip ADC are read on this clock too. It leaves the core as
  `matrix_clk` and `ad_clk`, and as `adc_clk` (optionally inverted).
* **st_clk**: the ST deserializer clock. It should be faster than pk_clk. In
  a complete system it comes from a clock manager, so here it is an input.

Two dual-clock FIFOs cross the domains: the ST FIFO (st_clk to pk_clk) and
pk_fifo (pk_clk to sys_clk). Both use Gray-coded pointers through two-flop
synchronizers (`async_fifo`). Single status bits go through `sync2`. The
front-end settings (DAQ ON, mode, frame size, ADC pipeline delay) reach
pk_clk through two flops each. DAQ ON is a single bit and may change at any
time. The other fields are quasi-static: change them only while DAQ is off.

## Frames: recognition, header, whole-frame skipping

This logic is the heart of the core and lives in `frame_writer`. Every
source reaches it as the same kind of stream: a `frame` level, a `valid`
strobe and a data word. The mode register picks one of them. A rising edge
of the selected `frame` is a frame start, and the falling edge is its end.

At each start:

1. **The frame counter always advances**, whether or not the frame is kept.
   A reader therefore finds lost frames as gaps in the frame numbers.
2. **Room check.** The frame is kept only if pk_fifo has room for all of it:
   3 header words plus the frame length. The length is PIX_FRAME_SIZE (from
   slv_reg0) for MX, Y and the test modes, 1024 for the on-chip ADC and 128
   for ST. If there is not enough room, the whole frame is dropped and no
   partial frame ever reaches the FIFO. The result of this check is the
   "almost full" status bit.
3. **Header.** A kept frame is written as:

   | word | content |
   |---|---|
   | 0 | frame number (counter value before this frame; the first frame is 0) |
   | 1 | time stamp bits 63:32, taken at the frame start |
   | 2 | time stamp bits 31:0 |
   | 3 ... | data words, at most the frame length; any extra words are dropped |

   Data words are zero-extended: `{20'b0, ADC[11:0]}` for MX, Y and
   external-ADC test, and `{22'b0, AD[9:0]}` for the on-chip ADC. ST words
   carry the current stamp in the upper bits: `{stamp[11:0], ST[19:0]}`.
   The internal test pattern is a 32-bit count.

Header and data share the single write port without a buffer or a stall.
Header word 0 is written in the start cycle and words 1 and 2 in the next
two cycles. Meanwhile the data pass through a 3-stage delay line, so they
follow the header with no gap, at up to one word per clock. After a frame
ends, the writer waits until the delay line is empty, which takes at most 4
clocks. A frame that starts during that wait is counted and skipped. The
internal frame generators leave a gap of at least 5 clocks between frames,
so they never hit this case.

Because the room check covers the whole frame at its start, pk_fifo cannot
overflow. DAQ ON only gates frame starts. A frame already running when DAQ
is switched on is ignored. A frame running when DAQ is switched off is
completed, and the internal frame generators also finish their current
frame. Changing the mode in the middle of a frame does cut that frame
short, so change the mode, frame size and delay only while DAQ is off. To
stop a run, switch DAQ off, wait for the last frame to end, then reset both
FIFOs (slv_reg3 bit 31), as the run-control software does.

## The sources

* **MX / Y.** The chip gives an event frame and a write enable. The external
  ADC returns each sample some clocks after it was taken. The *ADC pipeline
  delay* field (slv_reg4[23:20], reset value 6) delays the frame and write
  enable by that many pk_clk cycles (0-15) so that they line up with the ADC
  data (`adc_pipe_delay`).
* **On-chip ADC.** One sample per pk_clk. `frame_gen` wraps it in 1024-word
  frames.
* **ST matrix.** `st_deserializer` shifts in one bit per st_clk, most
  significant bit first, while `st_sen` is high. After 20 bits it emits a
  word. If `st_sen` drops early, the partial word is thrown away.
  `st_event_fifo` stores the words (1k x 20). Once its fill level reaches
  128 and ST mode is on, it reads out exactly 128 words as one framed event.
* **Test modes.** Code 1111 gives frames of an incrementing 32-bit count.
  Code 1110 gives frames of external ADC samples. Both are PIX_FRAME_SIZE
  words long and framed by a second `frame_gen`.
* **Time stamp.** A 64-bit counter in the pk_clk domain. It counts rising
  edges of the trigger clock and is cleared by the trigger reset. Both lines
  are synchronized into pk_clk, so the trigger clock must run below half of
  pk_clk.

A source is active only while DAQ ON is set and the mode selects it.

## After the front end

`pk_to_pfifo` moves words from pk_fifo to PFIFO, up to one per sys_clk, while
pk_fifo has data and PFIFO has room. It counts the word in flight in the room
check, so a full PFIFO simply stalls the transfer and no word is lost. PFIFO
(`sync_fifo`, 2k x 32) exposes its output word, empty and full flags, and
fill count. The processor waits until the fill count covers a whole frame
(3 + frame length words), then reads the frame. PFIFO holds one frame of any
source: the largest, 1027 words, fits in 2048.

## Registers

Eight 32-bit registers (`pix_slv_regs`). Bit numbers below are bus bit
numbers, with bit 0 as the least significant bit. The core's original
documentation numbers bits from the other end: its bit i is bus bit 31-i.
Unlisted bits are stored and read back.

| reg | bits | meaning |
|---|---|---|
| 0 | [31:21] | PIX_FRAME_SIZE (frame length for MX, Y, test) |
| 0 | [7:4] | mode: 1000 MX, 0100 Y, 0010 ST, 0001 chip ADC, 1111 test pattern, 1110 test external ADC |
| 1 | [0] [1] [2] | JTAG TDI, TCK, TMS (outputs) |
| 1 | [3] [4] | ST-control serial data, clock (outputs) |
| 1 | [5] [6] [7] | read only: JTAG TDO, ST-control data in, DAC data in |
| 1 | [8] [9] [10] | biasing-DAC serial data, clock, sync (outputs) |
| 2 | [31] | DAQ ON: enables acquisition and releases the selected matrix's reset |
| 2 | [30] | use trigger (stored and brought out on `use_trigger`; no effect inside the core) |
| 3 | [31] | reset of pk_fifo, the transfer machine and PFIFO |
| 3 | [30] / [29] | fast reset forced high / low |
| 3 | [28] | front-end general reset (pk_clk and st_clk domains) |
| 3 | [2] [1] [0] | read only: pk_fifo empty, almost full (no room for a frame), full |
| 4 | [7:0] | pk_clk limit: pk_clk = 125 MHz / (2 x (limit+1)); reset 0 |
| 4 | [15:8] | integration clock limit: int_clk period = 2 x (limit+1) pk_clk periods; reset 0x0F |
| 4 | [19] | invert the external ADC clock |
| 4 | [23:20] | ADC pipeline delay in pk_clk cycles; reset 6 |
| 5 | all | reserved, read/write |
| 6 | [0] | read only: the chip's `fastblock` signal |
| 7 | [0] [1] | DCM phase-shift enable, increment/decrement |
| 7 | [2] [3] | the same for the second DCM |
| 7 | [4] [5] | DCM reset, second DCM reset |
| 7 | [29] / [28] | DCM / second DCM phase done: reads a flag set by a `psdone` pulse; writing 1 holds the flag clear |
| 7 | [31] / [30] | read only: DCM / second DCM locked |

The JTAG, DAC and ST-control lines are plain register bits. The software
bit-bangs those protocols, so the core knows nothing about them. The same
goes for DCM phase shifting: software pulses the enable bit once per step.
`matrix_rst[3:0]` (MX, Y, ST, chip ADC; active high) stays asserted except
for the source selected while DAQ is on. The fast reset pin follows "force
high". Nothing else drives it, so "force low" matches the default.

## Clocks and resets

`pix_clock_gen` makes pk_clk from sys_clk flip-flops. A limit of 0 gives
62.5 MHz. During reset pk_clk keeps toggling, so the front-end reset
synchronizers always see clock edges. `rst_n` is asynchronous. Each domain
has its own reset synchronizer (`reset_sync`), which asserts at once,
releases two clocks later, and powers up asserted. While a dual-clock
FIFO's write side is held in reset, it reports full with no free words. A
writer therefore never loses a word around the reset release, and a frame
that starts during a fifo reset is counted and skipped.

## What is outside the core

The top-level ports stand in for the parts the core connects to:

* the **processor bus**: a plain register port (`bus_wr`, `bus_addr`,
  `bus_wdata`, `bus_rdata`) and the PFIFO read port (`pfifo_*`);
* the **processor software, DDR2 event buffer and Ethernet**. The software
  runs a producer thread (PFIFO to a circular buffer with per-slot flags),
  a consumer thread (buffer to network) and a UDP thread that maps register
  writes onto the slave registers, including the DAC, JTAG and phase-step
  sequences;
* the **DCMs** (clock managers): their control and status pins are brought
  out, and `st_clk` comes in;
* the **chip, external ADC and biasing DACs**, through the data, clock and
  serial pins.

## Choices made here

The following behaviours are this implementation's own choices, where the
original description is silent:

* the bus port and the register reset values other than 0x0F and 6;
* the 3-word header layout and its timing, and truncation at the frame length;
* the serial ST format (MSB first, framed by `st_sen`);
* the division formulas of both clocks;
* the frame gap of the internal generators;
* which lines the ADC pipeline delay shifts (the frame and write enable,
  not the data);
* how the time stamp crosses domains;
* the sticky phase-done flags;
* PFIFO reset together with pk_fifo;
* DAQ ON gating only frame starts, so a run never stores a partial frame;
* the two-flop crossing of the front-end settings, and a FIFO that reports
  full while its write side is in reset.

Left out: the clock phase shift between the core and long chip cables (done
with a DCM), any use of "use trigger" inside the core, and the meaning of the
"ST data/cnt" line beyond the word enable.

## Files

`rtl/` holds one module per file:

| module | role |
|---|---|
| `pix_pkg` | mode codes, event sizes, configuration record |
| `soi_readout_top` | top level, wires everything |
| `pix_slv_regs` | slave registers |
| `pix_clock_gen` | pk_clk, int_clk, adc_clk |
| `st_deserializer` | ST serial-to-parallel |
| `st_event_fifo` | ST FIFO and event forming |
| `pix_frontend` | pk_clk domain: delay, generators, pattern, stamp, writer |
| `adc_pipe_delay` | frame / write-enable delay |
| `frame_gen` | artificial frames |
| `timestamp_counter` | 64-bit stamp |
| `frame_writer` | selection, header, skipping, frame counter |
| `async_fifo` | dual-clock FIFO (pk_fifo, ST FIFO storage) |
| `pk_to_pfifo` | transfer state machine |
| `sync_fifo` | PFIFO |
| `reset_sync`, `sync2` | reset and level synchronizers |

`tb/` has one self-checking testbench per module, named `tb_<module>`.
`tb_soi_readout_top` runs the whole core at its real sizes:

* it reads MX, Y, ST, on-chip ADC and both test-mode frames word by word;
* it then stops reading until PFIFO stalls the transfer and pk_fifo skips
  whole frames, drains everything, and checks the frame-number gaps;
* it also covers the fifo reset, the pk_clk division and the time stamps.

Each testbench prints `TB_RESULT checks=N failures=M`. The testbenches
have been run with several random seeds for Verilator's initial register
values (`+verilator+seed+N`), and all pass with each of them.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/pix_pkg.sv tb/tb_soi_readout_top.sv --top-module tb_soi_readout_top
./obj_dir/Vtb_soi_readout_top
```

Use another `tb/tb_*.sv` file and top name for a single block. The full
top-level run takes well under a second of CPU time.

Sizes are parameters: `PK_FIFO_AW` (14, 16k words), `PFIFO_AW` (11) and
`ST_FIFO_AW` (10) on the top; `EVENT_WORDS` on `st_event_fifo`. The event
sizes and header length are in `pix_pkg`.

## How far to trust it

Every module passes its own testbench and the end-to-end test in a
two-state simulator. Every module also compiles in Yosys (slang front end)
and synthesizes without latches. Nothing has run on hardware. Timing
constraints for the generated clocks and false-path constraints for the
clock-domain crossings need the usual FPGA treatment. The multi-bit
settings pass through plain two-flop synchronizers and are only safe
because they change while DAQ is off. The slave-register outputs to the
chip (JTAG, DAC, ST-control, DCM controls) are driven from sys_clk
registers without synchronization.
