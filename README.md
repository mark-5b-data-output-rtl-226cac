# Mark 5B Data Output Module in SystemVerilog

The Data Output Module (DOM) is the playback half of the Mark 5B VLBI
recorder's I/O board. Recorded data comes back from the disk system over an
FPDP link as 2504-word disk frames. The DOM checks and removes the frame
headers, restores the original bit streams (unpacking and a 32x32 crossbar),
buffers about two seconds of data in a 256 MB SDRAM DIMM, and plays it out at
the correlator's RCLK through the VSI-H connector. The output is aligned to
the correlator's one-pulse-per-second, and software can jump the SDRAM read
pointer at every second. This RTL is a reconstruction from the published
hardware design description. It follows that description where it gives
detail and fills the gaps with simple choices of its own. Each choice is
listed in the opening comment of the file it affects.

## Data path at a glance

```
FPDP (33 MHz)                SDRAM (80 MHz)                       back end (bclk, RCLK enable)
fpdp_if -> strip_header -> unpack -> xbar -> xbar_ram ==> sdram_xface ==> cfdr -> delay_gen -> sink
   FIFO 127   header check   N streams  32x32   64x72 CDC   arbiter+core   128x34     skip/repeat   SU / VSI /
   SUSP#      TOT, invalid                                  +receiver      CDC RAM                  TVG / TVR
```

| Clock | Blocks | Crossing |
|---|---|---|
| `fpdp_clk_in`, 33 MHz | `dom_front_end` | into `xbar_ram` (Gray pointers) |
| `sdram_clk_in`, 80 MHz | `sdram_xface`, `int_ctrl` | out to `cfdr` (write port) |
| `bclk_src` | `dom_back_end` | RCLK is a clock enable, `rclk_en` |

- RCLK is `bclk_src / 2^(rclk_rate_code+1)`.
- The CFDR read address returns to the SDRAM domain through a
  request/acknowledge bus synchroniser (`bus_sync`).
- Single events cross as toggles (`pulse_sync`). These events are the restart,
  the interrupt sources and FINISHED.

Word formats are in `dom_pkg`:
- `fe_word_t` is 36 bits: pad, TOT, valid, 32 data bits. Two of them fill one
  72-bit SDRAM word.
- `be_word_t` is the 34-bit CFDR word.

TOT (taken on tick) marks the first sample of a recorded second. `valid` is
cleared on words that equal one of the two software-set invalid code words.

## Front end

- **`fpdp_if`**
  - Registers the FPDP words into a 127-word FIFO.
  - Asserts SUSP# above 75% fill and releases it below 50%. This leaves room
    for the words the source may still send after SUSP#.
  - While disabled it holds SUSP# and NRDY#.
- **`strip_header`**
  - Cuts the stream into 2504-word frames.
  - Checks the SYNC word (0xABADDEED) and the disk frame count in bits 14:0
    of header word 1. The count restarts at 0 every `disk_fps` frames and
    must start at 0.
  - On a mismatch it raises `header_err` and stops the stream.
  - At count 0 it pulses the TOT interrupt, counts seconds, posts header
    words 2 and 3 (VLBA time code) and tags the next data word TOT.
- **`unpack`**
  - Turns each recorded word into 32/N samples, with N = 2^`unpack_code`
    active streams.
  - The register shifts right by N bits. The vacated top is refilled with
    copies of the top N bits, which reproduces the worked example
    0xAABBCCDD → 0xAAAABBCC → 0xAAAAAABB → 0xAAAAAAAA.
  - TOT goes with the first sample only; validity goes with all samples.
- **`xbar`**
  - A 32-input multiplexer per output bit.
  - Output stream i takes input `xbar_sel[i]`.
- **`xbar_ram`**
  - 128x36 on the write side and 64x72 on the read side.
  - It is the clock-domain crossing to the SDRAM interface.
  - Its fill level (`xr_avail72`) drives the arbiter's write condition.

## SDRAM interface: the hard part

The DIMM is used as a ring of 2^21 blocks of 1 kbit. Each block is 16 72-bit
words, which is 32 data words. `sdram_xface` holds three blocks.

**`sdram_core`**
- Runs one mini-block at a time. `$onehot0` is asserted over them.
- Read and write:
  - Each takes 26 cycles.
  - ACTIVE at cycle 0, two bursts of 8 at cycles 2 and 10, PRECHARGE ALL.
  - The DIMM registers command and address for one cycle but not data.
    So read data is taken in cycles 6–21 (CAS latency 3 plus the register),
    and write data is driven in cycles 3–18.
- Auto-refresh takes 9 cycles.
- Initialisation:
  - A power-up wait, PRECHARGE ALL, two auto-refreshes, then
    LOAD MODE = `0000000110011` (burst 8, sequential, CAS latency 3).
- Row, bank and column come from the 72-bit word address
  `{block, 4'b0}` as bits [24:12], [11:10] and [9:0].

**`sdram_arbiter`**
- Follows the arbiter state diagram. Its states are INIT, MODULE_INIT,
  INIT_IDLE, INIT_WRITE, INIT_REFRESH, IDLE, REFRESH, READ, READ_IDLE,
  READ_REFRESH, WRITE and FINISH.
- Startup: after initialisation it fills the ring from block 0 until only the
  last 1/32 is left, then sets `startup_done`.
- Main loop priorities:
  - In IDLE: finish, then refresh, then read, then write.
  - In READ_IDLE (after a read): finish, then refresh, then write, then read.
    This alternates reads and writes when both are due.
- Writes need a whole block in the Xbar RAM. After the first read pointer
  they also need more than one 1/32 sector free ahead of the write pointer,
  so unread data is never overwritten.
- Reads need room in the receiver.
- When the read pointer meets the write pointer the buffer is empty and the
  state is FINISH.
- A refresh is requested every 70 ticks of a divide-by-8 enable, i.e. 7 µs.

**Restart**
- A restart happens at an unsuppressed PPS, or at BOCF in Station Unit mode.
- The back end clears its delay generator and sends the event to the SDRAM
  domain. There the arbiter latches `sdram_addr`, a 32-bit-word address, as
  the new read pointer.
- The arbiter takes the new pointer only between two SDRAM operations
  (IDLE or READ_IDLE). It then pulses `bank_switch` with the word offset
  inside the block.
- **`sdram_receiver`**
  - Writes read bursts into an "offsetable twin RAM" of two banks.
  - At `bank_switch` it changes bank and starts reading at the offset. Reads
    can only start on block boundaries, so the words before the pointer are
    skipped.
  - At the restart it clears the CFDR write address and holds the flow until
    that bank switch.
  - It keeps the CFDR full to within 8 places, judging from a synchronised
    copy of the CFDR read address.
  - It raises `finished` once FINISH is reached and the twin RAM is empty.

## Back end

- **`timing_subsys`**
  - Divides RCLK.
  - Starts the internal PPS at the first DPS1PPS edge (or at enable, if the
    internal PPS is selected). It then counts `pps_div+1` RCLKs per second
    and ignores later DPS1PPS edges.
  - `suppress_pps` removes PPSes from the restart path (`unsup_pps`).
  - A 93-RCLK copy of the PPS marks the first output word of a second on
    the VSI PPS pin.
- **`delay_gen`**
  - Addresses the CFDR.
  - A 32-bit error accumulator adds the 18-bit rate on every read. Each carry
    skips a word (`del_mode`=1) or repeats one (`del_mode`=0).
- **`vsi_output`**
  - At each unsuppressed PPS it waits 90 RCLKs while the CFDR refills from
    the new pointer, then sends one word per RCLK.
  - The first word of the second leaves the pins 93 RCLKs after the PPS.
- **`bocf_gen`**
  - Makes BOCF: 240, 480, 960 or 1920 RCLKs high, then `bocf_low+1` low.
- **`cfhr`**
  - Two 240x16 banks, so software can write one while the other is read.
  - The banks swap at every BOCF.
- **`su_output`**
  - Sends CFHR header words on both 16-bit halves while BOCF is high, and
    data while it is low.
  - It fetches one word every `su_prescl` RCLKs.
- **`tvg` / `tvr`**
  - Generate and check a pattern that restarts every second.
  - `tvr` reports per second the errors and the DC bias of one selected bit.
- **`int_ctrl`**
  - Holds sticky interrupt flags for TOT, ROT1PPS, DOM1PPS, CF, TVR and
    header error, with a mask and write-1-to-clear.

## Where this differs from the original design

- **Test pattern.** The VSI-H test vector is not reproduced. `tvg` and `tvr`
  use a 32-bit Galois LFSR (polynomial 0x80200003, seed 0xFFFFFFFF)
  restarted at every second. Real VSI-H test data will show errors.
- **Registers.** The local-bus register map and the PCI bridge are not
  included.
  - Registers enter as the `dom_cfg_t` struct and status leaves as
    `dom_stat_t`. `stat.int_pending` holds the interrupt flags.
  - The CFHR has its own software write port.
- **Not built:** clock management, LEDs, the AD9850 synthesiser control, the
  phase-calibration unit and the DIMM itself.
  - Their connections are top-level ports: the Xbar RAM write stream is
    brought out as `pcal_v`/`pcal_data`, and `pc_int` shares the interrupt
    pin.
  - `bclk_src` is the back-end clock after source selection.
- **This design's own choices:**
  - The startup fill level of 31/32.
  - The one-sector write guard.
  - The twin RAM depth of 32 72-bit words.
  - The CFDR read-address crossing.
  - The mapping of CFHR words onto the 32 output bits.
  - The command slots inside the 26-cycle read and write programs.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. An example with plain
Verilator:

```
verilator --binary --timing --assert -y rtl -y tb rtl/dom_pkg.sv \
  tb/tb_dom_top.sv --top-module tb_dom_top
./obj_dir/Vtb_dom_top
```

**`tb_dom_top`** runs the whole module end to end.
- Parts:
  - An FPDP source.
  - A behavioural registered DIMM, `tb/sdram_dimm_model.sv`. It models CAS
    latency 3, burst 8, sparse storage and protocol checks.
  - A reference model of the recorded stream.
- Sequence:
  1. Startup fill.
  2. Three VSI seconds with pointer jumps. Every output word is compared
     with the model.
  3. A second with delay-generator slips.
  4. Station Unit mode.
  5. TVG mode, then TVR mode.
  6. A bad header, then draining to FINISHED.
- It counts FPDP suspends, TOT, invalid words, unpacking, refreshes, reads,
  writes, bank switches, jumps, slips, BOCFs, header words and every
  interrupt source. A mechanism that never happened is a failure.

**Sizes simulated.**
- The end-to-end test uses a 512-block ring (`BLK_W=9`) and a 200-cycle
  power-up wait. Frames are the full 2504 words and the "second" is 10000
  RCLKs.
- `tb_dom_top_full` runs the top at its default size: the full 2^21-block
  ring, the 8000-cycle power-up wait and 7 µs refresh.
  - It uses a dense model of the whole DIMM.
  - It runs the complete startup fill: 2,031,616 block writes, about 58
    million SDRAM clocks, roughly 1.5 minutes in Verilator.
  - It then plays out and checks the first 4000 VSI words from a pointer set
    by software.
  - To keep this short it records a single bit stream, so each FPDP word
    yields 32 samples, and runs the FPDP clock faster than the link's
    33 MHz.

## Files

- `rtl/dom_pkg.sv`: shared types, constants and the pattern function.
- `rtl/dom_top.sv`: the top level.
- `rtl/dom_front_end.sv`, `rtl/sdram_xface.sv`, `rtl/dom_back_end.sv`: the
  three clock-domain groups.
- `rtl/gray_sync.sv`, `rtl/pulse_sync.sv`, `rtl/bus_sync.sv`,
  `rtl/rst_sync.sv`: the synchronisers.
- All other files are one block each, named after the module.
