# CFEB SCA controller and readout

A CSC cathode front-end board (CFEB) stores the shaped signal of 96 strips
(6 layers x 16 strips) in switched-capacitor arrays (SCAs). Each strip is
sampled every 50 ns. The logic here decides which part of that analog memory
is written and which parts are kept for a trigger. When a trigger comes, it
digitizes the kept samples and pushes them, as a fixed 16-bit word format, to
the DAQ motherboard (DMB).

The SCA cannot be written as a plain ring buffer. The trigger chain has two
stages:

- A local charged track (LCT) arrives about a microsecond after the particle.
- A Level-1 Accept (L1A) arrives several microseconds later.

The memory therefore works as a pool of 12 blocks of 8 cells. Blocks are
taken for sampling, locked by an LCT, frozen by an L1A that matches the LCT,
and given back when they have been read or when the trigger does not come.
Most of the logic, and most of this text, covers that pool and the
bookkeeping that lets several events share samples.

Everything described here is synthesizable SystemVerilog in `rtl/`, with
self-checking testbenches in `tb/`. The SCA chips, the flash ADCs, the
amplifiers and the DMB are outside the design. Their signals are ports of
`cfeb_top`, and `tb/sca_adc_model.sv` models the SCA and ADC side for
simulation.

## Time base

| quantity | value |
|---|---|
| clock | 40 MHz, one cycle = one bunch crossing (BX) = 25 ns |
| SCA cell | 2 BX = 50 ns |
| SCA block | 8 cells = 16 BX = 400 ns (a *period*) |
| phase bit | 1 in the first 25 ns of a cell, 0 in the second |
| LCT latency `LCT_LATENCY` | 27 BX from the sample to the LCT |
| L1A delay `L1A_X` | 116 BX from the LCT to the L1A, window +-1 BX |

The controller keeps a 16-bit BX counter. Sync Reset sets it to 0 and starts
sampling at cell 1 of the first block. Every time in the design is exact BX
arithmetic on that counter:

- An LCT at BX *t* refers to sample *t - LCT_LATENCY*.
- An L1A at BX *t* refers to sample *t - LCT_LATENCY - L1A_X*.
- The sample's cell is bits 3:1 of that time.
- Its phase is the inverted bit 0.
- Its period (block slot) is the time divided by 16.

The LCT latency is an assumed value. The reference figures are about 34 BX
at present, with a planned cut of about 7. Change the parameter to match the
real trigger.

## The block pool (`sca_controller`)

Each of the 12 blocks has:

- a *free* flag;
- a hold counter: periods left before a block that just finished sampling is
  returned;
- two lock counters, one for LCT locks and one for L1A x LCT locks;
- the period number it sampled (its *tag*);
- its 8-bit TRIG_TIME;
- a 2-bit use count per cell.

A block is free when it is not sampling and its hold counter and both lock
counters are zero.

**Allocation.** At each 400 ns boundary the controller takes the first free
block in the order 0, 1, 3, 2, 6, 7, 5, 4, 10, 11, 9, 8 (4-bit Gray code
limited to 12). The pool it uses is the one seen before the boundary's own
releases. A block that finished sampling waits two periods (800 ns) for an
LCT. At low rate the cycle is therefore 0, 1, 3, 2, 0, ..., and NF_SCA (free
blocks) goes:

- 12 for one BX after Sync Reset;
- then 11, 10, 9;
- then stays at 9, because each boundary releases one block and takes one.

If no block is free, the period is not sampled: SCA_FULL is 1 and the period
is remembered as lost.

Two rules are built into this process:

- **Decisions only at boundaries.** Blocks are freed only at the period
  boundary, and NF_SCA changes only there. A release reported in the middle
  of a period takes effect up to 400 ns later.
- **Bad cells cannot be skipped.** No block or cell can be masked.

**LCT locking.** An LCT whose sample falls in cells 2..8 of a block locks
that block and the next one (case 1). One that falls in cell 1 also locks
the previous block (case 2). This is more than needed, but it is simple.
With 16-sample readout, one more following block is locked.

The "next" block may not have been chosen yet, because its period has not
started. In that case the lock is stored as *pending* in the LCT's pipeline
entry. The boundary that allocates the block then locks it and writes it
into the entry. If the boundary finds no free block, the pending lock is
simply cleared: that period is lost.

Each LCT waits in `lct_pipe`, a 16-entry FIFO in arrival order. Its entry
holds:

- the arrival BX;
- the mask of blocks it locked;
- its phase;
- the pending flag.

The LCT expires when the BX passes arrival + X + 1. Its locks are then
removed, and the blocks return to the pool at the next boundary if nothing
else holds them. LCT_PIPE_CNT is the number of blocks with an LCT lock and no
L1A lock.

**Coincidence.** An L1A arriving X-1, X or X+1 BX after the oldest LCT
matches it. If the oldest LCT expires in that same cycle, the second-oldest
is tried. A match does the following:

1. **Cells to read.** It computes the 8 (or 16) cells to read, starting at
   the L1A sample's cell. They span two blocks (three with 16 samples). Per
   period the cell masks are:
   - first: `FF << cell`;
   - second: `~first`, or `FF` with 16 samples;
   - third: `~first`, with 16 samples only.
2. **TRIG_TIME.** It sets bit *cell* in the TRIG_TIME of the block that
   sampled the L1A's period. TRIG_TIME plus the phase bit is a 4-bit BX
   counter since Sync Reset, which the DMB can compare with its own.
3. **Cell use counts.** It looks at the use count of every needed cell:
   - **0:** the cell is new. It is queued for digitization, and its count
     becomes 1.
   - **1:** an earlier event already queued it. It is *not* queued again,
     and its count becomes 2. When the earlier event reads the cell, the
     readout is told `x = 0` (OVERLAPPED). The DMB then keeps that sample for
     the later event too.
   - **2:** the cell is already owed to two events. The L1A becomes a
     *multiple overlap*: no data is queued and no DAV is sent, MOVLP pulses,
     and only the TRIG_TIME bit is kept. Under CMS trigger rules this cannot
     happen with 8 samples; with 16 samples it can.
4. **Pipeline entries.** For each spanned period that has new cells, it
   writes one entry to `l1a_pipe` and adds one L1A lock to the block. The
   entry holds:
   - block, cell mask and TRIG_TIME;
   - both phases;
   - the 6-bit L1A number.

   A period that was never sampled gets an entry flagged as *B-word*
   instead. Lost samples are never shared: B-words carry no `x` bit, so
   every event that needs a lost sample gets its own B-words for it.
5. **DAV.** DAV pulses one BX after the L1A. It is sent even if only
   B-words follow.

CFEB_L1A counts every L1A since Sync Reset, starting at 1.

**Release.** When the digitizer finishes a block, the block loses one L1A
lock. It goes back to the pool at the next boundary once no lock is left.
A cell's use count returns to 0 when the digitizer reads it. All counts of
a block are cleared when the block is taken for sampling again.

An example from the reference behaviour that the tests reproduce: an L1A in
cell 3, phase 0, gives TRIG_TIME 0000.0100 and reads cells 3..8 of the first
block and 1..2 of the next. A second coincidence 200 ns later (8 BX) reads:

- cells 7..8 of the first block, shared with the first event (`x = 0`);
- cells 1..2 of the next block, also shared (`x = 0`);
- cells 3..6 of the next block, which are new.

It also turns the first block's TRIG_TIME into 0100.0100. A third coincidence
4 BX after that needs cells 1..2 of the second block a third time, so it
gives MOVLP.

## Digitization (`sca_readout`)

The sequencer takes L1A pipeline entries in order. For each marked cell it
runs 16 conversions, one per strip, in Gray order 0,1,3,2,6,7,5,4,12,13,15,
14,10,11,9,8. Each conversion uses all six layer ADCs at once and takes 6 BX
(150 ns).

After the 16th strip the sequencer waits 4 BX, which is exactly the time the
formatter needs for the sample's four trailer words. A time sample therefore
takes 100 BX (2.5 us), the length of its 100-word frame. Eight samples take
20 us and sixteen take 40 us.

The first conversion of an entry taken while idle starts
`16 + 6*(n-1)` BX after the L1A, where *n* is the first cell (1..8). This is
the 400 ns + 150 ns x (TRIG_TIME-1) overhead. An entry that follows another
one without a pause waits only the `6*(n-1)` part.

At the first conversion of a cell, the sequencer asks the controller for the
cell's `x` bit. After the block's last conversion, it reports the block as
released. A B-word entry produces one 4-word B-word job per missing sample,
one every 4 BX.

## Word format (`cfeb_formatter`, `cfeb_crc15`)

Each digitized time sample is 100 words, sent one per BX with no gaps.

| words | content |
|---|---|
| 1..96 | `{0, x, y, ADC[12:0]}`. Per strip, the six layers in the order 3,1,5,6,4,2 (ADC inputs 2,0,4,5,3,1). Strips in Gray order. |
| 97 | `{0, CRC[14:0]}` over bits 12:0 of words 1..96 |
| 98 | `{0111, L1A_PIPE_EMPTY, LCT_PIPE_EMPTY, L1A_PIPE_FULL, LCT_PIPE_FULL, LCT_PIPE_CNT[3:0], NF_SCA[3:0]}` |
| 99 | `{0111, CFEB_L1A[5:0], L1A_PIPE_CNT code[4:0], L1A_PIPE_WARNING}` |
| 100 | `7FFF` |

The `x` bit is 0 when the sample is shared with a later event. It is the
same in all 96 words.

The `y` bit spreads a 16-bit status word over the sample. The six words of
strip position *p* (0..15) all carry bit *p* of:

- bits 0..7: TRIG_TIME of the sample's block;
- bits 8..11: block number;
- bit 12: L1A_PHASE;
- bit 13: LCT_PHASE;
- bit 14: SCA_FULL;
- bit 15: TS_FLAG (1 = 16 samples).

Multi-bit fields go least significant bit first. TRIG_TIME, SCA_FULL and all
pipeline status are read as each word leaves. The doubled TRIG_TIME of an
overlap therefore shows up, and SCA_FULL can change between words.

The L1A_PIPE_CNT field encodes the count *N*:

- *N* < 16: `{0, N[3:0]}`;
- otherwise: `{1, min(N/8, 15)}`, so the value reads as bits(4:1) x
  8^bit(5).

*N* is the number of blocks locked by an L1A x LCT coincidence. At low
rate it reads 2 or 1 during an event and 0 or 1 in its last trailer.
Because there are only 12 blocks, *N* never goes past 12. The upper half of
the code and L1A_PIPE_WARNING (*N* > 32) are still generated, so the field
keeps its full format.

The CRC starts at 0 for each sample. Each data word *d* (13 bits) updates it
as:

```
crc' = d ^ (d << 1) ^ {crc[1:0], crc[14:2]} ^ {0, crc[14:2], 0}
```

A lost sample is sent as four B-words `{1011, 001, SCA_FULL, TRIG_TIME[7:0]}`
instead of 100 words. Their bit 15 is 1, which tells them apart from data.

## Top level (`cfeb_top`)

```
 lct, l1a, sync_rst, ts16
        |
  sca_controller --(lct_pipe inside)--> sca_wr_en/blk/cell  (to the SCAs)
        | entries (0..3 per L1A)            ^ take/x, release
        v                                   |
     l1a_pipe ----------------------->  sca_readout --> sca_rd_blk/cell/strip, adc_conv
                                            |  <-- adc_data[6]
                                            v jobs
                                    cfeb_formatter (+ cfeb_crc15) --> dmb_data, dmb_valid
 dav, movlp, nf_sca, sca_full <-- sca_controller
```

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | 40 MHz clock; asynchronous reset |
| `sync_rst` | in | Sync Reset: frees every block, empties both pipelines, restarts the BX count |
| `lct`, `l1a` | in | one-BX trigger pulses |
| `ts16` | in | 0: 8 samples per event, 1: 16 |
| `sca_wr_en/blk/cell` | out | block and cell being written in this BX (`sca_wr_en` = 0 in a lost period) |
| `sca_rd_blk/cell/strip`, `adc_conv` | out | read address, held through a 6 BX conversion that starts with `adc_conv` |
| `adc_data[6]` | in | 13-bit result per layer, sampled 5 BX after `adc_conv` |
| `dmb_data`, `dmb_valid` | out | word stream |
| `dav`, `movlp` | out | one-BX pulses one BX after the L1A |
| `nf_sca`, `sca_full` | out | pool status |

Parameters (defaults): `LCT_LATENCY = 27`, `L1A_X = 116`,
`L1A_DEPTH = 256`. Inside: LCT FIFO depth 16, hold 2 periods, conversion
6 BX, T0 base 16 BX, trailer gap 4 BX. The package `cfeb_pkg` holds the
sizes (12 blocks, 8 cells, 16 strips, 6 layers, 13-bit ADC), the entry and
job structs, and the small functions for the orders, the CRC and the word
layouts.

## Where this design makes its own choices

The reference description fixes the behaviour and the format. It leaves the
following open, and they are choices of this design:

- **LCT latency of 27 BX.**
- **Steady NF_SCA of 9 without LCTs.** The reference expects 9 and 10
  alternating at low rate. Here release and allocation happen on the same
  boundary edge, so the count stays at 9. At low rate during readout it sits
  at 7-9, as expected.
- **100 BX per sample.** This is 96 BX of conversions plus 4 BX for the
  trailer. The reference gives 150 ns x 16 x 8 = 19.2 us for an 8-sample
  event, against 20 us here. For 16 samples both come to 40 us.
- **CRC recurrence.** The format only says "15-bit CRC over the low 13
  bits". The recurrence above is the one commonly used to check CFEB data.
- **Bit order of the serialized y fields** (LSB first), and the reading of
  the L1A_PIPE_CNT code.
- **What L1A_PIPE_CNT counts.** The field is described both as the L1A
  pipeline length and as the number of blocks locked by L1A x LCT. Its
  quoted maximum of 27 fits the first reading better. This design counts
  locked blocks.
- **Counters and pulses:**
  - CFEB_L1A counts all L1As, matched or not.
  - DAV and MOVLP come one BX after the L1A.
  - B-words carry the event's TRIG_TIME.
- **Full LCT FIFO.** An LCT arriving at a full FIFO is dropped. The FIFO
  cannot fill under the stated rates: at most 8 blocks are held by LCTs.
- **Locking is per block and per cell.** The controller uses the lock
  counters and the per-cell use counts described above.

Only the CFEB-2005 word format is built. The older format, with BUSY,
CFEB_PUSH and LCT_POP bits in word 99, is not.

## Verification

Each block has a testbench that prints
`TB_RESULT checks=N failures=M`. Each has a watchdog and uses only
`$urandom`.

| testbench | what it checks |
|---|---|
| `tb_cfeb_crc15` | CRC against an integer model over random samples; bits above 12 ignored; `clear` |
| `tb_l1a_pipe` | random 0..3 writes and pops against a queue model; count, space, empty, full at 256; flush |
| `tb_lct_pipe` | pushes, single and double pops, pending resolves and drop-when-full against a model |
| `tb_sca_readout` | Gray strip order, 6 BX per conversion, 100 BX per sample, T0 = 16 + 6(n-1), one `take` per cell, release after the last conversion, B-word jobs, back-pressure |
| `tb_cfeb_formatter` | every word of sample frames and B-words, y serialization, CRC, status words, one word per BX |
| `tb_sca_controller` | Gray allocation and NF_SCA 12, 11, 10, 9; case 1 and case 2 locks and their expiry; entries, phases and TRIG_TIME for both cases; DAV; overlap (`x`), TRIG_TIME 0100.0100 and MOVLP; pool exhaustion with lost periods and B-word entries; refill after releases; 16-sample locks and three entries |
| `tb_cfeb_top` | whole design at default parameters against a sample-level reference model (below) |
| `tb_cfeb_rates` | whole design under L1A trains at the CMS rate limits (below) |

`tb_cfeb_top` checks every word of every frame, DAV/MOVLP timing, the T0
latency and the 100 BX per sample. It also counts each mechanism and fails
if any of them never happened:

- the NF_SCA sequence and Gray allocation;
- LCT expiry;
- case 1 and case 2 locks, and pending locks;
- overlapped frames and a doubled TRIG_TIME;
- MOVLP;
- SCA full and B-words;
- 16-sample events;
- two Sync Resets.

`tb_cfeb_rates` runs the whole design under L1A trains drawn at random
within the CMS limits, in 8-sample and then 16-sample mode. The limits are
at most 1 L1A per 75 ns, 2 per 625 ns, 3 per 2.5 us and 4 per 6 us. Extra
LCTs without an L1A arrive on top. The same reference model checks every
frame.

It also checks that:

- both pipeline-full flags stay 0;
- LCT_PIPE_CNT stays within 10;
- isolated events are 1.6 kB (8 samples) or 3.2 kB (16 samples).

A typical run gives:

- 52 events;
- the pool running full for about 4500 BX;
- about 400 B-word groups;
- LCT_PIPE_CNT up to 6;
- L1A_PIPE_CNT up to 12.

To run one with plain verilator, from the top folder (package first):

```
verilator --binary --timing --assert -Wno-fatal rtl/cfeb_pkg.sv \
  rtl/cfeb_crc15.sv rtl/lct_pipe.sv rtl/l1a_pipe.sv rtl/sca_controller.sv \
  rtl/sca_readout.sv rtl/cfeb_formatter.sv rtl/cfeb_top.sv \
  tb/sca_adc_model.sv tb/tb_cfeb_top.sv --top-module tb_cfeb_top -o sim
./obj_dir/sim
```

For a unit testbench, list only the package, the module under test and its
submodules, then the testbench.

## Limits and trust

- **Single BX counter.** The BX counter is 16 bits and periods are tracked
  with a 12-bit tag, so pending work is compared modulo 65536 BX (1.6 ms).
  That is far longer than any lock lives.
- **Capacity.** One L1A can write up to three entries in one cycle. The
  L1A FIFO holds 256 entries. The worst case under CMS trigger rules is 27
  L1As, which is at most 81 entries.
- **What the SCA/ADC model does not cover.** It returns a code computed from
  layer, strip and the time the cell was written. The tests can therefore
  tell exactly which sample was read. It models no analog behaviour and no
  ADC pipeline beyond a fixed delay.
- **Size.** Generic synthesis of `cfeb_top` gives about 3000 word-level
  cells and 1300 flip-flop bits. The L1A FIFO adds 7.4 kbit of memory and
  the formatter's job queue 0.4 kbit. The controller accounts for about 90%
  of the cells.
- **Timing closure.** The design has not been timed for a particular FPGA.
  The controller evaluates all 12 blocks and 8 cells of each in one cycle.
