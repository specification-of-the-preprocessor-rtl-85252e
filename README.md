# PPrASIC — a two-channel PreProcessor for a calorimeter trigger

The ATLAS Level-1 calorimeter trigger receives analogue sums from about
7000 calorimeter trigger towers. Each tower is digitised by a 10-bit flash
ADC at the 40 MHz LHC bunch-crossing rate. Before the cluster and jet
processors can use these samples, three jobs must be done:
- find out which bunch crossing a pulse belongs to (bunch-crossing
  identification, BCID);
- turn the pulse into a calibrated 8-bit transverse energy;
- pack the results onto as few serial links as possible.

The PreProcessor ASIC does this for two towers (channels A and B) per chip.
It also keeps enough history of every channel to show, after a Level-1
Accept, what the trigger saw.

This repository is a synthesizable SystemVerilog model of that chip:

```
FADC-A ─► latch ─► [playback mux] ─► FIFO ─┬─► FIR ─► peak finder ─┐
                                           ├─► saturated BCID ──────┼─► BCID decision ─► 8-bit result A ─┐
                                           ├─► ext. BCID edge ──────┘        ▲                           │
                                           │                  LUT (1024x8) ──┘                           ├─► BC-mux ─► ToCP[9:0]
                                           ├─► rate meter / histogram                                    ├─► Add ─► ADD4 ─► ToJP[9:0]
                                           └─► FADC scrolling memory ─► derandomizer ─┐                  │     ▲      └──► CellSumOut
                       result + BCID bits ─► LUT scrolling memory ─► derandomizer ───┤   CellSumIn ─────┘
FADC-B ─► (same channel) ──────────────────────────────────────────────────────────┤  8-bit result B ──┘
TTC: L1Accept, BcCntRes, EvCntRes, Reset, Sync ─► L1 protocol logic                ▼
Serial: SerClk, Frame, SerIn, SerDaisyIn ─► serial interface ◄─► config / readout multiplexer ─► SerOut, SerDaisyOut
```

Everything runs on the LHC clock except the serial shift registers, which
run on their own serial clock.

## One channel, sample by sample

**Input latch.** The FADC strobe can have any phase relative to the LHC
clock. The latch therefore samples the 10 data bits and the external-BCID
bit on the rising or the falling edge, chosen per channel. A falling-edge
sample is re-registered on the next rising edge, so everything after the
latch works on the rising edge only.

**Playback multiplexer.** In playback mode the channel's 256 × 11 playback
memory replaces the FADC right here, before the alignment FIFO. Everything
downstream then runs on known data (see *Playback, histogram and rate
meter*).

**Alignment FIFO.** Cables of different length make the same crossing
arrive at different times on different channels. A 16-stage shift register
with a programmable tap (delay = depth + 1 clocks) lines them up. The
external-BCID bit has its own tap, so a discriminator with a different
latency can be aligned on its own.

**FIR filter and peak finder (mechanism A).** A 5-tap filter weights five
consecutive samples with 4-bit coefficients:
- coefficients 1 and 5 are signed (−8…+7);
- coefficients 2–4 are unsigned (0…15).

The 17-bit sum is clipped at zero. The peak finder marks sum *n* when
sum(n−1) < sum(n) ≥ sum(n+1). On a flat top this favours the earlier
crossing. The comparison uses all 17 bits.

**Truncation and LUT.** The peak finder sees the full sum. In parallel, a
programmable 10-bit field (lowest bit 0…7) is cut out of the sum and used
as the address of a 1024 × 8 lookup table, which does pedestal subtraction,
calibration and noise cuts. If any bit above the field is set, the address
saturates and an overflow flag is raised.

After reset the LUT fills itself, one word per clock, with LUT[a] = a >> 2.
This is the same 10-to-8-bit conversion the by-pass mode uses, so the chip
works before any calibration is loaded. The fill takes 1024 clocks;
software writes that arrive during the fill are ignored.

**Saturated-pulse BCID (mechanism B).** A saturated pulse has a flat top at
0x3FF, so the peak finder cannot place it. The analogue chain guarantees at
least two samples on every rising edge. For the first saturated sample *n*
the rule is:
- if sample *n−1* is above a programmable threshold, *n−1* is the crossing
  (a fast edge);
- otherwise *n* is the crossing (a slow edge).

**External BCID (mechanism C).** A discriminator on the multi-chip module
can deliver its own decision as bit 10 of the input word. A rising
transition of that bit marks the crossing.

**BCID decision.** The 10-bit field selects one of three disjoint energy
intervals, split by two programmable bounds; an overflow counts as the top
interval. Each interval has a 3-bit mask {C, B, A} saying which mechanisms
may identify a crossing there. If an allowed mechanism fires:
- the result is the LUT value;
- or 0xFF when the field overflowed or the raw sample was saturated.

Otherwise the result is 0. The crossing after any non-zero result is always
forced to 0; the BC-mux below relies on this.

After reset the mask is A for the low and medium intervals and B for the
high one, with the bounds at 0 and 0x3FF.

The two sample-based marks (B and C) are delayed inside the channel so that
they line up with the peak finder. With the latch on the rising edge, the
8-bit result for a sample is valid **8 clocks after the edge that latches
it, plus the programmed FIFO depth**.

## BC multiplexing to the Cluster Processor

Because every non-zero result is followed by a zero, each channel has at
most one non-zero value in any pair of crossings (2k, 2k+1). The two
channels therefore share one 10-bit link, `ToCP = {odd parity, flag,
data[7:0]}`:
- the first frame of a pair carries channel A's value;
- the second frame carries channel B's value;
- the flag tells the receiver whether the value belongs to the even or the
  odd crossing of the pair.

The pairs are aligned to bit 0 of the on-chip bunch counter.

In **by-pass mode** (a chip-wide register), the data path is simplified so
that raw samples can be sent straight out to check the serial links:
- the FIR uses trivial coefficients (0,0,1,0,0) and LSB 0;
- the LUT is replaced by dropping the 2 LSBs;
- only the selected channel is sent, every crossing, with the flag set to
  the channel number (0 = A, 1 = B).

## Jet-cell sums for the Jet/Et Processor

The first adder sums the two 8-bit results into a 9-bit half jet-cell,
`CellSumOut`, which goes to the neighbouring chip on the module. If either
input is 0xFF, the half cell is 0x1FF.

The second adder (ADD4) adds the neighbour's half, `CellSumIn`:
- the sum is limited to 0x1FF;
- the result is 0x1FF when either half is 0x1FF.

The result goes out as `ToJP = {odd parity, sum[8:0]}`. ADD4 is used on
every second chip only. When it is by-passed (the reset state), `ToJP`
carries this chip's own half cell.

## Playback, histogram and rate meter

The 256 × 11 memory per channel has two uses.

- **Playback** (playback mode, run bit set). A TTC `Sync` starts the memory
  rolling into the channel, one word per clock. After each pass a 16-bit
  count of empty (zero) slices is inserted, so the Level-1 rate caused by
  playback data can be held down. Clearing the run bit stops playback at
  once; the next `Sync` restarts it from word 0.
- **Histogram** (DAQ mode, histogram enabled). Each FADC sample above a
  7-bit threshold, in a programmable bunch-number range, increments a
  10-bit bin. The bin is the sample shifted right by 0, 1 or 2, so the 256
  bins cover a quarter, a half or the whole FADC range. Filling stops for
  good once any bin reaches 0x3FF, and resumes after software writes the
  memory. The memory is not cleared by reset: write zeros before enabling
  a histogram.

The **rate meter** counts the clocks in which the FADC sample is above a
10-bit threshold. The interval is a 10-bit number of 25 µs ticks (the LHC
clock divided by 1000). At the end of each interval, the count (20 bits,
saturating) and the interval length are latched for readback. A new
interval starts after a soft reset or when the interval register is
changed.

## Readout after a Level-1 Accept

Each channel keeps two 128 × 11 **scrolling memories**, written every
clock:
- one with the aligned FADC sample (10 bits + external-BCID bit);
- one with {3 BCID mark bits, 8-bit result}.

The trigger latency is fixed, so the crossing of interest sits a fixed
number of locations behind the write pointer. On an accept, a copy engine
takes `n` samples centred `offset` locations behind the write pointer
(start = wp − 1 − offset − (n−1)/2). It copies them, one per clock, into a
64 × 11 **derandomizer** (first-word-fall-through FIFO), then records the
word count in a small descriptor queue.

Up to four accepts can wait for the copy engine. An 8-bit **prescaler**
keeps the raw FADC samples of only one accept in `prescale + 1`. The others
are stored as empty events, so both readout streams stay in step.

A word that finds the derandomizer full is lost and sets a sticky overflow
status bit. The soft `Reset` pin clears both memories' queues.

Offsets for a centred window, for a FIFO depth *d*:
- raw window: FADC offset = (accept pin clock − peak-sample pin clock) − 3 − *d*;
- LUT window: LUT offset = (accept pin clock − peak-sample pin clock) − 10 − *d*.

The end-to-end testbench uses 19 and 12 with the accept 22 clocks after the
peak.

## Serial interface and the word stream

**Physical layer.** Six pins: SerClk, Frame, SerIn, SerOut, SerDaisyIn and
SerDaisyOut. All words are 13 bits, sent MSB first. Frame is high during
the first bit of a word. At that edge:
- the word just shifted in moves to the input register;
- the next output word is loaded into the output shift register.

Between frames the output register shifts in `SerDaisyIn`, and `SerDaisyOut`
repeats the input stream. Two chips can therefore be chained, with Frame
given once every 26 bits. A toggle synchronizer moves each received word
into the LHC-clock domain. The two clocks may be unrelated; the core needs
only a few LHC clocks per word.

**Commands** (`{flags[1:0], data[10:0]}`):

| flags | meaning |
|-------|---------|
| 00 | no operation (idle line) |
| 10 | control: `data[10]=0` selects target `{channel = data[4], space = data[3:0]}`; `data[10]=1` sets the index to `data[9:0]` |
| 01 | write `data` to target[index], then index + 1 |
| 11 | read target[index] into the readback buffer, then index + 1 |

**Spaces:**
- 0 — channel registers;
- 1 — LUT (write only);
- 2 — playback/histogram memory;
- 3 — chip-wide registers: 0 = ADD4 active, 1 = {by-pass channel, by-pass enable};
- 4 — status, read only: rate count low/high, rate interval, {LUT fill busy, readout overflow, histogram full}.

Because the index auto-increments, a whole memory loads as one control pair
followed by a run of data words.

**Channel registers:**

| idx | contents | idx | contents |
|-----|----------|-----|----------|
| 0 | {playback mode, latch on rising edge} | 12 | raw samples per event (0–63) |
| 1 | {ext-BCID depth[9:5], FADC depth[4:0]} | 13 | LUT-memory offset |
| 2 | {c2[7:4], c1[3:0]} | 14 | LUT samples per event |
| 3 | {c4, c3} | 15 | raw prescale |
| 4 | {LUT field LSB[6:4], c5[3:0]} | 16 | {hist enable[10], binning[9:8], hist threshold[7:1], playback run[0]} |
| 5 / 7 / 9 | BCID mask low / medium / high | 17 / 18 | empty slices, low 11 / high 5 bits |
| 6 / 8 | bound low / medium (10 bit) | 19 / 20 / 21 | histogram bunch range low / high (11 LSBs), {high, low} MSBs |
| 10 | saturated-BCID threshold | 22 / 23 | rate threshold / interval |
| 11 | FADC-memory offset | | |

Binning codes: 0 = full range, 1 = half, 2 = quarter.

**Output stream.** Words leave in a fixed, repeating sequence:
1. one readback word:
   - `01` + data when a read is pending;
   - otherwise `00` + status bits;
2. channel A: a header `10` + {valid, 10-bit event number}, then
   `lut_nsamp` LUT words and `fadc_nsamp` raw words, all flagged `11`;
3. channel B: the same.

A sequence carries an event only when both channels have it completely in
their derandomizers. Otherwise the header's valid bit is 0 and the data
words are zero. The event number counts the events sent and is cleared by
`EvCntRes`.

With five raw samples, one LUT sample and a 40 MHz serial clock, a sequence
is 15 words = 195 bits = 4.875 µs. That is under the 10 µs available per
event at a 100 kHz accept rate.

## TTC signals

`L1Accept`, `BcCntRes`, `EvCntRes`, `Reset` (soft reset) and `Sync` are
registered once on entry. A 12-bit bunch counter is cleared by `BcCntRes`
and wraps after 3564 crossings. It drives the histogram bunch range and the
BC-mux pairing. `rst_n` is a separate power-on reset.

## How closely this follows the specification

**Taken directly from the specification:**
- the block structure and the 11-bit internal path;
- the FIR with signed outer coefficients and a 17-bit sum;
- the 10-bit field into a 1024 × 8 LUT with a linear power-up table;
- the three BCID mechanisms with 3-bit masks per interval and two bounds;
- 0xFF and 0x1FF as the only saturation codes;
- a forced zero after each non-zero result;
- the by-pass mode and its channel flag;
- the two-stage jet adder with the 0x1FF limit;
- odd parity on both outputs;
- the sizes 16 (FIFO), 256 × 11 (playback), 128 × 11 (scrolling), 64 × 11
  (derandomizer) and 1024 × 8 (LUT);
- the 16-bit empty-slice and 8-bit prescale counters;
- the 25 µs rate-meter unit;
- 13-bit serial words with Frame and daisy chain;
- the header/data flag scheme of the readout stream;
- the register fields and widths of the register table.

**Filled in by this design** (the specification states the function only):
- the saturated-BCID rule and its threshold register;
- the even/odd pairing and flag meaning of the BC-mux;
- the command format and register numbering;
- the header contents and event counter;
- clipping of negative FIR sums and of out-of-range FIFO depths (depths
  above 15 behave as 15);
- the 7-bit histogram threshold (the register table gives 6 bits but a
  range up to 0x7F);
- a memory write winning over a histogram fill in the same clock;
- the descriptor queues;
- ADD4 by-passed after reset.

**Resolved conflicts:**
- The peak condition is written as a maximum (≥ the next sum), as the
  description of a "maximum out of three" requires.
- ADD4 limits its sum to 0x1FF rather than dropping an LSB.
- The rate meter counts samples above threshold. It does not integrate
  their values.

**Not implemented:**
- the JTAG boundary/internal scan (inserted by a scan flow, not described);
- the analogue parts of the multi-chip module: FADC, discriminator, timer,
  DAC and link serializer;
- reading the whole 128-location scrolling memory in one event. The
  sample-count register reaches 63 and the derandomizer holds 64 words.

## Files

`rtl/` (one module per file; `ppr_pkg.sv` holds widths, codes and the
per-channel configuration struct):

| file | block |
|------|-------|
| `ppr_asic.sv` | top: two channels, L1 logic, serial interface, configuration, readout multiplexer, BC-mux, jet adder |
| `ppr_channel.sv` | one channel |
| `ppr_input_latch.sv`, `ppr_align_fifo.sv` | input latch, alignment FIFO |
| `ppr_fir.sv`, `ppr_peak_finder.sv`, `ppr_sat_bcid.sv`, `ppr_lut.sv`, `ppr_bcid_decision.sv` | BCID path |
| `ppr_pb_histo_mem.sv`, `ppr_rate_meter.sv` | playback / histogram memory, rate meter |
| `ppr_scroll_mem.sv`, `ppr_derand_fifo.sv`, `ppr_readout.sv` | readout memories and copy engine |
| `ppr_bcmux.sv`, `ppr_jet_adder.sv`, `ppr_odd_parity.sv` | real-time outputs |
| `ppr_l1_protocol.sv`, `ppr_serial_if.sv`, `ppr_config.sv`, `ppr_frame_mux.sv` | control and readout interface |

`tb/` holds:
- one self-checking testbench per module, `tb_<module>.sv`;
- `tb_util.svh`, the check macros.

Each testbench prints `TB_RESULT checks=N failures=M`.

`tb_ppr_asic.sv` runs the whole chip at its default sizes, using only its
pins:
- it configures the chip and loads LUT and playback data through the serial
  port;
- it sends pulses that exercise each BCID mechanism, overflow, ADD4, BC-mux
  pairing, by-pass, playback, histogramming, the rate meter, prescaled
  readout and the soft reset;
- it plays a full playback memory of 25 pulses (five samples and five empty
  slices each) twice and expects exactly 25 identified crossings per pass;
- it checks that every output sequence is 15 words (195 serial bits, the
  length of one event with five raw samples);
- it decodes the serial output stream;
- it fails if any of these mechanisms never occurred.

## Simulating

With Verilator 5 (run from the repository root; testbenches include
`tb/tb_util.svh`):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_ppr_asic -y rtl -y tb +libext+.sv -Irtl -I. \
  rtl/ppr_pkg.sv tb/tb_ppr_asic.sv
./obj_dir/Vtb_ppr_asic
```

Replace `tb_ppr_asic` with any other `tb_*` to test one block. The full-chip
test simulates about 370 µs of chip time in well under a second.

The memories:
- are plain arrays (LUT, playback, scrolling and derandomizer memories)
  that a synthesis tool can map to RAM macros;
- are not reset, except the LUT, which fills itself after reset.
