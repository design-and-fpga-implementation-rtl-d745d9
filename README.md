# DVB 16-QAM pragmatic trellis-coded modem

This is a complete baseband modem for the DVB cable/satellite-style
transmission chain. It sends MPEG-2 transport packets over a 16-QAM channel
protected by two concatenated codes:

- an outer Reed-Solomon RS(204,188) code with a Forney convolutional
  interleaver between it and the inner code;
- an inner *pragmatic* trellis-coded modulation (TCM). It runs at rate 3/4
  (3 bits/symbol) or 7/8 (3.5 bits/symbol).

The pragmatic idea is the main thing to understand. A single, industry-standard
64-state rate-1/2 convolutional code (K = 7, generators 171/133 octal) is
reused for every spectral efficiency:

- It protects only the two least significant bits of each 16-QAM symbol.
  These are the bits that pick a point inside one half of an axis.
- The other two bits of the symbol are left uncoded. They choose the half
  of the axis. Neighbouring points that share a coded bit are two levels
  apart, so the uncoded bits are already well protected by distance.
- The higher rate comes from puncturing the same code, not from designing
  a new trellis code. The receiver therefore needs only one ordinary Viterbi
  decoder, plus a cheap "outboard" decision for the uncoded bits.

The whole modem runs from one clock, the 4x sample clock of the
square-root raised-cosine (SRRC) filters. All slower rates are clock enables
or valid/ready handshakes.

```
 bytes ─► RS(204,188) ─► interleaver ─► P/P ─► P/S ─► conv. encoder ─► puncture+sequencer ─► 16-QAM map ─► SRRC x4 ─► I/Q samples
         rs_encoder     conv_interleaver  └────────────── ptcm_encoder ──────────────────────────────┘  pulse_shaping_filter
                                                                                                                    │ channel (outside)
 bytes ◄─ RS decoder ◄─ deinterleaver ◄─ P/P ◄─ outboard ◄─ re-encode ◄─ Viterbi ◄─ depuncture ◄─ soft dec. ◄─ SRRC+÷4 ◄─┘
         rs_decoder    conv_interleaver  └───────────────────── ptcm_decoder ────────────────────┘ matched_filter
```

The top level is `dvb_modem`. It holds `dvb_transmitter` and `dvb_receiver`
side by side. The channel stays outside, so a testbench or an RF front end
closes the loop. The parameter `RATE` (`RATE_7_8`, the default, or
`RATE_3_4`) selects the inner code for both halves.

## Pragmatic TCM encoder: how the bits are allocated

This is the part that is hardest to follow from code alone.

### Bytes to columns

The parallel-to-parallel (P/P) converter, `pp_converter_tx`, takes a group of
bytes and produces 8 *columns*. Each column holds encoded bits E, which go
through the convolutional code, and non-encoded bits NE. Bit 7 of each byte is
sent first.

| rate | bytes per group | E bits per column | NE bits per column | columns → symbols |
|------|-----------------|-------------------|--------------------|-------------------|
| 3/4  | 3 (A B D)       | E1 = one bit of A | NE2 NE1 = two bits of B, then D | 1 column → 1 symbol |
| 7/8  | 7 (A B D F G H L) | E3 E2 E1 = three bits of the 24 bits of A, F, H | NE4..NE1 = one nibble of B, D, G, L | 1 column → 2 symbols |

At rate 7/8, column 0 is:

- E3 E2 E1 = A7 A6 A5
- NE4..NE1 = B7 B6 B5 B4

Column 7 is:

- E3 E2 E1 = H2 H1 H0
- NE4..NE1 = L3 L2 L1 L0

### Columns to coded bits

A parallel-to-serial stage feeds the E bits of a column to the encoder one per
clock cycle, E3 first. The encoder gives one pair (X, Y) per bit.

### Rate 7/8 puncturing

At rate 7/8 the three pairs (X1,Y1), (X2,Y2), (X3,Y3) are punctured with the
rate-3/4 pattern X: 101, Y: 110. X2 and Y3 are dropped. The four bits that
remain fill the coded positions of two symbols.

Each symbol is {U2, U1, C2, C1}. U1 and C1 go to the I axis; U2 and C2 go to
the Q axis.

| rate | symbol | C1 (I) | C2 (Q) | U1 (I) | U2 (Q) |
|------|--------|--------|--------|--------|--------|
| 3/4  | only   | X1     | Y1     | NE1    | NE2    |
| 7/8  | first  | X1     | Y1     | NE3    | NE4    |
| 7/8  | second | Y2     | X3     | NE1    | NE2    |

### Mapping one axis

`qam_mapper` maps each axis independently:

- (U,C) = (0,0) → +3
- (0,1) → +1
- (1,0) → −1
- (1,1) → −3

The unit is 1/√10, which gives unit average symbol energy. The output is a
12-bit two's complement number with 11 fraction bits (Fix(12,11)):

- +3 → 0x796
- +1 → 0x287
- −1 → 0xD79
- −3 → 0x86A

### Output rate

The encoder emits one symbol per symbol strobe, so the net rate is:

- 8 symbols per 3 bytes at rate 3/4;
- 16 symbols per 7 bytes at rate 7/8.

The byte side is throttled with `rdy`. The RS encoder's 16 parity slots per
codeword also hold back the byte source.

## Pragmatic TCM decoder

`ptcm_decoder` follows the Zehavi–Wolf structure.

1. **Soft decision** (`soft_decision`, one per axis, 3 cycles).
   - The span between each pair of neighbouring points (−3…−1, −1…+1,
     +1…+3) is cut into 8 bins by 7 thresholds, 21 comparators in all.
   - The count of thresholds below the sample gives a 3-bit weight for the
     coded bit. 7 means "surely C = 1" and 0 means "surely C = 0".
   - Outside the outer points the weight saturates.
2. **Depuncture** (`depuncture`).
   - Rate 3/4: each symbol is one decoder step (X = I weight, Y = Q weight).
   - Rate 7/8: two symbols are rebuilt into three steps. X2 and Y3 are
     marked as erasures.
3. **Viterbi** (`viterbi_decoder`).
   - 64 add-compare-select units work in parallel, one trellis step per
     cycle.
   - The branch metric is the distance of the weight from the expected bit.
     Erased positions contribute zero.
   - Path metrics are renormalised by subtracting the minimum every step.
   - Survivors use register exchange of length `DEPTH`. The output is the
     oldest decision of the best state.
   - `DEPTH` is 96 at rate 7/8 and 48 at rate 3/4. The punctured code needs
     the longer depth.
4. **Re-encoding** (`conv_encoder`, the same module as the transmitter's).
   The Viterbi decisions are encoded and punctured again, which rebuilds the
   coded bits C1 and C2 of every received symbol.
5. **Symbol FIFO.**
   - While the Viterbi decoder works, the raw I/Q samples wait in a FIFO of
     `FIFO_DEPTH` = 128 symbols.
   - The FIFO must hold more symbols than the Viterbi latency: DEPTH symbols
     at rate 3/4, 2·DEPTH/3 symbols at rate 7/8.
   - Each re-encoded symbol "token" pops one entry.
6. **Outboard decision** (`outboard_decision`, one per axis, 3 cycles).
   - Once C is known, only two points of the axis remain:
     - C = 1: −3 or +1, so the threshold is −1.
     - C = 0: −1 or +3, so the threshold is +1.
   - Two comparators and a multiplexer give U.
7. **P/P back to bytes** (`pp_converter_rx`).
   - Columns {E, NE} are rebuilt, with the information bits travelling
     alongside their tokens.
   - The converter writes the bits back to their byte positions, which
     inverts the transmit table.

Only one ordinary Viterbi decoder is needed. Errors in the uncoded bits can
happen only when the channel moves a sample by two levels. Those errors are
left to the RS code.

## Pulse shaping and matched filtering

Both filters use the same 29-tap SRRC:

- roll-off 0.35;
- 4 samples per symbol;
- span of 7 symbols.

The taps are symmetric, h[n] = h[28−n]. Their values are half of the
closed-form SRRC impulse response, so the transmit–receive cascade has unit
gain. Rounded to four digits, h[14..28] are:

```
0.5478 0.4786 0.3039 0.1034 -0.0423 -0.0943 -0.0676 -0.0110
0.0286 0.0327 0.0128 -0.0074 -0.0127 -0.0048 0.0048
```

`dvb_pkg` stores these 15 numbers (in units of 1e-4) and rounds them to
Fix(12,11) at elaboration.

- **`pulse_shaping_filter`** (transmitter, polyphase interpolator).
  - An 8-symbol delay line feeds four sub-filters E_k[m] = h[4m+k].
  - After each symbol the four sub-filter outputs leave one per cycle. This
    equals zero-stuffing followed by the full filter, without the wasted
    multiplications.
  - 8 multipliers are shared by the four phases.
  - The output is Fix(12,11), rounded and saturated.
- **`matched_filter`** (receiver, decimator).
  - A 29-sample delay line. The full sum is evaluated only at every 4th
    sample: 4:1 decimation without computing the discarded outputs.
  - The output format is Sfix(12,9) (range ±4), in which the unit level
    1/√10 is 162 LSB.
  - The decimation phase is fixed from reset. The first output is at input
    sample 28, which is the symbol centre when the transmitter's first
    sample is the receiver's first sample.
  - There is no timing, carrier or frame recovery.

## Reed-Solomon code and interleaving

**`rs_encoder`** implements the systematic RS(204,188):

- It is the shortened RS(255,239), with t = 8.
- Field polynomial x⁸+x⁴+x³+x²+1; generator ∏(x+αⁱ) for i = 0…15, α = 02h.
- The generator coefficients are computed in `dvb_pkg` at elaboration, so no
  table is stored.
- The 188 message bytes pass through while a 16-stage GF(256) LFSR divides by
  g(x). The 16 parity bytes follow, and the input ready (`rfd`) is low during
  them.

**`conv_interleaver`** is the Forney convolutional interleaver (I = 12
branches, M = 17). `INVERSE = 1` makes it the deinterleaver.

- All branch FIFOs share one memory of M·I·(I−1)/2 = 1122 bytes. Each branch
  has its own window and circular pointer.
- Cells that have not yet been written read as zero, so the memory needs no
  reset.
- The pair delay is I·(I−1)·M = 2244 bytes, exactly 11 codewords. Codeword
  boundaries therefore survive the pair without a sync search.
- The first 11 codewords out of the receiver are the zero fill of the pair.
  The RS decoder sees them as valid all-zero codewords.

**`rs_decoder`** is a classic three-stage decoder:

1. Syndromes are computed by Horner's rule while the codeword arrives. The
   bytes go into one of two frame buffers.
2. Berlekamp–Massey takes 16 iterations, one per cycle. It is followed by the
   evaluator Ω(x).
3. A Chien search with Forney's formula streams out the corrected bytes, one
   per cycle.

Interface and timing:

- The latency from the last input byte to the first corrected byte is 20
  cycles.
- Input may arrive at most every 2 cycles. The modem delivers far slower. An
  assertion flags a violation.
- Outputs:
  - `info` marks message bytes;
  - `corrected` pulses on a changed byte;
  - `fail` pulses at the end of a codeword whose error count exceeded 8. Such
    a codeword is detected when the number of locator roots differs from the
    locator's degree.

## Clocking and flow control

`clk_driver` makes clock-enable strobes from a single clock. The modem uses
one strobe, the symbol strobe every 4 cycles.

Transmitter:

- It releases one symbol per strobe into the pulse-shaping filter, which
  gives one sample per cycle.
- Everything upstream is paced by valid/ready:
  - RS encoder;
  - interleaver;
  - P/P converter;
  - sequencer.
- The source sees `tx_rdy` and must hold a byte until it is taken.
- Net input rates:
  - rate 7/8: 7 bytes per 64 cycles;
  - rate 3/4: 3 bytes per 32 cycles.
  - 188/204 of each is payload.

Receiver:

- It never stalls. Every block after the matched filters keeps up with one
  symbol per 4 cycles.

## Where this design departs from the source description

- **Clocking.** The original design uses several clock-enable ratios per
  block and, at rate 7/8, a dual-rate arrangement. This design has one clock,
  one symbol strobe and valid/ready handshakes. Both rates emit one symbol at
  a time on a single I/Q pair; the original 7/8 encoder presents a symbol pair
  side by side. As a result, the encoder latencies quoted for the original
  (34 and 241 system clocks) do not apply here. The soft-decision and
  outboard-decision pipelines do keep the 3-cycle latency of the original.
- **Vendor cores replaced.** The original takes the Viterbi decoder and the
  RS decoder from a vendor library and gives only their function and pins.
  Both are written out here in textbook form. The Viterbi traceback length
  was not given; 96/48 is this design's choice.
- **Clock primitives.** The digital clock manager and global clock
  multiplexer of the original FPGA implementation are vendor primitives.
  They are not part of this RTL; use your device's equivalents to generate
  the single clock.
- **Tap value.** The tap h[12] = h[16] = 0.3039 follows the closed-form SRRC.
  A value ten times smaller would not fit the curve.
- **Interleaver depth.** M = 17 follows N/I = 204/12, as the DVB standard
  fixes it.
- **Soft-decision bins.** The thresholds are spread evenly across each span.
  That is this design's reading of the 21-threshold structure.
- **Byte grouping.** The P/P converter takes the first byte after reset as
  byte A of a group. After that it groups bytes continuously.
  - At rate 3/4 a codeword is 68 groups of 3 bytes, so every sync byte
    falls on A.
  - At rate 7/8 (204 = 29·7 + 1) the sync byte lands on A only every
    seventh codeword. The receiver groups bytes the same way, so this
    does not affect the data.
- **Filter latencies.** The pulse-shaping filter outputs a symbol's first
  sample one cycle after taking it. The matched filter outputs its first
  symbol after 29 samples. The original design's filter latencies, which
  depend on the rate, do not apply.
- **Not modelled.** The design has no synchronisation:
  - no sync-byte search or inversion;
  - no symbol timing recovery;
  - no carrier recovery;
  - no energy-dispersal scrambler.
  The receiver assumes its first sample is the transmitter's first sample.
- **Throughput.** At the default rate the modem carries 0.806 useful bits per
  clock at 7/8 (0.691 at 3/4). A 27.8 Mbit/s transport stream therefore needs
  a clock of about 34.5 MHz. No timing closure has been done.
- **Remaining lint warnings.** The remaining unused-signal warnings are
  deliberate. Examples:
  - the Q `vout` that duplicates the I one;
  - the punctured coded bits that the sequencer receives but never sends;
  - the upper bits of an index in a package function.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the block
with an independent reference model written in the testbench:

- GF(256) arithmetic from log tables;
- queue-based interleaver models;
- a bit-level reference of the TCM bit allocation (`ptcm_ref.svh`);
- the closed-form SRRC (`srrc_ref.svh`).

Each testbench ends by printing `TB_RESULT checks=N failures=M`. The main
end-to-end tests are:

- **`tb_dvb_modem`** runs the top at its default parameters (rate 7/8) and a
  rate-3/4 instance in parallel. Both are looped back through a channel with
  small noise and periodic impulse bursts (`modem_harness`). The test checks
  every delivered byte. It also requires that each mechanism happened at least
  once:
  - RS parity stalls;
  - RS corrections;
  - Viterbi corrections;
  - depuncture erasures.
- **`tb_dvb_modem_full`** is the same test with only the default modem (no
  parameter overrides at all).
- **`tb_modem_100k`** is the same setup with 100,000 random bytes per rate,
  about 1.3 million cycles. It delivers all of them correctly, with a few
  hundred RS corrections along the way.
- **`tb_modem_ber`** adds white Gaussian noise at the specified operating
  points: Eb/N0 = 9.0 dB at rate 3/4 and 10.7 dB at 7/8, where the bit error
  rate before RS should be at most 2e-4. It also runs at those points less
  the implementation margins (7.5 and 8.6 dB). Over 200 packets per point,
  every output byte is correct.
  - At the specified points, byte errors before RS are 139 ppm (3/4) and
    0 (7/8).
  - Without the margins they are 1302 and 581 ppm.
- **`tb_rs_decoder`** checks exact correction of 0–8 byte errors, detection of
  10 and 16 errors, and the 20-cycle latency.
- **`tb_viterbi_decoder`** checks correction of sparse error patterns, with
  and without erasures.

To simulate with plain Verilator (5.x), from the top of the tree:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
    rtl/dvb_pkg.sv tb/tb_dvb_modem.sv --top-module tb_dvb_modem
./obj_dir/Vtb_dvb_modem
```

Verilator finds the other modules through the `-I` search paths. Only the
package has to be named, and it must come first. Replace `tb_dvb_modem` to
run another testbench. The build takes about 20 seconds.

The default-parameter modem test takes a few seconds; the 100k test about a
quarter of a minute.

## Files

| file | block |
|------|-------|
| `dvb_pkg.sv` | types, GF(256) helpers, code generators, QAM levels, SRRC taps |
| `dvb_modem.sv`, `dvb_transmitter.sv`, `dvb_receiver.sv` | top and the two halves |
| `rs_encoder.sv`, `rs_decoder.sv` | outer code |
| `conv_interleaver.sv` | interleaver / deinterleaver |
| `ptcm_encoder.sv`, `pp_converter_tx.sv`, `conv_encoder.sv`, `symbol_sequencer.sv`, `qam_mapper.sv` | TCM encoder |
| `ptcm_decoder.sv`, `soft_decision.sv`, `depuncture.sv`, `viterbi_decoder.sv`, `outboard_decision.sv`, `pp_converter_rx.sv` | TCM decoder |
| `pulse_shaping_filter.sv`, `matched_filter.sv` | SRRC filters |
| `clk_driver.sv` | clock-enable generator |
