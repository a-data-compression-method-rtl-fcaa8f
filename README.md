# AFT codec: adaptive binary arithmetic coding with a fuzzy-tuned modeler

This is a lossless bit-stream compressor/decompressor for hardware, and it
needs no divider. A binary arithmetic coder codes each bit with p(0|s), the
probability that the bit is 0 given s, the last `ORDER` bits (an order-16
fixed-context model by default).

The probabilities come from the AFTM, the adaptive fuzzy-tuning modeler. It
does no arithmetic on counts. Each state keeps a pointer into a 128-entry
probability table, and after every coded bit the pointer moves by an offset
read from a precomputed table. The size of that move is called the tuning
step. Fuzzy inference over the state's recent history picks one of five
steps (8, 24, 32, 40, 64). Sigma divides the state's counts in the update
rule, so a large step makes each new bit weigh more: the probability moves
further per bit. The coder's output goes through a K-bit buffer with bit
stuffing. That buffer absorbs carries and also gives the stream its
end-of-data mark.

The same hardware decodes. In decoding mode the coder recovers each bit and
feeds it to the same modeler, so both ends see identical probabilities.
Host I/O crosses into the codec clock through asynchronous FIFOs, so
transfers and coding overlap.

The intended rate is 12 Mbit/s at 50 MHz, which allows 4.17 cycles per bit.
This implementation takes about 2.3 cycles per bit on incompressible data,
and less on data that compresses well.

## Block structure

```
 host_clk domain          |                 clk domain
 hin_*  --> async_fifo ---+--> bac_encoder --(stuff_buffer)--+
                          |    bac_decoder <--(destuffer)    +--> async_fifo --> hout_*
                          |          ^   | p(0|s), upd/bit
                          |          |   v
                          |         aftm: context_reg, adr_table, state_queue_mem,
                          |               activity_eval, fuzzy_step_rom, ost_rom, prb_rom
```

| file | role |
|---|---|
| `aft_pkg.sv` | sizes, types and the functions that compute every table at elaboration |
| `aft_codec.sv` | top: mode/start control, one modeler shared by encoder and decoder, the two FIFOs |
| `aftm.sv` | modeler: initialises, reads and updates the per-state tables |
| `context_reg.sv` | the last ORDER coded bits, i.e. the state s |
| `adr_table.sv` | 2^ORDER × 7-bit pointers into Prb (Adr) |
| `state_queue_mem.sv` | 2^ORDER × 10-bit history queue per state |
| `activity_eval.sv` | switching and repeating activity of a queue |
| `fuzzy_step_rom.sv` | (sa, ra) → tuning step, 10×10 table |
| `prb_rom.sv` | 128 probabilities, 8 bits (units of 1/256) |
| `ost_rom.sv` | 5 steps × {Ost0, Ost1} × 128 signed offsets, and the two multiplexers |
| `prob_multiplier.sv` | floor(A · p / 256) |
| `bac_encoder.sv`, `stuff_buffer.sv` | encoder and its output buffer R |
| `bac_decoder.sv`, `destuffer.sv` | decoder and its input side |
| `async_fifo.sv` | dual-clock FIFO with gray-code pointers |

## The modeler (AFTM)

For state s the probability is `p(0|s) = Prb[Adr[s]]`. After bit b is coded
under s:

```
Adr[s]   <= Adr[s] + Ost{b}_sigma[Adr[s]]
queue[s] <= {queue[s][8:0], b}
s        <= {s[ORDER-2:0], b}
```

The step sigma is chosen from `queue[s]` as it was before b entered it.

**Timing.** After `rst_n` or `clear`, the modeler writes every Adr word with
the index nearest p = 1/2 and every queue with zeros. This takes one cycle
per state: 65,536 cycles at order 16. After that it runs a two-cycle loop:
- one cycle reads Adr[s] and queue[s];
- p_valid is then high until the coder pulses `upd`, which writes both words
  and shifts the context.

**Prb table.** This is a strictly increasing table of 128 values from 1/256
to 255/256. Entries 0, 60, 61, 62 and 127 are fixed at 1, 107, 110, 114 and
255. The entries in between are linear interpolation, which is this
design's choice:
`Prb[i] = 1 + (106i+30)/60` for i ≤ 60, `110` for i = 61, and
`114 + (141(i-62)+32)/65` above.

**Offset tables.** The underlying update rule, with c0/cN the estimated
probability p and sigma the step, is:

```
p' = (c0/sigma + 1) / (cN/sigma + 1)   after a 0
p' = (c0/sigma)     / (cN/sigma + 1)   after a 1
```

A table indexed only by the current Prb index cannot see the counts.
This design therefore fixes `cN = OST_NORM = 192`:
- it computes p' = (p·192/sigma + [b=0]) / (192/sigma + 1);
- it takes the Prb index nearest to p';
- it stores the difference of indices.

192 was fitted to the few published offsets. It reproduces their trend
(offsets grow with sigma, Ost1 mirrors Ost0), but not their values. Ost0
at entry 0 comes out 6/16/21/25/36 for the five steps, against the
published 8/18/24/28/30. In the middle of the table the offsets are two to
four times larger than the published ones (Ost0 at entry 61: 2/7/9/11/16
against 1/3/3/3/4), most likely because the interpolated Prb table is
coarser there than the real one. The tables are built in `aft_pkg::ost_value`. Every update keeps
the pointer inside 0..127, and an assertion in `aftm` checks this.

**Fuzzy step selection.** There are two inputs:
- **sa** (0..9): the number of transitions between neighbouring bits of the
  queue;
- **ra** (1..10): the length of the run of identical bits ending at the
  newest bit.

Each input has five triangular/trapezoidal terms S, MS, M, MB, B (`mu_sa`,
`mu_ra`). A 5×5 rule base (`fz_rule`) maps (ra, sa) to an output term over
sigma. The crisp step comes from max-min inference and the centre of
gravity over integer sigma 0..60. It is then quantised to the five steps
with thresholds at 15, 25, 40 and 51. The boundary at 40 is fixed by the
published step regions. The other three are this design's choice, each
placed inside the interval where the regions meet. The last one is kept
below 52.2, the largest value the centroid can reach, so that step 64
remains reachable. All of this runs at elaboration; the hardware is a 100-entry ROM.
Selected rows of the resulting table:

```
        sa = 0  1  2  3  4  5  6  7  8  9
ra= 1:      64 40 40 32 32 24  8  8  8  8
ra= 4:      64 40 40 32 32 32 24  8  8  8
ra= 6:      64 40 40 32 32 32 24 24 24 24
ra= 8:      64 40 40 40 40 32 32 32 32 32
ra=10:      64 64 64 64 64 40 40 32 32 32
```

Few transitions, or long runs, give large steps: the probability follows
the source quickly (at index 0, one 0 moves the pointer by 6 entries with
step 8 and by 36 with step 64). A busy history gives small steps, so the
probability changes in small moves and averages over the noise.

## The coder

**Encoder** (`bac_encoder`). The encoder keeps the interval width A (W = 16
bits, kept at A ≥ 2^15) and the low end C. For each bit:
- it computes `a0 = floor(A·p/256)`;
- a 0 keeps the lower part: `A = a0`;
- a 1 takes the upper part: `C += a0`, `A -= a0`.

A carry out of C goes to the buffer R. Normalisation shifts A and C left one
bit per cycle until A ≥ 2^15. The top bit of C enters R on each shift.

**Output buffer R and bit stuffing** (`stuff_buffer`). R is K bits long (K =
16). A carry is added into R, so it can never reach bits already sent. To
make that always true, the buffer inserts two stuffed bits "00" after every
K consecutive data ones. If a later carry runs into them, it turns the
second stuffed bit into 1 and stops there; the first stuffed bit is always
0.

The buffer keeps three pieces of state beside R:
- a mask S marking which bits of R are stuffed;
- a mask V marking which bits of R hold valid data;
- a count of data ones already transmitted, so it also sees runs that began
  before the bits now in R.

A carry can also complete a run of K ones that ends above the bit it
flipped. That happens when the bits below the run all became 0. In that
case the two zeros right after the run are relabelled as the stuffed pair,
and two data zeros are appended. The transmitted data does not change, and
the decoder rule stays simple. This relabelling is this design's own
solution.

**Termination.** A 1 can never follow K data ones in the stream, so K data
ones followed by a 1 mark the end. After the last input bit the encoder
sends, in order:
1. all W bits of C;
2. a data 0, so that final data ones cannot merge with the mark;
3. K ones, then a 1 in the first stuffed position;
4. a 9-bit count, MSB first;
5. 2K+2 zeros of padding. `out_last` flags the last bit sent.

The count is the number of final input bits whose coding needed no
normalisation shift. Such bits add nothing to the stream, so without the
count the decoder could not know how many of them follow the last data bit.
A shrinks by at least A/256 per bit, so there are at most 256 of them. The
flush, the leading 0, the count and the padding are this design's additions.

**Decoder** (`bac_decoder`, `destuffer`). The destuffer keeps a look-ahead
window of K+2+9 bits. It hands out data bits one at a time, with these
rules:
- After K data ones, "00" is dropped.
- "01" is dropped, and the K-th one is delivered with a carry flag; the
  decoder adds 1 at the LSB of D.
- 0, K ones, 1 at a bit boundary is the end mark; the count follows it.

The decoder holds `D = code − low` and A. For each bit:
- if `D < a0` the bit is 0 and `A = a0`;
- otherwise the bit is 1, `D -= a0` and `A -= a0`.

It then shifts in new data bits while normalising. At the mark it decodes
`count` more bits, which need no input, then discards the stream up to
`in_last`. Each output bit is held back one step so that the final one can
carry `out_last`.

## Top level (`aft_codec`)

| port | meaning |
|---|---|
| `clk`, `rst_n` | codec clock and reset (active low) |
| `host_clk`, `host_rst_n` | host clock and reset (assert both resets together) |
| `mode`, `start` | `mode` is sampled on a one-cycle `start`: 0 encode, 1 decode; start also re-initialises the model |
| `model_ready`, `done` | model initialised; run finished (output complete) |
| `hin_valid/hin_bit/hin_last/hin_ready` | host input: data bits to encode, or the code stream to decode |
| `hout_valid/hout_bit/hout_last/hout_ready` | host output, with the last bit flagged |
| `ev_coded`, `ev_step` | one bit coded, and the step used (0..4 = 8, 24, 32, 40, 64) |
| `ev_carry`, `ev_stuff`, `ev_relabel`, `ev_end` | carry, stuffing, relabelled stuffing, end mark found |

Parameters and their defaults: `ORDER` = 16, `W` = 16, `K` = 16,
`FIFO_AW` = 4 (16-entry FIFOs).

At order 16 the model memory is 2^16 × (7 + 10) = 1,114,112 bits. The model
is per-stream only: it starts fresh on every `start`, and there is no limit
on stream length. Order 10 (`ORDER=10`) needs 17,408 bits.

## Departures from the original method and limits

- The Prb values between the five fixed entries are interpolated. The
  offset tables use a fixed count normaliser (192), so they approximate
  rather than reproduce the reference offsets. Compression therefore
  differs somewhat from the published results.
- The mapping of the defuzzified value to the five steps is this design's
  choice, as is the choice of σ from the queue before the current bit.
- Termination adds a flush of C, a leading 0, a 9-bit count and padding to
  the "K+1 ones" mark.
- The area-reduced multiplier of the original is replaced by a plain W×8
  product.
- Full scan is not in the RTL; it is left to scan insertion.
- Compression is behind the ideal. A source with 6 % ones has an entropy of
  0.33 bit/bit, but codes to about 0.45-0.46 bit/bit over 6,000-12,000
  bits at order 8 and at order 16. The causes are learning time and the
  approximate tables.

## Simulation

Every testbench is self-checking and ends with
`TB_RESULT checks=<n> failures=<n>`. Example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal -Irtl \
          rtl/aft_pkg.sv tb/tb_aft_codec.sv --top-module tb_aft_codec -o sim
./obj_dir/sim
```

`--timescale` gives the RTL modules the testbenches' time unit.
`-Wno-fatal` keeps the remaining lint warnings from stopping the build:
- unused observation outputs;
- the low product bits that the multiplier drops.

Testbenches:

- `tb_aft_codec` is the end-to-end test at ORDER 8 and K 4:
  - it uses four sources: biased, Markov, periodic and random;
  - it encodes, decodes and compares every bit;
  - it requires that carries, stuffing, relabelling, decoder carries, end
    marks, all five steps and output stalls each occurred;
  - it checks ≤ 50/12 cycles per bit.
- `tb_aft_codec_full` runs the defaults (order 16, K 16) on three sources.
  It checks the model clear time and the round trip, in about 10 s.
- `tb_aft_workloads` runs the defaults on 10,000-byte synthetic text, image
  and binary data generated in the testbench. It checks the round trip and
  prints the saving, which was 72 %, 26 % and 72 % in one run. These
  stand-ins are far more regular than real files, so the figures say
  nothing about real compression ratios.
- The block testbenches are:
  - `tb_aftm` checks against a software model of the tables;
  - `tb_stuff_buffer`, `tb_bac_encoder` and `tb_destuffer` check against
    software coders or destuffers;
  - `tb_bac_decoder` feeds it streams from the encoder;
  - the tests of the ROM tables check them against real-arithmetic
    references;
  - the memories, the context register and the FIFO have tests of their
    own.
