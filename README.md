# A block turbo decoder that reads whole M x M tiles

A turbo decoder for product codes goes over the code matrix again and again. It decodes every
column, then every row, then the columns again, and so on. The usual way to make it faster is
to run many decoders side by side. But each decoder wants its own symbols every clock, so the
matrix memory gets copied or split into many banks, and memory ends up costing the most.

This design avoids that with its storage layout. Each memory address holds a square **tile** of
M x M neighbouring symbols instead of one symbol. One read of a tile gives M symbols to each of
M rows at once. It also gives M symbols to each of M columns, because the same tile is simply
sliced the other way. So M decoders can each take M symbols per clock, a total of M² symbols
per clock. This works from a single memory of ordinary width, with no multi-port RAM and no
faster clock. Each decoder (a *processing unit*) is widened to take M symbols per clock. As a
result it finishes a codeword in N/M clocks, and its latency shrinks by the same factor M.

The RTL decodes the product code BCH(32,26,4) x BCH(32,26,4). That is a 32 x 32 matrix whose
rows and columns are all words of the extended Hamming code of length 32. By default it uses
M = 8: eight units of eight symbols each, 64 symbols per clock, and four full iterations (eight
half-iterations). It is bit-exact with the behavioural reference model in `tb/btc_ref_pkg.sv`,
which decodes whole rows and columns, so it is independent of the tiling and of the timing.

## The code and the soft decoding algorithm

**The elementary code.** The 32-bit code is a Hamming(31,26) code over GF(32), built on
x^5 + x^2 + 1, extended with an overall parity bit.
- Position j < 31 has parity-check column alpha^j.
- Position 31 only enters the overall parity.
- Positions 0..4 have the unit vectors as columns, so a codeword carries its check bits in
  positions 0..4 and 31 and its 26 data bits in positions 5..30.

**The product code.** 26 x 26 data bits go into the matrix. The data rows are encoded first,
then all 32 columns. The last six rows then turn out to be codewords too.

**Samples.** A received sample is a 5-bit two's-complement number, saturated to -15..+15.
- A negative sample means bit 1.
- |r| is the sample's reliability.

**Decoding one codeword (Chase-Pyndiah SISO).** Each processing unit decodes one 32-symbol
codeword from its soft input R' (the channel samples R plus what earlier half-iterations
learned):

1. Take the hard decision. Find its syndrome and parity, and find the five least reliable
   positions.
2. Build 16 test patterns by flipping every subset of the **four** least reliable positions.
3. Decode each pattern algebraically:
   - syndrome 0 and even parity: already a codeword;
   - odd parity: one error, at the position whose column equals the syndrome, or at position 31
     when the syndrome is 0;
   - non-zero syndrome with even parity: two errors, so the pattern is dropped.
4. Describe each candidate codeword as a 32-bit mask of where it differs from the hard
   decision. Its metric is the sum of |r'| over that mask. This sum equals the squared Euclidean
   distance to R', up to a constant and a factor of 4, so the comparisons come out the same.
5. The candidate with the smallest metric is the decision D. Up to three more distinct codewords,
   in order of metric, are the competitors. Ties go to the lower pattern index.
6. For every position j:
   - F_j = (metric of the closest competitor that differs from D at j − metric of D) · s_j,
     where s_j = +1 if D_j = 0 and −1 if D_j = 1;
   - if no competitor differs at j: F_j = beta · s_j.
7. The extrinsic information is W_j = F_j − r'_j.
8. The unit's soft output is R'+_j = sat15(R_j + round(alpha · W_j)), with alpha in eighths and
   rounding to nearest, ties upward.

**Alpha and beta per half-iteration** (`btc_pkg::ALPHA_TAB`, `BETA_TAB`):

| half-iteration | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| alpha (x/8) | 2 | 2 | 4 | 6 | 7 | 8 | 8 | 8 |
| beta | 3 | 5 | 7 | 9 | 11 | 13 | 15 | 15 |

Both tables are a reasonable ramp picked for this design, not tuned values. Change them in the
package; the testbenches' reference model reads the same tables.

## Tiles: the matrix memory and the word router

With N = 32 and M = 8 the matrix is NB x NB = 4 x 4 tiles. Tile (I, J) is stored at address
I·NB + J. Element (a, b) of that word is symbol (M·I + a, M·J + b), at bits (a·M + b)·5
(`btc_matrix_ram`). There are two such memories:
- **R'** holds the current soft values;
- **R** holds the channel samples, which every half-iteration needs again.

Each is 16 words of 320 bits.

`btc_word_router` sits between a memory word and the units:
- **rows:** unit p gets row p of the tile, elements (p, 0..M−1);
- **columns:** unit p gets column p, elements (0..M−1, p).

So a unit receives 8 consecutive symbols of one row or one column per clock. Tile-to-unit and
unit-to-tile are the same transposition, so three more routers fold the units' outputs (R'+, R
and the decided bits) back into tiles.

**Address order.** The controller reads the tiles of a block-column top to bottom while
decoding columns. While decoding rows it reads the tiles of a block-row left to right. Either
way, after NB = 4 reads each unit has seen the whole of its codeword in order. Results go back
to the same addresses in the same order. The units' latency is fixed, so the write address is
just a second counter that steps on the units' output-valid.

## The processing unit (`btc_pu`)

A unit works on three codewords at once, one in each of three phases. Each phase is NB = N/M
clocks long, 4 clocks at M = 8:

- **Reception** (`pu_input_seq`): M symbols per clock.
  - The R' and R symbols are written into one bank of `pu_triple_ram`.
  - Syndrome and parity are accumulated.
  - The new symbols are merged into a sorted list of the five least reliable positions.
  - The beat counter that times the whole unit lives here.
- **Processing** (`pu_binary_decoding`, `pu_selection`): runs on the completed bank.
  - The 16 candidates are computed combinationally and registered on the first clock of the
    phase.
  - Decision and competitors are registered at the end of the phase, so the chosen codewords
    are ready when emission starts.
- **Emission** (`pu_output_seq`): M positions per clock.
  - Reads R' and R from the third bank.
  - Outputs the decided bit, W+ and R'+.
  - `pu_delay` brings R out alongside, as R+.

The three banks rotate at each phase boundary: write, then compute, then read. This is why a
codeword can be received while the previous one is decoded and the one before that is emitted.
The latency from the first input beat to the first output beat is exactly 2N/M clocks
(8 at M = 8, 16 at M = 4, 32 at M = 2). One codeword is accepted every N/M clocks.

**Input framing.** `in_valid` frames a codeword as NB consecutive beats with no gap. Alpha and
beta are taken on a codeword's first beat.

## Schedule of a decoding (`btc_controller`, `btc_turbo_decoder`)

1. **Load.** The NB·NB tiles of received samples arrive through `in_valid`/`in_ready`, one per
   accepted clock, in address order. Each is written into both memories; R' starts out equal
   to R.
2. **Half-iterations.** There are NHALF of them, columns first, then alternating. Each one:
   - reads all 16 tiles in unit order, feeding the M units in lock step;
   - writes each returned tile back to where it came from;
   - starts only after the previous one has been written back completely.
3. **Output.** During the last half-iteration every written tile is also presented on
   `out_valid`/`out_addr`/`out_bits` as an M x M tile of decided bits.
4. **Done.** `done` pulses after the last tile is written.

**Timing (checked by the testbenches).**
- Load: NB² clocks.
- Each half-iteration: NB² + 2N/M + 1 clocks, which is 25 at M = 8.
- `done` comes 1 + NHALF·(NB² + 2N/M + 1) = 201 clocks after the last load word.

A new matrix is refused (`in_ready` low) while a decoding is running.

**Throughput.** This schedule drains the units between half-iterations: 9 of every 25 clocks at
M = 8. A whole decoding takes 216 clocks per 1024 symbols, about 4.7 symbols per clock. With
ideal overlap it would be 64 symbols per clock divided by the 8 half-iterations, i.e. 8 per
clock. Closing the gap would take one of two changes:
- start the next half-iteration while the previous one is still writing back, which needs an
  ordering of tiles where no tile is read before it is written;
- cascade one decoder per half-iteration, each with its own memory.

Neither is built.

## Top-level interface (`btc_turbo_decoder #(M = 8, NHALF = 8)`)

| port | dir | meaning |
|---|---|---|
| `in_valid`, `in_ready` | in / out | handshake for one tile of received samples |
| `in_word[M][M]` | in | tile I·NB+J: `in_word[a][b]` = sample (M·I+a, M·J+b), `sym_t` (5-bit signed) |
| `out_valid` | out | a tile of decided bits, during the last half-iteration |
| `out_addr` | out | its address I·NB+J |
| `out_bits[M][M]` | out | bit (M·I+a, M·J+b) at [a][b] |
| `half` | out | current half-iteration |
| `busy`, `done` | out | decoding in progress; one-clock end pulse |

**Parameters.**
- M may be any power of two up to 16 (N/M ≥ 2). M = 2, 4 and 8 are tested.
- NHALF sets the number of half-iterations. Beyond 8, the last alpha/beta entry is reused.
- The code length, quantisation and list sizes are constants in `btc_pkg`.

**Reset.** It is asynchronous and active low. The matrix memories are not reset, because they
are always written before they are read.

## Where the design departs from, or fills in, its source

The partitioning is taken from the original architecture description:
- tile storage and its row/column split among the units;
- a unit in five parts (input part, algebraic decoding, selection, output part, three-bank
  storage);
- three phases of N/M clocks and latency 2N/M;
- 5-bit samples, 16 test patterns and 3 competitors;
- columns decoded first, 4 iterations.

These points are this design's own:
- **The code's polynomial and bit order.** Only "BCH(32,26,4)" is given.
- **Which 16 test patterns.** All subsets of the 4 least reliable positions. The fifth least
  reliable position is tracked, as described, but not used.
- **The reliability formula.** The usual Chase-Pyndiah rule with beta when no competitor
  disagrees, and all fixed-point widths, rounding and saturation.
- **The alpha/beta tables.** Their values are not given.
- **What the memory stores.** It holds R' = R + alpha·W rather than W. It holds the same
  information in the same number of bits, and the units take R' directly.
- **The whole half-iteration schedule and handshakes.** This includes the drain between
  half-iterations, which puts the iterative throughput below the ideal figure quoted for this
  architecture (800 Mbit/s at 100 MHz with M = 8; this RTL gives about 474 Msymbol/s at that
  clock).
- **No timing closure.** The 100 MHz clock has not been checked by timing analysis.
- **Not built:** the cascaded form (one decoder per half-iteration, 6.4 Gbit/s) and the
  classical alternatives that the architecture is compared against.

## Files

| file | contents |
|---|---|
| `rtl/btc_pkg.sv` | constants, types, GF(32) table, saturation, alpha/beta tables |
| `rtl/btc_turbo_decoder.sv` | top: memories, routers, M units, controller |
| `rtl/btc_controller.sv` | load, read/write address sequencing, half-iteration count |
| `rtl/btc_matrix_ram.sv` | one tile per address, registered read |
| `rtl/btc_word_router.sv` | row/column slicing of a tile |
| `rtl/btc_pu.sv` | processing unit: phases, banks, pipeline registers |
| `rtl/pu_input_seq.sv` | beat counter, syndrome, parity, least-reliable list |
| `rtl/pu_binary_decoding.sv` | 16 test patterns, algebraic decoding, metrics |
| `rtl/pu_selection.sv` | decision and three competitors |
| `rtl/pu_output_seq.sv` | reliability, extrinsic, next soft value |
| `rtl/pu_triple_ram.sv` | three rotating codeword banks |
| `rtl/pu_delay.sv` | fixed delay line |
| `tb/btc_ref_pkg.sv` | behavioural reference: encoder, channel, SISO decoder |
| `tb/btc_decoder_harness.sv` | reusable end-to-end driver and checker for one decoder size |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the end-to-end ones |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself. Each also has a
watchdog. For example, the full-size end-to-end test:

```
verilator --binary --timing --assert -Irtl -y rtl \
    rtl/btc_pkg.sv tb/btc_ref_pkg.sv tb/tb_btc_turbo_decoder.sv \
    --top-module tb_btc_turbo_decoder -Mdir obj_top
./obj_top/Vtb_btc_turbo_decoder
```

The 2- and 4-data configurations run together in `tb_btc_turbo_decoder_pu24`. That one also
needs `tb/btc_decoder_harness.sv` on the command line. The unit testbenches need only
`rtl/btc_pkg.sv`, `tb/btc_ref_pkg.sv` (where they use it) and their own file. Building takes
about a minute; every run takes well under a second.

## What the tests establish

- **`tb_btc_turbo_decoder`** runs the default configuration (M = 8, 8 half-iterations) on six
  random product codewords sent through a noisy channel:
  - every decided bit is compared with the reference decoder;
  - the three lightly noisy matrices (about 3 % raw bit errors) must come out error-free;
  - the decoding time is checked;
  - idle gaps in the load, and tiles offered while busy, are exercised.
  - It counts column and row half-iterations, refused tiles, corrected bits, positions where beta
    sets the reliability, and codewords with all three competitors. It fails if any of these
    never happens.
- **`tb_btc_turbo_decoder_pu24`** does the same for M = 2 and M = 4.
- **`tb_btc_pu`** streams 200 codewords through a unit, with gaps between codewords. It checks
  all four outputs against the reference and the latency of 2N/M.
- **The module testbenches** check each part against independent reference functions, with
  random and corner cases. Examples:
  - tied reliabilities;
  - zero-syndrome words with odd parity;
  - all 16 patterns giving the same codeword (no competitor);
  - bank rotation;
  - transposition;
  - the address order.

Each testbench has been shown to fail on a deliberately broken copy of its module.

Synthesis with a generic gate library gives about 59 k cells and 10 k flip-flop bits for the
default top, plus 2 x 5120 memory bits. Most of it is in the eight units: about 7.3 k cells
each, mostly the three-bank codeword storage and the 16 parallel decoders.
