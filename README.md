# Hierarchical eIRA LDPC encoder (BIBD top matrix, primitive-generator blocks)

This is a small, synthesizable encoder for structured eIRA codes. eIRA codes
are extended irregular repeat-accumulate LDPC codes. Their parity check
matrix is split as `H = [H1 | H2]`:

* `H2` is the square dual-diagonal part. Parity bit `j` closes check `j`
  together with parity bit `j-1`, so encoding reduces to an accumulator:
  `p_j = p_{j-1} xor (H1 u)_j`.
* `H1` is normally random, and a random `H1` is expensive to store. Here it
  is *hierarchical*. `H1` is a grid of `N x N` blocks, each either zero or a
  permutation matrix.
  * A small **top matrix** says which blocks are non-zero. It is taken from a
    balanced incomplete block design with λ = 1, so no two top-level rows
    share more than one top-level column. That rules out length-four cycles.
  * Inside each non-zero block, the one in block row `k` sits at block column
    `i_k`. A **primitive generator** produces `i_k`:

        i_{k+1} = (i_k + root) mod N,   i_0 = init_value,   N prime

    With `N` prime, any root from 1 to N-1 gives a full permutation.

The hardware stores no pointer per one of `H1`. It stores only the top
matrix and a root and an init_value per block. Everything else is
recomputed by small adders as the encoder runs.

## The codes built in

Every top matrix comes from a design with λ = 1. The smallest such design
is BIBD(7,3,1), the Fano plane. Its seven lines (columns numbered 1..7)
are:

    row 1: 1 2 3     row 4: 2 4 6     row 7: 3 5 6
    row 2: 1 4 5     row 5: 2 5 7
    row 3: 1 6 7     row 6: 3 4 7

The larger designs are projective planes PG(2,q). A plane of order `q`
has q²+q+1 points and as many lines, q+1 points on every line, and
exactly one line through any two points.

| `CODE`            | top matrix | built from                                            | blocks per column | info bits `K` | parity bits `M` | rate |
|-------------------|-----------:|-------------------------------------------------------|:-----------------:|--------------:|----------------:|-----:|
| `CODE_R050` (0)   | 7 x 7      | all seven Fano lines                                  | 3                 | 7N            | 7N              | 0.5  |
| `CODE_R060` (1)   | 4 x 6      | Fano rows 1, 2, 4, 7; column 7 dropped                | 2                 | 6N            | 4N              | 0.6  |
| `CODE_R075` (2)   | 4 x 12     | the rate-0.6 matrix placed twice side by side         | 2                 | 12N           | 4N              | 0.75 |
| `CODE_PG3` (3)    | 13 x 13    | PG(2,3)                                               | 4                 | 13N           | 13N             | 0.5  |
| `CODE_PG5` (4)    | 31 x 31    | PG(2,5)                                               | 6                 | 31N           | 31N             | 0.5  |
| `CODE_PG7` (5)    | 57 x 57    | PG(2,7)                                               | 8                 | 57N           | 57N             | 0.5  |
| `CODE_AG7` (6)    | 49 x 49    | PG(2,7) minus one point's 8 lines and another line's 8 points | 7         | 49N           | 49N             | 0.5  |
| `CODE_AG7_IRR` (7) | 49 x 49   | `CODE_AG7` with blocks removed                        | 3, 4 or 7         | 49N           | 49N             | 0.5  |

The **default is `CODE_AG7_IRR` with `N = 41`**. This gives an irregular
(4018, 2009) rate-1/2 code:

* 49 memories of 41 bits hold the 2009 information bits;
* 7 slots, of which 4 or 5 are used by each parity check;
* each frame has 2009 parity bits;
* 21 columns of `H1` have degree 7, 6 have degree 4 and 22 have degree 3
  (about 42%, 12% and 46% of the columns).

**How `CODE_AG7` is built.** Take PG(2,7), then:

1. Remove the 8 lines that pass through a point P.
2. Remove the 8 points of a line L that does not contain P.

Every line that is left meets L once, so it loses exactly one point and
keeps 7. Every point that is left loses exactly one line, the one through
P, and keeps 7. Two rows still share at most one column. The same matrix
can be described as the lines `y = m x + k` over GF(7), with point `(x,y)`
mapped to column `7x + y`. This is how `rtl/eira_pkg.sv` computes it.

**How `CODE_AG7_IRR` thins it out.** High-degree columns help the code
converge; low-degree columns keep the check degree, and with it the
decoding cost, down. A mix of degrees 3 and 7, with a few columns raised
to 4 against the error floor, is a good choice at this rate and size. The
irregular code starts from `CODE_AG7` and removes blocks, which can never
create a length-four cycle:

* columns with `x < 3` (columns 0..20) keep all 7 blocks;
* columns with `x = 3, y < 6` (columns 21..26) keep 4;
* all others (columns 27..48) keep 3.

Column `(x, y)` keeps its blocks on the lines of slopes `2x, 2x+1, ...`
(mod 7), as many as its degree. The offset `2x` spreads the removals, so
every top-level row keeps 4 or 5 blocks. A removed block leaves its slot
empty: slot `w` of a row always holds the point with `x = w`, or nothing.

**Numbering of PG(2,q).** Points and lines are normalised vectors over
GF(q), numbered as follows:

* `(1,a,b)` is number `a*q + b`;
* `(0,1,b)` is number `q*q + b`;
* `(0,0,1)` is number `q*q + q`.

Point `P` lies on line `L` when `P·L = 0 mod q`. Each top-level row lists
its blocks in increasing column order.

**Cloning (rate 0.75).** Placing a matrix twice side by side normally
creates length-four cycles at the top level: two rows that share column
`c` also share its copy `c+6`. The copy breaks them at the bit level. A
right-hand block keeps the root of the left-hand block it copies, but its
init_value is the number of its top-level row (1..R). Two rows `r1` and `r2`
sharing `c` then place their ones with different offsets
`(r+1) - root` between the two halves.

**Roots.** Each non-cloned block uses its root as its own init_value, so
every block starts at a different point. The roots come from a fixed rule,
`root = 1 + ((7c + 11r) mod (N-1))`, where `c` is the column in the original
design and `r` the top-level row.

* The rule always gives a legal root.
* It is not an optimised "spread-out" choice. The optimisation that picks
  roots for error-floor performance is a design-time search, and it is not
  part of this RTL.
* For the codes without cloning, λ = 1 already rules out length-four cycles
  for any roots.
* For the cloned rate-0.75 code, this rule gives no length-four cycles at
  N = 13 and N = 41. The testbenches check this. At N = 7, 11 and 31 it
  gives some.
* To use other roots, change `code_root` / `code_init` in
  `rtl/eira_pkg.sv` (and the matching lines in `tb/eira_ref_pkg.sv`).

**Bit numbering.**

* Information bit `u[c*N + x]` is position `x` of top-level column `c`.
* Parity bit `p[r*N + k]` is block row `k` of top-level row `r`.
* The codeword is `[u | p]`.

## How the encoder computes parity

```
              in_bit (serial)                                 out_bit (serial)
                  |                                                 ^
                  v                                                 |
  +------------+  write  +------------------+  bits  +---------+  s_j  +--------------------+
  | encoder_   |-------->| column_memory x C|------->|check_xor|------>| parity_accumulator |
  | controller |         +------------------+        +---------+       |  p_j = p_{j-1}^s_j |
  +------------+               ^ addr/en                ^ mask (1 cycle late)  +--------------------+
     | load/step/ld_row        |                        |
     v                   +-------------+                |
  +----------------+     | slot_router |----------------+
  | top_matrix_rom |---->|             |
  +----------------+     +-------------+
     | root, init, col          ^ idx per slot
     +-----> primitive_generator x W (one per slot)
```

**Memories.** There is one `column_memory` per top-level column, each
1 bit wide and `N` deep. This is the most parallel arrangement. A
top-level row uses each column at most once, so all the bits that one
parity check needs are read in the same cycle, from different memories.

**Slots.** A top-level row holds at most `W` blocks. `W` is 7 at the
defaults, 3 for the Fano codes and 6 for the cloned one. A slot may be
empty: it then takes no memory and adds nothing to the check. Slot `w` owns one `primitive_generator` and a register holding
its column.

* At the start of a top-level row, the slots load that row's entries
  from `top_matrix_rom`: column, root and init_value.
* The generators then step once per clock, giving block rows `k = 0..N-1`.
* On the last block row, the generators load the next row's entries
  instead of stepping. There is no bubble between top-level rows.

**Datapath.** Each cycle:

1. `slot_router` sends every slot's address to the memory of its column.
2. One clock later, `check_xor` XORs the bits that came back. It masks out
   memories that are not in the row.
3. `parity_accumulator` folds the result into the running parity. The
   first check of a frame restarts the running parity from zero.

**Frame schedule (`encoder_controller`).**

* LOAD: takes `K` bits, one per accepted handshake.
* PRIME: one cycle that loads top-level row 0 into the slots.
* ENC: `M` cycles, one parity check per clock.

The controller then returns to LOAD. The next frame may start loading
while the last two parity bits are still in the pipeline.

## Interface and timing (`eira_encoder`)

| port        | dir | meaning                                                     |
|-------------|-----|-------------------------------------------------------------|
| `clk`       | in  | clock, all logic on the rising edge                         |
| `rst_n`     | in  | asynchronous reset, active low (memories are not cleared)   |
| `in_valid`  | in  | information bit offered                                     |
| `in_ready`  | out | high while loading; a bit is taken when both are high       |
| `in_bit`    | in  | `u[n]`, `n = 0..K-1` in order                               |
| `out_valid` | out | parity bit valid (no back-pressure)                         |
| `out_bit`   | out | `p[j]`, `j = 0..M-1` in order                               |
| `out_last`  | out | marks `p[M-1]`                                              |
| `busy`      | out | frame being encoded (`in_ready` low)                        |

**Parameters.**

* `CODE`: one of `eira_pkg::code_e`.
* `N`: block size. It must be prime and larger than the number of
  top-level rows.

**Timing.**

* `p[0]` is registered on the third rising edge after the edge that
  accepts `u[K-1]`.
* The `M` parity bits follow on consecutive cycles.
* With `in_valid` held high, a frame takes `K + 1 + M` cycles. At the
  defaults that is 2009 + 1 + 2009 = 4019 cycles per 4018-bit codeword.
* The systematic bits are not re-emitted: the codeword is the input
  followed by the parity output.

**Size at the defaults (coarse synthesis).**

* About 1900 word-level cells. Most of them are in the 49-memory by
  7-slot address crossbar.
* About 215 flip-flops.
* 2009 bits of information memory.
* The constant table of 49 rows x 7 slots.

## Files

| file | contents |
|------|----------|
| `rtl/eira_pkg.sv` | code construction: Fano lines, row subset, cloning, PG(2,q), 49x49 code and its irregular version, root and init rules |
| `rtl/primitive_generator.sv` | `i_{k+1} = (i_k + root) mod N` with load and step |
| `rtl/top_matrix_rom.sv` | per top-level row: slot valid, column, root, init (constant table) |
| `rtl/column_memory.sv` | N x 1 RAM, one write and one synchronous read port |
| `rtl/slot_router.sv` | slot address to column memory crossbar |
| `rtl/check_xor.sv` | masked XOR of the memory outputs |
| `rtl/parity_accumulator.sv` | dual-diagonal H2 solver |
| `rtl/encoder_controller.sv` | LOAD / PRIME / ENC sequencer |
| `rtl/eira_encoder.sv` | top level |
| `tb/eira_ref_pkg.sv` | independent reference: closed-form block permutations, encoder, 4-cycle search |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/eira_encoder_bench.sv` | reusable end-to-end harness for one `CODE`/`N` |
| `tb/tb_eira_codes.sv`, `tb/tb_plane_codes.sv` | Fano-plane codes and projective-plane codes end to end |
| `tb/plane_rom_checker.sv` | structure check of one plane-based ROM |

## Verification

Every testbench checks itself and ends with
`TB_RESULT checks=<n> failures=<m>`. The end-to-end benches all make the
same checks on the codewords they receive:

* every parity bit against an independent reference encoder
  (`tb/eira_ref_pkg.sv`);
* every parity check of `H` on the received codeword;
* the latency of the first parity bit, and gap-free output;
* `out_last`;
* that the bit-level `H1` has no length-four cycle.

**`tb_eira_encoder`** runs the top at its default parameters, with two
2009-bit frames. It sends random input pauses and keeps input pending
while the encoder is busy. It counts five mechanisms and fails if any of
them never happens:

* input pauses;
* back-pressure;
* top-level row reloads;
* rows loaded with empty slots;
* loading during drain.

A second encoder, the cloned rate-0.75 code at N = 41, runs alongside. It
exercises the loading of cloned blocks with their row-number init_value.

**`tb_eira_codes`** runs the rate-1/2, rate-0.6 and rate-0.75 Fano codes.

**`tb_plane_codes`** runs:

* PG(2,3) at N = 13;
* PG(2,5) at N = 11;
* PG(2,7) at N = 41;
* the regular 49 x 49 code at N = 41.

The block testbenches cover:

* the generator: every root at N = 41, and that each sequence is a
  permutation;
* the ROM, for every code:
  * columns, roots and init values against the reference;
  * blocks per row and per column, and the 3/4/7 degree mix of the
    default code;
  * that two rows share at most one column (exactly one for a projective
    plane);
* the memory's read latency;
* the router;
* the XOR;
* the accumulator;
* the controller, cycle by cycle at N = 5.

To run one with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_eira_encoder \
  -y rtl -y tb +libext+.sv rtl/eira_pkg.sv tb/eira_ref_pkg.sv tb/tb_eira_encoder.sv
./obj_dir/Vtb_eira_encoder
```

Each testbench finishes in about a second of simulation time.

## Where this design departs from, or stops short of, the construction

* **The default 49 x 49 matrix is a reconstruction.** The reference
  rate-1/2 code is described only as "BIBD(49,7,1)" with N = 41. The
  derivation from PG(2,7) above is one matrix with exactly those
  dimensions, degrees and λ = 1. It may not be the block placement
  originally used.
* **The irregular degrees use a fixed rule.** The degree mix (22 columns
  of degree 3, 6 of degree 4, 21 of degree 7) is the intended one. The
  original picks the columns to lower by how spread out their ones are,
  and the columns to raise by counting decoding errors. Here a fixed
  geometric rule picks both (see `CODE_AG7_IRR` above).
* **The rate-0.8 code (4495, 3534) is not built in.** Its top matrix
  (presumably 31 x 114 blocks of 31) is not specified.
* **Adding a code.** A new code needs a new top matrix, roots and
  init_values in `eira_pkg`. The datapath itself is generic in `C`, `R`,
  `W` and `N`.
* **Roots are set by a fixed rule, not optimised.** See above. Code
  performance (BER, error floor) depends on this choice and has not been
  evaluated.
* **The degree-tuning search is not implemented.** It is a design-time
  procedure, not hardware. A different choice of removed blocks only needs
  a new rule in `eira_pkg`; the hardware already handles empty slots.
* **Lower rates are not built in.** A rate below 1/2 would drop columns
  from a rate-1/2 top matrix. None of the built-in codes does this.
* **No decoder.** The hierarchical structure is meant to suit a parallel
  decoder as well, but no decoder architecture is specified, and none is
  included.
* **The schedule and interfaces are this design's own choices:** serial
  1-bit ports, one parity check per clock, one memory per top-level column,
  synchronous memory read, and asynchronous active-low reset.
  * A wider datapath would process several block rows per cycle. This would
    need more memory read ports or banking.
  * A design with fewer memories would time-share them. This would lower
    throughput.
* **The H2 layout is assumed.** `H2` is the standard eIRA dual-diagonal
  matrix, with parity checks ordered by top-level row and then by block row.
