# Recursive parallel multiplier

An N x N multiplier, N = 64 by default, combinational or (optionally)
pipelined. It has the regular layout of a cell-array multiplier and the
logarithmic delay of a Wallace or Dadda tree. The idea is recursion. The
factors are cut into halves, so the product is the sum of four half-size
products at weights 0, N/2, N/2 and N. Each half-size product is built the
same way, until the pieces are small Q x Q products formed by ordinary cell
arrays. No carry ever runs through the tree between the levels. Each level
hands two numbers upward, and a single six-input carry-save stage merges the
four pairs. Only at the top are the last two numbers added, by a fast
carry-lookahead adder.

With p = log2(N/Q) recursion levels, the delay is roughly

    (Q/G) cell delays  +  3p full-adder delays  +  O(log 2N) adder delay

and the area is about that of the plain N x N cell array, plus one carry-save
band per level. The default is N = 64 and Q = 8. That gives an 8 x 8 grid of
8-bit sub-multipliers and three recursion levels.

The same hardware can also run as four independent (N/2) x (N/2)
multipliers. In both modes it can multiply two's complement factors.

## Building blocks, bottom up

| Level | Module | Size at defaults | What it produces |
|---|---|---|---|
| cell | `full_multiplier_cell` | 2-bit digits | `h*k + x + y` as two 2-bit digits |
| P_q | `pq_multiplier` | 8 x 8 bits, 4 x 4 cells | product as three numbers `l1`, `m1`, `m2` |
| P_q (table) | `pq_rom` | 4 x 4 bits, 256 x 8-bit table | same outputs, `m2 = 0`; optional |
| B_1 | `b1_pseudo_multiplier` | 16 x 16 bits, 4 P_q | product as two 32-bit numbers |
| B_f | `bp_pseudo_multiplier` (levels of B_1 and pseudo-adders) | W x W bits | product as two 2W-bit numbers |
| top | `recursive_multiplier` | 64 x 64 bits | final 128-bit product(s) |

Shared parts: `csa` is a 3:2 carry-save row. `pseudo_adder6` is the
six-input, three-level CSA stage. `special_adder` is a Brent-Kung prefix
adder. `tc_correction` is the two's complement logic. `pipe_delay` is the
register chain used for the pipelined option. `rm_pkg` holds the mode type,
the default sizes and the latency formulas.

### The full-multiplier cell

The cell computes `Z = H*K + X + Y` on G-bit digits (G = 2). The result
never exceeds 2^(2G) - 1, so it always fits into two digits and no carry
leaves the cell.

The cell is built from multiplexers, one per output bit: four 16-input
multiplexers at G = 2. The addends X and Y come from the row above and
arrive last, so they drive the select lines. The 16 data inputs of output
bit b are the functions bit_b(H*K + X + Y) of the factor digits, one for
each value of X and Y. H and K are present from the start. So once these
functions have settled, each row of the array adds one multiplexer delay.

### The P_q-multiplier: a cell array that stops early

`pq_multiplier` is a (Q/G) x (Q/G) grid of cells. Cell (r, c) multiplies
digit r of `h` by digit c of `k`:

- its **high digit** goes straight down to cell (r+1, c), which has the same
  weight;
- its **low digit** goes diagonally to cell (r+1, c-1), which also has the
  same weight.

The array never resolves its last row. What leaves it is:

- `l1`: the low digits that leave column 0. These are product bits 0..Q-1
  and are already final.
- `m1`: the high digits that leave the bottom row, at weight 2^Q.
- `m2`: the low digits that leave the bottom row from columns 1 and up, at
  weight 2^Q. The top digit of `m2` is always 0.

So `h*k = l1 + (m1 << Q) + (m2 << Q)`, after Q/G cell delays.

**Table form.** With `PQ_ROM = 1`, every P_q block is instead `pq_rom`, a
read-only table of all Q x Q products. It has the same three outputs, with
`m2 = 0`. The table is filled at elaboration from `entry(a) = a[2Q-1:Q] *
a[Q-1:0]`, so no data file is needed. Its delay does not depend on Q, but its
size grows as 2^(2Q) x 2Q bits. So it is meant for small blocks. At Q = 4 it
holds 2048 bits, inside the roughly 2^12-bit budget that makes such a table
practical. At the default Q = 8 it would need a million bits, which is why
the cell array is the default.

### Pseudo-multipliers: packing four results into six addends

This is the core of the design. A B-level holds four children, indexed by
which half of `h` and which half of `k` each one multiplies. Each child
delivers two numbers that are twice its operand width S:

    child (0,0): weight 0        child (0,1): weight S
    child (1,0): weight S        child (1,1): weight 2S

Children (0,0) and (1,1) cover disjoint bit ranges, [0, 2S) and [2S, 4S). So
their outputs are simply concatenated into two addends, A1 and A2. The middle
children are shifted by S and become B1, B2 and C1, C2. At any bit position
at most six addends meet. That is why one six-input pseudo-adder per level is
enough:

    level 1:  CSA(A1, B1, B2)          CSA(A2, C1, C2)
    level 2:  CSA(sum1, carry1, sum2)
    level 3:  CSA(sum3, carry3, carry2)  ->  O1, O2

This is three full-adder delays per recursion level, whatever the width.

The B_1 level is the same circuit. A P_q-multiplier's output is turned into
two numbers, `{m1, l1}` and `{m2, 0}`. With those inputs, many addend bits of
the pseudo-adder are constant zero, and synthesis prunes them. Per weight
band, what remains is 1 addend in [0, Q), 4 in [Q, 2Q), 5 in [2Q, 3Q) and 2 in
[3Q, 4Q). This is the B_1 CSA network.

All CSAs are as wide as the full product of their level. They work modulo
2^width, which is exact because the product fits. Carries that cross from
one weight band into the next are therefore kept, with no extra logic.

`bp_pseudo_multiplier` unrolls the recursion into levels. Level 1 is a grid
of B_1 blocks on the 2Q-bit pieces of the factors. Each node of a higher
level is one pseudo-adder fed by the four nodes below it. The single node of
the last level gives the W x W result.

### Top level, special adder and modes

`recursive_multiplier` builds the last level itself: four
`bp_pseudo_multiplier` quadrants of N/2 bits and one `pseudo_adder6`. This
lets the modes reach the quadrants.

- **`MODE_DOUBLE`** (one N x N product). The two outputs of the top
  pseudo-adder go through `tc_correction` into the 2N-bit `special_adder`.
  The result is `p = h * k`, and `p2 = 0`.
- **`tc = 1`**. The factors are read as two's complement.
  An unsigned N-bit pattern x stands for x + 2^N x[N-1]. So `tc_correction`
  adds `-2^N (h[N-1] K + k[N-1] H)` (mod 2^2N) as three more addends:
  - the two inverted and gated factors, shifted by N;
  - a constant of 2^N for each negative factor.
  It does this with three CSA levels before the special adder.
- **`MODE_QUAD`** (four independent (N/2)-bit products). The diagonal
  quadrants multiply `h[lo]*k[lo]` and `h[hi]*k[hi]`. Operand multiplexers
  feed the off-diagonal quadrants from `h2`/`k2` instead. The top
  pseudo-adder is bypassed:
  - The packed outputs of the diagonal quadrants go through the correction
    into the main special adder.
  - Those of the off-diagonal quadrants go through a second correction into
    a second special adder.
  - In this mode the correction works per half word. Each (N/2)-bit product
    gets its own `-2^(N/2)(...)` terms, and every carry that would cross
    bit N is dropped, in the correction CSAs and in both adders.

  Outputs: `p = {h[hi]*k[hi], h[lo]*k[lo]}` and
  `p2 = {h2[hi]*k2[hi], h2[lo]*k2[lo]}`. With `tc = 1` all four products
  are signed, each an N-bit two's complement field.

`special_adder` is a Brent-Kung parallel-prefix adder. It has an up-sweep of
log2(W) levels and a down-sweep of log2(W) - 1 levels. Its `split` input
kills the prefix chain above bit W/2 - 1, which turns it into two independent
half-width adders. For unsigned quad products the two numbers of a half
word were never seen to sum past it, but the sign corrections regularly
carry out of the low half, and the cut removes that carry.

### Pipelining

With `PIPE = 1` every block gets register stages, and a new operation can
enter every clock cycle:

- one stage after each cell row of a P_q-multiplier. The operand digits
  are skewed to meet their row, and the early `l1` digits are delayed so all
  outputs leave together;
- one stage after each CSA level of every pseudo-adder and of the
  correction;
- one stage after each prefix level of the special adders.

Paths that skip a stage, such as the quad-mode bypass and the mode bit, are
delayed to match. The latency in cycles is

    Q/G  +  3p  +  3  +  (2 log2(2N) - 1)

(cell rows, p pseudo-adder levels, correction, special adder). At the
defaults that is 4 + 9 + 3 + 13 = 29. It is the local `LATENCY` parameter of the
top, computed with `rm_pkg` functions. Table P_q blocks are not registered
and count 0 cycles. With `PIPE = 0` (the default) no registers are built and
`clk` is unused.

A valid bit travels alongside each operation: `out_valid` is `in_valid`
delayed by `LATENCY` cycles. Only this valid chain is reset (`rst_n`,
asynchronous, active low); the data registers are not. With `PIPE = 0`,
`out_valid` simply equals `in_valid`.

## Interface of `recursive_multiplier`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock (used only with `PIPE = 1`) |
| `rst_n` | in | 1 | asynchronous active-low reset of the valid chain |
| `in_valid` | in | 1 | the operands on the inputs form an operation |
| `out_valid` | out | 1 | `p`, `p2` hold the result of a valid operation |
| `mode` | in | `rm_pkg::prec_mode_e` | `MODE_DOUBLE` or `MODE_QUAD` |
| `tc` | in | 1 | signed (two's complement) factors, in both modes |
| `h`, `k` | in | N | factors; in quad mode, halves feed quadrants (0,0), (1,1) |
| `h2`, `k2` | in | N | quad mode: halves feed the two extra products |
| `p` | out | 2N | product, or two packed N-bit products |
| `p2` | out | 2N | quad mode: two more packed products; 0 otherwise |

Parameters: `N` (64), `Q` (8), `G` (2), `PQ_ROM` (0: cell-array P_q blocks;
1: table P_q blocks, for small Q), `PIPE` (0: combinational; 1: pipelined).
N must be Q times a power of two, with N >= 4Q. Q must be a multiple of G,
with Q/G >= 2. Elaboration-time assertions check this.

Timing: with `PIPE = 0` the whole design is combinational. A result is
valid one settling time after the inputs change. With `PIPE = 1` it appears
`LATENCY` rising clock edges after the operands were applied.

## Where this RTL departs from, or adds to, the original description

- **Sizes.** The description fixes G = 2. Its detailed P_q drawing is 8 bits
  wide, and its layout drawing shows an 8 x 8 grid of P_q blocks. No N is
  stated, and N = 64 follows from that layout. Its rule of thumb
  N/Q = log2 N is not met exactly at this size (8 against 6).
- **Width symbol.** Here Q is always the operand width of one P_q block.
  The number of blocks per side is N/Q.
- **B_1 network.** At weight Q, the B_1 network adds four numbers: m1 and m2
  of quadrant (0,0) and l1 of both middle quadrants. At weight 2Q it adds
  five. Each is one more than a count that leaves out l1 of quadrant (1,0)
  would give. The arithmetic requires these counts.
- **Own choices.** The description states only the four-product mode and
  the two's complement capability. Everything that realises them is this
  design's own:
  - the operand multiplexers, the bypass, the second correction and the
    second special adder;
  - the carry cut;
  - the correction logic.
- **Cell insides.** Only the multiplexer count of the original cell is
  known. Which inputs drive the select lines, and how the data functions are
  formed, is this design's reading. Synthesis may restructure the cell.
- **Special adder.** It is a textbook Brent-Kung adder. The description only
  names it.
- **Pipelining.** The description says pipelining is easy and omits the
  details. The register placement, the skewing of the P_q operands, the
  valid bit and its reset are this design's own.
- **Signed four-product mode.** The description claims two's complement
  factors for the structure and the four-product use, without saying
  whether they combine. Here they do.
- **Delay.** In one-product mode the two's complement correction adds three
  more CSA levels between the tree and the special adder. It does so even
  when `tc = 0`, because the path is the same. The delay is therefore
  3(p + 1) full-adder delays, where the tree alone needs 3p.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares against
products computed in the testbench with wide integer arithmetic:

| Testbench | Coverage |
|---|---|
| `tb_full_multiplier_cell` | all 256 input combinations |
| `tb_pq_multiplier` | all 65,536 pairs at Q = 8, all pairs at Q = 4 |
| `tb_pq_rom` | all 256 pairs at Q = 4 |
| `tb_b1_pseudo_multiplier` | all 8 x 8-bit pairs at Q = 4, random 16-bit pairs at Q = 8 |
| `tb_bp_pseudo_multiplier` | W = 16/Q = 4, W = 32 and W = 64 at Q = 8, random and corner factors |
| `tb_csa`, `tb_pseudo_adder6`, `tb_special_adder`, `tb_tc_correction` | random and corner vectors; both modes of the adder and of the correction; one and two negative factors |
| `tb_pipe_delay` | depths 0, 1 and 5 against a reference history |
| `tb_recursive_multiplier` | the full default design (N = 64): 30,000 random operations mixing double and quad mode, unsigned and signed, plus corners |
| `tb_recursive_multiplier_pipe` | the pipelined design at N = 64: a stream with bubbles, mode changes every cycle, after a reset held longer than the pipeline; each result checked against its launch 29 cycles earlier |
| `tb_worked_example` | an N = 16, Q = 4 instance on 0x6B89 x 0x1954 |

`tb_recursive_multiplier` also counts how often each mode, each signed case
and each mode switch occurs, and how often the half-word carry cut acts. It
fails if any of these never occurs.

`tb_worked_example` runs 0x6B89 x 0x1954 = 178,498,036. It checks the
intermediate values:
- the digit products 36 and 40 inside the P_q blocks;
- the quadrant results 11,508, 3,425, 8,988 and 2,675;
- the final product.

It then runs random operations. It runs them on this instance and on a copy
with table P_q blocks (`PQ_ROM = 1`).

The testbenches of `pq_multiplier`, `pseudo_adder6`, `bp_pseudo_multiplier`,
`special_adder` and `tc_correction` also run a pipelined copy with a new
operand every cycle and check each result after the block's latency.

Every testbench prints `TB_RESULT checks=<n> failures=<m>`. It has a cycle
watchdog.

Simulating one testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        --top-module tb_recursive_multiplier rtl/rm_pkg.sv tb/tb_recursive_multiplier.sv
    ./obj_dir/Vtb_recursive_multiplier

The full-size build takes about 15 seconds, and the run takes under a second.

To change the size, override `N`, `Q` and `G` on `recursive_multiplier`. For
example, `#(.N(16), .Q(4))` gives the 4 x 4 grid of 4-bit blocks used in
`tb_worked_example`.
