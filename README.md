# Hyper-code encoder and iterative decoder

A hyper-code is a block error-correcting code built from nothing but
even-parity checks. The information bits fill a box: here a 16 x 16 x 16
cube. A parity bit is added to every row, every column and every depth line.
That gives a 17 x 17 x 17 cube in which every line, in all three directions,
has even parity. One more plane of "roll" parity bits is then added. Each of
its bits checks a diagonal path through the cube planes. The result is the
**16x16x16 / 17x17x18 "3D+" code**: 4096 information bits in a 5202-bit
block, rate 0.79.

Each parity check is trivial, but every bit sits in four checks: its row, its
column, its depth line and its roll diagonal. A soft-decision decoder that
passes reliability information between the checks corrects errors to within
about 2 dB of the Shannon limit at this rate. No multiplier or trellis is
needed. Decoding one check needs only a sign parity, a minimum and a second
minimum.

This repository holds synthesizable SystemVerilog for the whole link end
point:

- the systematic encoder;
- the modulation mappers: antipodal (BPSK/QPSK), Gray 8PSK and Gray 16QAM;
- the soft demappers that produce the starting log-likelihood ratios (LLRs);
- the iterative max-log-APP decoder with compressed extrinsic storage and an
  early-stopping test.

The same encoder and decoder also build the four-dimensional "4D+" codes,
for example the 7x7x7x7 / 8x8x8x9 code with 2401 information bits in a
4608-bit block (see *Four-dimensional codes* below).

Every block has a self-checking testbench. The top-level testbench runs the
full-size code in all three modulations and compares the result bit for bit
with a reference model.

## Code geometry and bit numbering

The code is described by three lengths, all *including* parity: `ROWS`,
`COLS` and `PLANES`. The defaults are 17, 17 and 18.

- Planes `0 .. PLANES-2` form the parity cube. In each of these planes, the
  last row and the last column hold parity. Plane `PLANES-2` is the depth
  parity plane.
- Plane `PLANES-1` is the roll parity plane.
- Channel bit `(plane, row, col)` has address `(plane*ROWS + row)*COLS + col`.
  The decoder's LLR memory and the encoder's output stream both use this
  order.
- Information bits are the positions with `row < ROWS-1`, `col < COLS-1` and
  `plane < PLANES-2`, taken in address order.

A bit therefore does not move between encoding and decoding. Systematic bits
are not grouped at the front of the block; they sit at their place in the
cube.

### Roll parity

Roll parity bit `(i, j)` is the XOR of one bit from every cube plane `k`:

    P[i][j] = XOR over k of  cube[k][(i + rr(k)) mod ROWS][(j + rc(k)) mod COLS]

Here `rr(k)` is the row roll of plane `k` and `rc(k)` is its column roll.

- **If either side is odd**, both rolls are simply `k`, and each path is a
  true diagonal. This applies to the default 17 x 17 sides.
- **If both sides are even**, a plain diagonal makes two planes line up at
  exactly half a turn, which creates low-weight error patterns. In that case
  the column roll is `k` for the first `COLS/2` planes. The remaining planes
  are shifted by one position further, and the last plane gets `COLS/2`.
  Every pair of planes then has a distinct relative offset.

`hc_pkg::roll_row` and `hc_pkg::roll_col` hold this rule. Every other module
takes it from there.

The roll parity plane is itself decoded as part of the code. Its rows and
columns are parity equations too, exactly as for the cube planes. Each of its
bits therefore takes part in a row, a column and a roll equation.

## The equation walk

Encoder and decoder visit the parity equations in one fixed order. The order
comes from `hc_eq_walker`, one element per step:

| set   | one equation per | count (default) | length (default) |
|-------|------------------|-----------------|------------------|
| row   | (plane, row)     | 18 x 17 = 306   | 17               |
| column| (plane, col)     | 18 x 17 = 306   | 17               |
| depth | (row, col)       | 17 x 17 = 289   | 17 (cube planes) |
| roll  | (row, col)       | 17 x 17 = 289   | 18               |

In total that is 1190 equations and 20519 element visits per pass over the
code.

Within an equation, the parity position is always the last element. This
is what lets the encoder use the same walk. Consider the rows of the depth
parity plane: they are redundant with its columns, and the roll parity
plane's rows and columns likewise duplicate equations that are already
satisfied. Every bit is written by the equation that defines it, after
everything it depends on. Redundant equations either rewrite the same value
or are overwritten later by the defining equation.

The walker has three controls:

- `clear` goes back to the start of the code;
- `step` advances by one element, and from the last element to the next
  equation;
- `rewind` goes back to element 0 of the current equation.

The decoder uses `rewind` to make its second pass over an equation.

### Four-dimensional codes (`hc_eq_walker4`)

Setting `CUBES` above 1 on the top, encoder or decoder switches to a
four-dimensional code. The box is then `CUBES` cubes of `PLANES x ROWS x
COLS` bits:

- cubes 0 to `CUBES`-3 hold information bits, each with its own row, column
  and depth parity;
- cube `CUBES`-2 is the parity across those cubes;
- cube `CUBES`-1 holds the roll parity.

Bit (cube, plane, row, col) lives at address
`((cube*PLANES + plane)*ROWS + row)*COLS + col`. Five sets of equations are
walked in this order:

| set    | one equation per        | length     |
|--------|-------------------------|------------|
| row    | (cube, plane, row)      | `COLS`     |
| column | (cube, plane, col)      | `ROWS`     |
| depth  | (cube, row, col)        | `PLANES`   |
| cube   | (plane, row, col)       | `CUBES`-1  |
| roll   | (plane, row, col)       | `CUBES`    |

For the 8x8x8x9 code that is 2752 equations and 18432 element visits.

Roll parity bit (p, r, c) checks bit (p + k, r + rr(k), c + rc(k)) of every
cube k, all modulo the side, and ends at (p, r, c) of the roll cube. Cube 0
is not moved. Each cube is rolled by k planes. The row roll rr(k) uses the
three-dimensional rule. The column roll rc(k) is 2k for the first half of
the cubes and 2k+1 for the rest; on an odd side it is simply k. With equal
sides, this choice means no two cubes differ by exactly half a side in more
than one dimension. For four rolled cubes of side 4 it gives the rolls (0,0,0)
(1,1,2) (2,3,1) (3,2,3). The number of rolled cubes may not exceed any side;
elaboration stops otherwise.

The decoder's stopping test counts to five sets instead of four.

## Encoder (`hc_encoder`)

The encoder has three phases:

1. **Load.** 4096 information bits stream in on a valid/ready handshake. They
   are written to their cube positions in a 5202-bit working memory.
2. **Encode.** The encoder walks all 1190 equations. It XORs the elements
   before the parity position and writes the result into the parity position.
   This takes 20519 clocks, one per element.
3. **Output.** The 5202 channel bits stream out in address order on a
   valid/ready handshake. `out_last` marks the final bit.

## Decoder (`hc_decoder`)

The decoder is a serial max-log-APP ("min-sum") decoder with one
soft-in/soft-out (SISO) core. It is built from three helpers:

- `hc_siso`, the parity SISO;
- `hc_ext_expand`, which rebuilds extrinsic values from a compressed record;
- `hc_conv_test`, the stopping rule.

It also uses two memories:

- `hc_llr_mem`, which holds 5202 composite LLRs;
- `hc_ext_mem`, which holds one compressed extrinsic record per equation.

### What one equation does

For a parity equation with inputs `x_0 .. x_{L-1}` (LLRs, positive meaning
"0"), max-log-APP gives element `k` the extrinsic value:

    ext_k = (sign of all other x) * min over the other elements of |x|

In hardware this reduces to:

- `parity`: the XOR of all sign bits;
- `min1`, `loc`: the smallest magnitude and where it is (on a tie, the first
  one found);
- `min2`: the second smallest magnitude.

Element `k` then gets magnitude `min2` if `k == loc`, and `min1` otherwise.
Its sign is its own sign XOR `parity`. The magnitude is scaled by
0.625 = 1/2 + 1/8, as two shifts and an add. This damping is what makes
max-log-APP decoding of these codes converge well.

### Schedule

Each equation is processed in two passes over its elements, one element per
clock.

- **READ pass.** The decoder reads the composite LLR `L` of each element and
  subtracts the extrinsic value this same equation gave it in the previous
  cycle: `x = sat(L - old_ext)`. It keeps `x` in a small buffer and feeds it
  to the SISO.
- **WRITE pass.** The decoder computes the new extrinsic value from the
  SISO's result and writes `sat(x + new_ext)` back to the LLR memory. On the
  last element it stores the equation's new compressed record.

So every equation immediately sees the updates of all the equations before
it. A decoding cycle is one walk over all 1190 equations. It takes
2 x 20519 = 41038 clocks for the default code. From `start` to `done`, the
decoder takes `2 x (elements visited) + 1` clocks.

In the first cycle no extrinsic value has been stored yet. The subtraction
is skipped instead of clearing the extrinsic memory, so a new block can start
at once.

### Compressed extrinsic storage

The decoder never stores per-element extrinsic values. It stores one record
per equation:

| field  | width (default) |
|--------|-----------------|
| min1   | 9               |
| min2   | 9               |
| loc    | 5               |
| parity | 1               |
| signs  | 18              |

`signs` holds the sign of each input. One record is 42 bits, so the whole
store is 1190 x 42 bits. Storing one value per element would take
20519 x 10 bits instead. `hc_ext_expand` rebuilds any element's old
extrinsic value from its record in combinational logic.

### Stopping rule (`hc_conv_test`)

Decoding stops early once all four equation sets (five for a 4D+ code) in
a row have passed a test. The test works like this:

- A flag is cleared by any equation that has odd parity, or whose input signs
  differ from those stored for it in the previous cycle.
- At the end of each set, a counter counts up if the flag survived and resets
  to 0 if it did not. The flag is then set again.
- When the counter reaches the number of sets, every equation has been seen at even parity
  with stable signs. The decoder stops there and raises `converged`. This can
  happen in the middle of a cycle.

The sign-change part of the test is not applied in the first cycle, because
no earlier signs exist then. If the test never passes, decoding stops after
`num_cycles` cycles. Setting `num_cycles` to 0 finishes immediately and
leaves the channel LLRs unchanged.

### Interface and timing

- **Loading.** While idle, channel LLRs are loaded in address order with
  `ld_valid` and `ld_llr`, one per clock. The load counter restarts after
  every `start`.
- **Decoding.** A pulse on `start` decodes the loaded block. `busy` is high
  while decoding. `done` pulses for one clock at the end, together with final
  values of `converged` and `cycles_run`.
- **Reading the result.** The result can be read at any address with
  `rd_addr`, using combinational read. `rd_bit` is the hard decision: 1 when
  the LLR is negative.

## Modulation (`hyper_code_top`)

`mod_sel` (`hc_pkg::hc_mod_e`) selects how channel bits travel. It must only
change between blocks.

| mode            | bits per sample | mapper           | demapper           |
|-----------------|-----------------|------------------|--------------------|
| `MOD_ANTIPODAL` | 1 (`tx_i` only) | `0 -> +A`, `1 -> -A` | the sample itself is the LLR |
| `MOD_8PSK`      | 3               | `hc_psk8_mapper` | `hc_psk8_demapper` |
| `MOD_16QAM`     | 4               | `hc_qam_mapper`  | `hc_demapper`      |

QPSK is the antipodal mode carried on two rails, one per quadrature.

In the symbol modes, consecutive channel bits in address order form a
symbol, first bit to the leftmost (most significant) label bit. If the block
length is not a multiple of the symbol size, the last symbol is padded with
zero bits. With the default 5202-bit block, 16QAM needs padding and 8PSK does
not. On receive, the demapper's LLRs for one symbol are passed to the decoder
one per clock, most significant label bit first. `rx_ready` stays low while
they drain. LLRs of padding bits fall past the end of the block and are
ignored.

**16QAM labels.** The points sit at x, y in {-3A, -A, +A, +3A}. Reading from
the top row (y = +3A) down, left (x = -3A) to right, the labels are:

    1101 1001 1000 1100
    0101 0001 0000 0100
    0111 0011 0010 0110
    1111 1011 1010 1110

Neighbouring points differ in one bit. Label bits 3 and 1 depend only on the
row, and bits 2 and 0 only on the column.

**8PSK labels.** Point `m` sits at `m x 45` degrees on a circle of radius `R`
and carries the Gray label `m ^ (m >> 1)`. Going round the circle, the labels
are 000 001 011 010 110 111 101 100.

**Soft demapping.** For each label bit, the demapper computes:

    LLR = (squared distance to the nearest point with a 1 in that bit) - (squared distance to the nearest point with a 0)

This is the dominant-term approximation of the exact LLR. The common
`1/N0` factor is dropped because max-log-APP decoding does not depend on a
common scale. The result is shifted right by `SHIFT` and saturated. Both
demappers are a single register stage.

The antipodal mode feeds the received sample straight in as the LLR, for the
same reason.

## Number formats

| quantity      | format                                                     |
|---------------|------------------------------------------------------------|
| LLRs          | 10-bit signed (`hc_pkg::LLR_W`), saturated symmetrically to +/-511, so magnitudes fit 9 bits |
| samples       | 8-bit signed (`SW`); A = 32, R = 64                        |
| extrinsic scale | `(m >> 1) + (m >> 3)` on the magnitude, which truncates toward zero |

All additions and subtractions into the LLR memory saturate.

## Where this design departs from the original description

The code and the decoding algorithm follow the hyper-code thesis by
Hunt:

- the parity box with roll parity, and the even-side roll rule;
- max-log-APP decoding of each parity equation with immediate update;
- the 0.625 extrinsic scale;
- extrinsic compression into two minima, a location, a parity and a sign
  word;
- the first-cycle shortcut;
- the set-counter stopping test;
- the distance-based soft demapper;
- the printed Gray 16QAM labels.

The thesis describes a software/DSP decoder, so everything at clock level is
this design's own: the serial two-pass datapath, the memories, the
handshakes, the word lengths and the reset behaviour. Points worth knowing:

- **Bit order.** The thesis' reference code puts information bits first and
  parity bits after. Here bits keep their place in the cube (see above). This
  is the same code with the channel bits in a different order.
- **Roll parity positions.** Parity bit `(i, j)` of the roll plane checks the
  path that starts at `(i, j)` of plane 0. The thesis also describes an
  equivalent arrangement in which each diagonal's parity bit sits where the
  diagonal would continue one step further. Both give a valid parity plane.
  They differ only in which roll plane position holds which parity bit.
- **Extrinsic scaling** is applied to the magnitude, before the sign. Scaling
  the signed value with the same shifts would round negative values one step
  differently.
- **The last-cycle shortcut** of not storing extrinsics is not used; it saves
  only write energy.
- **Hard decisions** come from the signs of the composite LLRs.
- **8PSK** point positions and labels are this design's own. The thesis only
  says its 8PSK was Gray-coded.
- **Not included:**
  - the random channel-bit interleaver the thesis recommends before grouping
    bits into symbols, which matters for 8PSK with 8-bit sides and not for
    the default code (no permutation is specified);
  - codes of five or more dimensions;
  - plain (non-roll) cubes;
  - two-dimensional codes;
  - shortening by forcing single information bits to zero. Shortening a
    whole dimension is supported: it is just a box with fewer planes (see
    *Changing the code size*);
  - splitting symbol bits of different reliability into separate codes.
- **Geometry check.** The number of cube planes may not exceed the rows or
  the columns, so that each plane gets its own row and column roll. The
  walker stops elaboration with an error otherwise.

## Verification

Testbenches live in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`, and all of them have a watchdog.

`hc_ref_pkg` is an independent reference model written as a class. It
provides:

- the equation lists, built directly from the geometry;
- an encoder that evaluates each parity equation;
- a decoder that stores extrinsic values uncompressed, with the same
  schedule, rounding and stopping rule.

The RTL is compared with it bit for bit.

| testbench | what it shows |
|-----------|---------------|
| `tb_hyper_code_top` | Full default size: 16x16x16 / 17x17x18. It runs four blocks: antipodal, 8PSK and 16QAM at moderate noise, and antipodal at heavy noise with a 2-cycle limit. Checked per block: the transmitted samples against the reference codeword, every decoded LLR, the cycle count, the convergence flag and the exact clock count. It counts each mechanism: every modulation, padding, early stop, cycle-limit stop, corrected errors. Runtime is about 12 s. |
| `tb_hc_workloads` | Smaller 3D+ codes with sides of 5, 7, 8, 10 and 12 information bits (6x6x7 ... 13x13x14), the 4D+ 8x8x8x9 code, and the cube 7x7x8 against the shortened box 9x9x6. The even-sided 6x6x7 and 8x8x9 codes use the modified roll rule. Same checks as above, through `hc_link_tester`. Runtime is about 35 s. |
| `tb_hc_decoder` | Decoder alone at 6x6x7: noisy codeword, cycle limit, saturating inputs, zero cycles, clock count. |
| `tb_hc_encoder` | Every channel bit against the reference encoder, every parity equation even, stream lengths and encode time, with output backpressure, at 6x6x7 and full size. |
| `tb_hc_eq_walker` | Full equation and address sequence against the reference, at 4x4x5 and full size. |
| `tb_hc_eq_walker4` | Same for the four-dimensional walker at 4x4x4x5 and 8x8x8x9, plus the roll properties: the side-4 rolls above, at most one half-side difference between any two cubes, and four or five equations through every bit. |
| `tb_hc_siso`, `tb_hc_ext_expand` | Min/second-min/location/parity on random and hand-worked equations; rebuilt and scaled extrinsic values. |
| `tb_hc_conv_test` | Scripted pass/fail sequences for the stopping rule. |
| `tb_hc_demapper`, `tb_hc_psk8_demapper` | LLRs against brute-force distance computations. |
| `tb_hc_qam_mapper`, `tb_hc_psk8_mapper` | Every label's point, and Gray adjacency. |
| `tb_hc_llr_mem`, `tb_hc_ext_mem` | Random write and full read-back. |

At full size with noise giving about 84 channel errors per block (antipodal),
the decoder corrects all of them and stops on the convergence test after 4
cycles (153749 clocks from `start` to `done`).

Running a testbench with plain Verilator 5 (package files first):

    verilator --binary --timing --assert -Wno-fatal --top-module tb_hyper_code_top \
        -y rtl -y tb rtl/hc_pkg.sv tb/hc_ref_pkg.sv tb/tb_hyper_code_top.sv
    ./obj_dir/Vtb_hyper_code_top

Use the same command for any other testbench, with its name in place of
`tb_hyper_code_top`. Only the testbenches that use the reference model need
`tb/hc_ref_pkg.sv`.

## Size

After generic coarse synthesis of `hyper_code_top` at the default size, the
design is about 1060 word-level cells and 280 flip-flop bits. Almost all of
its storage is in four memories:

| memory                 | size                    |
|------------------------|-------------------------|
| decoder LLR store      | 5202 x 10 bits          |
| extrinsic store        | 1190 x 42 bits          |
| encoder working store  | 5202 x 1 bit            |
| small tables           | a few hundred bits more |

## Changing the code size

Set `ROWS`, `COLS` and `PLANES` on `hyper_code_top` (or on the encoder and
decoder). `PLANES` must be the number of cube planes plus one. Memory depths,
address widths and the walker's roll tables all follow from these three
values. Boxes with unequal sides are accepted, and the roll rule above
applies. The decoder sizes the SISO's sign word, the extrinsic
records and its element buffer for the longest equation of the chosen code.
The larger sizes of the code family (for example 21x21x22 or 31x31x32) need
only the three parameters set, but have not been simulated.

A block is shortened by giving it fewer planes. With odd sides the zero
planes of the full cube drop out of every diagonal, so nothing else
changes. For example, an 8x8x8 information cube cut to four planes
(8x8x4 / 9x9x6) is `ROWS = COLS = 9`, `PLANES = 6`: 256 information bits
in 486, rate 0.53. It is usually better
to pick a smaller full cube instead, for example 7x7x8, with 216 bits at
rate 0.55.

For a 4D+ code also set `CUBES`: the number of information cubes plus two.
The 7x7x7x7 / 8x8x8x9 code is `ROWS = COLS = PLANES = 8`, `CUBES = 9`.
