# Multiplier-free 8x8 approximate 2D DCT engines

An exact 8-point DCT needs 64 multiplications and 56 additions, and an 8x8
2D DCT built from it needs over a thousand multiplications. Image and video
coders tolerate a slightly wrong transform, so the DCT matrix `C` can be
replaced by `C ~ D * T`, where `T` holds only 0, +-1/2, +-1 or +-2 and `D` is
a diagonal matrix of scale factors. Multiplying by `T` takes nothing but
additions, subtractions and shifts by one bit. `D` is never applied in
hardware: it folds into the quantisation step that follows any DCT.

This RTL implements seven such approximations and builds each into a
streaming 8x8 2D DCT with the row-column method:

```
 rows x[j][0..7]      +-----------+   8 words   +---------------+   8 words   +--------------+   columns Z[0..7][k]
 one per clock  ----> | 1D core T | ----------> | transposition | ----------> | 1D core T    | ---->  one per clock
                      | (rows)    |             | buffer 8x8    |             | (columns)    |
                      +-----------+             +---------------+             +--------------+
```

The result is `Z = T * X * T^T` for each 8x8 input block `X`, unscaled and at
full precision. The top level, `approx_dct2d_top`, holds all seven 2D engines
side by side. They share only the clock and reset, so their area, speed and
coding quality can be compared on the same or different data.

## The seven transforms

In every core the input vector `x0..x7` first goes through a butterfly. The
rest of the network is built from the butterfly terms:

```
s_k = x_k + x_(7-k),  d_k = x_k - x_(7-k)          k = 0..3
a0 = s0 + s3,  a1 = s1 + s2,  b0 = s0 - s3,  b1 = s1 - s2
```

| index | module              | transform                          | outputs y0..y7                                                                    | add/sub | shifts | growth G | latency L |
|-------|---------------------|------------------------------------|------------------------------------------------------------------------------------|---------|--------|----------|-----------|
| 0     | `bas2008_dct1d`     | Bouguezel-Ahmad-Swamy 2008         | a0+a1, d0+d1, b0+b1/2, -d2, a0-a1, d0-d1, b0/2-b1, -d3                             | 18      | 2      | 3        | 3         |
| 1     | `bas2011_dct1d`     | Bouguezel-Ahmad-Swamy 2011, a=1/2  | a0+a1, d0+d1, b0+a*b1, d2, a0-a1, d3, d0-d1, a*b0-b1                               | 18 (16 for a=0) | 2 | 3   | 3         |
| 2     | `cb2011_dct1d`      | Cintra-Bayer 2011                  | a0+a1, d0+d1+d2, b0, d0-d2-d3, a0-a1, d0-d1+d3, -b1, -d1+d2-d3                     | 22      | 0      | 3        | 3         |
| 3     | `mcb2011_dct1d`     | modified Cintra-Bayer (2012)       | a0+a1, d0, b0, -d2, a0-a1, -d1, -b1, -d3                                           | 14      | 0      | 3        | 3         |
| 4     | `potluri2012_dct1d` | Potluri et al. 2012                | a0+a1, 2d0+d1+d2, 2b0+b1, d0-2d2-d3, a0-a1, d0-2d1+d3, b0-2b1, -d1+d2-2d3           | 24      | 6      | 4        | 4         |
| 5     | `potluri2014_dct1d` | Potluri et al. 2014                | a0+a1, d1, b0, d0, a0-a1, d3, -b1, d2                                              | 14      | 0      | 3        | 3         |
| 6     | `vaithy2014_dct1d`  | Vaithyanathan (Dhandapani) 2014    | s0, s0+s1, s2, s2+s3, d2+d3, d2, d0+d1, d0                                         | 12      | 0      | 2        | 2         |

Each module's header comment spells out its full 8x8 matrix. The index is
the value of `approx_dct_pkg::dct_kind_e`, and it is also the engine's
position in the top level. G is the number of bits one pass adds (the log2
of the largest row sum of `|T|`). L is the pipeline depth in clocks.

Vaithyanathan-2014 is the cheapest: 12 additions, 2 pipeline stages and only
2 bits of growth. Unlike the others, it is not ordered like a DCT spectrum:
its rows are sums and differences of butterfly terms, not frequency-ordered
cosines. It is the default kind of `approx_dct2d`.

### Inside a 1D core

Every core is a fixed pipeline with one register stage per adder level:

1. The butterfly (`s_k`, `d_k`).
2. The second-level terms (`a0`, `a1`, `b0`, `b1`, and for some transforms
   a first odd-part sum).
3. The last sum and difference (and, for Potluri-2012, a fourth level).

Outputs that are ready early are carried through registers, so all eight
coefficients of one input vector leave in the same cycle, `L` clocks after
it entered. A new vector can enter every clock. A one-bit valid travels
beside the data. `rst_n` (synchronous, active low) clears only that valid
pipeline; the data registers are not reset.

Number format: samples are two's complement. The default input width
`IN_W = 8` suits pixels level-shifted by -128. Every output is `IN_W + G`
bits wide, which always holds the exact result. A factor 1/2 is an
arithmetic right shift, so BAS-2008 and BAS-2011 (a = 1/2) round those
coefficients toward minus infinity and keep no fraction bit. A factor 2 is
a left shift, which is just wiring.

`bas2011_dct1d` has a parameter `A_MODE` (`A_ZERO`, `A_HALF`, `A_ONE`).
It selects the value of `a` and therefore whether the `a*b` terms are
dropped, shifted or added as they are.

## The transposition buffer

The row core delivers one transformed row per clock, eight words wide. The
column core needs one column per clock. `transpose_buffer` sits between them
and is the only part of the design with state beyond a pipeline. It is built
from the classic parts of a row-parallel transposer:

- an N x N array of registers (N = 8);
- N output multiplexers, each choosing one of N registers;
- a counter that steers the writes and the multiplexers.

It holds a single block, with no second bank, yet accepts a new row every
clock with no stall. It does this by writing alternate blocks in alternate
orientations:

- **Block A is written row-wise.** Row `j` goes into register row `j`.
  Once its last row is in, it is read column by column, and column `k` is
  register column `k`.
- **Block B, which follows, is written column-wise.** Its row `k` goes into
  register column `k`. That is the very line that reading column `k` of
  block A freed in the same cycle or earlier. A register read and written
  in the same clock gives out its old value.
- **Block C is row-wise again**, and it is read from the lines that block B
  frees. The pattern repeats.

Reading starts in the cycle after a block's last row is written and always
takes exactly N cycles. The rows of the next block arrive at most one per
clock and start no earlier. The write counter therefore can never overtake
the read counter, so no row lands on a word that has not been read yet. An
assertion (`no_overwrite_unread`) checks this during simulation.

Ports and timing:

- `in_valid`/`in_row`: rows `0..N-1` of each block, in order. Idle cycles
  are allowed anywhere, inside a block or between blocks.
- `out_valid`/`out_col`/`out_idx`: column `k = out_idx` of the block, on N
  consecutive cycles. Column `k` appears `1 + k` cycles after the block's
  last row was clocked in.
- `out_col` is read through the multiplexers without a register. Read-out
  runs on its own once a block is complete; there is no back-pressure input.

State: 64 words, a 3-bit write counter, a 3-bit read counter, two
orientation bits and a busy flag.

## The 2D engine and the top level

`approx_dct2d #(KIND, COL_KIND = KIND, IN_W = 8, A_MODE = A_HALF)` chains a
row core, the transposition buffer and a column core:

- The intermediate words are `IN_W + Gr` bits wide; the outputs
  `IN_W + Gr + Gc` bits (Gr, Gc: growth of the row and column transforms).
- Row and column transforms are normally the same. `COL_KIND` may name a
  different one, and then `Z = Tc * X * Tr^T`.
- A column index (`out_idx`) travels beside the column core, so each output
  column is labelled.

Timing, with core latencies `Lr` and `Lc`:

- Column `k` of a block leaves `Lr + 1 + k + Lc` cycles after the block's
  last row entered.
- With rows back to back, that is `Lr + Lc + 8` cycles from row 0 to
  column 0 (12 cycles for Vaithyanathan-2014, 16 for Potluri-2012).
- Blocks can follow each other without a gap, so the sustained rate is one
  8x8 block per 8 clocks.

To transform columns first instead of rows, feed the block's columns in
place of its rows. The engine then outputs the rows of `Z^T`; no other
hardware is needed.

`approx_dct2d_top #(IN_W = 8, OUT_W = IN_W + 8)` holds seven engines, each
using the same transform on rows and columns, with BAS-2011 at a = 1/2. Its
ports are arrays indexed by the engine number (table above):

- `in_valid[e]`, `in_row[e][0..7]`
- `out_valid[e]`, `out_col[e][0..7]`, `out_idx[e]`

Outputs are sign-extended to the common width `OUT_W`, which is 16 bits by
default. That fits the widest engine, Potluri-2012 (8 + 2*4 bits).

## How far to trust it, and where it departs from the source design

Checked by simulation:

- **1D cores.** Every core is compared, coefficient by coefficient, with a
  plain matrix-vector product. The matrices are typed entry by entry in
  `tb/dct_ref_pkg.sv`, independently of the adder networks. The runs cover
  all-minimum, all-maximum, alternating and ramp vectors plus random ones.
  The exact latency is checked as well.
- **2D engines.** They are compared with a rows-then-columns reference,
  including the rounding of the halving transforms. The checks cover
  streams of back-to-back blocks, pauses inside and between blocks, and the
  column index and latency of every output column.
- **Transposition buffer.** It is checked on its own, with the same kinds
  of traffic.

For each block, a deliberately broken copy of the module (a wrong sign, a
missing shift, a wrong index, a buffer that never changes orientation) makes
its testbench fail.

Not checked: timing closure, area and power on an FPGA. The RTL has only
been simulated and synthesised generically.

Choices made here, where the source design leaves the point open or draws
it differently:

- **Word widths, signedness and rounding** are not given by the source
  design. Inputs are 8-bit two's complement, results keep full precision,
  and halves round toward minus infinity.
- **Output order.** The printed architecture drawings label some odd
  outputs in another order than the transform matrices. This RTL numbers
  the outputs by matrix row: `y_k` is row `k` of `T`.
- **Vaithyanathan-2014, row 4.** It is taken as `[0 0 1 1 -1 -1 0 0]`,
  i.e. `y4 = d2 + d3`. That is the reading consistent with the transform's
  count of 12 additions and with its adder network.
- **BAS-2011 parameter `a`.** Its value is not stated. The architecture
  drawing has shifters in the `b0`/`b1` path, which only `a = 1/2` needs,
  so that is the default. It costs 18 additions; the 16-addition figure
  quoted for this transform holds for `a = 0`, which `A_MODE = A_ZERO`
  selects.
- **Pipeline depth.** Some published drawings register some outputs fewer
  times than others, and Potluri-2012 leaves its even outputs unregistered.
  Here every output of a core has the same latency.
- **Negated terms** such as `-d2` are written as negations in the last
  register stage. A synthesis tool may fold them into the preceding
  subtraction.
- **Transposition buffer control.** The published circuit draws a
  shift-register array whose multiplexer selects come from one counter
  through a chain of delay registers, but does not say how they are
  sequenced. This design keeps the register array, the eight 8-input
  multiplexers and the counter. It replaces the shift chains and the delayed
  selects with the alternating-orientation scheme above, which is fully
  specified and streams without a second bank.
- **Handshake and reset.** The valid signals, the column index and the
  synchronous active-low reset are additions of this design.
- **The diagonal scale matrix `D`** of each transform is not implemented,
  as is usual for these approximations. The 2D output of engine `e` must be
  scaled by `D_e[u] * D_e[k]` (or the quantiser adjusted) to approximate the
  true DCT.

## Files

`rtl/` holds the design:

| file                  | contents                                                       |
|-----------------------|----------------------------------------------------------------|
| `approx_dct_pkg.sv`   | `dct_kind_e`, `bas_a_e`, `growth()`, `latency()`               |
| `*_dct1d.sv`          | the seven 1D cores                                             |
| `approx_dct1d.sv`     | picks one core by `KIND`                                       |
| `transpose_buffer.sv` | the transposition buffer                                       |
| `approx_dct2d.sv`     | one 2D engine                                                  |
| `approx_dct2d_top.sv` | all seven engines                                              |

`tb/` holds the testbenches:

- `tb_<module>.sv` is one per module. Each prints
  `TB_RESULT checks=N failures=M` and stops itself with a watchdog.
- `dct_ref_pkg.sv` holds the reference matrices and the 1D and 2D models.
- `dct2d_harness.sv` is the stimulus and checker for one 2D engine.
- `tb_approx_dct2d_top.sv` runs the whole top level at its default
  parameters.

## Simulating

Verilator 5 runs any testbench. For example, the whole design:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/approx_dct_pkg.sv tb/dct_ref_pkg.sv tb/tb_approx_dct2d_top.sv \
    --top-module tb_approx_dct2d_top
./obj_dir/Vtb_approx_dct2d_top
```

Replace the last file and the top-module name to run another testbench. The
packages must come first on the command line; `-y rtl -y tb` finds
everything else. Every run finishes in a few seconds.

To change the design:

- **Sample width.** Set `IN_W` on the top level, or on one engine. All
  other widths follow from it.
- **A new approximation.** Add a core with the same ports, then a value to
  `dct_kind_e`, its growth and latency to the package, and a branch to
  `approx_dct1d`.
