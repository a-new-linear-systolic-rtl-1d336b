# Linear systolic array for the 2-D inverse DST

This RTL computes the two-dimensional inverse discrete sine transform of an N x N block, for
prime N (default N = 11), with two identical linear systolic arrays. The arrays have their I/O
channels only at their two ends. Each 1-D transform becomes a circular correlation of length
(N-1)/2. A linear chain of (N-1)/2 processing elements (PEs), one multiplier each, evaluates
that correlation. The 2-D transform is done row-column: a row processor, a transpose memory, and
a column processor, all timed by one control block.

```
            rows of X                      Z = row transforms          columns of Z
 in_data ──► [ 1-D IDST processor ] ──► [ transpose memory ] ──► [ 1-D IDST processor ] ──► out_data
              pre ─► array ─► post        2 banks of N x N          pre ─► array ─► post
                   ▲                            ▲                         ▲
                   └──────── sign codes, enable, addresses (idst_ctrl) ───┘
```

## What is computed

1-D (the DST-III):

    x(k) = sum_{i=1..N} Y(i) * sin((2k+1) * i * a),   a = pi / (2N),   k = 0..N-1

2-D, on a block X(i, j), i, j = 1..N:

    x(k,l) = sum_i sum_j X(i,j) * sin((2k+1) i a) * sin((2l+1) j a)

The row processor transforms each row over j. The column processor then transforms each column
of that result over i.

## From the IDST to a circular correlation

This is the core of the design. Read it before the array.

1. **Recursion.** Adding neighbouring outputs removes the odd factor:
   x(k) + x(k-1) = 2 * sum_i Yc(i) sin(2 k i a), with Yc(i) = Y(i) cos(i a).
   So the design computes T'(k) = sum_{i=1..N-1} Yc(i) sin(2 k i a) for k = 1..N-1, and then
   gets x(0) = sum_i Y(i) sin(i a) and x(k) = 2T'(k) - x(k-1). The i = N term drops out of T'
   because cos(N a) = 0; it enters only x(0).
2. **Index permutation.** sin(2 k i a) = sin(pi k i / N). Reducing k*i modulo N gives
   (-1)^floor(k i / N) * s(<k i>_N), where s(r) = sin(pi r / N). Take a primitive root G of N
   and write k = <G^k'>, i = <G^i'>. The matrix s(<G^(k'+i')>) is then a Hankel matrix: every
   row is the previous row rotated by one.
3. **Folding.** G^((N-1)/2) = -1 mod N, and s(N - r) = s(r). So columns i' and i' + M,
   M = (N-1)/2, have the same coefficient. They are merged into one column whose operand is
   Yc(<G^i'>) + Yc(<G^(i'+M)>) or Yc(<G^i'>) - Yc(<G^(i'+M)>), possibly negated. The
   correlation is then an (N-1) x M matrix, and its coefficients repeat with period M.
4. **Sign codes.** Each matrix entry carries a 2-bit code {minus, diff}, with
   psi(k',i') = floor(<G^k'> <G^i'> / N):
   minus = psi(k',i') mod 2, and diff = (psi(k',i') xor psi(k',i'+M)) mod 2.
   `idst_pkg::sign_code` computes them when the design is elaborated.

For N = 11 and G = 2, the rows give T'(2), T'(4), T'(8), T'(5), T'(10), T'(9), T'(7), T'(3),
T'(6), T'(1). The pairs are (2,9), (4,7), (8,3), (5,6), (10,1), and the coefficient sequence
is s(4), s(8), s(5), s(10), s(9). The `tb_idst_ctrl` testbench holds the full 10 x 5 sign table
as a typed-in reference.

## The systolic array (`idst_array`, `idst_pe`)

Each PE holds one folded column: the sum and difference operands in internal registers x_i1
and x_i2. Each enabled cycle it computes

    y' = y + x*c  or  y - x*c,    x = x_i1 (sum) or x_i2 (difference)

The sign code supplied from above (`sign[j-1]` for PE j) chooses between them. The PE also
passes x_e1, x_e2, c and the tag t_c on to its left neighbour.

**Tag-controlled loading.** A transform's operands flow in at the right-hand end together with
a single tag bit, `tc`. A PE that sees t_c = 1 uses x_e1/x_e2 directly in that cycle and loads
them into x_i1/x_i2. From then on it uses the stored values. This lets all operand loading
happen through the end of the array.

**Stream speeds.** This is the part that makes the array work:

| stream               | registers per PE hop | speed              |
|----------------------|----------------------|--------------------|
| y (partial sum), t_c | 1                    | one PE per cycle   |
| x_e1, x_e2, c        | 2 (PE register plus one link register) | one PE per two cycles |

Because the tag moves faster than the operands, it overtakes them. It meets the pair of column
i = M+1-j in PE j, so PE 1 holds the last column and PE M the first. The coefficient stream is
the period-M sequence s(<G^1>), s(<G^2>), ... Moving at half speed, it meets row k in PE j
exactly when that PE needs s(<G^(i+k)>).

**Schedule**, counted in enabled cycles, with tau0 = the cycle in which the tag is presented:

| event                                          | cycle                         |
|------------------------------------------------|-------------------------------|
| pair of column i presented (i = 1..M)          | tau0 - M + i (tag with i = M) |
| row k in PE j                                  | tau0 + (k-1) + (j-1)          |
| sign code needed by PE j                       | row k = (cycle - tau0 - j + 2) mod 2M + 1, column M+1-j |
| coefficient presented in cycle tau             | s(<G^(1 + (tau - tau0) mod M)>) |
| T'(<G^k>) on `y_o`                             | from tau0 + M - 1 + k         |

A new transform can start every N-1 = 2M enabled cycles. Its pairs enter while the previous
transform's rows are still in the array; the tag keeps them apart.

## Frames and the freeze cycle (`idst_ctrl`)

One block has N input samples and N results, but the array needs only N-1 cycles per transform.
The design therefore works in frames of N cycles. A free-running phase counter runs
0..N-1 and is shared by both processors. The arrays are clock-enabled in phases 0..N-2 and
frozen in phase N-1.

Counted in enabled cycles, every frame is exactly 2M long. As a result:

- the coefficient stream and the sign codes depend only on the phase (small ROMs);
- the coefficient stream stays aligned with every transform, however blocks are spaced.

A design without the freeze, at a period of N cycles, would misalign the period-M coefficient
stream between consecutive transforms.

Timing of one 1-D processor (`idst1d`):

| frame | activity                                                                          |
|-------|-----------------------------------------------------------------------------------|
| f     | Y(1..N) arrive, Y(phase+1) per cycle; Yc stored, x(0) accumulated                 |
| f+1   | pairs sent in phases 0..M-1, tag in phase M-1; first T' leaves the array in phase N-2 |
| f+2   | remaining T' values collected (last one in phase N-3)                             |
| f+3   | x(0..N-1) leave, x(phase) per cycle, `out_valid` high                             |

The latency is 3N cycles, and a new block can enter in every frame.

## Pre- and post-processing (`idst_pre`, `idst_post`)

**Pre-processing** uses one multiplier per sample for Yc(i) = Y(i) cos(i a), and one for
Ys(i) = Y(i) sin(i a), which is summed into x(0). Yc values go into a fill buffer. At the
end of the frame the fill buffer is copied to a hold buffer. During the next frame, the hold
buffer is read in G-power order, and an adder and a subtractor form the pair of each column.
The coefficient ROM (M sines, indexed by phase) also lives here.

**Post-processing** writes each T'(<G^k>) at its natural address <G^k>, so the permutation is
undone by addressing alone. In the output frame it runs x(k) = 2T'(k) - x(k-1). Two T' buffers
alternate between blocks.

With this schedule the only overlap between a block being read and the block two later is one
write. That write goes to address <G> in phase N-2, when only address N-1 is still to be read.
A primitive root is never N-1, so the two never touch the same address.

## 2-D organisation (`idst2d`, `idst_tm`)

- **Input.** One row per frame. `frame_phase` tells the source where the frame is. A row
  X(r, 1..N) goes in during phases 0..N-1 with `in_valid` high for the whole frame. Rows of a
  block come in order, and empty frames are allowed between rows.
- **Transpose memory.** The control logic counts the row processor's valid output frames and
  writes row r into the write bank. When a bank holds N rows, it is read one column per frame,
  starting in the very next frame. The second bank fills meanwhile, so back-to-back blocks need
  no gap.
- **Output.** Column by column: frame l carries x(0..N-1, l). `out_first` marks x(0,0) of each
  block.
- **Latency.** First output sample 7 frames after the block's last row went in. For gapless
  rows that is (N+6)*N cycles (187 cycles for N = 11).
- **Throughput.** One N x N block per N frames (N^2 cycles).

Both arrays receive the same sign codes and enable, because they run the same schedule in the
same frames.

## Number formats and accuracy

| quantity                 | format (defaults: N = 11, IN_W = 12)                                  |
|--------------------------|-----------------------------------------------------------------------|
| input Y                  | IN_W-bit signed integer                                               |
| coefficients             | 20-bit, 18 fractional bits (`CW`, `CF` in `idst_pkg`), rounded       |
| data path                | 8 fractional bits (`FB`); every product rounded half up              |
| 1-D output               | IN_W + clog2(N) + 1 bits, integer, rounded (17 bits)                  |
| 2-D output               | 1-D output width + clog2(N) + 1 (22 bits)                             |

The 1-D output is within 1 LSB of the exact transform; this was tested at N = 5, 7, 11 and 13.
In the 2-D result, the row stage's rounding is carried through the column transform. The
end-to-end test therefore allows 1 + sum_i |sin((2k+1) i a)| LSB.

The output recursion x(k) = 2T'(k) - x(k-1) adds up the errors of all earlier T' values, so
the accuracy depends mainly on the coefficient precision. With 14 fractional bits, errors of
about 1.3 LSB appeared at N = 11 to 17, which is why `CF` is 18. Raising `FB` alone does not
help.

## Design choices beyond the original description

The original description gives the algorithm, the PE function, the array with its input
sequences for N = 11, and the block diagram of the 2-D processor. These are this design's own:

- **Index range.** x(k) uses Y(1..N) (DST-III). Only with that range do the x(0) sum and the
  recursion reproduce the transform exactly.
- **Link registers.** The one-register-per-hop link delay on x_e1, x_e2 and c. It is inferred
  from the marks on the links in the array drawing and from the published input sequences,
  which only work with this timing.
- **Frame scheme.** The frame scheme and the freeze cycle. The array alone still processes one
  transform per N-1 enabled cycles, but at the I/O a 1-D transform takes N cycles, not the
  N-1 cycles quoted for the array.
- **Supporting blocks.** All widths and rounding, the reset, the buffers in pre- and
  post-processing, the transpose memory organisation, and the output order.
- **Multiplier count.** Pre-processing uses two multipliers (cos and sin), so a processor has
  (N-1)/2 + 2 multipliers, one more than the count quoted for the architecture.
- **Not built.** The "two-level pipelining" (pipelining inside the PEs) is mentioned in the
  original description without detail and is not built. Each PE is one pipeline stage with a
  multiply-add in it.

## Modules

| file                 | role |
|----------------------|------|
| `rtl/idst_pkg.sv`    | widths, `powmod`, coefficient quantisation, `sign_code` |
| `rtl/idst_pe.sv`     | processing element |
| `rtl/idst_array.sv`  | (N-1)/2 PEs plus link registers |
| `rtl/idst_pre.sv`    | Yc/Ys, x(0), pair formation in G-power order, tag, coefficient stream |
| `rtl/idst_post.sv`   | reorder, recursion, rounding |
| `rtl/idst1d.sv`      | pre + array + post |
| `rtl/idst_ctrl.sv`   | phase, enable, sign ROM, transpose-memory addresses |
| `rtl/idst_tm.sv`     | two-bank N x N transpose memory |
| `rtl/idst2d.sv`      | top level |

**Parameters.** `N` (prime) and `G` (a primitive root of N) can be changed together, for
example N = 7 with G = 3, or N = 13 with G = 2. `IN_W` sets the input width. All tables are
recomputed at elaboration.

## Simulation

Each testbench is self-checking and ends with a `TB_RESULT checks=... failures=...` line.
Testbench → what it checks:

- `tb_idst_pe` → the PE against a register-level model.
- `tb_idst_array` → the array with random stalls, against floating-point correlation values and
  the output timing.
- `tb_idst_pre` → pairs, tag, x(0) and the coefficient stream.
- `tb_idst_post` → exact integer recursion, with garbage in frozen cycles.
- `tb_idst_ctrl` → the sign table and the memory addressing.
- `tb_idst_tm` → transposition with ping-pong banks.
- `tb_idst1d` → the 1-D transform against floating point, with 3-frame latency and gaps, for
  (N, G) = (11, 2), (5, 3), (7, 3) and (13, 2). Each configuration runs in an instance of the
  helper `tb/tb_idst1d_run.sv`, which must be added to the command line.
- `tb_idst2d` → the full 11 x 11 2-D transform at default parameters, with gaps and
  back-to-back blocks, latency and `out_first`. It also counts that every mechanism occurred:
  tag loads, freeze cycles with data in flight, both memory banks, chained bank reads, empty
  input frames.
- `tb_idst2d_sizes` → the 2-D transform end to end at (N, G) = (5, 3), (7, 3) and (13, 2), three
  blocks each, with accuracy, latency and `out_first` checks. It uses the helper
  `tb/tb_idst2d_run.sv`.

With plain Verilator (5.x), from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/idst_pkg.sv \
    rtl/idst_pe.sv rtl/idst_array.sv rtl/idst_pre.sv rtl/idst_post.sv rtl/idst1d.sv \
    rtl/idst_ctrl.sv rtl/idst_tm.sv rtl/idst2d.sv tb/tb_idst2d.sv --top-module tb_idst2d
./obj_dir/Vtb_idst2d
```

Replace the testbench file and `--top-module` to run another test. For `tb_idst1d` and
`tb_idst2d_sizes`, also list the matching `_run` helper and add `-Itb`. The package must come
first on the command line. All testbenches finish in well under a second.
