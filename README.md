# A shared IDCT core for MPEG-2 and H.264

This core computes the 2-D inverse transform of three video standards on one
datapath:

- the MPEG-2 8x8 IDCT (cosine coefficients),
- the H.264/AVC high-profile 8x8 integer inverse transform, and
- the H.264/AVC baseline 4x4 integer inverse transform.

The standard is chosen per block by a two-bit `MODE`.

The main idea is that all three fit on one pair of 4x4 matrix multipliers:

- An 8-point 1-D transform splits into an even 4x4 product and an odd 4x4
  product, followed by one add/subtract butterfly.
- The MPEG-2 matrix and the H.264 8x8 matrix both split this way.
- The 4x4 baseline matrix simply occupies the even half.

Each 4x4 product runs on a small one-dimensional systolic array. Its
multipliers are hard-wired shift-add networks whose constants are recoded in
modified canonical signed digit (MCSD) form.

Blocks that are all zero, or that hold only a DC coefficient, skip the arrays
entirely. A FIFO at the output puts them back in order with the blocks that
were computed.

The architecture comes from a published design for a hardware-shared IDCT
(a master's thesis). The RTL here is an independent implementation. Where
the source leaves something open, this README says what was chosen; see
"Departures and open points".

## 1. The arithmetic

### Even/odd split

Write a 1-D transform as `x = M·X`, with `X` the eight coefficients of a
column. Split it into two halves:

```
g = E · [X0 X2 X4 X6]ᵀ      E[k][m] = M[k][2m]      (even half)
h = O · [X1 X3 X5 X7]ᵀ      O[k][m] = M[k][2m+1]    (odd half)
x(k)   = g(k) + h(k)        k = 0..3
x(7-k) = g(k) − h(k)
```

This identity holds for the DCT basis. It also holds for the H.264 8x8
matrix if that matrix is used as `x = Tᵀ·X`, with `T` the standard's basis
matrix (rows are basis vectors). Both standards then feed the same two 4x4
products.

In 4x4 mode the four inputs go to the even product, and its matrix is the
baseline matrix. The odd product gets zeros, and the butterfly passes `g`
through.

### Coefficients

Every coefficient is one of 15 magnitudes with a sign (`idct_pkg::kmag`):

| mode | magnitudes |
|---|---|
| MPEG-2 | A..G = ⌊cos(mπ/16)·2¹³⌋ for m = 4,1,2,3,5,6,7: 5792, 8034, 7568, 6811, 4551, 3134, 1598 (14-bit words) |
| H.264 8x8 | 8, 12, 10, 6, 4, 3 |
| H.264 4x4 | 2, 1. The standard's matrix is scaled by two so that the ½ entries become integers. |

`idct_pkg::full_coef` gives every matrix entry. The MPEG-2 entries come from
the angle `(2k+1)·n mod 32` in units of π/16.

### Shift-add multipliers

A multiplier by a constant is a sum of shifted copies of the input, one copy
per non-zero digit of the constant. `idct_csd_mult` can recode the constant
in three ways (the `RECODE` parameter):

- `REC_BINARY`: plain two's complement.
- `REC_CSD`: canonical signed digit (non-adjacent form). This gives the
  fewest non-zero digits, but it uses −1 digits even where they save nothing.
- `REC_MCSD` (default): a run of three or more ones becomes `+1 0…0 −1`.
  Shorter runs stay as ones. So a subtraction appears only where it lowers
  the number of operations. For example, 7 = 8 − 1, but 3 and 11 stay
  binary.

The digit masks are computed at elaboration (`digit_mask`), so each network
is fixed wiring.

### Rounding and word widths

| | pass 0 (columns) | pass 1 (rows) | output range |
|---|---|---|---|
| MPEG-2 | `(v + 2⁹) >>> 10` | `(v + 2¹⁷) >>> 18` | clipped to [−256, 255] |
| H.264 8x8 | none | `(v + 2¹¹) >>> 12` | saturated to 16 bits |
| H.264 4x4 | none | `(v + 2⁷) >>> 8` | saturated to 16 bits |

- **MPEG-2.** The two shifts remove the 2¹³·2¹³ coefficient scale and the
  IDCT's ¼ normalisation. The 1/√2 of the DC terms is already inside A.
- **H.264.** The shifts are exactly the standard's final `(x + 32) >> 6`.
  They also account for the integer matrix scale: 8·8 for 8x8, and 2·2 for
  the doubled 4x4 matrix.

Widths:

- Inputs are 16 bits.
- The word between the passes is 24 bits. It saturates, which only extreme
  H.264 inputs reach.
- Accumulators are 42 bits.

## 2. The systolic array (`idct_matmul4`)

Each 4x4 product `C = A·B` (A the coefficient matrix, B the data) runs on a
one-dimensional array:

- There are four stages, one per inner index k.
- Each stage has two processing elements (PEs), `idct_pe`.
- A PE at stage k adds `a(i,k)·b(k,j)` to the partial sum it receives from
  stage k−1.
- The two PEs of a stage work on the same row `i`, so they share one
  coefficient, but on two different columns.

Issue slot `t = 0..7` computes one pair of results:

```
row        i  = t mod 4
columns    j1 = (i + 2·⌊t/4⌋) mod 4,   j2 = j1 + 1 (mod 4)
```

The eight slots cover all 16 results. Slot t enters stage 0 at cycle t and
leaves stage 3 four cycles later. The first pair therefore appears 5 cycles
after `start` and the last 12 cycles after it: N + 2N for N = 4.

The coefficient of a stage changes every cycle, as `i` rotates.
`idct_coef_rom` turns `(MODE, half, i, k)` into a magnitude index and a
sign. The PE builds only the shift-add networks its column can need in some
mode (`k_used`), selects one with a multiplexer and negates it if needed.

A new product may start as soon as the last slot of the previous one has
issued, so products start every 8 cycles while the array is still full.
Each stage keeps its row of B for two products, selected by product parity
(`bmem[2]`), so the overlap needs no copying.

The even array (`PART_EVEN`) and the odd array (`PART_ODD`) are started
together and run in lock step. An assertion in `idct_top` checks this.

## 3. One block through the core

```
in ─► input_buffer ─► separation ─► matmul4 (even) ─┐
       │   (2 banks)      ▲    │       matmul4 (odd) ─┴► combination ─► transpose_mem ─┐
       │                  └────┼────────────────────────────────────────────────────────┘  pass 1
       │                       └──────────────────── (pass 1 results) ─► result buffer ─► sync_fifo ─► out
       └► zero_dc_detect ─► dc_skip ───────────────────────────────────────────────────────► sync_fifo
```

**1. Input.** `idct_input_buffer` takes four coefficients per beat, row by
row:

- An 8x8 block is 16 beats: beat `2r` carries columns 0–3 of row r, and beat
  `2r+1` carries columns 4–7.
- A 4x4 block is 4 beats.
- `MODE` is sampled on the first beat.

The buffer has two banks, so one block can be received while the previous
one is computed. `idct_zero_dc_detect` watches the same beats and stores an
all-zero flag, a DC-only flag and the DC value with the block.

**2. Bypass.** A zero or DC-only block never reaches the arrays.
`idct_dc_skip` computes its flat output value with the same fixed-point
steps as the datapath. MPEG-2 uses two multiplications by A = 5792, each
rounded as in its pass, so the bypass result is bit-identical to computing
the block. The controller pushes 8 (or 4) copies of the value into the
FIFO.

**3. Pass 0.** For each half of the block (columns 0–3, then 4–7; a 4x4
block has one half):

- The controller reads four columns, one per cycle, into the separation
  registers (`idct_separation`). These split each column into the even and
  odd 4x4 data matrices B.
- It then starts both arrays.
- The second half is loaded while the first is still in the arrays.

**4. Butterfly.** `idct_combination` takes the pairs `g(k,j)`, `h(k,j)` as
they leave the arrays. It forms `x(k)` and `x(7−k)` in one register stage
and rounds and saturates in the next. That is two cycles, matching the
source's two-cycle add/subtract step. Each cycle it writes four values into
`idct_transpose_mem`.

**5. Pass 1.** The same separation, arrays and butterfly run again, reading
the transpose memory. The result lands in a second `idct_transpose_mem`
(`TRANSPOSE=0`), the result buffer. The second pass waits until the drain
has emptied the result buffer of the previous block.

**6. Output.** The controller's drain side waits until `idct_sync_fifo` has
room for the whole block. It then pushes one row per cycle, with `out_last`
on the block's last row. Bypassed and computed blocks therefore come out in
the order they went in. This is the job of the source's "variable-length
FIFO": the two paths have very different latencies.

`idct_ctrl` holds the two state machines: compute (idle, load, start, flush,
wait for the result buffer) and drain.

## 4. Interface of `idct_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous reset, active low |
| `in_valid` / `in_ready` | in / out | 1 | input handshake: a beat moves when both are high |
| `in_mode` | in | 2 | 0 MPEG-2, 1 H.264 high profile 8x8, 2 H.264 baseline 4x4. Sampled on a block's first beat. |
| `in_data[4]` | in | 4 × 16 | four signed coefficients, row order (see 3.1) |
| `out_valid` / `out_ready` | out / in | 1 | output handshake, one row per transfer |
| `out_data[8]` | out | 8 × 16 | a row of results. Lanes 4–7 are zero for 4x4 blocks. |
| `out_last` | out | 1 | last row of a block (row 7, or row 3 for 4x4) |
| `stat_zero_skip`, `stat_dc_skip`, `stat_computed` | out | 1 | one-cycle pulse per block, telling which path it took |

Parameters:

- `RECODE` (default `REC_MCSD`) chooses the multiplier recoding.
- `FIFO_DEPTH` (default 16 rows) must hold at least one 8x8 block.

## 5. Timing

| quantity | cycles |
|---|---|
| one 4x4 product, start to last result | 12 |
| interval between products in one array | 8 |
| 4:2:0 macroblock, six dense MPEG-2 blocks, first input to last output | 374 |
| same with six H.264 high-profile 8x8 blocks | 374 |
| 4:2:0 macroblock of 24 dense 4x4 baseline blocks | 1018 (about 42 per block) |

The 400-cycle-per-macroblock budget that MPEG-2 decoding sets is met with
about 7% to spare. Bypassed blocks cost only their 16 (or 4) input beats and
their output rows.

Coarse synthesis with yosys (word-level cells, not gates) gives:

- 17,470 cells,
- 1,674 flip-flop bits,
- 10,952 memory bits.

## 6. Accuracy

MPEG-2 mode passes the IEEE 1180 accuracy test. `tb/idct_ieee1180_tb.sv`
runs 10,000 random blocks in each of three pixel ranges:

| range | peak error | peak MSE (< 0.06) | overall MSE (< 0.02) | peak mean error (< 0.015) | overall mean error (< 0.0015) |
|---|---|---|---|---|---|
| [−256, 255] | 1 | 0.0188 | 0.0163 | 0.0033 | 0.00026 |
| [−5, 5] | 1 | 0.0115 | 0.0090 | 0.0027 | 0.00020 |
| [−300, 300] | 1 | 0.0163 | 0.0140 | 0.0023 | 0.00007 |

The testbench takes its random numbers from `$urandom`, not from the
generator the IEEE procedure specifies, and it does not run the procedure's
second, sign-inverted pass.

The H.264 modes are checked bit for bit against an exact-integer model of the
matrix form of the two transforms, including the final `(x + 32) >> 6`.

## 7. Departures and open points

- **4x4 blocks use one array.** The source alternates 4x4 blocks between the
  two arrays, reaching 24 cycles per 4x4 block. Here every 4x4 block runs
  on the even array, and the odd array computes zeros. The controller also
  flushes the arrays between passes. The result is about 42 cycles per 4x4
  block.
- **Zero/DC bypass is per block.** It is decided for the whole block. The
  source may also test each half of an 8x8 block.
- **H.264 by exact matrix products.** The transforms are computed as exact
  matrix products, with the 4x4 matrix doubled and the 8x8 matrix in
  integers. The standards instead specify butterflies that halve or quarter
  some odd terms with truncating shifts (`d1 >> 1`, `b >> 2`). For such
  terms this core's results can therefore differ in the last bit from a
  conforming H.264 decoder. Matching that would take the standards'
  butterflies, not a shared matrix multiplier.
- **Truncated cosines.** The MPEG-2 cosines are truncated (floor) to 14 bits.
  This agrees with the constants the source lists, and the design passes
  IEEE 1180 with them.
- **Baseline 4x4 matrix.** It was checked against the H.264 standard
  (columns `[2 2 2 1] [2 1 −1 −2] [2 −1 −1 2] [2 −2 2 −1]` after scaling by
  two).
- **This design's own choices.** The source does not specify:
  - the handshakes, beat order and `MODE` encoding,
  - the two input banks,
  - the rounding shifts, widths, clip and saturation limits,
  - the FIFO depth and its whole-block room rule,
  - the controller state machines,
  - the reset style.
- **Not modelled.** The source's gate counts (about 72.8k gates at 125 MHz
  in a 0.18 µm process) are a property of its standard-cell implementation.
  They are not reproduced here.

## 8. Files

| file | contents |
|---|---|
| `rtl/idct_pkg.sv` | modes, widths, coefficient tables, recoding functions, rounding shifts |
| `rtl/idct_csd_mult.sv` | constant multiplier as a shift-add network |
| `rtl/idct_coef_rom.sv` | per-mode coefficient lookup: magnitude index and sign |
| `rtl/idct_pe.sv` | systolic PE: selected constant product plus partial sum |
| `rtl/idct_matmul4.sv` | 4-stage × 2-PE array, one 4x4 product per 8 cycles |
| `rtl/idct_separation.sv` | even/odd split of four columns into two 4x4 B matrices |
| `rtl/idct_combination.sv` | butterfly, rounding, saturation, write addresses |
| `rtl/idct_transpose_mem.sv` | 8x8 register array, 4 write ports; transpose or result buffer |
| `rtl/idct_input_buffer.sv` | two-bank coefficient buffer with block flags |
| `rtl/idct_zero_dc_detect.sv` | streaming all-zero / DC-only detector |
| `rtl/idct_dc_skip.sv` | bit-exact flat value of a bypassed block |
| `rtl/idct_sync_fifo.sv` | row FIFO with whole-block room test |
| `rtl/idct_ctrl.sv` | compute and drain state machines |
| `rtl/idct_top.sv` | the core |
| `tb/idct_ref.svh` | reference matrices and 2-D models shared by the testbenches |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `idct_top_tb` (end to end) and `idct_ieee1180_tb` (accuracy) |

## 9. Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. It
also has a watchdog. Run the commands from the directory that holds `rtl/`
and `tb/`, because `tb/idct_ref.svh` is included by that path.

```
verilator --binary --timing --assert -Irtl -Itb -I. \
    rtl/idct_pkg.sv $(ls rtl/idct_*.sv | grep -v idct_pkg) \
    tb/idct_top_tb.sv --top-module idct_top_tb -o sim
./obj_dir/sim
```

Swap in any other testbench name, for example `idct_ieee1180_tb` (about
2 s) or `idct_matmul4_tb`. The package must come first, and only once.

What the end-to-end testbench covers:

- 60 mixed blocks (all modes; zero, DC-only, sparse, dense and extreme
  values) with random output back-pressure;
- then one macroblock of each kind, timed.

For every block it checks:

- each output row against the reference model;
- MPEG-2 outputs against a double-precision IDCT, within 1;
- `out_last`.

It also checks that every mechanism occurred: both bypasses, all three modes
computed, mode switches, back-pressure, input stalls and saturation.

To compare the multiplier recodings, set `RECODE` on `idct_top`, or on
`idct_csd_mult` alone.
