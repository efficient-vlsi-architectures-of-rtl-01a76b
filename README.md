# Lifting-based (9,7) discrete wavelet transform: systolic 1-D datapath and line-based 2-D frameworks

The 2-D discrete wavelet transform of JPEG2000 lossy coding uses the (9,7)
biorthogonal filter pair. Computed directly, it needs many multipliers. It also
needs a large amount of memory, because the column filter needs many rows of
row-filtered data at once. This RTL follows the architecture of C.-T. Huang,
P.-C. Tseng and L.-G. Chen, "Efficient VLSI Architectures of Lifting-Based
Discrete Wavelet Transform by Systematic Design Method". The idea is as follows:

* Factor the filter into lifting steps. In each step, a sample of one parity
  receives a scaled sum of its two neighbours of the other parity.
* Map the chain of lifting steps onto a systolic array of identical small
  processing elements (PEs). Each PE has one multiplier and two adders.
* Use the same 1-D array twice, once as a row filter and once as a column
  filter. Between them sits a small rotating line buffer. The column filter's
  temporal registers move into line memories, one word per column.

The result for one 2-D level is 10 multipliers, 16 adders and about 7N words of
two-port memory for an image N pixels wide. A multi-level version shares those
ten multipliers across all decomposition levels.

Two complete designs are provided, and `dwt_top` places them side by side:

| module            | what it computes                          | input rate            |
|-------------------|-------------------------------------------|-----------------------|
| `dwt2d_one_level` | one 2-D level (LL, LH, HL, HH)            | two pixels per cycle  |
| `dwt2d_ml`        | J dyadic levels (default 5), shared datapath | one pixel per cycle |

## 1. The arithmetic

The (9,7) filter is factored into two predict steps and two update steps, then
a scaling. For a line x[0..N-1]:

```
d1[n] = x[2n+1] + alpha * (x[2n]   + x[2n+2])      alpha = -1.586134342
s1[n] = x[2n]   + beta  * (d1[n-1] + d1[n])        beta  = -0.05298011854
d2[n] = d1[n]   + gamma * (s1[n]   + s1[n+1])      gamma =  0.8829110762
s2[n] = s1[n]   + delta * (d2[n-1] + d2[n])        delta =  0.4435068522
low[n] = zeta * s2[n],  high[n] = d2[n] / zeta     zeta  =  1.149604398
```

Every step is symmetric, so each step needs one multiplication per output
sample.

Fixed point (defined in `dwt_pkg`; these are this design's choices):

* Samples are signed, `DATA_W` = 24 bits, with `FRAC` = 6 fraction bits.
  Pixels are 8-bit unsigned. A pixel enters as `pixel << 6`.
* Coefficients are `round(c * 2^14)` in 16 bits. The package holds them as
  integer constants. If you change `CF`, recompute them.
* Each PE computes `A + floor(coef * (B + C) / 2^14)`. The result wraps to
  24 bits. There is no saturation.
* Lines are extended symmetrically at both ends, so x[-1] = x[1] and
  x[N] = x[N-2]. The same rule applies at the top and bottom of a frame. The
  published architecture says lifting makes boundary extension easy but names
  no rule. This design uses symmetric extension.

Scaling is applied once, after the column filter. In 2-D the row and column
factors combine:

* LL is multiplied by zeta².
* HH is multiplied by 1/zeta².
* LH and HL get zeta · 1/zeta = 1, so they pass unchanged.

That takes exactly two multipliers (`scale_unit`). This is how the 2-D design
reaches 10 multipliers: 4 in the row filter, 4 in the column filter and 2 for
scaling.

## 2. The processing element (`lift_pe`)

There are four PE categories. They cover any lifting step that has at most two
taps.

| category       | output                     | used for                        |
|----------------|----------------------------|---------------------------------|
| (a) `PE_SYM`   | D = A + alpha·(B + C)      | symmetric steps: all four (9,7) steps |
| (b) `PE_ANTI`  | D = A + alpha·(B − C)      | anti-symmetric steps            |
| (c) `PE_SINGLE`| D = A + alpha·B            | one-tap steps                   |
| (d) `PE_GENERAL`| D = A + beta·B + alpha·C  | general two-tap steps (2 multipliers) |

In (d), the ± between the two products is carried by the sign of alpha. The
1-D chain below builds every step from category (a). Categories (b) to (d)
exist and are tested, but no datapath here uses them.

## 3. The systolic 1-D chain (`lift_core`, `lift_1d`)

This is the part that needs the most care. The chain takes one odd/even pair
per cycle and returns one low/high pair per cycle.

**Input pairing.** In slot k of a line, the pair is (x[2k−1], x[2k]): the odd
sample *before* the even one. In slot 0 the odd input has no partner in the
current line. It carries the previous line's last odd sample x[N−1], and that
line's final predict step still needs it. As a result, every line takes
exactly N/2 slots and lines follow each other without bubbles.

**Datapath.** Let y0 be the even input and yi the output of PE i. Each PE i
has one register, st[i−1], which holds y(i−1) from the previous slot. The PE
inputs are:

* A = odd input for PE 1, and st[i−2] for PE i > 1.
* B = st[i−1].
* C = y(i−1).

For (9,7) this gives four PEs and four registers. The registers hold, in
order: the previous even sample, d1, s1 and d2. The critical path runs through
all four PEs. Low = y4 and high = y3.

**Timing.** In slot k the chain produces positions that trail the input: d1
at 2k−1, s1 at 2k−2, d2 at 2k−3 and s2 at 2k−4. So the outputs in slot k are
low and high coefficient number k−2. Coefficients 0 to N/2−3 of a line come
out in slots 2 to N/2−1. The last two come out in slots 0 and 1 of the next
line.

**Boundaries.** Each PE mirrors one operand in one fixed slot:

| PE | step | mirrors | in slot | meaning                         |
|----|------|---------|---------|---------------------------------|
| 1  | d1   | C := B  | 0       | x[N] = x[N−2] (previous line's end) |
| 2  | s1   | B := C  | 1       | d1[−1] = d1[0] (line start)     |
| 3  | d2   | C := B  | 1       | s1 past the end = last s1 (previous line's end) |
| 4  | s2   | B := C  | 2       | d2[−1] = d2[0] (line start)     |

In general, PE 2p+1 mirrors in slot p and PE 2p+2 mirrors in slot p+1.
`lift_core` accepts any even number of steps and any coefficients
(`STEPS`, `COEFS`). The 2-D designs use STEPS = 4 with the (9,7)
coefficients. The 1-D testbench also runs a two-step chain with the (5,3)
lifting coefficients −1/2 and 1/4, plain and pipelined.

**Pipelined form.** With `PIPE` = 1, `lift_1d` puts a register after every
PE, so the critical path is a single PE instead of four. PE i then works i−1
slots behind the input:

* Its C operand is the previous PE's output, registered once.
* B is that value registered twice.
* A is the output of the PE two places back, registered three times. For
  PE 2 it is the even input, registered twice.

That takes 3·STEPS − 2 registers: 4 for a two-step filter and 10 for (9,7).
The outputs arrive STEPS − 1 slots later (slot j + 5 for coefficient j). The
mirror slot of PE i moves i − 1 slots later. `dwt2d_one_level` offers the same option for both of its filters. There,
each column's state grows from 4 to 10 words, so the temporal buffer grows
from 4N to 10N words. The multi-level design uses only the plain chain.

`lift_1d` is the row filter in its stand-alone form. It holds the temporal
registers and the slot counter, and provides `valid_o` and `idx_o` for the
outputs. The final `STEPS/2` outputs of a line come out only when the next
line's first pairs are pushed. After the last line, push two pairs of any
value (five when pipelined).

## 4. The one-level 2-D framework (`dwt2d_one_level`)

```
pixels (even, odd) -> [odd delay] -> row filter (lift_1d)
      -> intermediate buffer (6 x N/2, rotating)
      -> column filter (col_filter) <-> temporal buffer (4 x N)
      -> scale_unit -> LL/LH or HL/HH pair
```

**Row side.** Pixel pairs arrive in raster order, one pair per enabled cycle.
A single register delays the odd pixel to form the (x[2k−1], x[2k]) pairs. In
every cycle, the row filter writes one low word and one high word, column c of
row r, into memory pair r mod 3 of the intermediate buffer.

**Column side.** The column filter runs the same four-PE chain vertically. A
column slot m combines rows 2m−1 and 2m. Each column has its own state, so the
four registers become four memories of N words (`temporal_buffer`). Low-band
column c uses word c and high-band column c uses word N/2 + c. A column's four
words are read in one cycle and written back, updated, in the next.

**Schedule.** The column filter runs in lockstep with the row filter. In the
cycle the row filter writes column c of row r, the column filter reads column c
of:

| row r being written | band read | rows read  | memories            |
|---------------------|-----------|------------|---------------------|
| odd                 | low       | r−2, r−1   | the two not written |
| even                | high      | r−3, r−2   | row r−3's memory is the one being written |

In the even case, the memory is read at the same address and in the same cycle
as the write. The memory returns the old word (read before write), so the
read is correct. This is why three memories per band are enough. Each row pair
is column-filtered during the two row times that follow it: the low band in
the first, the high band in the second.

**Output.** The output is one coefficient pair per enabled cycle:

* `out_band` = 0 gives LL and LH.
* `out_band` = 1 gives HL and HH.

`out_row` and `out_col` give the position within the M/2 × N/2 subbands. Within
a frame the order is: output row 0 low-band columns, output row 0 high-band
columns, output row 1 low-band columns, and so on.

**Timing.**

* The first output of a frame arrives 5·N/2 + 4 enabled cycles after the frame
  starts. It needs input rows 0 to 5, the two-slot delay of the row filter, a
  buffer read and a column compute.
* After that, output n arrives exactly n enabled cycles later.
* A frame's last coefficients need about 5 rows of the next frame (or filler)
  to be pushed.
* `in_valid` low freezes every register and memory (a stall). Nothing is lost.

**Memory.** The intermediate buffer holds 3N words and the temporal buffer 4N
words, 7N words in total.

**Pipelined option.** With `PIPE` = 1, both filters use the one-PE-deep
pipelined chain (section 3). The schedule is the same, with LAT = 5
instead of 2:

* The first output arrives after (2·LAT + 1)·N/2 + LAT + 2 enabled cycles.
* The temporal buffer holds 10N words.
* Frames need M/2 > LAT + 1, that is, at least 14 rows.

## 5. The multi-level framework (`dwt2d_ml`)

This version computes J levels with a single row datapath and a single column
datapath, both shared by all levels. The LL band of each level, after
scaling, is the input image of the next level.

* **Per-level state (`ml_level`).** Each level has:
  * A small pair FIFO for its input.
  * Its own four row registers. This is the row "register buffer", J × 4
    words.
  * Its slot and row counters and its pending column request.
  * An intermediate buffer and a temporal buffer sized for its own width
    N/2^(j−1).

  Total line memory is (3 + 4) · N · (1 + 1/2 + … + 1/2^(J−1)) words. For
  N = 512 and J = 5 that is 6944 words, just under the 14N limit.
* **Schedule.** A free-running counter c assigns each cycle to one level:
  * Level 1 gets the even cycles.
  * Level 2 gets cycles with c ≡ 1 (mod 4).
  * Level 3 gets cycles with c ≡ 3 (mod 8), and so on.
  * Level J also takes the one leftover cycle of every 2^J.

  In its cycle, a level makes one step of the one-level schedule if a pair is
  waiting in its FIFO. The shared datapaths and scaling unit are multiplexed
  onto that level's state. This is a static form of the recursive pyramid
  algorithm. Level 1 keeps up with one pixel per cycle. Each deeper level gets
  exactly its share of cycles. The FIFOs absorb the bursts of the LL band, which
  appears only in every other row time of the level above.
* **Output.** `out_level` (1..J) tags each coefficient pair. The band, row and
  column fields are as in section 4. LL pairs of levels below J also appear on
  the output, although the design consumes them internally. `overflow` is a
  sticky flag for input faster than one pixel per cycle.
* **Flushing.** Each level needs the start of the next frame to flush its
  last rows. Two filler frames always empty all levels.

## 6. Resources

| item          | 1-D chain | 2-D (either framework) |
|---------------|-----------|------------------------|
| multipliers   | 4         | 10 (4 row + 4 column + 2 scale) |
| adders        | 8         | 16 (plus counters)     |
| registers / line memory | 4 registers | one level: 3N + 4N words; J levels: see section 5 |

With N = 512, the one-level design holds 3584 words of 24 bits in 10 memories.
The multi-level design with J = 5 holds 6944 words in 50 memories.

## 7. Parameters

| parameter | default | where | notes |
|-----------|---------|-------|-------|
| `N`       | 512     | tops, `lift_1d`, buffers | image width, even; for `dwt2d_ml`, divisible by 2^J |
| `M`       | 512     | tops, `col_filter` | image height, same rules |
| `J`       | 5       | `dwt2d_ml`, `dwt_top` | number of levels |
| `DATA_W`, `FRAC`, `CF` | 24, 6, 14 | `dwt_pkg` | word formats |
| `STEPS`, `COEFS` | 4, (9,7) | `lift_core`, `lift_1d`, `col_filter` | lifting chain |
| `PIPE`    | 0       | `lift_1d`, `col_filter`, `dwt2d_one_level` | 1: register after every PE |

Minimum sizes: every level needs a width of at least 6 and a height of at
least 8. With `PIPE` = 1, widths must be at least 12 and heights at least 14.
Assertions in the modules report violations when simulation starts.

## 8. What is this design's own, and what is left out

This design adds the following, where the source architecture gives no detail:

* Word widths, rounding (floor), wrap-around arithmetic.
* Symmetric boundary extension.
* The odd-pixel alignment register.
* The lockstep row/column schedule and the buffer rotation rule.
* The 2-cycle column pipeline.
* The combined LL/HH scaling.
* The static multi-level slot schedule and its FIFOs.
* Asynchronous active-low reset of counters and valid flags only; data registers and memories
  are not reset. The boundary mirrors and the valid flags keep stale contents out of every
  valid output. The testbenches start from random register contents to check this.
* Defaults N = M = 512 and J = 5.
* Row registers in the multi-level design: one set of four per level, J sets
  in all. This agrees with the storage formula's J·T_R term. One sentence of
  the source asks for only J−1 sets.
* Cutting the pipelined chain after every PE. The source shows the cut only
  for a two-step chain.

Not provided:

* The pipelined chain in the multi-level design.
* Lifting chains built from PE categories (b) to (d). These are only needed
  for non-symmetric filters.
* The inverse transform.
* Saturation. Sums wrap. 24 bits cover 8-bit images through five levels with
  a wide margin for natural images, but no bound is proven for adversarial
  inputs.

## 9. Simulation

All testbenches check themselves against `tb/dwt_ref_pkg.sv`, a separate
software model of the transform. That model lifts whole lines in place, step
by step, rather than following the hardware's slot schedule. Each testbench
prints `TB_RESULT checks=N failures=F`.

| testbench | checks |
|-----------|--------|
| `tb_lift_pe` | all four PE categories, bit exact and against floating point |
| `tb_lift_1d` | 6 lines with stalls. Four chains side by side: (9,7) and two-step (5,3), each plain and pipelined. Checks bit exactness, floating point, output slot and index |
| `tb_inter_buffer` | rotation, read-before-write, hold during stalls |
| `tb_temporal_buffer` | read latency, read-before-write, enable |
| `tb_col_filter` | 3 frames of columns with the real temporal buffer |
| `tb_scale_unit` | LL/HH scaling, LH/HL pass-through |
| `tb_dwt2d_one_level` | 16×14 frames with stalls. The plain and pipelined instances are side by side. Checks bit exactness, latency, and every mechanism: stall, all four edge mirrors, rotation, read-before-write, frame overlap, both scalings |
| `tb_dwt2d_ml` | 32×32, 3 levels, first frame at full rate, every level bit exact |
| `tb_dwt_top` | both frameworks at 32×32 / 3 levels |
| `tb_dwt_top_full` | both frameworks at the defaults (512×512, 5 levels), about 1.8 million checks, under a second of simulation |

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dwt_pkg.sv tb/dwt_ref_pkg.sv tb/tb_dwt_top.sv --top-module tb_dwt_top
./obj_dir/Vtb_dwt_top
```

Any other testbench runs the same way. Swap in its file and module name.

## 10. Files

* `rtl/dwt_pkg.sv`: widths, coefficients, PE category enum.
* `rtl/lift_pe.sv`: processing element, four categories.
* `rtl/lift_core.sv`: combinational chain of PEs with boundary muxes.
* `rtl/lift_core_pipe.sv`: the same chain with a pipeline cut after every PE.
* `rtl/lift_1d.sv`: 1-D architecture / row filter.
* `rtl/tp_ram.sv`: two-port memory.
* `rtl/inter_buffer.sv`: rotating intermediate line buffer.
* `rtl/temporal_buffer.sv`: column-filter state memories.
* `rtl/col_filter.sv`: column filter.
* `rtl/scale_unit.sv`: two-multiplier scaling.
* `rtl/dwt2d_one_level.sv`: one-level framework.
* `rtl/ml_level.sv`: per-level state of the multi-level framework.
* `rtl/dwt2d_ml.sv`: multi-level framework.
* `rtl/dwt_top.sv`: both frameworks side by side.
