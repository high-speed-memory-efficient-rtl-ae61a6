# Level-1 3D dual-tree complex wavelet transform for video saliency

This RTL computes the first level of a three-dimensional dual-tree complex
wavelet transform (3D DTCWT) over a block of video frames. Salient-object
detectors use the resulting subbands as directional edge and motion features.
The dual tree runs two real wavelet trees ("a" and "b"). Their filters form
Hilbert pairs, so combining the outputs of the two trees gives subbands that
are selective in direction and nearly shift-invariant. Only the real parts are
formed. A level has 32 real subbands: 4 low-pass and 28 high-pass.

The 3D transform is built entirely from one repeated unit, a **filter bank** of
four 10-tap filters (H0a, H1a, H0b, H1b) applied to the same window of ten
samples. The design's main interest is the seven ways it offers to build that
bank:

* four multiplier-free distributed-arithmetic (DA) forms;
* a two-row systolic array of multiplier processing elements (PEs);
* two look-up-table forms of the systolic design.

All of them give bit-identical results.

## The filters

The coefficients are the first-level Kingsbury 10-tap values. They are held as
integers scaled by 256:

| tap k | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 |
|---|---|---|---|---|---|---|---|---|---|---|
| H0a | 0 | -23 | 23 | 178 | 178 | 23 | -23 | 3 | 3 | 0 |
| H1a | 0 | -3 | 3 | 23 | 23 | -178 | 178 | -23 | -23 | 0 |
| H0b | 0 | 3 | 3 | -23 | 23 | 178 | 178 | 23 | -23 | 0 |
| H1b | 0 | -23 | -23 | 178 | -178 | 23 | 23 | 3 | -3 | 0 |

Every filter output therefore carries a gain of 256. Two properties of this
table are what the cheaper forms rely on:

1. **Only four magnitudes occur: 0, 3, 23 and 178.** Taps 0 and 9 are zero in
   all four filters.
2. **The filters are sign-changed copies of each other.**
   H0b[k] = H0a[9-k], H1a[k] = (-1)^k H0b[k] and H1b[k] = (-1)^(k+1) H0a[k].
   So one product c·x serves two filters: the second filter only needs the
   product's sign flipped on alternate taps.

Each filter output is the plain sum y = Σ c_k x_k. Here x_k is the window
sample at offset k and is a 10-bit two's-complement number. Windows advance by
two samples (decimation by 2).

## Filter-bank forms

All forms share one interface (`rmda1_filter` and its siblings, and
`filter_bank`):

* The caller pulses `start` with the window `x[0..9]` while `busy` is low. An
  assertion flags a start while busy.
* `done` pulses when the result is ready in `y`.
* `y` holds its value until the next start.

The latencies below count from the cycle in which `start` is high to the cycle
in which `done` is high.

| form | module | idea | LUT words per filter | latency |
|---|---|---|---|---|
| RMDA-1 | `rmda1_filter` | taps split 0-4 / 5-9, two LUTs, 10 bit planes | 2 × 32 | 11 |
| RMDA-2 | `rmda2_filter` | taps split, and bits split 0-4 / 5-9, four LUTs | 4 × 32 | 6 |
| OMDA-1 | `omda1_filter` | taps folded by magnitude, one LUT of {0,3,20,155} | 16 | 14 |
| OMDA-2 | `omda2_filter` | OMDA-1 with the bits split in two halves | 2 × 16 | 8 |
| PE array | `sa_array` (1 column) | 2 multipliers give all four outputs | none | 12 |
| RMSA | `sa_lvt_filter`, `DROP_ZERO=0` | LSB/MSB halves take turns on one LVT | 2 × 32 | 11 |
| ORMSA | `sa_lvt_filter`, `DROP_ZERO=1` | as RMSA without the zero taps | 2 × 16 | 11 |

**Distributed arithmetic** (`da_unit`). A DA cell reads one bit of every lane
per cycle, least significant bit first. Those bits form the address of a
constant LUT. The LUT holds, for each address, the sum of the coefficients
whose lane bit is set. A right-shift accumulator collects the LUT words:

    acc <= (acc ± (LUT << P)) >>> 1

After P planes, acc = Σ_k LUT(plane k)·2^k, exactly. The two's-complement sign
plane is subtracted. The forms differ only in how the lanes and bit planes are
divided among cells:

* RMDA-2 combines its four partial sums as lo + 2^5·hi.
* OMDA-2 combines its two partial sums as lo + 2^6·hi.

**Optimised DA** (`omda_preadd`). The samples are first summed into magnitude
groups, each sample added with the sign of its coefficient: g1 (magnitude 3),
g2 (23) and g3 (178). Then

    3·g1 + 23·g2 + 178·g3 = 3·(g1+g2+g3) + 20·(g2+g3) + 155·g3

So the LUT needs only the increments 3, 20 and 155, plus a zero lane. It has
16 words instead of 1024, and the same LUT serves all four filters. Only the
folding signs differ between filters. A folded lane sums up to eight samples,
so the lanes are 13 bits wide, which makes OMDA-1 the slowest form in cycles.

**PE array** (`sa_pe`, `sa_array`). A PE has one multiplier and two
accumulators. The second accumulator adds the product through a sign-change
vector (SCV), a bit pattern that negates the product on alternate taps.

* Row 0 gets the H0a coefficients and negates even taps. It yields H0a and H1b.
* Row 1 gets the H0b coefficients and negates odd taps. It yields H0b and H1a.

Coefficients travel right one PE per cycle. Column j receives its samples
skewed by j cycles. Each sample moves up to row 1 one cycle later, and the
row-1 coefficients enter one cycle after the row-0 ones. Column j computes the
window starting at sample 2j. The array therefore produces NCOL output
positions per pass (default NCOL = 4, latency NCOL + 11). `filter_bank` uses a
single column.

**LVT forms** (`sa_lvt_filter`). Each 10-bit sample is held as a 5-bit LSB
half and a 5-bit MSB half. A 2:1 multiplexer per lane alternates between the
two halves, so one look-up value table (LVT) serves both:

* even cycles read an LSB plane, and the LVT word goes to the LSB accumulator;
* odd cycles read the MSB plane of the same weight, and the word goes to the
  MSB accumulator.

The result is acc_lsb + 2^5·acc_msb, summed over the two tap halves. With
`DROP_ZERO` the lanes of taps 0 and 9 are removed and each LVT shrinks to 16
words.

## From banks to the 3D transform

`dtcwt3d_top` processes **M frames in parallel (default 52, frames of
512 × 512)**. There is one `dtcwt2d` unit per frame:

* `in_px[m]` is the sample of frame m at the current raster position.
* All units accept samples together and, since their timing does not depend on
  the data, run in lock step.

Each `dtcwt2d` unit works in four steps:

1. **Row bank.** A 10-sample shift register feeds the row bank at every second
   column, once a full window is present.
2. **Line buffer.** The four row outputs are requantised to 10 bits: an
   arithmetic shift right by 8, then saturation. `clip` flags saturation. The
   outputs go into a 10-line circular line buffer (`line_mem`).
3. **Column banks.** After every second row (from row 9 on), a column pass
   walks the buffered columns. For each column, the ten lines feed four column
   banks, one per row output. This gives the 16 tree outputs
   `raw[4*fr + fc]`, where fr is the row filter, fc the column filter, and the
   index order is H0a, H1a, H0b, H1b.
4. **2D subbands.** `sigma_delta2d` combines the 16 outputs per subband type.
   It writes each type as the 4-tuple r + t1·i1 + t2·i2 + u·i1·i2, with r the
   aa tree, t1 ba, t2 ab and u bb. The "a" subband sets i1 = i2 = i and the
   "b" subband sets −i1 = i2 = i:
   * re_a = r − u
   * re_b = r + u
   * im_a = t1 + t2
   * im_b = t2 − t1

   These 2D subbands come out on `sb2d`.

Outputs cover only windows that lie inside the frame. A 512-sample line gives
252 outputs per direction. No border extension is applied.

`temporal_stage` takes the requantised tree outputs of all M frames for one
grid position:

* Sixteen banks, one per 2D tree output, filter along time over the frame
  windows 2t..2t+9. That gives NT = (M−10)/2 + 1 windows: 22 for M = 52. The
  windows are processed one after the other.
* `sigma_delta3d` takes the tree outputs aaa, bba, bab and abb of each of the
  8 subband types (low/high per axis). It forms the four real subbands
  aaa ∓ bba ∓ bab ∓ abb, using the sign choices (+,+,+), (−,+,+), (+,−,+) and
  (+,+,−) of the 3D 4-tuple.
* The result is `out_sb[4*type + j]` with type = 4·dr + 2·dc + dt. Type 0 holds
  the four low-pass subbands.

## Flow control and timing

* **Input.** `in_ready` drops while a row window is filtered and during a
  column pass. With OMDA-1 banks, a frame block takes about 8 cycles per input
  sample in the row stage.
* **2D to temporal.** A column-pass output waits (back-pressure) until the
  temporal stage is idle.
* **Temporal stage.** It needs about 16 cycles per temporal window, so for
  large M it sets the pace. At the default size a full block is roughly 26
  million cycles.
* **Output.** `out_valid` is a one-cycle strobe with no back-pressure.
  `out_row`, `out_col` and `out_t` give the position, and `out_last` marks the
  final output of a block.

The comparison port of the top (`cmp_start`, `cmp_x`, `cmp_y[arch][filter]`,
`cmp_done[arch]`) drives one bank of every form with the same window.

## Departures and open points

* **Temporal filters.** The temporal stage uses 16 banks (64 filters). That is
  what filtering all 16 2D tree outputs along time requires. The structure
  this design follows counts 16 temporal filters in total, which would not
  cover them.
* **Sample format.** Samples are two's complement. The DA sign plane is
  therefore subtracted, where an unsigned formulation would weight every plane
  positively.
* **Borders.** Symmetric border extension is not implemented. Windows lie
  inside the data.
* **Lane width.** The optimised DA lanes are 13 bits rather than 10, because
  of the pre-addition.
* **LVT half registers.** In the LVT forms the half registers are 5 bits.
* **Unused constant.** A constant 178 feeding an adder in the RMSA drawing has
  no described role. It is not built, and the results are exact without it.
* **Design choices not taken from the source.** Requantisation between stages,
  the start/busy/done and valid/ready handshakes, the line buffer, stall-based
  scheduling, and the choice of OMDA-1 as the transform's default bank
  (`ARCH`). `ARCH` can be set to any form.
* **Single level only.** Further decomposition levels (octaves) are not built.
* **No normalisation.** The sum/difference stages apply no 1/√2 scaling. Each
  stage grows the word by one bit instead.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares against
plain multiply-accumulate arithmetic in `dtcwt_ref_pkg` and prints
`TB_RESULT checks=… failures=…`:

* **Filter forms.** Random and extreme windows for all four filters, with the
  exact latency checked.
* **PE array.** All columns.
* **2D unit.** Two 24 × 22 frames with input gaps and output back-pressure.
* **Temporal stage.** Checked with M = 14.
* **Whole design.** `dtcwt3d_top_tb` runs M = 12, 20 × 20, two blocks.
  `dtcwt3d_m52_tb` runs the full M = 52 frame block on 128 × 128 frames. Both
  require every mechanism to occur: input stall, temporal back-pressure,
  saturation, column pass, temporal window, end of block, and every comparison
  form.

The largest size simulated is 52 frames of 128 × 128. The default 512 × 512
block (about 26 M cycles with 52 units) was not simulated.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
      rtl/dtcwt_pkg.sv tb/dtcwt_ref_pkg.sv tb/dtcwt3d_top_tb.sv \
      --top-module dtcwt3d_top_tb -o sim && obj_dir/sim

Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/dtcwt_pkg.sv rtl/<module>.sv`.

## Files

* `rtl/dtcwt_pkg.sv`: widths, coefficients, the architecture enum, and
  requantisation.
* `rtl/da_unit.sv`: the DA cell.
* `rtl/omda_preadd.sv`: the magnitude-group folding.
* `rtl/rmda1_filter.sv`, `rmda2_filter.sv`, `omda1_filter.sv`,
  `omda2_filter.sv`, `sa_lvt_filter.sv`: the LUT-based filter forms.
* `rtl/sa_pe.sv`, `sa_array.sv`: the PE array.
* `rtl/filter_bank.sv`: a bank of four filters in a selectable form.
* `rtl/sigma_delta2d.sv`, `sigma_delta3d.sv`: the sum/difference stages.
* `rtl/line_mem.sv`, `dtcwt2d.sv`: the 2D unit.
* `rtl/temporal_stage.sv`: filtering along time.
* `rtl/dtcwt3d_top.sv`: the top level.
* `tb/`: one testbench per module, the two end-to-end testbenches, and the
  reference package.
