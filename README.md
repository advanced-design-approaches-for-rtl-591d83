# Bit-level and digit-level array multipliers for signed 8-bit operands

This is a family of nine signed (two's complement) 8 x 8-bit multipliers. All of
them are built from one regular cell: an AND gate that forms a partial-product
bit, followed by a full adder. They differ in two ways:

* **How the partial products are summed.** There is a carry-ripple array (CRAM),
  a carry-save array (CSAM), and a Baugh-Wooley array (BWAM), which recodes the
  sign terms so that only non-negative bits are ever added.
* **How much of the word is handled per clock.**
  * *Bit-parallel*: the whole array is combinational and gives one product per
    evaluation.
  * *Bit-serial*: one bit of one operand enters per clock.
  * *Digit-serial*: two bits of one operand enter per clock.

Every multiplier takes two N-bit two's complement operands and returns the
exact 2N-bit two's complement product. N defaults to 8.

| instance (in `systolic_mult_top`) | module | form | operand streamed | clocks per product |
|---|---|---|---|---|
| `u_cram_par` | `cram_parallel` | carry-save rows + ripple-carry last row | none (combinational) | - |
| `u_csam_par` | `csam_parallel` | carry-save rows + output integrating adder | none | - |
| `u_bwam_par` | `bwam_parallel` | Baugh-Wooley carry-save rows + ripple adder | none | - |
| `u_cram_bs` / `u_cram_ds` | `cram_serial` (DIGIT 1 / 2) | ripple carry across the cells each clock | multiplier q | 2N/DIGIT = 16 / 8 |
| `u_csam_bs` / `u_csam_ds` | `csa_serial` (DIGIT 1 / 2) | systolic, carry kept in each cell | multiplicand p | 16 / 8 |
| `u_bwam_bs` / `u_bwam_ds` | `csa_serial` (BAUGH_WOOLEY=1) | systolic, Baugh-Wooley bits | multiplicand p | 16 / 8 |

## Signed multiplication by Horner's rule

All designs except the Baugh-Wooley ones use the same arithmetic. Take the
multiplier as Q = -q7·2^7 + Σ q_j·2^j. The product is then built one
multiplier bit at a time:

    R0 = 0
    T_j = R_j + P·q_j          (j = 0..6)
    T_7 = R_7 + (~P)·q7 + q7   (= R_7 - P·q7)
    product bit j = T_j[0],  R_{j+1} = T_j >>> 1   (arithmetic shift)
    product bits 15..8 = R_8

Every T_j fits in N+1 bits, and every R_j fits in N bits. Subtracting P·q7 is
done the usual two's complement way: invert the multiplicand, then add 1 in the
lowest place.

## The parallel carry-save array (`horner_csa_array`)

This is the least obvious part of the design. Both `cram_parallel` and
`csam_parallel` use it.

The array has N rows of N multiply/add cells (`ma_cell`). Row j adds P·q_j.
Column i of every row handles multiplicand bit p_i. Data moves between rows
like this:

* **Sums** move diagonally: the sum from cell i goes to cell i-1 of the next
  row. This is the right shift in Horner's rule.
* **Carries** move straight down: the carry from cell i goes to cell i of the
  next row. A carry has twice the weight of a sum, so after the shift it lands
  in the same column.
* **Product bits**: the sum leaving cell 0 of row j is product bit j.
* **Row 0** starts with all sums and carries at zero.

Signed numbers stay exact with no extra columns because of one fact: the top
column has negative weight in all three addend vectors (the sums, the carries
and the partial product). A full adder on three bits of weight -2^(N-1) gives:

* a sum bit of weight -2^(N-1);
* a carry bit of weight -2^N.

So the carry-save pair stays a pair of valid signed vectors. Only the sum
vector needs sign extension when it shifts: its top bit is repeated. The carry
vector just drops one place.

Row N-1 is the sign row. There, each cell ANDs the *inverted* multiplicand bit
with q7. The "+1" of the negation is handled at the bottom of column 0:

* A half adder combines the +1 with the sum leaving column 0 (bit 7).
* The half adder's carry becomes the carry-in of the final adder.

The final adder merges the last sum and carry vectors into product bits 15..8:

* In `cram_parallel` it is a ripple-carry row of full adders (`ripple_adder`).
* In `csam_parallel` it is the output integrating adder. Only its function is
  specified, so it is a word-level `+` and synthesis picks the carry logic.

In this form, CRAM and CSAM differ only in the final adder.

## The Baugh-Wooley array (`bwam_parallel`)

The Baugh-Wooley array rewrites each negative-weight partial-product bit as an
inverted bit plus a constant:

* For rows 0..N-2, the MSB partial product `p7·q_j` is inverted.
* For the last row, every bit except the MSB is inverted: `~(p_i·q7)` for i < 7,
  while `p7·q7` stays as it is.
* A 1 is added in column N (2^8).
* The MSB of the result is inverted. Modulo 2^16 this is the same as adding
  2^15, which cancels the -2^15 left over from the rewrite.

After the rewrite every bit is non-negative. The rows are therefore a plain
unsigned carry-save array with the same diagonal/vertical wiring, shifting in a
zero at the top. The final ripple adder starts at weight 2^8, so the 1 in
column N is simply its carry-in.

## Serial carry-ripple multipliers (`cram_serial`)

**Dataflow**

* The multiplicand p is held in parallel in K = N/DIGIT digit cells.
* The multiplier q goes out one digit per clock, least significant digit first.
* Every clock, each cell multiplies its multiplicand digit by the current
  multiplier digit. It adds that to its digit of the running result and to the
  carry from the cell below.
* The carry ripples through all K cells within one clock.
* The cell sums are registered one cell lower (a right shift by one digit). The
  sum of cell 0 is registered out as the next product digit.

**The top cell**

The top cell holds the multiplicand's sign bit. It works in signed arithmetic.
It keeps the part of its total above its sum digit in a small signed register
(DIGIT+2 bits) and feeds that back into itself. That register is the sign
extension of the running result.

**The sign digit**

* DIGIT = 1: all cells use ~p, and the carry into cell 0 is q7.
* DIGIT = 2 (digit q7q6): each cell adds p·q6 + 2·q7·~p, and the carry into
  cell 0 is 2·q7.

**Timing**

* After K multiplier digits, K more clocks with a zero digit shift out the upper
  half. One product therefore takes 2K clocks.
* `start` loads p and q and clears the result.
* The first product digit appears 2 clocks after the start cycle.
* `ready` is also high in the last clock of a product, so products can run back
  to back.

## Serial systolic carry-save multipliers (`csa_serial`)

**Dataflow**

* The multiplier q is held in parallel, one digit per cell.
* The multiplicand streams through the cells, DIGIT bits per clock, least
  significant first. Each frame is 2N bits long (F = 2N/DIGIT clocks).
  * Carry-save mode: the multiplicand is sign-extended to fill the frame.
  * Baugh-Wooley mode: the multiplicand is zero-extended.
* Each cell multiplies the multiplicand digit in front of it by its own
  multiplier digit. It adds the sum digit from the previous cell and its own
  carry from the last clock. Keeping the carry in the cell is the carry-save
  step, done in time.
* Each cell passes its low digit on and keeps the rest as its new carry.

**Register alignment**

The multiplicand line has **two registers per cell** and the sum line has one.
That is what makes the weights meet. Cell j, at frame position w, must add
multiplicand digit w-j. The sum reaches cell j one clock per cell after the
frame starts, so the multiplicand has to fall behind by one more clock per cell.

**Framing**

Two tokens mark frame boundaries:

* A frame-start token travels with the sums. It clears each cell's carry and
  loads that cell's multiplier digit.
* In carry-save mode, a second token travels with the multiplicand. It enables
  the cell's partial products. Without it, a cell would add the tail of the
  previous word during the first j clocks of its frame.

With these tokens, words run back to back: one product every F clocks, with no
gaps.

**Constants**

The first cell's sum input is a stream of constant bits:

* Carry-save mode: q_{N-1} at bit N-1. This is the +1 of the negation for the
  sign digit, whose cell uses the inverted multiplicand.
* Baugh-Wooley mode: ones at bits N and 2N-1.

**Latency**

The first product digit appears N/DIGIT + 1 clocks after the start cycle.

## Interfaces

Parallel modules have these ports:

* `p`, `q`: N bits each, inputs.
* `m`: 2N bits, output.

Serial modules have these ports:

* `clk`, and `rst_n` (synchronous, active low).
* `start` and `ready`: `start` is accepted only while `ready` is high. An
  assertion checks this.
* `p`, `q`: loaded on `start`.
* `m_digit`: DIGIT bits, least significant digit first.
* `m_valid`: high for the 2N/DIGIT digits of each product.
* `m_first`: marks digit 0.

In `systolic_mult_top`, each group of ports is a packed array:

* The parallel group is indexed 0 = CRAM, 1 = CSAM, 2 = BWAM.
* The bit-serial group (`bs_*`) and digit-serial group (`ds_*`) use the same
  indexing.

The top's parameters are N (default 8) and DIGIT (default 2, for the
digit-serial group).

## Where this RTL departs from, or adds to, the published architectures

* **Serial carry-save register alignment.** The published drawing shows one
  register per cell on both the multiplicand line and the sum line. With that
  arrangement, the operands meeting in a cell would not have the same weight.
  This RTL puts two registers per cell on the multiplicand line.
* **Final adder stage of the serial carry-save array.** The drawing has one more
  adder, with its own carry loop, after the cell row. It is not built. The
  correction it would add enters through the carry-input stream of the first
  cell instead.
* **Serial Baugh-Wooley multipliers.** Their internal structure was not
  available. They are built as the systolic carry-save serial array with
  Baugh-Wooley partial products.
* **Parallel array size.** The published description counts n(n-1) full adders
  in n-1 carry-save rows, plus a 2n-bit ripple adder. This array has n rows of n
  cells; the first row adds zeros, so it reduces to AND gates in synthesis. Its
  final adder is n bits wide, because the low half of the product already
  leaves the rows directly.
* **Numbering.** Integers are used throughout instead of fractions in [-1, 1).
  The product bit pattern is the same.
* **Design choices not given by the source.** These include:
  * where the +1 of the negation enters;
  * how serial words are framed, and the 2N/DIGIT-clock product period;
  * the start/ready handshake;
  * the reset;
  * loading the operands in parallel (each serial module serializes its
    streamed operand internally).
* **Timing figures.** Delay, power and area figures, and the FPGA resource
  counts (128-bit versions: about 4,000 logic cells each), come from vendor
  synthesis. Nothing here reproduces them.

## Verification

Every testbench checks itself and ends with a `TB_RESULT checks=… failures=…`
line.

* **Parallel arrays** (`tb_cram_parallel`, `tb_csam_parallel`,
  `tb_bwam_parallel`): all 65,536 operand pairs.
* **Six serial forms** (`tb_*_bit_serial`, `tb_*_digit_serial`): all 65,536
  pairs, started back to back. These testbenches also check:
  * first-digit latency;
  * the start spacing of 2N/DIGIT clocks;
  * that `m_valid` stays high for a whole product.
* **Cells and adders** (`tb_ma_cell`, `tb_ripple_adder`,
  `tb_output_integrating_adder`): exhaustive.
* **`tb_systolic_mult_top`**: runs all nine multipliers together at the default
  parameters. Each gets the 25 corner pairs of {0, 1, -1, 127, -128} and then
  random operands. The run fails if any multiplier never sees:
  * a negative multiplier;
  * a negative multiplicand;
  * both negative;
  * (serial forms only) a back-to-back start.
* **`tb_word_lengths`**: runs the same checks with N = 4, 16, 32 and 64 (digit
  size 2).
  * At N = 128, the six serial forms are simulated by `tb_serial_128`
    (corner and random operands, back to back). The three 128 x 128 parallel
    arrays pass Verilator lint but have not been simulated: their C++ build
    is very long.
  * Word lengths above 8 need N set on the top; the defaults hold 8-bit (and,
    sign-extended, 4-bit) operands.

## Simulating

All sources are in `rtl/`, and the package `rtl/mult_pkg.sv` comes first.

```
verilator --binary --timing --assert -Irtl -Itb rtl/mult_pkg.sv \
    tb/tb_systolic_mult_top.sv --top-module tb_systolic_mult_top -Mdir obj -o sim
./obj/sim
```

For any other testbench, replace the testbench name. Verilator finds the other
modules by file name through `-Irtl -Itb`.

To change the word length or the digit size, set N and DIGIT on
`systolic_mult_top` or on the individual modules. N must be a multiple of DIGIT,
and N/DIGIT must be at least 2.
