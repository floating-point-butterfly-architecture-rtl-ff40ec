# Hybrid signed-digit floating-point FFT butterfly

A radix-2 FFT butterfly spends nearly all of its delay in floating-point
additions: four in the complex product `W*B`, four more to form `A ± W*B`.
In a conventional floating-point adder each of them has to do two slow things.
It compares the two magnitudes to find out which operand to subtract from
which, and so what sign the result gets. Then it adds the significands with a
carry-propagate adder whose carry can travel the whole word.

This design takes both out of the significand path by doing the addition in
signed-digit arithmetic:

* Each operand carries its own sign into its digits. The signed-digit sum
  then has the right sign by itself, so the adder needs no magnitude
  comparator and no sign logic.
* The addition is carry-free in binary signed-digit (BSD) form. It is then
  folded into a **hybrid signed-digit (HSD)** word. In an HSD word only some
  digit positions are signed and the rest are plain bits, so no carry
  ripples further than the distance between two signed digits.

The multipliers use the same HSD adders to sum their Booth partial products.
Operand alignment uses a barrel shifter, which shifts by any amount in one
pass.

This RTL implements a published floating-point butterfly architecture built
on hybrid signed-digit arithmetic. That description names the units and how
they connect but leaves most details open; the choices made here are marked
in each file's header and listed under "Where this RTL departs" below. The
RTL is IEEE 1800-2017 SystemVerilog. It is parameterised for IEEE-754
single precision (the default) and half precision.

## Blocks

| module | what it is |
|---|---|
| `hsd_pkg` | signed-digit conventions, signed-position rule, format defaults, leading-zero count |
| `rbsd_adder` | carry-free binary signed-digit adder |
| `hsd_adder` | hybrid signed-digit adder with bounded carry chains |
| `hsd_to_bin` | HSD/RBSD to two's complement conversion |
| `barrel_shifter` | one-pass right shifter with sticky bit |
| `booth_pp_gen` | radix-4 Booth partial products of the significand product |
| `hsd_pp_reduction` | chain of HSD adders that sums the partial products |
| `fp_multiplier` | IEEE-754 multiplier (Booth + HSD reduction) |
| `fp_adder` | IEEE-754 adder/subtractor (barrel shifter, BSD + HSD, no sign logic) |
| `fp_butterfly` | radix-2 complex butterfly: 4 multipliers, 6 adders, output register |
| `shift_add_multiplier` | sequential MSB-first shift-and-add multiplier |
| `hsd_fft_top` | top level: butterfly and shift-and-add multiplier side by side |

The hierarchy is `hsd_fft_top` → `fp_butterfly` → {`fp_multiplier` ×4,
`fp_adder` ×6}. Inside them, `fp_multiplier` → `booth_pp_gen` and
`hsd_pp_reduction` → `hsd_adder` ×12 and `hsd_to_bin`. `fp_adder` →
`barrel_shifter`, `rbsd_adder`, `hsd_adder` and `hsd_to_bin`.

## Signed-digit words

All signed-digit numbers travel as two bit vectors of equal width, a plus
vector `p` and a minus vector `n`. Digit `i` is worth `p[i] - n[i]` and the
number is `P - N`. A digit never has both bits set.

* A **BSD** word may have any digit in {-1, 0, 1}.
* An **HSD** word may have a negative digit only at its *signed positions*.
  Elsewhere the digit is a plain bit and `n[i]` is 0.

`hsd_pkg::sd_signed(pos, width, spacing)` decides which positions are
signed. It returns true for the top digit of every group of `SPACING` digits,
and for the most significant digit of the word. The default `SPACING` is 4:
with a 32-digit word, digits 3, 7, 11, …, 31 are signed. The top digit is
always signed so that the word can hold negative numbers.

A useful consequence: **a two's complement word is already an HSD word.**
Its sign bit becomes a minus digit on the top position. Every other bit is a
plus digit, and plus digits are legal everywhere. Binary to HSD therefore
costs nothing. HSD to binary costs one subtraction `P - N` (`hsd_to_bin`),
the only full-width carry chain left in each unit.

### Carry-free BSD addition (`rbsd_adder`)

The sum of two digits, `u = a_i + b_i`, lies in {-2 … 2}. It is split as
`u = 2·t(i+1) + w(i)`, where `t` is the transfer digit and `w` the interim
sum. The final digit is `s(i) = w(i) + t(i)`. For `u = ±2` and `u = 0` the
split is unique. For `u = ±1` there are two choices, and the digits one
position lower pick between them:

| lower digits | transfer arriving from below | choose for u = +1 | choose for u = -1 |
|---|---|---|---|
| neither negative | in {0, 1} | t = 1, w = -1 | t = 0, w = -1 |
| at least one negative | in {-1, 0} | t = 0, w = 1 | t = -1, w = 1 |

Either way `w + t` stays in {-1, 0, 1}. No information moves more than one
position, so the delay does not depend on the width. The output has N+1
digits.

### HSD addition (`hsd_adder`)

* **At a plain-bit position** the adder is a full adder that also accepts a
  carry of -1. The value `a + b + c` lies in {-1 … 3}. The sum bit is that
  value mod 2 and the carry-out is in {-1, 0, 1}. Carries ripple through these
  positions.
* **At a signed position** the transfer digit is chosen as in the BSD table
  above. It therefore depends only on this position's digits and the digits
  one position lower, never on the incoming carry. The "transfer from below"
  condition has to cover a plain-bit neighbour too. A plain-bit position whose
  two bits are not both 0 can only send a carry in {0, 1}. A position whose
  bits are both 0 can only send a carry in {-1, 0}.

Because the signed digit's transfer does not wait for its carry-in, every
signed digit cuts the carry chain. The longest ripple is `SPACING` positions
whatever the width. With `SPACING = 1` every digit is signed and the adder is
the BSD adder. With `SPACING` equal to the width it is a ripple adder. The
adder also takes a +1 carry-in at digit 0 and gives the carry-out digit of
weight 2^W. Dropping that digit yields the sum modulo 2^W, which both
floating-point units rely on.

An immediate assertion flags a negative digit at a plain-bit position.

## Floating-point adder (`fp_adder`)

The datapath is combinational:

1. **Exponent subtractor and multiplexer.** `d = ea - eb`. The operand with
   the larger exponent goes to the "big" side. Only the exponents are
   compared: when they are equal the smaller magnitude may well be on the big
   side, and the signed sum takes care of that.
2. **Barrel shifter.** The other significand (hidden bit included) is
   shifted right by `|d|`, clamped to 31, in one pass. Three extra low bits
   hold guard, round and sticky. Every bit shifted out is ORed into the
   sticky bit.
3. **BSD stage.** Each 29-digit aligned significand becomes a BSD word whose
   nonzero digits are all +1 or all -1, according to that operand's sign. The sign is
   applied by choosing which vector the bits go into, which takes no logic.
   `rbsd_adder` adds the two words with no carry propagation.
4. **HSD stage.** The 30-digit BSD sum `P - N` is folded into HSD form by one
   `hsd_adder` computing `P + ~N + 1`, with `~N` entered as a two's
   complement HSD word. This HSD word is the adder's significand sum.
5. **Conversion and normalisation.** `hsd_to_bin` turns the HSD sum into
   two's complement. Its top bit is the result sign and its absolute value the
   magnitude. A leading-zero count normalises the magnitude: one place right
   after a carry-out, up to 24 places left after cancellation.
6. **Rounding.** Round to nearest, ties to even, on guard and sticky. A
   rounding carry out of the significand bumps the exponent.

The three guard bits give correctly rounded results. Massive cancellation
happens only when the exponents differ by at most one, and then nothing
significant has been shifted past the guard bit. The testbenches compare
every result bit for bit with an exact reference.

Steps 3 and 4 both add. Step 4 is where the word becomes HSD, so that the
sum leaves the adder in HSD form with bounded carries. A reader who needs
only a binary result could merge steps 4 and 5 into one subtraction.

## Floating-point multiplier (`fp_multiplier`)

* **Sign and exponent.** The sign is the XOR of the operand signs. The
  exponent is `ea + eb - bias`.
* **Partial products.** `booth_pp_gen` recodes the 24-bit multiplier
  significand in radix 4. It extends B with a zero below its LSB and two
  zeros above its MSB, then reads overlapping 3-bit groups. This gives 13
  digits in {-2 … 2}. Partial product k is `d_k · A · 4^k`, formed by shifts
  and an optional negation, as a 48-bit two's complement word.
* **Reduction.** `hsd_pp_reduction` feeds the 13 words into a chain of 12
  HSD adders. Each word is already HSD (see above), so no conversion is
  needed on the way in. Each adder's delay is bounded by `SPACING`, so the
  chain's delay grows with the number of partial products but not with the
  word width. One `hsd_to_bin` at the end gives the 48-bit product. All of
  this is modulo 2^48; the true product is below 2^48, so it comes out exact.
* **Normalisation and rounding.** The product is normalised by at most one
  place and rounded to nearest, ties to even.

A tree of HSD adders would be shallower than the chain. The chain keeps to
the cascaded shift-and-add structure this multiplier is modelled on.

## Butterfly (`fp_butterfly`) and top (`hsd_fft_top`)

```
t_re = B_re*W_re - B_im*W_im        t_im = B_re*W_im + B_im*W_re
X    = A + t                        Y    = A - t
```

Each multiplier feeds an adder directly. The arithmetic is combinational and
its four results are registered.

**Timing.** The butterfly accepts one butterfly per clock. Results appear on
the clock edge after `in_valid` and `out_valid` marks them. The reset
`rst_n` is asynchronous and active-low, and clears only `out_valid`. This
design does not include an FFT controller, data memory or twiddle table; the
end-to-end testbench shows how a 16-point FFT is sequenced stage by stage in
bit-reversed order.

`hsd_fft_top` puts the butterfly (ports `bf_*`) beside the shift-and-add
multiplier (ports `sam_*`). The two share only clock and reset.

## Shift-and-add multiplier (`shift_add_multiplier`)

This is the smallest multiplier: one adder reused for every digit. It scans
the multiplier from its most significant bit down, one digit per clock. Each
clock it doubles the running product and adds A when the digit is 1.

**Handshake.** A `start` pulse while idle loads A and B. `done` pulses
exactly N clocks after the edge that sampled `start`, and `p` then holds
A·B until the next start. `start` is ignored while `busy`. The default
N = 24 is the single-precision significand width. The end-to-end testbench
uses it to cross-check the Booth/HSD significand product.

## Number format and special values

The default is IEEE-754 single precision (`EXP_W = 8`, `FRAC_W = 23`). For
half precision, set `EXP_W = 5`, `FRAC_W = 10` on the top. Rounding is to
nearest, ties to even. The following are choices of this design, kept simple
as is usual in FFT datapaths:

* Subnormal inputs are read as zero. Results below the normal range are
  flushed to a zero of the result's sign.
* Overflow gives infinity of the result's sign.
* A NaN input, `inf - inf` or `0 × inf` gives the quiet NaN `0x7FC00000`
  (its half-precision equivalent in that format).
* An exact zero sum is +0, except that (-0) + (-0) is -0.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `EXP_W`, `FRAC_W` | 8, 23 | FP units, butterfly, top | floating-point format |
| `SPACING` | 4 | HSD adders and everything above them | distance between signed digits, the bound on the carry ripple |
| `MUL_N` | 24 | top | shift-and-add multiplier width |
| `W` / `N` | 32 | `hsd_adder`, `rbsd_adder`, `hsd_to_bin` | digits per word when used on their own |

Internal widths follow from the format. The aligned significand is
`FRAC_W + 4` bits, the signed-digit sum `FRAC_W + 7` digits, the product
`2·(FRAC_W + 1)` bits, and there are `(FRAC_W + 1)/2 + 1` partial products.

## Where this RTL departs from or adds to the architecture

* The choice between the two transfer/interim splits, and its extension to a
  plain-bit neighbour in `hsd_adder`, is this design's own. So is the signed
  spacing of 4.
* The way the BSD and HSD stages are combined in the adder is this design's
  reading of "BSD + HSD significand addition with the result in HSD form".
  So are the conversion to binary before normalising, and the three
  guard/round/sticky bits.
* The Booth radix (4), the chain (rather than a tree) of HSD adders, and the
  special-value rules are choices.
* The output register, valid flag and start/busy/done handshake are choices.
  The architecture specifies no clocking.
* Not built: a fused three-operand add/subtract or dot-product unit. The
  architecture names it only as a possible extension. The conventional
  floating-point adder and the fixed-point butterfly are used only as points
  of comparison and are not part of this design.
* Both formats are simulated; the end-to-end FFT test runs in single
  precision.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle-count watchdog.
`tb/fp_ref_pkg.sv` is the reference model used by the floating-point
testbenches. It computes in double precision and rounds once to single.
That is exact for one addition or multiplication: a double holds the exact
product, and 53 bits are enough for the double sum to round correctly. The
model applies the same flush-to-zero and special-value rules as the RTL.

* `tb_rbsd_adder`: every digit pair in every lower-digit context, plus 20,000
  random words. Checks the value and that the digits are legal.
* `tb_hsd_adder`: two configurations (32 digits/spacing 4, 48 digits/spacing
  3), random and extreme words. Checks the value, the carry-out and that no
  minus digit appears at a plain-bit position.
* `tb_hsd_to_bin`, `tb_barrel_shifter` (every shift amount, sticky),
  `tb_booth_pp_gen` (each partial product against the Booth digit, and their
  sum), `tb_hsd_pp_reduction`.
* `tb_fp_multiplier`, `tb_fp_adder`: about 45,000 and 35,000 operations,
  compared bit for bit. They cover special values, equal and close exponents
  (cancellation), distant exponents (sticky), overflow and underflow. Each
  testbench fails if any of these mechanisms never occurred.
* `tb_fp_butterfly`: 5,000 butterflies streamed one per clock with gaps.
  Checks each result bit for bit, the one-cycle latency and `out_valid`.
* `tb_fp_half_precision`: the adder, multiplier and butterfly built for half
  precision, 82,000 checks against a half-precision reference.
* `tb_shift_add_multiplier`: products, the exact N-cycle latency, and that
  `start` is ignored while busy.
* `tb_hsd_fft_top`: the whole design at its default parameters. It runs six
  16-point radix-2 FFTs (an impulse, four random frames and an overflowing
  frame). It checks every butterfly bit for bit, and each finished FFT
  against a double-precision DFT (error below 1e-5 of the largest bin). It
  also cross-checks the shift-and-add multiplier against the Booth/HSD
  significand product. It counts operand swaps, negative signed-digit sums,
  sticky bits, cancellations, overflows, negative Booth digits, back-to-back
  butterflies and shift-and-add products, and fails if any never occurred.

Every testbench was also run against a copy of its module with one
deliberate bug, for example ties rounded up instead of to even, or the
sticky bit dropped. Each testbench failed on its copy.

### Running a testbench

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    --top-module tb_fp_adder rtl/hsd_pkg.sv tb/fp_ref_pkg.sv tb/tb_fp_adder.sv
./obj_dir/Vtb_fp_adder
```

Replace `tb_fp_adder` with any other testbench name. Modules are found
through `-y`, so only the two packages and the testbench need listing. Every
testbench finishes in well under a second of simulation time.
