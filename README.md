# Radix-2 and radix-4 Booth multipliers

A multiplier spends most of its area and delay adding partial products. An
n-bit multiplier operand makes n of them when each bit is used on its own,
as an add-and-shift or array multiplier does. Booth recoding cuts that number.
Radix-2 Booth recoding lets a signed multiplier skip runs of equal bits.
Radix-4 (modified) Booth recoding takes the multiplier two bits at a time,
with one bit of overlap, and so needs only about n/2 partial products.

This RTL holds four multipliers side by side, all of them plain
SystemVerilog:

| module | what it is | default size | timing |
|---|---|---|---|
| `booth_radix4_mult` | pipelined radix-4 Booth multiplier, signed or unsigned, 3:2 compressor tree, range gating | 32 x 32 -> 64 | 3 clocks latency, 1 product per clock |
| `booth_radix2_mult` | sequential radix-2 Booth multiplier, signed (A/Q/Q-1 machine) | 8 x 8 -> 16 | WIDTH clocks per product |
| `shift_add_mult` | sequential add-and-shift multiplier, unsigned (C/A/Q machine) | 8 x 8 -> 16 | WIDTH clocks per product |
| `array_mult` | combinational array multiplier, unsigned | 4 x 4 -> 8 | no clock |

The radix-4 multiplier is the main design. The other three are the simpler
schemes it is compared against. `booth_multiplier_top` instantiates all four.
They share only the clock and the reset, and each keeps its own ports.

## The radix-4 Booth multiplier

### Recoding

The multiplier `b` is first widened by one bit. That bit is its sign when
`is_signed` is 1 and a zero when `is_signed` is 0. The widened value is then
rounded up to an even width. After this step both number systems are the same
signed problem. A WIDTH-bit operand gives `NDIG = (WIDTH+2)/2` digits: 17 for
32 bits, 9 for 16 bits and 5 for 8 bits.

Let `b[-1] = 0`. Digit i is taken from the three bits
`{b[2i+1], b[2i], b[2i-1]}` and is worth `-2*b[2i+1] + b[2i] + b[2i-1]`:

| group | digit | `neg` | `one` | `two` |
|---|---|---|---|---|
| 000 | 0  | 0 | 0 | 0 |
| 001 | +1 | 0 | 1 | 0 |
| 010 | +1 | 0 | 1 | 0 |
| 011 | +2 | 0 | 0 | 1 |
| 100 | -2 | 1 | 0 | 1 |
| 101 | -1 | 1 | 1 | 0 |
| 110 | -1 | 1 | 1 | 0 |
| 111 | 0  | 0 | 0 | 0 |

`booth_r4_encoder` implements this table. Its output is the packed struct
`booth_pkg::booth_sel_t`.

### Partial-product rows

`booth_r4_ppgen` forms one row from the multiplicand `a`, widened in the same
way to WIDTH+1 bits. The row is 0, `a` or `2a`, sign-extended to the full
product width of 2*WIDTH bits. When the digit is negative, the row is inverted
and `neg` is raised. The +1 that finishes the two's complement is not added
inside the row. Instead, all the `neg` bits go into one extra correction row,
with bit i placed at position 2i. Row i is shifted left by 2i places. That
gives NDIG+1 addends in all: 18 at 32 bits.

All arithmetic is modulo 2**(2*WIDTH). This is exact, because the full
product of two WIDTH-bit numbers, signed or unsigned, fits in 2*WIDTH bits.
The rows are fully sign-extended. No sign-extension-reduction trick is used.

### Range gating

A row only does useful work if its three multiplier bits, and all the bits
above them, are more than sign extension. If `bxl[MW:2i]` (the widened
multiplier with `b[-1]` appended) is all zeros or all ones, then row i and
every row above it can only hold the digit 0. Those rows get `en = 0`.
`booth_r4_ppgen` then forces its multiplicand input to zero before the
selector, so the disabled rows do not switch.

For a signed multiplier in `[-2**(2k-1), 2**(2k-1))`, exactly the low k rows
stay active. The 64-bit product then toggles only as much logic as a
2k-bit multiplier would. The `rows_active` output shows the enable mask that
was used for each product, in step with `product`. The mask is always a run of
ones starting at bit 0.

### Compression and the final add

The addends are reduced by a Wallace tree built from word-wide 3:2 compressors
(`csa_3to2`: `s = x^y^z`, with the majority carry moved up one place). At each
level, every group of three words becomes two, and the one or two words left
over pass straight through. Two constant functions in the module work out how
many words each level has, so the tree is generated for any WIDTH. At 32 bits,
18 rows fall to 12, 8, 6, 4, 3 and then 2, which is six full-adder delays. The
last sum and carry words are added with a plain `+`, and synthesis chooses the
adder.

### Pipeline and interface

```
edge 1: a, b, is_signed captured            (when in_valid = 1)
        encode -> rows -> 3:2 tree
edge 2: sum, carry, row mask captured
        carry-propagate add
edge 3: product, rows_active, out_valid
```

`out_valid` follows `in_valid` exactly three clock edges later. A new pair
may enter on every clock, and there is no back-pressure. The operand
registers load only when `in_valid` is high. Reset is asynchronous and active
low. It clears every pipeline register.

## The radix-2 Booth multiplier (`booth_radix2_mult`)

This is the textbook sequential machine. A and Q-1 start at zero, Q holds the
multiplier and M holds the multiplicand. On each clock the pair `{Q0, Q-1}`
picks one action:

* 01: A += M.
* 10: A -= M.
* 00 or 11: A is left alone.

Then `{A, Q, Q-1}` shifts right by one place, keeping the sign of A. After
WIDTH steps the product is `{A, Q}`.

A and M carry one guard bit. Without it, a multiplicand of -2**(WIDTH-1)
would overflow A when it is subtracted.

Handshake:

* `start` is accepted while `busy` is low, and the operands are captured on
  that edge.
* The next WIDTH edges each do one step.
* `done` pulses on the last of those steps.
* `product` stays valid until the next `start`.

## The add-and-shift multiplier (`shift_add_mult`)

This is the unsigned version of the same machine. If Q0 is 1, M is added to A
and the carry out goes to C. Then `{C, A, Q}` shifts right by one place. The
add and the shift happen in the same clock, so C is simply the adder's carry
out and has no register of its own. Its handshake is the same as
`booth_radix2_mult`.

## The array multiplier (`array_mult`)

This is a 4x4 array of AND-gate partial products and full-adder cells
(`full_adder`):

* Row 0 of partial products needs no adder. Its bit 0 is p0, and its upper
  bits, with a 0 above them, form the running sum.
* Each later row is a ripple-carry row of N full adders with carry-in 0 at
  its right end. It adds one more partial product, gives one more product
  bit, and passes its upper sum bits and its carry out down to the next row.
* The last row gives p[2N-1:N].

N is a parameter. The cells are reached through generate-block names
(`g_row[j].g_add.g_cell[i]`).

## How far it can be trusted, and where it is its own

Some behaviour comes straight from the design description:

* radix-4 Booth encoding;
* 3:2 compressors;
* pipeline registers in the data path;
* signed and unsigned operation at 32 bits;
* switching disabled in operand ranges that are not in use;
* the A/Q/Q-1 and C/A/Q register machines;
* the 4x4 array drawing;
* widths of 8 bits for the radix-2 multiplier and 16 bits for the radix-4
  multiplier, as evaluated there.

The following are choices made here, where the description gives no detail:

* **Pipeline cut points.** Three stages, and where they are cut.
* **Tree shape.** A Wallace arrangement, not a linear carry-save chain.
* **Signedness control.** One `is_signed` input covers both operands.
* **Negative digits.** One's complement of the row plus a correction row.
* **Range-gating test.** How a row is found to be pure sign extension, and
  the operand-zeroing gate that disables it.
* **Radix-4 default width.** 32 bits. The evaluated 16-bit and 8-bit
  configurations are parameter values.
* **Sequential machines.** The guard bit and the start/busy/done handshake of
  the two sequential multipliers.
* **Array cells.** That the cells of the array are full adders with rippling
  carries.
* **Add-and-shift width.** The 8-bit default width of `shift_add_mult`.

The same description also names floating-point multiplication, but gives no
format, rounding or exception rules. No floating-point unit is included.

Every module passes Verilator's `-Wall` lint and elaborates in Yosys' slang
front end with no circuit warnings: no latches, loops or multiple drivers.
Each module has a self-checking testbench. Each testbench compares the module
with reference arithmetic worked out independently in the testbench. The
testbenches for clocked modules also check the cycle timing. Each testbench
is known to fail when its module is deliberately broken.

## Testbenches

All are in `tb/`. Each prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog.

| testbench | covers |
|---|---|
| `tb_booth_multiplier_top` | Whole design at default sizes, all four multipliers running at once. 400 radix-4 products, signed and unsigned, mostly back to back, checked for product, top-row enable and 3-clock latency. 300+ products from each sequential unit, checked for product, busy and the 8-clock run. All 256 array products. Fails unless each mechanism occurred: signed, unsigned, range-gated and back-to-back radix-4 products; Booth add and subtract steps; negative Booth products; add-and-shift add and skip steps. |
| `tb_booth_radix4_mult` | WIDTH = 32, 16 and 8, each through `r4_harness`. Directed extremes and 3000 random pairs at random magnitudes. Checks the product, `rows_active` against the number of rows the operand range needs, and the latency. |
| `tb_booth_radix2_mult`, `tb_shift_add_mult` | WIDTH = 8 and 16, each through `seq_harness`. Directed and random pairs. Checks the product, busy, the one-cycle done pulse, the WIDTH-clock latency, and that the result is held. |
| `tb_sample_run` | The operand sequence 0x0, 10x16, 20x17, 50x20, 10x16 on the radix-2 multiplier at 8 and 16 bits, the radix-4 multiplier at 8, 16 and 32 bits in both modes, and the 8-bit add-and-shift multiplier. |
| `tb_booth_r4_encoder`, `tb_full_adder` | exhaustive |
| `tb_booth_r4_ppgen`, `tb_csa_3to2` | random, at small widths |
| `tb_array_mult` | exhaustive 4x4, random 8x8 |

The block testbenches' directed vectors also include 10 x 16 = 160,
20 x 17 = 340 and 50 x 20 = 1000.

Running one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/booth_pkg.sv tb/tb_booth_multiplier_top.sv \
    --top-module tb_booth_multiplier_top -Mdir obj
./obj/Vtb_booth_multiplier_top
```

Put `rtl/booth_pkg.sv` first, because the other modules import it. Any
testbench name can replace `tb_booth_multiplier_top`. Each simulation ends
in well under a second.

## Changing it

* **Width.** Set `WIDTH` on `booth_radix4_mult` (any value of 2 or more;
  odd widths work too), `booth_radix2_mult` or `shift_add_mult`, or `N` on
  `array_mult`. At the top level, use `R4_WIDTH`, `R2_WIDTH`, `SA_WIDTH`
  and `ARR_N`. The compressor tree and the digit count follow from WIDTH.
* **Pipeline.** Stage 2 is the register block after the compressor tree
  (`s2`, `c2`, `en2`). Remove it, or move the cut, to trade latency for
  clock rate. Update the latency in the testbenches (`LATENCY` in
  `r4_harness`, `+ 3` in the top testbench).
* **Range gating.** It is confined to the `row_en` computation. Tying
  `row_en` high gives an ordinary radix-4 Booth multiplier with the same
  results, apart from `rows_active`.

## Files

* `rtl/booth_pkg.sv`: `booth_sel_t`, `seq_state_t`.
* `rtl/booth_r4_encoder.sv`, `rtl/booth_r4_ppgen.sv`, `rtl/csa_3to2.sv`,
  `rtl/booth_radix4_mult.sv`: the radix-4 multiplier.
* `rtl/booth_radix2_mult.sv`, `rtl/shift_add_mult.sv`: the sequential
  multipliers.
* `rtl/full_adder.sv`, `rtl/array_mult.sv`: the array multiplier.
* `rtl/booth_multiplier_top.sv`: the top level.
* `tb/r4_harness.sv`, `tb/seq_harness.sv`: reusable checkers used by the
  block testbenches.
