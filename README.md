# Boolean-only pixel matching for block motion estimation (PCIPM)

Block-matching motion estimation compares every block of the current frame with
many displaced blocks of the previous frame. For each candidate position it sums
the absolute pixel differences |p − q|. Those subtractions and absolute values
are where most of the work goes.

This design replaces the subtraction with pure Boolean logic. Each 8-bit pixel is
*pre-coded* once into a redundant 27-bit word. The code is built so that the
number and position of bits in which two codes differ track how far apart the two
grey levels are. The distance between two pixels then takes three steps:

1. XOR the two 27-bit codes;
2. AND pairs of XOR bits, so that a single differing bit never counts;
3. add the weights of the pairs that fired, with one 8-bit ripple-carry adder.

The result is an 8-bit value that approximates |p − q|. A motion search would
accumulate it over a block in place of the sum of absolute differences. Each
frame is coded only once, while the matching step runs for every candidate
position, so the coding cost is spread over many comparisons. The method is
called pre-coded image-plane matching (PCIPM).

The RTL covers the pixel-pair matching unit: two coders, the XOR stage and the
arithmetic block. It is purely combinational. It has no clock or reset.

## The 27-bit code

Notation: `a7..a0` are the binary bits of the pixel. `g7..g0` are its Gray code,
with `g7 = a7` and `gk = ak XOR a(k+1)`.

| bits | contents |
|---|---|
| c26 c25 c24 | top level: `a7`, `a7 OR a6`, `a7 AND a6` |
| c(4k−1), c(4k−2), for k = 6..1 | two copies of the auxiliary bit `g(k+1)·g(k−1) + g(k)·g(k−1)` |
| c(4k−3) | the pixel bit `ak` |
| c(4k−4) | the Gray bit `g(k−1)` |

So level 6 occupies c23..c20, level 5 c19..c16, and so on down to level 1 in
c03..c00. The pixel bit `a0` reaches the code only through `g0`.

**Top level.** The top level is a thermometer code of the pixel's quarter of the
grey range:

| range | code |
|---|---|
| 0–63 | 000 |
| 64–127 | 010 |
| 128–191 | 110 |
| 192–255 | 111 |

Neighbouring quarters differ in one bit. Quarters two apart differ in two bits,
and quarters three apart differ in all three.

**Lower levels.** At level k, the pair (`ak`, `g(k−1)`) is a two-bit Gray count
of `floor(v / 2^(k−1)) mod 4`. Adjacent fields of width 2^(k−1) therefore differ
in one bit, and fields two steps apart differ in both. Because the count wraps
modulo 4, pixels far apart can look alike in these two bits. The auxiliary bit
depends on three Gray bits, and it separates some of those cases.

Package `pcipm_pkg` describes this layout as the packed struct `pcipm_code_t`:
the 3-bit `top`, then `lvl[5:0]` of type `level_t {aux_hi, aux_lo, a, g}`, where
`lvl[k-1]` is level k.

## From XOR bits to a distance (the arithmetic block)

Let `d = code(p) XOR code(q)`. The block forms two 8-bit operands and adds them.

| operand bit | operand A | operand B |
|---|---|---|
| 7 | exactly two of `d[26:24]` set (the `three_bit_process`) | all three of `d[26:24]` set (three-input AND) |
| 6 | 0 | 0 |
| k−1, for k = 6..1 | `lvl[k-1].aux_hi AND lvl[k-1].aux_lo` | `lvl[k-1].a AND lvl[k-1].g` |

The adder's carry-in is 0.

**Weights.**
- A top-level difference of two or three bits adds 128.
- At level k, each AND that fires adds 2^(k−1).
- A level whose four bits all differ adds 2^k.
- One differing bit at a level adds nothing.

The two top terms never fire together. The largest possible sum is 233, so the
adder's `carry` output is always 0 for real pixels.

**Worked example.** Take 0 against 204 (`11001100`):

| part | differing bits | adds |
|---|---|---|
| top level | all three | 128 |
| level 6 | all four | 64 |
| level 4 | three, including the auxiliary pair | 8 |
| level 3 | one | 0 |
| level 2 | all four | 4 |
| total | | 204 |

Against 255, only the top level contributes, so the result is 128.

### How good the approximation is

These figures come from running this RTL over all 65,536 pixel pairs:

- mean absolute error from |p − q|: 31
- largest error: 127
- mean signed error: +8
- exact results: 3.7 % of pairs
- mean error by distance: about 7 when the pixels are less than 8 apart, about 47 when they are 64 to 127 apart

The measure is symmetric and gives 0 for equal pixels. It is not monotonic in
|p − q|. From pixel 0, for example:

| q | 24 | 48 | 56 | 120 | 224 |
|---|---|---|---|---|---|
| result | 8 | 16 | 4 | 4 | 144 |

Its job is to rank candidate blocks once summed over a block. It is not meant to
reproduce each pixel difference.

## What is interpretation rather than specification

The coding formulas, the three-stage structure, the gate counts of the arithmetic
block and the 8-bit ripple-carry adder are specified. Three points are this
design's reading. All three are chosen so that the unit reproduces the three
reference results of the original circuit: 0 against 255 gives 128, 0 against 0
gives 0, and 0 against 204 gives 204.

- **Both auxiliary bits of a level use the same formula.** The original code
  tables give identical expressions for the two bits, although the original
  schematic draws them with two separate gates. If the two were meant to differ
  (for instance by an inverted input), only `pcipm_encoder` changes.
- **The function of the `three_bit_process`.** Only its name and its three inputs
  are specified. "Exactly two differ", next to a separate three-input AND, is the
  reading that gives 128 for three differing top bits without overflowing the
  adder.
- **Which XOR bits each two-input AND takes, and which adder bit it drives.** The
  auxiliary pair and the a/g pair of each level go to the same bit position of
  operands A and B.

The original adder also shows two operand inputs and one more input tied to
constants. Here these are operand bit 6 of A and of B, and the carry-in, all 0.

## Modules

```
pcipm_me_unit            top: pix_a, pix_b -> diff[7:0], carry
├── pcipm_encoder  x2    8-bit pixel -> 27-bit code
│   └── gray_encoder     binary -> Gray
├── code_xor             27-bit XOR
└── arithmetic_unit      pair ANDs, top-level terms, adder
    ├── three_bit_process
    └── ripple_carry_adder (W = 8)
        └── full_adder x8   two XORs for the sum
            └── carry_gen   carry = a·b + cin·(a + b)
```

`pcipm_pkg` holds the widths (`PIX_W = 8`, `CODE_W = 27`, `LEVELS = 6`) and the
code structs.

`gray_encoder`, `code_xor` and `ripple_carry_adder` take a width parameter. Their
defaults are the unit's sizes. The code itself is defined for 8-bit pixels only:
the top level and the six four-bit levels are fixed. Changing `PIX_W` is
therefore not supported.

**Timing.** Every path is combinational. The longest path runs through the coder,
the XOR, one AND gate and the eight-stage carry chain. The original full-custom
implementation (0.5 µm CMOS, about 1,560 transistors) settled in 6 ns. For
pipelined use, register `pix_a`/`pix_b` and `diff` around the unit.

## Not included

The motion search around the unit is not included. That covers frame stores,
the pre-coding of whole frames, accumulation over a block, candidate enumeration
and best-vector selection. None of these is specified here. The unit is the
per-pixel kernel that such a search would replicate and accumulate.

## Testbenches

Each module has a self-checking testbench, `tb/tb_<module>.sv`. It compares the
module with a model written independently of the RTL. It prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog.

- `tb_pcipm_me_unit` is the end-to-end test. It covers:
  - the reference sequence: pixel 0 against 255, 0 and 204, 20 ns apart, each
    checked 6 ns after it is applied;
  - all 65,536 pairs against a model that codes pixels from their integer value;
  - symmetry, and zero for equal pixels;
  - a count of how often each mechanism fired. These are the two top-level
    cases, both AND pairs at every level, a one-bit difference that adds
    nothing, and an adder carry between the operands. A mechanism that never
    fires is a failure.
- The other testbenches run these sets:
  - exhaustive: coder, Gray converter, adder, full adder, carry block and
    top-level evaluator;
  - random and corner-case vectors: the XOR stage and the arithmetic block.

Run one with Verilator 5 from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -Itb rtl/pcipm_pkg.sv \
          tb/tb_pcipm_me_unit.sv --top-module tb_pcipm_me_unit
./obj_dir/Vtb_pcipm_me_unit
```

Replace the testbench name to run another one. The package must be listed
first. Everything else is found through `-Irtl`.
