# Five 16-bit multipliers: Vedic and Booth radix 2, 4, 8 and 16

Multiplication sits on the critical path of most DSP datapaths, and the way
partial products are formed and summed sets a multiplier's delay and area.
This RTL puts five ways of building a 16 x 16 multiplier side by side so that
they can be synthesised and compared on the same footing:

| Multiplier | Operands | Partial products | Module |
|---|---|---|---|
| Vedic (Urdhva-Tiryagbhyam, "vertically and crosswise") | unsigned | recursive 2x2 cells | `vedic_mult16` |
| Booth radix 2 | two's complement | 16 | `booth_radix2` |
| Booth radix 4 (modified Booth) | two's complement | 8 | `booth_radix4` |
| Booth radix 8 | two's complement | 6 | `booth_radix8` |
| Booth radix 16 | two's complement | 4 | `booth_radix16` |

All five are purely combinational: there is no clock, register or reset, and
a product is valid one propagation delay after its operands change. The top,
`multiplier_suite`, holds one of each with separate ports, so the five share
no logic and any one can be timed alone.

## The Vedic multiplier: split, multiply crosswise, combine

The Vedic multiplier is a divide-and-conquer tree. An N-bit operand is split
into a high and a low half of N/2 bits. That gives four half-width products:

* two "vertical" products: `hh = Ph*Qh` and `ll = Pl*Ql`;
* two "crosswise" products: `hl = Ph*Ql` and `lh = Pl*Qh`.

Each half-width product is itself a Vedic multiplier. The recursion goes
16 -> 8 -> 4 -> 2, ending in a 2x2 leaf cell. The four results are joined by
the combine network `vedic_combine`. This is the part that needs care.

`vedic_combine` (N-bit inputs, 2N-bit result `z`) uses three N-bit adders and
one half adder:

```
z[N/2-1:0]      = ll[N/2-1:0]                       low half of the low product passes straight through
{C1, temp1}     = hl + lh                           adder 1: the crosswise sum
{C2, temp2}     = temp1 + {0, ll[N-1:N/2]}          adder 2: add the upper half of ll
z[N-1:N/2]      = temp2[N/2-1:0]
{Carry, Sum}    = C1 + C2                           half adder
z[2N-1:N]       = hh + {0, Carry, Sum, temp2[N-1:N/2]}   adder 3
```

The two carries C1 and C2 each have weight 2^N relative to `z[N/2]`, which is
weight 2^(N/2) inside adder 3's operand. So their sum goes in just above
`temp2[N-1:N/2]`. For real products the half adder's `Carry` and adder 3's
carry out are always 0, because the product fits in 2N bits. They are kept so
that the structure matches the usual drawing of this network. Adder 3's carry
out is left unconnected. When `vedic_combine` is synthesised alone,
`z[N/2-1:0]` appears as an output wired straight to an input. That is
intended.

The modules in the Vedic tree:

* `vedic_mult2`: the 2x2 leaf. `q0 = a0 b0`. The crosswise terms `a1 b0` and
  `a0 b1` go through a half adder to give `q1`. The vertical term `a1 b1` plus
  that carry goes through a second half adder to give `q2` and `q3`.
* `vedic_mult4`, `vedic_mult8`, `vedic_mult16`: four instances of the next
  smaller multiplier plus one `vedic_combine`. The port of the 16-bit version
  is named `s`, and that of the smaller ones `q`.
* `nbit_adder`: `{carry, sum} = a + b + cin`. It is written as one behavioural
  addition, so synthesis picks the adder architecture.
* `half_adder`.

The Vedic multiplier treats its operands as unsigned.

## The Booth multipliers: recoding the multiplier

A Booth multiplier of radix 2^K does not use the multiplier `y` bit by bit. It
recodes `y` into signed digits S_k, each worth 2^(K*k), and adds the partial
products `S_k * x`. Fewer digits mean fewer partial products to add. The cost
is a larger digit set, and some of its multiples of `x` need adders of their
own. Each Booth module has three stages:

1. **Encoder.** A 0 is appended below the LSB of `y`, and the sign bit is
   repeated above the MSB as far as needed. Overlapping groups of K+1 bits are
   then taken, at bit positions `K*k-1 .. K*k+K-1`. A case table turns each
   group into a digit in sign/magnitude form (`dig_neg`, `dig_mag`). The
   tables equal the Booth formula
   `S = -2^(K-1) g[K] + sum_{i=1}^{K-1} 2^(i-1) g[i] + g[0]`, where `g[0]` is
   the overlap bit.
2. **Partial product generator** (`booth_pp_gen`, one per digit). The
   multiples `0, x, 2x, ... 2^(K-1) x` are formed once per multiplier. Each
   generator selects the multiple named by the digit's magnitude, and for a
   negative digit takes its two's complement. A partial product is W+K bits
   wide.
3. **Adder** (`booth_pp_adder`). It sign-extends every partial product to 2W
   bits, shifts partial product k left by K*k bits, and adds them all. The sum
   is taken modulo 2^(2W), which is exact for a signed W x W product. It is
   written as a plain sum; no Wallace or Dadda tree is imposed.

| Radix | K | Group bits | Digit set | Digits at W=16 | Multiples that need an adder |
|---|---|---|---|---|---|
| 2 | 1 | 2 | 0, +-1 | 16 | none |
| 4 | 2 | 3 | 0, +-1, +-2 | 8 | none (2x is a shift) |
| 8 | 3 | 4 | 0 .. +-4 | 6 | 3x = x + 2x |
| 16 | 4 | 5 | 0 .. +-8 | 4 | 3x, 5x = x + 4x, 7x = 8x - x (6x = 2*3x) |

Radix-2 groups: 00 and 11 give 0, 01 gives +x, and 10 gives -x. In the
radix-8 table, groups 1011 and 1100 both give -2x. A 16-bit signed multiplier
needs six radix-8 digits: the top group is `y15 y15 y15 y14`, with the sign
repeated. Four digits would cover only 12 bits.

The number of digits is `ceil(W/K)`, given by `mult_pkg::booth_num_digits`.
The Booth modules take a width parameter `W` (default 16). The Vedic tree is
fixed at 16 bits by its structure.

## Interfaces

```
multiplier_suite #(W = 16)
  vedic_a, vedic_b [15:0]  -> vedic_s [31:0]       unsigned
  r2_x,  r2_y  [W-1:0]     -> r2_p  [2W-1:0]       two's complement, radix 2
  r4_x,  r4_y              -> r4_p                  radix 4
  r8_x,  r8_y              -> r8_p                  radix 8
  r16_x, r16_y             -> r16_p                 radix 16

booth_radixR #(W = 16)  (x multiplicand, y multiplier) -> p = x*y
vedic_mult16            (a, b) -> s = a*b
```

For the Booth modules, `x` is the multiplicand and `y` is the recoded
multiplier.

`mult_pkg` holds the shared width `MULT_W = 16` and `booth_num_digits`.

## Departures and choices

* **No pipelining, clock or reset.** The multipliers are compared by
  combinational delay, so none is registered.
* **Vedic operands are unsigned.** The Vedic design is only ever exercised on
  positive operands. Signed multiplication is handled by the Booth designs.
* **Radix-8 digit count.** Six partial products are built, not four, because
  16-bit operands need six radix-8 digits.
* **Insides that are this design's own choice:**
  * the 2x2 leaf cell;
  * the adders;
  * the sign/magnitude digit form;
  * forming the hard multiples (3x, 5x, 7x) once per multiplier with adders;
  * the plain sum of partial products.
* **Not reproduced.** The timing, power and FPGA resource figures of the
  original comparison are synthesis results. They are not modelled here.
  `yosys` or any other synthesis tool can be run on each module to get its own
  figures.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

* `tb_half_adder`, `tb_vedic_mult2`, `tb_vedic_mult4` and `tb_vedic_mult8` are
  exhaustive.
* `tb_vedic_combine` feeds the network products of random 16-bit operands and
  compares the result with the full product.
* `tb_booth_radix{2,4,8,16}` check these operand pairs against 64-bit integer
  multiplication:
  * the reference operand pairs and their products, e.g. 254 * 9251 =
    2349754, 3256 * 5555 = 18087080, 501 * 633 = 317133, -14 * 6 = -84;
  * the corner values -32768, 32767, -1, 0 and 1;
  * 100,000 random pairs.

  They also fail if any recoding group never occurred.
* `tb_booth_odd_width` runs all four Booth multipliers at W = 15. At that
  width the top recoding group must be completed by repeating the sign bit.
* `tb_booth_pp_gen` applies every digit value for radix 4 and radix 16.
* `tb_booth_pp_adder` checks random and extreme partial products against an
  integer sum.
* `tb_multiplier_suite` is the end-to-end test at the default parameters. It
  drives all five multipliers with the reference operand pairs, corner values
  and 50,000 random pairs. It then reports how often each mechanism occurred,
  and fails if any never did:
  * every Booth digit value of every radix;
  * both carries C1 and C2 of the top Vedic stage.

  It runs in a few seconds.

Simulating one testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_multiplier_suite \
    -y rtl -y tb +libext+.sv rtl/mult_pkg.sv tb/tb_multiplier_suite.sv
./obj_dir/Vtb_multiplier_suite
```

Linting a module: `verilator --lint-only -Wall -y rtl +libext+.sv rtl/mult_pkg.sv rtl/booth_radix8.sv`.

## Changing the design

* **Width of a Booth multiplier:** set `W`. The digit count, the group
  extraction and the adder follow from it.
* **Another radix:** copy a `booth_radixR` module and change `K`, the case
  table and the multiples. `booth_pp_gen` and `booth_pp_adder` are generic in
  `K`.
* **A faster adder:** replace `booth_pp_adder` with a compressor tree that has
  the same ports.
* **A 32-bit Vedic multiplier:** add a `vedic_mult32` built from four
  `vedic_mult16` instances and a `vedic_combine #(.N(32))`, following
  `vedic_mult16`.
