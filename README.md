# Multiplier-free FIR filter and FPPE arithmetic units

This is synthesizable SystemVerilog for a 51-tap FIR filter and the arithmetic
units of a small processing element, the FPPE (floating-point processing
element). The filter's main idea is to cut area by having no multiplier
cells. Each tap product is built from shifted copies of the sample and an
adder tree, and the taps are summed in one accumulator. Next to the filter
are the other units the design describes:

- an IEEE-754 single-precision multiplier;
- a datapath of operand registers, an adder, a multiplier and a divider;
- a three-operand adder *folded* onto one adder and one register;
- the one-bit shifter of an ALU.

The RTL follows the design as it was published: the article "Design of high
speed VLSI Architecture for FIR filter using FPPE" (T. M. John, S. Chacko).
That article gives the structure, the sizes and the arithmetic steps. It
leaves many details open, such as handshakes, output scaling, rounding mode
and some operands. Where this code fills such a gap, the choice is its own,
and the section "What is original and what is chosen" lists every one.

```
                      fppe_fir_top  (one clk, one synchronous active-high rst)
 ┌───────────────────────────────────────────────────────────────────────────┐
 │ fir_filter   x ─► delay line z[0..50] ─► 51 × shift_add_mult ─► temp[k]   │
 │                   b[0..50] ◄─ coefficient port        Σ temp ─► >>15, sat │──► d_out
 │ fold_adder   a,b (slot 2l+0) / c (slot 2l+1) ─► one adder ─► D ─► y       │
 │ shift_unit   operand, op, carry_in ─► result, carry_out                   │
 │ fp_mul       x, y (binary32) ─► z, flags                                  │
 │ fppe_main    a,b,c ─► RB1,RB2,RB3 ─► Adder1 ─► Multiplier ─► product ─►   │
 │              (Adder2/Adder3 outside) ─► div_dividend/div_divisor ─► Divider│
 └───────────────────────────────────────────────────────────────────────────┘
```

The units do not exchange data. The published design does not say how the
FPPE feeds the filter, so the top module only places the units side by side,
each with its own ports (prefixes `fir_`, `fold_`, `sh_`, `fpm_`, `pe_`).

## The FIR filter (`fir_filter`)

It is a direct-form filter:

    d_out(n) = sat16( ( Σ_{k=0}^{50} b[k] · x(n−k) ) >>> 15 )

| quantity | value | where the number comes from |
|---|---|---|
| taps | 51 (`b[0:50]`) | published simulation |
| sample width `x`, `d_out`, delay registers | 16 bits, two's complement | published simulation |
| coefficient width | 16 bits, two's complement | published simulation |
| tap product `temp[k]` | 32 bits | published simulation |
| coefficient address `coeff_add` | 6 bits | published simulation |
| accumulator | 38 bits (32 + ⌈log2 51⌉), cannot overflow | derived |
| output scaling | `>>> 15`, saturate to 16 bits (Q1.15 coefficients) | chosen here |

**Datapath.** A sample enters the delay line `z[0]`, and `z[k]` holds
x(n−k). Each tap has its own `shift_add_mult`, so all 51 products are formed
in parallel and registered in `temp[0..50]`. One combinational sum adds the
51 products, and the output register takes that sum, shifted and saturated.

**Coefficients.** A rising edge with `coef_we` high writes `coef_in` into
`b[coeff_add]`. Addresses 51 to 63 are ignored. Reset clears all
coefficients, so the filter outputs zero until it is loaded. A coefficient
takes effect for products registered after the write. To avoid outputs that
mix two coefficient sets, load coefficients while the stream is idle.

**Timing.** A new sample can come every cycle:

```
edge t    : valid=1, x sampled into z[0]        (delay line shifts)
edge t+1  : temp[k] <= b[k]*z[k]                (v_line)
edge t+2  : d_out <= sat(Σ temp >>> 15)         out_valid = 1 for one cycle
```

The critical path is one shift-add product on one side and the 51-input sum
on the other. The published figure of 3.49 ns was measured on an FPGA
implementation and is not reproduced here. To shorten the paths, add
pipeline registers inside `shift_add_mult` or the sum; the valid pipe
(`v_line`, `v_prod`) then needs one stage per added register.

### Multiplier-free tap products (`shift_add_mult`)

For a signed multiplier `b` of `B_W` bits and a multiplicand `a`:

    a · b = Σ_{i=0}^{B_W−2} b_i · (a << i)  −  b_{B_W−1} · (a << (B_W−1))

The top bit of a two's complement number weighs −2^(B_W−1), so its partial
product is subtracted. The result is exact (`A_W + B_W` bits). The module
uses only shifts, a sign extension and adds. It is combinational, and
synthesis is free to turn the adder chain into a tree.

## Folding the three-operand adder (`fold_adder`)

Unfolded, y(n) = a(n) + b(n) + c(n) needs two adders in a chain. Folding by
a factor of 2 makes the two additions share one adder on alternate clock
cycles, called slots 2l+0 and 2l+1. The price is one register `D` and a
sample rate of half the clock:

| slot | adder input 1 | adder input 2 | D after the edge | output switch |
|---|---|---|---|---|
| 2l+0 | a(n) | b(n) | a(n)+b(n) | closed: `y = D` = a(n−1)+b(n−1)+c(n−1), `y_valid = 1` |
| 2l+1 | D (fed back) | c(n) | a(n)+b(n)+c(n) | open |

The block counts the slots itself and shows the current slot on `slot`. A
source must present `a` and `b` while `slot = 0` and `c` while `slot = 1`.
The simplest way is to hold all three for both cycles. The sum of a sample
whose first slot is at cycle k appears on `y` at cycle k+2, with `y_valid`
high. There is one result every two cycles. `y_valid` is never high in
slot 2l+1; an assertion in the module checks this. `D` and `y` are two bits
wider than the operands, so the sum cannot overflow. After reset, `slot` starts at 2l+0, and `y_valid` stays low
until the first sum is finished.

The published design calls this idea "cross-folded shifting" and applies it
to its ALU. It does not say more than the folding diagram that this unit
implements. The same schedule applies to any chain of additions: a chain of
N adders folded by N needs one adder, one register and N slots.

## ALU shift unit (`shift_unit`)

Every operation moves the operand by exactly one bit. The bit that leaves
the operand goes to `carry_out`. The bit that enters depends on the shift
type (`fppe_pkg::shift_op_t`):

| op | name | bit shifted in | `carry_out` |
|---|---|---|---|
| `SH_LSL` | logical left | 0 at bit 0 | old MSB |
| `SH_LSR` | logical right | 0 at MSB | old bit 0 |
| `SH_ASR` | arithmetic right | old MSB (sign) | old bit 0 |
| `SH_ROL` | rotate left | old MSB | old MSB |
| `SH_ROR` | rotate right | old bit 0 | old bit 0 |
| `SH_RCL` | rotate left through carry | `carry_in` | old MSB |
| `SH_RCR` | rotate right through carry | `carry_in` | old bit 0 |

The unit is combinational. A multi-bit shift takes repeated one-bit shifts;
no barrel shifter is built.

## Single-precision multiplier (`fp_mul`)

The operands and result are IEEE-754 binary32 (`fppe_pkg::fp32_t`: sign, 8
exponent bits, 23 fraction bits, bias 127). The unit works in these steps:

1. Zero test: an operand with exponent field 0 gives a signed zero.
2. Multiply the 24-bit significands (hidden 1 restored) into a 48-bit
   product in [1, 4).
3. Exponent = e_x + e_y − 127.
4. Sign = s_x XOR s_y.
5. If the product is 2.0 or more, shift it right by one and add 1 to the
   exponent.
6. Round to 23 fraction bits: round to nearest, ties to even, using the
   guard bit and a sticky OR of the bits below it. A rounding carry out of
   the fraction increments the exponent.
7. An exponent ≥ 255 gives a signed infinity (`flags.overflow`). An
   exponent ≤ 0 gives a signed zero (`flags.underflow`).

Subnormal numbers are not supported. Subnormal operands count as zero, and
results below the normal range are flushed to zero. An infinity operand
gives a signed infinity. A NaN operand, or infinity times zero, gives the
quiet NaN `0x7FC00000`. Both cases raise `flags.invalid`. `flags.zero` marks
a zero operand.

Timing: the operands are sampled on an edge with `in_valid` high. `z`,
`flags` and `out_valid` are presented after that edge, so there is one
product per cycle with a latency of one edge.

## FPPE datapath (`fppe_main`)

The published flowchart of the processing element is a chain:

```
Input ─► Register Block 1 ─┐
      ─► Register Block 2 ─┴► Adder1 ─┐
      ─► Register Block 3 ────────────┴► Multiplier ─► Adder2 ─┐
                                                   └─► Adder3 ─┴► Divider ─► Output
```

What is built:

- `load` captures `a`, `b` and `c` into three `register_block`s.
- Adder1 (`adder`, carry-in tied to 0) gives `sum` and `sum_cout`. Both are
  visible right after the load edge.
- The Multiplier (`shift_add_mult`, also multiplier-free) forms
  `product = sum × RB3` as 16×16→32 signed. The product is registered and
  presented one edge after the load edge, with `product_valid` high for one
  cycle.
- The Divider (`divider`) is a sequential restoring divider. A start on
  `div_enable` while it is idle begins a division, and `div_done` pulses
  exactly 16 edges later. `div_q` and `div_r` then hold the unsigned
  quotient and remainder. `div_enable` is ignored while `div_busy` is high. An
  assertion checks that `div_done` never comes with `div_busy`.
  A zero divisor gives q = 0xFFFF and r = dividend.

What is not built: **Adder2 and Adder3.** The flowchart shows that both take
the multiplier's result and feed the divider, but not what they add. So the
product is an output, and the divider's operands are inputs
(`div_dividend`, `div_divisor`) where the two adders' results would connect.
To complete the element, put the two adders between `product` and those
inputs.

Operands are 16-bit two's complement integers. The published datapath
schematic shows an integer adder with carry in and carry out and a 16×16→32
multiplier, although the element is called "floating point". The IEEE
multiplier above is the floating-point part, and it is a separate unit.

## What is original and what is chosen

These follow the published design:

- Direct form with 51 taps.
- 16-bit samples and coefficients, 32-bit products, a 6-bit coefficient
  address. The names `x`, `d_out`, `valid`, `reset`, `coeff_add`, `b`,
  `temp`, `z` are kept.
- A multiplier-free filter built from shifts, adders and an accumulator.
- The slot schedule of the folded adder.
- The seven steps of the single-precision multiplier.
- The block chain of the FPPE and its block names (Register_Block, Adder,
  FPPE_Multiplier, Divider).
- The adder's ports `a`, `b`, `cin`, `sum`, `cout`, with carry-in grounded.
- The divider's ports `dividend`, `divisor`, `enable`, `q`, `r` and its
  clock.
- One-bit ALU shifts with carry out and a fill bit that depends on the type.

These are choices of this RTL:

- The coefficient write port, and ignoring writes beyond tap 50.
- Registering the input sample, the products and the output, which gives a
  latency of two edges.
- Q1.15 scaling with saturation.
- The folded adder's operand width (16) and guard bits.
- Round to nearest even, flush-to-zero, and the handling of infinity and
  NaN.
- The one-edge register in `fp_mul`.
- Integer operands in the FPPE datapath.
- Edge-triggered registers where the published schematic shows latches.
- The restoring algorithm of the divider, and its `busy`/`done` outputs.
- The list of shift types.
- Synchronous active-high reset everywhere.

These are not implemented:

- Adder2 and Adder3 of the FPPE (see above).
- A data connection between the FPPE and the filter, which is not
  described.
- A barrel shifter, which is only mentioned as an alternative.

The published area, power and delay (an FPGA report and a comparison table)
describe an implementation, not behaviour, and are not checked here.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the
module with a reference model written independently in the testbench, counts
checks and failures, and ends with a line
`TB_RESULT checks=<n> failures=<m>`. A watchdog ends a run that hangs.

| testbench | what it checks |
|---|---|
| `tb_fir_filter` | Coefficient loading and 3400 random and full-scale samples against an integer convolution. Latency of exactly two edges. Saturation in both directions. |
| `tb_shift_add_mult` | Corner operands and 20 000 random operands against `a*b`. |
| `tb_fold_adder` | 2000 samples. Sum in slot 2l+0 exactly two cycles after the first slot. Slot sequence. Extreme sums. |
| `tb_shift_unit` | All types × both carries on 3000 operands against ×2 and ÷2 arithmetic. A rotate-through-carry round trip. |
| `tb_fp_mul` | 20 000 random and directed products against a double-precision product rounded by the testbench's own code. One-edge latency. Overflow, underflow, zero, NaN/infinity, normalisation and rounding carry. |
| `tb_register_block`, `tb_adder`, `tb_divider` | Load and hold. Exhaustive 8-bit add. Quotient and remainder including divide by zero, 16-cycle timing, start ignored while busy. |
| `tb_fppe_main` | 5000 operand sets: sum, carry-out, product and its timing. 300 divisions. |
| `tb_fppe_fir_top` | The whole top at its default sizes, all units at once. It counts every mechanism (FIR saturation high and low, ignored coefficient write, fold results, each shift type, FP normalisation, rounding carry, overflow, underflow, zero, invalid, Adder1 carry-out, divide by zero, start while busy) and fails if one never happened. |

To run one with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl rtl/fppe_pkg.sv tb/tb_fir_filter.sv \
          --top-module tb_fir_filter
./obj_dir/Vtb_fir_filter
```

Replace the testbench name for the others. `tb_fppe_fir_top` runs the full
design in a few seconds. The testbenches use only two-state values and
`$urandom`, so they also run on simulators without a constraint solver.

## Changing the design

- `fppe_pkg` holds the filter sizes (`FIR_TAPS`, `FIR_DATA_W`, `FIR_COEF_W`,
  `FIR_ADDR_W`), the binary32 layout, the flag struct and the shift-type
  enum.
- `fir_filter` parameters: `TAPS`, `DATA_W`, `COEF_W`, `ADDR_W` (needs
  2^ADDR_W ≥ TAPS) and `OUT_SHIFT`. The accumulator widens by itself.
- `fold_adder`, `shift_unit`, `register_block`, `adder`, `divider`,
  `fppe_main`: `WIDTH`. The divider takes `WIDTH` cycles.
- `shift_add_mult`: `A_W`, `B_W`, and `P_W` (defaults to `A_W + B_W`).

The top module `fppe_fir_top` fixes the widths of the side units at 16 bits
and the filter at the package sizes.

## Files

`rtl/`: `fppe_pkg.sv`, `fppe_fir_top.sv`, `fir_filter.sv`,
`shift_add_mult.sv`, `fold_adder.sv`, `shift_unit.sv`, `fp_mul.sv`,
`fppe_main.sv`, `register_block.sv`, `adder.sv`, `divider.sv`.

`tb/`: one `tb_<module>.sv` per module.
