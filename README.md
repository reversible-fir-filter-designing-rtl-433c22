# An 8-tap FIR filter built from reversible logic gates

This is a direct-form FIR filter,

    y(n) = c0*x(n) + c1*x(n-1) + ... + c7*x(n-7),

for 8-bit samples and 8-bit coefficients. Every piece of its arithmetic is made of
reversible gates. A reversible gate has as many outputs as inputs, and its inputs can be
recovered from its outputs. The gates used are:

- **Toffoli**, for every AND and XOR.
- **Peres**, for the half and full adders.
- **Fredkin**, for the delay elements.

The point of the construction is lower switching power in the multipliers and adders, bought
with some extra area. Each tap has its own Wallace tree multiplier. A chain of carry
look-ahead adders sums the eight products, and the result comes out at full precision.

The RTL is synthesizable SystemVerilog. A reversible gate is written as its Boolean output
functions. To a synthesis tool the result is ordinary CMOS logic with the same structure; no
reversible or adiabatic circuit technique is modelled.

## The gates

All three gates are 3-input, 3-output modules with ports `a b c` / `p q r`.

| module         | P | Q             | R             | used as |
|----------------|---|---------------|---------------|---------|
| `toffoli_gate` | A | B             | AB ^ C        | AND (C = 0), XOR (A = 1) |
| `peres_gate`   | A | A ^ B         | AB ^ C        | half adder (C = 0), half of a full adder |
| `fredkin_gate` | A | A ? C : B     | A ? B : C     | load/hold select, signal copy |

Built from them:

- **`peres_ha`**: one Peres gate with C = 0. It gives sum = a ^ b, cout = ab and one garbage
  output g = a.
- **`peres_fa`**: two Peres gates in cascade. The first, fed (a, b, 0), gives a ^ b and ab. The
  second, fed (a ^ b, cin, ab), gives sum = a ^ b ^ cin and cout = (a ^ b)cin ^ ab. It has two
  garbage outputs.
- **`gpl`**: the generate/propagate cell of the adder. A Peres gate, fed (a, b, 0), makes
  y1 = a ^ b and z1 = ab. A Toffoli gate then takes (y1, c, z1). Its outputs are the propagate
  p = a ^ b, a copy q = c of the carry in, and the carry out c1 = (a ^ b)c ^ ab.

Garbage outputs are brought out as ports so that each gate keeps its input/output count. The
filter leaves them unconnected.

## Carry look-ahead adder (`rev_cla`)

A textbook CLA writes a carry as an OR of products, for example
c2 = g1 + p1·g0 + p1·p0·c0. Here the propagate is p = a ^ b, so a bit's generate (ab) and its
propagate can never both be 1. It follows that at most one product in each carry expression is
1, and the OR can be replaced by XOR:

    c[k+1] = g[k] ^ p[k]g[k-1] ^ p[k]p[k-1]g[k-2] ^ ... ^ p[k]...p[0]c[0]

With that change, every AND in the network is a Toffoli gate with C = 0, and every XOR is a
Toffoli gate with A = 1. The adder is built as follows:

- Each bit has a `gpl` cell for its propagate p, plus a Toffoli AND for its generate g. The
  cell's product ab stays inside it, so g needs its own gate.
- The word is split into 4-bit groups. Within a group, all four carries are formed in parallel
  from p, g and the group's carry in.
- The group carry-out ripples into the next group. There is no second level of look-ahead.
- Each sum bit is p ^ c, made by a Toffoli XOR.
- The `gpl` cells also work out each carry the ripple way, from the carry below them. An
  immediate assertion checks that this agrees with the look-ahead carry. It stops a simulation
  run with `--assert` if the two ever differ.

The default width is 19 bits, the filter's accumulator width. Any width works: the top group is
padded with zeros.

## Wallace tree multiplier (`rev_wallace_mult`)

This is an N x N unsigned multiplier, with N = 8 by default. It works in three steps.

1. **Partial products.** N² Toffoli AND gates form N rows. Row i is `a & b[i]`, shifted left
   by i.
2. **Reduction.** In each stage, the rows are taken three at a time. In every column of such a
   group:
   - three bits go into a Peres full adder;
   - two bits go into a Peres half adder;
   - a single bit passes through.

   Each group therefore becomes a sum row and a carry row (the carry row is shifted one column
   left). The rows left over when the height is not a multiple of three pass down unchanged.
   The height goes from w to 2·⌊w/3⌋ + (w mod 3): 8 → 6 → 4 → 3 → 2 for N = 8, and
   4 → 3 → 2 for N = 4.
3. **Final addition.** A ripple of Peres full adders adds the last two rows.

Which row can hold a bit in which column is worked out at elaboration time, by the function
`calc_mask`, and stored in the `MASK` constant. Adders are placed only where bits can exist, so
the structure adapts to any N. The multiplier is square, so the top requires the sample and
coefficient widths to be equal.

## Delay element (`fredkin_delay`)

Each bit of the word is stored in a flip-flop, with two Fredkin gates around it:

- The first gate is fed (enable, data, stored bit). Its R output is `enable ? data : stored`,
  which becomes the next state. It therefore chooses between load and hold.
- The second gate is fed (stored bit, 0, 1). It acts as a copy gate, which is how reversible
  logic makes fan-out: t1 is the stored bit and t2 is its complement.

The same gate arrangement is often drawn as a level-sensitive latch. Here the storage is an
edge-triggered flip-flop, so z⁻¹ is exactly one sample. Reset is asynchronous and active low.

## Filter top (`rev_fir_top`)

```
x_in ──┬── z⁻¹ ──┬── z⁻¹ ── ... ──┬──               (7 x fredkin_delay, enabled by x_valid)
       │         │                │
     ×c0       ×c1              ×c7                  (8 x rev_wallace_mult, 8x8 -> 16 bits)
       │         │                │
       └── + ────┴── + ── ... ────┴── + ── z⁻¹ ── y_out   (7 x rev_cla, 19 bits; output register)
```

| port      | dir | width  | meaning |
|-----------|-----|--------|---------|
| `clk`     | in  | 1      | clock, rising edge |
| `rst_n`   | in  | 1      | asynchronous reset, active low; clears the delay line and `y_out` |
| `x_valid` | in  | 1      | sample strobe |
| `x_in`    | in  | 8      | sample x(n), unsigned (offset binary) |
| `coef`    | in  | 8 x 8  | `coef[k]` is c_k, unsigned; hold it steady while samples flow |
| `y_valid` | out | 1      | `y_out` was loaded at the last edge |
| `y_out`   | out | 19     | y(n) at full precision |

**Timing.**

- A sample is taken on a rising edge at which `x_valid` is 1. At that edge the delay line
  shifts, and `y_out` is loaded with the output for that sample. `y_out` and `y_valid` are
  therefore valid one clock after the sample is presented.
- The filter accepts up to one sample per clock.
- While `x_valid` is 0, the delay line and `y_out` hold their values and `y_valid` is 0.
- From `x_in` to `y_out`, the path is combinational through one multiplier and seven adders.
  This path sets the clock period. There is no pipelining inside the arithmetic.

**Sizes.** The largest possible output is 8·255·255 = 520200, which is below 2¹⁹. The output
therefore never overflows, and no rounding is done. Parameters:

- `NTAPS` (default 8);
- `DW` and `CW` (default 8, and they must be equal);
- the output width `AW = DW + CW + log2(NTAPS)` follows from them.

The defaults come from the package `rev_fir_pkg`.

## Where this departs from, or adds to, the filter it follows

**Follows the source filter:**

- 8 taps, 8-bit samples and 8-bit coefficients;
- the direct form;
- the pairing of a Wallace multiplier with a carry look-ahead adder;
- coefficients supplied as inputs;
- the gate roles: Toffoli for AND and XOR, Peres for the adders, Fredkin for the delay
  elements;
- the Peres-gate adder cascades;
- the Peres + Toffoli generate/propagate cell;
- the row-grouping rule and stage heights of the Wallace reduction.

**Choices made here:**

- **Unsigned arithmetic.** Speech is usually two's complement, and an equiripple low-pass has
  negative coefficients. This filter needs offset-binary samples and non-negative
  coefficients. A signed version would need a Baugh-Wooley style change to the partial
  products, which is not built.
- **Look-ahead details.** The XOR form of the carry equations, the 4-bit groups with a rippled
  group carry, and the extra Toffoli gate for each bit's generate.
- **Delay storage.** A flip-flop rather than a latch, plus an asynchronous reset.
- **Interface.** The strobe, the output register, the one-cycle latency and the 19-bit output
  width.

**Not built:**

- the Dadda multiplier;
- the ripple-carry, carry-select and carry-save adders;
- the PV (mux) gate, which only the carry-select variant would need.

These are alternative filter configurations used for comparison, not part of this one.

The power and area figures that motivate the design are not reproduced: they would need gate-level power analysis in a
specific cell library.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints a
`TB_RESULT checks=N failures=M` line and stops itself with a watchdog.

- **Gates and small cells** (`tb_fredkin_gate`, `tb_peres_gate`, `tb_toffoli_gate`,
  `tb_peres_ha`, `tb_peres_fa`, `tb_gpl`): exhaustive truth tables.
- **`tb_fredkin_delay`**: 500 cycles of random data and enable against a model of the stored
  word, plus synchronous load and asynchronous reset.
- **`tb_rev_cla`**: the 8-bit adder exhaustively, with all operands and both carry-ins. The
  19-bit adder with corner cases and 20,000 random pairs.
- **`tb_rev_wallace_mult`**: the 8x8 and 4x4 multipliers exhaustively.
- **`tb_rev_fir_top`**: the whole filter at its default size, against a multiply-accumulate
  reference model. The run has four parts:
  - an impulse, which must return the eight coefficients;
  - 2,000 random samples with random gaps in the strobe;
  - a full-scale run, which must reach 520200 exactly;
  - 3,000 samples of a synthetic speech-like signal (two tones plus noise around mid-scale)
    through a symmetric low-pass-like coefficient set.

  Every output is checked, including its one-cycle timing and that it holds when the strobe is
  low. Holds, impulse taps, full-scale results and resets are each counted, and each must
  occur.
- **`tb_rev_fir_orders`**: 4-tap and 16-tap filters side by side, with random data and strobe
  gaps, and a full-scale burst. This shows that the filter length is a parameter like any other.

To simulate with Verilator, for example the filter:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/rev_fir_pkg.sv tb/tb_rev_fir_top.sv --top-module tb_rev_fir_top -o sim
./obj_dir/sim
```

To run another testbench, substitute its name. Every test runs in well under a second.
