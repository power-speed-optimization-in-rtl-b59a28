# 16 x 16 Booth multiply-accumulate unit

This is a single-cycle signed multiply-accumulate (MAC) datapath. Each clock
cycle it computes `acc <= acc + x*y` for 16-bit two's-complement operands,
keeping a 32-bit total. It is a classic fast-multiplier layout, built from
three parts in sequence:

1. **Radix-4 Booth recoding.** This halves the number of partial products
   to 8. Each one is one of `0, ±x, ±2x`, chosen by a small encoder and
   formed by a row of one-hot selectors.
2. **Column compression.** A tree of carry-save compressors (5-2, 4-2 and
   3-2) reduces the partial products *and the running accumulator* to two
   rows. Feeding the accumulator into the tree merges the "accumulate" into
   the multiplier, so there is no separate accumulate adder.
3. **Final addition.** A 32-bit Kogge-Stone parallel-prefix adder adds the
   two rows into the new total.

The compressors are written in the XOR/multiplexer form that a fast
transistor-level implementation uses. In that form a row of compressors has
no rippling carry: a compressor's outgoing carries never depend on the
carry arriving from its own lower neighbour.

## Interface and timing (`mac16`)

| port    | dir | width | meaning |
|---------|-----|-------|---------|
| `clk`   | in  | 1  | clock, rising edge |
| `rst_n` | in  | 1  | asynchronous active-low reset; clears `acc` |
| `en`    | in  | 1  | accumulate this cycle |
| `clr`   | in  | 1  | together with `en`: start a new sum, `acc <= x*y` |
| `x`     | in  | 16 | multiplicand, two's complement |
| `y`     | in  | 16 | multiplier, two's complement |
| `acc`   | out | 32 | running total, two's complement, wraps modulo 2^32 |

`x`, `y`, `en` and `clr` are sampled on the rising edge. The new total
appears on `acc` right after that edge, so latency is one cycle and the unit
accepts one operation per cycle. With `en = 0` the total holds. The whole
multiply-add is one combinational path between the accumulator register and
itself, and nothing is pipelined. The register, `en`, `clr` and the reset
are choices of this RTL: the datapath is specified without a control
interface.

Overflow is not detected or saturated. A total outside the signed 32-bit
range wraps. One full-scale product, (−32768)², is 2^30, so four of them in
a row already wrap.

## Booth recoding (`booth_encoder`, `booth_selector`, `booth_recoder`, `pp_array`)

The multiplier `y` is cut into eight overlapping triplets
`{y[2j+1], y[2j], y[2j−1]}` (with `y[−1] = 0`). Each triplet is a digit
`d = −2·y[2j+1] + y[2j] + y[2j−1]` in {−2 … +2}. The encoder
(`booth_encoder`) outputs the digit as five one-hot lines, bundled in the
`mac_pkg::booth_ctrl_t` struct:

| triplet  | digit | line |
|----------|-------|------|
| 000, 111 | 0  | `z`  |
| 001, 010 | +1 | `p1` |
| 011      | +2 | `p2` |
| 100      | −2 | `m2` |
| 101, 110 | −1 | `m1` |

`booth_selector` produces one bit of a partial product. Its structure
follows a transmission-gate selector: the selected input is passed onto an
internal node, and an output inverter drives the bit. The node receives
`x[i]` for −1, `~x[i]` for +1, `x[i−1]` for −2, `~x[i−1]` for +2 and a
constant 1 for zero. As a result, a negative digit gives the **one's**
complement of `|d|·x`. `booth_recoder` is one encoder with 17 selectors,
enough for a sign-extended 16-bit `x` shifted by one. Its `neg` output
(`m1 | m2`) is the +1 that turns the one's complement into the two's
complement.

`pp_array` lays the eight rows out on a 32-column grid, with row `j` shifted
left by `2j`. Rather than sign-extend every row to 32 bits, it folds the
sign extension into constants (with `s` the row's sign bit):

- row 0 ends in `s, s, ~s` (columns 16, 17, 18);
- row j > 0 ends in `~s` (column 2j+16) and a constant `1` (column 2j+17).

Summing those constants gives exactly the (negative) constant that full sign
extension would add, modulo 2^32. The `neg` bit of row j−1 is placed in
column 2j−2, which is empty under row j. The last row's `neg` bit has no free
slot, so it becomes a ninth, one-bit row at column 14. The test checks that
the nine rows summed modulo 2^32 equal `x*y`, for corner and random operands.

## Compressors (`adder_3_2`, `compressor_4_2`, `compressor_5_2`)

All three are built only from 2-input XORs and 2:1 multiplexers. The MUX
uses the fact that when two bits are equal, either of them is the majority.

- **3-2 adder:** `h = i0^i1`, `s = h^i2`, `carry = h ? i2 : i1`.
- **4-2 compressor:** `i0+i1+i2+i3+cin = s + 2(carry+cout)`. It computes
  `cout = (i0^i1) ? i2 : i0`, which never depends on `cin`. With
  `x = i0^i1^i2^i3`, it computes `carry = x ? cin : i3` and `s = x^cin`. The
  critical path is three XORs.
- **5-2 compressor:** `i0+…+i4+cin1+cin2 = s + 2(carry+cout1+cout2)`, using
  six XORs and three MUXes:

  ```
  XOR1 = i1^i2     XOR3 = i3^i4     XOR4 = XOR1^XOR3
  XOR2 = i0^cin1   XOR5 = XOR4^XOR2 XOR6 = XOR5^cin2 = s
  cout1 = XOR3 ? i2 : i4      (no carry-in involved)
  cout2 = XOR4 ? cin1 : i1    (cin1 only)
  carry = XOR5 ? cin2 : i0
  ```

  In a row, `cout1/cout2` of column k feed `cin1/cin2` of column k+1.
  `cout1` uses no carry-in and `cout2` only `cin1`, so the row settles in a
  fixed number of XOR delays, whatever its length.

  **Departure from the source drawing:** the drawing this structure comes
  from labels the inputs of XOR2 as `I2, I3`. With those inputs the circuit
  does not add (`I0` and `cin1` would never reach the sum). `XOR2 = i0^cin1`
  is the only choice that satisfies the counting identity, which the
  testbench checks for all 128 input combinations.

## Column compression tree (`column_compressor`)

Inputs: the nine Booth rows plus the accumulator, ten rows of 32 bits.

- **Level 1:** two rows of 5-2 compressors, side by side.
  - Group A is {acc, pp0, pp1, pp2, pp3}. All of these start at column 0.
  - Group B is {pp4, pp5, pp6, pp7, neg7-row}. Nothing in it is below
    column 6.

  Each group yields a sum row and a carry row (the carry row is shifted up
  one column).
- **Level 2:** the four resulting rows pass through one compressor row.
  - Columns 0–6 use 3-2 adders, because group B's carry row is zero below
    column 7.
  - Columns 7–31 use 4-2 compressors, with the carry chain starting at 0 in
    column 7.
- **Output:** two 32-bit rows, `sum` and `carry`. Anything carried out of
  column 31 is discarded, which is correct modulo 2^32.

The depth is one 5-2 level plus one 4-2 level. The critical paths run
through the tall 5-2 columns of the middle of the array and then through a
4-2 column. The grouping is a choice of this RTL: only the mix of compressor
types is given, not the exact tree. The 3-2/4-2 split (`SPLIT`) is
derived from `B_FIRST`, the first Booth row of group B. The tree is written for exactly ten rows, that is
for N = 16.

## Final adder (`ks_adder`)

This is a W-bit (default 32) radix-2 Kogge-Stone prefix adder with
`log2(W)` levels. At level l, position i combines with position i−2^l:
`(G,P) ∘ (G',P') = (G | P&G', P&P')`. The carry-in is folded into the
bit-0 generate. `mac16` ties the carry-in to 0 and leaves the carry-out
unused.

## What is not in the RTL

The datapath was designed together with its transistor-level implementation.
Most of that implementation changes delay, power or leakage, not logic, so it
has no RTL form:

- the choice among XOR circuit styles for the compressor kernel, such as
  pass-transistor, swing-restored and DCVSPG dual-rail gates;
- transistor sizing of non-critical paths;
- the choice of supply voltage (around 1.1 V) and of low/normal/high-Vth
  devices;
- the input buffers in front of the encoder;
- leakage control: transistor stacking, MTCMOS sleep devices and VTCMOS or
  dynamic body biasing.

Also not covered:

- **Dynamic threshold scaling controller.** This is a feedback loop that
  adjusts body bias so that a VCO tracks a reference clock. It is a
  separate, mixed-signal system and is not modelled here.
- **Partial-product layout, tree and adder details.** These are not
  specified beyond the compressor types and the adder's name and width. The
  sign extension scheme, the tree grouping and the standard Kogge-Stone
  structure above are therefore this RTL's own choices. The testbenches check
  that they are arithmetically exact.

## Files and simulation

`rtl/` holds one unit per file:

- `mac_pkg.sv` is the package with widths (`N = 16`, `ACC_W = 32`,
  `NPP = 8`) and the Booth control struct;
- `mac16.sv` is the top;
- `pp_array.sv`, `booth_recoder.sv`, `booth_encoder.sv`,
  `booth_selector.sv`, `column_compressor.sv`, `compressor_5_2.sv`,
  `compressor_4_2.sv`, `adder_3_2.sv` and `ks_adder.sv` are the blocks
  described above.

`tb/` holds a self-checking testbench per module, named `tb_<module>.sv`.
Each one prints `TB_RESULT checks=N failures=M` and stops on a watchdog if
it hangs.

- The small blocks (encoder, selector, compressors) are checked
  exhaustively.
- `pp_array`, `column_compressor` and `ks_adder` are checked against
  built-in arithmetic on corner and random data.
- `tb_mac16` runs the full-size unit for about 20 000 cycles against a
  reference accumulator. It checks the one-cycle latency and requires each
  of these to occur at least once: clear, hold, 32-bit wrap-around, the
  (−32768)² product and all five Booth digits.

To run one, for example:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    --top-module tb_mac16 rtl/mac_pkg.sv tb/tb_mac16.sv
./obj_dir/Vtb_mac16
```

`mac_pkg.sv` must come first because the modules import it. All RTL is
synthesizable and lints cleanly with `verilator --lint-only -Wall`, apart
from unused-bit notices for the carries dropped above column 31.
