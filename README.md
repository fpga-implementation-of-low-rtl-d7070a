# Approximate Dadda multiplier with carry-free 4:2 compressors, and a FIR filter built on it

This design multiplies two unsigned 8-bit numbers with a Dadda tree. Every 4:2 compressor in
the tree is an *approximate* one. The usual 4:2 compressor passes a carry sideways to the next
compressor in its row (C_in and C_out). This one drops that sideways carry. Each compressor
then works alone and needs fewer transistors, but a few input patterns come out too small. The
multiplier drives the three multipliers of a direct-form FIR filter. That filter is the top of
the design.

The target is low power, mainly in a transistor-level implementation: an 8-transistor XOR-XNOR
cell and a 6-transistor transmission-gate MUX. The RTL here models the logic function of those
cells. It does not model their transistors. Power, delay and transistor counts are outside
what it can show.

## Hierarchy

```
fir_filter                    3-tap direct-form FIR (top)
└── dadda_mult_8x8  x3        8 x 8 -> 16 bit approximate Dadda multiplier
    ├── approx_compressor_4_2 x17
    │   ├── xor_xnor  x2      XOR and XNOR of two bits
    │   └── mux2              2:1 multiplexer
    ├── full_adder    x1
    └── half_adder    x6
approx_dadda_pkg              operand/product widths and types
```

## The approximate 4:2 compressor (`approx_compressor_4_2`)

The compressor adds four bits x1..x4 of equal weight. Its outputs are `sum` (weight 1) and
`carry` (weight 2). It has no carry-in and no carry-out.

* Two `xor_xnor` cells form t1 = x1^x2 and t2 = x3^x4, each with its complement.
* An exact compressor would XOR t1 and t2 next. Here a `mux2` selected by t1 chooses t2 or
  its complement instead. So `sum` is the parity of the four inputs, and it is always right.
* `carry = (x1|x2) & (x3|x4)`: it is set when each input pair holds at least one 1.

| x1 x2 x3 x4 | sum | carry | sum + 2·carry − true count |
|---|---|---|---|
| 0 0 0 0 | 0 | 0 | 0 |
| 0 0 0 1, 0 0 1 0, 0 1 0 0, 1 0 0 0 | 1 | 0 | 0 |
| 0 0 1 1 | 0 | 0 | **−2** |
| 1 1 0 0 | 0 | 0 | **−2** |
| one 1 in each pair (0101, 0110, 1001, 1010) | 0 | 1 | 0 |
| three ones | 1 | 1 | 0 |
| 1 1 1 1 | 0 | 1 | **−2** |

Three of the 16 patterns are wrong, an error rate of 18.75 %. Each wrong pattern is 2 too
small, so the compressor never overestimates. Nothing fixes the all-ones row: its true value is
4, and sum + 2·carry cannot go above 3.

**How far this follows the source.** The source fixes the following:

* the first four truth-table rows, including 0011 → (0, 0) with error −2;
* the count of three wrong rows out of sixteen;
* dropping C_in and C_out;
* replacing the second XOR with a MUX.

The source does not spell out a `carry` expression. The one used here is this design's own: the
simplest that matches all of those facts. A different carry function with the same four rows and the same
error count would change which products come out inexact. It would not change the structure
of the design.

## The multiplier's reduction tree (`dadda_mult_8x8`)

Partial products are `pp[i][j] = b[i] & a[j]`, with weight 2^(i+j). Columns 0 to 14 hold
1, 2, …, 8, …, 2, 1 bits. The tree has two stages. Stage 1 brings every column down to at most
four bits. Stage 2 brings it down to at most two. Each column uses the fewest cells that reach
its stage's target, counting the carries that arrive from the column below. It uses
compressors while three or more bits must go. Then it uses one full adder if two bits remain
to remove, or one half adder if one does. That rule gives exactly 17 compressors, 1 full adder
and 6 half adders, the cell count of the proposed multiplier:

| column | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|
| stage 1 | – | – | HA | C | C+HA | 2C | C+FA | C+HA | C | HA | – | – |
| stage 2 | HA | C | C | C | C | C | C | C | C | C | C | HA |

(C = approximate compressor, FA = full adder, HA = half adder.)

A cell takes the bits of its column in a fixed order:

1. partial products, by ascending row i;
2. sums that the previous stage left in this column;
3. carries from the column below.

A compressor's x1..x4 are four consecutive bits in that order. This order matters because the
compressor treats (x1, x2) and (x3, x4) as pairs. The instance names say where each cell sits.
For example, `u_s2_c7_C0` is the first compressor of column 7 in stage 2. The two rows left
after stage 2 go to a 16-bit carry-propagate adder, written as `+`.

The source gives the cell counts, the operand and product widths, and the three steps of
generation, reduction and final addition. The following are this design's own choices:

* the column-by-column schedule;
* the bit order within a column;
* the final adder.

### Accuracy

These figures come from running all 65 536 operand pairs through this tree:

* 45 745 products (70 %) are inexact.
* The mean error is 1294.
* The mean relative error is 9.5 %.
* The largest error is 14 224.

The product is never larger than a·b. The shortfall is always a multiple of 16, because no
compressor sits below column 3. The product is exact when either operand is 0 or a power of
two. The four sample products 12·1, 133·17, 67·5 and 23·1 all come out exact.

The multiplier has no clock. Its delay is one pass through the tree and the adder.

## FIR filter (`fir_filter`, top)

`y(n) = Σ h(i)·x(n−i)` for i = 0 … TAPS−1. It has a delay line of TAPS−1 unit delays, one
`dadda_mult_8x8` per tap and a chain of adders. So every product carries the multiplier's
approximation.

| parameter | default | meaning |
|---|---|---|
| `TAPS` | 3 | number of taps (3 in the source's filter diagram) |
| `Y_W` | 16 | width of the adder chain and of `y_out` |

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | synchronous, active high. Clears the delay line and `y_out`. |
| `x_in` | in | 8 | new sample x(n), unsigned |
| `h[TAPS]` | in | 8 each | coefficients, unsigned. `h[0]` multiplies the newest sample. |
| `y_out` | out | Y_W | filtered output, registered |

**Timing.** The filter takes one sample per clock and has no handshake. On each rising edge,
`y_out` takes the sum formed from `x_in` and the delay line as they stood before that edge.
So `y(n)` appears one cycle after `x(n)` is presented. At the same edge the delay line shifts
`x_in` in.

The source gives no coefficients, so they are input ports. Sums wider than `Y_W` wrap modulo
2^Y_W. The following are this design's own choices:

* the output register;
* the reset style;
* unsigned arithmetic;
* wrap-around.

## Where this design departs from the source

* **Sample width.** The source's filter simulation shows 16-bit input and output buses. The
  multiplier has 8-bit operands, so here samples and coefficients are 8 bits. Only the output
  is 16 bits.
* **Filter trace not reproduced.** The source's filter output steps through 1, 2, 4, 7 for a
  unit step input. The coefficients behind that trace are unknown, so it is not reproduced.
  The testbench checks a step response with its own coefficients (1, 1, 2).
* **Cells modelled by function only.** `xor_xnor` and `mux2` describe what the transistor
  cells compute, not how they are built.
* **No exact-compressor multiplier.** The source compares against a Dadda multiplier with
  exact compressors. That baseline is not included.
* **Target device not modelled.** The Spartan-3 FPGA used as the target is not a block of the
  design.

## Testbenches

Each testbench checks itself. It ends by printing `TB_RESULT checks=N failures=M`. It also has
a watchdog that stops a simulation that hangs.

| testbench | what it checks |
|---|---|
| `tb_xor_xnor` | all four input pairs |
| `tb_mux2` | all eight input combinations |
| `tb_approx_compressor_4_2` | all 16 patterns against the table above. Also checks that exactly 3 are wrong and that each is wrong by −2. |
| `tb_dadda_mult_8x8` | the four sample products, and all 65 536 operand pairs against a reference model. Also checks that the product is never above a·b, that the shortfall is a multiple of 16, and that the product is exact for power-of-two operands. |
| `tb_fir_filter` | the top at default parameters. Covers reset, a step response, random samples and coefficients, sums that overflow 16 bits, and a reset in the middle of a run. Every output is compared cycle by cycle with a model. It counts resets, inexact outputs, exact outputs and wrap-arounds, and fails if any of them never happened. |

The reference model is `tb/tb_approx_model_pkg.sv`. It does not copy the netlist. It rebuilds
the tree at run time from the rules above and evaluates the compressor from its truth table.

Example run with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/approx_dadda_pkg.sv tb/tb_approx_model_pkg.sv tb/tb_fir_filter.sv \
    --top-module tb_fir_filter -o sim && ./obj_dir/sim
```

Change `tb_fir_filter` to any other testbench name to run that one. The whole multiplier sweep
finishes in well under a second.

## Changing the design

* **More taps or a wider output.** Set `TAPS` or `Y_W` on `fir_filter`.
* **A different compressor.** Edit the `carry` and `sum` expressions in
  `approx_compressor_4_2`. Then update `ref_compressor` in the test model and the table in
  `tb_approx_compressor_4_2`.
* **Other operand widths.** These need a new reduction tree, because `dadda_mult_8x8` is
  written out for 8 × 8. Apply the column rule above with stage targets that halve the height
  each time (…, 16, 8, 4, 2). Extend `ref_mult` in the test model in the same way.
