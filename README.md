# Majority-logic arithmetic for a QCA FFT datapath

Quantum-dot cellular automata (QCA) logic has two native gates: the
three-input majority gate and the inverter. Adding a **five-input majority
gate (MAJ5)** lets a full adder be built from just one MAJ3 and one MAJ5:

```
cout = MAJ3(a, b, cin)
sum  = MAJ5(a, b, cin, ~cout, ~cout)
```

This RTL describes the arithmetic units built on that full adder. They were
proposed as smaller, faster replacements for the adder and multiplier of a
partial-parallel QCA FFT processor:

| unit | module | default size | latency | throughput |
|---|---|---|---|---|
| ripple carry adder | `rca` | 4 bits | 8 cycles | 1 per cycle |
| subtractor (two's complement) | `subtractor` | 4 bits | 8 cycles | 1 per cycle |
| pipelined array multiplier | `array_mult` | 2 x 2 bits | 4 cycles | 1 per cycle |

`qca_arith_top` instantiates all three side by side. The FFT processor is
not included. Its structure, word size and control are not defined here.

## Why the sum equation works

Write `n = a + b + cin`. MAJ3 gives `cout = (n >= 2)`. MAJ5 counts `n` plus
two copies of `~cout`:

- `n = 0` or `1`: `~cout = 1`, so the count is `n + 2`. The output is 1 only when `n = 1`.
- `n = 2`: `~cout = 0`, so the count is 2. The output is 0.
- `n = 3`: the count is 3. The output is 1.

That is exactly `n mod 2`. The module `full_adder` instantiates `maj3`,
an inverter and `maj5` in this arrangement.

## Timing model: QCA clock zones as registers

QCA signals advance under a four-phase clock, one clock zone at a time. A
large block of logic cannot be left unclocked, so every QCA circuit is
pipelined at a very fine grain. This RTL models that as follows:

- **One RTL clock cycle stands for one QCA clock cycle** (four phases).
- A full adder has a delay of **two cycles** (`FA_LAT = 2`, in
  `qca_arith_pkg`). That is the delay of the MAJ5 full adder layout.
  `full_adder` computes combinationally and then passes its outputs through
  `LAT` register stages. `LAT = 0` gives a plain combinational adder.
- `delay_line` is a chain of registers. It stands for a clocked QCA wire.
  All skewing and de-skewing below is done with it.

Data registers have no reset. Only the `valid` pipelines are reset, by the
synchronous, active-low `rst_n`. Results are meaningful only where
`out_valid` is high.

## Ripple carry adder and subtractor

`rca` cascades `WIDTH` full adders. Bit 0 adds `a[0]`, `b[0]` and `cin`, and
each later bit adds its operand pair and the previous carry. The carry
reaches bit `k` after `k * FA_LAT` cycles. The pipeline therefore works like
this:

- **Input skew:** `a[k]` and `b[k]` are delayed by `k * FA_LAT` cycles so they
  arrive together with their carry. In the QCA layout, longer input wires to
  the higher-order adders play this role.
- **Output de-skew:** `sum[k]` is delayed by `(WIDTH-1-k) * FA_LAT` cycles, so
  all bits of one result leave in the same cycle as `cout`.

A new addition can enter every clock. Latency is `WIDTH * FA_LAT`.

`subtractor` is the same adder with every `b` bit inverted and `cin` tied to
1, so it computes `a + ~b + 1 = a - b`. `diff` is `a - b mod 2^WIDTH`. `cout`
is 1 when `a >= b` (unsigned), meaning no borrow.

## Array multiplier

The multiplier follows long multiplication by hand. Its repeated unit is
`mult_cell`:

```
            a_in   sum_in
              |      |
 b_out <--  [ pp = MAJ3(a,b,0) ; FA(pp, sum_in, carry_in) ]  <-- b_in
 carry_out <--                                               <-- carry_in
              |      |
            a_out  sum_out
```

A MAJ3 gate with one input fixed at 0 is an AND gate. The cell adds the
partial-product bit `a_i & b_j` to the sum from above and the carry from the
right. It passes `a` down and `b` to the left. All four outputs appear
`LAT` cycles after the inputs.

### Lattice

For operands `a[N-1:0]` and `b[N-1:0]`:

- **Row 0 has no adders.** Its partial products `a[i] & b[0]` come straight
  from AND gates, and `m[0] = a[0] & b[0]`.
- **Rows j = 1 .. N-1** each hold N cells. Cell `(i, j)` takes:
  - its *sum from above* from cell `(i+1, j-1)`. In the last column it takes
    the carry out of the row above instead. In row 1 this input is
    `a[i+1] & b[0]`, or 0 in the last column.
  - its *carry from the right* from cell `(i-1, j)`, or 0 in column 0.
- **Outputs:**
  - Column 0 of row `j` gives `m[j]`.
  - The last row gives `m[N-1 .. 2N-2]`.
  - The last cell's carry gives `m[2N-1]`.

At the default N = 2 this gives two cells in series:

```
m0 = a0&b0
(c1, m1) = FA(a1&b0, a0&b1, 0)
(m3, m2) = FA(c1,    a1&b1, 0)
```

### Pipeline schedule

Each cell takes one *stage* of `FA_LAT` cycles. Cell `(i, j)` works in stage
`i + 2(j-1)`. With that schedule, the sum from above and the carry from the
right reach each cell in the same cycle. Three paths need extra help:

| signal | how it is aligned |
|---|---|
| `b[j]` | delayed `2(j-1)` stages at the row's right edge, then passed cell to cell |
| `a[i]` | delayed `i` stages into row 1, plus one extra stage between each pair of rows |
| last-column carry going down a row | one extra stage |
| result bits | de-skewed so the whole product leaves at once |

The longest path runs through `3N-4` cells. Latency is therefore
`(3N-4) * FA_LAT` cycles: 4 at N = 2, 10 at N = 3 and 16 at N = 4. One
product can enter every clock. The lattice works for any N >= 2, and the
testbench checks N = 2, 3 and 4.

## Top level

`qca_arith_top` has parameters `WIDTH = 4`, `MULT_N = 2` and `FA_LAT = 2`.
Its ports are one group per unit, each with its own valid signals:

- adder: `add_*`
- subtractor: `sub_*`
- multiplier: `mul_*`

All three units share `clk` and `rst_n`.

## What follows the original design and what does not

These parts follow the original design:

- the two gate equations of the full adder;
- the 4-bit ripple structure of the adder;
- the subtractor built from inverted B and a carry-in of 1;
- the multiplier cell with its AND gate and its pass-through of a and b;
- the 2 x 2 lattice, with its constant-0 inputs;
- the two-cycle full adder delay.

These are choices of this RTL:

- One RTL cycle stands for one QCA clock cycle. The source gives no zone
  count for any block other than the full adder.
- Counting the cell's AND gate as part of the first full adder stage.
- The exact skew and de-skew delays. The published layouts show unequal wire
  lengths but do not state their counts in clock zones.
- Aligning all result bits to one output cycle.
- The `valid` signals and the reset.
- Bringing the subtractor's carry out to a port.
- Generalising the multiplier to N x N. It follows the published 2 x 2
  example, where row 0 has only AND gates.
- Unsigned operands throughout.

These are not modelled: QCA layout, including the coplanar wire-crossing
technique used in the full adder; cell polarisation; clock phases within a
cycle; and the FFT processor itself.

## Verification

Every testbench checks itself and ends with a `TB_RESULT` line.

| testbench | what it checks |
|---|---|
| `tb_maj3`, `tb_maj5` | every input combination against a population count |
| `tb_full_adder` | random stream, pipelined (LAT 2) and combinational (LAT 0) |
| `tb_mult_cell` | all four outputs, LAT cycles later |
| `tb_rca`, `tb_subtractor` | directed carry/borrow cases plus 300 random operations with gaps; exact 8-cycle latency |
| `tb_array_mult` | all 16 products at 2 x 2, random streams at 3 x 3 and 4 x 4; exact latency |
| `tb_qca_arith_top` | default parameters, all three units running at once on random streams |
| `tb_exhaustive_workloads` | default top, every input of each unit, back to back |

`tb_qca_arith_top` counts how often each behaviour occurs and fails if one
never did:

- a full 4-bit carry ripple;
- an adder carry out;
- a subtraction with a borrow, and one without;
- a product with its MSB set;
- back-to-back results, and results after idle gaps.

To run one with Verilator (from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/qca_arith_pkg.sv tb/tb_qca_arith_top.sv --top-module tb_qca_arith_top
./obj_dir/Vtb_qca_arith_top
```

The testbenches use only `$urandom`. They rely on no particular initial
register values, because data registers are only compared once `out_valid`
is high.

## Changing it

- **Operand width:** set `WIDTH` (adder and subtractor) or `MULT_N`
  (multiplier). The multiplier needs `MULT_N >= 2`.
- **Full adder depth:** set `FA_LAT`. Every latency scales with it, through
  `rca_latency` and `mult_latency` in `qca_arith_pkg`. `FA_LAT = 0` makes
  every unit purely combinational, and `out_valid` then follows `in_valid`
  in the same cycle. In that setting Verilator reports UNOPTFLAT on the
  multiplier's cell-output arrays. Each array is a single variable to
  Verilator, so chaining neighbouring cells through it looks circular.
  There is no real loop.
