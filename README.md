# FIR filter with run-time switchable accuracy, built on dual-quality 4:2 compressors

A multiplier spends most of its area, delay and power reducing partial
products. This design makes that reduction switchable at run time. Every 4:2
compressor in the multiplier's reduction tree is a *dual-quality* cell with
two parts:

* an **exact 4:2 compressor** (the supplementary part);
* a much smaller **approximate part** that ignores the carry-in and gets some
  input combinations wrong.

A single mode bit, `app`, selects which part drives the cell's outputs:

* `app = 0` gives exact products;
* `app = 1` gives approximate products, which in silicon are faster and
  cheaper because the exact part can be power gated.

Four such compressors (DQ4:2C1 to DQ4:2C4) trade accuracy for cost in
different ways. They are used to build an 8×8 multiplier, and five of those
multipliers form a 5-tap FIR filter.

## The dual-quality 4:2 compressor

A 4:2 compressor takes four bits of one column plus a carry-in, and returns
one bit of the same weight plus two bits of the next weight:

    x1 + x2 + x3 + x4 + cin = sum + 2·(carry + cout)

The exact cell (`exact_compressor42`) is two cascaded full adders. `cout`
comes from x1, x2 and x3 only, so it never depends on `cin`. A row of these
cells, with each `cout` feeding the next column's `cin`, therefore has no
ripple path.

The approximate parts ignore `cin`:

| cell     | sum'                  | carry'                | cout' | wrong, of 16 x1..x4 combinations |
|----------|-----------------------|-----------------------|-------|--------------------------|
| `dq42c1` | x1                    | x4                    | 0     | 10 (62.5 %)              |
| `dq42c2` | x1                    | x4                    | x3    | 10 (62.5 %)              |
| `dq42c3` | (x1^x2) \| (x3^x4)    | x4                    | 0     | 8 (50 %)                 |
| `dq42c4` | (x1^x2) \| (x3^x4)    | (x1&x2) \| (x3&x4)    | 0     | 5 (31.25 %)              |

How these parts were settled:

* **Fixed by the structure's description:** the error rates, C2's
  `cout' = x3`, and which output each structure improves (C3 a better sum',
  C4 a better carry').
* **This design's choice:** the exact gates, picked as the simplest functions
  that meet every stated property. In particular, which inputs C1 wires
  straight to its outputs is a free choice. Any pair gives the same 62.5 %.

On silicon, tri-state buffers disconnect the approximate outputs in exact mode,
and the idle part is power gated. Two-state RTL has neither, so each cell ends
in a 2:1 multiplexer on `sum`, `carry` and `cout`, selected by `app`. The logic
is the same; the power saving is not modelled.

`dq_compressor42` selects one of the four cells with the `DQ_TYPE` parameter.
The enumeration is in `dq_pkg`.

## The multiplier (`multiplier`, N = 8)

Ports: `a`, `b` (N bits), `app`, `clk`, `rst`, `prod` (2N bits).

1. **Partial products:** the N partial products `(a & b[j]) << j` are
   2N-bit rows.
2. **Reduction:** each stage reduces every group of four rows to two, with
   one `compressor_row` per group, so 8 → 4 → 2 rows for N = 8.
   * A `compressor_row` has one dual-quality cell per column, 2N cells in
     all.
   * The `cout` of column i feeds the `cin` of column i+1.
   * The carries form a second row shifted up by one bit; whatever leaves
     the top column is dropped.
3. **Final adder:** an ordinary carry-propagate adder (`+`) adds the last
   two rows.
4. **Output register:** the sum is registered in `prod`.

Timing: `a`, `b` and `app` are sampled at a rising edge, and their product is
on `prod` right after that edge. Latency is one clock and a new pair is
accepted every clock. `app` may change on any cycle. `rst` is synchronous,
active high, and clears `prod`.

`N` may be any power of two of at least 4; a 32×32 instance is tested too. All
compressors of the tree use the approximate part in approximate mode, in every
column. The result is far from exact, as the measured figures show:

| structure | 8×8 products wrong (of 65536) | mean relative error, 8×8 |
|-----------|-------------------------------|--------------------------|
| C1        | 64770                         | +7.7 % (under-estimate)  |
| C2        | 64770                         | +7.7 %                   |
| C3        | 60977                         | −31 % (over-estimate)    |
| C4        | 54639                         | +8.0 %                   |

C1 and C2 give identical products in this tree, and the reason matters.
C2's extra output `cout' = x3` goes into the next column's `cin`, which every
approximate part ignores, so the extra information is lost. A tree that
routed `cout` elsewhere would let C2 pay off. The default structure is C4,
the most accurate.

To limit the error, apply the approximate cells to the low columns only:
change the `DQ_TYPE`-based instantiation in `compressor_row` per column. This
is the usual practice for approximate multipliers, and it is not done here.

## The FIR filter (`filterfir`, top level)

    y[n] = h0·x[n] + h1·x[n-1] + h2·x[n-2] + h3·x[n-3] + h4·x[n-4]

* Four `DFF` registers hold x[n-1]…x[n-4].
* Five `multiplier` instances form h_k·x[n-k].
* A chain of four `compressor4_2_tree` adders sums the five products.
  * Each adder is a two-operand ripple adder made of exact 4:2 compressors.
  * In column i, the previous column's `carry` enters as x3 and its `cout`
    as `cin`; x4 is 0.
* `dataout` is the low 8 bits of the 16-bit sum.

Ports: `clk`, `rst`, `app`, `x`, `h0`…`h4` (8 bits each), `dataout` (8 bits).
`dataout` shows the effect of the sample taken at a rising edge right after
that edge, so latency is one clock and throughput one sample per clock. After
`rst` the delay line and the products are zero, so the output builds up tap
by tap. For example, with x held at 10 and h = 5, 4, 3, 2, 1 it reads
50, 90, 120, 140 and then stays at 150. In approximate mode (C4) the same
input settles at 142.

`app` switches all five multipliers together. The adder chain is always exact.

## Where this design departs from the reference

The reference design is the published 8×8 dual-quality-compressor multiplier
and the FIR filter built on it.

* **Mode pin:** the reference filter's pin list has no mode pin. `app` is
  added here so that the run-time switching the compressors exist for can be
  used.
* **Output width:** the output keeps the low 8 bits of the product sum. Sums
  above 255 wrap.
* **Reduction tree:** the tree is regular full rows of 4:2 compressors, not a
  cell-by-cell Dadda placement.
* **Register placement:** there is one register stage, at the multiplier
  output. The reference FPGA implementation reports 284 registers for the
  multiplier against 16 here, so it pipelines differently.
* **Widths and structure choice:** a 32-bit multiplier is also mentioned for
  evaluation. The default here is 8 bits, and `N = 32` works. Which
  compressor structure the filter uses is not fixed by the reference either;
  `DQ_C4` is the default.
* **Power:** power gating and tri-state outputs are not modelled (see
  above).

## Files

| file | contents |
|------|----------|
| `rtl/dq_pkg.sv` | `dq_type_e` (`DQ_C1`…`DQ_C4`) |
| `rtl/full_adder.sv`, `rtl/exact_compressor42.sv` | exact cells |
| `rtl/dq42c1.sv` … `rtl/dq42c4.sv` | the four dual-quality compressors |
| `rtl/dq_compressor42.sv` | structure selector |
| `rtl/compressor_row.sv` | one 4→2 row reduction |
| `rtl/multiplier.sv` | N×N switchable multiplier |
| `rtl/compressor4_2_tree.sv` | compressor-chain adder |
| `rtl/DFF.sv` | delay-line register |
| `rtl/filterfir.sv` | the filter, top level |
| `tb/dq_ref_pkg.sv` | reference models, written arithmetically |
| `tb/tb_*.sv` | one self-checking testbench per module |

The testbenches check:

* each compressor exhaustively in both modes, including its error count;
* the 8×8 multiplier for all 65536 operand pairs in both modes and with
  random mode switching;
* the 32×32 multiplier with random operands;
* the filter end to end at its default parameters, with mode switches and
  resets.

Each prints `TB_RESULT checks=… failures=…`.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/dq_pkg.sv tb/dq_ref_pkg.sv tb/tb_filterfir.sv --top-module tb_filterfir
    ./obj_dir/Vtb_filterfir

To run another test, replace `tb_filterfir` with another `tb_*` name. Each
test finishes in well under a second, except that building `tb_multiplier32`
takes about half a minute.
