# lowpowermult: an 8x8 approximate multiplier with a modified 4-2 compressor

Many signal-processing and data-mining workloads tolerate small arithmetic
errors. This multiplier trades a small, bounded loss of accuracy for a
shallower and smaller partial-product reduction. It multiplies two 8-bit
unsigned numbers and returns a 16-bit product. The product is exact for all
operands up to 14, and exact for 62.8 % of all 65536 operand pairs. The
average absolute error over all pairs is 615, and the largest error is 6160.

The design has two main ideas:

1. **Propagate/generate pairs.** Two partial products that have the same
   weight and mirrored indices, `a[m]&b[n]` and `a[n]&b[m]`, are replaced by
   their OR (propagate) and their AND (generate). The OR has the same weight
   as the pair, and the AND counts double. Generate bits are rarely 1, so all
   generates of one column are merged with a single OR gate. That merge is
   the first source of error.
2. **Cheap counters.** The remaining bits are reduced with approximate cells.
   The half adder makes its sum with OR instead of XOR. The 4-2 compressor
   is built from two full adders plus a half adder and an XOR gate, and it
   errs on exactly one of its 16 input patterns.

## Datapath

```
a[7:0], b[7:0]
   │
   ▼ partial_product_gen   64 ANDs, pp[m][n] = a[m] & b[n]
   ▼ altered_pp_gen        24 mirrored pairs -> pr (OR) and g (AND)
   ▼ reduction_tree        OR of generates per column, stage 1, stage 2
   ▼ ripple_carry_adder    x[14:0] + y[14:0], exact
   ▼ register (clk)
p[15:0]
```

The datapath is combinational from `a`, `b` to the adder output. One
register on `clk` holds the product, so `p` shows the product of the
operands present at the previous rising edge. The latency is one clock and a
new product can start every clock. There is no reset. `p` is undefined until
the first clock edge.

### Which partial products are paired

For an 8x8 product, column `k` (weight 2^k) holds min(k+1, 15-k) partial
products. Only the columns with more than three of them are converted, which
are columns 3 to 11. Those columns hold 24 mirrored pairs (m > n). The pairs
are packed into `pr[23:0]` and `g[23:0]` column by column, from column 3
upwards, and by falling `m` inside a column. So bit 0 is pair (3,0), bit 1 is
(2,1), bit 2 is (4,0), and bit 23 is (6,5). `mult_pkg::pair_index(m, n)`
computes this order. For example, 14 x 14 gives `g = 74`: bits 1, 3 and 6,
which are pairs (2,1), (3,1) and (3,2).

Diagonal terms `a[k]&b[k]` have no mirror. They stay as they are, and so do
all terms in columns 0-2 and 12-14.

### The modified 4-2 compressor

```
x1 ─┐
x2 ─┤FA f1 (cin = 0)── s1 ─┐
    └─ c1 ─────────┐   x3 ─┤FA f2 ── s  (sum)
                   │   x4 ─┘  └─ c2
                   └──────────┬──┘
                     approx. HA f3: hs = c1|c2, hc = c1&c2
                     XOR f4: c = hs ^ hc = c1 ^ c2   (carry)
```

The sum `s` is always the parity of the four inputs. The carry is
`c1 XOR c2`. For 0 to 3 ones, `2c + s` is the exact count. For four ones both
internal carries are 1, so the carry cancels and the compressor outputs 0
instead of 4. There is no carry-in or carry-out chain between neighbouring
compressors, so each column's compressor works alone.

### Reduction map

The stage-1 cells are listed below. `P` is a propagate, `a` an untouched
partial product and `G` the OR of a column's generates. Each cell in column
k produces a sum `S_k` (weight 2^k) and a carry `C_k` (weight 2^(k+1)).

| column | cell        | inputs                  |
|-------:|-------------|-------------------------|
| 12     | approx. HA  | a75 a57                 |
| 11     | approx. HA  | P74 P65                 |
| 10     | full adder  | P73 P64 a55             |
| 9      | full adder  | P72 P63 P54             |
| 8      | 4-2 comp.   | P71 P62 P53 a44         |
| 7      | 4-2 comp.   | P70 P61 P52 P43         |
| 6      | 4-2 comp.   | P60 P51 P42 a33         |
| 5      | full adder  | P50 P41 P32             |
| 4      | approx. HA  | P40 P31                 |

Stage 2 has one full adder per column, from column 13 down to column 2. Each
one writes its sum to `x[k]` and its carry to `y[k+1]`:

| column | inputs            |
|-------:|-------------------|
| 13     | a76 a67 C12       |
| 12     | S12 C11 a66       |
| 5..11  | S_k G_k C_(k-1)   |
| 4      | S4 a22 G4         |
| 3      | P30 P21 G3        |
| 2      | a20 a02 a11       |

The remaining bits pass straight through: `x14 = a77`, `x1 = a10`,
`y1 = a01` and `x0 = a00`. `y0` and `y2` are 0. The ripple-carry adder then
adds `x` and `y` exactly.

### Where the error comes from

- **Generate merge.** Two or more generates are 1 in the same column. The OR
  counts them once.
- **Half-adder OR sum.** Both inputs of an approximate half adder are 1. The
  cell gives 3 instead of 2.
- **Compressor with four ones.** The cell gives 0 instead of 4.

Over all 65536 operand pairs, 24365 products are inexact. The first inexact
product with both operands below 16 is 15 x 15.

## Cells

- `appr_half_adder`: `s = a | b`, `c = a & b`.
- `fulladder`: the two-XOR / multiplexer full adder. The sum is
  `(a ^ b) ^ cin`. The carry is `cin` when `a ^ b` is 1 and `a` otherwise.
  This cell is exact. It is used in the compressor, in stage 1, in stage 2
  and in the final adder.
- `appr_4_2_compressor`: the compressor described above.

These cells were meant to be built as small transistor circuits: a
6-transistor half adder and an 8-transistor full adder, with a
ground-lifting supply technique to save power. The RTL models only their
logic. Power, voltage levels and analog misbehaviour are outside its scope.

## Design choices and departures

- **Output register.** The top level has a clock input, but what the clock
  times is not specified. A single output register was chosen.
- **Full adders are exact.** The original reduction diagram labels its
  three-input cells "approximate full adders". An OR-sum full adder in those
  places contradicts published example products: 7 of 18 would change. The
  exact XOR/MUX full adder reproduces 17 of them.
- **Compressor half adder.** The half adder inside the compressor is the
  approximate OR-sum cell, so the carry is `c1 ^ c2`. With an exact half
  adder the carry would be `c1 | c2`. Then four ones would give 2 instead of
  0, and the multiplier would be slightly more accurate. To switch, change
  `f3` in `appr_4_2_compressor.sv`.
- **Compressor carry-in.** The compressor has no carry-in. The first full
  adder's third input is tied to 0.
- **Column 2 cell.** Column 2 of stage 2 uses an exact full adder. Using an
  approximate half adder there would make 13 x 13 wrong.
- **The 14 x 14 example.** One published example gives 164 for 14 x 14. This
  RTL gives the exact 196. No arrangement of the described cells was found
  that produces 164 while keeping the other published products.
- **Fixed size.** The width is fixed at 8 bits, as `mult_pkg::N`. The
  reduction tree is a hand-placed 8-bit map. `partial_product_gen` and
  `ripple_carry_adder` are parameterized, but a different width needs a new
  reduction map.

## Files

| file | contents |
|------|----------|
| `rtl/mult_pkg.sv` | widths, the partial-product matrix type, pair numbering |
| `rtl/partial_product_gen.sv` | AND array |
| `rtl/altered_pp_gen.sv` | propagate/generate pairs |
| `rtl/appr_half_adder.sv`, `rtl/fulladder.sv`, `rtl/appr_4_2_compressor.sv` | cells |
| `rtl/reduction_tree.sv` | generate OR gates, stage 1 and stage 2 |
| `rtl/ripple_carry_adder.sv` | final adder |
| `rtl/lowpowermult.sv` | top level with the output register |
| `tb/mult_ref_pkg.sv` | arithmetic reference model and error-source detectors |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example,
the end-to-end test runs every operand pair through the registered top level.
It checks each product against the reference model and checks the one-clock
latency. It also confirms that each error source occurs. Run it with:

```
verilator --binary --timing -y rtl -y tb rtl/mult_pkg.sv tb/mult_ref_pkg.sv \
          tb/tb_lowpowermult.sv --top-module tb_lowpowermult
./obj_dir/Vtb_lowpowermult
```

It prints how often each error source was hit, plus the error statistics. It
runs in well under a second. The other testbenches are built the same way by
changing the testbench file and the top module name. The reference model in
`tb/mult_ref_pkg.sv` computes each cell's numeric value column by column. It
is the place to start if you change the reduction map.
