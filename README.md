# Accuracy-controllable 8x8 approximate multiplier

Many image and signal processing workloads can absorb small arithmetic
errors. This multiplier uses that slack to save power and shorten its
critical path. The error is not fixed at design time: a 7-bit `mask`
input chooses how much of the final adder's carry chain is active. That
trades accuracy against switching activity and delay from one operation
to the next.

Two ideas make this work:

* **Approximate partial product reduction.** The multiplier reduces the
  partial products with *incomplete adder cells* (iCACs) instead of full
  and half adders. An iCAC splits `a + b` into `p = a | b` and
  `q = a & b`, which is still exact. The reduction then drops most of the
  `q` bits by ORing them together. ORing only loses value where two of
  them are 1 at the same position. An *approximate tree compressor* (ATC)
  turns eight rows into four rows plus one compensation vector in a
  single OR-gate level.
* **A carry-maskable final adder.** The middle seven bits of the final
  carry-propagate adder use cells that either add exactly or act as OR
  gates, one mask bit per cell. The five low bits always use OR gates,
  and the three top bits always add exactly.

The whole design is combinational and unsigned: `z` follows `a`, `b`
and `mask` after one propagation delay. There is no clock and no reset.

## Interface

| port   | dir | width | meaning |
|--------|-----|-------|---------|
| `a`    | in  | 8     | multiplicand |
| `b`    | in  | 8     | multiplier |
| `mask` | in  | 7     | `mask[i]` = 1 lets product bit `5+i` generate a carry (exact); 0 makes that bit an OR gate |
| `z`    | out | 16    | approximate product, never larger than `a*b` |

The intended settings are *thermometer codes*: the upper `u` bits of
`mask` are set and the lower `7-u` are clear.

* `u = 7` (`mask = 7'h7F`) is the most accurate setting. The final adder
  then has a 10-bit carry chain (product bits 5..14).
* `u = 0` (`mask = 7'h00`) is the cheapest setting. The longest chain is
  then the 3-bit accurate part.

Any other mask value is legal too; its behaviour is described under
"The carry-maskable cells" below.

## The datapath, stage by stage

Partial product `pp[i][j] = a[j] & b[i]` has weight `2^(i+j)`. So row
`i` covers product bits `i .. i+7`, and the 64 partial products span
bits 0..14.

### Stage 1: three levels of compression

**ATC-8** (`atc` with `N=8, W=8, S=1`) pairs rows (0,1), (2,3), (4,5)
and (6,7). The two rows of a pair share 7 bit positions. There, a row of
seven iCACs produces the OR (into `P`) and the AND (into `Q`). The one
bit at each end that only one row covers passes into `P` unchanged.

| output | bits  | recovery vector |
|--------|-------|-----------------|
| P1     | 0..8  | Q1 at 1..7      |
| P2     | 2..10 | Q2 at 3..9      |
| P3     | 4..12 | Q3 at 5..11     |
| P4     | 6..14 | Q4 at 7..13     |

`V1 = Q1 | Q2 | Q3 | Q4`, ORed bit by bit at absolute positions, so V1
covers bits 1..13.

**ATC-4** (`atc` with `N=4, W=9, S=2`) compresses P1..P4 in the same
way. Each pair again shares 7 positions.

* P5 covers bits 0..10, with Q5 at 2..8.
* P6 covers bits 4..14, with Q6 at 6..12.
* `V2 = Q5 | Q6` covers bits 2..12.

**A final row of seven iCACs** over bits 4..10 turns P5 and P6 into
P7 (bits 0..14) and Q7 (bits 4..10). Here both outputs are kept, so this
level is exact.

### Stage 2: seven OR gates

After Stage 1 the four rows are P7, Q7, V1 and V2. Only bits 4..10 hold
four bits. There, `V1 | V2` replaces `V1 + V2`, which leaves at most
three bits in every column. Elsewhere V1 and V2 are kept as they are.

### Stage 3: carry-save reduction

This stage uses accurate adders:

* a half adder at bit 1;
* full adders at bits 2..12;
* a half adder at bit 13.

Bits 0 and 14 hold a single bit each. The result is a sum row (bits
0..14) and a carry row (bits 2..14).

### Stage 4: the three-part final adder (`scalable_cpa`)

| product bits | part | logic |
|---|---|---|
| 0..1   | truncated      | taken from the sum row |
| 2..4   | truncated      | OR of the two rows; no carry leaves this part |
| 5..11  | controllable   | 7-bit carry-maskable adder (`cma`) |
| 12..14 | accurate       | three full adders; the carry out of bit 14 is product bit 15 |

Every approximation in the datapath replaces a sum by an OR, so `z` is
never above `a*b`. Even at `u = 7` the result is approximate. The ORs of
the recovery vectors (Stages 1 and 2) and the truncated part always
approximate. For example, 255 x 255 gives 57309 instead of 65025.

## The carry-maskable cells

`cm_ha` (the half adder at bit 5 of the product) is built as:

    n1   = ~(mask_x & x & y)
    s    = n1 & (x | y)        // x ^ y when mask_x = 1, x | y when 0
    cout = ~n1                 // x & y when mask_x = 1, 0 when 0

`cm_fa` (bits 6..11) is built as:

    n1   = ~(mask_x & x & y)
    w1   = n1 & (x | y)        // half sum, or x | y when masked
    s    = w1 ^ cin
    w2   = ~(w1 & cin)
    cout = ~(n1 & w2)          // = (mask_x & x & y) | (w1 & cin)

A masked full adder generates no carry of its own, but it still passes
an incoming carry. With a thermometer mask, every cell below the lowest
set bit is masked, and the bottom cell is a half adder. So no carry ever
enters the masked region, and those cells are plain OR gates. With a
non-thermometer mask, a carry generated in an unmasked bit can pass
through a masked bit above it.

## Accuracy

The end-to-end testbench measured the mean error `a*b - z` over all
65536 operand pairs at each thermometer setting:

| u | mask | mean error |
|---|------|-----------|
| 0 | `7'h00` | 1069.28 |
| 1 | `7'h40` | 681.28 |
| 2 | `7'h60` | 464.53 |
| 3 | `7'h70` | 319.56 |
| 4 | `7'h78` | 230.21 |
| 5 | `7'h7C` | 187.51 |
| 6 | `7'h7E` | 170.55 |
| 7 | `7'h7F` | 164.47 |

For a fixed operand pair, `z` never decreases as `u` grows. The
testbench checks this for every pair.

## Modules

| module | role |
|---|---|
| `acm_mult8`    | top: `pp_gen` -> `ppr` -> `scalable_cpa` |
| `acm_pkg`      | widths and bit ranges shared by the 8-bit modules |
| `pp_gen`       | N x N AND-gate partial products (parameter `N = 8`) |
| `ppr`          | Stages 1-3: ATC-8, ATC-4, iCAC row, OR gates, half and full adders |
| `atc`          | approximate tree compressor (parameters `N`, `W`, `S`; default ATC-8) |
| `icac_row`     | W iCACs side by side (default `W = 8`) |
| `icac`         | one incomplete adder cell |
| `scalable_cpa` | Stage 4: truncated part, CMA, accurate part |
| `cma`          | K-bit carry-maskable ripple adder (default `K = 7`) |
| `cm_ha`, `cm_fa` | carry-maskable half and full adder cells |
| `half_adder`, `full_adder` | accurate adders for Stage 3 and the accurate part |

`atc`, `icac_row`, `cma` and `pp_gen` are parameterized. `ppr`,
`scalable_cpa` and the top encode the bit ranges of the 8-bit design.
No general N-bit rule for those ranges is given here. Building a 16-bit
version would mean re-deriving the stage maps above.

Some synthesized output bits are plain wires from an input or constant
zeros, by design:

* the end bits of each ATC row, which pass through unprocessed;
* bits 0 and 14 of each ATC's `v`, which no recovery vector reaches;
* bits 0 and 1 of `ppr`'s carry row;
* bits 0 and 1 of `z`.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. `tb/acm_ref_pkg.sv` holds an
independent, column-by-column reference model of the multiplier. Three
testbenches use it: `tb_ppr`, `tb_scalable_cpa` and `tb_acm_mult8`.

With Verilator 5, from the folder holding `rtl/` and `tb/`:

    verilator --binary --timing -Irtl -Itb rtl/acm_pkg.sv tb/acm_ref_pkg.sv \
        tb/tb_acm_mult8.sv --top-module tb_acm_mult8
    ./obj_dir/Vtb_acm_mult8

Replace `acm_mult8` with any other block name to run its testbench.

`tb_acm_mult8` runs the design end to end at its only size:

* all 65536 operand pairs at the eight thermometer settings;
* 20000 random pairs at arbitrary masks.

It takes a few seconds. It also counts how often each approximation
mechanism acts:

* value lost in the ATCs;
* value lost by the Stage 2 ORs;
* value lost in the truncated part;
* carries suppressed by a mask bit;
* carries passing from the CMA into the accurate part.

It fails if any of these never happens.

The cell testbenches are exhaustive: `tb_icac`, `tb_cm_ha`, `tb_cm_fa`.
`tb_cma` is exhaustive over all operand pairs at masks all-ones and
all-zeros, and random otherwise. `tb_ppr` is exhaustive over all operand
pairs.

## Where this RTL departs from, or adds to, its source

* **Mask port.** The mask is a raw 7-bit vector with one bit per CMA
  cell. The source describes the setting as a count `u` of accurate
  upper bits. Drive `mask` with the thermometer code of `u` to match it.
* **Example products.** The source's simulation of the multiplier
  prints four example products: 45x35 -> 1631, 61x43 -> 2943,
  109x47 -> 5519 and 47x59 -> 2911. All four are above the exact
  product. The structure it describes can never give such values,
  because every approximation in it can only lower the sum. This RTL
  gives 1495/1559, 2047/2591, 4091/5019 and 2045/2653 for those pairs at
  `u = 0` and `u = 7`. The testbench prints these values; it does not
  compare them with the source's. The source's mask setting for those
  products is not known.
* **Own choices where the source is silent:**
  * the design is unsigned and purely combinational;
  * a masked full adder whose carry input is 1 behaves as its gate
    structure implies;
  * the accurate part is built from three full adders, and its carry
    out is product bit 15.
* **Not covered:** power, delay and area. They depend on the cell
  library and were not evaluated.
