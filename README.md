# Hybrid adder with a configurable chain of sub-adders

A wide binary adder does not have to use one carry scheme across its whole
width. This design splits an N-bit addition into L contiguous slices and adds
each slice with whichever adder architecture suits it: a ripple carry adder
where area matters, a carry lookahead or prefix adder where speed matters.
The slices are chained by their carries, so the result is an ordinary N-bit
adder (`sum`, `cout` = `a + b + cin`) whose delay and area can be traded off
by choosing the kinds and widths of its stages.

The RTL follows the hybrid adder of *"FPGA-based New Hybrid Adder Design with
the Optimal Bit-Width Configuration"* (Alshewimy and Sertbas). That publication
chooses the stage kinds and widths with a linear-programming model fed by
measured FPGA delays and areas; this repository holds the hardware only. Its
default is the configuration that publication found best in area × delay:
128 bits, written **RCA(32)|CLA(96)**, a 96-bit carry lookahead stage under a
32-bit ripple carry stage.

Everything is combinational. There is no clock, no register and no reset.

## The chain (`hybrid_adder`)

```
          a[127:96] b[127:96]          a[95:0] b[95:0]
                |     |                    |     |
             +---------+   c[1]         +---------+
   cout <----|  RCA 32 |<---------------|  CLA 96 |<---- cin
             +---------+                +---------+
                  |                          |
             sum[127:96]                 sum[95:0]
```

Stage `i` (`i = 0` is the least significant) is `WIDTHS[i]` bits wide and is
built by `sub_adder` as the architecture `KINDS[i]`. The carry out of stage
`i` is the carry in of stage `i+1`. Nothing else links the stages: no stage
sees another stage's generate or propagate signals.

Because the only path between stages is the carry, the worst-case delay of the
chain is the largest of

```
DS_1,  DC_1 + DS_2,  DC_1 + DC_2 + DS_3,  ...,  DC_1 + ... + DC_{L-1} + DS_L
```

where `DS_i` is stage i's operand-to-sum delay and `DC_i` its operand-to-carry
delay. The total area is the sum of the stage areas. That separability is what
makes the configuration choice a small integer program: pick, for each
position, one (kind, width) with widths summing to N, minimise the largest
path delay, and keep the summed area under a budget. The per-width delays and
areas come from synthesising each adder kind on its own. That optimiser is not
part of this repository; to use a configuration, set the parameters.

### Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N`       | 128 | operand width |
| `L`       | 2 | number of stages |
| `KINDS[L]`  | `'{ADD_CLA, ADD_RCA}` | architecture of each stage, least significant first |
| `WIDTHS[L]` | `'{96, 32}` | width of each stage, least significant first; must sum to N |

A time-zero assertion reports widths that do not sum to N. Stages of width 0
are not supported: use a smaller `L` instead.

### Reading "X(a)|Y(b)"

Configurations are written as `X(a)|Y(b)`. This RTL reads them the way a bit
vector is printed: the first-named stage is the most significant. So
`RCA(32)|CLA(96)` is `KINDS = '{ADD_CLA, ADD_RCA}`, `WIDTHS = '{96, 32}`. The
source describes this notation inconsistently: it puts the first-named kind on
the high bits, but gives it the second-named width. This RTL keeps each kind
with its own width. The order changes delay and area. It does not change the
sum, so every ordering passes the same tests.

Verilator cannot resize the `KINDS`/`WIDTHS` array parameters when `L` is
overridden to 1. For a single adder, instantiate `sub_adder` (or the adder
module) directly.

## The six stage architectures

All six have the same ports: `a`, `b` (N bits), `cin` in; `sum` (N bits),
`cout` out. Each has its own parameter `N` with default 128, so it also works
as a stand-alone adder. `adder_pkg` holds the kind enum `adder_kind_e`, the
(generate, propagate) pair `gp_t` and the prefix operator `gp_combine`:

```
(g, p)_hi o (g, p)_lo = (g_hi | p_hi & g_lo,  p_hi & p_lo)
```

| module | kind | structure |
|--------|------|-----------|
| `rca_adder` | `ADD_RCA` | N `full_adder` cells in a carry chain. |
| `cla_adder` | `ADD_CLA` | Multi-level lookahead with fan-in `R` = 4: ceil(log4 N) levels (4 levels for 128 bits). Also outputs the group generate/propagate (`gout`, `pout`). |
| `cska_adder` | `ADD_CSKA` | Modified carry skip: 4-bit CLA blocks, with a skip multiplexer per block driven by the block propagate (AND of the block's `a ^ b`). |
| `csla_adder` | `ADD_CSLA` | Carry select with 4-bit blocks. The lowest block is a plain RCA. Every other block has two RCAs, with carry in 0 and 1, and a multiplexer; the block carry out is `c0 \| (c1 & cin_block)`. |
| `sklansky_adder` | `ADD_SK` | Sklansky prefix tree: ceil(log2 N) rows, and fan-out doubles at each row. |
| `brent_kung_adder` | `ADD_BK` | Brent-Kung prefix tree: an upward tree and a downward tree sharing one row, so 2·ceil(log2 N) − 2 rows (6 for 16 bits, 12 for 128). Fan-out is at most 2. |

Details that are easy to get wrong:

* **CLA padding.** `cla_adder` pads the operand up to `R^levels` bits with
  *transparent* positions (`p = 1, g = 0`). The top node's group signals then
  describe exactly the N real bits, and `cout = gout | pout & cin`. Inside a
  lookahead unit, each child carry is written as an explicit sum of products
  of the unit's carry in and the children's g/p, not as a ripple.
* **Carry in of the prefix adders.** The prefix trees work only on the
  operand bits. `cin` enters in post-processing, `c[i+1] = G[i:0] | P[i:0] &
  cin`, so it never joins the tree.
* **Widths that are not a power of two or a multiple of 4** (93, 35, 63, 65,
  124 all occur among the evaluated configurations):
  * In the block adders (CSKA, CSLA), the top block is shorter than 4 bits.
  * In the prefix adders, the trees are cut off at bit N−1. The index rules
    still hold; the testbenches check this at width 93.
* **The skip multiplexer.** When a block's propagate is 1, the CLA's own carry
  out already equals its carry in. The multiplexer only shortens the path; it
  never changes the value. A broken multiplexer therefore shows up only when
  the block propagate is 0.

## Simulation

Every module has a self-checking testbench in `tb/`. Each ends with the line
`TB_RESULT checks=<n> failures=<m>`. With plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/adder_pkg.sv \
    tb/tb_hybrid_adder.sv --top-module tb_hybrid_adder -Mdir obj -o sim
./obj/sim
```

Files are found by module name through `-Irtl -Itb` (add `-y rtl -y tb
+libext+.sv` if your Verilator version needs it). `adder_pkg.sv` must come
first.

| testbench | what it runs |
|-----------|--------------|
| `tb_rca_adder`, `tb_cla_adder`, `tb_cska_adder`, `tb_csla_adder`, `tb_sklansky_adder`, `tb_brent_kung_adder` | Each adder at widths 4, 8, 16, 32, 64, 93 and 128. Stimulus: all 4-bit operand pairs with both carry ins, edge cases, 3000 random vectors (a third of them fully propagating, `b = ~a`, sometimes with one bit flipped), and one vector from the source's 128-bit simulation charts. `tb_cla_adder` also checks `gout`/`pout`. |
| `tb_hybrid_adder` | The top at its default parameters: 20 000 vectors. It counts, and requires at least once, each of: a carry into the high stage, a carry stopped at the boundary, `cin` propagated through both stages, a low-stage carry rippling through the whole high stage, and a carry out. |
| `tb_adder_configs` | The six two-stage 128-bit configurations evaluated in the source (RCA(32)\|CLA(96), RCA(65)\|CSLA(63), CSKA(93)\|CLA(35), RCA(35)\|SK(93), RCA(4)\|CSKA(124), RCA(4)\|BK(124)) and the six single 128-bit adders, on shared random operands. |

All reference values come from the simulator's own `+` on wider vectors. Each
testbench finishes in well under a second of run time.

## How far to trust it, and where it departs from the source

* **Verified:**
  * Every module is functionally correct at every width listed above. In the
    prefix and lookahead adders, every carry path is exercised by the
    propagate-heavy vectors.
  * Each testbench was also run against a deliberately broken copy of its
    module, and it fails on every one.
  * Every file passes Verilator lint and the slang front end of Yosys.
* **Not reproduced:** the source's delay (ns) and area (slice) numbers. They
  come from a specific FPGA flow, and nothing here claims to match them. The
  structures are the textbook ones the source draws, but synthesis tools
  restructure adders freely. If you compare architectures on an FPGA, keep
  the hierarchy (no flattening), or the comparison is between the tool's
  adders, not these.
* **Choices made here, where the source gives no value or detail:**
  * The CLA fan-in of 4.
  * Block size 4 for the CSKA and CSLA at every width. The source draws only
    16-bit versions with 4-bit blocks.
  * Short last blocks.
  * How `cin` enters the prefix adders.
  * The group `gout`/`pout` outputs of `cla_adder`.
  * The stage order in "X(a)|Y(b)" (see above).
* **Corrected in reading the source:**
  * The prefix operator is taken as `(g_i | p_i g_j, p_i p_j)`.
  * The CLA sum as `s_i = p_i ^ c_i`.
* **Not built:** the configuration optimiser, which is a design-time program,
  not hardware.
