# Reconfigurable FIR filter with APC-OMS product generators

This is a direct-form FIR filter,

    y(n) = sum_{k=0}^{TAPS-1} h(k) * x(n-k),

whose coefficients can be rewritten while it runs. It has no general multiplier
on the sample path. Each product h(k) * x is read from a tiny RAM that holds only
four odd multiples of h(k): h, 3h, 5h and 7h. Two cheap operations turn those four
words into all sixteen products of a 4-bit input:

* **OMS (odd multiple storage).** Every even multiple is an odd multiple shifted
  left, so 2h, 4h, 6h and 8h need no storage.
* **APC (anti-symmetric product coding).** The upper half of the input range
  mirrors the lower half: u*h = 16h - (16-u)*h. The products for 9..15 are
  therefore 16h minus a product for 7..1, formed with one two's-complement adder.

At the default size (16 taps, 4-bit unsigned samples, 16-bit signed coefficients,
32-bit output) the filter produces one output per clock. All adders are carry
look-ahead adders, built from 4-bit CLA blocks with a second look-ahead level. The
multiplier that weights each digit row is a Wallace tree.

The architecture follows a published FPGA design of a reconfigurable FIR filter
that uses APC-OMS, a Wallace tree multiplier and CLA adders. That description
leaves many details open, so parts of this RTL are interpretation. The section
"How this relates to the published architecture" says which parts.

## How one product is formed (`apc_oms`)

One `apc_oms` serves one tap. It takes an R-bit input digit `u` (R = 4) and
returns `h*u`, registered:

```
 u ──► apc_oms_encoder ──lut_addr──► oms_lut_ram ──odd*h──► oms_shifter ──v*h──► apc_twos_complement ──► product reg
        (address gen. +  ──shift──────────────────────────────►│                  ▲        ▲
         controller)     ──cplm, zero──────────────────────────┼──────────────────┘        │
                                         word0 = h ──► << R ───┴─── base = 16h ────────────┘
```

The encoder decodes `u` as follows:

| u      | cplm | v = magnitude generated | stored word used | shift | result     |
|--------|------|-------------------------|------------------|-------|------------|
| 0      | –    | –                       | –                | –     | 0 (`zero`) |
| 1,2,4,8| 0    | u                       | word 0 = h       | 0..3  | v*h        |
| 3,6    | 0    | u                       | word 1 = 3h      | 0,1   | v*h        |
| 5      | 0    | u                       | word 2 = 5h      | 0     | v*h        |
| 7      | 0    | u                       | word 3 = 7h      | 0     | v*h        |
| 9..15  | 1    | 16 - u (7..1)           | as for v         | as v  | 16h - v*h  |

In general: `v = u` when `u <= 2^(R-1)`, else `v = 2^R - u`. `shift` is the
number of trailing zeros of `v`, and `lut_addr = (v >> shift) >> 1`. The final
stage computes `16h - v*h` as `16h + ~(v*h) + 1`, with one CLA adder whose carry
in supplies the +1. The 16h term is word 0 shifted left by R; it is not stored.

Word widths at the defaults:

* Stored words are COEF_W + R - 1 = 19 bits, enough for 7 * (-32768).
* Products and intermediate values are COEF_W + R = 20 bits. 16 * (-32768) just
  fits, and the final result is exact because all of the arithmetic is modulo 2^20.

## Filter structure

```
            ┌──────────────────── rfir_group q (one per R-bit digit of x) ─────────────────────┐
 x[R*q+:R] ─► sipo_shift_reg ─► TAPS x apc_oms ─► pipeline_adder_tree ─► wallace_tree_mult ─► reg ─┐
            └──────────────────────────────────────────────────────────────────────────────────┘   │
                                                                      shift_add_tree (Q rows) ◄────┘──► y
 coef_we/coef_tap/coef_data ─► coef_loader ─► odd-multiple RAMs of the chosen tap (every row)
```

* The input of L bits is cut into Q = L / R digits. The default L = 4 gives a
  single row. L = 8 gives two rows, the second handling bits 7..4.
* Each row has its own delay line of digits (`sipo_shift_reg`, TAPS deep) and one
  `apc_oms` per tap. A pipelined binary tree of CLA adders (`pipeline_adder_tree`)
  sums the TAPS products.
* The row sum is multiplied by the digit weight 2^(R*q) in a Wallace tree
  multiplier. The sum is first sign-extended to 32 bits, and the product is kept
  modulo 2^32, which is correct for a signed sum times an unsigned weight. In the
  published design this multiplier replaces a shift-accumulator.
* `shift_add_tree` adds the Q weighted rows and registers `y`.

Because the digit rows use the same coefficients, a coefficient load writes the
same tap's RAM in every row.

## Reconfiguration

`coef_we` is held high for one cycle, with `coef_tap` and `coef_data`. `coef_loader`
then writes h, 3h, 5h and 7h into that tap's RAM over the next four cycles, with
`coef_busy` high. It forms each word by adding 2h to the previous one with a CLA
adder. A request made while `coef_busy` is high is ignored.

The whole datapath stalls while `coef_busy` is high: `en` is ignored and `x` is not
taken. This way no output can mix old and new odd multiples. A sample source
should treat `!coef_busy` as "ready". Every output is computed from one coherent
coefficient set:

* outputs whose products were registered before the load use the old value;
* all later outputs use the new one.

## Interface and timing (`rfir_apc_oms`)

| port        | dir | width       | meaning |
|-------------|-----|-------------|---------|
| `clk`       | in  | 1           | clock |
| `rst_n`     | in  | 1           | asynchronous reset, active low; clears the pipeline, **not** the coefficient RAMs |
| `en`        | in  | 1           | take `x` and advance the pipeline on this edge |
| `x`         | in  | L           | unsigned input sample |
| `coef_we`   | in  | 1           | start loading a coefficient |
| `coef_tap`  | in  | log2(TAPS)  | tap index k |
| `coef_data` | in  | COEF_W      | signed coefficient h(k) |
| `coef_busy` | out | 1           | loader running; filter stalled |
| `y`         | out | Y_W         | signed output |

An edge "advances" when `en && !coef_busy`. A sample taken on an advancing edge
first shows in `y` after LATENCY advancing edges, counting the one that took it:

    LATENCY = 4 + ceil(log2 TAPS) + ceil(log2 Q)     (8 at the defaults, 9 with L = 8)

The stages are:

1. delay line
2. product register
3. log2(TAPS) adder-tree levels
4. WTM register
5. log2(Q) row-tree levels
6. output register

Throughput is one sample per advancing edge. `y` holds when the filter does not
advance. After reset, load every tap before sending non-zero samples, because RAM
contents are undefined until then.

## Parameters

| parameter | default | role |
|-----------|---------|------|
| `TAPS`    | 16 | filter length |
| `L`       | 4  | input sample width; must be a multiple of R |
| `R`       | 4  | digit width = APC-OMS address width; 2^(R-2) stored words per tap (R >= 3) |
| `COEF_W`  | 16 | coefficient width |
| `Y_W`     | 32 | output width |

Shared defaults and the latency formula are in `rfir_pkg`. For the worst case
(every h = -32768, every x = 15) the output needs COEF_W + L + log2(TAPS) bits,
which is 24 at the defaults.

## Size

Coarse synthesis at the default parameters gives:

* 834 flip-flop bits;
* 1216 RAM bits (16 taps x 4 words x 19 bits);
* about 6100 word-level cells, most of them the bit-level CLA logic of the 31
  adders in the tree and the 16 complement stages.

Most flip-flops are pipeline registers:

* 64 in the delay line;
* 320 product bits;
* 360 in the adder tree;
* 32 after the WTM;
* 32 at the output.

The published implementation reports far smaller counts, for example 31
flip-flops for a 3-tap, 4-bit filter. It cannot have had this pipeline depth, so do
not expect this RTL to match those figures. To trade speed for area, remove
pipeline levels in `pipeline_adder_tree`.

## Adders and multiplier

* `full_adder_pg` is a 1-bit full adder. It exports p = a^b and g = a&b, plus a
  carry out used by the Wallace tree.
* `cla_lookahead4` is a 4-group look-ahead unit. It turns p, g and c0 into c1..c3,
  c4, PG and GG. It is used twice: once at bit level inside `cla4`, and once as the
  block-level "carry" unit of `cla16`.
* `cla4` is four full adders plus the look-ahead unit.
* `cla16` is four `cla4` blocks. A second look-ahead unit produces their carry-ins
  C1..C3 and Cout.
* `cla_adder #(W)` pads to a multiple of 16 bits and chains `cla16` blocks by their
  carries. Every adder in the design is one of these.
* `wallace_tree_mult #(AW, BW, PW)` is an AND-array of partial products. In each
  stage, every column is cut into full adders (groups of 3) and half adders (pairs).
  This repeats until each column holds at most two bits, then a CLA adds the two
  rows. The tree shape is computed at elaboration by constant functions. The
  default 5 x 5 -> 10-bit size matches the published schematic.

## How this relates to the published architecture

These parts follow the published design:

* the APC-OMS chain: address generator, controller, 4-word coefficient RAM,
  shifter, two's complement;
* the reduced product tables: A..8A and 16A, with only A, 3A, 5A and 7A stored;
* the rows of shift register, APC-OMS units, pipelined adder tree and WTM, followed
  by a pipelined shift-add tree;
* 16-bit CLAs built from 4-bit CLAs;
* the 5 x 5 Wallace tree;
* the 4-bit input (`x(3:0)`) and 32-bit output (`y(31:0)`) of the main module;
* 16 taps with 16-bit coefficients.

These are this design's own choices or interpretations:

* **Where the WTM sits.** The source places it after the adder tree and says it
  replaces the shift-accumulator. It does not say what the second operand is. Here
  that operand is the digit weight 2^(R*q). With the default single row the weight
  is 1, so the multiplier is present but trivial.
* **Throughput.** The source also describes a time-multiplexed scheme that gives
  one output every R cycles. Its block diagram shows no control for that. This RTL
  is fully parallel and gives one output per clock.
* **Tap count.** The main module's schematic is named for 8 taps, while the
  coefficient tables describe a 16-tap filter. 16 was chosen because it also holds
  the 3-, 7- and 9-tap filters the source evaluates.
* **Signedness.** Input samples are unsigned. Signed samples are not handled.
* **Additions to the interface and timing.** These are not in the source:
  * the reset;
  * the coefficient load port and the loader;
  * the stall during a load;
  * all pipeline register positions.
* **Wallace tree wiring.** The reduction uses standard Wallace grouping, and the
  final addition uses the CLA. The schematic's adder-by-adder wiring is not
  reproduced exactly.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_cla4` | all 512 input combinations; sum, carry, PG, GG |
| `tb_cla16` | corner carry chains + 5000 random additions |
| `tb_wallace_tree_mult` | 5x5 exhaustive; 12x9->16 truncated; 32x5 signed-extended |
| `tb_apc_oms_encoder` | every input for R = 4 and R = 5 decodes back to u |
| `tb_oms_lut_ram`, `tb_oms_shifter`, `tb_apc_twos_complement` | random against reference |
| `tb_apc_oms` | every address for extreme and 40 random coefficients; hold with en = 0 |
| `tb_coef_loader` | write sequence h,3h,5h,7h, one-hot tap, 4 busy cycles, request while busy ignored |
| `tb_sipo_shift_reg`, `tb_pipeline_adder_tree`, `tb_shift_add_tree` | contents/sums and exact pipeline depth with random en |
| `tb_rfir_group` | a 16-tap row (weight 1) and a 4-tap second row (weight 16) |
| `tb_rfir_apc_oms` | whole filter at default parameters (see below) |
| `tb_rfir_apc_oms_l8` | the same run with 8-bit samples (two digit rows) |

The two filter testbenches compare `y` on every clock with a reference model that
tracks the stall rules. The run has four parts:

1. An impulse, which measures the latency.
2. A 3-tap and a 7-tap filter.
3. A 9-tap windowed-sinc low-pass with cut-off 0.225 fs. It stands in for an
   order-8 equiripple design whose coefficients were never published.
4. About 4000 cycles with 16 random taps, random `en`, and coefficients rewritten
   while data is in flight.

The run also counts five events: complement-path digits, shift-only digits, zero
digits, `en` stalls and load stalls. It fails if any count is zero.

To run one testbench with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/rfir_pkg.sv \
          tb/tb_rfir_apc_oms.sv --top-module tb_rfir_apc_oms -Mdir obj -o sim
./obj/sim
```

Each run takes well under a second.
