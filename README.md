# Hybrid variable latency carry skip adder

A carry skip adder (CSKA) splits an N-bit addition into stages and lets the
carry jump over a stage whose bits all propagate. In the classic form each
stage's ripple block waits for the incoming carry, and a 2:1 multiplexer picks
either that carry or the block's own carry-out. This design changes that in
three ways:

1. **Concatenation.** Every stage except the first adds its operand slice with a
   carry input of zero. All ripple blocks therefore finish at the same time,
   independently of one another.
2. **Incrementation.** A half-adder chain in each stage then adds the real
   incoming carry to the block's intermediate sums.
3. **Compound-gate skip.** The stage carry `G + P·C` is made by a single AOI or
   OAI gate, with AOI and OAI alternating between stages. `G` is the zero-carry-in
   block's carry-out and `P` is the AND of the stage's propagate bits. The carry
   path from the least to the most significant stage is just one such gate per
   stage.

This is the **CI-CSKA** (concatenation/incrementation CSKA). The **hybrid
variable latency** version replaces the largest, middle stage (the *nucleus*)
by a modified parallel prefix adder. A small predictor looks at the nucleus
operand bits. When they all propagate, the carry of the lower stages can run
through the nucleus to the top of the adder. That is the one long path, and
the addition gets two clock cycles. Every other addition gets one. The clock
only has to cover the shorter paths.

The RTL is parameterised SystemVerilog-2017 and synthesizable. Its default is
32 bits with 13 stages and an 8-bit Brent-Kung nucleus.

## Block diagram

```
           a, b, cin  (in_valid / in_ready)
                 |
         [ operand register ]--------------------------+
                 |                                     |
   +-------------------------------------------+   [ vl_predictor ] (nucleus bits)
   | cska_datapath                             |       |
   |  stage 0        stage 1 ... stage 7 ... 12|   [ vl_controller ]
   |  rca_block(ci)  rca_block(0)   mod_ppa    |       | capture / stall
   |                 inc_block      (nucleus)  |       |
   |                 skip_logic     skip_logic |       |
   +-------------------------------------------+       |
                 |                                     |
         [ result register ] <-------------------------+
                 |
     sum, cout, out_valid, out_two_cycle
```

## Stages and the carry path

Stage `j` covers `STAGE_SIZES[j]` bits. Stage 0 is the least significant.

* **Stage 0** is a ripple carry block fed by `cin`. It has no skip gate, and its
  carry-out goes straight to stage 1.
* **Every other stage** has three parts:
  * `rca_block` with `HAS_CIN = 0`: its first cell is a half adder and the rest
    are full adders. It outputs the intermediate sums `z`, the carry-out `G`, and
    `P = &(a ^ b)` over the stage.
  * `inc_block`: `s = z + C` through a half-adder chain. The chain's own
    carry-out is discarded. The stage carry never waits for the chain.
  * `skip_logic`: computes `C_out = G + P·C`. Because `G` was produced with a
    zero carry input, this holds for a carry of 0 as well as 1. A multiplexer
    around a ripple block that is still waiting for its carry cannot skip a
    zero carry.

Alternation keeps inverters off the carry path:

| stage index (0-based) | gate | inputs taken as          | output        |
|-----------------------|------|--------------------------|---------------|
| 1, 3, 5, …            | AOI  | `G`, `P`, `C`            | `~C_out`      |
| 2, 4, 6, …            | OAI  | `~G`, `~P`, `~C`         | `C_out`       |

An AOI stage's inverted carry feeds the next (OAI) gate directly. The
incrementation block of that next stage needs the true carry, so it gets an
inverter that sits off the skip chain. With 13 stages the last gate is an OAI,
so `cout` comes out in true polarity. In the default list the nucleus (index 7)
is an AOI stage.

## The nucleus: modified parallel prefix adder (`mod_ppa`, `prefix_network`)

The nucleus has four levels:

* **Preprocessing:** `p = a ^ b`, `g = a & b`.
* **Prefix network:** builds the group pair `(P(i:0), G(i:0))` for every bit,
  using `(Ph,Gh)∘(Pl,Gl) = (Ph·Pl, Gh + Ph·Gl)`. Like the other stages, it ignores
  the incoming carry, so it runs in parallel with them.
  * The default is Brent-Kung, 2·log2(M)−1 levels. For M = 8 the up-sweep makes
    spans 2:1, 4:3, 6:5, 8:7, then 4:1, 8:5, then 8:1. The down-sweep then makes
    6:1, and finally 3:1, 5:1, 7:1.
  * `STYLE = PREFIX_KOGGE_STONE` selects a Kogge-Stone network instead.
  * Every cell keeps `P` as well as `G`, because the next level needs both.
* **Added level:** merges the carry from the stage below:
  `r[i] = G(i:0) + P(i:0)·C`. This one extra level is the only place the incoming
  carry enters the nucleus.
* **Postprocessing:** `s[0] = p[0] ^ C`, and `s[i] = p[i] ^ r[i-1]` for the
  other bits.

The whole-group pair `(P(M-1:0), G(M-1:0))` drives the nucleus's skip gate,
exactly as `P` and `G` do in the other stages.

## Variable latency: predictor and controller

`vl_predictor` raises `LAT_TWO_CYCLE` when all M nucleus bits propagate.

* **Two cycles.** With every nucleus bit propagating, the nucleus carry-out
  equals its carry-in. The carry from stage 0 can then ripple through every
  skip gate to the top stage's incrementation chain. This is the longest path.
* **One cycle.** Otherwise the nucleus carry-out is its group generate. The
  adder splits into two halves, and each half's worst path is much shorter.
  The fast prefix nucleus is what keeps these short paths short.

The predictor is exact, not speculative: it never lets a long-path addition
through in one cycle. For uniformly random operands it asks for two cycles with
probability 2^-8.

`hvl_cska` adds the clocked interface:

* An addition is accepted on a rising edge where `in_valid && in_ready`.
* **One-cycle addition:** the result register loads on the next edge, and a new
  addition can be accepted on that same edge. Throughput is one per cycle.
* **Two-cycle addition:** `in_ready` is low during its first cycle. The operands
  are held, and the result loads one edge later.
* `out_valid` pulses for one cycle together with `sum`, `cout` and
  `out_two_cycle`. The output has no back-pressure.
* Reset is synchronous and active-low, and clears both registers and the
  controller state.

The RTL's cycle counts are exact. Whether the clock really meets the one-cycle
paths depends on the timing constraints of your implementation. Declare the
datapath as a two-cycle path under the condition the predictor flags.

## Stage sizes

Stage sizes follow the variable stage size rule:

* The first stage has 1 bit.
* Sizes grow up to the nucleus, until the running total passes N/2.
* They then shrink, and the last stage has 1 bit (a half adder, since its carry
  input is zero).

The default list, least significant first, is `{1,1,1,2,2,3,3,8,3,3,2,2,1}`
(32 bits, nucleus = index 7). It is set in `cska_pkg`.

* The sizes up to the nucleus, and the tail 2,2,1, come from the published stage
  list.
* That list adds up to only 26 bits, while the adders it describes are 32-bit.
  The two 3-bit stages just above the nucleus are this design's choice to fill
  the gap, mirroring the rising side.
* The 26-bit list is still usable: `W=26, NUM_STAGES=11, STAGE_SIZES='{1,1,1,2,2,3,3,8,2,2,1}`.
  The datapath test runs it.

You can pass any list through the `STAGE_SIZES` parameter:

* `W` must equal the sum of the sizes. Otherwise elaboration stops with an error.
* The nucleus needs at least 2 bits.
* A fixed stage size adder is simply a list of equal sizes. The datapath test
  runs 8×4 bits. The source suggests an optimum fixed size of
  `M = sqrt(N·(T_AOI+T_OAI) / (2·(T_CARRY+T_AND)))`, from gate delays.
* `HYBRID = 0` on `cska_datapath` builds the plain CI-CSKA: the nucleus becomes
  an ordinary ripple block plus an incrementation block.

## Where this RTL departs from, or adds to, the source description

* **Prefix network.** The source prose names a Kogge-Stone network, but its
  nucleus drawing is labelled Brent-Kung and shows the Brent-Kung cell
  pattern. The default follows the drawing, and `STYLE` offers both.
* **Added level.** The exact equation of the added level is not given. The
  `G + P·C` merge used here is the natural reading, and it is exhaustively
  checked against arithmetic.
* **Predictor condition.** The source only states that the predictor reads the
  nucleus input bits. The all-propagate condition is this design's reading of
  which path is the long one.
* **Clocked interface.** The registers, handshake, reset and throughput are
  this design's own. The source describes the adder, not its interface.
* **Stage list.** The two 3-bit stages are added, as described above.
* **Not built.** The conventional multiplexer-based CSKA appears in the source
  only as a baseline. The source also reports power, delay and transistor-count
  figures from transistor-level simulation. RTL cannot reproduce those, and no
  attempt is made here.

## Files

| file | contents |
|------|----------|
| `rtl/cska_pkg.sv` | default sizes, prefix style and latency enums |
| `rtl/half_adder.sv`, `rtl/full_adder.sv` | one-bit cells |
| `rtl/rca_block.sv` | ripple block, with or without carry input |
| `rtl/inc_block.sv` | half-adder incrementation chain |
| `rtl/skip_logic.sv` | AOI / OAI skip gate |
| `rtl/prefix_network.sv` | Brent-Kung / Kogge-Stone prefix network |
| `rtl/mod_ppa.sv` | modified prefix adder of the nucleus |
| `rtl/cska_datapath.sv` | combinational CI-CSKA / hybrid adder |
| `rtl/vl_predictor.sv` | one-/two-cycle predictor |
| `rtl/vl_controller.sv` | two-state sequencer |
| `rtl/hvl_cska.sv` | top: registers, datapath, predictor, controller |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself, and has
a watchdog. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/cska_pkg.sv tb/tb_hvl_cska.sv --top-module tb_hvl_cska -o sim
./obj_dir/sim
```

Replace `tb_hvl_cska` with any other testbench name.

What the testbenches cover:

* **Leaf blocks.** `rca_block`, `inc_block`, `skip_logic`, the 8-bit prefix
  network in both styles, the 8-bit `mod_ppa` and the predictor are checked
  exhaustively.
* **`tb_cska_datapath`.** Checks five builds against integer addition: the
  default hybrid with each prefix style, the plain CI-CSKA, the 26-bit list and
  a fixed-size build. It uses about 200,000 operand sets, biased towards long
  propagate runs.
* **`tb_hvl_cska`.** Runs the top at its default parameters with 50,000
  additions. It checks every sum, every prediction flag and every latency
  (2 edges for one-cycle and 3 edges for two-cycle, counted from acceptance to
  `out_valid`). It also counts stalls, back-to-back issues, carry-outs and
  carries passed through the nucleus, and fails if any of them never happens.
