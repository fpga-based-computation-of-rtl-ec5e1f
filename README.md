# Coil inductance accelerator

Stimulation coils for magnetic stimulation of the nervous system are designed by trial and error. Each trial needs the inductance of a coil whose turns can sit in almost any arrangement, so there is no closed formula. The usual numerical method cuts every turn into short straight segments and adds the Neumann integral over every ordered pair of segments. That is O(n²) pairs, and in software a coil of a few thousand segments takes hours.

This RTL puts the whole sum into one deep floating-point pipeline. The pipeline takes in one (segment pair, sub-point) work item per clock and adds one term per clock. A pair takes ten clocks, so a coil of n segments takes 10·n² clocks plus a fixed 96. For the largest coil evaluated (Slinky_3, 1,920 segments) that is 36.9 million clocks, under half a second at 85 MHz.

The architecture follows a published FPGA design: the coordinate memories, the pipeline interface, the stage diagram of the accumulation value, the 3-cycle adder feeding back into itself, and the cycle counts. Its floating-point library, its intermediate-value definitions and its self-term treatment are not public. This design supplies its own for each of these. [Departures and own choices](#departures-and-own-choices) lists them.

## What is summed

A coil is a list of points, `POINTS_PER_TURN` = 64 per turn. Segment k runs from point k to the next point of the same turn, and the last point of a turn joins back to the first. So n points give n segments. For every ordered pair (i, j), with i = j included, the reference segment A = A1→A2 is split into `SUBPOINTS` = 10 equal pieces. The piece centred on

    P = A1 + (q + 1/2)/10 · (A2 − A1),   q = 0..9

is integrated in closed form along segment B = B1→B2:

    term = var1/var2 · ln( (var3 + var2 − var5/var2) / (var4 − var5/var2) )

    var1 = (A2−A1)·(B2−B1) / 10        var2 = |B2−B1|
    var3 = sqrt(|P−B2|² + r²)          var4 = sqrt(|P−B1|² + r²)
    var5 = (P−B1)·(B2−B1)

Here r is the wire radius. Without it the self terms (i = j, where P lies on B) would have a zero denominator. With coordinates in metres, the inductance is L = 10⁻⁷ H/m · Σ term (μ0/4π). The hardware returns the raw sum.

## Data flow

```
 host ──write──► coord_ram X ┐
                 coord_ram Y ├─► pipeline_if ─► var_gen ─► accum_value ─► accumulator ─► result
                 coord_ram Z ┘   (counters,     (var1..5)  (one term      (3-cycle adder
                                  latches)                  per clock)      with feedback)
```

* **Coordinate memories** (`coord_ram`, three of them): 2048 × 32-bit block RAMs, one per coordinate, all read at the same address. The host writes them while the accelerator is idle. Generating the points is cheap and is left to software.
* **Pipeline interface** (`pipeline_if`): counters walk i (outer loop), j and q (innermost). The current pair's four points sit in latches that drive the pipeline. The next pair's points are fetched during the first four clocks of the current pair. The reference segment's two points are read only when i changes and stay cached for the whole row of n pairs. So one memory port serves both segments, and a run reads A only n times instead of n² times. A 6-clock load phase fills the latches before the first item.
* **var_gen**: 12 subtractors, 19 multipliers, 15 adders and the three square roots. It turns an item into var1..var5. Each value leaves as soon as it is ready:

  | value | leaves after (clocks) |
  |---|---|
  | var5 | 19 |
  | var1 | 21 |
  | var2 (with `valid`, `last`) | 35 |
  | var3, var4 | 38 |

* **accum_value**: evaluates the term (next section).
* **accumulator**: sums the terms.

Each unit takes one item per clock and never stalls. Only the valid and last flags have a reset. Data registers carry whatever the flags qualify.

## The accumulation-value stage

This stage is the heart of the design. Its operator network is:

```
 var1 ─[14]─┐                  var5 ─[16]─┐           var4 ─[11]─┐
 var2 ──────(÷)── q1          var2 ──────(÷)── q5 ──┬──────────(−)── den
            │                                      │
            └──[29]──────────────┐     var2 ─[3]─(+)─ var3 ─► [8] ─(−)── num
                                 │                                  │
                                 │                  (÷) num/den ◄───┘
                                 │                      │
                                 │                    (ln)
                                 └───────────(×)────────┘ ─► term
```

Two dividers start together when var2 arrives. One forms var1/var2, the other var5/var2. Their inputs were held back in buffers (`delay_line`) so that they arrive at the same time as var2. From var5/var2, a subtractor builds the denominator var4 − var5/var2. An adder and a second subtractor build the numerator (var2 + var3) − var5/var2. A third divider forms the ratio, then the logarithm, then the final multiply. var1/var2 waits in a 29-deep buffer for the logarithm.

Every buffer depth is computed in `fp_pkg` from the operator latencies, with arrival times measured from var2:

| buffer | depth | why |
|---|---|---|
| var1 | 14 | var2 = sqrt latency (16) later than var1 = multiply latency (2) |
| var5 | 16 | var5 leaves var_gen 16 clocks before var2 |
| var4 | 11 | var4 arrives at +3 and is needed with var5/var2 at +14 |
| var2 for the adder | 3 | meets var3 at +3 |
| after var2 + var3 | 8 | the sum is ready at +6 and needed at +14 |
| var1/var2 | 29 | subtract (3) + divide (14) + log (12) |

The depths 14 and 29 are the ones the original stage diagram prints. The operator latencies were chosen so that these two depths come out of the arithmetic. The term leaves 45 clocks after var2 (`AV_LAT`).

A change to any latency in `fp_pkg` moves every buffer with it. The latency the units actually have must equal the `LAT_*` constants; `fp_sqrt` pads its output to reach its constant.

## Accumulating with a 3-cycle adder

The accumulator is one `fp_add` whose output feeds its own second input. Because the adder takes three clocks, a term entering at clock c is added to the sum that left at clock c. That sum holds the terms of c−3, c−6, … So the loop carries three independent partial sums, and the adder still takes a new term every clock. A clock without a valid term adds zero.

When the term flagged `last` has entered, the next three adder outputs are the three final lane sums, and they are captured. The same adder then adds the first two, and three clocks later adds the third. `done` rises 10 clocks after the last term. While idle, both adder inputs are held at zero, so each run starts from empty lanes.

## Numbers and operators

All arithmetic is IEEE-754 binary32 with round to nearest-even. Subnormals are flushed to zero. There are no NaN payloads; overflow gives infinity. The operators are fully pipelined:

| unit | latency | method |
|---|---|---|
| `fp_add` | 3 | align with guard/sticky bits, add, normalise and round |
| `fp_mul` | 2 | 24×24 product, normalise and round |
| `fp_div` | 14 | restoring division, 2 quotient bits per stage, 13 stages + round |
| `fp_sqrt` | 16 | digit-by-digit root, 2 bits per stage, 13 stages + round + 2 pad registers |
| `fp_log` | 12 | multiplicative normalisation of the mantissa (24 shift-and-add steps, 3 per stage) with a table of ln(1+2⁻ᵏ) computed at elaboration, plus E·ln2 |

The testbenches check add, multiply, divide and square root to within 1 ulp of the correctly rounded result, and the logarithm to within 2 ulp. The adder's 3 clocks match the library of the original design. The other latencies are this design's own.

Single precision limits the accuracy of large coils. Each accumulator lane adds about 12 million terms for Slinky_3. The result drifts below the double-precision value by 0.2 % there (see the results table). The original work saw the same direction of drift with larger size, and proposed a wider format in the accumulator as future work. That is not built here.

## Running it

Ports of `coil_inductance_top` (all data ports are binary32 `fp32_t`):

| port | dir | meaning |
|---|---|---|
| `wr_en`, `wr_addr[10:0]`, `wr_x/y/z` | in | write point `wr_addr` (only while idle) |
| `n_points[11:0]` | in | points = segments; a non-zero multiple of 64, at most 2048 |
| `wire_r2` | in | squared wire radius (m²) |
| `start` | in | one-clock pulse; ignored while `busy` |
| `busy`, `done` | out | run in progress; one-clock pulse with `result` valid |
| `result` | out | Σ term (multiply by 10⁻⁷ for henry) |
| `cycles[31:0]` | out | clocks of the last run: 10·n² + `RUN_OVERHEAD` (96) |
| `a_fetches[11:0]` | out | reference-segment loads in the last run (n) |

The overhead of 96 clocks is made of:

* 6 for the load phase;
* 35 for var_gen;
* 45 for accum_value;
* 10 for the final reduction.

Parameters: `MAX_POINTS` (memory depth, 2048), `POINTS_PER_TURN` (64) and `SUBPOINTS` (10, at least 5 so the next pair can be fetched during the current one). Synthesis estimate for the top (generic coarse cells): about 13.8 k word-level cells, 7.4 k flip-flop bits and 216 kbit of memory, most of it the three coordinate RAMs.

## Results on the evaluated coils

`tb_workloads` builds the six coils that were evaluated, using its own dimensions:

* outer turns of radius 25 mm and inner turns of 22.5 mm;
* five stages 2.5 mm apart per leaf, with an outer and an inner turn on each stage;
* leaves 30 mm from the central leg, turned about it by i·180/(k−1) degrees for Slinky-k;
* wire radius 1 mm.

It runs each coil once at the default parameters:

| coil | segments | clocks (10·n² + 96) | L, this RTL | L, double precision |
|---|---|---|---|---|
| 1 outer turn | 64 | 41,056 | 0.1036 µH | 0.1036 µH |
| 2 outer turns | 128 | 163,936 | 0.3525 µH | 0.3525 µH |
| 4 turns (2 outer, 2 inner) | 256 | 655,456 | 1.1612 µH | 1.1612 µH |
| Slinky_1 | 640 | 4,096,096 | 5.6397 µH | 5.6386 µH |
| Slinky_2 | 1,280 | 16,384,096 | 11.6034 µH | 11.6136 µH |
| Slinky_3 | 1,920 | 36,864,096 | 19.2284 µH | 19.2744 µH |

Without the 96-clock overhead, the clock counts equal those reported for the original hardware. The single turn, 0.104 µH, is close to the 0.097 µH reported for its one-turn coil and to the textbook value μ0·R·(ln(8R/a) − 2) ≈ 0.104 µH. The larger coils' inductances depend on the dimensions, which were not published, so only the counts can be compared.

## Departures and own choices

* **var1..var5.** The formula and the names of the five values come from the original work; their definitions do not. The closed-form line integral above has exactly that form and needs exactly three square roots, which is as many as the original design has.
* **Ten pieces per pair.** The 10 clocks per pair are inferred from the published cycle counts (10·n²) and from the count of accumulated numbers. Each clock is taken as one piece of the reference segment.
* **Self terms.** These use the wire radius under the square roots, because the original self-inductance formula was not given.
* **Number format.** The number format and every operator are this design's own IEEE binary32 units. Only the adder's 3-cycle latency is taken from the original library.
* **Loop order and fetching.** The loop order, the fetch schedule and the "reference segment stays in latches" reading of the caching logic are this design's own.
* **Host interface.** The load port, `n_points`, `wire_r2`, `cycles` and `a_fetches` are this design's own.
* **Extra buffer.** The original stage diagram shows no buffer between the var2 + var3 adder and the subtractor after it. With the latencies used here, that path needs an 8-clock buffer to stay aligned with var5/var2.
* **Variants not built.** The original also tried a 13-bit-mantissa variant (abandoned for accuracy). To fit a smaller FPGA, it also shared the square roots and some adders at a lower clock. Neither variant is built. This RTL is the full-rate pipeline. Evaluating several pairs in parallel, suggested for larger devices, is not built either.

## Files and simulation

`rtl/`:

* `fp_pkg` holds the types, latencies and buffer depths;
* `fp_add`, `fp_mul`, `fp_div`, `fp_sqrt` and `fp_log` are the operators, with the helpers `fp_vsub3` and `fp_dot3`;
* `delay_line`, `coord_ram`, `pipeline_if`, `var_gen`, `accum_value`, `accumulator` and `coil_inductance_top` are the design's blocks.

`tb/` holds one self-checking testbench per unit, `tb_<unit>.sv`, plus `tb_workloads.sv`. Each ends by printing `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/fp_pkg.sv tb/tb_coil_inductance_top.sv \
          --top-module tb_coil_inductance_top -o sim && obj_dir/sim
```

`tb_coil_inductance_top` (one- and two-turn coils, checks result, clock count and that every mechanism occurs) runs in about a second after compilation. `tb_workloads` takes about four minutes, most of it for Slinky_3.
