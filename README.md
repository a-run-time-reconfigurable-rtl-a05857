# Two-bilinear all-purpose texture unit

Texture filtering in a GPU comes in a few types: bilinear (4 texels), trilinear
(two bilinears on adjacent mip levels, 8 texels) and n:1 anisotropic (n
trilinears averaged, n = 2, 4, 8, 16). A conventional texture unit has one
bilinear filter plus "additional filter logic" that loops the bilinear filter
for trilinear and anisotropic work. Two such units cost two copies of that
additional logic.

This design merges two texture units. Their two bilinear filters share **one**
additional filter logic, which is used as a whole: the pair produces two
bilinear pixels per cycle, or one trilinear pixel per cycle, or one n:1
anisotropic pixel every n cycles. Because the two units' input streams now
compete for the shared filter, a small round-robin *fair fetching and
dispatching* logic decides every cycle which pixels go in. The filter type can
change from pixel to pixel, so the unit reconfigures itself at run time.

All arithmetic is 16-bit floating point (1 sign bit, 5 exponent bits, 10
fraction bits). The whole texture filter is one pipeline stage.

This RTL follows the run-time reconfigurable texture unit described in
W.-D. Wang's master's thesis, *A Run-Time Reconfigurable Texture Unit*
(National Chiao Tung University). Where that description stops, this RTL makes
its own choices. They are listed in the section on departures and choices.

## From linear to anisotropic: the filter arithmetic

Everything is built from one operator, the linear filter

    Li(T0, T1, FC) = T1 + (T0 - T1) * FC         (one subtract, one multiply, one add)

which equals `T1*(1-FC) + T0*FC` but uses fewer operators than the textbook
form. The other filters are compositions of it:

| filter | formula | hardware |
|---|---|---|
| bilinear | `Bi = Li( Li(T0,T1,YF), Li(T2,T3,YF), XF )` | `bilinear_filter`: three `linear_filter`s |
| trilinear | `Tri = Li( Bi(level 0), Bi(level 1), LF )` | one more `linear_filter` |
| n:1 anisotropic | `Ani = sum_k Tri_k / n` | `aniso_logic` (divide by n) and an accumulating `fp16_add` |

Texel weights in the bilinear filter are: T0 gets `XF*YF`, T1 `XF*(1-YF)`,
T2 `(1-XF)*YF`, T3 `(1-XF)*(1-YF)`. The LOD fraction LF weights mip level 0 of
the pair. Division by n is exact: n is a power of two, so `aniso_logic`
subtracts log2(n) from the exponent.

Every operator rounds on its own (round to nearest, ties to even). The
reference models in the testbenches use the same order of operations, so the
results agree bit for bit.

## Sharing the additional filter logic (`mbap_texture_filter`)

`mbap_texture_filter` holds `bilinear_filter` 0 and 1, the shared datapath
`afl_datapath_2bi` and the iteration control `afl_ctrl_2bi`. The datapath has
one linear filter, one divider, one adder and the two result registers R0 and
R1. The filter type (`ft`) selects what reaches R0/R1:

| filter type (code) | per cycle | iterations | result |
|---|---|---|---|
| bilinear (00) | Bi0 → R0 and/or Bi1 → R1 | 1 | up to 2 pixels/cycle |
| trilinear (01) | Li(Bi of level 0, Bi of level 1, LF) → R | 1 | 1 pixel/cycle |
| n:1 anisotropic (10) | R + Li(...)/n → R | n | 1 pixel per n cycles |

Code 11 is not a filter type. This design uses it to mean "no pixel" (an
empty input FIFO).

The control decodes the filter type and ratio into "iterations minus one":
0 for bilinear and trilinear, n-1 for anisotropic. It counts them with a 4-bit
counter, enough for 16:1. It reports `first` and `last`. `iter` tells the
address generators which anisotropic sample to fetch.

Two details matter:

* **Which filter holds which mip level.** The two bilinear filters swap mip
  levels on alternate clock cycles. A one-bit register toggles every cycle
  (`lod_par`). Bilinear filter 0 works on level `lod_par` of the pair and
  bilinear filter 1 on the other. The datapath uses the same bit to put
  level 0 on the weighted input of the trilinear `Li`.
* **Where a single-pixel result goes.** A trilinear or anisotropic pixel is
  written to the register of the priority slot it came from: R0 for slot 0,
  R1 for slot 1. It then leaves on its own sub-unit output.

## Fair fetching and dispatching (`mbap_texture_unit`)

Each of the two sub texture units has a sampler-state FIFO (`ss_fifo`) of
pixel requests: a filter type and 16 bits of pixel data. One cycle of the
issue logic is combinational from the two FIFO heads to the address generator
requests:

```
FIFO heads --PSG(2b: types, 16b: data)--> priority order --fetcher--> pf[1:0]
pf + ordered pixels --dispatcher--> AG0 / AG1 requests
pf --PSG(1b)--> FIFO pops (back in FIFO order)          (on the last iteration)
R0/R1 --PSG(16b, registered case)--> out_data[0/1] with out_wen[0/1]
```

**Priority sequence generator.** This is a two-way crossbar
(`priority_sequence_generator`). In case 0 it passes the inputs straight
through; in case 1 it crosses them. The case bit `prio` flips after every
issued pixel group, so FIFO 0 and FIFO 1 take turns at the higher-priority
slot 0. The same crossbar is its own inverse, so two more instances put the
fetch flags and the results back into FIFO order.

**Priority pixel fetcher** (`priority_pixel_fetcher`). It looks at the two
filter types in priority order and decides which pixels use the filter this
cycle:

| slot 0 | slot 1 | pf0 pf1 | note |
|---|---|---|---|
| Bi | Bi | 1 1 | both bilinear filters busy |
| Tri / Ani | anything | 1 0 | needs both bilinear filters |
| Bi | none | 1 0 | one bilinear filter idle (empty FIFO) |
| none | Bi | 0 1 | one bilinear filter idle (empty FIFO) |
| Tri / Ani | none | 1 0 | gain: the idle partner helps |
| none | Tri / Ani | 0 1 | gain: the idle partner helps |
| Bi | Tri / Ani | 1 0 | loss: the trilinear pixel must wait |
| none | none | 0 0 | |

**Pixel dispatcher** (`pixel_dispatcher`). `AG0 = pf0 ? pixel0 : pixel1` and
`AG1 = pf1 ? pixel1 : pixel0`. So two bilinear pixels go one to each address
generator, and a lone pixel goes to both.

**Multi-cycle pixels.** An n:1 anisotropic pixel occupies the filter for n
cycles. The fetch flags and the case bit of its first cycle are latched in
`held_pf` and `held_swap` and reused until `last`. So a pixel arriving in the
other FIFO meanwhile cannot change the decision. The FIFO is popped on the
last iteration, which keeps the pixel at the head for the address generators
throughout.

## Interface and timing of the top (`mbap_texture_unit`)

| port | dir | meaning |
|---|---|---|
| `in_push[i]`, `in_ft[i]`, `in_pix[i]`, `in_full[i]` | in/in/in/out | request stream of sub unit i; do not push while `in_full[i]` |
| `ar[1:0]` | in | anisotropic ratio of all pixels, n = 2^(ar+1); change only when idle |
| `ag_valid[1:0]`, `ag_pix[i]`, `ag_lod[i]`, `ag_iter` | out | request to address generator i: pixel, mip level (0/1) of the pixel's level pair, anisotropic sample index |
| `tex0[4]`, `xf0`, `yf0`, `tex1[4]`, `xf1`, `yf1`, `lf` | in | texels and fractions returned by address generator / texture cache 0 and 1; `lf` is taken from generator 0 |
| `out_data[i]`, `out_wen[i]` | out | filtered pixel of sub unit i, valid for one cycle when `out_wen[i]` |

The address generators and texture caches are not part of this RTL. The
unit expects their data **combinationally in the same cycle** as the request,
which models a cache that always hits. A pixel comes out one clock after the
cycle of its last iteration: one clock after fetch for bilinear and
trilinear, n clocks for n:1 anisotropic. Outputs of each sub unit appear in
that sub unit's input order. The only parameter is `FIFO_DEPTH` (default 16).
Reset is asynchronous and active low (`rst_n`).

## 16-bit floating point (`fp16_add`, `fp16_mul`)

`fp16_add` and `fp16_mul` are combinational adder/subtracter and multiplier
units. The adder aligns with guard, round and sticky bits, adds or subtracts,
normalises and rounds. The multiplier rounds an 11×11-bit significand
product. Both round to nearest, ties to even. Beyond the published design
these conventions apply:

* subnormal inputs read as zero, and results smaller than 2^-14 become +0;
* an exact cancellation gives +0;
* overflow gives a signed infinity;
* inputs with an all-ones exponent (infinity, NaN) are not supported.

Texel colours and weights in [0, 1] never reach these corners.

## Departures from the published design and choices made here

* **Numeric corners.** Rounding mode, subnormal, zero and infinity handling
  (see above) are not specified there.
* **Anisotropic ratio code.** `ar` = log2(n) - 1 is this design's encoding. So
  is the code 11 for "no pixel". `ar` is one input shared by all pixels.
* **Priority order.** It advances once per issued pixel group, not every
  clock. Otherwise an even-length anisotropic operation would always return
  priority to the same FIFO.
* **Held decisions.** The decision of a multi-cycle anisotropic pixel is
  held, and the FIFO is popped on its last iteration.
* **Accumulator start.** The accumulator adds to zero on the first
  anisotropic iteration.
* **Result register.** A lone trilinear/anisotropic pixel from slot 1 is
  written to R1 rather than R0, so it reaches its own output directly.
* **Gate-level control.** The control and fetch logic are written from their
  truth tables. The published gate netlists are not reproduced; synthesis
  picks the gates.
* **FIFO depth.** It is 16. The published throughput study assumed unbounded
  FIFOs. Here a full FIFO back-pressures the producer through `in_full`.
* **Scope.** The published study places eight such units (16 texture units)
  in a GPU. This RTL is one unit; replicate it for more.

Not included:

* the address generators and texture caches, whose function the design
  takes as given;
* the single-bilinear texture filter the two-bilinear unit is compared
  against;
* the four- and more-bilinear variants that were studied and rejected.

## Verification

Every module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line. The reference arithmetic
(`tb/fp16_ref_pkg.sv`) works in double precision: every 16-bit value, and the
exact sum or product of two of them, fits in a double, so rounding that back
to 16 bits gives the exactly rounded answer. The same package holds a
deterministic model of the address generators and caches: texels are a hash of
(pixel, mip level, sample index, texel number).

| testbench | what it shows |
|---|---|
| `tb_fp16_add`, `tb_fp16_mul` | 60k random and directed operands, exact match |
| `tb_linear_filter`, `tb_bilinear_filter` | end points, corner weights, random values |
| `tb_aniso_logic` | divide by 2..16 including underflow |
| `tb_afl_ctrl_2bi` | 1 iteration for Bi/Tri, n for n:1 Ani |
| `tb_afl_datapath_2bi` | R0/R1 contents for every mode and slot |
| `tb_mbap_texture_filter` | values and iteration counts with both mip-level orders |
| `tb_priority_*`, `tb_pixel_dispatcher` | the mapping, fetch and dispatch tables exhaustively |
| `tb_ss_fifo` | random traffic against a queue, including full |
| `tb_mbap_texture_unit` | end to end at default size |
| `tb_workload_mix` | the five evaluated filtering configurations as synthetic streams, with utilization statistics |

The end-to-end test `tb_mbap_texture_unit` covers:

* the throughput of each filter type: 128 bilinear pixels in 66 cycles,
  128 trilinear in 131, 16 n:1 anisotropic in 16n+3;
* fairness: the two sub units are never more than 2 pixels apart;
* mixed bilinear/trilinear and bilinear/anisotropic streams with runs, gaps
  and bursts;
* every row of the fetch table, both priority orders, held anisotropic
  cycles, full FIFOs and both mip-level orders, each counted and required at
  least once.

`tb_workload_mix` runs the five filtering configurations the unit was
evaluated with. These are mixed bilinear/trilinear and mixed
bilinear/n:1 anisotropic, for n = 2, 4, 8, 16. The streams are synthetic: runs
of up to 200 pixels of one type, about 6 % or 11 % bilinear, unequal stream
lengths and producer pauses. The original game trace is not available.

For each configuration the testbench prints:

* total cycles and issue cycles;
* the fetch cases that leave a bilinear filter idle (an empty partner FIFO,
  or a trilinear/anisotropic partner);
* the cases where a lone trilinear/anisotropic pixel uses the otherwise idle
  filter.

It checks that `2 x issue cycles - idle bilinear slots` equals the bilinear
work exactly. The work is 1 per bilinear pixel, 2 per trilinear and 2n per
n:1 anisotropic pixel.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/tex_pkg.sv tb/fp16_ref_pkg.sv \
          tb/tb_mbap_texture_unit.sv --top-module tb_mbap_texture_unit
./obj_dir/Vtb_mbap_texture_unit
```

Replace the testbench name to run another. Verilator finds the modules in
`rtl/` through `-Irtl`. Files are one module or package each,
named after it.

## How far to trust it

The arithmetic and every table above are checked bit-exactly against
independent models. The cycle-level behaviour of the issue logic is the
least constrained by the published description: the priority update, the
held decision and the pop timing are this design's own. The end-to-end test
checks them for correctness, order and fairness, but not against the cycle
counts of the original study. That study used a trace from a commercial game
that is not available. The single combinational filter stage is long: two
bilinear levels, a linear filter, the divider and the accumulator in one
cycle. This matches the "one pipeline stage" view of the original but would
need pipelining for a fast clock.
