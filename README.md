# A Viterbi decoder datapath in Null Convention Logic

This is a small Viterbi-style decoder for a rate-1/2 code, built in dual-rail
Null Convention Logic (NCL). NCL is a clockless, delay-insensitive logic style.
Each bit travels on two wires, and a block computes when its inputs turn from
"no value" (NULL) to a value (DATA). A result is finished when every output bit
carries DATA. The logic is built from threshold gates with hysteresis. The
decoder has three units:

- two **branch metric units** (BMUs) that count differing bits,
- an **add-compare-select unit** (ACSU) that keeps the cheaper branch,
- a **survivor memory unit** (SMU) that stores the path metrics kept so far.

A small output path then picks the decoded symbol.

The architecture follows the paper "An Efficient Low Power VLSI Architecture for
Viterbi Decoder using Null Convention Logic". That paper designed its gates at
transistor level and reports power, delay and transistor count. This RTL models
the logic only. The sections below say where it follows the paper and where it
makes its own choices.

## What is decoded

Time is divided into code symbols of two bits. For each symbol the decoder gets:

- the received bits `rx`,
- the expected bits of the two branches that leave the current state: `e0` for
  branch 0 and `e1` for branch 1.

Per symbol:

1. BMU *k* counts how many received bits differ from `e`*k*. That count is the
   branch metric `bm`*k*, 0 to 2 per symbol.
2. The ACSU forms `pm + bm0` and `pm + bm1`, where `pm` is the survivor's path
   metric (0 after reset). The comparator's LT output is the decision `dec`.
   `dec` is 1 when branch 0 is strictly cheaper. On a tie `dec` is 0 and branch 1
   is kept. The smaller sum becomes the new path metric.
3. The SMU shifts the new path metric in. It holds the four latest metrics.
4. The output path puts the expected symbol of the kept branch on `vd_out`.

Worked example, from the paper:

- received `11 01 11`
- branch 0 expected `00 10 01`
- branch 1 expected `11 01 10`

Branch metrics per symbol are (2,0), (2,0) and (1,1). The path metric stays at
0, then becomes 1. The last symbol is a tie, so branch 1 is kept each time and
the decoded output is `11 01 10`. `tb/tb_viterbi_ncl.sv` checks this.

There is only one survivor and one pair of branches per symbol. So this is a
greedy, single-state trellis step rather than a full multi-state Viterbi search.
That is the structure the paper gives: one ACS, two BMUs, one 4-bit path
metric.

## Dual-rail signals and threshold gates

`ncl_pkg::dr_t` is a dual-rail bit `{r1, r0}`:

| value  | r1 | r0 |
|--------|----|----|
| DATA0  | 0  | 1  |
| DATA1  | 1  | 0  |
| NULL   | 0  | 0  |
| illegal| 1  | 1  |

Every combinational block alternates between two waves. In a DATA wave its
inputs go from NULL to DATA and its outputs follow. In a NULL wave everything
returns to NULL.

The only gate is `ncl_th`, a THmn threshold gate with hysteresis. It asserts
when at least M of its N inputs are high. Once asserted, it stays high until
**all** its inputs are low. Input 0 can have a weight. The gate is written as a
latch: `set` forces 1, and "no input high" forces 0.

| gate        | parameters        | use                  |
|-------------|-------------------|----------------------|
| TH23        | the default       | full-adder carry     |
| TH22, TH33  | M = N             | C-elements, minterms |
| TH12, TH15  | M = 1             | plain OR, no state   |
| TH34w2      | N=4, M=3, W0=2    | full-adder sum       |

The blocks built from gates:

- **`ncl_xor`**: one TH22 per input combination, ORed per rail. Its output stays
  NULL until both inputs are DATA.
- **`ncl_ha`, `ncl_fa`, `ncl_adder`**: a 3-bit ripple adder. Bit 0 is a half
  adder; bits 1 and 2 are standard NCL full adders. The output has 4 bits: three
  sum bits plus the carry out.
- **`ncl_cmp`, `ncl_cmp_slice`**: a 4-bit comparator. Bit slices run from MSB to
  LSB and pass a 1-of-3 code {GT, EQ, LT} down the chain. Each slice is made of
  TH33 minterm gates over that code and the two operand bits. So the result
  waits for every input bit, and LT, EQ and GT come out as dual-rail signals.
- **`ncl_mux2`, `ncl_sel`**: 2:1 multiplexers, four for the ACSU. Each output
  rail is TH12(TH22(s1, a), TH22(s0, b)). Select DATA1 passes `a`.

## Sequential parts

- **`ncl_counter`**: the BMU's 3-bit asynchronous ripple counter of T
  flip-flops. T is tied high.
  - Stage 0 toggles on the rising DATA1 rail of the XOR output, that is, on each
    differing bit.
  - Stage *i* toggles on the rising DATA0 rail of stage *i*−1. That rail is the
    complement, so this is the carry of an up-count.
  - The count wraps from 7 to 0. `clr` clears it asynchronously.
- **`ncl_sreg`**: a serial-in serial-out shift register of dual-rail values. It
  shifts on the rising DATA1 rail of its dual-rail clock. `taps[0]` is the newest
  stage, and reset sets every stage to DATA0.
- **`ncl_smu`**: four 4-stage `ncl_sreg`s. Row *r* takes bit *r* of the
  selected path metric, so `mem[k]` is the metric of *k* symbols ago.
- **`ncl_decode_out`**:
  - two 2-stage `ncl_sreg`s collect each branch's expected bits on `bclk`;
  - a pair of NCL multiplexers picks the kept branch's symbol, using `dec` as
    the select;
  - the picked symbol is captured into `vd_out` on `sclk`, and `dec` into
    `dec_q`;
  - the serial output `vd_ser` carries the same decoded bits one at a time
    during the next symbol. Each branch register's serial output presents the
    previous symbol's bits in order, and `dec_q` chooses between them. Bit *i*
    is valid just before that symbol's *i*-th `bclk`.

All stored values hold DATA at all times.

## Sequencing: waves, wave gates and the symbol protocol

This part needs the most care when changing the design.

A threshold gate with hysteresis cannot follow an input that changes straight
from one DATA value to another. For example, TH22(a1, b1) stays set while `b1`
stays high, even after `a` flips to 0. So every combinational NCL block must see
a NULL wave between two DATA waves.

The XOR gates get proper waves from the environment. The ACSU's operands,
however, come from storage: the counters and the path-metric register. The
same is true of the output multiplexers. **`ncl_gate`** turns stored values into
waves by ANDing every rail with a single-rail enable (`eval`). With `eval` low,
the downstream logic sees NULL. Raising `eval` starts a DATA wave, and the stored
value must not change while `eval` is high.

That rule is why the path metric needs two storage places:

- The SMU's newest column captures the new path metric on `sclk`, while the
  DATA wave is still up.
- A separate path-metric register `pm` feeds the adders. It copies that column
  at the next `clr`, when `eval` is low.

The adders take 3-bit operands, but the path metric has 4 bits. The metric fed
back is therefore saturated at 7. Both adders add the same `pm`, so saturation
never changes a decision. It only changes the stored metric.

The environment (see `tb/tb_viterbi_ncl.sv`) runs each symbol as follows:

1. Pulse `clr` with `eval` low. This clears the BMU counters and loads `pm`.
2. For each of the two code bits:
   1. drive `rx`, `e0` and `e1` to DATA;
   2. raise `bclk` to DATA1;
   3. return `bclk` and the bits to NULL.
3. Raise `eval` and wait for `acs_done`, the completion detector that goes high
   when every ACSU output is DATA.
4. Raise `sclk` to DATA1. The SMU shifts, and `vd_out` and `dec_q` load.
5. Lower `eval` and return `sclk` to NULL. Wait for `acs_null`.

The top module has assertions for three of these rules:

- `sclk` may rise only on a complete DATA wave;
- `clr` may rise only after the NULL wave, with `eval` low;
- `bclk` may rise only while `rx`, `e0` and `e1` all hold DATA.

The decoded symbol for symbol *n* is valid on `vd_out` after step 4 of symbol
*n*. On `vd_ser` it appears during the bits of symbol *n*+1.

## Where this design departs from the paper or fills gaps

- **Sequencing is this design's own.** The paper does not describe how DATA and
  NULL waves, clocks and clears are ordered. The wave gates, the `eval`, `clr`,
  `bclk` and `sclk` protocol, the completion outputs and the separate `pm`
  register are choices made here.
- **Decoded output.** The paper names "a 2:1 multiplexer and a 2-bit shift
  register" and one serial dual-rail output, but not how they are wired. Here
  the decoded symbol comes out in parallel on `vd_out`. It also comes out
  serially on `vd_ser`, one symbol later. `vd_ser` uses a plain selection
  because its inputs are stored values that never pass through NULL.
- **Counter.** The counter counts each DATA1 wave of the XOR output and wraps
  from `111` to `000`. Its asynchronous preset (all ones) and clear are both
  provided. The decoder uses only the clear, at the start of each symbol.
- **Gate structures.** The paper gives ports and function but not the gates
  inside the XOR, full adder and comparator. These use standard NCL forms: a
  minterm XOR, a TH23/TH34w2 full adder and a 1-of-3 comparator chain.
- **Survivor memory contents.** The SMU stores path metrics only, as four 4-bit
  registers. Only the latest decision is kept, in `dec_q`.
- **Not modelled:**
  - the convolutional encoder, which the paper names without giving its code;
  - transistor-level behaviour, power and delay.

## Files

| file | contents |
|------|----------|
| `rtl/ncl_pkg.sv` | dual-rail type, constants, helper functions |
| `rtl/ncl_th.sv` | THmn threshold gate with hysteresis |
| `rtl/ncl_xor.sv`, `ncl_ha.sv`, `ncl_fa.sv`, `ncl_adder.sv` | XOR and adders |
| `rtl/ncl_cmp_slice.sv`, `ncl_cmp.sv` | comparator |
| `rtl/ncl_mux2.sv`, `ncl_sel.sv` | multiplexers and the selector |
| `rtl/ncl_counter.sv`, `ncl_bmu.sv` | ripple counter, branch metric unit |
| `rtl/ncl_gate.sv` | wave gate |
| `rtl/ncl_acsu.sv` | add-compare-select unit |
| `rtl/ncl_sreg.sv`, `ncl_smu.sv` | shift register, survivor memory |
| `rtl/ncl_decode_out.sv` | decoded-output path |
| `rtl/viterbi_ncl.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench per module |

Top-level parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `BMW` | 3 | branch-metric width; path metric is `BMW+1` bits |
| `DEPTH` | 4 | SMU depth |
| `SYMW` | 2 | code bits per symbol |

## Simulating

Every testbench checks its results itself and ends by printing
`TB_RESULT checks=N failures=M`. Use `tb_viterbi_ncl` for the whole decoder at
its default parameters. To run one testbench, from the project root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/ncl_pkg.sv tb/tb_viterbi_ncl.sv --top-module tb_viterbi_ncl -o sim
./obj_dir/sim +verilator+rand+reset+2
```

The testbenches assume that uninitialised state starts random. They reset
everything they read, and the NCL gates clear themselves when their inputs are
NULL.

The end-to-end test runs about 320 symbols:

- the worked example,
- a 16-symbol message with channel errors,
- random streams.

Each symbol is compared with a reference model: branch metrics, path metric,
decision, SMU contents and decoded symbol, parallel and serial. The test fails if any of these
mechanisms never occurred: a branch-0 win, a branch-1 win, a tie, a saturated
path metric, or a wait for the ACSU wave to settle.

## Trust and limits

- Simulation is zero-delay. It shows that the logic is correct with ideal wires
  and that the gates' state behaves as intended. It shows nothing about delay
  insensitivity under real delays.
- Two points depend on the relative timing of stored values and waves:
  - the wave gates are plain ANDs on stored values;
  - the ripple counter is asynchronous.
- Synthesis maps each threshold gate to a latch. A gate-level NCL library would
  map `ncl_th` to the matching cell instead.
