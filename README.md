# Hybrid-encoded asynchronous domino pipelines: EA-Hybrid and PD-Hybrid

These circuits are asynchronous, gate-level pipelines: every stage is one domino gate deep, and no
clock sets their rate. Each stage's *critical path* is a single dual-rail gate. It announces its
own completion, so the handshake control watches only that one gate and ignores the rest of the
data word. The other gates in the stage are plain single-rail domino, which keeps the cost of
dual-rail encoding down to one gate per stage. This mix of encodings is called a hybrid data path.

There are two handshake styles:

- **EA-Hybrid** (early acknowledge). The completion detector sits *in front of* the logic block.
  It predicts that the stage is about to evaluate, so it can acknowledge the previous stage
  early. This gives the shortest cycle.
- **PD-Hybrid** (post detection). The completion detector sits *behind* the critical gate and
  reports a finished evaluate or precharge. It is slower, but it has no timing margins to meet.

Both styles add an *isolate* phase to precharge and evaluate. In isolate, a stage holds its result
while its predecessor precharges, so every stage can hold a distinct item. A stalled pipeline
therefore stores one item per stage (100 % capacity).

The RTL builds these test circuits in both styles:

- a 4-bit, 10-stage FIFO;
- a 16-bit ripple-carry adder;
- an 8x8 array multiplier;
- an 8-tap, 6-bit direct-form FIR filter, built from EA-Hybrid multipliers and adders whose first
  stage joins two pipelines.

`hyb_top` places all of them side by side.

## Timing model: one tick per gate

The circuits are self-timed transistor-level domino logic. The RTL models them at **unit gate
delay**:

- Every node that holds state or drives a handshake wire is a flip-flop updated on `clk`. That
  covers the domino nodes, the completion detectors, the stage controller's NAND3 and inverter,
  and the asymmetric C-element.
- One tick of `clk` is therefore one gate delay, and `clk` is **not** a pipeline clock: nothing
  waits for a clock edge except to model a gate's delay.
- The drive buffers on `pc`/`ev` are taken as part of the gate they follow and add no tick.

The model keeps what the handshake decides, which is the order of events and who waits for whom.
It loses analogue effects: charge sharing, real delay differences between gates, and the margins
of the EA timing constraints.

Applying the published cycle-time sums with one tick per gate gives these numbers, and the
testbenches check them exactly:

| quantity | EA-Hybrid | PD-Hybrid |
|---|---|---|
| cycle, t_ev + 2 t_CD + 2 t_NAND3 | 5 ticks | — |
| cycle, t_ev + t_ev* + 2 t_NAND2 + 2 t_NAND3 + t_pc* | — | 7 ticks |
| latency per stage | 1 tick | 1 tick |
| items held by a stalled N-stage pipeline | N | N |

The published transistor-level FIFO results put EA-Hybrid about 1.3 times faster than PD-Hybrid.
This model gives 7/5 = 1.4.

## Phases and signals of one stage (`hyb_stage`)

Each stage gets two decoupled control lines. Together they select the phase:

| pc | ev | phase |
|---|---|---|
| 0 | 0 | precharge: all outputs are cleared; the dual-rail output goes to the spacer (0,0) |
| 1 | 1 | evaluate: the outputs rise monotonically once the inputs are valid |
| 1 | 0 | isolate: the outputs hold, whatever the inputs do |
| 0 | 1 | never used (assertions check for it) |

A stage is built from four parts:

- **`dr_slg`**, the critical gate. It is a dual-rail *synchronizing* logic gate: for every input
  combination exactly one pull-down path conducts, so its delay does not depend on the data. A
  path conducts only while every *linked* incoming dual-rail pair is valid. A gate with such links
  is an SLGL, and this is what makes the stage wait for its predecessor. The gate's function is a
  truth-table parameter (`TT_BUF`, `TT_AND2`, `TT_MAJ3`, `TT_XOR3` in `hyb_pkg`).
- **`domino_sr`**, the single-rail gates. They evaluate when the critical links are valid. Because
  the critical path is by construction the slowest path of a stage, its validity stands in for
  the validity of every single-rail input.
- **A completion detector.** It produces `S`, which is the stage's "I have taken it" signal to
  the previous stage.
  - `cd_ea` sets `S` when every incoming critical pair is valid and its own stage is in
    evaluate. It clears `S` in precharge and holds it in isolate. `S` therefore rises in the
    same tick as the evaluation. A JOIN stage has one detector input per incoming pipeline.
  - `cd_pd` is a NAND2 on the critical gate's two dynamic nodes. It rises one tick after the
    gate has evaluated and falls one tick after it has precharged.
- **`stage_controller`.** It computes `ev = NOT S` and `pc = NAND3(S, T, T')`, where `T` is the
  successor's `S`.

**Why T' exists.** After precharging, a stage evaluates its next item by itself. If the successor
is stalled, its `T` may still be high from the *previous* item. Without protection, the stage
would read that stale `T` as an acknowledge for the new item and precharge it away. `T'` comes
from an asymmetric C-element:

- it is reset when `S` falls, meaning the stage has precharged;
- it is set only once `S=1` and `T=0`, meaning the successor has let go of the old item.

A stage can therefore precharge only on a `T` that rose after its current item. `tb_hyb_stage`
holds `T` high across a whole cycle to show this. The full-design test counts several thousand
ticks in which a stage sits isolated with `T=1, T'=0`.

**EA sequence for one item at stage N:**

1. Valid data arrives. The stage evaluates and, in the same tick, its detector raises `S`.
2. `ev` falls one tick later, so the stage is in isolate.
3. Stage N+1 evaluates and its `S`, which is stage N's `T`, rises.
4. `pc` falls, so stage N precharges and its detector clears `S`.
5. `ev` and `pc` return to 1 and the stage is ready for the next item.

The PD sequence is the same, except that each `S` edge comes one tick after the gate it watches.

## Channels at the edges of a circuit

Each circuit's input and output channel has three parts:

- a **dual-rail pair** (`*_cr`, type `dr_t {t, f}`), which is the request. It also carries one
  data bit on its true rail: FIFO bit 0, the adder carry-in, the multiplier's `a[0]`, or the
  FIR `x[0]`;
- **single-rail data bits**, valid while the pair is valid;
- an **acknowledge**: `in_ack` is the first stage's `S`, and `out_ack` is the last stage's `T`.

The exchange has four steps:

1. The sender drives an item.
2. It waits for `in_ack` to rise.
3. It returns the pair to the spacer (0,0).
4. It waits for `in_ack` to fall.

The sender may drive the next item in the same tick that it sees the fall. The receiver raises
`out_ack` once it has taken the output and drops it after it sees the spacer. A receiver that
never raises `out_ack` stalls the pipeline. The testbench helpers `tb/tb_hyb_src.sv` and
`tb/tb_hyb_sink.sv` implement both sides, including random gaps between items and stalls.

## The circuits

### FIFO (`hyb_fifo`, WIDTH=4, DEPTH=10)

The FIFO is ten buffer stages. Bit 0 goes through a buffer SLG, which is the critical path, and
bits 3:1 go through single-rail domino buffers.

| | EA | PD |
|---|---|---|
| latency | 10 ticks | 10 ticks |
| interval | 5 ticks | 7 ticks |
| items held when the output stalls | 10 | 10 |

### Ripple-carry adder (`hyb_rca`, W=16)

Stage i is the full adder of bit i. Its carry, a majority gate, is the critical SLG and is linked
to the previous carry. The operands and the partial sum move through every stage as single-rail
buffers.

- Latency is W ticks. The interval is 5 (EA) or 7 (PD) ticks.
- `cin` must be the true rail of a link pair or a constant. `hyb_top` feeds it from the input pair.
- `NJOIN > 1` builds a **JOIN** first stage. It has one link per incoming pipeline, both in the
  SLG and in the completion detector, so the stage waits for all of them. `tb_hyb_rca` drives the
  two links from separate senders with random, unequal gaps.

### Array multiplier (`hyb_array_mult`, N=8)

The multiplier has 2N one-gate stages:

| stages | what they do | critical gate |
|---|---|---|
| 0 | AND array of the partial products | the AND gate a0&b0 |
| 1..N-1 | carry-save rows: each adds one partial-product row into a running sum and carry vector | a full-adder carry |
| N..2N-1 | ripple stages that resolve the remaining carry, one bit per stage | the carry; in the last stage, an XOR3 sum bit |

The product's top bit is the true rail of the last critical pair.

- Latency is 2N ticks (16). The interval is 5 (EA) or 7 (PD) ticks.
- Operands are unsigned, and `a[0]` must equal the true rail of `link_in`.

### FIR filter (`fir_filter`, 8 taps, 6-bit samples and coefficients, 15-bit output)

The filter computes y(n) = Σ COEF[k]·x(n−k), all in EA-Hybrid style:

- **Tap registers and their control (`fir_tap_latches`).** The delay line has to feed the
  multipliers and shift at the same time, which a plain linear pipeline cannot do.
  - Each multiplier gets its operand x(n−k) and its own link pair.
  - When a multiplier's first stage takes the sample (its `S` rises), that link drops back to
    the spacer for that multiplier alone.
  - Once all eight have taken it, the delay registers load for one tick and `in_ack` rises. This
    models the latches briefly turning transparent while every first stage is isolated.
  - When the sender returns to the spacer, the links reopen for the next sample.
- **Multipliers.** There are eight 6x6 `hyb_array_mult` (12 stages each), one per tap, with the
  coefficient as the constant second operand.
- **Adder tree.** Three levels of `hyb_rca`, 12, 13 and 14 bits wide. Each adder's first stage
  is a JOIN of its two producers' critical pairs, and each adder's carry-in is 0. The root
  adder's sum and carry pair give the 15-bit output.
- **Coefficients.** The default `COEF = {1,2,5,8,8,5,2,1}` is a symmetric low-pass set summing to
  32, on the same 2^5 integer scale as the published filter. Override `COEF` to use others.

The largest possible output is 8·63·63 = 31752, which fits in 15 bits.

- Latency is 51 ticks from the sample's arrival to the output, set almost entirely by the stage
  count: 12 multiplier stages and 12 + 13 + 14 adder stages.
- The full-rate interval is **6 ticks**, one more than the multipliers alone. The extra tick is
  the round trip through the tap-register control. The full-design test also sends samples with
  random gaps and checks every output.

### Encoding converter (`encoding_converter`)

This cell turns a single-rail signal into a dual-rail pair. It uses a precharged node with
decoupled `pc`/`ev`, so it too has an isolate phase. No circuit here needs it: each critical path
starts dual-rail at its channel. `hyb_top` therefore brings one instance out on its own pins
(`conv_*`).

## Where this RTL departs from the transistor-level design

- The whole model runs on a unit-delay tick (see above). Timing constraints, drive buffers and
  power cannot be studied with it.
- The multiplier's stage arrangement and the critical gate of each stage are this design's own,
  for any N. The published 3x3 example uses five stages with different critical gates per stage.
  This design uses 2N stages (six for 3x3), with a carry as the critical gate in every stage
  except the last.
- The transistor design makes some non-critical gates dual-rail when the next stage needs both
  polarities. Here, every non-critical signal is a single-rail value.
- The FIR tap registers are flip-flops enabled for one tick, not D-latches. The per-multiplier
  link gating and the `in_ack` taken from the shift are this design's own control.
- The FIR coefficients are not the published ones, which are not given numerically (see above).
  The adder tree's shape is also this design's choice.
- The FIR filter's interval is 6 ticks, not the multiplier's 5, because of the tap exchange. The
  transistor-level filter runs close to its multiplier's rate.
- There is no analog front end. The ADC and DAC around the filter and the read-channel
  environment are not part of the RTL. The filter's digital ports are the boundary.

## Files

| file | content |
|---|---|
| `rtl/hyb_pkg.sv` | dual-rail type `dr_t`, phase and style enums, truth-table constants |
| `rtl/domino_sr.sv`, `rtl/dr_slg.sv`, `rtl/encoding_converter.sv` | gates |
| `rtl/cd_ea.sv`, `rtl/cd_pd.sv`, `rtl/stage_controller.sv` | control of one stage |
| `rtl/hyb_stage.sv` | one stage of either style |
| `rtl/hyb_fifo.sv`, `rtl/hyb_rca.sv`, `rtl/hyb_array_mult.sv` | pipelined circuits |
| `rtl/fir_tap_latches.sv`, `rtl/fir_filter.sv` | FIR filter |
| `rtl/hyb_top.sv` | all circuits side by side |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_hyb_src.sv`, `tb/tb_hyb_sink.sv` | channel sender and receiver used by the testbenches |

## Simulating

Every testbench is self-checking and ends with a line `TB_RESULT checks=N failures=M`. Build and
run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_hyb_top \
    rtl/hyb_pkg.sv tb/tb_hyb_top.sv -o sim
./obj_dir/sim
```

Replace `tb_hyb_top` with any other `tb_<module>` to run that block's test.

`tb_hyb_top` runs the whole design at its default sizes in three phases:

1. full rate;
2. all receivers stalled (the FIFOs must fill to exactly 10 items, the adders and multipliers
   to 16);
3. random gaps between items.

It checks every result against reference arithmetic and checks latencies and intervals. It also
counts, and requires, each mechanism:

- stages isolating;
- stale acknowledges blocked by `T'`;
- JOIN evaluations;
- tap-register loads;
- each row of the converter's table.

It finishes in well under a minute.

The block testbenches cover:

- the FIFO, adder and multiplier in both styles, with latency, interval and capacity;
- the JOIN, with two independent senders;
- a 3x3 multiplier;
- every completion-detector, controller and gate rule, against random stimulus, each tick.

Assertions in the RTL check three rules:

- `(pc, ev)` never equals `(0, 1)`;
- an SLG never conducts two paths at once;
- a dual-rail output is never (1,1).
