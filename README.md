# Low-power LUT predistorter with a training scheduler

A digital predistorter (DPD) sits in front of a radio power amplifier and
distorts the baseband signal so that the amplifier's own compression and
memory effects cancel out. A common low-cost form uses look-up tables: the power
of each sample selects a bin, and per-bin complex gains are applied to the
current and a few past samples. Most of the area and power of such a
predistorter goes into its LUTs, and the next-largest share into the complex
multipliers behind them. Dropping one LUT (going from X to X-1 memory taps)
saves both. Simply removing a LUT, though, costs linearity.

This RTL implements a scheme that gets the X-1-LUT predistorter to match the
X-LUT one. It trains the smaller predistorter against a model of the
amplifier, and that model is itself learned from the trained X-LUT
predistorter. Three identical predistorter instances and a scheduler with a
one-way training state machine do this. Once training is done, only the X-1-LUT
predistorter runs, and everything else is clock gated.

The coefficient-estimation algorithm (gradient descent, indirect learning) is
not part of this RTL. It runs elsewhere, for example in software or in a
testbench, and delivers coefficients through a write handshake. The amplifier
and the analog/RF chain are not part of it either.

## The predistorter datapath (`predistorter`)

For a complex sample x(n) = I + jQ:

1. `power_calc` forms p(n) = I² + Q² at full precision (32 bits for 16-bit I/Q).
2. `addr_gen` maps p(n) to a bin number in `0 .. NUM_BINS-1` (see next section).
3. Tap m (m = 0 .. NUM_LUTS-1) holds the sample and bin from m valid samples
   ago. It reads its own LUT at that bin and multiplies:

       y(n) = sat16( ( Σ_{m < active_luts} LUT_m[bin(n-m)] · x(n-m) ) >>> 14 )

   This is the memory-polynomial model with each polynomial in |x| replaced by
   a table.
4. If p(n) is below the detected minimum power Pmin, the sample skips all of
   this and leaves unchanged: y(n) = x(n).

Number formats (`dpd_pkg`): I/Q are signed 16-bit. Coefficients are signed
16-bit with 14 fractional bits, so a coefficient of 1.0 is 16384 and the range
is about ±2. The products and their sum are kept at full precision, then
shifted right by 14 (rounding towards −∞) and saturated to 16 bits.

Each LUT (`lut_ram`) is a dual-port memory. One port takes coefficient writes
at any time. The other is read by the datapath with one clock of latency. The
multiplier behind it (`cmul`) is the four-multiplier complex product.

Pipeline: `in_x`/`in_pwr` → `out_y` is 4 clocks: tap and bin registers, LUT
read, multiply, then sum with saturation. One sample per clock at most, with
no back-pressure. The tap delay lines advance only on valid samples.

`active_luts` selects how many taps contribute. The deepest taps are switched
off first. A tap that is off has its delay stage, LUT read port and multiplier
clocked through `clock_gate` with a registered enable. `active_luts = 0`
parks the whole instance.

## Power bins and range detection (`addr_gen`)

The power range [Pmin, Pmax] is divided into `NUM_BINS` equal intervals of
width ΔP = ⌊(Pmax − Pmin) / NUM_BINS⌋. Interval k starts at
thr[k] = Pmin + k·ΔP. A power maps to the highest k with p ≥ thr[k], and a power
at or above the last boundary (Pmax included) maps to the last bin. The lookup
is a bank of comparators against the stored boundaries.

- **Detection.** While `detect` is high, every valid sample updates a running
  minimum and maximum. When `detect` falls, the block spends `NUM_BINS-1`
  clocks writing the boundaries, one addition per clock, with `busy` high.
  Bin numbers are unreliable during that time.
- **Out of reset.** The range is the whole 32-bit power word: Pmin = 0 and
  ΔP = 2³²/NUM_BINS. So nothing is bypassed until a range has been detected.
- **Narrow ranges.** If the detected range is narrower than `NUM_BINS`, then
  ΔP = 0 and every power at or above Pmin lands in the last bin.

At the top level, `detect` goes to all three instances. Each one learns the
range of its own input. The PA-model instance sees the Actual DPD's output
during detection even while it is otherwise idle.

## The training scheme (`dpd_top`, `scheduler`, `stage_ctrl`)

```
            +---------------- scheduler ----------------+
 in_x  ---> | power_calc -> sample demux ---------------+---> Actual DPD ---+------------------+--> output mux --> out_y
            |                      \                    |                  |                  |
            |                       +-------------------+---> Shadow DPD --+-> mux -> power_calc -> PA-model DPD
 upd_* ---> | update demux (write enables per instance) |       (X-1 LUTs)      (Actual or Shadow)
            | stage_ctrl (one-way FSM, round counters)  |
            +-------------------------------------------+
```

The Actual DPD is the one in front of the amplifier. The Shadow DPD is the
X-1-LUT predistorter being trained in the background. The PA-model DPD is an
X-LUT instance trained to be the inverse of the Actual DPD. Because the
trained Actual DPD approximates the amplifier's inverse, its inverse
approximates the amplifier. That lets the Shadow DPD be trained without
touching the real amplifier.

`stage_ctrl` moves through the stages once and never goes back:

| stage  | mode         | samples reach        | coefficient writes go to | out_y           | active LUTs Actual / Shadow / PA-model |
|--------|--------------|----------------------|--------------------------|-----------------|----------------------------------------|
| IDLE   | conventional | Actual               | (none accepted)          | Actual          | X / 0 / 0                              |
| STAGE1 | conventional | Actual               | Actual                   | Actual          | X / 0 / 0                              |
| STAGE2 | open loop    | Actual → PA-model    | PA-model                 | PA-model        | X / 0 / X                              |
| STAGE3 | open loop    | Actual; Shadow → PA-model | Shadow              | PA-model        | X / X-1 / X                            |
| STAGE4 | optimised    | Actual               | Actual                   | Actual          | X-1 / 0 / 0                            |

- **STAGE1.** The external algorithm trains the X-LUT Actual DPD in front of
  the amplifier, comparing `in_x` with the amplifier output.
- **STAGE2.** The Actual output runs through the PA-model DPD. The algorithm
  trains the PA-model so that its output reproduces the Actual DPD's input.
  `out_y` returns the PA-model output as the feedback signal.
- **STAGE3.** The Shadow DPD (X-1 LUTs) drives the now fixed PA-model DPD,
  which stands in for the amplifier. The algorithm trains the Shadow DPD the
  same way it trained the Actual one in STAGE1. The Actual DPD keeps feeding
  the amplifier, so all three instances are active.
- **STAGE4.** The Actual DPD runs with X-1 LUTs. The algorithm loads the
  coefficients learned for the Shadow DPD and keeps updating them as in
  STAGE1. The Shadow and PA-model instances, and the Actual DPD's last tap,
  are clock gated from here on.

In STAGE2 and STAGE3 the X-LUT Actual DPD still drives the amplifier, but the
top-level `out_y` carries the PA-model output. A system that must transmit
during open-loop training needs to tap the Actual output separately (the
`u_actual` instance).

### Update rounds and stage counters

A round is one coefficient write for every bin of every LUT trained in the
current stage: X·NUM_BINS writes, or (X-1)·NUM_BINS in STAGE3 and STAGE4. The
writer should send them `upd_sel`-major, bins in order, although the hardware
only counts them. After the last write of a round, the scheduler spends one
clock on the round trigger: `round_done` is high and `upd_ready` is low.

The stage counters count ticks, where a tick is an accepted write or a trigger
clock. Stage k ends after `STAGEk_ITERS · (LUTs·NUM_BINS + 1)` ticks, on the
trigger clock of its last round. Because the trigger clock is counted, the
counter stays in step with the rounds. Because only accepted writes count, a
paused coefficient source does not desynchronise it. At a stage change, the
routing changes on the same clock edge, so the first write of the next round
goes to the next instance.

Changes of stage, routing and `active_luts` take effect within two clocks.
Samples in flight across a change may come out of the old or the new path.
The PA-model path carries 10 clocks of samples, so let that many clocks pass
before trusting `out_y` after a stage change.

### Clock gating

Clock gating only stops registers that are not needed, so the outputs are the
same with `GATE_CLOCKS = 0` or 1. `clock_gate` is the usual latch-plus-AND
cell: the enable is latched while the clock is low. Every enable that reaches a
gate comes from a register in `stage_ctrl` or in `predistorter`, never from
combinational logic. With `GATE_CLOCKS = 0` the gates become wires and the same
registers fall back on their clock enables. On an FPGA the cell would be
replaced by a global clock buffer with enable. The latch in `clock_gate` is
intended.

## Top-level interface (`dpd_top`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `start` | in | leave IDLE and begin STAGE1 |
| `detect` | in | power-range detection phase for all address generators |
| `in_valid`, `in_x` (`cplx_t`) | in | input samples, at most one per clock |
| `out_valid`, `out_y` | out | Actual output 5 clocks after `in_x`, or PA-model output 10 clocks after it in STAGE2/3 |
| `upd_valid`, `upd_ready` | in/out | coefficient write handshake; a write is taken when both are high |
| `upd_sel`, `upd_addr`, `upd_coef` (`ccoef_t`) | in | LUT (tap) index, bin, complex coefficient |
| `stage` (`stage_e`) | out | current training stage |
| `round_done` | out | one-clock round trigger |
| `busy` | out | an address generator is building its bin boundaries |

Parameters and their defaults:

- `NUM_LUTS = 3`: X, the conventional LUT count.
- `NUM_BINS = 64`: entries per LUT. A power of two keeps ΔP a shift.
- `STAGE1_ITERS`, `STAGE2_ITERS`, `STAGE3_ITERS = 4`: rounds per stage. In a
  real system, set them to the number of iterations the algorithm needs to
  converge.
- `GATE_CLOCKS = 1`: use clock gates rather than only clock enables.

Widths are fixed in `dpd_pkg`: `SAMPLE_W`, `COEF_W`, `COEF_FRAC`. The
saturation helper assumes 16-bit outputs.

## How this relates to the published design

The following follow the published design:

- the three instances and the scheduler with power calculation, two
  demultiplexers and control logic;
- the two multiplexers at the top;
- the one-way stage machine with counter thresholds, and the one-clock
  trigger after each update round;
- power-indexed equal-width bins with Pmin/Pmax detection and the bypass
  below Pmin;
- one dual-port LUT and one complex multiplier per tap;
- X = 3;
- clock gating from registered enables.

The following are this implementation's own choices, because the published
design does not give them:

- all bit widths and the fixed-point format;
- the number of bins (64);
- the counter thresholds;
- the pipeline and latencies;
- the update handshake, and the rule that ticks are accepted writes plus
  trigger clocks;
- the reset power range;
- that the removed LUT is the deepest memory tap.

Two points are this implementation's reading of the published design:

- **Taps as memory delays.** Each tap uses a sample one step older, as in the
  general LUT-predistorter structure. The block diagram of the proposed
  predistorter does not draw the delays.
- **Power calculation outside the predistorter.** The predistorter takes
  the power on an input. The power calculation sits in the scheduler and in
  front of the PA-model instance, as in the published top-level diagram. The
  published predistorter diagram draws it inside.
- **Order in STAGE2.** The PA-model DPD is trained behind the Actual DPD. The
  training steps draw the inverse in front, but the top-level wiring only
  allows this order.

## Simulation

Every testbench in `tb/` is self-checking. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The shared reference
arithmetic is in `tb/dpd_model_pkg.sv`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dpd_pkg.sv tb/dpd_model_pkg.sv tb/tb_dpd_top.sv --top-module tb_dpd_top
./obj_dir/Vtb_dpd_top
```

Swap in any other testbench the same way.

| testbench | what it checks |
|-----------|----------------|
| `tb_dpd_top` | the whole system at default size (described below) |
| `tb_predistorter` | one instance at default size against the tap-sum model: X and X-1 taps, all taps off, coefficient rewrites, saturation, detection and bypass, 4-clock latency |
| `tb_addr_gen` | bin mapping out of reset and after three detections (wide, narrow, narrower than the bin count); build time |
| `tb_scheduler` | round triggers and `upd_ready`, write routing per stage, sample demux and power |
| `tb_stage_ctrl` | exact stage lengths under random ticks; the settings table |
| `tb_power_calc`, `tb_cmul`, `tb_lut_ram`, `tb_clock_gate` | the leaf blocks, including extreme values; `tb_clock_gate` also checks that enable glitches while the clock is high do not pass |

`tb_dpd_top` runs the whole system at its default parameters. It acts as the
training algorithm, streaming a coefficient table per stage with random pauses.
It sends random samples with gaps, and about 15 % of them are small enough to be
bypassed. It also runs a detection phase in STAGE1.

An integer model of all three instances predicts every output. Outputs within
14 clocks of a table change, a stage change or a boundary build are not
compared. The test also fails if any of the following never happens:

- one of the four stages;
- a round trigger or an update stall;
- a detection or a bypass;
- compared outputs from the open-loop path in STAGE2 and STAGE3;
- compared outputs from the X-1-LUT Actual DPD in STAGE4;
- clock-gated taps.

It finishes in about 3000 clocks.

## Not included

- The coefficient-estimation algorithm. It connects to `upd_*` and to `out_y`.
- The power amplifier, D/A and A/D converters, and up/down-conversion. The
  amplifier would be driven by the Actual DPD output.
- Sharing one training block among several transmitters, one after another.
  That would need a per-transmitter Actual DPD and a way to restart the stage
  machine, and the published design does not describe the hardware for it.
- The logic that switches between training and normal operation. The design
  starts training on `start` and stays in the optimised mode afterwards.
