# Time-multiplexed IIR loop filter for flicker-free colour-tone changes

When a video processor changes the colour tone of a picture (for example,
moving the colour temperature), a control value that jumps from one field or
line to the next makes the picture flicker visibly. Smoothing every such value
with a low-pass filter hides the jump. A linear-phase FIR filter with a slow
enough response would be large. A first-order recursive filter, the *IIR loop
filter*, gives the same smooth step response with one adder, one subtracter
and two constant multipliers.

This RTL holds three such filters, one for each of three inputs X1..X3
(for instance three colour components). They share **one** datapath by
time multiplexing: a counter steps through the inputs, one per clock, and each
input's filter state is parked in its own flip-flop between turns. This costs
three state registers and a few multiplexers in place of two more complete
filters.

## The loop

Each channel keeps a 20-bit state `S` and produces a 12-bit output `Y`:

```
S <= X + S - k*S          (new state, 20 bits)
Y  = k*S                  (output, 12 bits, computed from the new S)
k  = n/256,  n chosen from a 16-entry table by sel
```

In z-domain terms `Y/X = k / (1 - (1-k) z^-1)`: a first-order low pass with
DC gain exactly 1. After `m` updates, a step of height `X` has reached
`X*(1-(1-k)^m)`. A small `k` gives a slow, smooth approach and a large `k`
a fast one.

Why 20 bits: the state settles at `X/k`. With `k` down to 1/256 and `X` up to
4095 that is below `2^20`. The 8 extra bits are the fraction that a
multiplication by `n/256` shifts out. The state never overflows, whatever the
inputs and however `sel` changes: `S - k*S + X` stays below `2^20` for every
`S` below it.

**Fixed-point behaviour.** Both multiplications by `k` are formed as
`floor(S*n/256)`, a right shift after the product. With this truncation the
loop settles where `floor(k*S) = X`, so **the output equals the input
exactly** once settled. No offset of one LSB remains. Along the way the
output stays within one LSB of the ideal response `X*(1-(1-k)^m)`, and a
rising step never makes it fall.

**Coefficients.** The 16 numerators `n` are in `iir_pkg::coef_num`:

| sel | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 |
|-----|---|---|---|---|---|---|---|---|---|---|----|----|----|----|----|----|
| n   | 1 | 2 | 4 | 8 | 16 | 24 | 32 | 48 | 64 | 96 | 128 | 160 | 192 | 208 | 224 | 240 |

The end points 1/256 and 240/256 and the count of 16 come from the original
design. So do the slow powers of two 1/256 to 16/256: after 50 updates they
give gains of 0.178, 0.324, 0.545, 0.796 and 0.960, which match the published
step-response curves. The entries from 24 to 224 are this design's own
fill-in. Each has at most four set bits, so each product is at most four
shifted copies added together. To change the table, edit `coef_num`. Any `n`
from 1 to 255 works.

| k     | updates until the output equals a full-scale step |
|-------|------|
| 1/256 | 2273 |
| 16/256 | 139 |
| 128/256 | 13 |
| 240/256 | 4 |

## Sharing one datapath: the four parts

```
            (i) input port           (ii)+(shifts) operation      (iv) output port
 X1 ─┐                                  ┌────────────────┐
 X2 ─┼─ Mux ── x_q (12b D/ff) ───────── │ s = x_q +      │── s ──┬── k*s ── Demux ── Y1 D/ff ── y[0]
 X3 ─┘   ▲                              │   (fb - k*fb)  │       │                ├─ Y2 D/ff ── y[1]
         │ cnt (one-hot)                └────────────────┘       │                └─ Y3 D/ff ── y[2]
 start ─ Count ◄─ Count_ctrl               ▲ fb (20b D/ff)       │        ▲ ch_q
         │                                 │                     │        │
         └── ch_q (3b D/ff) ───────────────┼─────────────────────┼────────┘
                                           │   (iii) register area
                                           └─ Mux ◄─ state[0..2] ◄─ Demux (by ch_q)
                                                 ▲ cnt
```

| part | module | contents |
|------|--------|----------|
| input port | `iir_input_port` | one-hot ring counter (`Count`), its start/stop control (`Count_ctrl`), input multiplexer, 12-bit sample register `x_q`, 3-bit channel-code register `ch_q` |
| operation part | `iir_operation` | subtracter `fb - k*fb`, adder `+ x_q`, and two shift-and-add coefficient multipliers `iir_fil_coeff` (feedback and output) |
| register area | `iir_register_area` | demultiplexer and three 20-bit state flip-flops, read multiplexer, 20-bit pipeline flip-flop `fb` |
| output port | `iir_output_port` | demultiplexer and three 12-bit output flip-flops |

The subtle part is the register area's timing. The state of a channel must
reach the operation part in the same clock as that channel's sample. The
sample spends one clock in `x_q`, so the state is read one clock early. The
read multiplexer is driven by the *undelayed* counter `cnt`, and the state
waits in `fb` for one clock. The new state is written back through the
demultiplexer under the *delayed* code `ch_q`, the code that travels with the
sample. The schedule for one sweep, with `start` sampled at edge 0:

| clock after edge | `cnt` | `x_q`, `ch_q`, `fb` | stored at the next edge |
|-------|-------|--------------------|--------|
| 0     | ch 1  | –                  | –      |
| 1     | ch 2  | ch 1 sample, state | `state[0]`, `y[0]` |
| 2     | ch 3  | ch 2 sample, state | `state[1]`, `y[1]` |
| 3     | idle, or ch 1 if `start` | ch 3 sample, state | `state[2]`, `y[2]` |

A channel's state is written two clocks after it was read and is next read
`NUM_CH` clocks after it was last read. The write therefore always lands
before the next read when `NUM_CH >= 2`. An assertion checks this.

Each multiplier `iir_fil_coeff` builds all 16 products as sums of
left-shifted copies of its input, selects one with `sel`, and shifts right
by 8. No general multiplier is used.

## Interface and timing (`iir_loop_filter_tm`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock, all registers on the rising edge |
| `rst_n` | in | 1 | asynchronous, active low; clears every state, output and the counter |
| `start` | in | 1 | sampled on a clock edge: begins a sweep over all inputs if the counter is idle or on its last input; ignored inside a sweep |
| `sel` | in | 4 | coefficient index, shared by all channels and both multipliers |
| `x` | in | `NUM_CH` × 12 | inputs, `x[c]` is channel c (packed array) |
| `y` | out | `NUM_CH` × 12 | filtered outputs, held between updates |
| `y_upd` | out | `NUM_CH` | `y_upd[c]` is high for one clock right after `y[c]` was loaded |

- One sweep updates every channel once: one filter step. The filter's time
  unit is one sweep. Pulse `start` once per line or field, whichever the
  control value changes at.
- `x[c]` is sampled at edge `c+1` after the `start` edge (channels counted from 0).
  `y[c]` changes at edge `c+2`. Each input thus reaches its output two clocks
  after the counter selects it.
- Holding `start` high runs sweeps back to back: the datapath takes one
  sample per clock, and each channel updates every `NUM_CH` clocks.
- Keep `sel` stable during a sweep. The sample and state that are in the
  datapath at the moment a change lands use the new value.

Parameters: `NUM_CH` (3), `W_IN` (12), `W_ACC` (20) on every module. The
table size, select width and shift of 8 are in `iir_pkg`. `W_ACC` must be
`W_IN + 8` for the overflow argument above to hold.

## Raising k while running: the 12-bit feedback term

The feedback product `k*S` and the output product `k*S` are both 12 bits
wide, as in the original structure. While `sel` is constant they never exceed
4095. After `sel` is raised, however, an old large state can give a product
above 4095. Both products are then clipped to 4095. The output shows full
scale, and the state drains by `4095 - X` per update instead of jumping down.
Two cases:

- Small `X`: recovery takes a few hundred updates.
- `X` near full scale: recovery can take thousands of updates.

If `sel` must change on the fly, either reset the filter when it changes, or
widen the feedback product to `W_ACC` bits in `iir_operation` (the output
product can stay clipped). The recursion then follows the new `k` at once.

## What follows the original design and what does not

Taken from it:

- the first-order loop;
- the 12-bit input and output, the 20-bit state and 12-bit coefficient products;
- three inputs on one shared datapath;
- 16 coefficients `n/256` from 1/256 to 240/256, formed by shifts and adds;
- the four-part structure: counter + multiplexer; adders + subtracter; three
  state flip-flops with demultiplexer and multiplexer; output demultiplexer
  with three flip-flops;
- a 3-bit channel code with one clock of delay;
- two clocks from input to output.

This design's own choices:

- the 14 inner coefficient values;
- what `start` does, and the one-hot counter with an idle state;
- asynchronous reset to zero;
- truncating division and clipping of the 12-bit products;
- the `y_upd` strobe.

The original design also describes a variant whose register area holds the
states in latches with a clear. It is smaller but was found to make the
system unstable, so only the flip-flop variant is built here. The reference
points it was compared with (one single-input filter, and three complete
filters side by side) are not included.

Reported results for the original design, not reproducible here because they
need a specific 0.35 µm standard-cell library: about 3,525 gates and 28.5 ns
delay at 12-bit input, against about 6,823 gates for three parallel filters.
Synthesised generically, this RTL has 137 flip-flop bits: 60 state, 20
pipeline, 12 input sample, 36 output, 3 counter, 3 channel code, 3 strobe. The
longest combinational path runs from `fb` through both multipliers, the
subtracter and the adder to the output flip-flops.

## Files

| file | contents |
|------|----------|
| `rtl/iir_pkg.sv` | sizes, select type, coefficient table |
| `rtl/iir_fil_coeff.sv` | shift-and-add multiplier by `n/256`, clipped to 12 bits |
| `rtl/iir_input_port.sv` | counter, counter control, input multiplexer, input registers |
| `rtl/iir_operation.sv` | loop arithmetic |
| `rtl/iir_register_area.sv` | per-channel state storage |
| `rtl/iir_output_port.sv` | output demultiplexer and flip-flops |
| `rtl/iir_loop_filter_tm.sv` | top level |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_iir_step_response` |

## Verification

Every testbench compares the design with a reference computed independently:

- plain integer multiplication, not shifts;
- the testbench's own copy of the coefficient table;
- a cycle-accurate model of the schedule.

Each prints `TB_RESULT checks=N failures=M` and stops itself through a
watchdog if it hangs.

- `tb_iir_fil_coeff`, `tb_iir_operation`: all 16 coefficients with corner and
  random values, including the clip.
- `tb_iir_input_port`: counter sequence, start ignored inside a sweep,
  back-to-back sweeps, input and channel-code registers.
- `tb_iir_register_area`, `tb_iir_output_port`: random write/read and
  demultiplex patterns against a reference array.
- `tb_iir_loop_filter_tm`: the whole filter at its default sizes, checked
  every clock. It exercises, and counts, each of these: single and
  back-to-back sweeps, ignored starts, coefficient changes, feedback and
  output clipping, and settling to the exact input value. It also checks the
  latency from `start` to the first and last output.
- `tb_iir_step_response`: step response for all 16 coefficients. Each output
  must stay within one LSB of `X*(1-(1-k)^m)`, must not fall, and must reach
  `X` exactly. It prints the gain after 50 updates.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/iir_pkg.sv \
    tb/tb_iir_loop_filter_tm.sv --top-module tb_iir_loop_filter_tm
./obj_dir/Vtb_iir_loop_filter_tm
```

Each testbench runs in well under a second. Not verified: timing closure
and gate count on any real cell library.
