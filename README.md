# Fixed-point LSTM and GRU layer engines with truncation-only rescaling

This is synthesizable SystemVerilog for two recurrent-layer engines, one for
LSTM and one for GRU. They run a quantized network using integer arithmetic
only. They follow a post-training quantization scheme in which every signal
has a power-of-two LSB (least significant bit weight). With power-of-two LSBs,
moving a value from one LSB to a coarser one is a plain truncation: the low
bits are cut off. So where a floating-point cell would rescale, or a general
fixed-point cell would need a scaling multiplier, this datapath only drops
bits. The activations are piecewise-linear: sigmoid uses 7 segments and tanh
uses 9. Each segment is one multiply and one add.

By default both engines are sized and quantized for a small sentiment
classifier. It has 32 recurrent units and 32 input features, inputs and state
use an LSB of 2^-10, and weights are 5 bits with an LSB of 2^-3.

## The number format

A signal is a two's-complement integer `v` whose real value is `v * 2^-F`. In
the RTL, `F` is called the signal's *frac* (`IN_FRAC`, `STATE_FRAC`, ...). It
may be negative, which gives an LSB larger than 1. Three rules fix every LSB
in the datapath:

* A sum needs equal LSBs and keeps that LSB.
* A product's LSB is the product of the operands' LSBs, so the fracs add.
* Truncating `b` bits multiplies the LSB by `2^b`, so the frac drops by `b`.
  Bits are dropped from the right, which rounds toward minus infinity.

Three LSBs are chosen freely: `LSB_in` for the inputs x_t and h_t, `LSB_state`
for the recurrent state, and `LSB_weights`. A fourth, `LSB_act = 2^-5`, is the
LSB of the activation slopes. Everything else follows from these four plus a
few free truncation amounts. A gate output therefore always has
`LSB_gate = LSB_in * LSB_weights * LSB_act`: the MAC (multiply-accumulate)
output is on `LSB_in * LSB_weights`, and the slope multiplies it by a number on
`LSB_act`. The 1.0 that a saturated sigmoid produces is the integer
`2^G_FRAC`.

Each truncation point has a fixed number of dropped bits. There are two kinds:

* **Forced** truncations: two LSBs must agree (at an adder, or where a signal
  feeds back into the next timestep), so the shift is fixed by the other
  choices.
* **Free** truncations: the only purpose is a narrower word, so the amount is a
  design parameter (`B_MUL`, `B_TANH`).

## LSTM cell datapath (`lstm_pointwise`)

```
 gates (LSB_gate):      f   c'(tanh)   i   o
 c_{t-1} ──X(f)──[B_MUL]──────────┐
                  i ──X(c')──[forced]──+── state_out ──[B_STATE]── c_t  (to state buffer)
                                           │
                                           tanh ──[B_TANH]──X(o)──[forced]── h_t  (LSB_in)
```

At the defaults (`IN_FRAC = STATE_FRAC = 10`, `W_FRAC = 3`, so `G_FRAC = 18`):

| signal | frac | bits | how it is formed |
|---|---|---|---|
| x_t, h_t | 10 | 14 | input word |
| weight | 3 | 5 | |
| bias, MAC accumulator | 13 | 19 / 27 | bias is pre-quantized on LSB_in*LSB_weights |
| gate output i, f, c', o | 18 | 20 | piecewise-linear activation |
| mul_0 = c*f | 28 → 10 | 34 → 14 | free truncation `B_MUL = 18` |
| mul_1 = i*c' | 36 → 10 | 40 → 14 | forced to mul_0's LSB (26 bits) |
| state_out = mul_0 + mul_1 | 10 | 14 | saturating add |
| c_t | 10 | 14 | state truncation `B_STATE = 0` |
| tanh(state_out) | 15 → 10 | 17 → 12 | free truncation `B_TANH = 5` |
| mul_2 = o*tanh → h_t | 28 → 10 | 32 → 14 | output truncation, forced to LSB_in |

`B_MUL` and `B_TANH` are set so that mul_0, mul_1 and the pointwise tanh all
land on `LSB_state`, using the fewest bits the rules allow. As a result the
state truncation drops nothing at the defaults. Other settings are derived
automatically: `SO_FRAC = STATE_FRAC + G_FRAC - B_MUL`,
`B_STATE = SO_FRAC - STATE_FRAC`, and `PT_FRAC = SO_FRAC + 5 - B_TANH`.

The cell state has no activation after the adder: c_t = f*c_{t-1} + i*c'. The
candidate c' is the tanh gate.

## GRU cell datapath (`gru_pointwise`)

h_t = z*h_{t-1} + (1-z)*h', with h' = tanh(x_t U_h + (r*h_{t-1}) W_h + b_h). The reset
gate is applied *before* the candidate's matrix product. The GRU has one free
truncation (after z*h_{t-1}), three forced ones, and the state truncation on the
feedback path:

| signal | frac | bits | how it is formed |
|---|---|---|---|
| h_{t-1} (state) | 10 | 12 | \|h\| <= 1, so 12 bits |
| h_{t-1} into the gate MACs | 10 | 14 | forced onto LSB_in (drops 0 bits at defaults) |
| r*h_{t-1} (mul_0) | 28 → 10 | 32 → 14 | forced onto LSB_in: it feeds the candidate MAC |
| z*h_{t-1} (mul_1) | 28 → 18 | 32 → 21 | free truncation `B_MUL = 10` (keeps LSB_gate) |
| (1-z)*h' (mul_2) | 36 → 18 | → 21 | forced onto mul_1's LSB |
| h_t | 18 → 10 | 21 → 12 | state truncation, 8 bits |

At the defaults, `B_MUL` keeps the z*h product at gate precision. The GRU
feedback path is sensitive to precision here, which is why it is chosen that
way. Setting `B_MUL = G_FRAC` instead puts mul_1 directly on `LSB_state`.

## Piecewise-linear activations (`pwl_act`)

| sigmoid input | output | tanh input | output |
|---|---|---|---|
| x >= 5 | 1 | x >= 2.375 | 1 |
| [2.375, 5) | 0.03125x + 0.84375 | [1.5, 2.375) | 0.09375x + 0.765625 |
| [1, 2.375) | 0.125x + 0.625 | [1, 1.5) | 0.28125x + 0.484375 |
| [-1, 1) | 0.25x + 0.5 | [0.5, 1) | 0.59375x + 0.171875 |
| [-2.375, -1) | 0.125x + 0.375 | [-0.5, 0.5) | 0.9375x |
| [-5, -2.375) | 0.03125x + 0.15625 | [-1, -0.5) | 0.59375x - 0.171875 |
| x < -5 | 0 | [-1.5, -1) | 0.28125x - 0.484375 |
| | | [-2.375, -1.5) | 0.09375x - 0.765625 |
| | | x < -2.375 | -1 |

All slopes are integer multiples of 1/32 (= LSB_act). The module is
parameterized by the frac of its input and emits `y = a*x + beta` on frac
`IN_FRAC + 5`. The constants are scaled at elaboration time by functions in
`rnn_fxp_pkg`:

* A threshold `t` becomes `ceil(t * 2^IN_FRAC)`. This keeps the segment choice
  exact at any input LSB.
* An offset becomes `round(beta * 2^OUT_FRAC)`, with halves rounded away from
  zero. This is exact whenever the output frac is 6 or more, which covers all
  default settings.

The output is clamped to [0, 1] or [-1, 1]. The clamp only has an effect at
very coarse LSBs. The gate uses this same module on the MAC output
(frac 13 → 18). So does the LSTM's pointwise tanh, applied to state_out
(frac 10 → 15).

## Engine organisation and timing

Both engines compute one unit at a time. Each gate has its own MAC, and all
MACs of an engine take one element of the concatenated input `[x_t, h_{t-1}]`
per clock. Let K = `N_FEATURES + N_UNITS`. Each unit then takes:

* K cycles to stream its inputs,
* 1 cycle to finish the last product,
* 1 cycle to register the gate outputs,
* 1 cycle in the pointwise datapath, which writes the state and output buffers
  and emits the unit's result.

| engine | cycles per timestep | default (32 units, 32 features) |
|---|---|---|
| `lstm_layer` | `N_UNITS*(K+3)` | 2144 |
| `gru_layer` | `2*N_UNITS*(K+3)` | 4288 |

The GRU needs two passes per timestep. The candidate gate of *any* unit needs
the whole vector r*h_{t-1}, so phase A runs the z and r gates for every unit.
It stores z and r*h_{t-1} (truncated onto LSB_in) in buffers. Phase B then
runs the candidate gate over `[x_t, r*h_{t-1}]` and forms h_t.

Memories, all written as arrays with a registered read (`rnn_ram`):

* **Weights:** one bank per gate, `N_UNITS*K` words. The weight of input `k`
  for unit `u` is at address `u*K + k`. Inputs 0 to N_FEATURES-1 are x_t; the
  rest are h_{t-1}.
* **Biases:** one bank per gate, `N_UNITS` words, on `LSB_in*LSB_weights`.
* **x_t buffer:** `N_FEATURES` words.
* **h buffer:** a ping-pong pair, so h_{t-1} can be read while h_t is written.
  It is addressed `{hsel, u}` and so holds `2^(UW+1)` words, where
  `UW = clog2(N_UNITS)`.
  It swaps at the end of each step.
* **Per-engine buffers:** the LSTM's c buffer is updated in place. The GRU has
  z and r*h buffers.

Gate order within the weight and bias banks is the usual software order:
`LSTM_I, LSTM_F, LSTM_C, LSTM_O` and `GRU_Z, GRU_R, GRU_H`
(`lstm_gate_e` / `gru_gate_e` in `rnn_fxp_pkg`).

### Host protocol (per engine)

1. While `busy` is low, load weights (`w_we/w_gate/w_addr/w_data`) and biases
   (`b_we/b_gate/b_unit/b_data`).
2. Pulse `seq_start` to begin a sequence. The next step then reads h_{t-1} and
   c_{t-1} as zero; the buffers are not cleared.
3. For each timestep, write x_t (`x_we/x_addr/x_data`), then pulse
   `step_start`.
4. `h_valid` pulses once per unit, in unit order, with `h_unit` and `h_data`.
   The LSTM also outputs `c_data`. `step_done` pulses after the last unit.
5. `sat` is a sticky flag: some truncation saturated since the last
   `seq_start`.

Assertions in both engines flag a memory write or `step_start` while busy.
Reset is synchronous and active-high.

`rnn_accel_top` places the two engines side by side. Their ports carry the
prefixes `lstm_` and `gru_`. The engines share only clock and reset. The word
embedding that produces x_t and the classifier that consumes h_t are outside
the design.

## Parameters and retargeting

Both layers and the top take `N_UNITS`, `N_FEATURES`, `IN_FRAC`, `W_FRAC`,
`STATE_FRAC` and the word widths `IN_W`, `W_W` and state width. They also take
the truncation amounts: `B_MUL` and `B_TANH` for the LSTM, `B_MUL` for the GRU.
All other widths and shifts are derived from these.

Two constraints apply:

* The GRU needs `STATE_FRAC >= IN_FRAC`.
* Every derived shift must be non-negative. An elaboration-time assertion in
  `fxp_trunc` reports a violation.

Example settings for a 300-unit language model:

* **LSTM**, LSB_in = LSB_state = 2^-5, 11-bit weights on 2^-1:
  `N_UNITS=300, N_FEATURES=300, IN_FRAC=5, STATE_FRAC=5, W_FRAC=1, W_W=11,
  B_MUL=11, B_TANH=5`. That is 720,000 weights and 180,900 cycles per step.
* **GRU**, LSB_in = 4, LSB_state = 2^-1, 8-bit weights on 2^0:
  `N_UNITS=300, N_FEATURES=300, IN_FRAC=-2, STATE_FRAC=1, W_FRAC=0, W_W=8,
  B_MUL=3`. That is 540,000 weights and 361,800 cycles per step.

The word widths for x_t and the state must be chosen from the signal ranges
observed in the model. The defaults assume |x| < 8 and |c| < 8 at 2^-10,
and |h| <= 1 for the GRU state.

## Design choices beyond the quantization scheme

The arithmetic (LSBs, truncation points, activation tables) follows the
quantization scheme. The following are this implementation's own choices:

* **Scheduling:** one unit at a time, one MAC per gate, one input element per
  cycle. The scheme itself does not fix the parallelism.
* **Saturation:** every truncation also *saturates* to its output width and
  reports it. The scheme assumes widths large enough for the observed range.
  The accumulator is wide enough that it never overflows.
* **Word widths:** x_t, h_t and the LSTM state are 14 bits. The bias is
  `IN_W + W_W` bits.
* **Gate input clip points:** the MAC output is clipped to the activation's
  input range before the activation (see below). The exact clip values, the
  first value of each saturation segment, are this design's choice.
* **Memories:** memories are plain arrays, with one weight bank per gate so the
  gates read in parallel.
* **Host interface:** the host interface and the zero-state mechanism.

## Departures from the published scheme

The quantization scheme this design follows is published with a cell
diagram, its LSB equations and a set of cell equations. Where these disagree,
or where the scheme leaves a point open, the RTL does the following:

* **LSTM cell state.** One form of the cell equations applies a sigmoid to
  `f*c_{t-1} + i*c'`. The quantized cell diagram and its LSB equations have no
  activation there: the adder output is the state. The RTL follows the
  diagram, which is also the standard LSTM.
* **GRU update.** The cell equations write `h_t = (1-z)*h_{t-1} + z*h'`. The
  quantized diagram multiplies `z` with `h_{t-1}` (mul_1) and `1-z` with the
  candidate (mul_2). The RTL follows the diagram. Swapping the roles only
  changes the sign convention of the z gate's trained weights.
* **Reset gate before `W_h`.** The reset gate scales h_{t-1} before the
  candidate's matrix product, as both the equations and the diagram show.
* **r*h_{t-1} onto LSB_in.** The LSB equations give `r*h_{t-1}` the LSB
  `LSB_state * LSB_gate`. The diagram puts a forced truncation after it,
  because the product enters a MAC that expects LSB_in. The RTL truncates it
  onto LSB_in.
* **MAC output clipping.** The scheme notes that, once the activation
  thresholds are fixed, a MAC output can be limited to the activation's
  non-saturated range (|x| <= 5 before a sigmoid) to narrow the word. The RTL
  does this in `rnn_gate`. The accumulator saturates to the first value of
  each saturation segment, so the gate output is unchanged. At the defaults
  the activation's input word shrinks from 27 to 17 bits (sigmoid) or 16
  bits (tanh).
* **Activation offsets** are placed on the gate LSB as the scheme prescribes.
  At very coarse LSBs an offset or threshold is not on the grid. The RTL then
  rounds the offset to the nearest level and moves the threshold up to the
  next level, which is a choice of this design.
* **Widths.** The scheme sizes each word from the largest value observed when
  running the trained model. Those ranges are not available here, so the
  input and state widths are assumptions (see below).

## Verification

Each module has a self-checking testbench in `tb/`. The reference arithmetic
in `tb/rnn_ref_pkg.sv` is written independently of the RTL:

* Truncation is a floor division.
* The activations are evaluated on real numbers straight from the table above.
* The cell equations are written out term by term.

All values involved are exact in double precision, so the comparison is exact
to the bit.

| testbench | what it checks |
|---|---|
| `fxp_trunc_tb` | floor and saturation for narrowing, resizing and widening settings |
| `pwl_act_tb` | both functions at gate and pointwise LSBs, every threshold ±1 LSB, every segment, exhaustive sweeps at coarse LSBs |
| `mac_unit_tb`, `rnn_ram_tb` | dot products with bias preload; read latency and write enable |
| `rnn_gate_tb` | MAC + clip + activation for random 64-term vectors with sums past both clip points; accumulator on and around each clip point |
| `lstm_pointwise_tb`, `gru_pointwise_tb` | random gates and states at the default setting and one with non-zero state or input truncation |
| `lstm_layer_tb`, `gru_layer_tb` | 4-unit layers over 9 timesteps with a restart: every output, unit order, cycles per step |
| `rnn_accel_top_tb` | both engines at full default size; LSTM 10+2 steps, GRU 4+1 steps |
| `imdb_review_tb` | one full 235-step review on each engine at default size; every output and the total cycle count (503,840 LSTM, 1,007,680 GRU) |
| `ptb_layer_tb` | 300-unit, 300-feature layers at the language-model settings (LSTM LSBs 2^-5/2^-5/2^-1 with 11-bit weights; GRU LSBs 2^-1/2^2/2^0 with 8-bit weights), 3 steps each, every output and cycles per step |

`rnn_accel_top_tb` also requires each of these to happen at least once: every
activation segment, a state overflow caught by `sat`, a restart, and non-zero
h feedback.

`ptb_layer_tb` is the only test whose unit count is not a power of two, so it
is the one that covers the h buffer addressing described above.

To run a testbench with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module rnn_accel_top_tb \
    -y rtl -y tb +libext+.sv rtl/rnn_fxp_pkg.sv tb/rnn_ref_pkg.sv \
    tb/rnn_accel_top_tb.sv -o sim
obj_dir/sim
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`.

## Limitations

* Accuracy results depend on trained weights and recorded signal ranges, which
  are not part of this design. The testbenches use random weights and inputs.
* The default word widths for x_t and the LSTM state are assumptions. A real
  model needs them sized from its own signal ranges; `sat` shows when they are
  too small.
* Throughput is one multiply per gate per cycle. Wider MACs (several input
  elements per cycle) or several units in parallel would be the obvious
  extensions, and are not built.
