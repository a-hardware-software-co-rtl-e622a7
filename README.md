# Neural-network training hardware: a weight-update coprocessor and an on-chip XOR learner

Training a multilayer perceptron with back-propagation means three passes for each training
example: forward (compute the activations), backward (compute the error terms) and update
(adjust every weight). In a small embedded processor without a floating-point unit, the update
pass takes a large share of the time, because it touches every weight of the network with a
multiply-multiply-add:

    w_new = w_old + alpha * activation * error

This RTL holds two designs built around that observation. They share nothing but the clock
and reset, and they stand side by side in the top module `ann_codesign_top`:

1. **HUM, the Hardware Update Module** (`rtl/hum.sv` and below). It is a coprocessor for a
   soft processor that trains a 400-8-4 face-recognition network in software. The processor
   keeps forward() and backward() in software. It streams the update work to the HUM over a
   FIFO channel (Xilinx Fast Simplex Link, FSL) and reads the new weights back over a second
   FIFO channel. The arithmetic is IEEE-754 single precision, as in the software.
2. **A pure-hardware 2-2-1 network that learns XOR** (`rtl/xor_ann.sv` and below). It runs
   forward, backward and update entirely in fixed point: 20-bit 1-3-16 by default (sign, 3
   integer bits, 16 fraction bits), with 1-4-16 and 1-5-16 available by parameter. This is the smaller study that showed a fully parallel
   network is far too large for a mid-size FPGA, which in turn motivated the coprocessor.

The top also brings out the fixed-point operator variants that were compared for the second
design: a carry-lookahead adder, and a serial and a parallel unsigned multiplier.

## 1. The Hardware Update Module

### 1.1 Protocol on the FSL channels

A *batch* updates four parameters at once. The processor writes 16 words to FSL0, four per
parameter, in this order:

| word | meaning                                             |
|------|-----------------------------------------------------|
| 0    | old value (weight or threshold)                      |
| 1    | learning rate alpha                                  |
| 2    | activation of the source node (1.0 for a threshold)  |
| 3    | error term of the destination node                   |

It then reads four words from FSL1: the new values, in the same order.

Thresholds go through the same datapath by sending activation = 1.0. For the 400-8-4
network, one update() is the following sequence of batches:
- 800 batches for the 3200 input-to-hidden weights, in two groups of four hidden nodes per
  input.
- 8 batches for the 32 hidden-to-output weights.
- 3 batches for the 12 thresholds.

That makes 811 batches in all.

FSL signal names follow the Xilinx convention:
- FSL0 slave side of the HUM: `FSL0_S_Data`, `FSL0_S_Exists`, `FSL0_S_Read`, `FSL0_S_Control`.
- FSL1 master side: `FSL1_M_Data`, `FSL1_M_Write`, `FSL1_M_Full`, `FSL1_M_Control`.

Control words are not used. `FSL1_M_Control` is always 0, and an assertion checks that no
control word is read from FSL0.

The FIFOs and the processor are outside this RTL. `tb/fsl_fifo_model.sv` is a behavioural FIFO
with the same port names, used by the testbenches.

### 1.2 Block structure

```
 FSL0 ──► hum_counter1 ──16 words──► 4 × update_unit ──4 results──► hum_counter2 ──► FSL1
             │ Ready_cal                ▲ Start_cal     │ done (AND = Ready_out)   ▲ Start_out
             └──────────────► hum_fsm ──┴───────────────┴──────────────────────────┘ Done_out
```

- **hum_counter1** reads FSL0 and stores the words in 16 registers. `FSL0_S_Read` is simply
  `FSL0_S_Exists` while fewer than 16 words are held, so there is one word per clock whenever
  data is there. The counter runs to 16 as words arrive, steps once more to 17, and then raises
  `Ready_cal`.
  - `Ready_cal` stays high until the FSM takes the batch.
  - The FSM then copies the batch into the update units, and the counter restarts.
  - So the next batch loads while the current one is being computed and sent.
- **hum_fsm** has three states, with the state code equal to its outputs
  `{Start_cal, Start_out}`:
  - waiting = 00: go to calculating when `Ready_cal` is 1.
  - calculating = 10: go to sending when `Ready_out` is 1.
  - sending = 01: go to waiting when `Done_out` is 1.
- **update_unit** computes `op1 + (op2 * op3) * op4`. It uses two single-precision multipliers
  in series and one single-precision adder. A start pulse latches the four operands, and the
  result appears 14 clocks later.
  - `done` stays high until it is acknowledged.
  - `Ready_out` is the AND of the four units' done flags.
- **hum_counter2** writes the four results to FSL1 in consecutive clocks, then raises `Done_out`.
  - While `FSL1_M_Full` is high the write is held back, and the transfer resumes when room
    appears. The source description leaves this case open; stalling is this design's choice.

Timing with empty, never-full FIFOs and a processor that writes one word per clock:
- 16 clocks to load, then 1 clock to flag `Ready_cal`.
- 14 clocks in the update units, plus a few clocks of FSM handshaking.
- 4 clocks to send, plus `Done_out`.

The testbench measures 37–38 clocks per batch for the whole round trip, and 30,789 clocks for
a complete update() of the 400-8-4 network.

### 1.3 Floating-point datapath

The operators are built from small pipelined stages. They work on a *denormalised* format
`{sign, exponent, mantissa with explicit integer bit}`:

| stage | module | does |
|-------|--------|------|
| unpack | `fp_denorm` | inserts the implied bit (1, or 0 for a zero exponent) |
| add 1 | `fp_swap` | puts the operand of larger magnitude first |
| add 2 | `fp_shift_adjust` | aligns the smaller mantissa; one guard bit is appended |
| add 3 | `fp_add_sub` | adds the mantissas, or subtracts them if the signs differ |
| add 4 | `fp_correction` | exact-zero result, carry renormalisation, overflow flag |
| multiply | `fp_mul` | sign XOR, exponent sum minus bias, full 48-bit product |
| repack 1 | `fp_normalizer` | leading-zero count and left shift |
| repack 2 | `fp_round_add` | round to nearest (or truncate), carry renormalisation |
| repack | `fp_rnd_norm` | the two repack stages with a register after each |

`ieee_fp_adder` is two denorms, `fp_add` and `fp_rnd_norm`. It has a latency of 6 clocks.
`ieee_fp_multiplier` is two denorms, `fp_mul` and `fp_rnd_norm`, with a latency of 3. Both
accept a new operation every clock.

Deliberate simplifications, worth knowing before reusing these operators elsewhere:

- **Subnormals** are flushed to zero, on input and on output.
- **Infinity and NaN inputs** (exponent all ones) raise `exception`. Their value is not
  propagated.
- **Overflow** raises `exception` and gives zero.
- **Rounding** is "round to nearest" by the first dropped bit, with no sticky bit. Ties go away
  from zero. The aligned smaller operand in the adder also loses the bits beyond its guard bit.
- Accuracy, as tested:
  - Multiplier results are within half a unit in the last place of the exact product.
  - Adder results are within one unit in the last place of the exact sum.
  - `w + alpha*a*e` is within three units of the larger term.
- `fp_mul` gives the exponent as `e1 + e2 - bias + 1`. This reads the 48-bit product as
  `1x.xxx…`, with its point after the top bit, and the normaliser then removes the leading zero
  when there is one.

The HUM's `exception` output is the OR of the four units' flags for the last batch. It clears
with the next batch.

## 2. The pure-hardware XOR network

### 2.1 Number format and arithmetic

By default all values are 20-bit two's complement with 16 fraction bits (1-3-16), covering
[-8, 8). Every XOR module takes the format as two parameters, `INT_LENS` and `FRAC_LENS`.
Their defaults are `FX_INT = 4` and `FX_FRAC = 16` in `rtl/xor_pkg.sv`. `INT_LENS` counts
the sign bit, so the other two evaluated formats are `INT_LENS = 5` (1-4-16, 21 bits) and
`INT_LENS = 6` (1-5-16, 22 bits). The weight buses are flat vectors of nine W-bit fields, in
the field order of `xor_weights_t`, so at the default width they connect directly to that
struct.

The arithmetic rules, which matter for bit-exact reproduction:
- **Adders** (`fx_add`, ripple carry) return one extra bit. The network saturates that sum
  back to the format's width.
- **Multipliers** (`fx_mul`) take the magnitudes of the operands and multiply them in the
  unsigned parallel multiplier (`fx_mul_parallel`). They then drop the 16 low bits of the
  product, saturate, and restore the sign. Products are therefore truncated toward zero.
  Latency 2.
- **Activation** (`sigmoid3`) is a three-piece line:
  - 0 for x ≤ -2.
  - 0.5 + x/4 in between, with the shift rounding down.
  - 1 for x ≥ 2.

### 2.2 Structure

The 2-2-1 network has nine trainable values, held in one register bank (fields in `xor_weights_t` order):
- v11, v21, v12, v22: input-to-hidden weights.
- w11, w21: hidden-to-output weights.
- three thresholds.

It has three computing blocks and a controller:

| block | computes | latency |
|-------|----------|---------|
| `xor_feedforward` | hidden b1, b2 and output c, each `sigmoid(x1*w1 + x2*w2 + theta)` (`xor_neuron`) | 6 |
| `xor_backward` | d = c(1-c)(t-c); e_h = b_h(1-b_h)·w_h·d | 9 |
| `xor_update` | all nine new values at once: w += α·b·d, θo += α·d, v += α·a·e, θh += α·e | 6 |
| `xor_controller` | IDLE → FEED → (training only) BACK → UPDATE → COMMIT | — |

In `xor_ann`:
- `load` writes initial weights.
- A `start` pulse with `train = 1` runs one training pattern in 26 clocks.
- With `train = 0` it runs a recall (forward pass only) in 8 clocks.
- The inputs, the target and `train` must be held until `done`.
- An assertion flags a `start` while the network is busy.

The backward pass uses the derivative of the logistic function, c(1-c), even though the
forward pass uses the three-piece approximation. From a suitable start, the network learns
XOR with learning rate 0.5 in a few hundred epochs. Like any small network it can stick in a
local minimum from an unlucky start. One testbench shows it learning from a fixed start.

## 3. Where this RTL departs from, or fills in, the source description

- **HUM state machine.** The prose describes the sending state returning to waiting when
  `Done_out` is 0. The state diagram labels that transition with `Done_out` = 1, and that
  version is implemented.
- **Loading during calculation.** `Ready_cal` is held and the next batch is fetched while the
  current one computes. The description does not say when counter1 restarts.
- **FSL1 full.** The HUM stalls when `FSL1_M_Full` is high. The description only says that the
  signal exists.
- **Thresholds in the XOR network.** The network diagram omits thresholds. They are included
  because the update equations train them.
- **Sigmoid pieces.** The source names a "three-piece linear" sigmoid. The breakpoints ±2 and
  the slope 1/4 are this design's choice.
- **Latencies and register stages.** The source gives only the structure, so all latencies and
  register stages are this design's choice.
- **Word widths and formats.** Single precision, the 1-3-16 format and the 16-word batch are
  the source's.
- **Not built, because they are vendor parts:** the processor, the FSL FIFOs and the
  processor's bus peripherals.

## 4. Simulating

Every testbench in `tb/` is self-checking. It prints `TB_RESULT checks=N failures=M` and stops
itself with a watchdog if something hangs. With Verilator 5:

```sh
verilator --binary --timing --assert rtl/*_pkg.sv tb/*_pkg.sv -y rtl -y tb \
    tb/tb_ann_codesign_top.sv --top-module tb_ann_codesign_top
./obj_dir/Vtb_ann_codesign_top
```

Replace the testbench name to run any other test; each block has `tb/tb_<module>.sv`.
Packages must be listed first, as above.

- `tb_ann_codesign_top` runs everything at its default sizes in about ten seconds:
  - A complete update() of the 400-8-4 network through the HUM (3244 parameters, 811
    batches), with FSL0 gaps, two batches in flight, FSL1 back-pressure, an overflow batch and
    its recovery.
  - 300 epochs of XOR training, checked bit-exactly, ending in a correct recall.
  - Random checks of the operator variants.

  It counts each of these events and fails if one never occurs.
- `tb_hum` checks the HUM alone, including a timing check of the clocks per batch.
- The floating-point tests compare with real arithmetic. The fixed-point tests compare
  bit-exactly with an independent integer model (`tb/tb_xor_pkg.sv`).
- `tb_fx_formats` instantiates the five fixed-point operators in all fifteen formats of
  the format table (4 to 6 integer bits, 12 to 16 fraction bits).
- `tb_xor_formats` builds the whole XOR network in 1-3-16, 1-4-16 and 1-5-16. It trains each
  to a correct XOR solution, and it runs stress cases that drive sums and weights into
  saturation at each format's own limits. All checks are bit-exact.
- The two worked examples are reproduced:
  - The 5-bit fixed-point addition 10111 + 11001 = 110000.
  - The serial multiplication 01111 × 00101, step by step.

## 5. Changing the design

- **Floating-point width.** `EXP_BITS` and `MAN_BITS` on the floating-point blocks. The HUM
  itself uses the constants in `hum_pkg` (32-bit words, 4 units, 16 words per batch).
- **Number of update units.** `N_UNITS` in `hum_pkg`. The batch length follows as
  `4 * N_UNITS`, and the processor side must send batches of that length.
- **Fixed-point format of the XOR network.** Override `INT_LENS` and `FRAC_LENS` on
  `xor_ann`. To change the default, edit `FX_INT` and `FX_FRAC` in `xor_pkg`; the top-level
  ports follow. The operators take `INT_LENS`/`FRAC_LENS` or `WIDTH` parameters.
- **Lint.** Verilator's `-Wall` reports one expected `UNUSEDSIGNAL` warning: the low product
  bits that `fx_mul` drops when it truncates. `FSL1_M_Control` is a constant output by design.
