# Quantized LSTM layer with lookupx activations

LSTM inference spends much of its time in the two nonlinear functions, sigmoid
and tanh. A plain lookup table for a quantized input is large: a 10-bit
pre-activation needs 1024 entries, which means an SRAM. A table that is small
enough for a few registers is coarse and costs accuracy.

**Lookupx** gets around this by letting the input approximate the function
and keeping only a small correction in a table:

    lookupx(x) = (x >>> SHIFT) + offset[top bits of x]

The shifted input supplies the slope. Eight offset registers, chosen by the
three most significant bits of `x`, supply a piecewise-constant correction.
An 8-entry table then comes close to a full 1024-entry table, and the whole
unit is one shift, one 3-to-1 register select, one adder and a clamp.
Everything stays in the quantized integer domain, so nothing is converted
back to real values between the matrix part and the activations.

This repository holds SystemVerilog for:

* the lookupx activation unit (`lookupx_act`);
* a complete quantized LSTM layer built around it (`lstm_lookupx_top`). By
  default the layer has 8 cells, 4-bit inputs, 5-bit weights and 10-bit
  biases.

## Number formats

Every value is an integer that stands for a real number times a fixed scale.
Inputs and weights use a scale of 16. A product of the two therefore has a
scale of 256, and the biases are stored at that scale too. As a result a gate
pre-activation needs no rescaling before it reaches the activation.

| Signal | Width | Scale | Range (integer) | Real range |
|---|---|---|---|---|
| input `x_t` | 4 bit signed | 16 | -8..7 | -0.5..0.44 |
| weight | 5 bit signed | 16 | -16..15 | -1..0.94 |
| bias | 10 bit signed | 256 | -512..511 | -2..2 |
| gate pre-activation `z` | 10 bit signed, clamped | 256 | -512..511 | -2..2 |
| sigmoid output | 10 bit signed | 256 | 0..256 | 0..1 |
| tanh output | 10 bit signed | 256 | -256..256 | -1..1 |
| cell state `c_t` | 12 bit signed, clamped | 256 | -2048..2047 | -8..8 |
| hidden output `h_t` | 6 bit signed | 16 | -16..16 | -1..1 |

The 4/5/10-bit widths, the scale of 16 and the [-2, 2] activation input range
come from the reference design. The widths of `c_t` and `h_t` are choices
made here. `h_t` goes back to the input scale of 16 so that the same gate
datapath can use it as its recurrent input.

## The lookupx unit (`rtl/lookupx_act.sv`)

The pre-activation domain [-512, 511] is split into 8 segments of 128 values.
The segment number is the top three bits of `x` with the sign bit inverted,
so segment 0 holds -512..-385 and segment 7 holds 384..511. The output is

    y = clamp((x >>> SHIFT) + offset[segment], OUT_MIN, OUT_MAX)

The path from `x` to `y` is purely combinational. The offsets are registers:
on reset they take `OFFSET_INIT`, and `off_we`/`off_addr`/`off_wdata` can
rewrite them one per clock. Offsets fitted to a real data set can therefore
be loaded without changing the RTL.

**Sigmoid** uses `SHIFT = 2`, which gives the slope 1/4 of the sigmoid at the
origin. Both axes are scaled by 256, so the unit computes
256·σ(x/256) ≈ x/4 + offset.

**Tanh** uses the same unit with `SHIFT = 1` and its own offset table. Slope
1/2 fits tanh over [-2, 2] better than slope 1 or 1/4: the worst-case errors
are 30/256 with slope 1/2, against 57/256 and 46/256 with the other two. The
reference design applies lookupx to both functions but gives only the sigmoid
formula, so the tanh variant is this design's own choice.

**Offsets.** The offset of segment k is the mean of the difference between
the scaled function and the shifted input over the segment:

    offset[k] = round( (1/128) · Σ_{x in segment k} ( 256·f(x/256) − (x >>> SHIFT) ) )

The reference design averages over the inputs that the data set actually
produces. That distribution is not available here, so the defaults in
`lstm_pkg` average over a uniform input:

| segment | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| sigmoid (`SIG_OFFSETS`) | 151 | 138 | 131 | 129 | 128 | 126 | 119 | 106 |
| tanh (`TANH_OFFSETS`) | -16 | -56 | -64 | -29 | 30 | 65 | 56 | 17 |

Over the whole domain the largest error against the exact scaled function is
7.9/256 for sigmoid and 30/256 for tanh. `tb_lookupx_act` checks these
bounds.

## The LSTM layer (`rtl/lstm_lookupx_top.sv`)

The layer computes the standard LSTM step for every hidden unit j:

    i = σ(Wix·x + Wih·h + bi)      f = σ(Wfx·x + Wfh·h + bf)
    g = tanh(Wgx·x + Wgh·h + bg)   o = σ(Wox·x + Woh·h + bo)
    c_j ← f·c_j + i·g              h_j ← o·tanh(c_j)

Datapath, one hidden unit at a time:

```
           row j            x_t, h_{t-1}
   lstm_weight_mem ──► 4 × gate_dot ──► z_i z_f z_g z_o (clamped to 10 bit)
                                         │
         3 × lookupx sigmoid (x/4+off) ◄─┤─► 1 × lookupx tanh (x/2+off)
                                         │
               lstm_elementwise: c = (f·c + i·g + 128) >>> 8, clamp to 12 bit
                                 tanh(c) by lookupx (c clamped to 10 bit)
                                 h = (o·tanh(c) + 2048) >>> 12
```

* `gate_dot` forms one gate's dot product over all `N_X + N_H` inputs plus
  the bias in a single combinational tree. It clamps the sum to [-512, 511]
  and reports the clamp.
* `lstm_weight_mem` holds `Wx[gate][row][N_X]`, `Wh[gate][row][N_H]` and
  `b[gate][row]` in registers. It delivers the four gate rows of one hidden
  unit at once.
* `lstm_elementwise` does the cell update and the output product, rounding
  half up when it rescales. It contains the second tanh lookupx unit.

### Step timing and handshake

1. `x_ready` is high while the layer is idle. A step starts on the clock edge
   where `x_valid` and `x_ready` are both high; the layer captures `x_vec` on
   that edge.
2. If `x_first` is high with the step, the hidden and cell state are cleared
   first. This marks the start of a new sequence.
3. The next `N_H` clocks compute hidden units 0 to `N_H-1`, one per clock.
   Each unit's cell state is written back at once. Its new `h_j` waits in a
   shadow register, because every unit of the step must still see the old
   `h_{t-1}`.
4. On the last of those clocks the whole new `h_t` is copied to `h_vec`.
5. `h_valid` is then high for one clock, and `x_ready` rises at the same time.

A new step can be accepted in the same clock as `h_valid`. One step therefore
takes `N_H + 1` clocks, which is 9 at the default size. `sat_seen` reports
whether any pre-activation or cell state was clamped during the last step.

### Loading weights and offsets

Weights are written one per clock, addressed by `w_gate`, `w_row` and
`w_col`:

* the gate is an `lstm_pkg::gate_e` value: `GATE_I`, `GATE_F`, `GATE_G` or
  `GATE_O`;
* columns `0..N_X-1` are the input weights and `N_X..N_X+N_H-1` the
  recurrent weights.

Biases use the `b_*` port. Offsets use the `off_*` port: `off_func` chooses
all three sigmoid units (`FUNC_SIGMOID`) or both tanh units (`FUNC_TANH`),
and every unit of that kind receives the write. Write only while the layer is
idle; an assertion flags a write in the middle of a step. Reset clears the
weights and biases and restores the default offsets.

## Parameters

| Parameter | Default | Origin |
|---|---|---|
| `N_H` (cells) | 8 | the 8-cell sentiment model of the reference design |
| `N_X` (input length) | 8 | chosen here: the reference model's embedding size is unknown |
| `SHIFT` | 2 sigmoid / 1 tanh | sigmoid from the lookupx formula, tanh chosen here |
| `LX_ENTRIES` | 8 | reference design |
| widths in `lstm_pkg` | see above | partly reference, partly chosen here |

## How far the design follows the reference, and where it departs

**Taken from the reference design:**

* the lookupx formula `x/4 + offset` for sigmoid;
* eight offset registers selected by the input MSBs, and the rule for
  computing the offsets;
* the [-512, 512] activation domain;
* the scale-16 quantization with 4-bit inputs, 5-bit weights and 10-bit
  biases;
* the LSTM equations;
* the 8-cell network size.

**Chosen here:**

* the tanh lookupx variant (`x/2` plus its own offsets);
* uniform-input default offsets (the reference averages over its data set);
* the clamps on pre-activations, cell state and outputs, and the rounding
  rule;
* the formats of `c_t` and `h_t`;
* the one-unit-per-clock schedule with one full dot product per gate per
  clock, and the valid/ready interface;
* register storage for the weights and the loading ports;
* `N_X = 8`.

**Not included:**

* the floating-point-to-integer quantization. It is done offline; the layer
  takes integers that are already quantized.
* any embedding or classifier layer around the LSTM.
* the comparison designs of the evaluation: a piecewise-linear sigmoid/tanh,
  a 1024-entry SRAM lookup table and an 8-entry plain lookup table.

The reference design reports that with trained, data-fitted offsets an
8-entry lookupx matches the accuracy of a 1024-entry table on IMDb sentiment
classification (0.86). That result has not been reproduced here: no trained
weights are included, and the tests use random weights.

## Verification

Each testbench in `tb/` checks itself. At the end it prints
`TB_RESULT checks=N failures=M`, and a watchdog stops it if it hangs.

| Testbench | What it checks |
|---|---|
| `tb_lookupx_act` | All 1024 inputs, both configurations. It recomputes the offsets from the rule with `$exp`/`$tanh`, bounds the error, reloads random offsets and then resets. |
| `tb_gate_dot` | Random and extreme dot products against an integer model, including the clamp flag. |
| `tb_lstm_weight_mem` | Fills every weight and bias, reads all of them back, overwrites entries and resets. |
| `tb_lstm_elementwise` | Random cell updates against an integer model, including cell-state saturation and a reloaded tanh table. |
| `tb_lstm_lookupx_top` | The full layer at default size: 69 time steps in 5 sequences against an integer model of the whole layer. |
| `tb_lstm_long_sequence` | One 250-step sequence, about the length of a movie review, streamed with `x_valid` held high. It is compared bit for bit with the integer model and checked for a throughput of exactly 250 × 9 clocks. It is also compared with a real-valued LSTM that uses exact sigmoid and tanh on the same quantized weights. |

`tb_lstm_lookupx_top` also checks:

* the step latency: `h_valid` `N_H` clocks after the accept;
* that `x_ready` stays low while a step runs;
* that each mechanism happens at least once: sequence start, pre-activation
  clamp, cell clamp, offset reload, back-to-back steps and idle gaps.

In `tb_lstm_long_sequence`, the mean absolute difference between the
layer's `h_t` and the exact real-valued LSTM is about 0.037. That is about
0.6 of one output step of 1/16. The test fails if the difference exceeds 0.1.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
    rtl/lstm_pkg.sv tb/tb_lstm_lookupx_top.sv --top-module tb_lstm_lookupx_top
./obj_dir/Vtb_lstm_lookupx_top
```

To run another testbench, replace its name in both places. To change the
layer size, override `N_X` and `N_H` on `lstm_lookupx_top` and on the
testbench's local parameters.
