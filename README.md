# RECON: a neuron built on one iterative CORDIC

A neuron computes `f(x·w + b)`: a multiply-accumulate (MAC) followed by a
non-linear activation such as tanh or sigmoid. The usual hardware gives each
part its own circuit: a multiplier array for the MAC, and a lookup table or
separate datapath for each activation. This design computes both with **one
shift-and-add CORDIC engine**, used twice in a row:

1. **Linear mode (MAC).** Five micro-rotations multiply the input by the
   weight and add the product to the bias, with no multiplier.
2. **Hyperbolic mode (activation).** The MAC result is fed back as the
   rotation angle. Five more micro-rotations produce `cosh(z)` and `sinh(z)`.
   A small back end then forms
   `tanh = sinh/cosh` or `sigmoid = e^z/(1+e^z)`, where `e^z = cosh + sinh`.

One neuron evaluation takes 11 clock cycles for a single input. Everything
is 9-bit two's-complement fixed point by default.

The repository holds the neuron (`recon_neuron`) and a 4:4:2 fully connected
network built from six such neurons (`recon_network`, the top level).

## Number format

```
 bit  8     7  6  5     4    3    2    1    0
     sign | 2^2 2^1 2^0 | 2^-1 2^-2 2^-3 2^-4 2^-5
```

A word is `WIDTH = 9` bits with `FRAC = 5` fractional bits, so it represents
`value = signed(word) / 32`, in the range −8 … +7.96875. Adders wrap around
on overflow; nothing saturates except the divider. Right shifts are
arithmetic and drop the bits shifted out. Because the shifts are arithmetic,
the same datapath handles signed and unsigned operands that are in range.

## The CORDIC micro-rotation

Each clock performs one step `i` on the registers X, Y and Z. The direction
is `d = +1` when Z ≥ 0, else `d = −1`. It is chosen so that Z is driven
towards zero:

| mode | `select` | X update | Y update | Z update | steps |
|---|---|---|---|---|---|
| linear (MAC) | 1 | `X` | `Y + d·(X >>> i)` | `Z − d·2^-i` | i = 0…4 |
| hyperbolic (AF) | 0 | `X + d·(Y >>> i)` | `Y + d·(X >>> i)` | `Z − d·atanh(2^-i)` | i = 1…5 |

**Linear mode.** Start with X = input, Y = bias and Z = weight. Each step
adds ±X·2^-i to Y and takes the same amount of "weight" out of Z. Once Z has
been driven near zero, `Y ≈ bias + input·weight`. This is a signed
shift-and-add multiplication that consumes the weight one bit position per
step. Precision limits:

- The residual Z after five steps is at most 2^-4.
- The product therefore carries an error of up to |x|/16, plus one truncated
  LSB per step.
- The weight must satisfy |w| < 1.94, the sum of 2^-i for i = 0…4.

**Hyperbolic mode.** Start with X = 1/K, Y = 0 and Z = MAC result. The
pseudo-rotations leave `X = cosh(z)` and `Y = sinh(z)`. The start value
1/K = 1.2075 pre-compensates the gain of the five steps; in 9 bits it is
stored as 39/32. Limits of this mode:

- The step sequence i = 1…5 has no repeated step (the usual convergence fix
  for hyperbolic CORDIC).
- It converges only for |z| below about 1.02.
- Even inside that range, up to about 0.075 of the angle can stay
  unresolved near z = 0.

These limits come from the five-step algorithm itself, not from the word
width.

### Worked example (single input, tanh)

x = 0.6875 (22/32), bias = 0.1875 (6/32), w = 0.90625 (29/32):

| count | i | d | Y (/32) | Z (/32) |
|---|---|---|---|---|
| 0 | load | | 6 | 29 |
| 1 | 0 | +1 | 28 | −3 |
| 2 | 1 | −1 | 17 | 13 |
| 3 | 2 | +1 | 22 | 5 |
| 4 | 3 | +1 | 24 | 1 |
| 5 | 4 | +1 | 25 = 0.78125 | −1 |

The exact result is 0.8105. The AF run then starts from X = 39, Y = 0 and
Z = 25, and ends at count 10 with X = 41 (cosh) and Y = 26 (sinh).
`tanh = 26/41`, which truncates to 20/32 = 0.625. The exact tanh(0.78125) is
0.653. The testbenches check every one of these register values.

## Timing of one neuron evaluation (`N_IN = 1`)

```
edge:     S   1   2   3   4   5   6   7   8   9  10  11
count:    0   1   2   3   4   5   6   7   8   9  10   0
          ^load   linear steps    ^ctr  hyperbolic   ^valid, f_out
```

- **Start edge.** `start` is sampled. X, Y and Z load the input, the bias and
  the weight. `count` becomes 0.
- **Counts 0–4.** Linear steps. After them Y holds the MAC result (count 5).
- **Count 5.** Step 1 of the hyperbolic run, with `ctr` raised. In this same
  step the input multiplexers take X = 1/K and Y = 0, and Z takes the Y
  result. The MAC value is also latched into `mac_out`.
- **Counts 6–9.** Hyperbolic steps 2–5. At count 10, X = cosh and Y = sinh.
- **Count 10.** The activation back end is combinational. Its result is
  registered at the next edge: `valid` pulses and `f_out` updates. `count`
  returns to 0 and the neuron is idle again.

Latency is `ITER·(N_IN+1) + 1` edges from the start edge, which is 11 for one
input. A new `start` is accepted on the cycle after `valid`; one given while
`busy` is ignored.

## Blocks

| module | role |
|---|---|
| `recon_pkg` | Data-format defaults. Phase and activation-select enums. Constant functions for the atanh table and 1/K. |
| `cordic_addsub` | Ripple adder/subtractor made of full-adder / full-subtractor bit cells. `sub` is driven by the direction bit. |
| `cordic_shifter` | Arithmetic right shift by i (barrel shifter). |
| `cordic_rom` | Angle table: 2^-i when `select = 1`, atanh(2^-i) when `select = 0`. Computed at elaboration from an integer series `atanh(t) = Σ t^(2k+1)/(2k+1)`, rounded to FRAC bits. For Q3.5 the hyperbolic entries are 18, 8, 4, 2, 1 (/32). |
| `recon_cordic` | The datapath: Sel1/Sel2/Sel3 input multiplexers (external value or fed-back register), the Ctr multiplexer (external Z or the Y result), one register per path, two shifters, three add/subs and the ROM. |
| `recon_ctrl` | State machine (idle → MAC → AF → out) and count register. Drives every multiplexer select, the mode, the step index and the output capture. |
| `recon_divider` | Combinational restoring divider (shift and subtract on magnitudes). Truncates toward zero and saturates on overflow or division by zero. |
| `recon_af` | Activation back end: adder `e^z = cosh + sinh`, adder `1 + e^z`, two 2:1 multiplexers steered by `select_af`, and the divider. |
| `recon_neuron` | Controller, CORDIC and back end wired into one neuron, with the output and MAC registers. |
| `recon_network` | 4:4:2 network: 4 hidden neurons with 4 inputs each, and 2 output neurons fed by the hidden outputs. |

### `select` and `select_af`

- `select = 1`: linear/MAC mode. `select = 0`: hyperbolic/AF mode.
- `select_af = 1` (`AF_TANH`): tanh. `select_af = 0` (`AF_SIGMOID`): sigmoid.
  It is sampled at `start` and held for the whole evaluation.

### Power gating

The physical design power-gates the blocks that a configuration leaves idle:

- The X-path add/sub and the Y shifter feeding it are unused in MAC mode,
  because X does not change there.
- Both back-end adders are unused for tanh.

RTL cannot express the sleep transistors themselves. Instead, each gated
block gets:

- **Operand isolation:** its inputs are forced to zero while it is idle, so
  it does not toggle.
- **A sleep control output:** `pg_sleep_cordic` and `pg_sleep_af` on the
  neuron, and one bit per neuron on the network. These are the signals that
  would drive a header/footer power switch.

In MAC mode X bypasses its add/sub, so the isolation does not change any
result.

## Multi-input neurons and the network

For several inputs (`N_IN > 1`), the neuron keeps the running sum in Y:

- The first step of every further input reloads X and Z with the next
  input/weight pair through Sel1/Sel3.
- Sel2 stays on the feedback path, so Y carries the sum forward.
- Each input costs 5 cycles. For the 4-input neurons of the network, one
  evaluation takes 26 cycles.

`recon_network` runs its layers as follows:

- All four hidden neurons run in lockstep.
- The output layer starts on the cycle after their `valid`.
- One inference takes **53 cycles** from the start edge to `done`.
- Weights and biases are input ports; where they are stored is left to the
  surrounding system.
- `x` and the weights must stay stable while `busy`.
- `mac_mode` and `af_start` expose, per neuron, the linear-mode phase and the
  MAC-to-angle feedback step.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `WIDTH` | 9 | word width (sign + 3 integer + fraction) |
| `FRAC` | 5 | fractional bits |
| `ITER` | 5 | micro-rotations per mode |
| `N_IN` | 1 | inputs per neuron (`recon_neuron`, `recon_ctrl`) |
| `N_X`, `N_H`, `N_O` | 4, 4, 2 | network layer sizes |

The ROM and 1/K follow `WIDTH`/`FRAC` automatically. 12- and 16-bit neurons
(13/9 and 17/13 word/fraction bits) are simulated in `tb_recon_precision`.
With only five steps, the wider words reduce the mean activation error from
about 0.035 to about 0.015; they cannot remove the residual-angle error.

## Where this design makes its own choices

- **`select` polarity.** The written description of the original design says
  MAC is selected with `select = 0`. Its datapath diagram, flow chart and
  waveform all use `select = 1` for MAC, and those are followed here.
- **Control handshake.** The original leaves the interface unspecified. The
  start pulse, `busy`/`valid`, and the asynchronous active-low reset are this
  design's choices.
- **Registers.** The original diagram draws an input register and an output
  register on each path. The datapath uses one register per path, so that
  one step completes per clock as the published waveform shows.
- **Divider.** Its structure is not specified beyond shift-and-subtract. The
  restoring divider and its saturation are this design's choice.
- **Result precision.** Reported example results (e.g. tanh = 0.6494) are
  real-valued. The 9-bit datapath here gives 0.625 for the same case. The MAC
  steps match the published integer example exactly.
- **Multi-input accumulation and network wiring.** These (`N_IN > 1`,
  `recon_network`) are this design's reading of how the prototype network is
  assembled from single neurons.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. The bit-level reference model they share,
`tb/recon_ref_pkg.sv`, is written from the iteration equations rather than
the RTL structure.

```sh
# one testbench, e.g. the full 4:4:2 network at default parameters
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/recon_pkg.sv tb/recon_ref_pkg.sv tb/tb_recon_network.sv \
    --top-module tb_recon_network -o sim
./obj_dir/sim
```

| testbench | checks |
|---|---|
| `tb_cordic_addsub`, `tb_cordic_shifter` | exhaustive / near-exhaustive against integer arithmetic |
| `tb_cordic_rom` | table against 2^-i and the real atanh, at 9 and 16 bits |
| `tb_recon_cordic` | the worked example step by step, plus random MAC and sinh/cosh runs, including an error bound |
| `tb_recon_ctrl` | count sequence 0…10, multiplexer selects, `ctr` at count 5, capture at 10, multi-input reloads |
| `tb_recon_divider`, `tb_recon_af` | quotients, saturation, tanh/sigmoid against reference and real functions, operand isolation |
| `tb_recon_neuron` | worked example with its 11-cycle latency, random single- and three-input neurons |
| `tb_recon_network` | 40 inferences of the 4:4:2 network at defaults (sigmoid and tanh), 53-cycle latency; counts MAC, feedback and sleep events |
| `tb_recon_precision` | 8/12/16-bit neurons against the model and the real functions |

The controller carries SVA assertions, enabled with `--assert`. They check
that the count register and the step index never leave their ranges.
