# Ternary-weight echo state network in fixed-point hardware

An echo state network (ESN) is a recurrent network whose hidden layer, the
*reservoir*, has fixed random weights. Only the linear readout is trained,
once, by ridge regression. Per time step it computes

    x(t) = tanh( (1 - δ)·x(t-1) + δ·( W_in·u(t) + W_res·x(t-1) ) )     reservoir
    z(t) = W_out · x(t)                                                 readout

with input u (M values), reservoir state x (N values), output z (L values)
and leak rate δ.

This RTL makes the network cheap in logic. It rests on three ideas:

* **Ternary input and reservoir weights.** Every entry of W_in and W_res is
  0, +1 or −1. So the reservoir sum W_in·u + W_res·x needs no multiplier:
  each term is the operand, its negation, or zero. The term is selected
  with AND/OR gating, and the sum goes through one adder.
* **Fixed point.** Every value is a 32-bit two's-complement number with 16
  fractional bits (Q16.16).
* **Sequential readout, overlapped with the reservoir.** Each output neuron
  has a single multiply-accumulate unit (MAC) that adds w_out·x_i as soon as
  reservoir neuron i has its new state. A readout pass over all of x, or an
  adder tree, is not needed. When the last reservoir neuron is done, z(t) is
  done one clock later.

The default size is M = 2 inputs, N = 100 reservoir neurons and L = 2
outputs. That is the configuration used for sine/cosine prediction on a
Zynq UltraScale+ at 200 MHz.

## One time step

The reservoir neurons are evaluated one per clock, in a four-stage pipeline:

| clock after the input handshake | stage | what happens to neuron i |
|---|---|---|
| i + 1 | row read | the weight RAM reads ternary row i (2·(M+N) bits) |
| i + 2 | ternary sum | `ternary_neuron` forms s_i = Σ_k w_ik·v_k over v = (u, x(t-1)) |
| i + 3 | activation | `leaky_activation` forms tanh((1-δ)x_i + δ·s_i); the output-weight RAM reads row i |
| i + 4 | store + readout | x_i goes into the state buffer; every output MAC adds w_out[l][i]·x_i |

The write of neuron N−1 also commits the whole new vector as x(t-1) for the
next step. `out_valid` rises **N + 3 clocks after the input handshake**, so
103 clocks at the default size. That is about 0.52 µs at 200 MHz. z(t) is
held until `out_ready`, and only then is a new input accepted. So a
consumer that does not take z(t) stalls the network. With both sides
always ready, a new step starts every N + 5 clocks (105 clocks, 0.525 µs at
200 MHz).

While the step runs, every neuron reads the *complete* previous state. For
that reason the state is kept in registers, in two copies:

* `x_cur` holds x(t-1). It is read in parallel for the whole step.
* `x_nxt` receives x(t), one entry per clock.

The commit copies `x_nxt` to `x_cur`. A write in the commit clock is
included in the copy.

## Arithmetic in detail

**Ternary code.** A weight is two bits {neg, pos}: `00` = 0, `01` = +1,
`10` = −1. `11` acts as 0. In a row, bits [2k+1:2k] weight operand k of the
neuron. Operands 0…M−1 are the inputs u, and operands M…M+N−1 are the
states x[0…N−1].

**Multiplier-free sum.** Let v be an operand, sign-extended to
SUM_W = 32 + ⌈log2(M+N+1)⌉ bits. Each term is
`(v AND {pos}) OR (NOT v AND {neg})`, which gives v, its ones' complement
or 0. The +1 that turns a ones' complement into a negation is added once
per negative weight. The sum is exact and cannot overflow.

**Leaky update.** The value (1−δ)·x + δ·s is formed exactly in 64 bits from
two constant products, then shifted right by 16. The shift rounds towards
minus infinity. δ is the parameter `LEAK` in Q16.16 and defaults to 0.25
(16384).

**tanh.** The function is odd, so it is evaluated on |a|. It uses straight
chords between the breakpoints

    A = 0, 0.25, 0.5, 0.75, 1, 1.25, 1.5, 1.75, 2, 2.5, 3, 4

and holds at tanh(4) beyond |a| = 4. The table holds
Y_k = round(tanh(A_k)·2^16) and the chord slopes
S_k = round((Y_{k+1} − Y_k)/(A_{k+1} − A_k)). For |a| in segment k, the
output is y = Y_k + ((S_k·(|a| − A_k)) >> 16). The largest error against
tanh is about 0.006, in the segment from 1 to 1.25. To change the
approximation, edit the three tables in `tanh_pwl.sv`.

**Readout.** Each MAC forms the full 64-bit product w·x and shifts it right
by 16 (floor). It adds the result to a 32-bit accumulator that saturates at
every addition. Once a partial sum hits a limit, it stays clipped from
there.

## Modules

    esn_top
    ├── esn_controller     step sequencing, pipeline indices, handshakes
    ├── weight_ram         ternary rows   (N × 2(M+N) bits)
    ├── weight_ram         output weights (N × 32L bits)
    ├── ternary_neuron     multiplier-free weighted sum, 1 neuron/clock
    ├── leaky_activation   leak + tanh
    │   └── tanh_pwl
    ├── state_buffer       x(t-1) / x(t) registers
    └── output_layer       L × seq_mac
        └── seq_mac        A_i = A_{i-1} + w_i·x_i
    esn_pkg                Q16.16 type, ternary enum, constants

Every file starts with a comment. It covers the module's function, its
interface and its timing, and which parts follow the published
architecture and which are local choices.

## Using it

Parameters of `esn_top`:

* `M`, `N`, `L`: sizes, defaulting to 2, 100 and 2.
* `LEAK`: δ in Q16.16.

The weights are loaded through the two write ports while `busy` is low:

* `tw_we/tw_addr/tw_wdata` writes the ternary row of reservoir neuron
  `tw_addr`. The layout is given above.
* `ow_we/ow_addr/ow_wdata` writes the L output weights of reservoir neuron
  `ow_addr`. Word l (bits 32l+31…32l) is w_out[l][ow_addr], in Q16.16.

`state_clr` zeroes x, as reset does. Inputs go in through
`in_valid/in_ready/u_in`, and outputs come out through
`out_valid/out_ready/z_out`. A write to the weight RAMs during a step is not
blocked. The step that is running would then see a mix of old and new
weights.

Training is not part of the hardware. Run the reservoir with any W_out and
record x(t) after each step. Then solve
W_out = (XᵀX + λI)⁻¹·XᵀY off-line and write the result into the
output-weight RAM. Two testbenches do exactly this.

The ternary weights are also produced off-line. The published recipe
draws W_res from a normal distribution, divides it by its spectral radius,
scales it by a constant and then quantises every entry to 0/±1. Any
procedure that yields 0/±1 works; the testbenches draw ternary weights
directly. The ternary reservoir has no scale factor. Keep W_res sparse,
about one to a few nonzeros per row, so that the reservoir does not
saturate.

## Simulation

Every testbench checks itself and ends with `TB_RESULT checks=… failures=…`.
To build and run one with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
        rtl/esn_pkg.sv tb/esn_ref_pkg.sv tb/tb_esn_top.sv --top-module tb_esn_top
    ./obj_dir/Vtb_esn_top

`tb/esn_ref_pkg.sv` holds the reference arithmetic. It rebuilds the tanh
table from `$tanh` at run time, so the testbenches do not share constants
with the RTL.

| testbench | what it checks |
|---|---|
| `tb_ternary_neuron` | random, extreme and all-±1 operand sets against an integer sum; 1-clock latency |
| `tb_tanh_pwl` | sweep over [−6, 6] and random values; bit-exact against the chord model, within 0.0065 of tanh, odd symmetry |
| `tb_leaky_activation` | random states and sums, including saturating ones |
| `tb_weight_ram` | read-back, hold while `re` is low, write and read in the same clock |
| `tb_state_buffer` | x(t-1) is stable during a step, commit with the same-clock write, `clr` |
| `tb_seq_mac`, `tb_output_layer` | 100-term product-sums against an integer model, saturation at both ends |
| `tb_esn_controller` | row order, indices in every stage, one commit, latency N+3, stall behaviour |
| `tb_esn_top` | full default size: z(t) and the whole state vector bit-exact against a reference network over 80 steps; latency; stalls, readout overlap, tanh saturation, state clear and W_out reload must each occur |
| `tb_esn_sincos` | default 2-100-2 network predicting the next (sin, cos) sample, period 25 steps. W_out is trained by ridge regression on 300 steps and tested on 100; test MSE must be < 1e-3 (about 6e-7 is reached) |
| `tb_esn_narma10` | NARMA10 with 1 input, 500 neurons and 1 output; 2000 training steps, 300 test steps, the last 200 scored; NMSE must be < 0.5 (about 0.30 is reached). The usual 1000-neuron, 4000-step setting is two localparams away but takes far longer to simulate |

The NARMA10 series used is
y(k+1) = 0.3·y(k) + 0.05·y(k)·Σ_{i=0..9} y(k−i) + 1.5·u(k−9)·u(k) + 0.1,
with u(k) uniform in [0, 0.5]. That input range keeps the series bounded.
An input offset of 1 would make it diverge.

## How far to trust it

* Every block is checked bit for bit against an independent integer model.
  The whole network is checked the same way at its default size. The two
  workload testbenches show that the fixed-point, ternary network learns
  useful tasks.
* The design has not been placed and routed, so 200 MHz is not
  demonstrated. The ternary sum of M+N operands is one combinational stage
  (102 operands at the default size). The tanh stage also holds a 32×32
  multiply. At 200 MHz both may need another pipeline register. Adding one
  only shifts the index pipeline in `esn_controller` and the N+3 latency.
* The state is held in registers: 2·N·32 bits, which is 6400 at the default
  size. Reading x(t-1) in parallel needs this. For large N, that register
  file and the M+N-operand sum set the cost.

## Published architecture and local choices

These parts follow the published design:

* ternary input and reservoir weights with a gating-only neuron circuit;
* 32-bit fixed-point data;
* one sequential product-sum unit per output neuron, fed while the
  reservoir is still being computed;
* the leaky-tanh reservoir equation, with the leak applied inside the
  tanh (many ESN formulations apply it outside), and the off-line
  ridge-regression readout;
* the 2-100-2 size.

These parts are choices made for this RTL:

* the 16/16 split of the fixed-point word, rounding by truncation, and MAC
  saturation;
* δ = 0.25;
* the 11-segment tanh;
* the pipeline depth and the valid/ready handshakes;
* the host load ports and the register-based state buffer;
* open-loop operation, where the host supplies every u(t) and the outputs
  are not fed back.

The host processor, its data movers and the training software are not part
of this RTL.
