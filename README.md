# Scale-invariant neuron models in fixed-point logic

This RTL produces the signals of neuron models in real time, one iteration per
clock. Three of the models are *scale-invariant*: each neuron's next action
potential is a threshold potential multiplied by a **fractional power** of a
ratio:

    V_k(i+1) = V0_k * | 1 - D / S |^(-gamma_k)

Here `D` is the driving signal, either an external field or another neuron.
`S` is the sum of the potentials of all neurons in the network. `gamma_k` is a
fractional exponent: the difference between a fractal dimension and a
topological dimension of the neuron. Logic has no operator for `x^0.433`.
The central idea of the design is to build that power out of square roots
only (see below). Two classical models, FitzHugh-Nagumo and Hindmarsh-Rose,
are included as well, for reference.

All five generators sit side by side in `sinn_top`. They share the clock, the
reset and an iteration strobe. Each one drives an 8-bit output code.

## The fractional power (`frac_pow`)

Write the exponent as an M-digit binary fraction,

    gamma = a_1/2 + a_2/4 + ... + a_M/2^M,   a_k in {0, 1}

Then

    x^gamma = prod over k with a_k = 1 of  x^(2^-k)

and `x^(2^-k)` is the square root applied k times. So `frac_pow` is:

- a chain of M square-root units, `r_1 = sqrt(x)`, `r_2 = sqrt(r_1)`, and so on;
- a chain of M optional multipliers. Stage k multiplies the running product by
  `r_k` when its digit `a_k` is 1, and passes the product through otherwise.

The `gamma` port carries `a_1` in its most significant bit. The default is
M = 9, which gives any exponent to within 2^-10. That covers the exponents the
models use to +-0.001. These exponents are 0.567, 0.806 and 0.618 (the golden
ratio) and their complements to 1. For example, 0.433 is encoded as 222/512 =
0.4336. The hierarchical network uses M = 2, enough for gamma = 0.5.

The whole unit is combinational. Its depth is M square roots, each of them 28
compare-and-subtract stages, followed by up to M multiplications.

`fx_sqrt` uses the bit-by-bit (digit recurrence) integer square root on the
radicand `x * 2^24`. The result is exact to the floor. `fx_div` is an exact
divider with saturation.

## One neuron update (`si_neuron`)

    q = D / S            (fx_div)
    r = |1 - q|
    p = r^gamma          (frac_pow)
    V = V0 / p           (fx_div: this gives the negative exponent)

Edge cases:

- `S = 0` saturates the quotient.
- `r = 0` gives `p = 0`, and `V` saturates to the largest number. The next
  iteration sees a very large sum, so `q` is near 0, `r` is near 1, and the
  neuron falls back near `V0`.

Whenever `r` is small the update is very sensitive. The rounding error of its
inputs is multiplied by about `1/r`.

## The three networks

| module | law per iteration | default size |
|---|---|---|
| `si_net_eq3` | every neuron is driven by the field: `V_k <= V0_k |1 - F/S|^-g_k` | N = 3, M = 9 |
| `si_chain_eq5` | neuron 1 *is* the field. Neuron k >= 2 is driven by neuron k-1: `V_k <= V0_k |1 - V_(k-1)/S|^-g_k` | N = 3, M = 9 |
| `si_hier_eq6` | L layers of K neurons, nested inside one iteration (below) | L = 3, K = 3, M = 2 |

The suffixes `eq3`, `eq5` and `eq6` follow the numbering of the three update
laws in the original model description. Below, `si_net_eq3` is called the
field-driven network, `si_chain_eq5` the chain and `si_hier_eq6` the
hierarchical network.

In all three:

- `S` is the sum over every neuron of the network. In the chain this sum
  includes the field.
- Every potential is a register, loaded when `step` is high.
- All right-hand sides use the values from before the clock edge. The neurons
  update in parallel, and a new value is visible in the cycle after the step.
- Each neuron has its own `si_neuron` datapath, with its own `V0_k` and
  `gamma_k` inputs.

**Hierarchical network.** The neuron law is applied once per layer, nested:
`f(V0, S) = V0 |1 - F/S|^-g`.

- Layer 1 uses the threshold `V0/L` and the summed last layer from the
  previous iteration.
- Each later layer uses `V0` and the sum of the *new* outputs of the layer
  below.

One iteration therefore passes through L neuron datapaths in series, which
makes it the longest combinational path in the design. Reading the nesting as
"layers joined through their sums" is this design's interpretation.

## The external field (`field_gen`)

`F(t) = A (1 + B sin(W t))`, with a period-modulated amplitude. It works as
follows:

- A 32-bit phase accumulator advances by `PHASE_INC` at every iteration, so
  `W dt = 2 pi PHASE_INC / 2^32`.
- The sine comes from a 1024-entry table of one full period. The table is
  computed at elaboration from `$sin(2 pi i / 1024)`, quantised to the number
  format.
- The table value is interpolated linearly with the next 16 phase bits, which
  keeps the error below 1e-5.

The top uses these settings, with one iteration taken as 1/1024 time unit:

| network | A | B | W | PHASE_INC |
|---|---|---|---|---|
| field-driven network | 0.8 | 0.4 | 88.8 pi | 186227098 |
| chain | 0.8 | 0.4 | 8 pi | 16777216 |
| hierarchical | 0.45 | 0.5 | 4 pi | 8388608 |

## FitzHugh-Nagumo and Hindmarsh-Rose

Both use the explicit Euler rule with `dt = 1/32` (`DT_SHIFT = 5`), one step
per strobe.

- `fhn_neuron`: `v' = v - v^3/3 - w + I`, `tau w' = v + a - b w`, with
  I = 0.5, tau = 12.5, a = 0.7, b = 0.8. Initial state v = -1, w = 0. The
  neuron spikes regularly, about every 1300 iterations.
- `hr_neuron`: `x' = y - a x^3 + b x^2 - z + I`, `y' = c - d x^2 - y`,
  `z' = r (s (x - xR) - z)`, with a = 1, b = 3, c = 1, d = 5, s = 4,
  xR = -1.6, r = 0.001, I = 2. Initial state x = xR, y = 1 - 5 xR^2, z = 0.
  The neuron bursts: a long train of spikes, then a silence of about 8500
  iterations.

## Number format

Every value is signed 32-bit fixed point with 24 fractional bits (`sinn_pkg`):

- range: about +-128;
- resolution: 6e-8;
- products are rounded to nearest;
- sums and products saturate.

This resolution is chosen for the Hindmarsh-Rose slow variable. Its rate
`r dt = 3e-5` still has to move it at every step.

## Output codes (`code_out`)

Each model presents one variable as an 8-bit code:

    code = clip((x - OFFSET) >> SHIFT, 0, 255)

The code is registered. A `clipped` flag marks values outside the window.

| output | variable | window |
|---|---|---|
| `code_fhn` | v | -2.5 to 29.5, step 1/8 |
| `code_hr` | x | -2.5 to 29.5, step 1/8 |
| `code_eq3` | neuron 1 | 0 to 1, step 1/256 |
| `code_eq5` | neuron 3 | 0 to 1, step 1/256 |
| `code_eq6` | layer 3, neuron 1 | 0 to 1, step 1/256 |

The scale-invariant potentials occasionally jump above 1 when `|1 - D/S|` comes
close to 0. Their codes then clip.

## Interface and timing of `sinn_top`

| port | dir | meaning |
|---|---|---|
| `clk` | in | the single clock |
| `rst_n` | in | asynchronous, active low. Loads the initial states and sets every field phase to 0 |
| `step` | in | one iteration of every model in this cycle. Hold it high for one iteration per clock |
| `code_*` | out | 8-bit codes, one cycle after the state they show |
| `code_clipped[4:0]` | out | {eq6, eq5, eq3, hr, fhn} window flags |
| `fhn_v, fhn_w, hr_x, hr_y, hr_z` | out | Euler model states |
| `field3/5/6` | out | the three fields |
| `eq3_v[3]`, `eq5_v[3]`, `eq6_v[3][3]` | out | scale-invariant potentials (`eq5_v[0]` is the field) |

Parameters:

- `GAMMA_EQ3` = 222 (0.4336), the 9-digit exponent of the field-driven network.
- `GAMMA_EQ5` = 256 (0.5), the 9-digit exponent of the chain.
- `GAMMA_EQ6` = 2'b10 (0.5), the 2-digit exponent of the hierarchical network.

Throughput is one point per model per clock. A run of 1.5 million points takes
1.5 million cycles. Nothing is stored, so run length is unbounded.

The clock rate is limited by the combinational depth:

- Field-driven network and chain: two dividers and a nine-root chain per iteration.
- Hierarchical network: three such datapaths in series, each with two roots.

Pipelining is not implemented. A pipelined version would have to keep the
update rule "all neurons from the previous iteration" intact.

## Where this RTL makes its own choices

The update laws, the model parameters, the square-root construction of the
power and its nine digits, the network sizes and the 8-bit output width come
from the model description. This design chose the following:

- **Number format and arithmetic.** The format is signed Q7.24. Square root,
  divider and rounding are as described above.
- **Integration.** The classical models use explicit Euler with dt = 1/32,
  and their initial states are given above.
- **Time per iteration.** One iteration is 1/1024 time unit, and the sine is
  table-based.
- **Sign of the exponent.** The update uses the negative exponent `-gamma`.
  The chain includes the field in its sum.
- **Hierarchical network.** The nesting is read as described above. All its
  neurons share one V0 and gamma.
- **Field.** Each network has one field, shared by its neurons, although the
  law allows a separate field per neuron.
- **Output windows** and the shared `step` strobe.
- **Side by side.** All five models sit in one top. An FPGA board would more
  likely be loaded with one model at a time.

No FPGA implementation results were measured for this RTL. There is no timing
closure and no resource count on a device.

## Verification

Each block has a self-checking testbench in `tb/`. Each one compares the
outputs with values computed in double-precision real arithmetic inside the
testbench:

- `tb_fx_sqrt`: exact, checked with `y^2 <= X < (y+1)^2`.
- `tb_fx_div`: within 1 LSB, plus the saturation and divide-by-zero cases.
- `tb_frac_pow`: within 2e-5 relative, over random bases and all 512
  exponents. Also checks that 9 digits meet each named exponent to +-0.001.
- `tb_si_neuron`: within 2e-4 relative.
- The network testbenches: checked step by step against the update law,
  evaluated on the potentials observed before the step. They also check that
  the state holds while `step` is low, and the one-cycle latency.
- The Euler models: checked against a free-running real Euler model over
  thousands of steps.
- `tb_field_gen`: within 2e-5.
- `tb_code_out`: exact codes and flags.

`tb_sinn_top` runs the whole design at its default parameters for 30,000
cycles, with `step` randomly low 2% of the time. Every cycle it checks every
state variable, field and code against a one-step real-valued prediction. It
also requires that each of these events happens at least once:

- FitzHugh-Nagumo spikes;
- Hindmarsh-Rose spikes, and a burst after a long silence;
- a peak of each field;
- stalls;
- clipped codes.

`tb_wl_eq3_points` runs the field-driven network with the strobe held high for
10 million iterations, using the field settings of the first table row. It
checks that exactly 1.5 million and then 10 million cycles produce as many
points. It also checks a one-step prediction every 251 iterations. This takes
about 45 seconds.

Running a testbench with plain Verilator:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_sinn_top \
        -y rtl -y tb +libext+.sv -Irtl rtl/sinn_pkg.sv tb/tb_sinn_top.sv
    ./obj_dir/Vtb_sinn_top

Each testbench ends by printing `TB_RESULT checks=N failures=M`. The top-level
run takes about 20 seconds, most of it compiling.
