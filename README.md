# Low-latency FNN inference pipeline

This is synthesizable SystemVerilog for a feed-forward neural network
accelerator. It targets trading-style prediction, where one input row must give
one prediction as quickly as possible. The network is an *ensemble* of `NETS`
small two-layer networks that share one input row, and their clipped outputs
are averaged. The hardware has no processor and no instruction stream. It is a
fixed chain of small pipelined stages, one per tensor operation. Each stage
streams one tensor element per clock from RAM to RAM, then starts the next
stage with a single pulse.

The structure follows a thesis that built this network in Synchronous Message
Exchange (SME), a C# hardware description framework: the stage chain, the
process names, one RAM per tensor, and Generate / ToRam / Pipe / Forward as
the glue. Numbers here are 32-bit fixed point instead of the floating point of
the reference model. Sigmoid and softplus are table interpolations. The full
list of departures is under [Departures](#departures-from-the-reference-design).

## The computation

For one input row `x` of `INPUT_SIZE` values, with network `n` of `NETS`
networks and hidden unit `k` of `HIDDEN`:

```
h[n,k]  = sum_i x[i] * W0[n*HIDDEN+k, i]             first layer, all nets in one product
hz,hr   = PReLU(h, pz[n]),  PReLU(h, pr[n])           slope per network, two branches
z[n]    = sum_k hz[n,k] * Wz[n,k]                     second layer, z branch
r[n]    = sum_k hr[n,k] * Wr[n,k]                     second layer, r branch
y_n     = softplus(r[n]) * (2*sigmoid(z_scale[n]*z[n]) - 1)
y       = mean_n clamp(y_n, -MAX_PREDICT, MAX_PREDICT)
```

`sigmoid` and `softplus` thus split a prediction into a sign-and-confidence
part and a magnitude part. The default sizes are the thesis' "actual" network:
`INPUT_SIZE=256, HIDDEN=96, NETS=16, MAX_PREDICT=1.0, BATCH=1`. Its small
"test" network is `4, 7, 5`.

## Stage chain

```
 transpose W0 ─► matmul h = x·W0ᵀ ─┬─► Hz (PReLU) ─► z = hz·Wz ─► SLA_z ─► zz = z_scale·z ─► sigmoid ─► mulmin ─┐
                                   │                                                                           join ─► rz ─► clamp ─► mean ─► y
                                   └─► Hr (PReLU) ─► r = hr·Wr ─► SLA_r ─► softplus ──────────────────────────┘
```

Each box is one stage, and each arrow is a *control bus* passing through one
pipe register. Every intermediate tensor has its own `dp_ram`, 22 in all. The
stages are:

| stage | module | walks | unit latency |
|---|---|---|---|
| transpose W0 (NH×I → I×NH) | `transpose_stage` | NH·I | – |
| matmul | `matmul_stage` | B·NH·I products | mul 1 + add 1 |
| Hz, Hr | `ew_stage` + `prelu_unit` | B·NH | 1 |
| z, r (element product with Wz, Wr) | `ew_stage` + `mul_unit` | B·NH | 1 |
| SLA_z, SLA_r (sum over hidden) | `reduce_stage` + `sla_unit` | B·NH | 1 |
| zz = z_scale·z | `ew_stage` + `mul_unit` | B·N | 1 |
| sigmoid | `ew_stage` + `sigmoid_unit` | B·N | 3 |
| mulmin = 2s−1 | `ew_stage` + `mulmin_unit` | B·N | 2 |
| softplus | `ew_stage` + `softplus_unit` | B·N | 2 |
| join | `ctrl_join` | – | – |
| rz, clamp | `ew_stage` + `mul_unit` / `clamp_unit` | B·N | 1 |
| mean over networks | `reduce_stage` + `mean_unit` | B·N | 2 |

(NH = NETS·HIDDEN, I = INPUT_SIZE, B = BATCH, N = NETS.) The two branches run
side by side. The z branch is longer by two stages, so `ctrl_join` holds the
softplus branch's ready pulse until mulmin has finished as well.

### Inside a stage: control bus, index bus, Generate, ToRam

All stages are built from the same parts. The types are in `fnn_pkg`.

* **Control bus** (`index_control_t`): `ready`, `height`, `width`,
  `offset_a`, `offset_b`. A one-clock `ready` pulse starts a stage, and the bus
  tells the stage the shape to walk. A stage pulses its own `ctrl_out` one
  clock after its last RAM write, carrying the shape of its result. The top
  rebuilds the shape for the next stage, which is the "reshape" between
  layers.
* **Index generator** (`ew_index`, `reduce_index`, `matmul_index`,
  and the one inside `transpose_stage`): a counter that sends one address per
  clock on *index buses* (`index_value_t`: `ready`, `addr`), one bus per
  operand and one for the result. `ew_index` broadcasts the second operand in
  one of four ways, chosen by `B_MODE`:
  * `B_SAME`: the same address as the first operand;
  * `B_COL`: one value per column;
  * `B_GROUP`: one value per group of columns, used for the PReLU slope per network;
  * `B_NONE`: a constant port instead, used for the clamp limit.
* **Generate** (`rd_gen`): registers an index bus into a RAM read request.
* **dp_ram**: one write port and one read port, with read data one clock
  after the request.
* **compute unit**: fixed latency L (the `op_latency` function).
* **Pipe** (`pipe_reg`): carries the output address and flags beside the data
  for as many clocks as the data takes.
* **ToRam** (`to_ram`): registers address and value into a RAM write.

So an element issued by an element-wise index generator in clock t goes like
this:

| clock | what happens |
|---|---|
| t+1 | Generate registers the read request |
| t+2 | read data arrives |
| t+2+L | the unit's result is ready |
| end of t+3+L | ToRam writes the result |

No stage has backpressure or stalls. Every timing is fixed, and a stage starts
only after the previous one has written all of its result. Each stage is
pipelined in itself, but two stages never overlap. That makes every stage
testable on its own.

### Matrix product and forwarding

`matmul_stage` computes `C = A·B`, or `C += A·B` with `use_c=1`. It handles
one multiply-accumulate per clock, and this is the part of the design that is
hardest to follow:

* `matmul_index` walks `i, j, k` with `k` innermost. The A address is
  `i·widthA+k`, the B address is `k·widthB+j`, and the C address is
  `i·widthB+j`. It keeps running sums instead of multiplying.
* Its two control buses may arrive in either order; both are latched. If
  `widthA != heightB`, it raises `dim_error` and issues nothing.
* *Matmul_Mul* registers `a·b`. *Matmul_Add* adds that product to the running
  sum of the same C element, and every partial sum is written back to C.
* The consecutive products of one C element come one clock apart. So the
  previous partial sum of the same element is still in the adder's output
  register when the next product arrives; it has not yet been written to RAM.
  `forward_unit` sees that the C address repeats and passes the adder's own
  result back (`fwd_hit`).
* When the address does not repeat, the forward unit passes the stored C
  element (`use_c=1`) or zero (`use_c=0`).
* The last write of each element leaves the complete dot product.
* Timing: `ctrl_out` comes `heightA·widthB·widthA + 8` clocks after the later
  control pulse.

The top runs the product with `use_c=0`, since the first layer has no bias.
The transpose of W0 is needed because the index generator reads B down a
column. Transposing W0 (NH×I, as loaded) into W0ᵀ (I×NH) makes the first
layer `h = x · W0ᵀ` with `x` as A.

## Number format and function approximations

* Every element is Q15.16: 32-bit two's complement with 16 fraction bits
  (`fnn_pkg::DATA_W`, `FRAC`).
* Products keep 64 bits, are shifted right arithmetically (that is, rounded
  toward minus infinity) and saturate. Sums saturate too.
* **sigmoid** uses linear interpolation between knots `sigmoid(k/2)`,
  k = 0..16, with `sigmoid(−a) = 1 − sigmoid(a)`. For |a| ≥ 8 it returns the
  last knot. The error is below 0.004.
* **softplus** is `max(a,0) + g(|a|)` with `g(u) = log(1+e^−u)`, interpolated
  between `g(k/2)`, k = 0..16. The error is below 0.008.
* Each table holds `round(65536·f(k/2))` and is written out in the unit's
  source.
* **mean** uses a combinational signed division by the element count,
  truncating toward zero, followed by one register.

The end-to-end tests compare against a floating-point model and allow 0.001
on h, hz, hr, z and r, and 0.02 on y.

## Timing

A run takes, from the clock `start` is sampled to the `done` pulse:

```
T = NH·I  (transpose)  +  B·NH·I  (matmul)  +  3·B·NH  +  6·B·N  +  84
```

The constant 84 is the sum of the fixed pipeline depths and hand-over
registers along the longer branch. All three end-to-end testbenches check this formula
exactly.

| network | this design | thesis (its SME design) |
|---|---|---|
| test size 4 / 7 / 5, batch 1 | 499 clocks | 597 clocks |
| actual size 256 / 96 / 16, batch 1 | 791,220 clocks | 1,184,385 clocks |

No clock frequency is claimed here: the RTL has only been simulated and
run through generic synthesis. The thesis' synthesis results limited its
whole design to about 17.7 MHz, set by the mean and sigmoid stages, where it
divides. In this RTL the longest paths are likely the combinational divider
in `mean_unit` and the 64-bit product with saturation in `fx_mul`. Either can
be split over more register stages, with the stage latencies in the timing
formula updated to match.

Almost all of the time goes to transposing W0 and to the single-MAC product.
The transpose only reorders constant weights. Loading W0 already transposed
would halve the run time, but that would change the stage chain, so it has
not been done.

## Memory

Every tensor has its own RAM, sized from the parameters at elaboration time.
At the defaults, W0 and W0ᵀ hold 393,216 words each. All 22 RAMs together
hold 25.5 Mbit, almost all of it in those two. Yosys keeps them as
memory cells. This does not fit a Zynq-7020 (140 block RAMs of 36 Kbit,
5 Mbit), and the thesis' own design did not fit it either. The logic is small:
about 3.5 k flip-flops.

## Using the top (`fnn_top`)

1. Reset: `rst_n` is asynchronous and active low. It resets all control
   state, but not the RAM contents.
2. Load the seven parameter tensors, one element per clock:
   * set `load_en`, and select the tensor with `load_sel`: `LD_W0`, `LD_X`,
     `LD_PZ`, `LD_PR`, `LD_WZ`, `LD_WR` or `LD_ZS`;
   * `load_addr` is a flat row-major address;
   * `W0` is `(NETS·HIDDEN) × INPUT_SIZE`, `x` is `BATCH × INPUT_SIZE`, `Wz`
     and `Wr` are `NETS × HIDDEN`, and the slopes and `z_scale` have one value
     per network.
3. Pulse `start`. `busy` stays high until the one-clock `done` pulse, and
   `start` is ignored while `busy`. Do not load during a run.
4. Read `y[b]` through `y_rd` (`en`, `addr`). The data is on `y_rdata` one
   clock later.

`dim_error` would flag a shape mismatch in the matrix product. With the
shapes fixed by the parameters, it cannot happen in the top. The shapes of all
tensors are elaboration parameters. The stages themselves take any shape on
their control bus, but the top fixes the shapes it sends them.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. Each has a watchdog. Any testbench can be
built with plain Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/fnn_pkg.sv tb/fnn_ref_pkg.sv rtl/*.sv tb/tb_fnn_top.sv \
  --top-module tb_fnn_top -o sim
./obj_dir/sim
```

Replace `tb_fnn_top` with any other testbench name.

* `tb_fnn_top`: test size 4/7/5 with batch 2, three runs with fresh random
  data.
  * It checks h, hz, hr, z, r and y against a real-number model
    (`fnn_ref_pkg`), and checks the cycle count exactly.
  * It requires each of these to happen at least once: a forwarded partial
    sum, negative PReLU inputs, predictions clipped at +max and at −max, the
    join holding a branch, and a start ignored while busy.
* `tb_fnn_test_size`: the same checks at the test network exactly as
  specified (4/7/5, batch 1), eight runs, with the run time required to be
  499 clocks.
* `tb_fnn_full`: `fnn_top` with every parameter at its default (256/96/16),
  two full inferences. It checks h, y and the cycle count, and takes about
  2 s in Verilator.
* `tb_<module>`: one testbench for every other module in `rtl/`.
  * The units are driven with random inputs against a behavioural model.
  * The stages are checked against RAM models, including their exact latencies.

## Departures from the reference design

* **Fixed point** instead of double precision or vendor floating-point
  operators. Sigmoid and softplus are interpolated, and the division in the
  mean is a plain divider.
* **C address of the product** is `i·widthB+j`. The reference listing uses
  `i·widthA+j`, which only works for square results.
* **Forwarding** feeds the adder, which matches the full process graph of the
  reference design. Its simplified Matmul sketch instead draws the connection
  to the multiplier. Every partial sum is written, not only the final one.
* **Softplus on the r branch**, parallel to the z branch, and joined before
  `rz`. This follows the reference model and its process graph. Its coarse
  block diagram draws softplus after mulmin in a single column.
* **Sigmoid sign.** The model's `1/(1+e^−z)` is used. A small example in the
  reference design writes `e^+z`.
* **Data loading.** The reference design fills its RAMs from files in
  simulation. Here a load port writes them.
* **Hz and Hr** read the shared h RAM through one read port, in lock step. An
  assertion in the top checks this.
* **Control bus.** The control bus has no stride field, because all tensors
  are dense. The `Value_Converter` between the transpose RAMs is not needed,
  since there is only one number format.
* **Reset, widths and latencies** are this design's choices: asynchronous
  reset, 24-bit addresses, 16-bit dimensions, and the latencies in the stage
  table.

## Files

`rtl/` contains:

* `fnn_pkg`: types, constants and fixed-point helpers;
* `fnn_top`;
* the stages `transpose_stage`, `matmul_stage`, `ew_stage` and
  `reduce_stage`;
* the index generators `matmul_index`, `ew_index` and `reduce_index`;
* the glue `rd_gen`, `to_ram`, `pipe_reg`, `forward_unit`, `ctrl_join` and
  `dp_ram`;
* the units `prelu_unit`, `mul_unit`, `sigmoid_unit`, `mulmin_unit`,
  `softplus_unit`, `clamp_unit`, `sla_unit` and `mean_unit`.

`tb/` contains one testbench per module, the three end-to-end tests, and
`fnn_ref_pkg`, the real-number reference model.
