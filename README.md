# FIR neural network for time series prediction, with digit-serial arithmetic

This is a small hardware predictor for time series. It takes one sample at a time and returns an
estimate of the next value. Its model is an *FIR neural network*. That is a feedforward network in
which each synapse is a finite-impulse-response filter, not a single weight. A neuron
therefore sees a short history of each of its inputs, not just their present values, so the
network can learn temporal patterns up to the sum of its filter lengths.

The network has one input, two hidden layers of 10 neurons and one output neuron (1:10:10:1). The
synapses have 20, 4 and 4 taps:

| synapse layer        | channels | taps | coefficients per neuron | neurons |
|----------------------|----------|------|-------------------------|---------|
| input -> hidden 1    | 1        | 20   | 20                      | 10      |
| hidden 1 -> hidden 2 | 10       | 4    | 40                      | 10      |
| hidden 2 -> output   | 10       | 4    | 40                      | 1       |

Every neuron adds its bias to the sum of all its filter outputs. It then applies the sigmoid
1/(1+e^-x). The output neuron's sigmoid value is the prediction. Training (temporal
backpropagation) is done off-line in software. The hardware only evaluates the trained network.

The arithmetic is **digit-serial**. Words move two bits (one *digit*) per clock, least
significant digit first. This sits between bit-serial logic, which is small but slow, and
bit-parallel logic, which is fast but large. Every neuron has its own pipelined digit-serial
multiplier. All neurons of a layer get the same data word at the same time and work in
lockstep.

## Number formats

The design fixes 8-bit data, 8-bit weights, an 18-bit accumulator and a 16-bit neuron output
register. The binary points are this implementation's choice:

| quantity                          | width | format       | value          |
|-----------------------------------|-------|--------------|----------------|
| input sample, sigmoid output      | 8     | unsigned Q0.8 | d / 256       |
| filter coefficient, bias          | 8     | signed Q3.4  | w / 16         |
| product, accumulator              | 18    | signed Q5.12 | a / 4096       |
| neuron output register            | 16    | signed Q3.12 | r / 4096       |

Input samples must be scaled to [0, 1) before they enter. The bias is aligned to the
accumulator by shifting it left 8 places. Going from 18 to 16 bits saturates. The 18-bit
accumulator itself wraps on overflow. The default coefficients are small enough that it cannot
overflow (see *Coefficients*).

## The digit-serial pipelined multiplier

This is the least obvious part of the design (`ds_pipelined_mult`, `ds_mult_module`, `ds_adder`).

**Digit-serial adder.** Two full adders add one 2-bit digit of A and B per clock. The carry out
of the upper full adder goes into a register, and enters the lower full adder with the next
digit. A `first` flag marks the least significant digit of a word and forces the carry in to
zero. Words can therefore follow each other with no gap.

**Streams.** The weight is the *multiplier*. It is sign-extended to 18 bits and sent as 9 digits,
least significant first. The data word is the *multiplicand*. It is applied in parallel. The
product leaves as 9 digits, which give w*d modulo 2^18. Because |w*d| < 2^15, that is the exact
signed product. Data words are unsigned, so every row of the array adds and no row subtracts.

**The array.** The multiplier has 8 rows, one per multiplicand bit:

```
 x digits ──► row 0 ───► DSMM 1 ───► DSMM 2 ─ ... ─► DSMM 7 ──► product digits
 (LSD first)  AND gates   y[1]        y[2]            y[7]
              y[0]
```

Row j must add y[j] · (X · 2^j) to the partial sum from the rows above it. Each
digit-serial multiplier module (DSMM) does the following:

* ANDs its bit y[j] with both bits of the incoming X digit, making the partial-product digit.
* Adds that digit to the incoming partial-sum digit in a digit-serial adder, and registers the
  sum digit.
* Passes the X digit on to the next row through a register, **shifted left by one bit**. A one-bit
  register holds the upper bit of the previous digit. It becomes the lower bit of the outgoing
  digit, so that X' = 2·X as a stream. The next row therefore sees X at its own weight.

Row 0 has no partial sum to add to, so it is only AND gates plus the one-bit shift register.
X and the partial sum get one register each per row. The two streams stay aligned, and no
row's critical path is longer than a 2-bit adder. The `first` and `valid` flags travel down the
array with the data and restart each row's carry at each word.

**Timing.** The multiplier has a latency of 7 clocks and accepts a new word every 9 clocks,
back to back. Each row samples its multiplicand bit when the word's first digit reaches it. The
parallel data word may therefore change for the next word while the current one is still in the
array. The only condition is that the word is held for 7 clocks after its first digit.

## Multiply-accumulate unit

`mac_unit` puts a weight and a data word into its input register and streams the weight through
the multiplier. It adds the product digits into the accumulator with a second digit-serial adder.
The accumulator is not a parallel register. It is a **circulating shift register of 9 digits**.
On each clock, the product digit is added to the digit leaving the bottom, and the sum enters at
the top. After one 9-digit word the register has turned once and holds acc + w·d with its digits
back in place. `load` preloads it with the bias.

One word can be issued per 9 clocks. `idle` rises 9·N + 8 clocks after the first of N
back-to-back issues: 1 clock to load, 9 per word and 7 through the multiplier. At that point the
accumulator is final.

## Neuron, shared bus and layer sequencing

A neuron (`fir_neuron`) has the following parts:

* a coefficient ROM with one word per connection, addressed by channel·taps + tap;
* a bias register;
* a MAC unit;
* a 16-bit output register that holds its saturated sum until the neuron may use the bus.

A layer (`fir_layer`) contains the following:

* one tapped delay line per input channel (`tap_delay_line`). Tap m holds x(k−m). A channel's line
  shifts when a new value is written to that channel.
* an address generator. It walks the connections channel by channel and, within a channel, tap
  by tap. It gives the ROM address and selects the delay-line word.
* a controller (`layer_controller`) with the states LOAD, MAC, DRAIN, CAPTURE and BUS;
* the neurons;
* one **shared output bus**, which is an OR of the outputs of the neurons not gated off. The bus
  addresses the layer's single sigmoid table (`sigmoid_lut`).

A layer with D = channels × taps connections and N neurons runs as follows:

| clocks after `start` | event                                                         |
|----------------------|---------------------------------------------------------------|
| 1                    | LOAD: bias preloaded into every accumulator                   |
| 2, 11, 20, …         | MAC: one data word broadcast, one issue to every neuron       |
| 10 + 9D              | DRAIN ends: last product accumulated, MACs idle               |
| 11 + 9D              | CAPTURE: accumulators saturated into the output registers     |
| 12 + 9D … 11 + 9D + N | BUS: neuron i on the bus and the sigmoid table enabled       |
| one clock later each | `out_valid`, `out_idx` = i, `out_data` = sigmoid value        |
| 12 + 9D + N          | `done`, together with the last result                         |

The sigmoid table has 256 entries, indexed by the upper byte of the output register, which
gives x in steps of 1/16 over [−8, 8). Entry i holds min(255, round(256 / (1 + e^−(i−128)/16))),
with slope λ = 1. It is read from `rtl/sigmoid_lut.hex` when the design starts. The path is
relative to the repository root, so run simulations from there.

## The network and its interface

`fir_nn_top` chains three layers. A sample is accepted when `x_valid` and `x_ready` are both
high. It is written into layer 1's delay line, and layer 1 starts. Each result that layer 1 puts
on its bus is written straight into the delay line of the matching channel of layer 2. When
layer 1 is done, layer 2 starts, and then layer 3. The output neuron's result appears on `y_data`
with a one-clock `y_valid`. `x_ready` rises on the next clock.

* Sample to prediction: **957 clocks** (202 + 382 + 373 for the three layers). `x_ready` is high
  again one clock after `y_valid`, so a stream runs at 959 clocks per sample.
* The layers work in turn. Only one layer is active at any time.
* `sat_count` counts the neuron sums that were clipped to 16 bits. It saturates at 255.

The parameters (`N_H1`, `N_H2`, `TAPS1`, `TAPS2`, `TAPS3`) default to the topology above. Every
module also has a parameter for its own sizes.

## Coefficients

The trained coefficients of the reference network are not available. The ROMs and bias registers
are therefore filled at elaboration from two functions in `rtl/fir_nn_pkg.sv`. `init_coeff` and
`init_bias` are a fixed integer hash that gives weights in [−12, 12]/16 and biases in [−8, 8]/16.
With these ranges a layer's sum stays below ±32, so the accumulator cannot overflow. Predictions
made with these values are not forecasts. They are a deterministic test load.

To use trained values, replace the two functions. For example, make them return entries of a
constant table, or change `coeff_rom` to load a small memory file. Keep the weights in Q3.4.
Check that bias + Σ|w|·1 stays under 32 for every neuron, or the accumulator wraps.

## Where this implementation departs from or goes beyond its source

* **Word framing and handshakes.** The source does not define these. The `first` flag, the 9-digit
  (18-bit) words, the valid/ready sample port and the controller's state machine are this
  design's.
* **X path in the DSMM.** The classic cell drawing has two delays on each multiplier bit. Here
  they are one alignment register and one bit register that makes the one-bit shift between rows.
* **Registers around the multiplier.** The source shows a 16-bit register in front of the
  multiplier and a 16-bit product register after it. Here the input register holds the weight
  (already sign-extended for streaming) and the data word. The product is never held as a
  parallel word: it goes digit by digit from the multiplier's output registers into the
  accumulator.
* **Stand-alone add-shift multiplier.** The simple multiplier that runs for N steps is not built
  on its own. Its cell is used only as a row of the pipelined array.
* **Adder tree.** None is used. Each neuron accumulates serially.
* **Layer scheduling.** The layers run in turn for each sample. They are not pipelined across
  samples.
* **Data precision.** The signedness of the data and the binary points are assumptions. So are the
  sigmoid table's size and slope, the saturation from 18 to 16 bits, and the bias format.
* **Timing and resources.** The source reports a 220 ns critical path (4.54 MHz) and its resource
  use on an XC4000-series FPGA. These belong to that mapping. They were not reproduced, and the
  RTL is not tied to any device. At 4.54 MHz, 957 clocks per sample gives about 4,700
  predictions per second.
* **Not included.** The FPGA board and the host-PC coprocessor link, which is not specified.
  Training is not included either.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. The expected values are computed independently in
`tb/tb_ref_pkg.sv`, which holds integer models and the sigmoid in real arithmetic.

| testbench               | what it checks                                                                 |
|-------------------------|--------------------------------------------------------------------------------|
| `tb_ds_adder`           | 18-bit digit-serial sums, carry ripple, no carry leaking between words          |
| `tb_ds_mult_module`     | O = In + Y·X and X' = 2X per word, Y sampled at the first digit                 |
| `tb_ds_pipelined_mult`  | signed×unsigned products including corner values, 7-clock latency, back-to-back |
| `tb_mac_unit`           | bias + Σ w·d, issue spacing of 9 clocks, idle at 9N + 8                         |
| `tb_tap_delay_line`     | every tap after every write, zero start                                         |
| `tb_coeff_rom`          | ROM contents against the formula                                                |
| `tb_address_generator`  | channel-major order, `last`, stall, clear                                       |
| `tb_sigmoid_lut`        | all 256 entries against 1/(1+e^−x), monotonic, hold without enable              |
| `tb_fir_neuron`         | full 40-connection dot products, bus gating, positive saturation               |
| `tb_layer_controller`   | order and count of load, issues, capture, bus grants, results, done             |
| `tb_fir_layer`          | 25 time steps of a 3-channel, 4-tap, 3-neuron layer, order, 12 + 9D + N clocks  |
| `tb_fir_nn_top`         | default-size network, 60 samples, 957-clock latency, hold-off, bus order        |
| `tb_synthetic_series`   | 10,000 samples of a Runge-Kutta-integrated driven damped particle in a double-well potential, each prediction and its latency |

`tb_fir_nn_top` and `tb_synthetic_series` use the top module at its default parameters. The
other testbenches use smaller sizes where that makes them quicker. The bit-exact match with the
reference model covers the datapath, the delay lines and the sequencing. It does not say
anything about prediction quality, which depends on trained coefficients.

To run a testbench with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_fir_nn_top \
    rtl/fir_nn_pkg.sv tb/tb_ref_pkg.sv tb/tb_fir_nn_top.sv
./obj_dir/Vtb_fir_nn_top
```

Replace `tb_fir_nn_top` with any testbench name. `-Irtl -Itb` let Verilator find the other
modules by file name.

## Files

`rtl/` holds one module or package per file:

* `fir_nn_pkg`: formats and coefficient functions;
* the arithmetic: `ds_adder`, `ds_mult_module`, `ds_pipelined_mult` and `mac_unit`;
* the memories: `tap_delay_line`, `coeff_rom`, `sigmoid_lut` with its table `sigmoid_lut.hex`;
* the control: `address_generator` and `layer_controller`;
* the hierarchy: `fir_neuron`, `fir_layer` and `fir_nn_top`.

`tb/` holds the testbenches and the reference package.
