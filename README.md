# Adaptive ANN classifier for a heterogeneous-sensor edge gateway

A wearable edge gateway receives feature vectors from four very different
sensor nodes — an accelerometer, an ECG lead, a PPG/ECG blood-pressure node
and a metal-oxide gas-sensor array — and must classify each of them locally,
with little power and little logic. Instead of building four neural networks,
this core builds **one** small multilayer perceptron whose shape is the
largest of the four (7 inputs, 6 hidden neurons, 5 outputs) and switches it,
with a 2-bit select line, into whichever classifier the current record needs:

| select `s` | classifier                  | topology I-J-K | classes (1-based)                                 |
|-----------:|-----------------------------|----------------|---------------------------------------------------|
| 0          | human activity recognition  | 7-6-5          | walking, sitting, standing, laying, transition    |
| 1          | abnormal ECG detection      | 5-4-2          | normal, abnormal                                  |
| 2          | blood pressure class        | 6-6-3          | normal, low, high                                 |
| 3          | toxic gas identification    | 4-5-4          | acetaldehyde, acetone, toluene, other             |

Switching costs nothing at run time: the select line steers multiplexers that
feed each layer the trained constants of the chosen classifier, and it
disables the neurons that classifier does not have. The default build uses
8-bit neuron arithmetic, the smallest precision at which the original
evaluation found the accuracy essentially unchanged.

## How one network becomes four

Every classifier is a fully connected perceptron with a single hidden layer:

1. **Input layer** — min–max scaling of each raw feature into [-1, 1]:
   `y_i = G_i * (x_i - xmin_i) + ymin_i`, with `G_i = 2 / (xmax_i - xmin_i)`
   and `ymin_i = -1`.
2. **Hidden layer** — `h_j = f1( sum_i Wh[j][i] * y_i + bh_j )`, where `f1` is
   the PLAN piecewise-linear sigmoid (below).
3. **Output layer** — `o_k = sum_j Wo[k][j] * h_j + bo_k` (linear).
4. **MAX** — the class is the index of the largest `o_k`. (A softmax would
   pick the same index, so it is left out.)

The four trained classifiers have different sizes. Each one's matrices are
padded with zeros up to 7-6-5 and stored as one parameter set; `s` chooses the
set. On top of the padding, the datapath enforces the smaller shape itself:

* inputs `i >= i_s` are forced to 0 after the input layer (a zero-padded
  input neuron would otherwise output `ymin = -1`, not 0);
* hidden neurons `j >= j_s` are forced to 0 (a zero-weight sigmoid neuron
  would otherwise output 0.5);
* MAX looks only at the first `k_s` outputs, so the unused output neurons can
  never win.

With these three rules the unused entries of a parameter set do not matter at
all; zero padding is still the natural way to fill them.

## Number formats

All neuron values, weights and biases are signed `DATA_W`-bit fixed point
with `FRAC_W` fraction bits: by default 8 bits with 5 fraction bits, so 1.0 is
32, the range is [-4, +3.97] and the step is 1/32. The 8-bit width is the
original design's main configuration; the 3.5 split is this design's choice.

Raw features are signed 16-bit integers (`FEAT_W`), as sensor nodes send them
(values such as R-R intervals in samples or normalized gas readings in the
tens of thousands fit).

The input gain `G = 2/(xmax - xmin)` is usually much smaller than one LSB of
the neuron format, so it is stored as an unsigned 8-bit mantissa `g` and a
5-bit right shift `gsh`:

```
y = saturate_8bit( ((x - xmin) * g) >>> gsh  +  ymin )
choose g, gsh so that  g / 2^gsh  ~=  G * 2^FRAC_W  =  64 / (xmax - xmin)
```

Example: a feature spanning 100..356 (range 256) needs `64/256 = 0.25`,
e.g. `g = 128, gsh = 9`. Then x = 100 gives -32 (-1.0), x = 228 gives 0 and
x = 356 gives +32 (+1.0).

Hidden and output sums are accumulated at full precision (biases aligned to
the product scale), then shifted right by `FRAC_W` (floor). The hidden sum
goes unclipped into the sigmoid; the output sum is saturated to 8 bits.
Input-layer results are saturated to 8 bits as well, so features far outside
their trained range clip instead of wrapping.

## The PLAN activation

The hidden layer's sigmoid is replaced by a piecewise-linear approximation
whose slopes are powers of two, so it costs shifts, adds and three
comparators. For `m = |beta|`:

| segment            | value               |
|--------------------|---------------------|
| 0 <= m < 1         | 0.25·m + 0.5        |
| 1 <= m < 2.375     | 0.125·m + 0.625     |
| 2.375 <= m < 5     | 0.03125·m + 0.84375 |
| m >= 5             | 1                   |

For negative `beta` the result is `1 - PLAN(|beta|)` (the sigmoid's symmetry
about 0.5). The segments join continuously (0.75 at m = 1, 0.921875 at
m = 2.375, ~1 at m = 5). The result lies in [0, 1], i.e. 0..32 at the default
format. At `FRAC_W >= 5` every constant is exact.

## Datapath and timing

`adaptive_ann` is fully parallel inside each layer: one multiplier per input
gain and per weight, 7 + 6·7 + 5·6 = **79 multipliers** at the default size.
It is pipelined with a register after each layer and after MAX:

```
 in_valid,s,x ──► input layer ──►[Y]──► hidden layer ──►[H]──► output layer ──►[O]──► MAX ──►[class]──► out_valid
                  params(s)           params(s1)              params(s2)           k_active(s3)
```

* Latency is 4 clocks from `in_valid` to `out_valid`, and a new record can
  enter every clock.
* The select value moves down the pipeline with its record, and the parameter
  bank has one select input per layer. So records of different sensor types
  can follow each other back to back, and each layer reads the set that
  belongs to the record it is holding.
* There is no back-pressure.

The original system ran the core at 10 MHz and measured 31 µs (310 clocks) per
classification. That figure was taken from a software-driven bus sequence:
write the features, write the sensor type, start, read the class. Here the
core takes 4 clocks, and the whole register sequence takes about 33 clocks
with the testbench's bus master. The 310-clock figure is therefore a budget
that this design meets, not a number it reproduces.

## Parameter sets

The trained constants are not part of the hardware description; they are
loaded at run time into `param_bank`. It holds four sets, and each set holds
111 entries at the default size. The layout of one set (I = 7, J = 6, K = 5):

| entries                 | content                | width        |
|-------------------------|------------------------|--------------|
| 0 .. I-1                | `xmin[i]`              | 16, signed   |
| I .. 2I-1               | gain mantissa `g[i]`   | 8, unsigned  |
| 2I .. 3I-1              | gain shift `gsh[i]`    | 5            |
| 3I .. 4I-1              | `ymin[i]`              | 8, signed    |
| 4I + j·I + i            | `Wh[j][i]`             | 8, signed    |
| 4I + J·I + j            | `bh[j]`                | 8, signed    |
| 4I + J·I + J + k·J + j  | `Wo[k][j]`             | 8, signed    |
| 4I + J·I + J + K·J + k  | `bo[k]`                | 8, signed    |

After reset every entry is 0 except `ymin`, which resets to -1.0. Writing a
set while a record of the same sensor type is in flight gives that record a
mix of old and new values. Load the sets before classifying.

## Register interface

`aann_ip` is an AXI4-Lite slave (32-bit data, 8-bit byte address).

| offset       | name       | access | meaning |
|--------------|------------|--------|---------|
| 0x00         | CTRL       | W / R  | write bit0 = 1: start a classification; read bit0: busy |
| 0x04         | SEL        | RW     | sensor type `s` (bits 1:0) |
| 0x08         | STATUS     | R      | bit0: result valid, bit1: busy |
| 0x0C         | CLASS      | R      | 1-based class of the last result; 0 from a start until its result |
| 0x10 + 4·i   | FEATURE i  | RW     | feature F(i+1), signed 16 bits (i = 0..6) |
| 0x30         | PARAM_ADDR | RW     | bits 15:0 entry index, bits 17:16 set |
| 0x34         | PARAM_DATA | W      | writes the entry at PARAM_ADDR, then the index advances by one |

A classification is: write F1..F(i_s), write SEL, write 1 to CTRL, then read
CLASS until it is non-zero. Feature registers that the selected classifier
does not use may hold anything. Write and address channels are accepted
together; byte strobes are ignored; every response is OKAY. The slave checks
the AXI hold rules (VALID kept until READY) with assertions.

## Files

| file | content |
|------|---------|
| `rtl/aann_pkg.sv` | sizes, number formats, the four topologies, sensor-type enum |
| `rtl/aann_ip.sv` | top: register interface + datapath |
| `rtl/aann_axi_regs.sv` | AXI4-Lite register file |
| `rtl/adaptive_ann.sv` | the switched 7-6-5 network, pipeline, neuron deactivation |
| `rtl/param_bank.sv` | four parameter sets and the per-layer select multiplexers |
| `rtl/input_neuron.sv` | min–max scaling neuron |
| `rtl/hidden_neuron.sv` | weighted sum + PLAN |
| `rtl/plan_sigmoid.sv` | PLAN activation |
| `rtl/output_neuron.sv` | weighted sum, linear, saturated |
| `rtl/max_select.sv` | argmax over the active outputs |
| `tb/aann_ref_pkg.sv` | integer/real reference model and random classifier generator |
| `tb/axil_bus_if.sv` | AXI4-Lite bus bundle with master tasks |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and exits. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/aann_pkg.sv tb/aann_ref_pkg.sv tb/tb_aann_ip.sv --top-module tb_aann_ip
./obj_dir/Vtb_aann_ip
```

Replace `tb_aann_ip` with any other `tb_<module>`. The testbench for
`aann_axi_regs` does not need `tb/aann_ref_pkg.sv`. Each run takes well
under a second.

What the testbenches establish:

* **Arithmetic blocks.** `plan_sigmoid` is swept over every input in
  [-8, 8) and checked against the formula evaluated in real numbers.
  `input_neuron`, `hidden_neuron`, `output_neuron` and `max_select` get
  thousands of random vectors each, compared with integer reference
  arithmetic, plus hand-worked cases.
* **`param_bank`.** All four sets are loaded, then all 64 combinations of
  the three selects are checked.
* **`adaptive_ann`.** 4000 records of random sensor types are streamed back
  to back. The parameter sets carry random values in their padding, so the
  masking rules are really needed. Every class and the exact 4-clock latency
  are checked.
* **`tb_aann_ip`, end to end at the default size, through the bus only.**
  Four random classifiers are loaded. Then 300 records per sensor type are
  classified in rotation, and the blood-pressure set is reloaded halfway.
  The test checks every class, the 4-clock core latency and the 310-clock
  budget. It also counts that every mechanism occurred: each mode, mode
  switches, masked inputs, deactivated hidden neurons, MAX ignoring a larger
  unused output, all four PLAN segments, input and output saturation, and
  pending reads.
* **Other precisions.** `tb_aann_precisions` builds the datapath at 12, 16,
  24 and 32 bits and checks 1000 mixed records at each width.

The classifiers in the tests are random, because the trained weights of the
original four classifiers are not public. The tests therefore show that the
hardware computes the network exactly as specified. They say nothing about
accuracy on the real data sets.

## Where this design departs from, or fills in, the original

* **Parameter storage.** The original core had its trained constants built
  in. Here they are loaded through registers, so any four classifiers of up
  to 7-6-5 can be used without rebuilding.
* **Fixed-point split.** The 3.5 split, the gain mantissa/shift
  representation, the 16-bit feature width and the saturation points are
  this design's own choices.
* **PLAN constants.** The second PLAN segment uses slope 0.125, the value
  that makes the curve continuous at both of its ends.
* **Negative PLAN inputs.** These use the sigmoid symmetry `1 - PLAN(|β|)`.
* **Bias placement.** Biases are added before the activation, as in the
  neuron diagrams. Writing the formula with the bias outside `f1` would
  change the hidden layer. It makes no difference to the linear output
  layer.
* **Pipeline, register map and class encoding.** The 4-stage pipeline and
  the register map are this design's own. The 1-based class number, read as
  0 while a result is pending, matches the class values the original system
  returned over the bus.
* **Not included.** The processor test system is not part of this core:
  the soft CPU, its five UARTs (four sensor links and one result link, 9600
  baud) and the PC programs that simulated the sensors. Nor are the accuracy,
  resource and power figures. Those depend on the trained weights and on the
  FPGA flow.

## Changing it

* **Precision.** Set `DATA_W` and `FRAC_W` on `aann_ip`. The original
  versions were 32, 24, 16, 12 and 8 bits; `FRAC_W = DATA_W - 3` keeps the
  same range. `FRAC_W >= 5` keeps the PLAN constants exact.
  `tb_aann_precisions` runs the datapath at 12, 16, 24 and 32 bits (with 9,
  13, 21 and 24 fraction bits) against the reference model. The 32-bit case
  uses 24 rather than 29 fraction bits so that the model's 64-bit integer
  sums cannot overflow; the hardware itself has no such limit.
* **Other classifiers.** Change `N_IN`, `N_HID`, `N_OUT`, `N_SENS` and the
  `TOPO_I/J/K` tables in `aann_pkg`. The parameter layout and the register
  map follow from them; the feature registers occupy 0x10 upward and must
  stay below 0x30.
* **Throughput.** The datapath already accepts one record per clock. The
  register interface starts one record per CTRL write. A streaming front end
  could drive `adaptive_ann` directly.
