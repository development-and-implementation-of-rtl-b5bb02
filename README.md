# DSP-pipeline neural networks for a 40 MHz trigger

This is synthesizable SystemVerilog for small convolutional neural networks that
must accept a new detector event every bunch crossing (40 MHz at the LHC) and answer
within about a hundred nanoseconds. That rules out batching and GPUs. The network
has to be a fixed pipeline in FPGA fabric, and the scarce resource is the DSP
slice, the hard multiply-add block of the FPGA.

The central idea is **time multiplexing by a fixed factor C**. The fabric runs at
`f_FPGA = C * f_Data`, for example 16 x 40 MHz = 640 MHz. Every DSP slice does C
multiply-adds per event, one per clock cycle, and every layer finishes one event
every C cycles. A layer with M multiplications therefore needs about `M / C` DSP
slices:

* dense layer: `N_DSP ≈ N_inputs * N_neurons / C`
* convolution: `N_DSP ≈ V_out * A_kernel * N_channels_in / C`

Here `V_out` is the output height times width times filters, and `A_kernel` is the
kernel area. Events follow each other through the layers without stalls, so several
events are in flight at once.

The architecture follows the FPGA networks of C. Schmitt et al. (JINST 14 (2019)
P09014). Word lengths, handshakes, the parameter-load port and the internal timing
are this implementation's own choices. They are marked as such below.

## The network (`nn_top`)

```
rows ─► conv_layer ─► maxpool_layer ─► [conv_layer] ─► dense_layer ─► dense_layer ─► out_y
        (ReLU)        2x2               K2xK2xF2, ReLU   D1, ReLU       D2, linear
                                        (when CONV2)
```

The second convolution (`CONV2 = 1`) builds the other published architecture family:
conv → pool → conv → dense → dense. Its input is the whole pooled map, written into
its buffer memory in a single cycle. The layer then starts one cycle later.

The defaults build the smallest published example architecture:

* a 7 x 7 input
* one 2 x 2 convolution filter, which gives a 6 x 6 map
* 2 x 2 max pooling, which gives 3 x 3
* 10 neurons
* a 10-neuron linear output layer
* C = 16

That is 334 multiplications per event, on 48 DSP slices.

| parameter | default | meaning |
|---|---|---|
| `H, W, CIN` | 7, 7, 1 | input height, width, channels |
| `K, F` | 2, 1 | square kernel size, number of filters (K ≥ 2) |
| `C` | 16 | clock cycles per event (f_FPGA / f_Data) |
| `D1, D2` | 10, 10 | neurons of the hidden and the output dense layer |
| `Z` | 4 | DSP slices per pipeline in the dense layers |
| `CONV2, K2, F2` | 0, 2, 1 | second convolution after pooling: enable, kernel size, filters |

### Interface and timing

* **Input.** An event is written row by row. A *row* is the W pixels at one height
  `h` and one channel `c`. Put the row on `row_data`, set bit `h*CIN+c` of
  `row_we`, and it is stored the next cycle. After all rows are written, pulse
  `start`.
* **Buffering.** The start pulse copies the image into the convolution's working
  memories, so the rows of the next event can be written right away.
* **Start spacing.** Starts must be at least C cycles apart. An assertion in every
  layer's sequencer checks this.
* **Output.** `out_valid` is high for one cycle while `out_y` holds the D2
  outputs.
* **Latency.** The latency from `start` to `out_valid` is
  `(min(C, WO*F) + K*K*CIN + 2) + 1 + (min(C, D1) + Z + 3) + (min(C, D2) + Z + 3)`
  cycles, which is 47 cycles at the defaults (73 ns at 640 MHz). With `CONV2`
  set, the second convolution adds `1 + min(C, WO2*F2) + K2*K2*F + 2` cycles. The original
  implementation reports 56 cycles for this network. Its internal register stages
  are not published.
* **Parameters.** Weights and biases are written through `cfg` (type `cfg_t` in
  `nn_pkg`) before use. Each write sets `we`, then:
  * `layer`: 0 for the first convolution, 1 for the hidden dense layer, 2 for the
    output layer, 3 for the second convolution.
  * `row`: the neuron or filter.
  * `col`: the input or kernel tap. For a tap, `col = (ky*K + kx)*CIN + c`. Setting
    `col` to the number of inputs or taps selects the bias.
  * `data`: the value.
* **Layer hand-over.** Between layers there is no back-pressure. Each layer's
  "result multicast" raises a one-cycle valid with the complete output vector, and
  that valid is the next layer's start.

### Number format (`nn_pkg`)

* Values and weights are signed 16-bit fixed point with 8 fractional bits.
* Products are summed exactly in a 48-bit accumulator, the width of a DSP
  cascade.
* Biases enter the accumulator shifted up by 8 bits.
* At the end of each layer the accumulator is shifted right by 8 (truncation
  towards minus infinity), saturated to 16 bits, and clipped at zero where ReLU is
  used.
* The original work leaves the integer and fractional widths to a generator
  option. To change them, edit `DATA_W` and `FRAC_W` in `nn_pkg`.

## Dense layer: DSP pipelines reused over time

Every neuron of a dense layer needs every input. The layer therefore stores the
input vector once (`input_memory`) and keeps it fixed for the whole event. Only
the weights change from cycle to cycle.

A DSP **pipeline** (`dsp_pipeline`) is a chain of slices (`dsp_slice`, a registered
`p = a*w + pcin`). Slice k multiplies input k by its weight and adds the partial
sum handed down by slice k-1. With three slices and four neurons the schedule is:

| cycle | DSP0 | DSP1 | DSP2 | pipeline output |
|---|---|---|---|---|
| 1 | i0·w0,0 | – | – | |
| 2 | i0·w1,0 | i1·w0,1 + | – | |
| 3 | i0·w2,0 | i1·w1,1 + | i2·w0,2 + | o0 (next cycle) |
| 4 | i0·w3,0 | i1·w2,1 + | i2·w1,2 + | o1 |
| 5 | *next event* i0·w0,0 | i1·w3,1 + | i2·w2,2 + | o2 |
| 6 | i0·w1,0 | *next event* | i2·w3,2 + | o3 |

Slice k works on neuron j in cycle j + k. The pipeline therefore delays the
operands of slice k by k registers. The caller presents all operands of one neuron
in the same cycle, and a new neuron can enter every cycle. The next event can
start in slice 0 while slice 2 still finishes the previous one, so nothing has to
drain between events.

A pipeline as long as the input vector would take about `N_inputs` cycles of
latency. A **neuron unit** (`neuron_unit`) instead splits the inputs over
`P = ceil(NI/Z)` shorter pipelines of Z slices, which run side by side, and adds
their results in one final adder.

* Each slice has its own small weight memory (`weight_mem`) holding one word per
  neuron it serves. The read is registered.
* A bias memory feeds the cascade input of the first slice of pipeline 0.
* A unit serves up to C neurons, one per cycle.
* The layer instantiates `U = ceil(NN/C)` units, and unit u computes neurons
  `u*C .. u*C+C-1`.

`layer_ctrl` issues the step index (the neuron within the unit) for the C cycles
after each start. `result_multicast` places each accumulator at its position,
requantises it, and raises the layer's output valid after the last one.

* Latency: `min(C, NN) + Z + 3` cycles.
* DSP slices: `U * P * Z`.

## Convolution layer: slices, rows and row units

A direct convolution would need wide multiplexers to steer every pixel and every
weight to every multiplier. The layer instead organises the image in two units:

* a **row**: W values at one height and one channel, which is how the input is
  written;
* a **slice**: all channels and widths at one height, which is what a kernel row
  consumes. Element `w*CIN + c` of slice h is pixel (h, w, c).

Data moves through the layer in four stages:

1. `buffer_memory` collects rows and presents them as slices. When a convolution
   follows another layer, it instead takes the whole map in one write.
2. On `start`, the slices are copied into two `slice_memory` instances. These hold
   the image for the event while the buffer takes the next one.
   * The regular *long* memory holds slices `0 .. HO-1`, the top slice of each
     output row's window.
   * The regular *short* memory holds the `K-1` slices below them, which only the
     lower row units need.
3. One **row unit** (`row_unit`) per output row r reads slices `r .. r+K-1` and
   produces that whole output row: all WO columns and all F filters.
4. The result multicast assembles the `HO x WO x F` output map, stored in height,
   width, filter order.

A row unit reuses its input slices for every filter and its weights for every
column. It works through the `WO*F` outputs of its row in time, using `Q =
ceil(WO*F / C)` chains in parallel:

* Output `o = x*F + f` is computed by chain `o / C` in step `o mod C`.
* A chain is a `dsp_pipeline` with one slice per kernel tap (`K*K*CIN` slices).
* Each step, a multiplexer picks for each tap the pixel it sees at column x. The
  tap's weight memory supplies the weight of filter f, and the filter's bias enters
  the cascade.

Latency is `min(C, WO*F) + K*K*CIN + 2` cycles. The layer uses `HO * Q * K*K*CIN`
DSP slices.

This is the *regular* case: each row unit needs only whole slices from the long and
short memories. The published design also has an irregular data path for other
layer shapes (an irregular memory with an offset stage, concatenation
multiplexers, and single-, bi- and multi-slice row units). Its behaviour is not
specified in enough detail to implement here, so it is not included.

## Max pooling

`maxpool_layer` takes the maximum of each P x P window per channel, with stride P;
a remainder row or column is dropped. It uses a comparator tree and one register
stage, so it needs no DSPs and no time multiplexing, and has a latency of one
cycle.

## Files

| file | contents |
|---|---|
| `rtl/nn_pkg.sv` | formats, `cfg_t`, requantisation |
| `rtl/dsp_slice.sv`, `rtl/dsp_pipeline.sv` | DSP slice model, skewed DSP chain |
| `rtl/weight_mem.sv`, `rtl/input_memory.sv`, `rtl/layer_ctrl.sv` | weight store, input hold register, step sequencer |
| `rtl/neuron_unit.sv`, `rtl/dense_layer.sv` | dense layer |
| `rtl/buffer_memory.sv`, `rtl/slice_memory.sv`, `rtl/row_unit.sv`, `rtl/conv_layer.sv` | convolution layer |
| `rtl/maxpool_layer.sv`, `rtl/result_multicast.sv` | pooling, result collection |
| `rtl/nn_top.sv` | the network |
| `tb/nn_ref_pkg.sv` | integer reference model of all layers |
| `tb/nn_top_check.sv` | parameterised network harness used by the network-level tests |
| `tb/tb_*.sv` | one self-checking testbench per module, plus network-level tests |

## Verification

Every module has a self-checking testbench with random stimulus, compared against
values computed independently in the testbench. The layer and network testbenches
use `tb/nn_ref_pkg.sv`, a plain loop-nest model with the same rounding. Every
testbench also checks the latencies quoted above cycle by cycle.

* `tb_nn_top` runs the default network on 40 events. Most follow each other at the
  full rate of one per C cycles, some come after gaps, and some are large enough to
  saturate.
* `tb_nn_top_multi` runs a configuration in which every layer must split its work:
  three chains per row unit, three neuron units, two input channels, and the second
  convolution.
* `tb_nn_workloads` runs two larger published architectures:
  * 7x7 input, 2x2x3 convolution, 16 + 10 neurons, C = 14;
  * 14x14 input, 3x3x4 convolution, 50 + 10 neurons, C = 11.

  The published two-convolution example (14x14 input, 3x3x6 convolution, pooling,
  3x3x6 convolution, 25 + 10 neurons, C = 10; about 1,800 DSP slices) is too large
  to simulate here in reasonable time. Its topology is covered at a smaller size by
  `tb_nn_top_multi`.

Each network test counts that events overlapped in the pipeline, that full-rate
starts and idle gaps both occurred, and that ReLU clipping and saturation
happened.

To simulate with Verilator 5, list the package files first, then search `rtl/` and
`tb/` for the other modules:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/nn_pkg.sv tb/nn_ref_pkg.sv tb/tb_nn_top.sv --top-module tb_nn_top
./obj_dir/Vtb_nn_top
```

Each testbench ends with `TB_RESULT checks=N failures=M`. Testbenches release reset
with a falling edge at time 1, because all control registers use an asynchronous
active-low reset.

## Limits and departures

* **Topology.** Two topologies are built: conv → pool → dense → dense, and, with
  `CONV2`, conv → pool → conv → dense → dense. Other layer orders need a different
  top level.
* **Inferred sizes.** The 10-neuron output layer, the absence of a second pooling
  stage, and the 14 x 14 input of the larger examples are all inferred from the
  published multiplication counts. For example, 6·6·4 + 9·10 + 10·10 = 334, and
  12·12·6·9 + 4·4·6·54 + 96·25 + 25·10 = 15,610.
* **Biases.** The source does not mention biases. Here they enter through the first
  DSP's cascade input.
* **Parameter loading.** The original generator bakes weights into memory
  initialisation files. This design loads them at run time through `cfg`, so one
  bitstream can serve retrained networks. The weight memories are not reset and
  must be loaded before the first event.
* **Pipelining.** One register per DSP slice, a registered weight read and one
  register per adder. Real UltraScale+ DSP slices have further internal registers;
  at 400–700 MHz a synthesis flow would need those pipeline stages, which changes
  the latencies above.
* **Timing.** Clock frequency, placement and timing closure (the original reaches
  at least 400 MHz for layers of about 10k multiplications) are properties of the
  FPGA implementation and are not addressed by this RTL.
