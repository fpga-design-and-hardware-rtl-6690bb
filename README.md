# A small 1-D CNN accelerator for classifying saccadic eye movements

Electro-oculography records the weak potentials the eyes produce while they
follow a jumping target. Each such saccade record, 192 samples long, is to be
sorted into one of three classes (healthy, presymptomatic, sick) as part of
screening for spinocerebellar ataxia type 2. A small convolutional neural
network does the classification, and it runs on a processor-plus-FPGA chip
so that the device can be carried into a clinic.

This RTL is the programmable-logic half of that system. The processor (two
ARM cores on the same chip, not part of this RTL) does three things over an
AXI4-Lite bus:

* it loads the trained weights into eight on-chip memories;
* it writes the 192 samples and starts the network;
* when the network signals DONE, it reads back the three class scores, their
  softmax values and the winning class.

The network structure and its sizes, the memory arrangement and the
start/done protocol follow a published design. The arithmetic, the bus
details and the way each layer is sequenced are this implementation's own.
They are listed under "Departures" below.

## The network

| step | operation | result |
|---|---|---|
| input | 192 samples | 1 x 192 |
| pad | 9 zeros at each end | 1 x 210 |
| conv 1 | 10 filters, 19 taps, bias, ReLU | 10 x 192 |
| pool 1 | max of each pair | 10 x 96 |
| pad | 4 zeros at each end, every channel | 10 x 104 |
| conv 2 | 10 filters, 10 channels x 9 taps, bias, ReLU | 10 x 96 |
| pool 2 | max of each pair | 10 x 48 |
| flatten | channel-major, index c*48 + t | 480 |
| FC 3 | 60 neurons, bias, ReLU | 60 |
| FC 4 | 3 neurons, bias | 3 scores |
| softmax | over the 3 scores, plus argmax | 3 probabilities, class |

The two convolutions compute `y[f][p] = ReLU(b[f] + sum_c sum_k w[f][c][k] * x[c][p+k])`
over the padded input. This is the correlation form that common training
frameworks use, so trained kernels load as they are, without flipping.

## Number format

All activations, weights and biases are signed 16-bit fixed point with 8
fraction bits (Q8.8: 256 = 1.0, range -128 to +127.996). Products are summed
at full precision in 40-bit accumulators. The bias, shifted up by 8 bits, is
added to the sum. The result is then shifted right by 8 (rounding toward
minus infinity) and saturated to 16 bits (`cnn_pkg::requant`). So every layer
output is exact up to that final rounding: there is no intermediate
overflow. Softmax values are unsigned Q1.15 (32768 = 1.0).

Weights trained in floating point must be converted to Q8.8, i.e.
`round(w * 256)`, clipped to 16 bits, before they are loaded.

## How the CNN block computes (`cnn_core`)

The block runs one inference as a fixed sequence of phases. Each phase works
at one item per clock cycle, and the work inside an item is fully parallel.

1. **LOAD** (902 cycles). Four `distribute` units copy the weights and biases
   of both convolutions from their memories into registers, one element per
   cycle, all four at once. The 900 layer-2 weights set the duration. At the
   same time the 192 samples are streamed into the zero-padded layer-1
   buffer (`pad_buffer`). The copy is needed because a convolution step uses
   every weight of every filter in the same cycle, which a memory port cannot
   deliver.
2. **CONV1** (195 cycles). `conv1d_bank` steps through the 192 output
   positions, one per cycle. For each position it forms all 10 x 19 products
   at once (pipeline stage 1). It then adds them up with the bias,
   requantises and applies ReLU (stage 2). The output stream passes through
   `maxpool2`, which holds every even position and sends out the larger of
   each pair. The pooled values go straight into the zero-padded layer-2
   buffer.
3. **CONV2** (99 cycles). The same unit, sized 10 filters x 10 channels x 9
   taps (900 products per cycle), steps through 96 positions. After pooling,
   the 10 x 48 results land in a feature buffer.
4. **FC3** (483 cycles). `flatten_stream` sends the 480 features one per
   cycle in channel-major order. For input i, `fc_layer` reads row i of the
   layer-3 weight memory: one wide word holding that input's weight for all
   60 neurons. It then updates all 60 accumulators in the same cycle. Two
   cycles after the last input, bias and ReLU are applied.
5. **FC4** (63 cycles). The same scheme handles 60 inputs and 3 neurons,
   with no ReLU.
6. **SOFTMAX** (50 cycles). Let m be the largest score. The unit evaluates
   exp(z - m) as a power of two: a 32-entry table of 2^(k/32) followed by a
   shift. The sum of the three terms then divides each term, using a
   restoring divider that produces one quotient bit per cycle.

One inference takes **1,794 cycles** from `start` to `done`: 17.9 us at
100 MHz. The layers use 190 + 900 multipliers in the convolutions and
60 + 3 in the fully connected layers.

The phases do not overlap. The FC3 and FC4 weights are never copied: they are
streamed from their memories while being used. This is why those memories
have a second port one row wide (`weight_ram` port B).

## The system around it (`cnn_system`)

```
 processor ──AXI4-Lite──> axil_interconnect ──┬─> cnn_axil_regs ──start/x──> cnn_core ──> scores
                                              ├─> axil_bram_ctrl ─> weight_ram (W1) ─port B─┘
                                              ├─> ...             (B1, W2, B2, W3, B3, W4)
                                              └─> axil_bram_ctrl ─> weight_ram (B4)
```

Each weight and bias array has its own dual-port memory. The processor reaches
port A through an AXI RAM controller, and the CNN block reads port B. So the
CNN can read all eight memories in parallel, and the processor can reload any
of them between runs. Do not write them while the CNN is busy.

The interconnect selects a slave with address bits [21:18]. Higher bits are
ignored, so any base address works. Every memory holds one 16-bit element per
32-bit word, at byte offset 4 x element index.

| slave | contents | elements | element index |
|---|---|---|---|
| 0 | CNN registers | | see below |
| 1 | conv 1 weights | 190 | f*19 + k |
| 2 | conv 1 biases | 10 | f |
| 3 | conv 2 weights | 900 | (f*10 + c)*9 + k |
| 4 | conv 2 biases | 10 | f |
| 5 | FC 3 weights | 28,800 | i*60 + n (input i, neuron n) |
| 6 | FC 3 biases | 60 | n |
| 7 | FC 4 weights | 180 | i*3 + n |
| 8 | FC 4 biases | 3 | n |

CNN registers (byte offsets in slave 0):

| offset | access | meaning |
|---|---|---|
| 0x000 | W | bit 0 = 1 starts an inference; ignored while busy |
| 0x000 | R | bit 0 busy, bit 1 done, bit 2 idle |
| 0x004 | R | class (index of the largest score) |
| 0x010, 0x014, 0x018 | R | scores, Q8.8, sign-extended |
| 0x020, 0x024, 0x028 | R | softmax values, Q1.15 |
| 0x400 + 4i | R/W | input sample i, i < 192, Q8.8 |

The done bit, and the `irq` output that mirrors it, is set at the end of a
run and cleared by the next start. Results stay readable until the next run
ends.

A run from the processor's side:

1. Write the eight memories. Once is enough for many runs.
2. Write the 192 samples.
3. Write 1 to CTRL.
4. Poll CTRL bit 1, or wait for `irq`.
5. Read CLASS, the scores and the softmax values.

Bus behaviour: AXI4-Lite with one transaction in flight per direction. The
interconnect answers unmapped slaves (9 to 15) with DECERR. The RAM
controllers answer addresses past the end of their memory with SLVERR. Write
strobes are ignored. Reset is synchronous and active low on `rst_n`.
Assertions check that a VALID stays high until it is accepted.

## Departures from the published design

* **Arithmetic.** The published block was produced by high-level synthesis,
  and its number format is not stated. Here it is Q8.8, as described above.
  Results of the published block and of this one will differ in the low
  bits.
* **Pipeline depth and overlap.** The published convolutions have the same
  initiation interval of one position per cycle. Their pipeline latencies are
  21 and 11 cycles, and their layers run as overlapping dataflow tasks. Here
  each convolution is two stages deep and the phases run one after another.
  The published block needed 79 us per inference; this one needs 1,794
  cycles.
* **Replication.** The published data flow replicates the padded input once
  per filter. Here all filters read one shared buffer.
* **Weight copy.** The "distribute" step is built as a plain sequential copy.
  It takes half of the inference time and could overlap with earlier
  inferences.
* **Softmax.** The published network ends in a softmax, but its hardware form
  is not described. The approximation here is within 2% of full scale of the
  exact value. The class output does not depend on it.
* **Bus fabric.** The published system uses the FPGA vendor's AXI
  interconnect, AXI BRAM controllers and reset block. `axil_interconnect` and
  `axil_bram_ctrl` are small functional replacements. The reset block is
  left out.
* **Layer-1 bias count.** The published figure labels the layer-1 bias
  memory with 19 entries in one place and 10 in another. There is one bias
  per filter, so 10 are used.

Not provided: the trained weights and the clinical data set. The design
accepts any weights of the network's shape.

## Files

| file | content |
|---|---|
| `rtl/cnn_pkg.sv` | number format, sizes, AXI4-Lite structs, address map |
| `rtl/cnn_system.sv` | top level: interconnect, register block, eight memories and controllers, CNN block |
| `rtl/cnn_core.sv` | the CNN block and its phase sequencer |
| `rtl/conv1d_bank.sv` | parallel convolution filters with bias and ReLU |
| `rtl/maxpool2.sv` | pair-wise max on a stream |
| `rtl/pad_buffer.sv` | zero-padded feature buffer |
| `rtl/distribute.sv` | memory-to-register copy |
| `rtl/flatten_stream.sv` | array-to-stream serialiser |
| `rtl/fc_layer.sv` | input-serial, neuron-parallel fully connected layer |
| `rtl/softmax.sv` | softmax and argmax |
| `rtl/cnn_axil_regs.sv` | CNN control/data registers on AXI4-Lite |
| `rtl/axil_interconnect.sv` | 1-to-N AXI4-Lite address decoder |
| `rtl/axil_bram_ctrl.sv` | AXI4-Lite to memory-port bridge |
| `rtl/weight_ram.sv` | dual-port memory, element port and row port |
| `tb/cnn_ref_pkg.sv` | bit-exact reference model of the network, plus random network generation |
| `tb/axil_bfm.svh` | AXI4-Lite master tasks |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, the full system at its real sizes:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb -I. -Irtl \
    --top-module tb_cnn_system rtl/cnn_pkg.sv tb/cnn_ref_pkg.sv tb/tb_cnn_system.sv
./obj_dir/Vtb_cnn_system
```

Run it from the folder that holds `rtl/` and `tb/`: the testbenches include
`tb/axil_bfm.svh` by that path. For any other unit, use
`--top-module tb_<module>` with `tb/tb_<module>.sv`. Add `tb/cnn_ref_pkg.sv`
for the testbenches that import it.

`tb_cnn_system` loads four random networks over the bus (about 30,000 writes
each), runs them, and compares the scores bit for bit with the reference
model. It needs about a minute to build and a few seconds to run. It also
counts the design's mechanisms and fails if any of them never happened:

* ReLU clipping in each ReLU layer;
* pooling that picks the second element of a pair;
* layer-1 saturation;
* a start ignored while busy;
* a poll that found the block busy;
* the interrupt;
* DECERR and SLVERR responses;
* more than one class.

`tb_cnn_core` checks the exact cycle count of an inference.

## Changing it

The network sizes are parameters of `cnn_core`, with defaults from `cnn_pkg`.
`cnn_system` uses the package constants directly, so change sizes there. The
number format is `DW`/`FRAC`/`ACC_W` in `cnn_pkg`. The softmax table assumes
`FRAC` = 8 only through the shift in its exponent scaling.

The cost of the convolutions grows as filters x channels x taps multipliers
per layer. To trade speed for area, time-multiplex filters in `conv1d_bank`.
Keep its streaming interface of one output position per beat, so that
`maxpool2` and the sequencer stay unchanged.
