# Stochastic quantized RBM classifier with SUC-Adders

This is synthesizable SystemVerilog for a neural-network classifier that
computes with random bit-streams rather than binary numbers. It is built
around one trick: the weights are quantized to a few levels, and each weight
becomes a bit-stream whose ones sit in one contiguous window. Two products
whose windows do not overlap can then be added with a single OR gate, with
no loss of accuracy. That adder is the *shifted unary code adder*
(SUC-Adder). It replaces most inputs of the parallel counters that
dominate the cost of earlier stochastic neurons.

The default configuration is an RBM classifier for 28x28 MNIST digits,
784-500-1000-10. It uses 32-cycle bit-streams and 2-bit weights. One image
takes 35 clock cycles. The architecture follows the one published as
"Quantized Neural Networks with New Stochastic Multipliers". The interface,
the sequencing and several encodings are choices made here; they are listed
in [Departures and choices](#departures-and-choices).

## Stochastic numbers in this design

All streams are *unipolar*: a value v in [0, 1] is a stream in which a
fraction v of the bits are 1. A stream period is `L = 2**BITLEN_LOG2`
cycles (32 by default).

* **Multiplication** of two independent streams is an AND gate.
* **Pixels** are turned into streams by an `sng`, an LFSR plus a comparator.
  The output is 1 while the LFSR state is at most the pixel's top
  `BITLEN_LOG2` bits.
* **Weights** are quantized to `QBITS` bits. Their magnitude is `l/LV` with
  `LV = 2**QBITS` and level `l` in 0..LV, plus a sign. For 2-bit weights the
  magnitudes are 0, 1/4, 1/2, 3/4 and 1. A weight is not a random stream but
  a *shifted unary* stream: `l` contiguous *units* of ones, one unit being
  `L/LV` cycles (8 cycles here), starting at some unit offset `o`.

ANDing an input stream with such a weight keeps `l` units of the input and
zeroes the rest. On average that is `x * l/LV`, the product.

## The SUC-Adder

Take four products with weight 1/4, each window one unit long, at offsets
0, 1, 2 and 3. Their ones never coincide, so an OR of the four products is
their exact sum: the output is input a during unit 0, b during unit 1, and
so on. Over a period it encodes `(a+b+c+d)/4`. It costs four ANDs and three
ORs.

The same holds for any set of products whose windows are disjoint and whose
levels add up to at most `LV`. With 2-bit weights the adder can hold 3+1,
2+2, 2+1+1, 1+1+1+1 or a single 4. `suc_adder` is that circuit: K AND gates
and one K-input OR. In a neuron every adder has `LV` slots, one per unit, and
a product sits in the slot where its window starts. A plain OR adder
without this windowing loses accuracy to overlapping ones. In
`tb/tb_suc_mae.sv` its error grows to 8-16 %, while the SUC-Adder's stays
near the quantization noise of a window.

### Weight stream generators

The windows come from `qweight_gen`. Its WIDTH-bit counter counts up once
per cycle and is loaded with `-PHASE` at reset. A comparator gives
`count < LEN`, so the output is `LEN` ones starting `PHASE` cycles into every
period. Level `l` needs `floor(LV/l)` phases (offsets 0, l, 2l, ...). The
whole network therefore needs `sum_{l=1..LV} floor(LV/l)` streams: 8 for
2-bit weights (4 + 2 + 1 + 1). `qweight_bank` instantiates them once, and
all neurons of all layers share them. Bank index order is level 1 phases
0..3, level 2 phases 0 and 2, then level 3, then level 4
(`sc_pkg::gen_index`).

### Packing products into adders (`sc_pkg::pack_groups`)

The weights are constants, so the adder grouping of each neuron is fixed
when the design is elaborated. This is the least obvious part of the RTL.
For each polarity (positive and negative weights separately):

1. Take the non-zero weights by level, largest first.
2. Put each into the open adder with the *least* free space that still holds
   it at an offset that is a multiple of its level. Open adders are kept in
   lists by free space.
3. If none fits, open a new adder at offset 0.

For 2-bit weights this gives the minimum number of adders. The 3s take the
1s into their last unit, the 2s pair up, and the 1s fill what is left. The
aligned offsets keep the stream count at the formula above. The result is
one 32-bit entry per input: used, sign, adder index, offset and bank index
(`sc_pkg::asg_t`). It also gives the number of positive and negative adders
(entries `ASG_NPOS`, `ASG_NNEG`), which sizes the neuron's hardware. The
function is linear in the fan-in. Elaboration still takes minutes at full
size (see [Tool run times](#tool-run-times)).

## The neuron (`sc_neuron`)

```
x[i] --AND w(level_i, off_i)--+
        ...                   +-- suc_adder (OR) --+
                                                   +-- par_counter --+ + bias+ --+
                                         ...       +                           |
negative weights: same, into their own adders ----- par_counter -- + bias- -- (-)
                                                                             |
                                                 acc = pos - neg  (signed, per cycle)
                                                                             |
                                      y <= (acc + 2 > r),  r = 2 LFSR bits (0..3)
```

* Each cycle, `acc` is the positive count minus the negative count. Over a
  period its mean is `A*x + B`, in weight units where a level-LV weight
  is 1.
* **Bias.** `BIAS_POS` and `BIAS_NEG` are constants in units of `1/L`. The
  integer part is added to the count every cycle. The fraction `f` becomes a
  deterministic stream that is 1 when the *bit-reversed* cycle count is below
  `f`, which spreads its ones evenly over the period.
* **Activation.** The RBM uses a sigmoid, approximated by its first Taylor
  terms as `(x+2)/4`, clipped to [0, 1]. The output bit is `acc + 2 > r`,
  with `r` uniform in 0..3 from the neuron's own 8-bit LFSR. This gives
  `P(y=1) = clamp((acc+2)/4, 0, 1)` with no extra arithmetic.
* `y` is registered. `acc` is brought out for observation; the layers leave
  it open.

## The classifier (`qsnn_rbm`)

```
pixels[784] -> sng x784 -> sc_layer 0 (500) -> sc_layer 1 (1000) -> sc_layer 2 (10) -> out_decoder
                              ^                  ^                   ^
                              +---- qweight_bank (8 streams, tcnt) --+
```

Protocol:

1. Hold `pixels` and pulse `start` for one cycle while `busy` is low.
2. The start edge reloads every LFSR and weight generator and clears the
   output counters. Every image therefore sees the same random sequence,
   and results are repeatable.
3. The network runs `L + 3` cycles (35). The three layer registers fill in 3
   cycles. The ten output streams are then counted over the next `L` cycles.
4. `done` pulses on the cycle after the last count. `counts[k]` (0..L) and
   `class_id` (largest count, lowest index on a tie) stay valid until the
   next start. A new start is accepted on the `done` cycle itself, so the
   throughput is one image per 35 cycles. `start` while busy is ignored.

Layer k receives a stream one register later than layer k-1, while all
layers see the same weight-window timing. This shifts which part of an input
stream a window samples, not the expected value.

### Weights

Trained weights are not part of this RTL. `sc_pkg::weight_level(layer, j, i, lv)`
and `sc_pkg::bias_units(layer, j, neg, bitlen_log2)` give placeholder values
from a deterministic hash. About half the weights are zero and small levels
dominate, roughly like a retrained quantized network.
About a quarter of the biases are zero; otherwise only one of `BIAS_POS` and
`BIAS_NEG` is non-zero. To build a real classifier, replace the bodies of these two
functions with a lookup of the retrained values. Weights are signed levels in
`-2**QBITS..2**QBITS`; biases are multiples of `1/L`, below 2.0 per part by
default, though any value works. The neuron grouping, the adder count and the
hardware follow automatically. The classifier's accuracy with real
weights has not been measured here.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `qsnn_rbm` | `N_IN`, `N_H1`, `N_H2`, `N_OUT` | 784, 500, 1000, 10 | layer sizes |
| all | `BITLEN_LOG2` | 5 | stream length `L = 2**BITLEN_LOG2` |
| all | `QBITS` | 2 | weight quantization; `BITLEN_LOG2 >= QBITS`, `QBITS <= 4` |
| `qsnn_rbm` | `PIX_W` | 8 | pixel width; the SNG uses the top `BITLEN_LOG2` bits |
| `sc_neuron`, `sc_layer` | `RND_W` | 8 | comparator LFSR width |
| `sc_neuron` | `W`, `BIAS_POS`, `BIAS_NEG`, `SEED` | placeholder | per-neuron constants |

Limits of the elaboration functions: fan-in at most 1024 (`MAX_FANIN`), at
most 16384 adders per polarity, and LFSR widths 2..16.

## Files

| File | Contents |
|---|---|
| `rtl/sc_pkg.sv` | constants, packing function, placeholder weights, LFSR taps |
| `rtl/lfsr.sv` | Fibonacci LFSR |
| `rtl/sng.sv` | pixel stochastic number generator |
| `rtl/qweight_gen.sv` | one shifted unary weight generator |
| `rtl/qweight_bank.sv` | all weight streams of the network |
| `rtl/suc_adder.sv` | AND multipliers + OR adder |
| `rtl/par_counter.sv` | parallel (pop) counter |
| `rtl/sc_neuron.sv` | neuron |
| `rtl/sc_layer.sv` | fully connected layer |
| `rtl/out_decoder.sv` | output counters and arg-max |
| `rtl/qsnn_rbm.sv` | top: the classifier |
| `tb/tb_ref_pkg.sv` | cycle-level reference models for the testbenches |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_suc_mae.sv` | SUC-Adder vs. OR adder accuracy, 4 and 8 inputs, lengths 16-128 |

## Verification

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. The reference models in `tb/tb_ref_pkg.sv`
do not share datapath code with the RTL. They have their own LFSR
polynomials and their own window and bias formulas. Only the configuration
comes from `sc_pkg`: weights, seeds and the packing result.

* `tb_sng`: exact count of ones over one LFSR period, bit by bit.
* `tb_qweight_gen`, `tb_qweight_bank`: window position of every stream,
  interleaving, and holding while `en` is low.
* `tb_suc_adder`: all input combinations, plus the four-term example.
* `tb_sc_neuron`: 12 inputs with all levels of both signs and a bias. With
  static inputs, the sum of `acc` over a period must equal
  `8*sum(level*x) + bias`, whatever the grouping. With random streams,
  `acc` and `y` are checked bit-exact every cycle. The density of `y` must
  follow `clamp((acc+2)/4)`. An assertion checks that no adder ever sees
  two weight windows at once.
* `tb_sc_layer`: six neurons bit-exact against the reference.
* `tb_qsnn_rbm`: the whole classifier at 24-12-10-4. Counts and class are
  checked bit-exact against a network reference for 12 images. Also checked:
  the 35-cycle latency, `busy`, a start while busy, and back-to-back images.
  The test counts, and requires, shared adders, negative products, bias
  bits, and all three comparator regions (saturated high, saturated low,
  linear).
* `tb_suc_mae`: mean absolute error of `(a+b+c+d)/4` and `(a+..+h)/8` over
  400 random input sets per length:

| Inputs, length | 16 | 32 | 64 | 128 |
|---|---|---|---|---|
| 4, SUC-Adder | 7.41 % | 3.85 % | 3.19 % | 4.40 % |
| 4, OR adder, separate LFSRs | 7.47 % | 5.08 % | 9.25 % | 12.22 % |
| 8, SUC-Adder | 6.62 % | 3.86 % | 5.60 % | 1.95 % |
| 8, OR adder, separate LFSRs | 16.13 % | 5.20 % | 7.85 % | 12.37 % |

The published values for the SUC-Adder are 7.74/5.17/3.61/2.50 % (4
inputs) and 8.16/5.60/3.88/2.69 % (8 inputs). The testbench accepts a factor
of two either way. The values here are not monotonic in length. With one
fixed seed per LFSR, a window of the sequence has a fixed bias that changes
with the length. Averaging over many seeds would smooth this.

For each module there is also a deliberately broken copy, and each
testbench fails against it.

The full 784-500-1000-10 network has not been simulated; the largest size
simulated is the end-to-end test above. Building a cycle simulator of the
full network means compiling roughly 450 k product gates and 230 k adders
into one model, which takes well beyond ten minutes.

### Running a testbench

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/sc_pkg.sv tb/tb_ref_pkg.sv tb/tb_sc_neuron.sv --top-module tb_sc_neuron
./obj_dir/Vtb_sc_neuron
```

Replace `sc_neuron` with any other module name, or use `tb_suc_mae`.

## Tool run times

At full size the elaborators must evaluate the packing function for 1510
neurons and build roughly 230 k SUC-Adder instances. Measured on one core:

| Size (`N_H1`-`N_H2`) | `verilator --lint-only -Wall` | slang elaboration (yosys `read_slang`) |
|---|---|---|
| 50-100 | 56 s, 0.7 GB | 24 s, 0.2 GB |
| 500-1000 (default) | 23.5 min, 8.3 GB | 7.2 min, 2.8 GB |

The run time grows about linearly with the number of products. Most of it
is spent building the adder instances, not in the packing function.

## Departures and choices

These points are not fixed by the published architecture and were decided
here:

* **Weight values** are placeholders (see [Weights](#weights)).
* **Quantization**: 2-bit weights, the architecture's worked example. 3- and
  4-bit weights are a parameter change.
* **Packing algorithm**: largest-first best fit with aligned offsets. The
  published text asks only for "as many products as possible per adder".
* **Bias encoding**: integer part added as a constant, fraction as a
  bit-reversed-counter stream. The architecture feeds each bias into its
  parallel counter as extra constant inputs; adding it after the counter
  gives the same sum with a narrower counter.
* **Comparator randomness**: one 8-bit LFSR per neuron, low two bits.
* **Pixel SNGs**: one `BITLEN_LOG2`-bit LFSR per pixel, with per-pixel seeds.
  The LFSR period is `L-1`, so over `L` cycles one state is seen twice.
* **Pipelining**: one register per neuron output.
* **Interface**: start/busy/done, pixels held by the caller, output
  counters and arg-max. Reset is asynchronous and active low. `start`
  restarts all random sources, so identical images give identical results.
* **Weight magnitude** is at most 1 (level `2**QBITS`), as in the quantized
  value set of the architecture; a trained network whose weights exceed 1
  would need rescaling.
