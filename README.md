# Face-recognition neural network with CSD coefficients

This is a hardware classifier for faces. It takes a 39-element feature vector
of a face image, made earlier by PCA or PCA+LDA, and runs it through a
two-layer feed-forward neural network. The network has 39 inputs, 28 hidden
neurons and 6 output neurons, all using a hyperbolic-tangent ("tansig")
activation.

The main idea is how the weights are stored and multiplied. Each weight is kept
in **canonical signed digit (CSD)** form: every digit is -1, 0 or +1, and no two
neighbouring digits are nonzero. An 18-digit CSD weight therefore has at most 9
nonzero digits. A multiplication by it takes at most 9 shift-and-add/subtract
steps, where a plain binary weight takes 18. The network can also be made
cheaper by dropping the least significant nonzero digits of every weight. This
costs a little accuracy.

All arithmetic is integer. Inputs, weights and activation outputs are real
values multiplied by 10000 and rounded.

## Dataflow

```
            load, data_in (one feature element per cycle)
                 |
   +-------------v--------------+        +---------------------------+
   | hidden_layer (Layer 1)     |  D_out | output_layer (Layer 2)    |
   |  N_HID x hidden_neuron     |------->|  N_OUT x output_neuron    |--> data_out[6]
   |  each: 2 weight_rom + bias |  28x18 |  each: weight_bank + bias |    out_valid
   +----------------------------+        +---------------------------+
                 ^                                   ^
                 |      csd_converter (weight -> CSD masks, digit drop)
   cfg_* --------+-----------------------------------+
```

* **Layer 1 is serial in its inputs and parallel across neurons.** Every
  feature element goes to all hidden neurons in the same cycle. Each neuron
  multiplies the element by its own weight for that input position and adds the
  product to an accumulator. A counter inside each neuron selects the weight.
  With the 39th element, the neuron adds the bias, passes the sum through the
  tansig table and registers the result. All hidden outputs appear together.
* **Layer 2 is fully parallel.** Each output neuron has one CSD multiplier per
  hidden output, so it has 28 multipliers. An adder tree sums the products and
  the bias, and tansig gives the output. This takes one clock.

## Number formats

| quantity | stored as | scale | width |
|---|---|---|---|
| feature element, hidden output, network output | two's complement | x 10000 | 18 bit |
| weight | CSD masks `pos`, `neg` (value = pos - neg) | x 10000 | 18 digits |
| product | two's complement | x 1e8 | 36 bit |
| hidden accumulator | two's complement | x 1e8 | 42 bit |
| bias | two's complement | x 1e8 | 32 bit |
| tansig input | sum saturated to 32 bits | x 1e8 | 32 bit |

A product of two x10000 values carries a scale of 1e8. The biases are therefore
supplied at that scale, so they can be added directly to sums of products.
Feature vectors are normalised to [0, 1], so inputs lie in 0..10000. Tansig
outputs lie in -10000..10000. Both fit easily in 18 bits.

## CSD coefficients

`csd_converter` recodes a two's complement weight with Reitwiesner's
right-to-left method. It moves from the LSB with a carry `c` (starting at 0):

* digit i is nonzero when `b[i] xor c[i]` is 1
* the next carry is `c[i+1] = b[i]&c[i] | b[i+1]&(b[i]|c[i])`
* a nonzero digit that produces a carry is -1; otherwise it is +1

The word is sign-extended (`b[18] = b[17]`). As a result, every 18-bit signed
weight fits in 18 CSD digits. For example, 478 = `0111011110` becomes
+2^9 - 2^5 - 2^1, which is three nonzero digits instead of seven.

**Digit drop (`NZ_DROP`).** "Reducing the coefficients by N nonzero elements"
means removing the N least significant nonzero digits of every weight:

| weight | drop 1 | drop 2 | drop 3 | drop 4 |
|---|---|---|---|---|
| 22355 | 22356 | 22352 | 22336 | 22272 |
| -7381 | -7380 | -7376 | -7360 | -7424 |
| 8064 | 8192 | 0 | 0 | 0 |

`tb_csd_converter` checks these rows, and a few more, exactly. In the
reference evaluation, dropping one digit left the recognition rate unchanged, and dropping four cost about 15 percentage points of it. The default is `NZ_DROP = 1`.

The masks are stored as two words per weight: `pos` has a 1 at every +1 digit
and `neg` at every -1 digit. In each hidden neuron these are two separate
39 x 18 ROMs (`weight_rom`). In each output neuron they form a 28-word store
that is read all at once (`weight_bank`).

## The CSD multiplier

`csd_multiplier` is the core of the design, and it has no registers. It reads
the coefficient **two digits at a time**. Because the form is canonical, a pair
of digits holds at most one nonzero digit. Each pair therefore costs one
adder/subtractor:

1. `shift1` is the multiplicand sign-extended to 36 bits, and `shift2 = shift1 << 1`.
2. Pair 0 gives the start value `din`:
   * +/- `shift1` if digit 0 is nonzero
   * +/- `shift2` if digit 1 is nonzero
   * otherwise 0
3. Each of the next 8 stages shifts `shift1`/`shift2` left by 2 and adds or
   subtracts one of them, depending on which digit of its pair is nonzero and
   its sign.
4. The ninth running sum is the 36-bit product.

The multiplier gives a wrong product for masks that are not canonical:
adjacent nonzero digits, or a digit set in both masks. Masks that come through
`csd_converter` are always canonical, and an assertion in `csd_nn_top` checks
every coefficient written.

## Activation function

`tansig_lut` is a table of uniformly spaced samples. It works in four steps:

1. It takes the magnitude of the 32-bit sum.
2. It shifts the magnitude right by 20 to form the table address. One step is
   2^20 / 1e8 = 0.0105 in real units.
3. It reads `round(10000 * tanh(x))` at the midpoint of that step.
4. It applies the sign of the sum to the result.

The table has 1024 entries, which covers |x| < 10.7. Larger inputs read the
last entry, because tanh has already reached 10000 there. The table is
computed during elaboration from `$tanh`. Every neuron has its own copy
(34 x 1024 x 18 bits at the default sizes).

## Interface and timing (`csd_nn_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `load`, `data_in` | in | 1, 18 | one feature element per cycle with `load` high |
| `cfg_we` | in | 1 | configuration write |
| `cfg_sel` | in | 2 | `CFG_HID_WEIGHT`, `CFG_HID_BIAS`, `CFG_OUT_WEIGHT`, `CFG_OUT_BIAS` |
| `cfg_neuron`, `cfg_addr` | in | 5, 6 | neuron, and input position of the weight |
| `cfg_weight` | in | 18 | weight x 10000, two's complement (recoded on chip) |
| `cfg_bias` | in | 32 | bias x 1e8 |
| `data_out[6]`, `out_valid` | out | 18, 1 | network outputs x 10000 |

* **Loading.** Load the configuration one word per clock before use. That is
  28x39 + 28 hidden writes and 6x28 + 6 output writes. Reset clears the biases,
  the counters and the accumulators, but not the weight stores.
* **Streaming.** A vector is the next 39 elements presented with `load`. Idle
  cycles inside or between vectors are allowed.
* **Latency.** If the last element is presented in clock cycle c, the
  hidden outputs are valid in cycle c+1 and `out_valid` is high, with the
  results, in **cycle c+2**.
* **Throughput.** A new vector can start in the very next cycle, so the peak
  rate is one vector every 39 clocks.

The six outputs are delivered as they are. How they encode the 40 face
classes (for example as a binary code, or by the largest output) is left to
the user. No decoder is included.

## Parameters

| module | parameter | default | notes |
|---|---|---|---|
| `csd_nn_top` | `N_IN` | 39 | feature-vector length |
| | `N_HID` | 28 | 28 for PCA features, **29 for LDA features** |
| | `N_OUT` | 6 | |
| | `NZ_DROP` | 1 | 0..4 nonzero digits removed per weight |
| `tansig_lut` | `DEPTH`, `STEP_SHIFT` | 1024, 20 | table size and input step |

The shared widths and types (`DATA_W = 18`, `PROD_W = 36`, `AF_IN_W = 32`,
`csd_t`, `cfg_sel_e`) are in `csd_nn_pkg`.

## Design choices beyond the reference description

These points are this implementation's own decisions. The description it
follows leaves them open or handles them differently:

* **Configuration port and on-chip recoding.** In the reference flow, the
  weights are recoded to CSD and split into +/- masks offline, then placed in
  ROMs. Here, the stores are written through `cfg_*`, and `csd_converter`
  recodes each weight on the load path. The stores still hold split masks, as
  in the original.
* **The meaning of `load`.** `load` is used as a per-element valid strobe.
* **Asynchronous ROM read.** The weight ROMs read asynchronously, like a
  LUT-based ROM. The ROM outputs serve as the "data" and "sign" registers that
  feed the multiplier.
* **Widths and saturation.**
  * The hidden accumulator is 42 bits.
  * Sums are saturated to the 32-bit tansig input. The original gives 32 bits
    only for the output layer.
  * Biases are at the 1e8 product scale.
* **Output-layer weight store.** Its weights are held in a register file
  (`weight_bank`) rather than an addressed ROM, because all 28 are needed in
  the same cycle.
* **Tansig table.** The table size, step, sign folding and midpoint sampling
  are all choices made here.
* **Clock-level timing.** All clock-level timing (latencies, back-to-back
  vectors) is this design's own.

Not included: the feature extraction (PCA/LDA), the training, the image
pre-processing, and any mapping from the six outputs to a class. These run in
software before or after the network. The trained weights are not available,
so every test uses random weights. Recognition accuracy is therefore not
reproduced. Only the arithmetic of the network is checked against a reference.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference arithmetic is
in `tb/tb_ref_pkg.sv` and does not use the RTL's methods:

* CSD digits come from the classic non-adjacent-form rule (an odd x takes digit
  2 - (x mod 4)), not from the carry table.
* tansig comes from the real-valued `$tanh`.

| testbench | what it covers |
|---|---|
| `tb_csd_converter` | the 478 example; the digit-drop table; 3000 random and corner weights at drop 0..4; the canonical property |
| `tb_csd_multiplier` | 4000 random products with 0..9 nonzero digits; extreme operands |
| `tb_tansig_lut` | step boundaries, saturation, most negative input, odd symmetry, monotonicity |
| `tb_adder_tree` | 29 and 8 operands, extremes |
| `tb_weight_rom`, `tb_weight_bank` | write and read-back of every word, overwrites |
| `tb_hidden_neuron` | address sequence; values; 1-clock latency; gaps; reset in the middle of a vector; saturated sums |
| `tb_hidden_layer`, `tb_output_layer` | the write path to every neuron; lock-step outputs |
| `tb_output_neuron` | 400 parallel evaluations, including 32-bit saturation |
| `tb_csd_nn_top` | whole network at default sizes (see below) |

`tb_csd_nn_top` runs the whole network at its default sizes (39-28-6, drop 1).
It loads all weights, streams 13 vectors (back to back and with gaps) and
checks every output and the 2-clock latency. It then repeats with full-range
weights. It counts each mechanism it exercises:

* back-to-back vectors
* idle cycles
* weights changed by the digit drop
* negative digits
* 32-bit clamping
* sums past the table end
* negative outputs

It fails if any of these never happens.

`tb_workloads` classifies 200 test vectors through the 39-28-6 network, which
is the size of the PCA test set. It also runs the 39-29-6 network (LDA) and the
4-digit drop, and checks every output.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/csd_nn_pkg.sv tb/tb_ref_pkg.sv tb/tb_csd_nn_top.sv \
    --top-module tb_csd_nn_top -Mdir obj_top -o sim
./obj_top/sim
```

Replace the testbench name to run another one. Building the full-size network
takes about one to two minutes. The simulations themselves take well under a
second.
