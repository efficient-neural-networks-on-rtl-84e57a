# SSCNN digital predistorter: a shallow neural network with a trainable spline activation

A power amplifier (PA) driven close to saturation distorts its signal. A
digital predistorter (DPD) placed before it applies the inverse distortion, so
that the cascade of the two is linear. This RTL implements a neural-network
predistorter whose hidden layer uses an *adaptive* activation function: a
piecewise-linear curve through L trainable points instead of a fixed `tanh`.
Because the curve itself is learned, one small hidden layer of 9 neurons is
enough, and because the curve is piecewise linear with a power-of-two segment
width, evaluating it costs a shift, a bit slice, a clamp, a 16-word lookup and
one multiply-add. No exponentials, no division and no block RAM are needed.

The network is the segmented spline curve neural network SSCNN(9):

```
 I(n) ─┬─[z^-1]─[z^-1]─┐                              |I(n)|, |Q(n)|
 Q(n) ─┼─[z^-1]─[z^-1]─┤                                    │ (delayed 8 clk)
       │               ▼                                    ▼
       │   input layer: 6 inputs x 9 neurons ─► SSC layer ─► output layer ─► I_out(n)
       │   linear, no bias, systolic          9 spline     11 inputs x 2       Q_out(n)
       │                                      neurons      linear, no bias
       └──► envelope |.|
```

* input vector: `{I(n), I(n-1), I(n-2), Q(n), Q(n-1), Q(n-2)}` (memory depth 2);
* input layer: 9 linear neurons, 54 weights;
* SSC (segmented spline curve) layer: 9 spline activations sharing one set of
  L = 9 coefficients;
* output layer: 2 linear neurons over the 9 spline outputs plus |I(n)| and
  |Q(n)|, 22 weights.

That is 54 + 9 + 22 = 85 coefficients. No layer has a bias. Every word is
32-bit two's complement with 26 fraction bits (Q5.26, range about ±32).
The datapath takes one complex sample per clock.

Training is done offline (in an indirect-learning loop, with a post-distorter
fitted to the PA output and its coefficients copied to the predistorter); the
hardware only receives the trained coefficients through a write port.

## The spline activation

For coefficients `C[0..L-1]` and `Δ = (L-1)/2`, the activation is

```
t    = (x + 1) · Δ
i    = floor(t)                       segment index
f(x) = C[i] + (C[i+1] - C[i]) · (t - i)
```

so the curve passes through `C[k]` at `x = -1 + k/Δ` and is linear in
between. `x` in [-1, 1) covers the L-1 = 8 segments.

The hardware view of this formula is the core of the design
(`ssc_neuron`):

1. **Bit shift** (`bit_shift_split`). L is chosen as 2^k + 1, so Δ is a power
   of two (Δ = 4 for L = 9) and `(x+1)·Δ` is an addition of 1.0 followed by a
   left shift by 2. The binary point does not move.
2. **Bit split.** In that shifted word, the bits above the binary point *are*
   `i` and the 26 bits below it *are* `t - i`. Index and interpolation weight
   come out of the same word with no arithmetic.
3. **Saturation** (`spline_saturation`). The integer part is clamped to
   0 .. L-2 (0 .. 7) so that `i` and `i+1` are both valid coefficient
   addresses. The clamped value is used as the memory address directly, with no
   decoder.
4. **Coefficient LUT** (`coef_lut`). A 16 x 32-bit distributed memory (4 address
   bits; 9 words used), read at `i` and `i+1` in the same clock.
5. **Combination** (`spline_combination`). `C[i] + ((C[i+1]-C[i]) · frac) >>> 26`.
   Because `frac` < 1, the result always lies between `C[i]` and `C[i+1]`
   and cannot overflow.

**Behaviour outside [-1, 1).** Only the integer part is clamped. The fraction
bits go to the combination stage unchanged. An input beyond the range therefore
evaluates the first or last segment at the raw fraction of `(x+1)·Δ`. The
output stays between the two end coefficients of that segment but is not an
extension of the line; it repeats in a saw-tooth with period 1/Δ. Even
x = +1.0 exactly falls in this case: it gives C[L-2], and C[L-1] is only
approached as x rises towards 1. A trained
network keeps its hidden values inside the range. If yours does not, clamp `x`
before the neuron, or force `frac` to 0 / all-ones together with the clamp.

Rounding is always towards minus infinity (arithmetic right shift).

All 9 neurons use the same 9 coefficients. Each neuron holds its own copy in
its LUT so that every neuron can read two words per clock. A coefficient write
goes to all copies at once.

## Systolic linear layers

Both linear layers are `fc_layer` instances. Each neuron is an `fc_neuron`: a
chain of N_IN multiply-add stages, the shape of a cascade of DSP slices.
Stage p computes `acc_p <= acc_{p-1} + (x_p · w_p) >>> 26`. Stage p must see
input p of a sample p clocks after stage 0 saw input 0, so the layer first
passes input p through p skew registers. All neurons share these registers.
The adders never wait for a full parallel product tree, and a new vector enters
every clock.

* Products are Q10.52, shifted right by 26 to Q10.26 and summed at 41–42 bits,
  so partial sums cannot overflow.
* The finished sum is saturated to the 32-bit word.
* Latency is N_IN clocks: 6 for the input layer and 11 for the output layer.

## Interface and timing of `sscnn_dpd`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset (clears delay lines, pipelines and all coefficients) |
| `in_valid`, `in_i`, `in_q` | in | 1, 32, 32 | input sample I(n), Q(n) in Q5.26 |
| `coef_we`, `coef_addr`, `coef_data` | in | 1, 7, 32 | coefficient write, one word per clock |
| `out_valid`, `out_i`, `out_q` | out | 1, 32, 32 | predistorted sample |

* **Latency:** 19 clocks from `in_valid` to the matching `out_valid`: 6
  (input layer) + 2 (spline) + 11 (output layer).
* **Throughput:** one sample per clock. There is no back-pressure.
* **Gaps:** `in_valid` may drop for any number of clocks. The I/Q delay lines
  advance only on valid samples, so the memory taps always hold the previous
  *valid* samples.

Coefficient address map:

| address | content |
|---|---|
| 0 – 53 | input layer weight, address = 6·neuron + input; inputs ordered I(n), I(n-1), I(n-2), Q(n), Q(n-1), Q(n-2) |
| 54 – 62 | spline coefficients C[0] … C[8] |
| 63 – 84 | output layer weight, address = 63 + 11·neuron + input; inputs ordered spline 0…8, \|I(n)\|, \|Q(n)\|; neuron 0 drives `out_i`, neuron 1 `out_q` |

A write takes effect on the next clock. Writes may be made while samples
stream, but samples in flight can then see a mix of old and new values. Stop
`in_valid` for 19 clocks before switching to a new set if the switch must be
clean.

## Parameters

`sscnn_dpd` has these parameters, with defaults from the SSCNN(9)
configuration in `sscnn_pkg`:

* `MEM_DEPTH` = 2 delay taps;
* `N_HID` = 9;
* `SEG_L` = 9;
* `N_OUT` = 2;
* `COEF_ADDR_W` = 7.

`SEG_L` must be 2^k + 1 with k ≥ 2. The spline shift is log2((L-1)/2), and
the LUT has 2^clog2(L) words. The address map moves with the sizes; the top
checks at elaboration that `COEF_ADDR_W` is wide enough.

## Where this RTL goes beyond, or departs from, its source description

The network shape is the published SSCNN(9): the sizes, the Q5.26 format, the
shift/split/saturate/LUT/combine structure of the spline neuron and the
systolic linear layers. The following were not specified there and are
choices made here:

* **Shared coefficients.** One set of 9 spline coefficients serves the whole
  hidden layer. This is inferred from the total of 85 coefficients. Per-neuron
  coefficient sets would need 72 more.
* **Index base.** Segment indices count from 0, clamped to 0..L-2. The same
  clamp stated with coefficients counted from 1 reads "1..L-1".
* **Envelope terms.** Only the current |I(n)| and |Q(n)| feed the output layer,
  not delayed copies.
* **Order of the input vector**, the **coefficient address map** and the
  **write port** are design choices.
* **Rounding, accumulator width and saturation** of the linear layers, and the
  saturation of |most negative word|, are design choices.
* **Pipeline registers** in the spline neuron (2 stages) and the
  valid-qualified streaming interface are design choices.
* **Not included:** the signal memories and processor that replay the test
  signal, the data converters, the PA, the synchronisation logic around the
  predistorter and the training. The published implementation reports
  8258 LUTs, 8084 FFs, 108 DSPs, no BRAM and 221.12 MHz on a Zynq UltraScale+
  RFSoC. None of these figures has been reproduced for this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. The expected values come
from an integer model of the arithmetic (`tb/sscnn_ref_pkg.sv`), written from
the formulas rather than from the RTL. Each testbench prints
`TB_RESULT checks=N failures=M`.

* `tb_sscnn_dpd` runs the whole predistorter at its default sizes:
  * loads all 85 coefficients through the port;
  * streams a 25600-sample synthetic multi-tone I/Q record with random gaps;
  * reloads the coefficients twice, for a drive level that pushes hidden values
    past both ends of the spline and for weights large enough to saturate both
    linear layers;
  * checks every output word and the 19-clock latency, and counts each of those
    events (a count of zero is a failure).
* The block testbenches sweep the edge cases of their block:
  * every integer part through the clamp;
  * segment boundaries and extreme words through the shift/split;
  * out-of-range inputs through the neuron;
  * skew, latency and saturation of the systolic layers.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/sscnn_pkg.sv tb/sscnn_ref_pkg.sv tb/tb_sscnn_dpd.sv --top-module tb_sscnn_dpd
./obj_dir/Vtb_sscnn_dpd
```

Replace `sscnn_dpd` with any other block name to run that block's testbench.
The full-size test takes about ten seconds to build and under a second to run.

## Files

`rtl/`:

* `sscnn_pkg.sv`: number format and default sizes;
* `sscnn_dpd.sv`: top level;
* `tap_delay_line.sv`, `envelope_abs.sv`, `pipe_delay.sv`: input side and
  envelope path;
* `fc_layer.sv`, `fc_neuron.sv`: systolic linear layers;
* `ssc_layer.sv`, `ssc_neuron.sv`, `bit_shift_split.sv`,
  `spline_saturation.sv`, `coef_lut.sv`, `spline_combination.sv`: the spline
  layer.

`tb/` holds one `tb_<module>.sv` per module and the reference model
`sscnn_ref_pkg.sv`.
