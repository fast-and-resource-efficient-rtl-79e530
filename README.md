# Ternary CNN muon finder for a level-0 barrel muon trigger

This is RTL for a convolutional neural network that finds muons in the hit
pattern of the resistive plate chambers (RPCs) of one barrel sector of a
collider muon spectrometer. It is meant to run in the trigger FPGA within about
a microsecond. The RPC strips of the sector form a small black-and-white
image: 9 detector layers by 384 bins in pseudorapidity (eta). A very
high-momentum muon shows up as a nearly vertical line of hits across the
layers. A lower-momentum muon bends in the magnetic field and draws an inclined
line. The network reads the image and estimates five numbers: the transverse
momentum (pT) and eta of the leading muon, the same two for the sub-leading
muon, and the number of muons. A trigger bit fires when the leading pT is
above a threshold.

What makes this fit in a small part of an FPGA with a short latency is that
the network is *ternary*. Every weight and every hidden activation is -1, 0 or
+1 and is stored in two bits. A "multiplication" is therefore just a choice of
sign, and each layer is a set of adder trees with no multipliers. Batch
normalisation and the ternary activation reduce to two integer comparisons
per channel. Only the output layer works in fixed point, to produce its
sigmoid.

The published design this follows gives the image format, the layer types,
the kernel shapes, the ternary arithmetic, the five outputs, and the idea of
cutting the image into portions that are processed in parallel. It does not
give the number of filters or neurons, the number formats, the interfaces, or
how the portion results are combined. Those are choices made here, and they
are listed in [Design choices](#design-choices-not-fixed-by-the-published-design).
No trained weights are published, so the weights are loaded at run time.

## The hit image and its portions

`hits[layer][eta]` is one bit per strip bin: 9 layers (3 inner, 4 middle and
2 outer RPC layers) by 384 eta bins. The binning itself is done upstream and
is not part of this RTL: bin = 384 (eta - 0.07) / (0.95 - 0.07).

The image is cut along eta into `N_PORT` = 8 equal, non-overlapping portions
of 48 bins. Each portion goes through its own copy of the same network.
Every copy reads the same weights from a single `weight_store`. Smaller
inputs keep the dense layer small, which is where most of the weights of
such a network sit. Inside a portion the convolution treats **eta as the first
(height) axis** and the detector layer as the second. So portion `p` sees
`img[h][l] = hits[l][48p + h]`.

## The network of one portion (`tcnn_portion`)

These are the sizes at the default parameters (H = 48 eta bins, W = 9 layers):

| stage | module | output size | weights |
|---|---|---|---|
| input, hits as 0/+1 | | 48 x 9 x 1 | |
| conv 4x3, F1 = 8, batch norm, ternary | `tconv_layer` | 45 x 7 x 8 | 96 |
| max-pool 4x1 | `maxpool_eta` | 11 x 7 x 8 | |
| conv 4x3, F2 = 16, batch norm, ternary | `tconv_layer` | 8 x 5 x 16 | 1536 |
| max-pool 4x1 | `maxpool_eta` | 2 x 5 x 16 | |
| flatten (eta, layer, channel) | | 160 | |
| dense, N_HID = 32, batch norm, ternary | `tdense_layer` + `bn_ternary_act` | 32 | 5120 |
| dense 5, batch norm, sigmoid | `tdense_layer` + `sigmoid_out` | 5 x Q0.8 | 160 |

The convolutions use no padding. Pooling has stride 4 and drops rows that do
not fill a whole window (45 rows pool to 11).

**Ternary activation with batch normalisation.** Suppose batch normalisation
has a positive scale and is followed by "+1 above delta, -1 below -delta".
That is the same as comparing the raw integer sum with two integer
thresholds: `a = +1 if s > hi, -1 if s < lo, else 0`. The thresholds are
worked out offline from the trained mean, variance, scale, offset and delta.
A channel with a negative scale is handled by flipping the signs of its
weights before loading them. `tcnn_pkg::tact` implements this rule.
`bn_ternary_act` applies it to a vector.

**Output layer.** The five integer sums `s` are scaled as
`z = (s * gamma + beta) / 256`, where gamma and beta are signed Q8.8 numbers.
The sigmoid is a four-piece linear fit: slope 1/4 for |z| < 1, 1/8 up to
2.375, 1/32 up to 5, and flat at 1 beyond 5. A negative z gives 1 - y. The
error is below 0.02. The output is unsigned Q0.8 (value/256) and is clamped
to 255.

## Timing

Each convolution computes **one output row per clock**: all columns and all
filters of that row in parallel. It writes the activated row into its output
register map. The stages are chained by their done pulses, so no central state
machine is needed:

| stage | cycles (default) |
|---|---|
| conv 1: H-3 rows + 1 | 46 |
| conv 2: (H-3)/4-3 rows + 1 | 9 |
| dense 1, dense 2, sigmoid | 1 each |
| portion total `HO1 + HO2 + 5` | 58 |
| top: image latch + merge | +2 |
| **accepted image to `out_valid`** | **60** |

All portions run in lock step and finish in the same cycle. Pooling,
flattening and the hidden activation are combinational between the registered
stages. The path from a map register through the pooling max, one adder tree
of up to 96 terms (conv 2) or 160 terms (dense 1) and a threshold compare is
the long path of the design. No clock target is assumed. The published
implementation reports 1.1 us, and 60 cycles stay within that at any clock
of 55 MHz or more.

The engine handles **one event at a time**. `in_ready` stays low for the 60
cycles an event is in flight. It is not pipelined across events, so a new
event every 25 ns would need about 2.4 GHz. A design for the full
bunch-crossing rate would have to overlap events, for example by
double-buffering the layer maps. That is not done here.

## Combining the portions (`portion_merge`)

Each portion reports `y = {pT lead, eta lead, pT sub-lead, eta sub-lead, n}`
in Q0.8. The merge reads them as follows:

* muon count of the portion `n_p = round(3 * y4 / 256)`, from 0 to 3;
* the portion's leading candidate counts if `n_p >= 1`, its sub-leading one if
  `n_p >= 2`;
* a candidate's global eta bin is `48 p + floor(y_eta * 48 / 256)`;
* the event's leading and sub-leading muons are the two counted candidates with
  the highest pT (on equal pT the lower portion wins, and lead before
  sub-lead);
* `n_muons` is the sum of `n_p`, and `trig = lead_valid && lead_pt >= pt_thr`.

These encodings fix what the network must be trained to output. They are this
design's own choice.

## Interface (`l0mu_tcnn_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, active-low asynchronous reset |
| `cfg_we`, `cfg_addr[15:0]`, `cfg_data[15:0]` | in | parameter write port; write only while idle (an assertion checks this) |
| `in_valid`, `in_ready` | in/out | image handshake; the image is taken when both are high |
| `hits[9][384]` | in | hit image, `[layer][eta bin]` |
| `pt_thr[7:0]` | in | trigger threshold on the Q0.8 pT output, taken along with the image |
| `out_valid` | out | one-cycle result strobe |
| `res` | out | `tcnn_pkg::result_t`: `trig`, `n_muons`, `lead_valid/lead_pt/lead_eta`, `sub_valid/sub_pt/sub_eta` |

`res` holds its value until the next result.

### Parameter memory map (`weight_store`)

There is one parameter per address, in this order. The sizes are the
defaults.

| region | words | content |
|---|---|---|
| conv 1 weights | 96 | index `((f*4+kh)*3+kw)*CIN+c`, code in bits [1:0] |
| conv 1 thr_lo, thr_hi | 8 + 8 | signed 16-bit |
| conv 2 weights | 1536 | same order, CIN = 8 |
| conv 2 thr_lo, thr_hi | 16 + 16 | |
| dense weights | 5120 | index `j*160 + i` |
| dense thr_lo, thr_hi | 32 + 32 | |
| output weights | 160 | index `j*32 + i` |
| output gamma, beta | 5 + 5 | signed Q8.8 |

The map holds 7,034 words. Ternary codes are `01` = +1, `11` = -1 and `00` = 0
(`10` is read as 0). Writes outside the map are ignored. Reset clears the
thresholds and output terms. The ternary weights are plain memories with no
reset and must be loaded before the first event.

## Design choices not fixed by the published design

* Filter and neuron counts (8, 16, 32), and the number of layers (two
  convolution/pool stages, one hidden dense layer). The published network's
  sizes are not reproduced here. It is described as having about one tenth of
  the parameters of the best floating-point-equivalent network.
* Eta as the kernel's 4-long axis. The other order does not fit two 4x1
  poolings on 9 layers.
* 8 non-overlapping portions of 48 bins with shared weights, and the merge
  rule above. A muon that crosses a portion boundary is seen in part by two
  portions.
* Number formats (16-bit sums and thresholds, Q8.8 output scale, Q0.8
  outputs), and the piecewise-linear sigmoid.
* The row-per-clock schedule, one event at a time, the valid/ready
  handshake, and the parameter write port.

## Files

| file | content |
|---|---|
| `rtl/tcnn_pkg.sv` | types (`trit_t`, `acc_t`, `result_t`), shapes, default sizes, ternary helpers |
| `rtl/tconv_layer.sv` | 4x3 ternary convolution + threshold activation, one row per clock |
| `rtl/maxpool_eta.sv` | 4x1 max-pooling |
| `rtl/tdense_layer.sv` | ternary dense layer, one clock |
| `rtl/bn_ternary_act.sv` | folded batch norm + ternary activation |
| `rtl/sigmoid_out.sv` | output batch norm + piecewise-linear sigmoid |
| `rtl/tcnn_portion.sv` | the network of one portion |
| `rtl/weight_store.sv` | parameter memory and write port |
| `rtl/portion_merge.sv` | combination of the portion outputs, trigger bit |
| `rtl/l0mu_tcnn_top.sv` | top: image latch, 8 portions, merge |
| `tb/tcnn_ref_pkg.sv` | integer reference model used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench drives its module with random data. It compares the outputs
with `tcnn_ref_pkg`, an integer model written with flat arrays and plain
loops, or with a direct calculation. It also checks the cycle counts given
above. Each prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_sigmoid_out` compares against the exact sigmoid (`$exp`) with a
  tolerance of 0.025, across the saturated and linear ranges.
* `tb_tcnn_portion` runs a 32-bin portion with small layers against the
  reference network.
* `tb_l0mu_tcnn_top` runs the top **at its default size** (9 x 384 image,
  8 portions, 7,034 parameters). It loads four random weight sets through
  the write port and sends 24 images of noise plus straight and inclined
  tracks, back to back. It checks every result field and the 60-cycle
  latency. It also counts, and requires at least once, each of these: an
  input stall, a weight reload, a trigger firing and one rejected, an event
  with no muon, a sub-leading muon, and leading and sub-leading muons found
  in the same portion and in different portions.

With random weights the tests show that the arithmetic and data movement are
correct. They say nothing about physics performance, which depends on trained
weights.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_l0mu_tcnn_top \
  -Irtl -y rtl -y tb rtl/tcnn_pkg.sv tb/tcnn_ref_pkg.sv tb/tb_l0mu_tcnn_top.sv
./obj_dir/Vtb_l0mu_tcnn_top
```

The full-size top test takes about half a minute. For the other testbenches,
replace the top module and file name.
