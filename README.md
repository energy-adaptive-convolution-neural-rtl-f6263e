# Energy-adaptive CNN digit recogniser with run-time bitwidth switching

A small convolutional neural network recognises 28x28 handwritten digits
(MNIST) in fixed-point hardware. Energy is saved in two ways:

* **Precision scaling.** Every value, including weights, activations and
  partial sums, uses the same small word width *n*. Fewer bits mean less
  switching activity. Energy per image falls with *n*, and recognition
  accuracy stays almost the same down to about 7 bits.
* **Run-time bitwidth switching.** On a partially reconfigurable FPGA the
  accelerator sits in a reconfigurable partition. One partial bit-stream
  exists per word width: 16, 12, 10, 8, 7, 6 and 5 bits. A controller in
  the static logic watches the battery. When the battery falls into a lower
  band, the controller has the processor load a narrower accelerator. The
  device keeps recognising digits, a little less accurately, instead of
  shutting down.

This RTL holds the accelerator (`cnn_core`, with the word width as the
parameter `N`) and the static reconfiguration controller
(`dpr_controller`). The top level `eeps_cnn_top` joins them. The network
structure, the layer output formats and the list of word widths follow the
original design *Energy Adaptive Convolution Neural Network Using Dynamic
Partial Reconfiguration*. The schedule, the memory organisation and the
reconfiguration handshake are this implementation's own. The section
"Where this RTL departs from the original" lists the differences.

## The network

| layer  | operation                                         | output       | parameters |
|--------|---------------------------------------------------|--------------|-----------:|
| input  | 28x28 image, pixels in [0,1)                      | 28x28        | -          |
| conv1  | 2 filters 3x3, stride 1, zero padded ("same")     | 28x28x2      | 20         |
| pool1  | ReLU, then 2x2 max, stride 2                      | 14x14x2      | -          |
| conv2  | 4 filters 3x3, stride 1, unpadded                 | 12x12x4      | 40         |
| pool2  | ReLU, then 2x2 max, stride 2                      | 6x6x4        | -          |
| fc1    | 144 -> 20, ReLU                                   | 20           | 2900       |
| fc2    | 20 -> 10, no activation                           | 10           | 210        |
| output | comparator: index of the largest fc2 output       | digit 0..9   | -          |

Conv2 has 40 parameters, which is one 3x3 kernel plus a bias per filter.
It is therefore built as a *grouped* convolution: filters 0 and 1 read
pooled map 0, and filters 2 and 3 read pooled map 1. The class is the
arg-max of the fc2 outputs. Softmax keeps the order of its inputs, so it
is not built.

## Number formats: the part that needs care

Every stored value is an *n*-bit two's-complement fixed-point number. It
has a sign bit, *m* integer bits and *n-m-1* fraction bits. The integer
width *m* is chosen per layer output from the range of that layer's
values:

| value                  | m   | source of the choice                    |
|------------------------|-----|-----------------------------------------|
| input pixels           | 0   | this design (pixels are normalised to [0,1)) |
| weights and biases     | 1   | this design (weights lie in [-2,2))     |
| conv1 outputs (pool1)  | 4   | original design                         |
| conv2 outputs (pool2)  | 5   | original design                         |
| fc1 outputs            | 6   | original design                         |
| fc2 outputs (scores)   | 8   | original design                         |

The values of *m* are parameters of `cnn_core` (`M_IN`, `M_W`, `M_C1`,
`M_C2`, `M_F1`, `M_F2`). *m* may exceed *n-1*, for example 8 integer bits
in a 5-bit word. The fraction width is then negative, which means the
least significant bit is worth more than 1.

Sums are kept in **2n bits**, in the format of the layer's *output*. That
format has *2n-m_out-1* fraction bits.

1. A product of an input (*m_in*) and a weight (*m_w*) is exact in 2n bits.
   It has *(n-1-m_in)+(n-1-m_w)* fraction bits. It is moved to the sum
   format by an arithmetic shift of `m_out - m_in - m_w - 1` places:
   right when positive, dropping the low bits, and left when negative,
   clamped to the 2n-bit range. This amount does not depend on *n*.
   It is +2 for conv1, -1 for conv2, -1 for fc1 and 0 for fc2.
2. The nine aligned products of a window are added pairwise, in the order
   `((p0+p1)+(p2+p3)) + ((p4+p5)+(p6+p7)) + p8`. Every addition is an
   `add2` unit that clamps to the 2n-bit range. A partial sum therefore
   always fits in 2n bits.
3. The bias is moved from the weight format to the sum format in the same
   way. It is the first term of the accumulation. In the fully connected
   layers each further window sum (nine inputs) is added to the running
   sum with another clamping `add2`.
4. The final 2n-bit sum keeps its **top n bits**. Dropping the low n bits
   turns *2n-m-1* fraction bits into *n-m-1*, so the result is already in
   the layer's n-bit output format. No further scaling is needed, and the
   same n-bit datapath serves every layer.
5. ReLU, max-pooling and the comparator work on these n-bit values.

`tb/tb_cnn_ref_pkg.sv` restates these rules as plain integer arithmetic.
The RTL matches it bit for bit at all seven word widths.

## Datapath and schedule

```
 image mem (784xN) ---+                     weight mem (356 rows x 9N, 36 biases)
                      v                                  | nine weights, bias
 intermediate mem --> mem_access --9 operands--> compute_unit (9 mult, add2 tree, reg)
 (556xN)   ^            (window stream,                  | 2N-bit window sum
           |             valid/ready)                    v
           |                                   add2 accumulator (+bias, +window sums)
           |                                             | top N bits
           |                                           ReLU
           |                                             |
           +---- maxpool4 <--- reg_file (16xN) <---------+----> argmax10 -> class
                  (conv)        (conv outputs, fc2 scores)
```

* **`mem_access`** walks all windows of one layer in a fixed order. It
  reads the nine operands of each window from the image memory or the
  intermediate memory, one per cycle, and offers the complete window with
  `win_valid`/`win_ready`. The next window is fetched while the current one
  is consumed, so a new window is ready every **10 cycles**. Conv1 windows
  are grouped by pooling cell: 14x14 cells, 4 positions each. Positions
  outside the image read as zero. Conv2 windows come per pooling cell, per
  position and per input map. A fully connected neuron reads its inputs as
  nine-word windows: 16 for fc1, and 3 for fc2 with the last 7 words zero.
  Inputs are read again for every neuron.
* **`cnn_core`** consumes the stream. A conv window serves two filters in
  two cycles: filters 0,1 in conv1, and filters 2*map and 2*map+1 in conv2.
  An fc window needs one cycle. Each cycle the compute unit receives one
  nine-weight row and the window. One cycle later its sum is accumulated,
  cut to n bits, and passed through ReLU. Conv results go to `reg_file`
  entry `filter*4 + position`. When the fourth position of a pooling cell
  arrives, `maxpool4` combines it with the three stored ones, and the
  result is written to the intermediate memory. Fc1 results go straight to
  memory. Fc2 scores go to `reg_file` entries 0..9, where `argmax10` reads
  them.
* A layer starts only after the previous one has stored its last result.

**Latency.** One image streams 784 + 288 + 320 + 30 = 1,422 windows. At 10
cycles each that is 14,220 cycles. Start-up and layer hand-over add 19
cycles, for **14,239 cycles per image**: 0.285 ms, or 3,511 images/s, at
50 MHz. The original design reports 13,715 cycles (3,645 images/s) but
does not describe its schedule. The difference is about 4 %.

## Memory layout (what the host loads)

Load the image and parameters while the core is idle, one word per clock.

* Image: `img_waddr = row*28 + col`, pixel in the m = 0 format.
* Weights: `w_row`, `w_col` (0..8) and `w_data`. Within a conv row the
  words are in kernel order `k = 3*dr + dc`.

  | rows      | contents                                                   |
  |-----------|------------------------------------------------------------|
  | 0-1       | conv1 filter f                                             |
  | 2-5       | conv2 filter f (f = 0,1 read map 0; f = 2,3 read map 1)     |
  | 6-325     | fc1 neuron j, group g (row 6+16j+g): inputs 9g..9g+8        |
  | 326-355   | fc2 neuron j, group g (row 326+3j+g): inputs 9g..9g+8, zero weights past input 19 |

  The fc1 input index is `map*36 + row*6 + col` of the pooled conv2 output.
  Weights trained with another flatten order must be permuted to match.
* Biases: `b_addr` 0-1 conv1, 2-5 conv2, 6-25 fc1, 26-35 fc2.
* Intermediate memory (internal): pool1 at 0 (`map*196 + r*14 + c`), pool2
  at 392 (`map*36 + r*6 + c`), fc1 outputs at 536.

## Bitwidth switching (`dpr_controller`)

The battery level is an 8-bit code. It selects one of seven reconfigurable
modules through thresholds:

| level   | >=224 | >=192 | >=160 | >=128 | >=96 | >=64 | below 64 |
|---------|------:|------:|------:|------:|-----:|-----:|---------:|
| module  | 0     | 1     | 2     | 3     | 4    | 5    | 6        |
| n (bits)| 16    | 12    | 10    | 8     | 7    | 6    | 5        |

The thresholds are a parameter. The values above are placeholders. In the
original system the processor decides from the available battery power, and
no thresholds are given. When the wanted module differs from the loaded one
and the accelerator is idle, the controller:

1. raises `rp_decouple`. The top then blocks the image and parameter
   writes, `start`, `busy` and `done` at the partition boundary.
2. raises `cfg_req` with `cfg_rm` and holds it until `cfg_done`. Meanwhile
   the processor copies the partial bit-stream from DDR into the
   configuration port. The original system measures 127 ms for a 1.27 MB
   bit-stream at 10 MB/s.
3. holds the partition in reset for 4 cycles.
4. updates `cur_rm` and `cur_bits` and counts the switch in `n_reconfig`.

`rp_ready` is low while a switch is due or under way, and a `start` pulse
then is ignored. After a switch the host must load parameters quantised for
`cur_bits`. On an FPGA they can also be part of the partial bit-stream as
initial memory contents.

In the top, the partition always holds `cnn_core` at the parameter `N`
(default 16). Each partial bit-stream is a build of the same RTL with
another `N`. A simulation cannot swap the netlist, so `cur_bits` reports
what the real device would hold.

## Top-level interface (`eeps_cnn_top`)

| port group | signals |
|------------|---------|
| clock/reset | `clk`, `rst_n` (synchronous, active low) |
| battery and reconfiguration | `battery_level[7:0]` in; `cfg_req`, `cfg_rm[2:0]` out, `cfg_done` in; `rp_ready`, `cur_rm[2:0]`, `cur_bits[4:0]`, `n_reconfig[15:0]` out |
| load | `img_we/img_waddr/img_wdata`, `w_we/w_row/w_col/w_data`, `b_we/b_addr/b_data` |
| recognition | `start` in; `busy`, `done` (1-cycle pulse), `class_idx[3:0]`, `scores[10]` (N-bit signed), `cycles[15:0]` out |

Host sequence: wait for `rp_ready`, load, pulse `start`, wait for `done`,
then read `class_idx` and `scores`.

## Files

| file | contents |
|------|----------|
| `rtl/cnn_pkg.sv` | layer enum, geometry, memory maps, format-shift helpers |
| `rtl/eeps_cnn_top.sv` | top: controller + partition with isolation |
| `rtl/dpr_controller.sv` | battery bands, reconfiguration handshake |
| `rtl/cnn_core.sv` | accelerator: sequencer, accumulator, result routing |
| `rtl/mem_access.sv` | window stream generator (operand fetch, padding) |
| `rtl/compute_unit.sv` | 9 multipliers, alignment, add2 tree, output register |
| `rtl/add2.sv`, `relu.sv`, `maxpool4.sv`, `argmax10.sv`, `reg_file.sv` | small units |
| `rtl/sync_ram.sv` | image and intermediate memories (1-cycle read) |
| `rtl/weight_mem.sv` | nine-word-wide weight rows and biases (asynchronous read) |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_cnn_ref_pkg.sv` | bit-accurate integer reference model of the network |
| `tb/cnn_core_check.sv` | loads, runs and checks one `cnn_core` of a given width |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops
itself. For example, the end-to-end test at default parameters:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/cnn_pkg.sv tb/tb_cnn_ref_pkg.sv tb/tb_eeps_cnn_top.sv --top-module tb_eeps_cnn_top
./obj_dir/Vtb_eeps_cnn_top
```

Swap in `tb_cnn_core` to run all seven word widths. Each runs two random
images and a parameter set, and the results are compared with the reference
model. The same pattern works for the unit testbenches. All simulations
finish in well under a second.

## Verification status

* All seven word widths: the class, the ten scores and the 14,239-cycle
  latency match the reference model (`tb_cnn_core`).
* End to end (`tb_eeps_cnn_top`, N = 16):
  * recognition at full battery;
  * a switch to the 7-bit module, during which a start and an image write
    are ignored;
  * re-recognition with unchanged results;
  * a second image, then a switch back to 16 bits.
* Units: random and corner-case tests of clamping, tie breaking, padding,
  window order and back-pressure, the controller's band selection, busy
  hold-off and reset length.
* Not reproduced: accuracy (Table II of the original needs the trained
  weights and the test set, neither of which is part of this RTL), FPGA
  resource use, and power or energy per image.

## Where this RTL departs from the original

* **Schedule and latency:** own design, 14,239 instead of 13,715 cycles per
  image.
* **Conv2:** read as a grouped convolution, to match its 40 parameters.
* **Formats:** input m = 0 and weight m = 1 are chosen here. Only the
  layer-output widths come from the original.
* **Clamping:** additions and left shifts clamp on overflow. The original
  only states that sums are kept in 2n bits.
* **Softmax:** replaced by the comparator, which gives the same class.
* **Memory organisation:** the nine-word weight rows, the asynchronous
  weight read and the 16-entry register file are choices made here.
* **Bitwidth switching:** the battery thresholds, the isolation, the
  partition reset and the `cfg_*` handshake are choices made here. The
  processor, the DDR memory holding the bit-streams and the configuration
  port (ICAP) are outside the RTL, and their handshake is brought out as
  ports.
