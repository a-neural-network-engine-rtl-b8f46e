# A 12-lane neural network engine with two-step power-of-two scaling

This is RTL for a small inference engine for fully-connected ReLU networks.
It is meant to sit next to an audio DSP in a device with a tight power budget,
such as a hearing instrument. Weights, biases and activations are all 8 bits
wide. One 96-bit memory word holds twelve of them, and twelve
multiply-accumulate lanes compute twelve neurons at once. The memory is
busy in almost every cycle, so the design is mostly about making each memory
access count. It does this in three ways:

* **Input stationary.** Each input element is read once per group of twelve
  neurons and multiplied by the twelve neurons' weights in one cycle.
* **Output stationary.** Each neuron stays in a 25-bit accumulator until it
  is finished. It is stored once, as part of a 96-bit result vector.
* **Two-step scaling.** Results go back to 8 bits by power-of-two shifts.
  These shifts are chosen at run time, but a stored result is never read
  back to rescale it. The engine therefore runs in a fixed number of cycles
  for a given network, whatever the data.

The structure follows the published description of the engine, "A Neural
Network Engine for Resource Constrained Embedded Systems". That description
gives the datapath, the scaling method, the memory organisation and the cycle
count. It leaves many details open: the host interface, the register map, the
bias alignment, the table depths, the memory instance size and the power
policy. This implementation chooses those, and
[Choices and departures](#choices-and-departures) lists them.

## Data layout in memory

The memory holds one 96-bit vector per 13-bit address. Lane `i` of a vector
is bits `8i+7:8i`. The host divides the memory into three areas:

* **Weight area**, starting at `w_base`. Layers follow one another, and
  within a layer the groups of twelve output neurons ("output vectors")
  follow one another. Each output vector takes one **bias vector** (lane `n`
  is the bias of neuron `n`) and then `12 * in_vecs` **weight vectors**.
  Weight vector `12v + e` holds, in lane `n`, the weight that connects input
  element `e` of input vector `v` to neuron `n`. The engine reads this area
  strictly in order with a single incrementing pointer.
* **block_0** and **block_1**, starting at `blk0_base` and `blk1_base`. These
  hold activations. Layer 0 reads its inputs from block_0 and writes its
  results to block_1. After every layer the two blocks swap roles, so a
  result is never copied.

Layer sizes are given in vectors: `in_vecs = ceil(A/12)` and
`out_vecs = ceil(O/12)`. Unused lanes must be zero-padded: zero inputs, and
zero weights and biases for neurons that do not exist. A padded neuron then
produces 0.

## Two-step scaling

A finished accumulator holds up to 25 significant bits, and only 8 bits are
stored. A single shift for the whole layer would need all of the layer's
results before any could be stored. Shifting each result by its own amount
would break the ratios between neurons that the next layer depends on. The
engine splits the shift into two steps:

1. **Within a vector, when storing** (`scaling_logic`). For each output vector
   of twelve neurons, the engine finds the smallest leading-zero count among
   the strictly positive accumulators. Negative values are ignored, because
   ReLU sets them to zero. The vector's shift is `25 - lzc - 8`, or zero if
   that is negative. Each positive lane is shifted right by that amount and
   truncated to 8 bits. Lanes that are not positive store 0. The 5-bit shift
   goes into a shift buffer, indexed by the vector's position in the layer.
   So every stored vector uses its 8 bits fully, but vectors of the same
   layer may be at different scales.
2. **Across the layer, when loading as input** (`shift_res`, `load_inp`).
   When the layer is complete, the largest of its vector shifts is known.
   When the next layer loads input vector `v`, each element is shifted right
   by `max_shift - shift[v]` on its way into the input FIFO. That brings all
   vectors to the scale of the most-shifted one.

Example with three result vectors whose shifts are 2, 1 and 3. The layer
maximum is 3. In the next layer the vectors are shifted right by a further
1, 2 and 0 bits as they are loaded. No extra memory access or cycle is spent
on this.

Two shift buffers alternate. One collects the shifts of the layer being
computed, while the other still holds the previous layer's shifts. Their
roles swap at the end of every layer.

The inputs of layer `k` are the true activations divided by `2^S`, where `S`
is the sum of the maximum shifts of layers `0..k-1`. The biases of layer `k`
must be divided by the same factor. `shift_res` keeps that sum in
`accu_shift`. When the MAC unit preloads a bias, it computes
`(sign_extend(bias) << bias_lshift) >>> accu_shift`. `bias_lshift` is a
per-network setting that places the 8-bit bias relative to the product LSB.
Preloading the biases also clears the accumulators.

The outputs of the last layer are at scale `2^-(res_accu_shift + res_shift[v])`
for output vector `v`. The host reads `res_shift[v]` through
`res_shift_idx`. The network's real-valued outputs can be recovered or
compared from these values. For a 12-class classifier there is only one
vector, so an argmax over the 12 lanes needs no correction.

Number formats:

* Layer 0 inputs are signed or unsigned 8-bit, chosen by a mode bit.
* All later activations are unsigned 8-bit (ReLU outputs).
* Weights and biases are signed 8-bit.
* Products are 9 x 8 bits.
* Accumulators are 25 bits and wrap around on overflow.

250 inputs of the largest magnitude still fit in 25 bits.

## Schedule and cycle count

The controller (`nne_ctrl`) uses one single-port memory access per cycle. Read
data returns one cycle after the request. One inference runs the following
sequence:

```
per layer:            1 init cycle (latch the layer's sizes)
  per output vector:  1 bias read                 -> preload accumulators
                      per input vector:
                        1 input read               -> load inp_fifo (with missing shift)
                       12 weight reads             -> 12 MACs each, one input element
                      1 drain (last MAC)
                      1 scale (leading zeros, shift, ReLU; registered)
                      1 store of the 96-bit result, shift into the shift buffer
                      1 layer-end cycle (swap blocks and shift buffers, accumulate shift)
```

This gives `cycles = 2N + sum_layers out_vecs * (13 * in_vecs + 4)`. The
memory is busy in all but `2 + 3 * out_vecs` cycles of each layer. For the
keyword-spotting network 250x144x144x144x12 this is 7332 cycles, with 7213
vector loads and 37 vector stores. That matches the figures published for the
engine, and the end-to-end test checks all three numbers. At the published
clock of 2 MHz this is 3.7 ms per inference. The absolute lower bound,
`sum(A*O)/12` vector MACs, is 6600 for this network.

## Blocks

| module | role |
|---|---|
| `nne_top` | the engine: all blocks below, host memory port, start/busy/done |
| `nne_pkg` | sizes, types, control strobe struct, register map |
| `nne_config` | configuration registers (layer count, base addresses, mode, per-layer sizes) |
| `nne_ctrl` | the state machine of the schedule above |
| `addr_gen` | weight, input and result pointers; block role swap; address mux |
| `load_inp` | inp_fifo: loads a 12-element vector with its missing shift, hands out one element per weight cycle |
| `mac_unit` | 12 lanes of 9x8-bit MAC into 25-bit accumulators; aligned bias preload |
| `scaling_logic` | first scaling step: ReLU, minimum leading-zero count, shift, 8-bit results (uses `lzc`) |
| `shift_res` | two shift buffers, layer maximum, missing-shift computation, `accu_shift` |
| `nne_memory` | seven memory instances behind one address; instance select from address bits 12:10 |
| `sram_sp` | one 1024 x 96-bit single-port instance, written as an array, with a switched-off input |
| `mem_pwr_ctrl` | decides which instances are switched on |

`nne_top` wires them as follows. The memory read data fans out to the MAC
unit (as bias or weight vector) and to the input FIFO. The kind of read
issued in the previous cycle decides which of them takes it. The MAC
accumulators go to the scaling logic, and its registered result is the
memory write data. The vector's shift goes to `shift_res`, which in turn
supplies `inp_shift` to the input FIFO and `accu_shift` to the MAC unit.

## Host interface

| signal | use |
|---|---|
| `cfg_we`, `cfg_addr[5:0]`, `cfg_wdata[15:0]`, `cfg_rdata` | register write (clocked) and read (combinational) |
| `host_en`, `host_we`, `host_addr[12:0]`, `host_wdata[95:0]`, `host_rdata` | memory access; only while `busy` is low; read data one cycle later |
| `start` | starts an inference (ignored if the layer count is 0) |
| `busy`, `done` | busy from the first to the last engine cycle; done is a one-cycle pulse after it |
| `res_accu_shift`, `res_shift_idx`, `res_shift` | output scale of the last layer |
| `bank_wake[6:0]` | memory instances currently switched on |

Register map:

| address | contents |
|---|---|
| 0x00 | number of layers (1..8) |
| 0x01 | weight area base |
| 0x02 | block_0 base (network inputs) |
| 0x03 | block_1 base |
| 0x04 | bits 3:0 `bias_lshift`, bit 4: layer 0 inputs are signed |
| 0x10 + 2l | `in_vecs` of layer l (1..63) |
| 0x11 + 2l | `out_vecs` of layer l (1..16) |

To run an inference:

1. Write the weight area and the inputs through the memory port.
2. Write the registers.
3. Pulse `start`.
4. Wait for `done`.
5. Read the results. They are in block_1 if the number of layers is odd,
   and in block_0 if it is even.

Weights stay in memory between inferences, so later runs only need new
inputs. The `in_vecs` of a layer must equal the `out_vecs` of the layer
before it, and each activation block must be large enough for the largest
layer that uses it.

## Memory instances and power switching

The memory is seven single-port instances rather than one large array, so
each read costs the energy of a small instance. Unused instances are switched
off to limit leakage. In this implementation, all instances are on while the
engine is idle, so the host can reach them. During a layer, an instance is on
only if it holds some of that layer's input vectors, result vectors or
bias/weight vectors. The weight range of the layer is
`out_vecs * (1 + 12 * in_vecs)` vectors from where the layer starts.

`sram_sp` models an instance that keeps its contents while off, like a
retention mode. An assertion flags any access to an instance that is off. In
a real chip `sram_sp` would be replaced by the process's SRAM macro, and
`bank_wake` would drive its power or sleep pins.

## Choices and departures

These points are not fixed by the engine's description and were chosen here:

* **Host side.** There is a register bus, a memory port used only while the
  engine is idle, start/busy/done, and a read port for the per-vector output
  shifts. Nothing is defined for a DSP bus protocol.
* **Instance size.** Each instance holds 1024 vectors, so 7168 vectors in
  total. The keyword-spotting network needs 6694.
* **Table depths.** Up to 8 layers, 16 output vectors per layer and 63 input
  vectors per layer.
* **Missing shift.** The shift buffers hold 5-bit shifts, but `inp_shift` is
  3 bits wide. A difference above 7 is saturated to 7. A more exact result
  would be zero, since an 8-bit value shifted by 8 or more is zero. With 7,
  an element of 128 or more stays at 1 instead.
* **Rounding.** Results are truncated, not rounded. The vector shift is 0
  when every positive value already fits in 8 bits, and when no lane is
  positive.
* **Bias alignment.** `bias_lshift` is a per-network setting. `accu_shift`
  saturates at 63.
* **Layer 0 inputs.** They may be signed, selected by a mode bit. All other
  activations are unsigned.
* **Memory timing.** Memory latency is one cycle. The schedule is arranged so
  that the cycle count equals the published formula exactly. The drain,
  scale and store cycles of one output vector are not overlapped with the
  next vector's reads, because the published count does not overlap them
  either.
* **Reset.** All control and datapath registers use an asynchronous
  active-low reset `rst_n`. Memory contents are not reset.

Not included: the host DSP itself, and any physical power switching. Only
the on/off decision is implemented.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The expected values are
computed in the testbench, not taken from the RTL.

* `tb_nne_top` is the end-to-end test, at the default sizes.
  * Run 1 is the keyword-spotting network (250x144x144x144x12) with random
    signed inputs and random weights.
  * Run 2 is a 30x20x40x5 network with unsigned inputs, different block
    addresses and all-zero weights in every second output vector.
  * A reference model written in the testbench computes the expected
    activations.
  * It checks every stored activation of the last two layers, the output
    shifts, the cycle count against the formula (and 7332 for run 1), and
    the number of loads and stores.
  * It counts how often each mechanism happens and fails if one never does:
    bias alignment, nonzero and zero vector shifts, missing-shift
    realignment and its saturation, ReLU, block/buffer swaps, and instances
    switched off.
* `tb_nne_ctrl` compares the controller's strobes cycle by cycle with the
  schedule, for random multi-layer configurations.
* `tb_addr_gen`, `tb_load_inp`, `tb_mac_unit`, `tb_scaling_logic`,
  `tb_shift_res`, `tb_nne_config`, `tb_mem_pwr_ctrl`, `tb_nne_memory` and
  `tb_sram_sp` test their blocks against models in the testbench with random
  stimulus.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/nne_pkg.sv tb/tb_nne_top.sv --top-module tb_nne_top -o sim
./obj_dir/sim
```

Replace `tb_nne_top` to run another testbench. All testbenches run in
seconds. The RTL lints cleanly with `verilator --lint-only -Wall`, except for
warnings about unused package constants and unused signal bits.
