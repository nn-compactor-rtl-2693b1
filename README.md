# NN Compactor accelerator: fully connected networks in little on-chip memory

Small neural networks run on IoT-class FPGAs tend to be limited by block
RAM, not by logic: 16-bit weights for a 784-128-128-10 MNIST classifier
already need about 1.9 Mbit. This accelerator keeps every weight in on-chip
memory in a **5-bit dual-track format**. Each weight gets one flag bit and
four data bits, and the flag says which four bits of an 8-bit fixed-point
weight were kept. Small weights keep their low-order bits and large weights
their high-order bits. That cuts weight storage to 5/16 of a 16-bit design
(590 kbit for the MNIST network) while the many near-zero weights keep their
resolution.

The datapath is a row of identical processing units (PUs), 128 by default.
They compute the neurons of one layer in parallel. One input neuron is
broadcast to all PUs per cycle, and each PU multiplies it by its own weight
and accumulates.

The RTL follows the NN Compactor accelerator architecture (Hong, Lee and
Park). That source describes the blocks, the weight format, the PU
structure and the number formats. It does not describe the scheduling,
handshakes, widths and reset. Those are this implementation's own choices
and are marked as such below and in each file's header.

## The dual-track weight code

Weights are first quantized to 8-bit two's complement Q2.6, `w[7:0]`: a sign
bit, one more integer bit and six fraction bits, so the range is [-2, 2).
This is done offline. The weight is then compacted to 5 bits, `{flag, d[3:0]}`:

| range of the weight | flag | d[3:0] holds | decoder rebuilds |
|---|---|---|---|
| `w >= 0.25` or `w < -0.25` (MSB-centric) | 1 | `w[7:4]` | `{d, 4'b0000}`, step 0.25 |
| `-0.25 <= w < 0.25` (LSB-centric) | 0 | `w[7], w[3:1]` | `{d3, d3, d3, d3, d2, d1, d0, 1'b0}`, step 1/32 |

Small weights have `w[6:4]` equal to the sign bit, so those bits need not be
stored. The bits that are dropped are rounded by the encoder and rebuilt as
zero by the decoder. The decoder (`nnc_weight_decoder`) is a 7-bit mux, one
per PU lane. The multiplier then works on the 8-bit Q2.6 value.

The encoder is not hardware: weights arrive already encoded. The
testbenches contain a reference encoder. It sends a value to the large
track when it lies outside [-0.25, 0.25). On each track it rounds to the
nearest step and saturates at the largest code (1.75 on the large track).

`WTYPE` also selects two plain formats: 16-bit Q6.10 and 4-bit Q2.2. These
are the formats the dual-track code is normally compared against. They have
no flag memory, and the decoder passes them through.

## How a layer is computed

Neurons and biases are 16-bit Q6.10 everywhere.

Consider a layer with `n_in` inputs and `n_out` neurons on `NUM_PU` PUs.
Each PU owns `G = ceil(n_out / NUM_PU)` neurons: PU `p` computes neurons
`g*NUM_PU + p` for `g = 0 .. G-1`. The controller walks through
`(i, g)` pairs, input-major, one per cycle:

```
for i in 0 .. n_in-1            # input neuron, broadcast to all PUs
  for g in 0 .. G-1             # neuron group
    weight row  w_base + i*G + g   -> one weight per PU
    bias row    b_base + g         -> used when i == 0
```

Each PU therefore interleaves G partial sums. The partial sum of neuron `g`
produced in one cycle is needed again exactly G cycles later. This is the
job of the PU's **forwarding block**: a register chain behind the
accumulator with a tap mux, set to `tap = G-1`. It returns that partial sum
to the adder without a memory round trip or a pipeline hazard. With 4 taps
(`FWD_TAPS`), layers of up to `4*NUM_PU` neurons fit. That is 512 at 128
PUs, the widest layer of the networks this design targets.

The first layer reads its inputs from the input buffer. Later layers read
them from the neuron memory at row `i / NUM_PU`, lane `i % NUM_PU`.

On the last input of a neuron group, the PUs' results are written as one
row: to the neuron memory for a hidden layer, or to the output buffer for
the last layer. A layer writes its results only after it has read all of its
inputs. One neuron memory region is therefore enough, and it is reused by
every layer.

**Timing.** A layer takes `n_in*G + 6` cycles:
- `n_in*G` issue cycles;
- 5 cycles to drain the memory read, the three PU stages and the write-back;
- 1 cycle to start the next layer.

From the last input accepted to the first output valid takes the sum of
these over all layers, plus 2 cycles. For 784-128-128-10 on 128 PUs that is
1,060 cycles, or 10.6 µs at 100 MHz, after loading 784 inputs.

## Processing unit

```
neuron_in --\
weight_in ---[x]--> prod_q --\
                              [+]--> acc_q --> >>>F, saturate --> ReLU? --> neuron_out
bias_in ----> bias_q --[mux]--/        |
                         ^  first      |
                         +--- forwarding chain (tap = G-1) <--+
```

The PU has three register stages:
1. The product of the neuron and the weight is registered, at full
   precision. The bias is registered beside it.
2. The adder adds either the bias or the forwarded partial sum. The bias is
   chosen on the first input and is shifted left by the weight's fraction
   bits (F = 6 for dual-track).
3. On the last input, the accumulator is shifted right by F, with floor
   rounding, and saturated to 16 bits.
   - ReLU is a mux that takes the sign bit as its select and outputs X or 0.
   - The output mux picks either the ReLU output (hidden layers) or the
     linear value (last layer).
   - The result goes into the output register.

The accumulator is `16 + weight width + 10` bits wide (34 for dual-track),
so 1024 terms cannot overflow it. The wide accumulator, floor rounding and
saturation are this implementation's choices.

## Memories and loading

The memories are sized from the topology at build time. Every memory row
holds one entry per PU:

| block | row holds | rows (784-128-128-10, 128 PUs) |
|---|---|---|
| weight memory: flag + encoded weight | NUM_PU x (1 + 4) bits | 1040 (665,600 bits) |
| bias memory | NUM_PU x 16 bits | 3 |
| neuron memory | NUM_PU x 16 bits | 1 |
| output buffer | NUM_PU x 16 bits | 1 |
| input buffer | one 16-bit input | 784 entries |

All reads are synchronous, with one cycle of latency as in block RAM.

Weights and biases are written one entry per cycle through the top's load
ports (`wload_*`, `bload_*`). These ports stand in for the memory
initialization files of an FPGA flow.
- The weight from input `i` to neuron `j` of layer `l` goes to row
  `w_base(l) + i*G + j / NUM_PU`, lane `j % NUM_PU`. For dual-track, the data
  is `{flag, code}`.
- Its bias goes to row `b_base(l) + j / NUM_PU`, same lane.
- `w_base`, `b_base`, `groups` and the other sizing functions are in
  `rtl/nnc_pkg.sv`.
- Lanes beyond `n_out` in the last group are computed but never used.

## Control

`nnc_fsm` sequences one inference. The states are IDLE, LOAD (accept the
input vector), then LAYER and RUN for each layer, then OUTPUT (stream the
results). Per-layer settings are constants computed from `TOPOLOGY`.

`nnc_controller` runs one layer. It generates the memory addresses, the PU
control word (`first`, `last`, `relu`, `tap`) and the write-back strobe.
Each of these is delayed so that it arrives together with the data it
belongs to.

At the top level:
- `start` begins an inference;
- inputs arrive on a valid/ready stream (`in_*`);
- outputs leave on a valid/ready stream (`out_*`, with `out_last`);
- `done` pulses at the end.

## Parameters (top: `nn_compactor`)

| parameter | default | meaning |
|---|---|---|
| `WTYPE` | `WT_DUAL5` | weight format: `WT_DUAL5`, `WT_FIXED16`, `WT_FIXED4` |
| `NUM_PU` | 128 | processing units |
| `TOPOLOGY` | `'{784,128,128,10,0}` | layer sizes, input first; up to 4 weight layers, unused entries 0 |
| `FWD_TAPS` | 4 | forwarding taps; a layer may have at most this many neuron groups |

The PU count would normally come from a design-space search. That search
halves the PU count while the network keeps at least 90% of its best
speed. It picked 64 PUs for the small MNIST and CNAE-9 networks and 128 for
the rest. Run that choice offline and pass the result as `NUM_PU`.

## Files

- `rtl/nnc_pkg.sv`: number formats, weight-format helpers, sizing functions,
  and the control and layer-settings structs.
- `rtl/nnc_weight_decoder.sv`, `nnc_weight_memory.sv`, `nnc_bias_memory.sv`,
  `nnc_neuron_memory.sv`, `nnc_input_buffer.sv`, `nnc_output_buffer.sv`:
  the storage blocks.
- `rtl/nnc_pu_forwarding.sv`, `nnc_processing_unit.sv`: the PU.
- `rtl/nnc_controller.sv`, `nnc_fsm.sv`: the control blocks.
- `rtl/nn_compactor.sv`: the top module.
- `tb/tb_<module>.sv`: a self-checking testbench for each module.
- `tb/tb_nn_compactor.sv`: an end-to-end test. It builds 4 PUs with a
  6-16-7-12-3 network, which uses every forwarding tap, saturation, ReLU,
  input gaps and output back-pressure, and checks outputs and cycle counts
  against a reference model.
- `tb/tb_nn_compactor_full.sv`: the same test on the default build, with
  128 PUs and 784-128-128-10.
- `tb/tb_nnc_workloads.sv` with `tb/nnc_net_runner.sv`: the six reference
  networks on their own builds. These are MNIST 784-64-10 and 784-128-128-10,
  CNAE-9 856-64-9 and 856-128-128-9, and Forest 54-128-128-7 and
  54-128-512-128-7. MNIST also runs in the 16-bit and 4-bit formats.

The weights are random. Trained networks are not included, so the tests
check arithmetic exactness and timing, not classification accuracy.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb rtl/nnc_pkg.sv \
    tb/tb_nn_compactor.sv --top tb_nn_compactor
./obj_dir/Vtb_nn_compactor
```

Replace the testbench name to run any other test. Each one prints
`TB_RESULT checks=N failures=M`. Running the full-size test takes under a
second. The workload test takes a few minutes to compile and seconds to run.

## Where this departs from, or adds to, the source design

- **Dataflow and schedule.** The source gives the blocks and the PU
  structure but not how a layer is mapped onto them. The input-broadcast,
  input-major interleaving of neuron groups described above is this design's
  choice. So is the use of the forwarding chain to hold interleaved partial
  sums.
- **Forwarding depth.** The number of forwarding registers is not given.
  4 taps covers the reference networks at 128 PUs.
- **"Bias or Neuron Out" input.** In the source drawing this PU input can
  also carry a neuron output. How that path is used is not described, so
  here it only ever carries the bias.
- **Accumulator, rounding and saturation** are not given; see the
  Processing unit section.
- **Which layers use ReLU.** The source says ReLU is the activation but not
  which layers use it. Here the last layer is linear.
- **Loading.** Load ports replace memory initialization files. The
  valid/ready streams and the start/done control are this design's choice.
- **Reset.** An asynchronous, active-low `rst_n` clears control state only.
  Memory contents and datapath registers are not reset.
- **Build-time topology.** The network shape is fixed by `TOPOLOGY` when
  the design is built, as with a generated accelerator. A default build runs
  only 784-128-128-10.
- **Not included.** The offline flow that surrounds the hardware is not part
  of this RTL: training, quantization and encoding, and the PU-count search.
  FPGA-specific mapping to block RAM and DSP blocks is left to synthesis.
