# Serial and node-parallel MLP for isolated-word recognition

This RTL evaluates a small multi-layer perceptron that tells which of ten
spoken words (the digits 0–9 of a voice-dialling phone) is in a speech
segment. The segment arrives as 220 fixed-point features: 10 analysis frames
of 22 features each. One hidden layer of 24 sigmoid neurons feeds 10 sigmoid
output neurons, and the largest output names the word.

The same network is built twice, at the two ends of the area/speed trade-off:

* **`mlp_serial`**: one multiply-accumulate unit computes all 34 neurons
  one after another, taking 5588 clock cycles per input vector.
* **`mlp_parallel`**: one multiply-accumulate unit per hidden neuron (24 in
  all). All hidden neurons are computed at once, then the output layer. This
  takes 258 cycles per vector.

`mlp_top` holds both side by side. They share only clock and reset, and
each has its own ports (`s_*` and `p_*`).

## Number formats

Everything is two's complement fixed point. Only the widths come from the
original design. The binary-point positions are chosen here.

| quantity                            | bits | format  | range            |
|-------------------------------------|------|---------|------------------|
| input feature, hidden/output value  | 8    | Q1.7    | −1 … 0.992       |
| weight                              | 8    | Q2.6    | −2 … 1.984       |
| product                             | 16   | Q3.13   |                  |
| neuron sum (accumulator)            | 23   | Q10.13  | ±512             |
| activation (sigmoid output)         | 8    | Q1.7    | 0 … 127/128      |

23 bits are exactly enough for 220 products: the worst case is
220 · 2¹⁴ = 3 604 480 < 2²². The sum can therefore never overflow, and
nothing saturates before the activation function. The binary points are placed
so that the part of the sigmoid that is not saturated at 8 bits
(|sum| < about 5.5) spans about 1 % of all 2²³ sum codes. That small region
is all the activation table has to store.

`mlp_pkg` holds these sizes and types.

## Building blocks

**Functional unit** (`functional_unit`). An 8 × 8 signed multiplier, then
sign extension from 16 to 23 bits, then a 23-bit adder whose other operand is
the accumulator register. When `en` is high, the register takes
`acc + product`. When `first` is also high, it takes just `product`, so a new
neuron starts without a clearing cycle.

**Activation table** (`sigmoid_lut`). A combinational ROM for
f(s) = 1/(1+e⁻ˢ):

* Sums below −8.0 give 0.
* Sums at or above +8.0 give 127.
* Between those limits, sum bits [16:7] (after adding +8.0) pick one of 1024
  bins of width 2⁻⁶. Each bin holds round(128 · f(bin centre)), clipped to
  127.

The table is computed when the design is elaborated, from that formula. No
data file is involved. With these bins the output moves by at most half an
LSB from one bin to the next.

**Memories** (`sp_ram`). Single-port RAM with a registered, read-first
output: data appear one cycle after the address. It is used for the input
RAM (220 words) and the serial version's hidden-output RAM (24 words). It is
also used for the serial weight RAM (2¹³ words) and the parallel version's 24
weight RAMs (244 words for units 0–9, 220 for units 10–23).

**Output RAM** (`output_ram`). Holds the 10 output activations. As they are
written, it keeps the largest one and drives the 10-bit `word_bus` one-hot
with the winning word. On a tie the lower number wins. The host reads single
activations through `out_rd_addr`/`out_rd_data`.

**Counters** (`addr_counter`). Two counters generate every address:

* The **8-bit synapse counter** addresses the synaptic signals being read.
* The **5-bit neuron counter** addresses where results are written. In the
  parallel version it is also the select of the 24:1 multiplexer.

**Sum registers and 24:1 mux** (`sum_reg_bank`). Parallel version only. All
24 accumulators are copied into registers in one cycle, which frees the
functional units for the next layer. The mux then presents the saved sums
one at a time to the single activation table.

## The serial data path and its addressing

`serial_ctrl` is a five-state machine: IDLE, MAC, FLUSH, WRITE, DONE. For
each neuron:

1. **MAC**: issues one synapse address per cycle. Data come back a cycle
   later, so the functional unit's `en` and `first` are the issue strobes
   delayed by one register.
2. **FLUSH**: lets the last product into the accumulator.
3. **WRITE**: passes the sum through the table. The result goes into the
   hidden RAM for a hidden neuron, or the output RAM for an output neuron.

Each neuron therefore costs fan-in + 2 cycles:

    24 · (220 + 2) + 10 · (24 + 2) = 5588 cycles per vector

This matches the cycle count published for the serial design.

The weight address is the **5-bit neuron counter concatenated above the
8-bit synapse counter**: `{neuron, synapse}`, 13 bits. This needs care in the
output layer. There the synapse index only runs to 23, so `{k, j}` would hit
the hidden-layer weights. The control unit avoids this by running the 8-bit
counter over **224…247** in the output layer instead of 0…23:

* The low 5 bits of the counter (0…23) address the hidden RAM directly,
  through the read side of its address mux.
* The weight addresses `{k, 224+j}` lie above every hidden-layer address
  `{i, j<220}`.

The address mux of the hidden RAM selects the 5-bit counter when writing and
the low 5 bits of the 8-bit counter when reading. The input and hidden RAMs
are separate, so a hidden result can be written while the input RAM is being
read. In general, `OUT_BASE` is the first multiple of 32 at or above `N_IN`.

Weight map for loading (`w_addr`, 13 bits):

| weight                                     | address               |
|--------------------------------------------|-----------------------|
| hidden neuron *i*, input *j*               | `i·256 + j`           |
| output neuron *k*, hidden neuron *j*       | `k·256 + 224 + j`     |

## The parallel data path and its schedule

Every unit sees the same synaptic signal in a cycle. So each unit needs its
own weight, and each has a private weight RAM addressed by the same 8-bit
counter. `parallel_ctrl` runs three phases:

| phase       | states              | cycles | what happens |
|-------------|---------------------|--------|--------------|
| hidden MAC  | HMAC, HFLUSH, HSAVE | 222    | 220 synapses go to all 24 units; the sums are then copied into the register bank |
| output MAC  | OMAC, OFLUSH, OSAVE | 26     | see below |
| write-back  | OWRITE              | 10     | the 10 output sums pass through the table into the output RAM |

In the output MAC phase:

* The 5-bit counter walks Reg. 0…23 through the mux and the table.
* Each activation is registered, then broadcast as the synaptic signal of
  units 0…9.
* Their weights sit at addresses 220…243 of their RAMs. The 8-bit counter
  simply continues from 220.
* Units 10…23 are disabled.
* At the end, the 10 output sums are saved.

Total: **258 cycles per vector**. The original design reports 278 cycles for
its parallel control unit, but does not describe that unit's states. This
implementation does not reproduce the 20-cycle difference. The register in
front of the synapse mux lines the activation up with the one-cycle weight
read. It is this design's own addition.

Weight map for loading: unit `w_unit = i`, address `w_addr = j` for hidden
neuron *i* and input *j*. For output neuron *k* and hidden neuron *j*, use
unit `k` and address `220 + j`.

## Interface and protocol (both versions)

1. **Load weights.** While the design is idle (`in_ready` high), pulse
   `w_we` with an address and `w_data`, one weight per cycle. Weights stay
   loaded across vectors.
2. **Stream the input vector.** While `in_ready` is high, present the 220
   features on `in_data` with `in_valid`, one per cycle, feature 0 first.
   They are written at the 8-bit counter. The 220th feature starts the
   evaluation at once, and `busy` goes high.
3. **Collect the result.** `done` pulses for one cycle at the end. Then
   `word_bus` is one-hot with the recognised word and `out_rd_data` gives
   any of the 10 activations.

All loads are ignored while `busy` is high, and a simulation assertion flags
them. Reset is synchronous and active low. It clears the control unit,
counters and accumulators, but not the RAM contents.

## Where this departs from, or adds to, the original design

Taken from the original design:

* the network shape;
* all word widths;
* the functional unit's structure;
* the RAMs and their sizes;
* the two counters and the merged 13-bit serial weight address;
* the 24 private weight RAMs with 220+24 / 220 words;
* the 24 sum registers and the 24:1 mux;
* a single activation unit fed serially;
* the serial cycle count.

Chosen here:

* the binary points;
* the activation table's window, bin width and rounding;
* the output-layer counter range 224…247 in the serial version;
* registered RAM reads;
* both control units' states;
* the parallel schedule (258 cycles against 278 reported);
* the host ports for weights and read-back;
* the meaning of the 10-bit output bus (one-hot winner);
* reset behaviour.
* in the serial version, writing each activation in a cycle of its own,
  which gives the published cycle count. The separate input and hidden RAMs
  would also let that write overlap the next neuron's first read; this
  schedule does not use that.

Not built:

* The speech front end that produces the 220 features.
* The higher-level (C-like) descriptions of the same two architectures, which
  only change how the FPGA maps the memories.

Timing closure was not studied. The serial version's longest path is the
multiplier, the adder and the RAM address. The parallel version's longest
path is register → 24:1 mux → table → activation register.

## Sizes and limits

`mlp_serial` and `mlp_parallel` take `N_IN_P`, `N_HID_P` and `N_OUT_P`
(defaults 220, 24, 10). The counter widths of the original design set the
limits:

* `N_HID_P ≤ 32` (5-bit neuron counter).
* `N_OUT_P ≤ 16` (4-bit output address).
* Serial: `OUT_BASE + N_HID_P ≤ 256`.
* Parallel: `N_IN_P + N_HID_P ≤ 256`, and at least `N_OUT_P` hidden units,
  because the output layer runs on units 0…N_OUT_P−1.

An assertion at the start of simulation checks these. Cycle counts are:

* serial: `N_HID·(N_IN+2) + N_OUT·(N_HID+2)`;
* parallel: `(N_IN+2) + (N_HID+2) + N_OUT`.

A network with fewer hidden neurons runs unchanged on the default hardware
if the spare neurons get zero output weights.

## Files

`rtl/`

| file                 | contents |
|----------------------|----------|
| `mlp_pkg.sv`         | sizes, formats, types |
| `mlp_top.sv`         | both versions side by side |
| `mlp_serial.sv`      | serial data path |
| `serial_ctrl.sv`     | its control unit |
| `mlp_parallel.sv`    | parallel data path |
| `parallel_ctrl.sv`   | its control unit |
| `functional_unit.sv` | multiply-accumulate unit |
| `sigmoid_lut.sv`     | activation table |
| `sp_ram.sv`          | single-port RAM |
| `output_ram.sv`      | output RAM and word bus |
| `addr_counter.sv`    | address counter |
| `sum_reg_bank.sv`    | sum registers and 24:1 mux |

`tb/`

* One self-checking testbench per module: `tb_<module>.sv`.
* `tb_mlp_top.sv`: both versions at full size, same network and inputs,
  checked against an integer forward pass. Its last two vectors run 16- and
  8-neuron networks, zero-padded to 24. It also counts how often each
  data-path mechanism occurred.
* `tb_mlp_scaling.sv` with `mlp_scale_case.sv`: 8, 16 and 32 hidden neurons.
* `mlp_ref_pkg.sv`: the reference sigmoid and dot product.

Each testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the project root. Example for the full design:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/mlp_pkg.sv tb/mlp_ref_pkg.sv tb/tb_mlp_top.sv --top-module tb_mlp_top
    ./obj_dir/Vtb_mlp_top

For another testbench, replace `tb_mlp_top` with its name. The
packages must come first on the command line. Lint a module with:

    verilator --lint-only -Wall -y rtl rtl/mlp_pkg.sv rtl/mlp_top.sv

## Verification status

All testbenches pass at the default sizes:

* Both versions produce bit-identical outputs equal to the reference, on
  spread-out and heavily saturated networks.
* Both versions take exactly 5588 and 258 cycles.
* The end-to-end test exercises every mechanism at least once: the serial
  layer switch, hidden RAM write and read, the register-bank loads, the
  24:1 mux walk, the activation broadcast with units 10–23 idle, and both
  saturation ends and the table zone of the sigmoid.

Each testbench was also run against a deliberately broken copy of its module
and caught the fault.

The reference sigmoid uses the same bin scheme as the table. So the tests
show that the hardware matches that quantised function. They do not measure
how far it is from the ideal sigmoid: at most half a bin in the input and
half an LSB in the output.
