# Event-driven convolutional SNN on a mesh of configurable nodes

This is synthesizable SystemVerilog for a spiking neural network (SNN)
accelerator built from one kind of tile: a **convolutional node**. Each node
holds an array of integrate-and-fire neurons, the kernels that feed them, and
an event router. Nodes sit in a 2-D mesh and talk to their four neighbours
with address events. A network is defined only by configuration. That
configuration says which kernels a node applies, which nodes receive its
output spikes, and its thresholds, leakage and refractory period. No
network-specific logic is built in.

The reference network is a four-layer convolutional SNN. It classifies the
four poker-card symbols (spade, heart, diamond, club) from 32x32 dynamic
vision sensor events:

| layer | map   | kernels per node | nodes | mesh positions (row, col) |
|-------|-------|------------------|-------|---------------------------|
| C1    | 28x28 | 1 (5x5)          | 6     | (1..6, 1)                 |
| S1    | 14x14 | sub-sampling in C1 |     |                           |
| C2    | 10x10 | 6 (5x5)          | 4     | (1..4, 2)                 |
| S2    | 5x5   | sub-sampling in C2 |     |                           |
| C3    | 1x1   | 4 (5x5)          | 8     | (1..4, 3), (5,2), (5,3), (6,2), (6,3) |
| C4    | 1x1   | 8 (1x1)          | 4     | (1..4, 4): one node per class |

The mesh has 6 rows and 4 columns. Positions (5,4) and (6,4) only route
events. The class is the output node that sends the most spikes.

## Event format

Everything on the mesh is an `event_t` (`rtl/snn_pkg.sv`, 35 bits):

| field     | bits | meaning |
|-----------|------|---------|
| `dst_row` | 8    | destination node row, 1-based |
| `dst_col` | 8    | destination node column, 1-based |
| `kid`     | 8    | kernel to apply at the destination |
| `x`, `y`  | 5+5  | pixel (neuron) address |
| `pol`     | 1    | polarity: 1 = positive, 0 = negative |

Routing is destination-driven. The header names the node that must process
the event, and the kernel ID says which of that node's kernels to use. In the
reference network a node's kernel ID is the index of the source feature map.

## Data flow through the mesh

1. **Splitter** (`splitter.sv`). Input events carry no destination. The
   splitter makes `n_copies` copies of each one (six in the reference
   network). It stamps copy *c* with a configured node address and kernel ID
   0, and sends it into the west port of that row, one copy per clock. A copy
   whose row is outside the mesh is discarded. The input handshake completes
   when the last copy has left.
2. **Router** (`router.sv`), one per node. It has five inputs and five
   outputs: N, E, S, W and the local convolutional unit.
   * A *transit* event goes first east or west until its column matches, then
     north or south. This is dimension-order routing against the node's
     *configured* local address. An event whose destination equals the local
     address goes to the local unit.
   * A *locally produced* event goes through the routing table. For each
     table entry (up to 8) the router sends one copy, stamped with that
     entry's destination row, column and kernel ID, out of the entry's
     direction. The unit's output FIFO is popped after the last copy. This
     fan-out is how one feature map feeds every node of the next layer.
   * Each output has its own round-robin arbiter. Mesh links are registered
     and use valid/ready. Each mesh input has a 4-deep FIFO.
3. **Convolutional unit** (`conv_unit.sv`). It convolves each received event
   with the selected kernel (next section).
4. **Merger** (`merger.sv`). It takes the east ports of the last column and
   forwards their events unchanged. An output event keeps the header of its
   last hop. In the reference configuration C4 node *c* addresses (c, 5), so
   `out_ev.dst_row` is the class.

Events routed off the north, south or west edge are dropped.

## The convolutional unit

This is the part that needs the most care to read. The blocks are:

* input FIFO and output FIFO (`event_fifo`, 16 deep)
* controller (`conv_controller`) with its address calculation (`addr_calc`)
* leakage counter (`leak_counter`)
* kernel memory: weights and per-kernel size and center shift
  (`kernel_memory`)
* neuron memory: one 16-bit potential per neuron (`neuron_memory`)
* rate-saturation memory: time of each neuron's last output spike
  (`rate_sat_memory`)

**Per event.** The controller pops an event and walks its kernel, one kernel
element (one neuron read-modify-write) per clock. For kernel element (i, j)
the updated neuron is

    row = x + i - shift_row,   col = y + j - shift_col

Neurons outside the configured map (`map_rows` x `map_cols`, at most 28x28)
are skipped. The weight is added for a positive event and subtracted for a
negative one. Weights are signed 8-bit. Compared with the cross-correlation
that most training tools use, kernels are stored flipped. So
`shift = size - 1` gives a "valid" convolution: a 5x5 kernel maps 32x32 to
28x28. `shift = size / 2` centres the kernel on the event.

**Firing.** After the update the new potential `v` is checked:

* `v >= pos_thr` gives a positive spike.
* `v <= -neg_thr` gives a negative spike.

Both thresholds are unsigned 8-bit magnitudes. A neuron that reaches a
threshold is reset to 0. It emits an output event only if it has never
spiked, or `now - last_spike >= refract` ticks. This is rate saturation: it
caps each neuron's spike rate. A spike that is held back still resets the
potential. The output address is `(row >> subsample, col >> subsample)`.
The sub-sampling layers S1 and S2 are done this way, with shift 1, inside
C1 and C2.

**Leakage.** The leakage counter divides the clock into ticks
(`TICK_CYCLES` = 100). Every `leak_per` ticks (0 disables it) it requests a
sweep. The controller then walks all 784 neurons and moves each potential
`leak_amp` towards 0. A pending leak goes before a waiting event.

**Traffic control.** A write into a full FIFO is dropped and flagged. This
happens when the router delivers into a full input FIFO, or a spike meets a
full output FIFO. Under overload, events are thinned rather than stalled, and
the mesh cannot lock up behind a slow unit.

**Timing.** After reset the unit clears both neuron memories in 784 clocks.
An event with an R x C kernel takes 1 + R*C clocks: 26 for 5x5, 2 for 1x1.
A leak sweep takes 784 clocks.

## Configuration

All parameters are bytes. They are written over one SPI bus shared by the
splitter and all 24 nodes: mode 0, MSB first, write-only. Each 32-bit frame
is

    [31:28] target row   [27:24] target column   [23:8] index   [7:0] value

The target is the node's physical mesh position; the splitter is target
0x00. Each node has its own SPI slave. Its configuration block keeps only its
own frames and sorts them by index:

| index | group | meaning |
|-------|-------|---------|
| 0x000 / 0x001 | router | local row / local column (used for routing) |
| 0x002 | router | number of routing-table entries (0..8) |
| 0x010 + 4e + {0,1,2,3} | router | entry e: destination row, column, kernel ID, direction (0 N, 1 E, 2 S, 3 W, 4 local) |
| 0x040 / 0x041 | neuron | positive / negative threshold |
| 0x042 / 0x043 | neuron | leakage amplitude / leakage period in ticks |
| 0x044 | neuron | refractory period in ticks |
| 0x045 | neuron | output sub-sampling shift |
| 0x046 / 0x047 | neuron | map rows / map columns |
| 0x080 + 2k | kernel | size of kernel k: rows[7:4], columns[3:0] (0 = unused) |
| 0x081 + 2k | kernel | center shift: row[7:4], column[3:0] |
| 0x100 + 25k + 5i + j | weights | kernel k, element (i, j), signed |

Splitter: index 0x000 is the number of copies (up to 6). Index 0x010 + 2c
is copy c's row and 0x011 + 2c is its column.

After reset no routes, kernels or splitter copies are configured. Both
thresholds are 255, leakage and refractory period are off, and the map is
28x28. Weights are not reset. SCLK must be slower than a quarter of the
system clock.

## What is specified and what was chosen here

The published description of this accelerator fixes these points:

* the node structure (convolutional unit, configuration block, router with
  four ports) and the unit's blocks (FIFOs, controller with leakage counter
  and address calculation, kernel, neuron and rate-saturation memories, SPI
  slave)
* event-per-convolution operation with positive and negative thresholds,
  global leakage towards the reset value, and rate saturation as a
  refractory period
* discarding events while a FIFO is full
* destination-driven routing with a routing table that holds next-layer
  addresses, directions and kernel IDs
* the 8-bit parameter format and the parameter groups
* the 6x4 mesh, the network of the table above, the six-copy splitter and the
  merger

It does not give the internals. Everything below is this design's own
choice and could differ from the original FPGA implementation:

* the event field widths and the SPI frame and index map
* column-first routing of transit events, round-robin arbitration, and
  valid/ready links with 4-deep port FIFOs
* one neuron per clock
* 16-bit potentials and time stamps, with reset to 0
* the polarity sign convention
* the center-shift formula, and sub-sampling as an address shift
* time stamps for the refractory check, and a leak sweep over all neurons
* FIFO depth 16 and a tick of 100 clocks

Limits to know:

* The refractory time stamps are 16 bits and wrap. A neuron that has been
  silent for exactly a multiple of 65,536 ticks can have one spike held back
  when it should not.
* All 24 positions are the same node with a 28x28 neuron array, including
  the two routing-only positions and the small C3/C4 maps. This follows the
  "generic node" idea at the cost of unused memory.
* The merger listens to all six east ports. Only rows 1..4 carry output in
  the reference network.
* The host side is not RTL: the processor that writes the configuration and
  replays the sensor events, storage, and the scripts that build
  configurations and classify. In the testbench the SPI driver and event
  source play that role, and the class is the C4 node with the most spikes.

## Files

`rtl/` holds one module or package per file:

```
snn_top            6x4 mesh + splitter + merger
  splitter         (spi_slave)
  merger
  conv_node        x24
    spi_slave, config_block
    router         (event_fifo x4)
    conv_unit
      event_fifo x2, kernel_memory, neuron_memory, rate_sat_memory,
      leak_counter, conv_controller (addr_calc)
snn_pkg            event_t, dir_e, cfg_wr_t, neuron_par_t, index map
```

The top's status outputs are per-node pulses, indexed (row-1)*4 + (col-1):

* input and output FIFO discards
* neuron firing
* spikes held back by the refractory period
* leak sweeps
* routing-table copies

There are also the splitter's discarded copies and a global `busy`.

## Verification

Every module has a self-checking testbench in `tb/` named `tb_<module>`.
Each prints `TB_RESULT checks=N failures=M`:

* **Memories, FIFO, SPI, configuration decoder, address calculation and
  leakage counter:** random and exhaustive checks against reference models.
* **`tb_conv_controller`, `tb_conv_unit`:** an integer model of the
  event-driven convolution gives the output events and every final potential
  after hundreds of random events with random kernels, shifts and thresholds.
  These testbenches also check leak sweeps, the refractory spacing, input
  FIFO overflow, and the clock counts quoted above.
* **`tb_router`, `tb_conv_node`:** random traffic under back-pressure. They
  check that each event arrives once, on the right port, in order, and with
  the right table stamps.
* **`tb_snn_top`:** runs the whole mesh at its default size.
  * It configures the reference network over SPI, which takes about 470k
    clocks.
  * Trained weights are not part of this repository, so it uses weights that
    make the result independent of event order. In each node all non-zero
    weights are equal, C1/C2 kernels have one non-zero element each, and only
    positive events are sent. A neuron then fires exactly floor(n / ceil(T/w))
    times for n contributions.
  * It sends 150 events one at a time. It requires the spike count of each C4
    node to equal a layer-by-layer count model, and each output header to be
    correct.
  * It then floods the input and switches on refractory periods, leakage and
    an invalid splitter copy. It checks that suppression, leak sweeps, FIFO
    discards and splitter discards each occurred.
  * It runs in about 4 s of wall-clock time under Verilator.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_snn_top \
    rtl/snn_pkg.sv $(ls rtl/*.sv | grep -v snn_pkg) tb/tb_snn_top.sv -o sim
./obj_dir/sim
```

Every module's parameters default to the reference sizes: 6x4 mesh, 28x28
neurons, 8 kernels up to 5x5, 8 routing entries, 6 splitter copies.
