# Runtime-reconfigurable FeFET compute-in-memory CNN accelerator

A compute-in-memory (CIM) accelerator stores the weights of a neural network as the
conductances of memory cells. It computes dot products by applying inputs as read voltages and
summing the column currents. Most CIM chips are laid out for one network: the number of tiles,
how partial sums are added and which buffers feed which arrays are all fixed at design time.
This design takes the opposite approach. One chip with a fixed amount of memory
(49 tiles, about 100 mm² at 32 nm in the reference configuration) runs many different CNNs,
from VGG-8 to DenseNet-121. The hardware only has to supply four switching points; the host
decides how a layer is mapped:

* **Steerable input path.** A two-stage demultiplexer sends each tile-bus word to any set of
  PEs and subarray columns. The same path carries input activations and new weights.
* **Weight reloading.** FeFET arrays are reprogrammed row by row through their bit lines. A model
  larger than the chip is therefore run in parts, with weights streamed in from DRAM through
  the global buffer.
* **Bypassable adder trees.** Every adder in the tile accumulator can be skipped, so the tile
  can sum any subset of its 9 PEs. This is what allows kernel sizes other than 3×3.
* **Flexible global accumulation.** Each input of each chip-level adder tree chooses one tile
  of its tile row, or feeds back the tree's own result. Tiles holding different input rows of
  a layer are added ("accumulated vertically"). Tiles holding different output columns stay
  apart ("concatenated horizontally").

The RTL is in SystemVerilog-2017. Everything is synthesizable except the FeFET subarray, which
is a behavioural model of an analog macro (see below).

## Hierarchy and sizes

| level | contents (defaults) | module |
|---|---|---|
| chip | 7×7 tiles, 2 MB global buffer, 7 global adder trees, activation, pooling | `cim_chip` |
| tile | 3×3 PEs, input demux, 9-input bypassable adder tree per lane, output buffer | `tile` |
| PE | 4×4 subarrays, 8192-bit PE buffer, RS/BL bus select, shift-adders, adder tree, output buffer | `pe` |
| subarray | 128×128 FeFET cells at 4 bit/cell, column mux 8:1, 16 ADCs of 5 bit | `fefet_subarray` |

Data are unsigned: 8-bit weights (two 4-bit cells) and 8-bit activations. Bus widths:

* input bus: 128 rows × 4 row-subarrays = 512 bits;
* tile bus and global-buffer word: 512 bits;
* weight bus and PE buffer: 512 × 4 cell bits × 4 column-subarrays = 8192 bits.

All sizes are parameters, collected in `rtl/cim_pkg.sv`. Other sizes can be simulated, with
one limit: subarrays must be square, because one bus word serves both as an input bit-plane
(one bit per row) and as a weight bit-plane (one bit per column).

## How one dot product moves through the chip

This section covers the part that is hardest to follow from the code alone.

### Weight layout inside a PE

A PE has `ROW_SA × COL_SA` subarrays. Its input channels run down the rows, 512 in total.
Its output (weight) columns run across: each subarray has 128 cell columns, which hold
64 weights. The layout works as follows:

* Weight `w` of a subarray occupies two adjacent columns. The even column holds bits 3:0 and
  the odd column holds bits 7:4.
* The column multiplexer groups the columns in runs: column group `g` consists of columns
  `16g … 16g+15`, and ADC `k` converts column `16g+k`. Both cells of a weight are therefore
  converted in the same group.
* Lane `j·8+w` of a PE result for group `g` is PE weight column `j·64 + g·8 + w`, where `j` is
  the column-subarray.

### Programming weights (reloading)

FeFET cells are written one row at a time, so the PE buffer is large enough for one row of all
16 subarrays (8192 bits). Slot `s = j·4 + c` of the buffer holds bit `c` of every cell in
column-subarray `j` for that row, laid out as `[row-subarray][column]`.

The host fills a PE buffer with 16 tile-bus words. The stage-1 demux picks the bit-plane `c`
(`xfer_cb_addr`), and the stage-2 demux picks the PE and column-subarray (`xfer_sel`). A
`PE_PROGRAM` command then switches the PE bus to the bit lines and writes row `pe_prog_row` of all
16 subarrays at once. At full size, a PE takes 128 × (16 × 2 + 2) = 4352 host cycles, and PEs
and tiles can be programmed at the same time with multi-hot masks.

### Computing

Inputs are applied bit-serially, one bit-plane of the 512-element input vector at a time:

1. The host sends the bit-plane as a tile-bus word into slot 0 of the chosen PE buffers
   (`xfer_cb_addr = 0`, with the column-subarray-0 bit of each chosen PE set in `xfer_sel`).
2. A `PE_MAC` command with `pe_bit_idx = b` drives slot 0 onto the read-select lines of all 16
   subarrays. Each subarray sums its selected column group and converts it. The shift-adders
   add `code << b`.
3. After 8 bits (`pe_clear` on the first, `pe_last` on the last), each shift-adder combines its cell
   pairs as `lo + (hi << 4)`. The PE adder tree adds the 4 row-subarrays, and the 32 results go
   into the PE output buffer under group `g`.

A full PE output (256 columns) needs 8 groups × 8 bits = 64 MAC commands. The ADC quantises
each subarray column separately, before any digital addition. This is why results at the
default 5-bit ADC are approximations, and why the testbenches that expect exact dot products
use a wide ADC with step 1.

### Tile accumulation: `reconfig_adder_tree`

`tacc_*` takes one column group from all 9 PE output buffers and feeds each of the 32 lanes
through a 9-input adder tree, writing the result into the tile output buffer.

The tree is a full binary tree over PEs 1–8, plus a last node that adds PE 9. Node `n` has
two select bits:

| `bp_sel[2n]` | `bp_sel[2n+1]` | node output |
|---|---|---|
| 1 | – | sum of both inputs |
| 0 | 0 | upper input passed through |
| 0 | 1 | lower input passed through |

Nodes 0–3 take PE pairs (1,2) … (7,8), nodes 4–5 take the outputs of nodes 0–3, node 6 takes
nodes 4–5, and node 7 adds node 6 and PE 9. Examples, writing `bp_sel[0]` first:

* `00xxxxxx00xx0000` → PE 1 alone;
* `1x1x1x1x1x1x1x00` → PEs 1–8;
* `xxxx1x1xxx1x0100` → PEs 5–8;
* `1x1x1x1x1x1x1x1x` (`16'h5555`) → all nine.

This is how one tile serves different kernel sizes:

* 3×3 kernels: all nine PEs.
* 2×2 kernels: PEs 1–4 and 5–8 each hold one kernel. They are summed together when they hold
  different input channels, or read out separately (two `tacc` commands) when one duplicates
  the other.
* 4×4 kernels: a 16-PE kernel split 8 + 8 across two tiles of one tile column.

### Global accumulation: `global_accumulator`

There are 7 trees (one per tile row) of 7 inputs each. Input `k` of every tree has a
multiplexer that selects:

* `mux_sel = c`: the output of tile `(k, c)`;
* `mux_sel = 7`: the registered output of tree `k`.

The trees use the same bypass coding as the tile tree. For 7 inputs, that is a 4-input binary
tree followed by three chained nodes. In one step a tree can add one tile from each tile row,
which is a vertical sum down a tile column. The feedback input continues a sum over further
steps, for layers that span more tiles than the tree has inputs.

The accumulators are 24 bits wide. For long sums the host sets `gacc_trunc`: every tile value
is shifted right by that amount before it enters, so precision is traded for range. Sums wrap
modulo 2²⁴.

### Activation, pooling, write-back

`post_*` sends one tree register through `activation_unit`:

* ReLU: arithmetic right shift by `act_shift`, then clamp to 0…255.
* Sigmoid: the shifted value is read as a fixed-point number with 4 fraction bits and passed
  through a four-segment piecewise-linear curve, mapped to 0…255.

The result then goes through `pooling_unit`, which takes the max or floor-average over a
window of 2^`pool_win_log2` consecutive post commands. When a window completes, the vector
appears on `res_data` and is written to global-buffer word `post_wb_addr`, at bits 255:0.

## Host interface and timing (`cim_chip`)

The chip has no sequencer. Every step is a single-cycle command from the host, and command
groups with no dependency between them may be issued in the same cycle.

| command | effect | latency |
|---|---|---|
| `host_wr_*` | write a global-buffer word | lands at the clock edge |
| `xfer_*` | global buffer → tile bus → PE buffers | word reaches the PE buffers at the end of the next cycle |
| `pe_*` `PE_PROGRAM` | buffer → one row of all subarrays of the masked PEs | at the clock edge; the last buffer write must be at least one cycle earlier |
| `pe_*` `PE_MAC` | one input bit of one column group | result stored 3 cycles after the `last` command; `pe_done` pulses then |
| `tacc_*` | tile tree → tile output buffer | at the clock edge |
| `gacc_*` | global trees load | at the clock edge; tiles show group `gacc_grp` combinationally |
| `post_*` | activation + pooling | `res_valid` the next cycle when a window completes |

A result write-back and a host write must not happen in the same cycle (this is asserted).

At full size, the end-to-end testbench measures:

* programming one PE: 4352 cycles;
* one 8-bit input vector through one column group, from the first bit-plane transfer to
  `pe_done`: 26 cycles.

## What is modelled rather than designed

* **`fefet_subarray`** is a behavioural model, not logic. It takes a cell's conductance to be
  its stored level and forms each column sum exactly. The ADC is linear with step 60 (full
  scale 128 × 15 over 32 codes) and saturates at 31. The real macro's ADC reference levels,
  device variation and on/off ratio are not modelled. Swapping in a macro means keeping its
  ports: bit-plane BL data, one RS bit per row, a column-group select, and registered ADC
  codes.
* The **H-tree interconnect** (global bus and the tile input/output trees) is plain wiring.
* **DRAM** is outside the chip. Its side of the global buffer is the host write port.
* The **mapping of a network onto tiles** is host software. It decides the tile count per layer,
  duplication for small layers and splitting for large ones, and then sets the masks and
  selects described above.

## Own choices and departures

These points are this implementation's decisions, not part of the architecture it follows:

* The column-mux ratio (8 columns per ADC), the ADC transfer curve, and the order of columns
  and cells inside a weight.
* A 7×7 tile grid for the 49-tile chip. The global accumulator scales to 7 trees of 7 inputs;
  the 6-tile-row example of the architecture has 6 of 6.
* The bypass rule for trees whose input count is not 9.
* The single-cycle command interface, all pipeline latencies, 24-bit partial sums and
  accumulators, truncation by right shift, and wrap-around on overflow.
* The ReLU scaling and the piecewise-linear sigmoid.
* Power-of-two pooling windows streamed by the host.
* Unsigned weights. Signed weights would need an offset or a differential column pair, and
  neither is built.
* No PE-to-PE forwarding of input activations. In a spatial mapping, where each PE holds one
  kernel position, neighbouring PEs could reuse the input; here the host sends each PE its own
  bit-planes.
* No separate tile input buffer. The global-buffer read register and the PE buffers play that
  role.
* Write-back stores bytes. Turning a layer's output into bit-planes for the next layer is left
  to the host.

## Capacity against the evaluated networks

The full chip holds 49 × 9 × 16 × 128 × 128 = 115.6 M cells, or 57.8 M 8-bit weights.

* VGG-8 (13 M parameters, 21 tiles after mapping) and ResNet-18 (11.5 M, 23 tiles) fit at
  once.
* GoogLeNet (6.6 M) and DenseNet-121 (8 M) need more than 49 tiles once mapped. They run with
  weight reloading.
* AlexNet (61 M) exceeds the raw capacity and also runs with reloading.

## Simulating

Each testbench in `tb/` checks itself and prints `TB_RESULT checks=N failures=M`. Example with
plain Verilator:

```
verilator --binary --timing --assert rtl/cim_pkg.sv -y rtl -y tb tb/tb_cim_chip.sv --top-module tb_cim_chip
obj_dir/Vtb_cim_chip
```

Testbenches:

| testbench | what it checks |
|---|---|
| `tb_fefet_subarray` | programming, column sums, column mux, ADC saturation |
| `tb_shift_add` | bit-serial accumulation and cell combination |
| `tb_pe_input_buffer`, `tb_pe_bus_select`, `tb_tile_input_demux` | input-side switching |
| `tb_reconfig_adder_tree` | the three bypass examples above, and random selects against a node-by-node reference |
| `tb_pe` | exact dot products of a reduced PE; the 3-cycle latency |
| `tb_tile` | 9 PEs with different weights; tile sums for four bypass settings |
| `tb_global_accumulator` | tile selection, column sums, feedback over several steps, truncation |
| `tb_activation_unit`, `tb_pooling_unit`, `tb_global_buffer` | post-processing and buffer |
| `tb_cim_chip` | reduced chip (2×2 tiles, 16×16 subarrays), end to end |
| `tb_cim_chip_full` | the full-size chip (default parameters) through one complete operation |

`tb_cim_chip` splits a 128-input, 16-output layer over two tiles of one column. It exercises:

* weight programming and reloading;
* input and weight transfers;
* tile bypass;
* one-step and feedback global accumulation, and truncation;
* ReLU and sigmoid;
* max and average pooling;
* write-back.

It counts each of these and fails if any never happened.

`tb_cim_chip_full` runs the default 49-tile chip. It programs all 128 rows of one PE, applies an
8-bit input vector and takes the result through both trees, ReLU and write-back. It checks the
result with the 5-bit ADC quantisation included, and it checks the cycle counts given above.
It elaborates 7056 subarray instances, so building it takes Verilator about 16 minutes and
6.3 GB of memory. The run itself takes a few seconds.
