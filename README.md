# Eight compute sub-systems under one RRAM: a monolithic-3D DNN accelerator

An edge DNN accelerator that keeps all model weights in on-chip resistive RAM
(RRAM) has a layout problem in a planar process. Every RRAM cell needs an access
transistor. In a planar chip those transistors sit in the silicon under the array,
so the silicon below the memory is full. The compute logic must sit beside it, and
in the reference floorplan only one compute sub-system (CS) fits.

Monolithic 3D (M3D) integration removes that limit. A carbon-nanotube FET layer
is built above the RRAM and holds the access transistors. The silicon under the
array is then free for logic. With the same 15.5 mm x 15.5 mm footprint and the
same 64 MB of RRAM, that freed silicon holds **eight** compute sub-systems. To feed
them, the RRAM is split into eight banks, each with its own 128-bit port. Each CS is
identical to the single one of the planar design. The gain comes from running
eight in parallel with eight times the memory bandwidth.

This repository is the RTL of that M3D configuration:

* eight CS, each a 16x16 weight-stationary systolic array with 32 KB input and
  32 KB output SRAM buffers and a tile controller;
* eight 8 MB RRAM banks (a behavioural model), one per CS, each with a 128-bit bus;
* one memory-mapped host port to load weights and inputs, start tiles and read
  results.

The physical side has no RTL: the CNFET access-transistor tier, the inter-layer
vias and the 3D place-and-route. Those parts have no logic function of their own.

## Block structure

```
                         host port (128-bit, {cs, region, word})
                                         |
                                  m3d_accel_top
          +--------------+--------------+------ ... ------+
   compute_subsystem[0]  [1]           [2]               [7]
   |  cs_controller
   |  systolic_array (16x16 accel_pe)
   |  sram_buffer  input  2048 x 128 bit
   |  sram_buffer  output  512 x 512 bit
   +-- 128-bit private port --> rram_bank[0] (8 MB)   ... rram_bank[7]
```

| file | contents |
|---|---|
| `rtl/m3d_pkg.sv` | sizes, the host `region_e` enum, the `cs_cmd_t` tile command |
| `rtl/accel_pe.sv` | one multiply-accumulate PE with a stationary weight |
| `rtl/systolic_array.sv` | 16x16 PE grid with input skew and output de-skew |
| `rtl/sram_buffer.sv` | 1-write/1-read SRAM with one-cycle read latency |
| `rtl/rram_bank.sv` | behavioural RRAM bank, 8 MB x 128-bit port |
| `rtl/cs_controller.sv` | tile sequencer: weight load, streaming, write-back |
| `rtl/compute_subsystem.sv` | one CS: array, buffers, controller, host port, stall rule |
| `rtl/m3d_accel_top.sv` | eight CS plus eight RRAM banks behind one host port |

## The weight-stationary array and its timing

The array computes one 16x16 tile of a matrix product. Row `r` is input channel
`r`, column `k` is output channel `k`, and PE(r,k) holds weight W[r][k]. Each cycle
the array takes one input vector x of 16 activations. It returns
`y[k] = sum_r x[r]*W[r][k]` for all 16 output channels. For a convolution, one
vector is one output position (one pixel of an im2col row). Arithmetic is signed:
8-bit weights and activations, 32-bit sums.

Activations move one PE to the right per cycle and partial sums move one PE down.
For these to meet at the right PE, row `r` of the input is delayed by `r`
registers, so the rows enter staggered. Column `k` of the output is delayed by
`15-k` registers, so all 16 sums leave on the same cycle. A valid bit travels with
each activation, so a cycle with no input adds nothing. The result:

* throughput: one vector per cycle, 256 MACs per cycle per CS;
* latency: a vector presented in cycle `c` leaves the array, aligned, in cycle
  `c + 32` (`ROWS + COLS`).

Weights enter one row per cycle from the 128-bit RRAM word: byte `k` of the word is
the weight of column `k`. This is why the RRAM bus is exactly one array row wide.

## Tile commands

A CS runs one *tile command* at a time (`cs_cmd_t` in `m3d_pkg`). When written
through the host port, the 52-bit command starts a tile:

| bits | field | meaning |
|---|---|---|
| 18:0 | `w_base` | first of 16 consecutive RRAM words holding the weight rows |
| 29:19 | `i_base` | first input-buffer entry |
| 38:30 | `o_base` | first output-buffer entry |
| 50:39 | `count` | number of vectors T (0..2048; at most 512 distinct outputs) |
| 51 | `accumulate` | 0: write results; 1: add results to the entries already there |

The controller runs three phases:

1. **Load.** It issues 16 RRAM reads back to back. Each returning word is written
   into the next array row. Weights are not double-buffered: streaming starts only
   after the whole tile is loaded.
2. **Stream.** It reads T input vectors, one per cycle, and feeds them to the array.
3. **Drain and write back.** For each result it reads the old output entry in one
   cycle. In the next cycle it writes the result, or the result plus the old entry
   in accumulate mode.

Accumulate mode handles layers with more than 16 input channels. Run the first
16-channel slice in write mode, then add each further slice on top. Output channels
beyond 16, and extra positions, are split into separate tiles. Because each CS has
its own bank and buffers, these tiles can go to different sub-systems.

If `start` is in cycle `c`, `done` pulses in cycle `c + 16 + T + 32 + 5`. A tile of
T vectors therefore keeps the array busy for T of its `T + 53` cycles. Long tiles
amortise the weight load and the pipeline fill. Short tiles do not: the 7x7
layers at the end of ResNet-18 have T = 49, and their MAC utilisation is about
48%. Double-buffering the weights would recover most of the 16 load cycles, but
this design does not do it.

## Host port

`host_addr = {cs[2:0], region[1:0], word[18:0]}`. Data is 128 bits. A request
is accepted in a cycle where `host_req && host_ready`. Read data comes back on
`host_rvalid/host_rdata` one cycle later.

| region | write | read |
|---|---|---|
| 0 `REG_RRAM` | program RRAM word `word` of that CS's bank | read it back |
| 1 `REG_IBUF` | input-buffer entry `word` (16 activations) | read it back |
| 2 `REG_OBUF` | - | 128-bit slice `word[1:0]` of output entry `word>>2` |
| 3 `REG_CTRL` | `wdata[51:0]` is a tile command; the tile starts | `{done count[15:0], busy}` |

While a tile runs, its controller owns that CS's RRAM bank and both buffers. Any
host request to that CS except a status read is then held with `host_ready` low
until the tile ends. Queuing the next command is therefore just a write that
stalls until the CS is free. Other sub-systems keep taking requests. `cs_busy` and
`cs_done` give the state of each CS directly.

A layer is run by splitting it into parts, one per CS. For example, the top-level
testbench splits a 32-input, 64-output-channel layer over 64 positions into eight
parts. Each part is 16 output channels x 32 positions, done as two accumulating
16-channel tiles. Each CS gets the weights of its part in its own bank. All eight
CS run at once, and the layer finishes in about 180 cycles instead of the 1360 a
single CS needs.

On a real layer the gain is the same. A full ResNet-18 3x3 convolution of 512
channels on a 7x7 map takes 117,552 compute cycles on the eight sub-systems and
930,816 on one. That is a 7.9x speedup, at the same RRAM capacity and with each
CS unchanged. The RTL does not model energy. The eight sub-systems do the same
MACs and RRAM reads as one would, so the energy per layer should stay about the
same, and the energy-delay product should improve by about the speedup. The remaining gap to 8x is the few cycles per input
chunk in which the host is still queueing commands.

## Sizes: what is given and what is chosen

From the design description:
* 8 compute sub-systems
* a 16x16 weight-stationary systolic array in each
* 64 MB of RRAM in total, partitioned into eight banks
* a 128-bit memory bus per sub-system (8 x 128 bits in total)
* 32 KB input and 32 KB output local SRAM per CS
* a 20 MHz clock target (no timing constraint in the RTL)

Choices of this implementation (the description does not fix them):
* 8-bit signed operands and 32-bit sums
* the row/column mapping of channels, and row-at-a-time weight loading
* the buffer organisation: 2048 x 128-bit input entries, 512 x 512-bit output
  entries, one write and one read port, one-cycle reads
* one-cycle RRAM reads and writes (the real macro's access time, program-and-verify
  pulses and multi-level cells are not modelled)
* the tile command, accumulate mode, the host address map and the stall rule
* synchronous, active-low reset of all control and datapath registers (memories
  are not reset)

Left out:
* the 0.5 MB global SRAM of the architecture-comparison variants, whose role in
  this design is not specified
* weight double-buffering
* activation functions, pooling and im2col address generation, which the host is
  assumed to do

## How far to trust it

Every block is checked against values computed independently in its testbench,
and each testbench is shown to fail on a deliberately broken copy of its block.
The datapath arithmetic, the skew and latency, the controller's phase order and
cycle count, the host stall and a full network layer are all verified in
simulation. Nothing has been taken through timing closure or to silicon.

The RRAM bank is a behavioural stand-in for a process-specific macro. Its
one-cycle access and its array-based storage are modelling choices. A synthesis
flow should replace it with the foundry RRAM macro and its peripherals. The SRAM
buffers are plain arrays that a flow would map to SRAM macros.

The host port is deliberately simple and is meant for loading and test. A system
would put a bus bridge and DMA in front of it. One port writing every sub-system's
input buffer in turn is slow, and the compute-cycle figures above exclude that
loading time.

## Capacity

The RRAM weight capacity of 64 MB holds these networks at 8 bits per weight:
* ResNet-18 (about 11.7M weights)
* ResNet-34 (21.8M)
* ResNet-50 (25.6M)
* ResNet-101 (44.5M)
* ResNet-152 (about 60M)
* AlexNet (61M)

VGG-16 (138M weights) does not fit at 8 bits. It would need 4-bit weights or weights
reloaded from off chip.

Each weight tile is 256 bytes (16 RRAM words). A layer whose weights exceed one
8 MB bank, such as AlexNet's 37.7M-weight first fully-connected layer, must be
split by output channel across banks: 4.7 MB per bank over eight.

## Simulating

Every module has a self-checking testbench in `tb/<module>_tb.sv`. It prints
`TB_RESULT checks=N failures=M` and stops on its own. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/m3d_pkg.sv \
          tb/m3d_accel_top_tb.sv --top-module m3d_accel_top_tb -Mdir obj
./obj/Vm3d_accel_top_tb
```

Replace the name to run another testbench. The testbenches are:

* `accel_pe_tb`: random MACs, including bubbles and extreme values.
* `systolic_array_tb`: 700 vectors against a reference matrix product. It checks
  the 32-cycle latency of every vector and a one-vector-per-cycle rate.
* `sram_buffer_tb` and `rram_bank_tb`: data and latency. The RRAM test runs at the
  full 8 MB.
* `cs_controller_tb`: phase order, address wrap-around, accumulate mode and the
  exact `done` cycle.
* `compute_subsystem_tb`: a 32-channel layer over two accumulating tiles, plus the
  host stall.
* `m3d_accel_top_tb`: the eight-way layer described above, at the full default
  size (64 MB RRAM).
* `resnet18_layer_tb`: a complete ResNet-18 convolution layer at the default
  size. The layer is 3x3, 512 to 512 channels, on a 7x7 map with zero padding.
  It runs twice: once on all eight sub-systems, and once on sub-system 0 alone.
  The single-CS run has the compute and memory bandwidth of the planar
  one-CS chip. The testbench acts as the host. It does the im2col, spreads the
  output-channel tiles over the banks, and reloads the buffers in chunks. All
  25,088 outputs of each run are checked against a direct convolution. It takes
  about a minute to build and 20 seconds to run. Change the `C`, `K`, `HW` and
  `KS` localparams to run another layer shape.

The top-level build takes about a minute and the run well under a second. The
top-level test fails if any mechanism never occurs: write-mode and accumulate-mode
tiles, host stalls, busy status reads, and cycles with all eight sub-systems busy.
