# Binarized convolution on a register-bridge PE array

This RTL computes the convolution layer of a binarized neural network (BNN).
Every activation and every weight is a single bit: logic 1 stands for +1 and
logic 0 for -1. The product of an activation and a weight is then their XNOR,
and a sum of N products is fixed by how many of the N XNORs are 1:
`sum(+-1) = 2*count - N`. The datapath therefore has no multipliers. Each
processing element (PE) XNORs a block of bits and counts the ones.

The main idea is about registers, not arithmetic. PEs in a regular array
usually keep private copies of the data they work on. Here, two vertically
adjacent PEs share a *bridge register* (BREG) that sits between them, and both
read it directly. The pair shares one copy of the kernel. It also shares the
input rows the two PEs have in common: a K x K window for the upper PE and the
same window one row lower for the lower PE need only K+1 rows, not 2K. Along a
row of PEs, the input moves through the BREGs one column per clock cycle. Each
BREG keeps only the columns that it and the BREGs further along still need. In
the default configuration, 1,944 register bits hold all kernel and input data
of 24 PEs. Private per-PE registers would need 3,240 bits.

## How the convolution loops map onto the hardware

A convolution layer is four nested loops (innermost first):

| loop   | runs over                        | mapping in this design                                  |
|--------|----------------------------------|---------------------------------------------------------|
| Loop-1 | kernel x, y (K x K)              | fully parallel inside a PE                              |
| Loop-2 | input channels                   | `DU` (= d) channels in parallel in a PE; the rest over time in *slices* |
| Loop-3 | output x, y                      | `X` PEs across, `Y` PEs down: one X x Y output *tile* at a time |
| Loop-4 | output channels (kernels)        | `Q` kernels at once, time-shared on every PE            |

So each PE does K·K·d XNORs and one popcount per cycle. Each PE has `Q`
accumulators, one per kernel in flight. For each input slice, the Q kernels
come by on Q consecutive cycles, in the order W0/slice 0, W1/slice 0, …,
W(Q-1)/slice 0, W0/slice 1, … . The input slice stays in place for those Q
cycles. So the input is fetched from outside once per group of Q kernels,
not once per kernel. The kernels of the group are cached in an on-chip buffer
and fetched only once per layer.

Defaults: K = 3, d = 6, X = 4, Y = 6 (24 PEs), Q = 4, 128 input channels.
A kernel then has Nk = 3·3·128 = 1152 weights. An accumulator needs
ceil(log2(1153)) = 11 bits. A kernel is consumed in ceil(128/6) = 22 slices.

## The bridge-register row (the part worth reading twice)

Take one *pair row*: two rows of PEs (output rows 2p and 2p+1 of the tile)
with X BREGs between them. Column c = 0 is where data enters, and column c
computes output column c of the tile.

```
 feed ──► BREG c=0 ──► BREG c=1 ──► BREG c=2 ──► BREG c=3
          6 columns    5 columns    4 columns    3 columns      (K=3, X=4)
          uses 0..2    uses 1..3    uses 2..4    uses 3..5      (input columns)
           ▲     ▼      ▲     ▼      ▲     ▼      ▲     ▼
         PE up PE dn  PE up PE dn  ...
```

* Column 0 receives an input slice K+X-1 columns wide and K+1 rows tall
  (rows 2p … 2p+K of the tile, `DU` channels deep). Each clock cycle, a BREG
  passes its contents to the next column minus the first input column, which
  only its own PEs needed. Column c therefore stores K+X-1-c columns.
* Each BREG also holds the current kernel slice and a small tag. The tag
  carries the kernel index, whether this is the first slice (start a new sum)
  and whether it is the last one (the sum is finished). Kernel and tag move
  one column per cycle too. Column c sees the same kernel/input pairing as
  column 0, exactly c cycles later.
* The upper PE reads rows 0..K-1 of the BREG's first K columns, and the lower
  PE reads rows 1..K of the same columns.
* All pair rows receive the same kernel stream at the same time, each with
  its own input rows. Pair row p covers input rows 2p..2p+K, so neighbouring
  pair rows overlap by K-1 rows. Those rows are fetched for both pair rows
  and held in both of their BREGs.

Cycle by cycle at the feed, for Q = 2 (numbers in brackets are input slices):

| cycle | column 0       | column 1       | column 2       | column 3       |
|-------|----------------|----------------|----------------|----------------|
| 0     | W0 [0]         | –              | –              | –              |
| 1     | W1 [0]         | W0 [0]         | –              | –              |
| 2     | W0 [1]         | W1 [0]         | W0 [0]         | –              |
| 3     | W1 [1]         | W0 [1]         | W1 [0]         | W0 [0]         |

Register bits for kernel and input data, with C = X·(K + (X-1)/2) input
columns in a pair row:

| holding        | formula            | default (4 x 6, K=3, d=6) |
|----------------|--------------------|---------------------------|
| kernels        | X·Y·K²·d / 2       | 648                       |
| input data     | C·Y·(K+1)·d / 2    | 1296                      |

With private per-PE registers the same data takes X·Y·K²·d = 1296 and
C·Y·K·d = 1944 bits. At K = 9 the same formulas give 13,392 bits against
25,272 bits.

## Block overview

| file                       | block                                                                 |
|----------------------------|-----------------------------------------------------------------------|
| `rtl/bnn_pkg.sv`           | tag type `ktag_t`, size functions (accumulator width, BREG columns, slice count) |
| `rtl/bnn_xnor_popcount.sv` | XNOR of N bit pairs and count of ones: the PE's functional unit     |
| `rtl/bnn_pe.sv`            | PE: functional unit, adder, Q accumulators, result register           |
| `rtl/bnn_breg.sv`          | bridge register of one PE pair: kernel slice, tag, K+1 x COLS x d input bits |
| `rtl/bnn_pe_array.sv`      | X x Y PEs and X x Y/2 BREGs, wired as above                           |
| `rtl/bnn_ocb.sv`           | on-chip kernel buffer, Q x (number of slices) words of K·K·d bits     |
| `rtl/bnn_ctrl.sv`          | loop sequencer and the two external-memory handshakes                 |
| `rtl/bnn_rb_top.sv`        | top: controller + buffer + array                                      |

External memory is not part of the RTL. The testbenches contain a simple
model of it. The final bias-and-activation step (`ao = f(s + bias)`) is not
part of the RTL either: the design outputs the raw counts, and the activation
function is left to the consumer.

## Operating the top (`bnn_rb_top`)

1. Set `cfg_groups` to the number of groups of Q kernels (output channels / Q).
   Set `cfg_tiles_x` and `cfg_tiles_y` to the number of X x Y output tiles
   (ceil(OW/X), ceil(OH/Y)). Then pulse `start`.
2. **Kernel load.** For each group, the chip asks for Q·NS kernel words
   (`kw_ready`, with `kw_kernel` = absolute kernel index and `kw_d` = slice).
   A word is taken on a cycle where `kw_valid` and `kw_ready` are both high.
   `kw_data[ky][kx][ch]` is the weight at kernel row ky, column kx and channel
   `kw_d*DU + ch`. Channels past `IN_CH` must be 1.
3. **Input stream.** For each tile (x inner, y outer) and slice, the chip asks
   once for an input slice (`in_ready`, `in_tx`, `in_ty`, `in_d`).
   `in_win[p][r][j][ch]` is the activation at input row `in_ty*Y + 2p + r`,
   column `in_tx*X + j`, channel `in_d*DU + ch`. Channels past `IN_CH` and
   pixels outside the input must be 0. A 0 activation against a padding
   weight of 1 adds nothing to the count. If `in_valid` is low, that cycle
   enters the array as an empty cycle (`stall` is high) and the request stays
   the same.
4. **Results.** `res_valid[r][c]` marks the finished sum `res_sum[r][c]` of
   output row `ty*Y + r`, column `tx*X + c`, for kernel `res_q` of the current
   group. The value is the number of agreeing bits (0..Nk); the ±1 sum is
   `2*res_sum - Nk`. Each PE delivers its sums in the order group, tile,
   kernel. A consumer can place every result by counting. Sums for positions
   past the edge of the output map come from the last tiles and are to be
   dropped.
5. `done` pulses once, after the last sum has left the array.

**Timing.** Without waiting on either handshake, a layer takes
`groups·(Q·NS + 1 + tiles·NS·Q) + X + 2` cycles while `busy` is high. The
`+1` is one idle cycle after each kernel load, to prime the buffer's
synchronous read. The full reference layer (64 x 64 x 128 input, 64 kernels,
16 x 11 tiles) takes 249,238 cycles. A PE in column c delivers a sum c+2
cycles after the last slice of that kernel was fed to column 0. The kernel
load and the computation of a group do not overlap.

## Design choices beyond the architecture

The following are this design's own choices. The architecture fixes the
arithmetic, the loop mapping, the register sharing and the kernel-only
buffer, but not these details:

* **PE control.** The kernel index and the first/last flags travel as a tag
  with each kernel slice. The PEs keep no loop counters of their own.
* **BREG transfer.** A BREG captures its neighbour's register directly. In
  the architecture, data moves between bridge registers by way of the PEs;
  here that path is a plain register-to-register connection.
* **Channel padding.** 128 channels do not divide into slices of 6, so the
  last slice is padded as described above. The buffer therefore holds
  88 x 54 = 4,752 bits instead of Q·Nk = 4,608.
* **One kernel buffer.** A single buffer feeds every pair row. A physical
  layout may split it into one buffer per group of rows.
* **Handshakes, tile order, reset, result port.** Valid/ready with address
  outputs; tiles run x first; `rst_n` is synchronous and active low and
  clears the control state and accumulators; each PE has its own registered
  result port.
* **Default array shape.** 4 x 6 is one of several 24-PE shapes the
  architecture considers (1x24, 2x12, 3x8, 4x6, 6x4, 12x2). Any X with an even
  Y works by parameter. Q = 1..4 and K = 9 are parameter changes too.

Not included: the activation function and bias, an input-data buffer, and
overlap of kernel loading with computation.

## Simulation

Each testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/bnn_pkg.sv \
          tb/tb_bnn_rb_top.sv --top-module tb_bnn_rb_top -o sim
./obj_dir/sim
```

Replace the testbench name for the others:

| testbench              | what it shows                                                                 |
|------------------------|-------------------------------------------------------------------------------|
| `tb_bnn_xnor_popcount` | counts against a ±1-arithmetic reference                                      |
| `tb_bnn_pe`            | interleaved kernels, restart on first slice, result timing, empty cycles      |
| `tb_bnn_breg`          | hold/load, column drop, upper/lower views, zero padding of the bus            |
| `tb_bnn_pe_array`      | every sum of several tiles against a direct convolution, and exact latency c+2 |
| `tb_bnn_ocb`           | buffer writes, synchronous reads, read-during-write                           |
| `tb_bnn_ctrl`          | the full request and issue order, buffer read alignment, stalls, cycle count  |
| `tb_bnn_rb_top`        | end to end at default sizes: small layer, random gaps on both streams; every mechanism counted |
| `tb_bnn_rb_full`       | the full 64x64x128, 64-kernel layer at default sizes; all 246,016 sums, cycle count, memory traffic |
| `tb_bnn_rb_configs`    | small layers on every 24-PE shape (1x24 … 12x2), K = 9, and Q = 1, 2, 3; also checks the bridge-register bit counts against the formulas |

Both end-to-end testbenches check the memory traffic. Each kernel word is
read once per layer (64 x 22 words in the full layer). Each input slice is
read once per group of Q kernels. The full-size run takes about a second.

## How far to trust it

All RTL files pass Verilator's `-Wall` lint and elaborate in Yosys (slang
front end). Every module has a testbench that checks against an independent
reference. Each testbench was also shown to fail on a deliberately broken
copy of its module. The full reference layer is simulated bit-exactly at the
default sizes. Clock frequency, area and power have not been evaluated.
