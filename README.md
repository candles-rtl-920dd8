# CANDLES: a channel-first sparse CNN accelerator in SystemVerilog

A sparse convolution engine has two conflicting aims. It wants to store activations
compactly, and it wants to add up partial sums cheaply. Storing the non-zero
activations of one pixel region together ("pixel-first") gives small indices and good
compression. But if the engine then walks the data pixel by pixel, each step hits a
different set of output neurons. The partial sums scatter across a large accumulator,
and a wide crossbar is needed to route them.

This design keeps the pixel-first storage but changes the order of traversal: it walks
the data channel-first. For one small tile of the input (7x4 pixels) a PE loops over
its 64 input channels. Each step multiplies the four non-zero activations of the
current channel by one weight from each of four kernels. Consecutive steps therefore
add into the same few output neurons: 64 kernels x 28 pixels = 1792 neurons, whatever
the channel. That locality pays off in three ways:

- A small, fully associative **PSUM filter** in front of each accumulator bank absorbs
  most updates. It acts as a level-1 cache of partial sums.
- A **4x8 crossbar** per kernel replaces a full product-to-bank crossbar.
- Compressed metadata stays short: a 5-bit absolute index plus 4-bit zero runs per
  activation, and 4-bit absolute positions per weight.

Channel slices that are empty in the activations or in the weights are **skipped
outright**. Each channel carries a valid bit, and the PE's channel search jumps over
such channels without spending a cycle.

The array is 8x8 PEs on a 2-D mesh. A 640 KB central buffer and a post-processing
unit (PPU) sit on the west edge. The central buffer feeds activation tiles to the PEs
and collects their results. The PPU applies ReLU, pooling, requantisation and
compression to the finished layer.

## Numbers at a glance (defaults)

| item | value |
|---|---|
| operands / partial sums | 8-bit signed / 24-bit signed |
| PE array | 8 x 8 on a mesh (`NX`, `NY`) |
| multipliers per PE | 4 x 4 (16 products per cycle) |
| activation tile | 7 x 4 pixels, 64 channels per PE |
| kernels per PE | 64 |
| PSUM filters | 32, each with 16 entries and 6-bit tags, LRU |
| accumulator (L2) | 32 banks x 64 entries x 24 bit = 6 KB |
| activation buffer | 64 groups of 4 = 256 non-zero activations |
| weight buffer | 1024 entries x 4 lanes = 4K weights (`WB_DEPTH`) |
| central buffer | 65536 words x 80 bit = 640 KB (`CB_DEPTH`) |

## Data formats (`rtl/candles_pkg.sv`)

**Activation group (53 bits).** One entry of the activation buffer. It holds up to four
non-zero activations of one channel within one tile, in pixel order. Slot 0 stores its
absolute pixel position `ty*7+tx` (5 bits). Slots 1 to 3 each store the number of zeros
skipped since the previous slot (4 bits). A 4-bit valid mask marks the slots in use. A
channel with more than four non-zeros in a tile takes more groups; these live in
further *slices*, and the PE loads one slice (64 groups, one per channel) at a time.

**Weight entry (52 bits).** One weight of the same channel from each of four kernels
(one kernel group). Each lane holds a valid bit, a 4-bit position `{r[1:0], s[1:0]}`
inside the kernel, and the 8-bit value. Weight buffer address = `{row, channel}`. A row
holds one kernel group in one *weight pass*. A sparse 3x3 kernel whose channel slice
has at most N non-zeros needs N passes.

**Output tag (11 bits).** For kernel k (0..63) and output pixel q (0..27):
`bank = {k[1:0], q[2:0]}` and `entry = {k[5:2], q[4:3]}`. Consequences:

- The four products of one kernel (one crossbar) always stay within the 8 banks that
  crossbar serves.
- Two activations that share the low three pixel bits land in the same bank. This is
  the source of bank conflicts (see below).
- 64 x 28 neurons use 1792 of the 2048 L2 entries.

Within a PSUM filter the 6-bit tag is the bank entry.

**Job configuration `pe_cfg_t` (34 bits).** Fields:

- output base address in the central buffer;
- reduction role (`ALONE`, `RECV`, `SEND`);
- pad, i.e. output shift for same-size 3x3 convolution;
- number of weight passes, kernel groups and activation slices.

## Inside a PE (`rtl/pe.sv`)

A job runs through these states: INIT (64 cycles that zero L2 after reset) → IDLE → REQ
→ LOAD → COMP → FLUSH → reduction (GO / WAITRED / WAITGO / SENDPS) → RESULT → DONE.

The compute loop runs, from outermost to innermost: activation slice → weight pass →
kernel group → channel. It is a two-stage pipeline:

1. **Fetch.** A priority search picks the next channel. It must be valid both in the
   activation slice (`act_buffer.chan_valid`) and in the current weight row
   (`weight_buffer.row_valid`). The search also reads that channel's activation group
   and weight entry. Empty channels cost nothing; each one skipped is counted.
2. **Execute.** `mult_array` forms 16 products while `index_gen` turns the group's
   run-length metadata and the weights' positions into 16 tags and valid bits.
   - Output column: `ox = tx - s + pad`. Output row: `oy = ty - r + pad`.
   - A product whose output falls outside the 7x4 tile is dropped and counted.
   - Four `xbar_4x8` instances route each kernel's four products to the eight filters
     of its bank group.

**Bank conflicts.** If two products in one crossbar target the same bank in the same
cycle, the crossbar grants the lowest-numbered lane. The PE then holds the execute
register and replays only the products not yet sent (a done mask), while fetch
stalls. Each such cycle increments `st_conflict_stalls`.

**PSUM filter and L2 (`psum_filter.sv`, `acc_bank.sv`).** Each filter has 16 tagged
registers and an adder.

- **Hit:** the product is added in place.
- **Miss:** the least recently used entry is evicted, and its value is *added* into the
  L2 bank entry with the same tag. The new product then takes the freed register.

So the filter holds increments, not the full sum, and nothing is read back from L2 on
a miss. After the last slice, FLUSH drains every filter into L2, which then holds the
complete sums. Each L2 bank has an add port, and a read-and-clear port used to drain
results. Draining leaves the bank zeroed for the next job.

## Mesh, reduction and the central buffer

**Routers (`mesh_router.sv`).** Five ports (N, E, S, W, local), each with a 2-entry
input FIFO. Every packet is a single 96-bit flit. Routing is dimension-ordered: X first,
then Y. Traffic for the central buffer goes west along its row and leaves through the
west port of column 0. Each output port picks among requesting inputs round-robin.
Flit kinds:

| kind | direction | meaning |
|---|---|---|
| `ACTREQ` | PE → central buffer | send activation slice n of my tile |
| `ACT` | central buffer → PE | one activation group, channel in `addr` |
| `GO` | receiver → east neighbour | I am ready for your partial sums |
| `PSUM` | sender → west neighbour | one partial sum, L2 tag in `addr` |
| `RESULT` | PE → central buffer | add `data` to word `addr` |

**Inter-PE reduction.** Two neighbouring PEs can work on the same output tile, each
with different input channels. The sender (east) waits for `GO`, then streams all 1792
of its L2 entries west. The receiver adds each one into its own L2 and only then
writes results. Which PEs pair up is set per job in the configuration.

**Central buffer (`central_buffer.sv`).** One mesh attachment per row.

- **Activation requests.** An `ACTREQ` goes into a request queue. The dispatcher then
  reads 64 words starting at `act_base + {y, x, slice, channel}` and sends them as `ACT`
  flits.
- **Results.** A `RESULT` is a read-modify-write that adds into bits [23:0] of the
  addressed word. This is how the outputs of several PEs (or PE pairs) that cover the
  same output region are summed, e.g. different input-channel partitions.
- **Host port.** A separate write port and a registered read port serve the host and
  the PPU.

**PPU (`ppu.sv`).** Reads `count` words starting at `base`. For each word it:

1. applies ReLU if enabled;
2. takes the max over windows of 1, 2 or 4 consecutive words;
3. shifts the window result right arithmetically by `shift` and saturates it to 8 bits.

It emits only the non-zero results, each as an (index, value) pair. That stream is the
compressed output feature map.

## Top level (`rtl/candles_top.sv`)

The top has the following port groups:

- **Load port** (`ld_*`): writes one PE's weight buffer or its configuration. It stands
  for the off-chip memory interface.
- **Central-buffer ports:** host write and read.
- **Job control:** `pe_en` selects the PEs taking part; `start`, `busy` and `done`
  control the job.
- **PPU controls and output stream.**
- **Statistics counters:** summed over PEs, plus the busy cycles of the slowest PE.

`done` rises when every enabled PE is done, every router is idle and the central buffer
has drained.

Running a layer takes four steps:

1. Write the compressed activation tiles into the central buffer.
2. Load each PE's weights and configuration.
3. Pulse `start` and wait for `done`.
4. Run the PPU over the output region.

## Where this design departs from the published one

- **Halo across tiles is not handled.** With a kernel larger than 1x1, a product whose
  output neuron falls outside the PE's own tile is dropped. It is counted in `st_oot`,
  not forwarded. The original says only that this aggregation happens in the central
  buffer, without saying how. Border outputs of 3x3 layers are therefore incomplete
  unless the host arranges overlapping tiles itself.
- **Supported shapes:** stride 1 only, and kernels of at most 4x4 (the 4-bit position
  code). Layers with a 7x7 or strided first layer, or with depthwise convolution, do
  not run as built.
- **Depthwise convolution** in the PPU is not built. The original uses the PPU for
  it but does not describe how.
- **Filter miss handling.** The original swaps entries between filter and L2 with two
  read-modify-writes. Here the victim is added into L2 and the filter keeps only
  increments. The final sums are identical.
- **Loop order.** Activation slices are outermost, so each slice is fetched once.
  The original nests the weight position above the activation loop. The set of
  products is the same.
- **Bank conflicts** inside one crossbar stall the PE for a cycle. The original does
  not say how such conflicts are resolved.
- **Buffer sizes.** The activation buffer holds 424 B and the weight buffer 6.5 KB,
  versus 648 B and 10 KB quoted for the original. Its metadata layout is not given, so
  these entry formats are this design's own.
- **Not designed here:** the router, the flit protocol, the reduction handshake, the
  central-buffer address layout, and the pooling/requantisation options of the PPU are
  all this design's own choices.
- **Memories:** all memories are plain arrays, not SRAM macros. Only the 8-bit /
  24-bit datapath is built; the 16-bit and 8-bit-partial-sum variants are not.

## Testbenches and how to run them

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- **Leaf testbenches:** compare against independent models. `tb_psum_filter`, for
  example, keeps its own LRU model and compares final sums after flush.
- **`tb_pe`:** runs four jobs on one PE (1x1, 3x3 with padding, reduction receiver and
  sender). It checks every result against a direct convolution model in
  `tb/candles_tb_pkg.sv`.
- **`tb_candles_top`:** runs the whole array end to end at 4x2 PEs.
  - Even rows run 1x1 kernels; odd rows run 3x3 kernels with padding.
  - PEs pair up for reduction, and pairs share output regions, so the central buffer
    aggregates.
  - Then the PPU runs over one region.
  - It checks every output word and every PPU output. It also requires each mechanism
    to occur at least once: filter hits and misses, bank-conflict stalls, channel
    skips, out-of-tile drops, activation refills, neighbour reduction, central
    aggregation, ReLU zeroing and zero suppression.

**Largest size simulated: 4x2 PEs.** The default 8x8 array compiles and lints, but no
end-to-end simulation at that size is included. Each PE and router is specialised for
its X/Y position, so Verilator generates 64 separate PE models, and the C++ build
takes far longer than the test itself. The 4x2 test uses the same PE, router, central
buffer and PPU at their default sizes; only `NX` and `NY` are reduced.

With plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tb_pe \
    rtl/candles_pkg.sv $(ls rtl/*.sv | grep -v candles_pkg) tb/candles_tb_pkg.sv tb/tb_pe.sv
./obj_dir/Vtb_pe
```

Swap `tb_pe` for any other testbench name. `tb_candles_top` builds in about a minute
and simulates about 31k cycles. To try a larger array, change `NX` and `NY` at the top
of that testbench; build time grows with the number of PEs.
