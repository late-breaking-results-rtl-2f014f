# Dense-sparse, bit-serial DNN accelerator

Quantized DNN weights contain a lot of nothing at two levels. Many weights are
zero (value-level sparsity), and the nonzero ones have few set bits: an 8-bit
weight such as 64 has a single set bit (bit-level sparsity). This accelerator
exploits both:

* **Zero weights are not stored and never reach a multiplier.** Each layer is
  kept in one of two compressed formats, chosen per layer by how sparse it is.
* **A multiplication costs one cycle per set bit of the weight, not per bit of
  its width.** Every weight is turned into a short list of its set-bit
  positions. A processing element (PE) then computes `w * x` by adding
  `x << pos` once per listed position, with the weight's sign applied.

The RTL is SystemVerilog (IEEE 1800-2017). It is synthesizable apart from the
assertions. It has been linted with Verilator 5 and elaborated with the slang
front end.

## Data flow

```
 host writes ──► weight memory region (value block + index block, 2 copies)
                 input memory (one input per layer position)
                      │
 start, header ──► read stage ── element stream ──► arrangement stage ── round ──► multiplication stage ──► output buffer ──► (tile ID, result)
                   (bit scanner)  pos, sign,          tile_info           PE_COLS x 9     column adders
                                  T_bitpos, N_nzb, x                       PEs
```

All stage-to-stage links are valid/ready handshakes, so any stage can stall
the ones before it. The design computes one result per *tile*. A tile is a
group of up to nine weights, such as a 3x3 kernel. Its result is the dot
product of those weights with the inputs stored at the same layer positions.

## The dense-sparse storage format

A layer is a vector of weights indexed by *layer position* 0, 1, 2, ... Its
weight memory region has two consecutive blocks. A per-layer **metadata
header** describes it:

| header field | meaning |
|---|---|
| `s_addr`   | first word of the value block |
| `idx_addr` | first word of the index block (= end of the value block) |
| `e_addr`   | end of the index block |
| `ds`       | storage mode: 1 = sparse, 0 = dense-mapping |

The **value block** `[s_addr, idx_addr)` always holds only the nonzero weights,
in position order. Each weight is an 8-bit two's-complement number in the low
byte of a 16-bit word. The **index block** `[idx_addr, e_addr)` holds 16-bit
layer positions, and its meaning depends on the mode:

* **Sparse mode** (`ds = 1`): entry *k* is the position of value *k*. This
  suits layers that are mostly zeros.
* **Dense-mapping mode** (`ds = 0`): the index block lists the positions of
  the *zero* weights in ascending order. The values fill the remaining
  positions in order. The layer length is implied:
  `(idx_addr - s_addr) + (e_addr - idx_addr)`. This suits layers with few
  zeros, where a list of nonzero positions would cost more than the values.

Example, for the weights `[0, 5, 0, -3, 7]`:

| mode | value block | index block |
|---|---|---|
| sparse | 5, -3, 7 | 1, 3, 4 |
| dense-mapping | 5, -3, 7 | 0, 2 |

The choice of mode is made offline against a fixed sparsity threshold, when
the memory image is built. It is not part of the hardware. The testbench
package `tb/dsa_tb_pkg.sv` holds a reference encoder (`encode_layer`). It
picks sparse mode when at least 50 % of the weights are zero.

The **read stage** (`rtl/read_stage.sv`) walks both blocks in step. It reads
each nonzero weight's input from the input memory, at the weight's layer
position. It emits one element per nonzero weight, in ascending position order.

The stage is a short pipeline. In sparse mode, one cycle reads a value and its
index, and the next cycle reads the input at that index. In dense-mapping mode,
a position counter advances one position per cycle. It is compared with the
next zero position, taken from a 4-entry queue that is prefetched through the
index read port. A match skips the position. Otherwise the stage reads the
next value and the input at that position. Elements go into a 4-entry output
FIFO. New reads are issued only while the FIFO entries plus the reads in
flight are fewer than four, so a stalled consumer never loses data.

## Bit metadata: T_bitpos and N_nzb

`rtl/bit_scanner.sv` converts a weight into:

* `sign`: the weight's sign;
* `T_bitpos`: the positions of the set bits of `|w|`, in ascending order;
* `N_nzb`: how many there are (at most 7 for 8-bit weights; 127 has the most
  set bits).

The scanner uses a lookup table. `|w|` is cut into two nibbles. A 16-entry
table gives each nibble's bit count and bit positions. The second nibble's list
is appended after the first, with 4 added to its positions. For example,
`w = -100` gives `|w| = 0110_0100`, so `sign = 1`, `T_bitpos = {2, 5, 6}` and
`N_nzb = 3`. The PE for this weight works for 3 cycles instead of 8.

## Tiles, columns and rounds

This is the least obvious part of the design. The arrangement stage
(`rtl/arrangement_stage.sv`) decides which PE each weight lands in. It follows
a per-layer configuration record, `tile_info`:

| field | meaning |
|---|---|
| `id_start`, `id_end` | range of tile IDs of this layer, inclusive |
| `pe_size` | weights per tile (1..9), e.g. 9 for 3x3 kernels |
| `ts_num`  | weights in the first tile (`id_start`) |
| `te_num`  | weights in the last tile (`id_end`) |

The edge sizes `ts_num` and `te_num` handle layer chunks that do not start or
end on a tile boundary. Tiles occupy consecutive layer positions:

```
positions: [0 .. ts_num) [.. +pe_size) [.. +pe_size) ... [.. +te_num)
tile ID:    id_start      id_start+1    id_start+2   ...  id_end
```

The PE array has `PE_COLS` columns of nine PEs. **One tile occupies one
column**: weight *r* of the tile goes to row *r*. A **round** is `PE_COLS`
consecutive tiles, loaded into the whole array at once. The arrangement stage
works as follows:

1. It keeps the current column and that column's tile base position and
   length.
2. An element whose position falls inside the current tile is written to row
   `pos - base` of that column. Because rows are chosen by position, weights
   land in fixed rows even though zeros were skipped.
3. An element beyond the current tile closes the tile, and the stage moves to
   the next column. The end of the read stream (`rd_done` with no element
   pending) also closes the tile. Closing a tile takes one cycle.
4. After the last column, or after tile `id_end`, the round is dispatched and
   the buffer is cleared for the next round.

Rows that receive no element hold a zero weight (`N_nzb = 0`). A tile with no
nonzero weight at all still produces a result (zero). The result stream
therefore always carries exactly one result per tile ID. An element positioned
beyond tile `id_end` is dropped and sets `range_err`.

## Multiplication stage

`rtl/mult_stage.sv` holds `PE_COLS x 9` `shift_acc_pe` instances and one
`psum_adder` per column.

* **PE** (`rtl/shift_acc_pe.sv`). The PE is weight-stationary: on load it
  takes the weight's bit metadata and its input `x`, and clears its
  accumulator `R`. Each following cycle with `N_nzb > 0` it adds
  `±(x << T_bitpos[0])` to `R`, drops the head of `T_bitpos` and decrements
  `N_nzb`. The count of remaining bits is the only control it needs.
* **Round length.** All PEs of a round start together. The round ends when the
  PE with the most set bits finishes. Results are ready `max(N_nzb) + 2`
  cycles after the round is accepted: one cycle to load, `max(N_nzb)` steps,
  one cycle to register the column sums. The worst 8-bit weight (127, seven
  set bits) gives 9 cycles. A round of zeros takes 2 cycles. The next round
  can load in the same cycle the previous result is taken.
* **Column adder** (`rtl/psum_adder.sv`). This is a balanced tree of two-input
  adders over the nine `R` values of a column, padded to 16 inputs (4 levels).

`rtl/out_buffer.sv` queues whole round results (4 rounds deep by default). It
streams them out as `(tile ID, result)`, one per cycle, skipping columns that
held no tile.

## Layers larger than the memories

A layer chunk is limited to 4096 positions by the input memory. Its value and
index blocks are limited to 4096 words by the weight memory. A longer dot
product is run as a sequence of chunks, and the host combines the results:

1. Cut the weight vector at any position. Chunk boundaries need not fall on
   tile boundaries.
2. Give each chunk its own header and tile_info. For a chunk covering
   positions `[a, b)` with tiles of 9:
   * `id_start = a / 9` and `id_end = (b - 1) / 9`;
   * `ts_num` is the number of positions from `a` to the end of tile
     `id_start` (or to `b`, if that comes first);
   * `te_num = b - 9 * id_end`.
3. Write the chunk's inputs at chunk-relative positions 0, 1, 2, ...
4. Add up the results that carry the same tile ID, because a tile cut by a
   chunk boundary is reported once by each chunk. Then sum the tile results of
   one output.

`tb/tb_workload_slices.sv` does exactly this for one whole output of several
typical layer shapes (up to 9216 weights in three chunks).

## Top level: `dsa_top`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `wmem_we/waddr/wdata` | in | host write port of the weight memory region (writes both copies) |
| `imem_we/waddr/wdata` | in | host write port of the input memory; address = layer position |
| `start` | in | one-cycle pulse; `hdr` and `tinfo` must be valid in that cycle |
| `hdr` (`layer_hdr_t`) | in | metadata header |
| `tinfo` (`tile_info_t`) | in | tile_info record |
| `busy` | out | a layer is in progress |
| `done` | out | every result of the layer has left; held until the next start |
| `range_err` | out | an element lay beyond `id_end` |
| `res_valid/res_ready/res_id/res_sum` | out/in/out/out | result stream, 24-bit signed results |

Operating sequence:

1. Load the memory image and the inputs while the accelerator is idle.
2. Pulse `start` with `hdr` and `tinfo`.
3. Drain the result stream until `done`.

The struct types and widths are in `rtl/dsa_pkg.sv`.

| parameter | default | notes |
|---|---|---|
| `PE_COLS` | 8 | tiles per round (columns of the PE array) |
| `PE_ROWS` (package) | 9 | PEs per column, i.e. the largest tile |
| `WMEM_DEPTH` | 4096 | words of the weight memory region (16-bit words) |
| `IMEM_DEPTH` | 4096 | input positions per layer chunk |
| `OBUF_DEPTH` | 4 | rounds held by the output buffer |
| widths (package) | 8-bit weights and inputs, 16-bit addresses and tile IDs, 24-bit accumulators | |

Timing of the read stage, with the stream always accepted. Cycle 0 is the
cycle in which `start` is high.

* Sparse layers: the first element is valid in cycle 4. The rest follow one
  per cycle.
* Dense-mapping layers: every layer position costs one cycle, zero or not. The
  first element is valid in cycle `4 + its position`. Add one cycle if the
  layer has any zero.
* `done` rises one cycle after the last element leaves.

## How far to trust it, and where it departs from the source architecture

The published description of this accelerator is brief. It gives the storage
format and header, the bit-metadata idea, the tile_info record and the
shift-accumulate PE. It also gives the nine-PE column with its partial-sum
adder, and the order of the stages. Everything else here is this design's own
choice:

* **Widths and sizes.** The widths (8-bit weights and inputs, 16-bit memory
  words and positions, 24-bit accumulators), the memory depths, the number of
  PE columns (8) and the output buffer depth are all chosen here.
* **Input handling.** The source says inputs are broadcast along PE rows and
  columns of a systolic array. It does not say how. Here every weight carries
  its own input, read from the input memory at the weight's layer position. For
  a convolution, the host must therefore lay out the inputs per weight
  position (im2col style). No systolic forwarding between PEs is built.
* **Storage-mode flag.** The source packs the storage-mode flag into each
  round together with the bit metadata. Here the flag only steers the read
  stage. Once weights are decoded, nothing downstream depends on it, so it is
  not carried further.
* **PE arithmetic.** The source calls its PE operation "LUT-based
  shift-accumulate". Here the shift is an ordinary barrel shifter in front of
  an adder; on an FPGA both map to LUTs.
* **Clock rate.** The source reports 200 MHz on an FPGA. This RTL has not been
  timed. The longest combinational paths are probably the column adder tree
  (four adder levels) and the read stage's address arithmetic.
* **Storage size.** Values and indices occupy one 16-bit word each. The format
  saves storage only when a layer is very sparse or very dense. It does not
  reproduce the reported 13-24 % storage savings.
* **Throughput.** The single read stage delivers at most one nonzero weight
  per cycle. That is about 0.4 GOPS at 200 MHz, far below the source's
  reported 170.84 GOPS, which needs about 427 multiply-accumulates per cycle.
  The source does not describe how its read path reaches that rate.
* **Reported cycle counts.** The source reports 5, 14 and 10 cycles for the
  read, arrangement and multiplication stages. It does not define what they
  measure. Here the first element leaves the read stage 4 cycles after start,
  and a multiplication round takes at most 9 cycles. The arrangement number
  is not matched.
* **Layer size.** A layer larger than the memories must be split by the host
  into chunks, each with its own header and tile_info (`ts_num` and `te_num`
  let a chunk start or end inside a tile). None of the evaluated networks
  (MobileNetV2 to VGG19) fits whole.

## Verification

Each module has a self-checking testbench in `tb/`. Each checks against
models written independently of the RTL, and ends with a `TB_RESULT` line:

| testbench | what it checks |
|---|---|
| `tb_bit_scanner` | all 256 weights: sign, count, position list |
| `tb_sync_ram` | read latency, hold, read-during-write |
| `tb_read_stage` | random layers in both modes against the encoder model; exact first-element latency, one-per-cycle rate, `done` timing |
| `tb_arrangement_stage` | random tile_info incl. edge tiles and single-tile layers; every PE operand of every round; `range_err` |
| `tb_shift_acc_pe` | `w*x` for random and corner values; exactly `N_nzb` busy cycles |
| `tb_psum_adder` | random and extreme sums |
| `tb_mult_stage` | column sums, latency `max(N_nzb)+2`, backpressure, back-to-back rounds |
| `tb_out_buffer` | order, masks, full-FIFO backpressure |
| `tb_dsa_top` | eight layers end to end at default parameters (up to 200 tiles / 1800 weights) |
| `tb_workload_slices` | whole outputs of layer shapes from ResNet50, VGG19, MobileNetV2, AlexNet and ViT-B/OPT, run in chunks at default parameters |

`tb_dsa_top` also fails if any of these never happens:

* sparse layers, dense-mapping layers and a switch between them;
* skipped zero indices;
* incomplete edge tiles;
* full and partial rounds;
* empty tiles;
* worst-case weights;
* read-stage stalls;
* result backpressure.

It prints the effective bit sparsity of its data (full bit operations over
executed ones).

Run a testbench with plain Verilator, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/dsa_pkg.sv tb/dsa_tb_pkg.sv tb/tb_dsa_top.sv --top-module tb_dsa_top -Mdir obj
./obj/Vtb_dsa_top
```

Replace `tb_dsa_top` with any other testbench name. Testbenches that need no
reference model still compile with `tb/dsa_tb_pkg.sv` on the command line.
The simulator is two-state, so every register read by the design is reset.
