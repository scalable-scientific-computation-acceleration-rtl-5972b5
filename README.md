# Compressed-memory accelerators: ZFP-V2, BurstZ+ and ZipNN

Accelerators that stream data through memory are often limited by memory
bandwidth. They are not limited by arithmetic. This RTL puts
decompression and compression in the memory path at wire speed, so the
effective bandwidth grows with the compression ratio. It contains two
independent systems:

* **BurstZ+** runs a 3D 7-point heat-dissipation stencil over a grid whose
  planes are kept in DRAM in compressed form. Compression uses ZFP-V2, a
  hardware-friendly variant of the ZFP lossy floating-point codec. Three
  decompression pipelines feed the stencil, which reads planes z-1, z and
  z+1. One compression pipeline writes the new plane back. A burst-based
  arbiter shares a single DRAM port among all of them.
* **ZipNN** is a nearest-neighbour search over sparse bag-of-words
  documents. Documents are stored as three compressed columns: document
  id, word id and count. The columns are decoded with group varint,
  run-length and delta decoders. The resulting tuples are scored against a
  query with cosine similarity, and a top-K sorter keeps the best K = 128
  documents.

`accel_top` instantiates both systems side by side, each with its own
ports. The DRAM controller, the PCIe DMA and the flash storage are not
part of this RTL. Their connection points are the top-level ports `b_mem_*`
(memory), `b_host_*` (host endpoint of the arbiter) and the `k_in_*`
column streams.

All datapaths use valid/ready handshakes and an asynchronous active-low
reset. Memory beats are 256 bits (32 bytes).

## ZFP-V2 block coding

ZFP-V2 codes doubles in 4x4 blocks. A block is transformed as follows:

1. **Block floating point** (`zfp_fwd_cast`). The largest exponent `emax`
   of the block becomes the common exponent. Every value becomes a signed
   64-bit integer, aligned so that the top two bits are headroom.
2. **Decorrelating transform** (`zfp_fwd_xform`). The ZFP lifting transform
   runs along the rows and then the columns. It is followed by the
   sequency permutation (low-frequency coefficients first) and the
   conversion to negabinary, so that every coefficient becomes an unsigned
   magnitude-like word.
3. **Embedded coding** (`zfpv2_encoder`). Bit plane *k* is the 16-bit word
   whose bit *i* is bit *k* of coefficient *i*. In fixed-accuracy mode only
   the top `np = emax - minexp + 6` planes are coded (clamped to 0..64).
   `minexp` is floor(log2(error bound)).

The original ZFP codes each plane with a serial group test. That is the
bottleneck in hardware. ZFP-V2 replaces it with a **variable-length plane
header**. A plane whose highest set bit is bit 0, or that is zero, costs a
single `0` bit and one data bit. Any other plane gets a `1` and a 2-bit
size class. The class says the highest set bit is in 1, 2-3, 4-7 or 8-15,
and 2, 4, 8 or 16 low data bits follow.

The headers are stored in **two layers**:

* The level-1 header collects the first header bit of every plane (np
  bits).
* The level-2 header collects the 2-bit classes, only for planes whose
  level-1 bit is 1.

A decoder can therefore read all headers of a block at once and compute the
position of every plane's data without walking the planes one by one.

A block is laid out as follows (first bit first):

| field | bits |
|---|---|
| non-zero flag | 1 (a zero block is this single `0`) |
| emax | 11 |
| level-1 header | np |
| level-2 header | 2 per level-1 one |
| plane data | planes from most to least significant |

### Chunks

The compressed stream is cut into independent **6 KB chunks**. A block
never crosses a chunk boundary. The packer (`zfp_bit_packer`) closes a
chunk when the next block plus a 12-bit end marker would not fit. The
marker is all ones, which is a non-zero flag followed by an emax of
all-ones that no real block can have. The rest of the chunk is filled
with zeros.

Because every chunk starts on a block boundary, chunks can be handed to
separate decoders. Chunks are always whole 192-beat units, so DMA engines
can move them without parsing.

### Encoder timing

The encoder loads a block in one cycle. It sends the block to the packer in
up to three fragments of at most 512 bits, one per cycle:

* the header plus the data of planes 0-15;
* planes 16-47;
* planes 48-63.

The first fragment carries the total block length, so the packer decides
whether the block fits before any of it is written.

`zfpv2_compressor` takes one 256-bit row per cycle, which is four cycles
per block. It deals transformed blocks round-robin to `N_ENC` = 4 encoders
and collects them back in the same order, so the output keeps the block
order. The cast and transform stages take one block per cycle. Four encoders
keep up with one block every four cycles, even for long blocks. A `flush`
closes the last chunk, but only once every block already accepted has reached the packer.

### Decoder (the critical part)

`zfpv2_decoder` is where the two-layer header pays off. Compressed words
enter a 1024-bit bit buffer. For each block the decoder takes these steps:

1. It reads the flag and emax and computes np.
2. In a single cycle it parses the whole level-1 header in parallel. It
   counts its ones to find the length of the level-2 header, and turns each
   plane's class into its data length.
3. It forms prefix sums of those lengths, which locate the data of every
   plane.
4. It extracts **8 planes (up to 128 bits) per cycle** and transposes them
   back into 16 coefficients.

A block takes a header cycle, ceil(np/8) data cycles and one output cycle.

When the decoder sees the end marker, it drops the rest of the chunk. It
then emits an end-of-chunk beat that carries no block.

`zfpv2_decompressor` deals 6 KB chunks round-robin to `N_DEC` = 4 decoders,
each with a one-chunk input buffer. It reads the results back in the same
order: a decoder is left only after its end-of-chunk beat. The blocks then
go through the inverse transform (`zfp_inv_xform`) and the inverse cast
(`zfp_inv_cast`, round to nearest even). Output is one 4-double row per
cycle.

## BurstZ+ platform

`burstz_platform` wires the following parts together:

* **`mem_arbiter`** has five endpoints, each with a request queue, a write
  buffer and a read buffer (512 beats each).
  * A read burst starts only when its whole length is free in the
    endpoint's read buffer. That space is reserved when the burst is
    issued.
  * A write burst starts only when all of its data is already in the
    write buffer.
  * An endpoint that stalls therefore cannot block the DRAM port.
  * Read data is routed back through a tag queue.
  * `n_bursts` and `n_blocked` count issued bursts and cycles in which a
    request was held back.
  * Endpoint assignment:
    * endpoint 0 is the host;
    * endpoints 1-3 read the three source planes;
    * endpoint 4 writes the result.
* **Read DMA**: one read burst per 6 KB chunk. The chunk-last flag goes to
  the decompressor on every 192nd beat.
* **`heat3d_core`** takes one 4-double word from each of the three
  decompressed planes per cycle.
  * Each plane has two row buffers. Together with the incoming row they
    give the 3x3 yz-neighbourhood the stencil needs.
  * It outputs 4 doubles per cycle with a 5-cycle pipeline.
  * Interior cells become `coef * (((xm+xp)+(ym+yp))+((zm+zp)+c))`, built
    from `fp64_add` and `fp64_mul`.
  * Cells on the plane edge are copied unchanged.
  * After the last input row, a tail pass emits the final row.
* **Compressor and write DMA**: one chunk-sized write request is posted
  for each chunk the compressor starts. When the stencil has delivered the
  whole plane, the compressor is flushed. `done` rises after the last write
  request, and `out_beats` gives the compressed size of the new plane.

The floating-point units round to nearest even. They flush denormals to
zero, overflow to infinity and do not handle NaN or infinity inputs.

## ZipNN search

* **Column decoders** (`column_decoder`): a pipelined group-varint decoder
  (`pgv_decoder`) reads 512-bit words and emits eight 32-bit values per
  cycle. It uses header lookahead so that consecutive groups do not wait
  on one another. The run-length stage (`rle_decoder`, expands
  `<value,count>` pairs) and the delta stage (`delta_decoder`, running
  sum) can each be switched in or bypassed per column with `use_rle` and
  `use_delta`. Only the document-id column has an RLE stage.
* **Merge** joins the three columns into beats of 8 `(doc, word, cnt)`
  tuples.
* **Router** (`knn_router`) cuts the stream at document boundaries. It
  uses one beat of lookahead to see where a document ends, and gives each
  document to an idle `cosine_engine` (4 engines).
* **Cosine engine**: the query is held in a sorted Query Vector Memory
  (up to 1024 entries). Each cycle the engine merge-compares 8 document
  tuples against one query entry.
  * The score is `min(2^32-1, dot^2 * 2^8 / sum(cnt^2))`. This is the
    square of the cosine similarity without the query norm, which is the
    same for every document, in fixed point. Larger means closer.
  * A 32-cycle restoring divider produces the score.
* **Top-K sorter** (`topk_sorter`): K = 128 entries are kept in a queue of
  tuples 4 wide, so an insertion walks 32 rows.
  * A global-minimum register drops scores that cannot enter a full queue
    in a single cycle. Once the queue has filled, most documents take this
    path.
  * A 512-entry FIFO absorbs bursts of insertions.
  * `n_insert` and `n_drop` count both outcomes.

## Where this design departs from the source description

* The chunk end marker, the zero fill and the exact header bit layout are
  this design's choice. The source says only that chunks are aligned,
  padded and independent.
* The encoder and decoder counts (4 each) and the fragment width (512
  bits) are chosen here.
* The cosine score is a fixed-point squared form (see above). The source
  names cosine similarity but gives no arithmetic.
* The heat update uses one coefficient on the sum of the seven points. The
  source does not print the formula.
* DMA engines move whole chunks, one chunk per burst.
* Only the 3D heat stencil is built. The 2D LBM and SRAD cores, and the
  temporal blocking of the 2D accelerator, are not.
* The ZFP-V1 (1D) coder is not built. ZFP-V2 is the main design.
* DRAM, PCIe and flash are outside the RTL. A behavioural DRAM model
  (`tb/dram_model.sv`) serves the testbenches.

## Parameters

| module | parameter | default |
|---|---|---|
| burstz_platform / accel_top | NX, NY (plane size in doubles) | 1024, 1024 |
| | CHUNK_BYTES | 6144 |
| | N_ENC, N_DEC | 4, 4 |
| mem_arbiter | N_EP, BUF_DEPTH, MAX_BURST | 5, 512, 256 |
| zipnn_top | N_ENG, QVM_DEPTH, K, FIFO_DEPTH | 4, 1024, 128, 512 |

NX must be a multiple of 4.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. The reference models are SystemVerilog
packages: `tb/zfp_ref_pkg.sv`, `tb/zipnn_ref_pkg.sv` and
`tb/zipnn_knn_ref_pkg.sv`.

To run one with Verilator (packages first):

```
verilator --binary --timing -Irtl -Itb rtl/*_pkg.sv tb/*_pkg.sv \
  $(ls rtl/*.sv | grep -v _pkg.sv) tb/tb_zfpv2_decoder.sv \
  --top-module tb_zfpv2_decoder -o sim && obj_dir/sim
```

End-to-end tests:

* `tb_accel_top` runs one BurstZ+ plane update at NX=32, NY=8 with 256-byte
  chunks, and two ZipNN queries. It counts each of these mechanisms and
  fails if any never happens:
  * arbiter hold-back;
  * memory stalls;
  * the stencil waiting for a plane;
  * multi-chunk output;
  * zero blocks;
  * edge cells;
  * top-K inserts and drops;
  * the RLE mode switch;
  * use of every engine.
* `tb_accel_full` does the same at the full defaults: a 1024x1024 plane in
  6 KB chunks. It checks every output chunk against the reference, and
  runs in a little over a minute.
