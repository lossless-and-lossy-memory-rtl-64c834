# Compressed memory I/O link for a GPU memory controller

GPU workloads that are limited by memory bandwidth spend their time waiting
for 128-byte blocks to cross the DRAM link. This design adds compression to a
GPU memory controller so that those blocks cross the link in fewer 16-byte
bursts. Global and texture data are kept compressed in DRAM. When a block
shrinks to N of its eight 16-byte chunks, a read fetches only N chunks and a
write stores only N. The rest of the GPU never sees compressed data: it is
compressed on the way into DRAM and decompressed on the way out, inside the
memory controller.

An optional lossy mode adds to the lossless scheme. For arrays of
single-precision floating-point values, the software can ask for 8, 12 or 16
mantissa LSBs to be dropped before compression. This shrinks the block
further, and those bits read back as zeros.

The RTL covers one memory controller's compression extension (`mc_comp`)
and all of its parts. A GPU has one such controller per memory channel: eight
in the reference configuration. The DRAM controller, the DRAM, the SMs and the
DMA engine are outside this RTL. A behavioural DRAM model for simulation is
in `tb/gddr_model.sv`.

## How a block is stored

* Every 128-byte block keeps its full 128-byte slot in DRAM, whatever its
  compressed size. Compression saves link traffic and latency, not
  capacity. A block written compressed to N chunks occupies the first N
  chunks of its slot.
* Each block has a one-byte **metadata entry** (`md_entry_t` in
  `rtl/mc_comp_pkg.sv`):

  | bits | field | meaning |
  |------|-------|---------|
  | 2:0  | `nm1`   | stored chunks minus one (compressed blocks) |
  | 3    | `comp`  | 1 = stored compressed |
  | 5:4  | `trunc` | LSBs dropped per word: 0, 8, 12 or 16 |
  | 7:6  | —       | zero |

  An all-zero entry means "raw, 8 chunks". Memory that was never written
  through the compressor therefore reads back correctly if the metadata
  region starts out zeroed.
* Entries live in a reserved DRAM region starting at `MD_BASE`
  (default `0xFE00_0000`). One 128-byte metadata line holds the entries of
  128 consecutive blocks, which is 16 KB of data. The line for block `B` is at
  `MD_BASE + 128*(B/128)`. With 32-bit addresses the region takes 32 MB.
* A block is written compressed only when that takes fewer chunks than
  storing it raw. The raw size is 8 chunks, or 6, 5 or 4 chunks after
  truncation.

## The block coder

`cpack_compressor` and `cpack_decompressor` use a dictionary coder on 32-bit
words, in the style of cache-line compressors. Each word is compared with a
16-entry dictionary of recent words, which is filled first-in first-out. The
word is then coded with the shortest of six patterns:

| pattern | condition | code | bits |
|---------|-----------|------|------|
| zzzz | word is zero | `00` | 2 |
| mmmm | whole word in dictionary | `10` + index | 6 |
| zzzx | upper 24 bits zero | `11`,`01` + low byte | 12 |
| mmmx | upper 24 bits match an entry | `11`,`10` + index + low byte | 16 |
| mmxx | upper 16 bits match an entry | `11`,`00` + index + low half | 24 |
| xxxx | anything else | `01` + word | 34 |

Codes are packed least-significant bit first: the first prefix shown is in the
lowest two bits. After a partial match or a literal, the word enters the
dictionary. If several entries match, the lowest index wins. The compressor and
decompressor share the per-word functions `cpack_step` and `cpack_unstep`, so
their dictionaries evolve identically. The testbenches check both against a
separate reference coder.

* **Compressor:** it takes two words per cycle (64 bits) through a 3-stage
  pipeline:
  1. code the pair, with the second word seeing the first word's dictionary
     update;
  2. join the two codes;
  3. append them to the output string.

  `done` rises `nwords/2 + 2` clock edges after the edge that samples
  `start`. That is 18 edges for a full block.
* **Decompressor:** it decodes four words (16 bytes) per cycle and is not
  pipelined. The parameter `BYTES_PER_CYCLE` (`DEC_BYTES_PER_CYCLE` on
  `mc_comp`) also allows 4, 8 or 32 bytes per cycle, which is one to eight
  words. It is opened with `start` as soon as the block's metadata entry
  is known, which is before the data arrives. The entry gives the word count
  and the chunk count. Compressed chunks are then written into it one per
  cycle as they leave the pre-decompression queue.

  Each cycle it peels four codes off the input at its read pointer,
  updating the dictionary after each one. It only does so when the whole
  block is in, or when at least 136 code bits (four of the longest codes)
  beyond the pointer have arrived. So decoding proceeds while the DRAM
  bursts are still coming in, and finishes shortly after the last chunk.
  * With all chunks loaded before `start`, `done` rises `nwords/4` edges
    after `start` (8 for a full block). At other rates, replace 4 with the
    number of words per cycle, rounding up.
  * Otherwise, `done` rises at most that many edges after the last chunk.

## Lossy mode

A write carries a 2-bit `req_trunc` code. This stands for the copy-to-device
call in which the programmer marks an array as truncatable.
`fp_trunc_pack` removes the low k bits of every word (k = 8, 12 or 16). The
block becomes `32−k` words (96, 80 or 64 bytes), which is what the
compressor codes. The packing is split in two parts:

* Words 0 to 15 hold the upper 16 bits (sign, exponent and top of the
  mantissa) of all 32 values, two per word.
* From bit 512 on follow the remaining (16−k)-bit low parts, back to back.

Keeping the upper halves word aligned matters. Neighbouring FP values in an
array usually share their sign, exponent and top mantissa bits, and the
dictionary coder finds these repeats only on word boundaries. Packing the
(32−k)-bit fields back to back would smear each value across two words and
hide the repeats.

The `trunc` field of the metadata entry records k. On a read,
`fp_trunc_unpack` undoes the packing and fills the dropped LSBs with zeros.
Integer data must never be written with a non-zero `trunc`.

## Read path

1. The request side looks up the block's entry in `md_cache`, a 2-way
   set-associative, 32-line, write-back cache with LRU replacement.
2. `reqsize_mod`, the request size modifier, picks the number of chunks to
   fetch:
   * **Hit:** the exact stored size, so fewer than 8 chunks for a compressed
     block. This is where the bandwidth is saved.
   * **Miss:** the full 8 chunks. The read is not held back while the
     metadata is fetched.
   * **Local or constant address space:** the full 8 chunks, bypassing
     compression entirely.
3. On a miss, `md_mshr` (10 entries) records the metadata line and sends one
   metadata read for it. Further misses on a line already in flight merge
   into the same entry.
4. Data chunks return in order into `pre_decompQ` (32 × 16 B). The response
   side takes reads in request order. If the oldest read went out without
   metadata, its data **waits at the decompressor** until the metadata line
   has been filled into the cache. The read then uses only the chunks the
   entry declares valid and discards the rest. If the line was evicted again
   before the read got to it, the read asks the MSHR for it once more.
5. The chunks go through the decompressor (if `comp`) and through
   `fp_trunc_unpack` (if `trunc`). The result is a 128-byte block placed in
   `rd_respQ`, which holds 4 blocks (32 × 16 B).

Metadata lines come back on their own response port (`md_resp_*`), separate
from data. A data block waiting for its metadata can therefore never block
the metadata it waits for. The DRAM controller must serve metadata reads
independently of data reads that are held up behind a full `pre_decompQ`.
`dram_req_arb` sends metadata requests ahead of data requests: dirty-line
write-backs first, then metadata reads, then the data request queue.

## Write path

* **Full-block global/texture write:**
  1. Optional truncation.
  2. Compression.
  3. Choice between the compressed and raw form.
  4. Metadata update. The cache line is only written, and so only made
     dirty, if the entry actually changed.
  5. Data write of N chunks.

  The metadata entry must be in the cache to be updated. If it is not, the
  write waits for the line through the MSHR. The write also waits while any
  older read is still waiting for its metadata. That read then takes the
  entry that matches the data it fetched.
* **Partial global write (some bytes of `req_mask` are clear):** this turns
  into a read-modify-write. The block is read through the normal read path as
  a `g_rdpaired` read, including decompression. The response goes back to
  the request side through `g_rdpaired_respQ` (4 blocks) instead of to
  `rd_respQ`. It is merged byte by byte
  with the write data and written as a full block. This is the expensive case
  of the scheme.
* **Local/constant write:** written raw, 8 chunks, as a full block.

Reads issued before a write carry their metadata entry with them, so they are
not affected when the write updates it. DRAM requests leave in order, so a
later read of the same block sees the new data and the new entry.

## Module map

| file | role |
|------|------|
| `rtl/mc_comp_pkg.sv` | widths, `md_entry_t`, `dram_req_t`, event struct, word coder functions |
| `rtl/mc_comp.sv` | top: request-side and response-side controllers, wiring |
| `rtl/cpack_compressor.sv` | 64-bit/cycle, 3-stage block compressor |
| `rtl/cpack_decompressor.sv` | 128-bit/cycle block decompressor that decodes while chunks arrive |
| `rtl/fp_trunc_pack.sv`, `rtl/fp_trunc_unpack.sv` | lossy LSB removal and re-expansion |
| `rtl/md_cache.sv` | metadata cache |
| `rtl/md_mshr.sv` | metadata MSHR table |
| `rtl/reqsize_mod.sv` | request size modifier |
| `rtl/dram_req_arb.sv` | DRAM request priority |
| `rtl/sync_fifo.sv` | queues (request queue, read tracking, pre_decompQ, rd_respQ, g_rdpaired_respQ, write-back queue) |
| `tb/gddr_model.sv` | behavioural DRAM controller + memory (simulation only) |
| `tb/tb_*.sv` | self-checking testbenches: one per block, `tb_mc_comp` end to end, `tb_mc_workload` for a floating-point workload, `tb_mc_decrate` for the decompressor rate sweep |

## Interfaces of `mc_comp`

All handshakes are valid/ready. A transfer happens on a clock edge where both
are high.

* **Requests** (`req_*`). The fields are:
  * `req_write`;
  * `req_space`: global, texture, local or constant;
  * `req_addr`: a byte address local to this controller; bits 6:0 are
    ignored;
  * `req_mask`: 128 byte enables;
  * `req_data`: 1024 bits, word i in bits `32i+31:32i`;
  * `req_trunc`;
  * `req_id`: returned with read data.

  One request is taken at a time. `req_ready` is high only when the request
  side is idle.
* **Responses** (`resp_*`): one 128-byte block per read, in request order.
* **DRAM controller:**
  * `dram_req` (`dram_req_t`) carries kind (read, write, metadata read,
    metadata write), block address, chunk count, MSHR tag, and write data
    (chunk k in bits `128k+127:128k`).
  * Read data returns on `dram_rd_*` one 16-byte chunk per transfer, in
    request order.
  * Metadata reads return whole lines on `md_resp_*`, tagged with the request's
    MSHR entry.
* **`ev`:** one-cycle pulses of 13 events (metadata hit/miss, MSHR merge,
  metadata stall, write stall, eviction, short read, decompression,
  compressed/raw/lossy write, read-modify-write, bypass), for counters.

Parameters of `mc_comp` (defaults in brackets):

| parameter | default | source |
|-----------|---------|--------|
| `MD_LINES` | 32 | scheme |
| `MSHR_ENTRIES` | 10 | scheme |
| `PREDECOMP_DEPTH` | 32 | scheme |
| `RESPQ_BLOCKS` | 4 | scheme |
| `REQQ_DEPTH` | 8 | this design's choice |
| `TRACK_DEPTH` | 8 | this design's choice |
| `MD_BASE` | `0xFE00_0000` | this design's choice |
| `DEC_BYTES_PER_CYCLE` | 16 | scheme (4, 8 and 32 also supported) |

Reset is asynchronous and active low.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Each one
needs the package first, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mc_comp_pkg.sv tb/tb_mc_comp.sv --top-module tb_mc_comp -o sim
./obj_dir/sim
```

`tb/gddr_model.sv` stands in for the DRAM controller and the GDDR3 memory.
* Read data returns in request order, at least 12 cycles after the request.
* It returns at most one 16-byte chunk per 4 cycles (one four-transfer burst
  on a 4-byte bus), so link time grows with the number of chunks.
* Metadata lines come back on their own port after the same latency.
* It counts the data chunks moved, which measures link traffic.

`tb_mc_comp` runs the controller at its default parameters against
`gddr_model`. The traffic it generates is:
* DMA-style block writes of zero, small-integer, shared-upper-bits, random and
  truncated FP data;
* global and texture reads;
* partial writes;
* local and constant accesses;
* 60 random mixed requests.

Every read is compared with a reference memory. The test checks that a
compressible block is read with fewer than 8 chunks. It counts each of the 13
events and fails if any of them never happens. It finishes in well under a
second.

The unit testbenches check the following:

| testbench | what it checks |
|-----------|----------------|
| `tb_cpack_compressor` | against an independent coder: bit-exact output, length, latency |
| `tb_cpack_decompressor` | round trip and latency at all four rates, with chunks loaded before `start` and streamed in after it with gaps |
| `tb_fp_trunc` | both lossy modules |
| `tb_md_cache` | against an LRU cache model |
| `tb_md_mshr` | against an MSHR model |
| `tb_reqsize_mod` | exhaustively |
| `tb_dram_req_arb` | priority rules |
| `tb_sync_fifo` | against a queue model |

`tb_mc_workload` runs a memory-bound floating-point pattern through the
default controller: a smooth single-precision field, like a stencil or
thermal grid. It writes 128 blocks (16 KB, one metadata line) of the field
into four regions, one per truncation setting, plus one region of random data.
It then reads each region back in sequence. It checks:
* the values, each exact apart from its dropped LSBs;
* that link traffic falls as truncation grows;
* one metadata miss per region;
* that truncated reads finish sooner than raw ones.

It prints per region:

| region | chunks per block | mean read latency (cycles) | normalised RMS error |
|--------|------------------|----------------------------|----------------------|
| FP field, lossless | 6.54 | 41 | 0 |
| FP field, 8 LSBs dropped | 4.03 | 31 | 3.4e-4 |
| FP field, 12 LSBs dropped | 3.04 | 27 | 5.5e-3 |
| FP field, 16 LSBs dropped | 1.98 | 25 | 8.9e-2 |
| random data | 8.00 | 45 | 0 |

`tb_mc_decrate` runs four controllers side by side, one per decompressor
rate. Each copies in the same 128-block lossless field and then reads it
back as a stream of reads. Link traffic is identical at every rate (835
chunks). Only the time changes:

| decompressor rate (bytes/cycle) | cycles per block |
|---------------------------------|------------------|
| 4 | 36.1 |
| 8 | 26.2 |
| 16 | 26.2 |
| 32 | 26.2 |

* At 4 bytes per cycle, decoding a block takes longer than its chunks take
  to arrive.
* From 8 bytes per cycle up, the link is the limit.

These figures describe this synthetic field and this DRAM model only. They
are not a prediction for any particular application.

## Choices and departures

* **Metadata entry size.** The scheme counts 4 bits per block for lossless
  compression: a compressed flag and a 3-bit chunk count. That gives 256
  blocks per 128-byte line and a 16 MB region. It then adds 2 bits for the
  truncation amount. Here the entry is one byte, so a line covers 128 blocks
  (16 KB, half the reach per cache line) and the region is 32 MB.
* **Truncation amounts** are 0, 8, 12 and 16 bits. The scheme evaluates 8 to
  16 and records the amount in 2 bits.
* **Coder.** The pattern set follows the dictionary compressor the scheme
  relies on. The code bit layout, dictionary size, and match-selection rule
  are this design's.
* **Request side.** It processes one request at a time. Reads overlap with
  decompression of earlier reads, but writes are serialised. Writes whose
  metadata is not cached wait for it.
* **Queues.** After decompression there are two queues of 4 blocks each:
  * `rd_respQ` carries all read responses. The scheme has a separate global
    response queue feeding it, but here local reads take the same in-order
    path, so one queue serves.
  * `g_rdpaired_respQ` carries read-modify-write data back to the request
    side.

  The queue in front of the compressor is the block register itself. The
  request and tracking queue depths (8) are assumptions.
* **Decoding while chunks arrive.** The scheme has each arriving burst expand
  into its share of the block. How this is done is this design's choice:
  the decompressor is opened as soon as the metadata entry is known and
  decodes a group whenever enough code bits have arrived.
* **Compressor rate.** The scheme gives the compressor's rate once as
  4 bytes per cycle and once as 64 bits per cycle. This design uses
  8 bytes (two words) per cycle.
* **One compressor/decompressor pair per controller.** A second decompressor
  gave about 1% in the scheme's evaluation and is not built.
* **Clock frequency.** The targets (800 MHz controller, about 1.2 GHz coder)
  are not addressed by this RTL. All of it runs on one clock.
* **Multi-channel address interleaving** happens outside this block: its
  addresses are already local to one controller.
* **Reset of DRAM contents.** The DRAM model reads unwritten memory as zero.
  A real system must zero the metadata region at initialisation.
