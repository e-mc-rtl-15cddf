# E²MC: Huffman-coded memory compression for a GPU memory controller

GPU kernels that are limited by memory bandwidth gain speed when fewer bytes
cross the DRAM bus. This RTL puts an entropy coder inside a memory
controller. Every 128-byte block written to DRAM is Huffman-coded as 64
symbols of 16 bits. Only the 32-byte DRAM bursts the coded block needs are
written. On a read, only those bursts are fetched and then decoded. The goal
is more bandwidth, not more capacity: every block keeps its full 128-byte
slot in DRAM. Requesters (L2, on-chip network) see plain 128-byte blocks.

The scheme is E²MC ("Entropy Encoding Based Memory Compression for GPUs"),
in its main configuration:
- 16-bit symbols;
- a canonical Huffman code over the 1K most frequent values (MFVs);
- codewords of at most 20 bits;
- 4 parallel decoding ways;
- an 8 KB metadata cache.

The RTL follows that scheme. Where the scheme leaves things open, the choices
made here are listed in the last section but one.

## The code and how the tables hold it

Software builds the code, either offline or from a short online sampling
phase. It loads the code into tables through one write port (`cfg_wr_t` in
`e2mc_pkg`). The hardware never builds a Huffman tree.

- **Canonical code.** The codes are sorted by length. The first code is all
  zeros. Each next code is the previous one plus one, shifted left by however
  much the length grows. Take three symbols with lengths 1, 2 and 3: they get
  `0`, `10` and `110`. Codes of one length are therefore consecutive numbers.
  To decode, the hardware only needs the *first codeword* FCW(l) of each
  length l.
- **Escape.** Values that are not among the MFVs share a single *escape*
  codeword. It is written as a prefix, followed by the raw 16-bit value.
- **Tables.**

  | table | where | content | write format (`cfg.addr` / `cfg.data`) |
  |---|---|---|---|
  | c-LUT | compressor | CW, CL of each MFV; 8 ways × 128 sets, set = symbol[6:0], tag = symbol[15:7] | `{set,way}` / `{valid, tag[8:0], cw[19:0], cl[4:0]}` |
  | escape | both | escape CW, CL | – / `{cw[19:0], cl[4:0]}` |
  | FCW | decoder | first codeword of length l, right-aligned, plus a valid bit (no code of that length when 0) | `l` / `{valid, fcw[19:0]}` |
  | offset | decoder | offset(l) = FCW(l) − (canonical index of that codeword) | `l` / `offset[19:0]` |
  | De-LUT | decoder | symbol at each canonical index (1025 entries: 1K MFVs plus the escape's slot) | index / `symbol[15:0]` |

  The FCW and offset tables can also be read back. `tbl_rd_len` selects a
  length, and `tbl_rd_fcw` / `tbl_rd_ofs` return that entry combinationally.
  Software can use this to check or save the loaded code.

  The fixed-profile code builder in the testbenches puts the escape at index
  r = 0. The Huffman builder puts it wherever its length sorts. Any position
  works. The decoder recognises the escape by comparing with the escape
  register, not through the De-LUT.

## Format of a compressed block

The stream is read MSB first: bit i of the stream is `cblk[1023-i]`, and
symbol k of a raw block is `blk[1023-16k -: 16]`.

```
byte 0            3                P2               P3               P4
|P2|P3|P4|pad|    way 1 codes |pad| way 2 codes |pad| way 3 codes |pad| way 4 codes |
 7b 7b 7b 3b      symbols 0-15       16-31            32-47            48-63
```

- Pn is the byte address of the first codeword of way n. Each way starts on
  a byte boundary, so several decoders can start on one block at once.
- A block is kept compressed if its total size, header included, is at most
  96 bytes. Otherwise the raw block is stored. Anything larger than 96 B would
  need all four bursts anyway.
- The 2-bit metadata is the number of bursts minus one (`00`, `01`, `10`), or
  `11` for a raw block.

## Compressor (`huff_compressor`, `clut`, `cw_packer`)

The compressor has two stages and takes one symbol per cycle.

1. **Stage 1** reads the c-LUT. The c-LUT is a set-associative cache of the
   MFVs with a registered output.
2. **Stage 2** appends one item to the packer each cycle:
   - a codeword;
   - the escape prefix and then the raw symbol (two cycles);
   - or the zero padding before a new way (one cycle).

   Stage 1 stalls while stage 2 spends an extra cycle.

The packer (`cw_packer`) works like this:
- It keeps an intermediate buffer of BL = 2·maxCL = 40 bits and a write
  position WP.
- A codeword of length CL is zero-extended and shifted left by BL − WP − CL.
  It is ORed into the buffer, and WP grows by CL.
- Once WP ≥ 20, the top 20 bits go to the 1024-bit output buffer. The
  intermediate buffer then shifts left by 20.

Each piece is at most 20 bits long. That is why the escape is split into two
items: this way WP + CL never exceeds 40.

Latency from the start cycle to `done` is 64 + escapes + 3 pads + 6 cycles.
That is 73 cycles for a block made only of MFVs.

## Decompressor (`huff_decompressor`, `huff_decoder_unit`)

`huff_decompressor` reads P2..P4 and starts four `huff_decoder_unit`s at the
same cycle. Each unit decodes 16 symbols. The unit has three stages:

1. **Find the codeword.** Let W be the top 20 bits of a 40-bit buffer. For
   every length l at once, the unit compares `W[19 -: l] >= FCW(l)`. Only
   lengths whose valid bit is set take part. A priority encoder picks the
   longest matching length. For a canonical code, that length is the code
   length CL. The buffer shifts by CL (or by 16 after an escape). Whenever at
   most 20 valid bits remain, the next 20 bits of the block are loaded behind
   them. So the unit always holds at least one full codeword.
2. **Index.** index = CW − offset(CL).
3. **De-LUT read.** The symbol is read here. Escaped symbols skip the De-LUT.

The unit delivers one symbol per cycle. The first one comes 4 cycles after
`start`. A block of MFVs is decoded in 22 cycles from the start cycle, which
is 16 symbols per way plus the pipeline.

## Metadata cache (`mdc`)

The MDC holds 2 bits per block in an 8 KB, 4-way set-associative cache.
Without it, every read would need an extra DRAM access to learn how many
bursts to fetch.

- A line is 32 bytes, the metadata of 128 consecutive blocks, so there are
  64 sets.
- The block address splits into entry `[6:0]`, set `[12:7]` and tag
  `[24:13]`.
- Replacement is true LRU. The cache is write-back and write-allocate.
- Fills and write-backs use the `meta_*` port. Their line address is
  `blk >> 7`.
- A hit answers 2 cycles after the request is taken.

## Online sampling (`vft`)

The value frequency table (VFT) counts 16-bit values: 1K entries, 8 ways ×
128 sets, 32-bit saturating counters. When a set is full, a new value
replaces the entry with the smallest count.

In `MODE_SAMPLE` the controller compresses nothing: every write is stored
raw. Write data, and read data after any decoding, is offered to the VFT.
The VFT counts one block in 64 cycles. So that every request is counted, the
controller does not take a new request in `MODE_SAMPLE` until the VFT is
free again. This slows only the sampling phase. (`vft` on its own ignores a
block offered while it is busy.)

Software then:
1. reads the VFT through `vft_rd_*`;
2. sorts the values by count;
3. builds the length-limited canonical code;
4. loads the tables;
5. sets `MODE_COMPRESS`.

Blocks that were stored raw stay readable: their metadata says `11`, so reads
bypass the decompressor.

## Top level (`e2mc_mc`)

`e2mc_mc` handles one request at a time.

- **Write:**
  1. Compress the block, or store it raw when sampling.
  2. Update the MDC with the new metadata.
  3. Write `bursts = meta+1` (or 4) bursts to DRAM with the compressed or
     raw block.
  4. Pulse `rsp_valid`.
- **Read:**
  1. Look up the MDC (filling from the metadata region on a miss).
  2. Read that many bursts.
  3. If the metadata is `11`, pass the data through. Otherwise decompress.
  4. Pulse `rsp_valid` with `rsp_rdata`.

The configuration write port `cfg` and the table read-back `tbl_rd_*` go
straight to the compressor and decompressor tables. The DRAM port carries a
whole block plus a burst count (1..4). Only the first
`bursts × 32` bytes are significant. The request, DRAM and metadata ports
use valid/ready, and `rsp_valid` is a one-cycle pulse. `ev_*` are
one-cycle pulses for performance counting: compressed store, raw store,
decompression, bypass, sampled block, MDC miss, MDC write-back.

## Where this RTL departs from, or adds to, the published design

- **One compressor and one 4-way decompressor per controller.** Matching the
  full bandwidth of a GTX580-class GPU at a 4× compression ratio takes more
  units. The published estimate is 136 compressor and 240 decompressor units
  in total at 16-bit symbols. Replicating and scheduling them is not built.
- **One request at a time.** The controller finishes each request before
  taking the next. In sampling mode it also waits for the VFT, which counts
  one symbol per cycle.
- **Way count is a parameter.** `NWAY` (1, 2, 4 or 8) sets the number of
  pointers and decoder units. The default is 4. The other values are
  simulated by `tb_pdw_sweep`.
- **Symbol length fixed at 16 bits.** The 4-, 8- and 32-bit variants were
  only compared, and are not built.
- **This design's own choices:**
  - the escape handling in two cycles;
  - the FCW valid bits;
  - the header padding and the position of way 1;
  - the bit order;
  - the metadata values for 1..3 bursts;
  - the MDC line size, replacement and write policy;
  - the VFT organisation and replacement;
  - all interfaces and handshakes.
- **Not implemented:**
  - The code generation (Huffman tree, length limiting to 20 bits, canonical
    assignment) is software, not hardware. `e2mc_tb_pkg::build_code_huffman`
    is a testbench version of it. Its length limit raises every count to a
    minimum, doubled until no code exceeds 20 bits.
  - The DRAM device, the on-chip network and the baseline memory-controller
    scheduling come from the host GPU.
- **Latency.** The published latencies (46 cycles to compress, 82 to
  decompress with one way, at the DRAM clock) come from scaling synthesis
  frequencies. This RTL's cycle counts (73 and 22 with four ways) are in its
  own clock. Decoding 16 symbols per way rather than 64 is where the 4×
  comes from. With one way the decoder takes 70 cycles, which is of the same
  order as the published 82.

## Files

| file | content |
|---|---|
| `rtl/e2mc_pkg.sv` | sizes, `cfg_wr_t`, `mode_e`, metadata helper |
| `rtl/clut.sv`, `rtl/cw_packer.sv`, `rtl/huff_compressor.sv` | compressor |
| `rtl/huff_decoder_unit.sv`, `rtl/huff_decompressor.sv` | decompressor |
| `rtl/mdc.sv` | metadata cache |
| `rtl/vft.sv` | value frequency table |
| `rtl/e2mc_mc.sv` | top |
| `tb/e2mc_tb_pkg.sv` | code builders (fixed length profile; Huffman from counts), table writes, bit-serial reference encoder, block generator |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_pdw_sweep.sv` | compressor and decompressor at 1, 2, 4 and 8 ways side by side |
| `tb/tb_workloads.sv` | sampling, code generation and compression on synthetic data sets |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
Example for the top. Its testbench runs at the default parameters:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/e2mc_pkg.sv tb/e2mc_tb_pkg.sv rtl/clut.sv rtl/cw_packer.sv \
  rtl/huff_compressor.sv rtl/huff_decoder_unit.sv rtl/huff_decompressor.sv \
  rtl/mdc.sv rtl/vft.sv rtl/e2mc_mc.sv tb/tb_e2mc_mc.sv \
  --top-module tb_e2mc_mc -o sim && obj_dir/sim
```

`tb_e2mc_mc` runs the whole flow:
1. a sampling phase with raw stores;
2. a code built from the VFT contents and loaded into the tables;
3. 1500 random reads and writes in compression mode.

It checks:
- every read against a reference memory;
- every write's burst count against the reference encoder;
- that each mechanism listed under `ev_*` occurs, and that some transfers
  use fewer than 4 bursts.

The module testbenches compare with independent models:
- the compressor and the decoders against the bit-serial reference encoder;
- the c-LUT, MDC and VFT against behavioural maps;
- the packer against a bit queue.

They also check the cycle counts given above.

`tb_pdw_sweep` runs the same blocks through 1, 2, 4 and 8 ways. It checks
each compressed block against the reference encoder and checks the
round-trip. It also checks the latencies for a block made only of MFVs:
- compression: 64 + (ways − 1) + 6 cycles;
- decompression: 64/ways + 6 cycles, which gives 70, 38, 22 and 14.

`tb_workloads` runs the whole flow through `e2mc_mc` on four 32 KB data sets.
For each one it samples 32 blocks, builds a Huffman code from the VFT counts
(the escape gets the remaining count), compresses all 256 blocks and reads
them back. It then repeats this with an offline estimate: a code from the
counts over the whole set, using the 8 most frequent values of every c-LUT
set. Typical results (coded ratio / burst ratio):

| data set | content | online | offline |
|---|---|---|---|
| fp_smooth | float32 samples of a smooth function, full mantissa | 1.02 / 1.02 | 1.00 / 1.00 |
| fp_grid | float32 on a 1/16 grid | 3.6 / 2.3 | 3.7 / 2.3 |
| int_small | small int32 values, geometric distribution | 3.9 / 2.8 | 4.1 / 3.2 |
| mixed | {int32 label, float32 weight} pairs | 3.6 / 2.0 | 3.7 / 2.0 |

Two effects show. Low mantissa halves of full-precision floats hardly repeat,
so they all escape. The 32-byte burst granularity costs a lot against the
coded size. A last case uses Fibonacci-weighted counts. Those force the length
limit to act, so the longest code is exactly 20 bits, and blocks containing
such codes still round-trip. All test data is synthetic. None of the published
benchmark traces is included.

Building with `verilator --lint-only -Wall` leaves only warnings about unused
signal bits and about `rst_n` being used both as an asynchronous reset and to
disable assertions.
