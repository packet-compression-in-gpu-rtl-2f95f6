# DSM packet compression for a GPU reply network

In a GPU, memory controllers (MCs) send 128-byte cache blocks back to the
streaming multiprocessors (SMs) over a crossbar. Bursts of these read replies
congest the MC end of the network. This RTL compresses each reply before it is
cut into flits and decompresses it right after the flits are put back
together. Fewer flits per reply means less time the MC spends stalled.

The compressor is **Data Segment Matching (DSM)**. It does two cheap things:

1. **Nibble remapping.** The 32 four-byte elements of a block are transposed
   so that nibble *j* of every element sits next to nibble *j* of the others.
   Integers with equal high bytes, repeated values, zeros, padding bytes and
   floating-point sign/exponent fields then turn into long runs of one
   nibble value.
2. **Segment matching.** Each 8-byte segment of the remapped block is tested
   for being one nibble repeated 16 times: a *CSN* (consecutive same nibble)
   segment. A CSN segment is sent as its 4-bit nibble. Any other segment is
   sent raw.

An optional **approximation** step, for single-precision floating-point data,
zeroes the lowest 4, 8, …, 20 mantissa bits of every element in
address ranges the programmer marked as approximable. After remapping these
bits are whole nibble groups, so zeroing them makes more all-zero CSN
segments.

The scheme is the one proposed in the thesis *Packet Compression in GPU
Architectures*; this RTL is an independent implementation of it, with the
choices listed further down.

The hardware has no dictionaries and no variable-length codes beyond "4 bits
or 64 bits". It compresses in 2 cycles (4 with approximation), fully
pipelined, and decompresses in 1 cycle.

## Data path and timing

```
MC side                                                        reply crossbar   SM side
 128 B reply ─► data_remap ─► approx_unit ─► 2 × dsm_compressor ─► var_concat     (outside)
   (addr,        wiring        2 cycles        2 cycles, 64 B each    wiring
    read/write)                                                      │
               comp_buffer (FIFO, 4 packets) ◄───────────────────────┘
                     │
               flit_packetizer ─► mc_flit_* ══════════════► sm_flit_* ─► flit_depacketizer
                                                                               │ 1 cycle
        L1D ◄── data_unremap ◄── 2 × dsm_decompressor ◄── chunk split ◄────────┘
                 wiring            1 cycle                  wiring
```

| Step                                            | Cycles                                |
|-------------------------------------------------|---------------------------------------|
| reply accepted → packet at compression output   | 4 (2 approximation + 2 compression)   |
| → first flit on `mc_flit_*` (idle system)       | 6 (one cycle in the buffer, one in the packetizer) |
| tail flit accepted → packet at decompressor     | 1                                     |
| → block on `sm_data`                            | 1 (decompression)                     |

`dsm_packet_top` holds one MC-side and one SM-side interface. The crossbar
between them is not part of the design, so its two flit interfaces are ports.
A full GPU would have one MC-side interface per memory controller and one
SM-side interface per SM.

Write replies go down the same pipeline, which keeps them in order, but they
are neither approximated nor compressed.

## Nibble remapping (`data_remap`, `data_unremap`)

Element *i* (bytes 4*i*…4*i*+3, little endian) has nibbles *j* = 0…7. It
moves to remapped nibble position *j*·32 + *i*. Nibble group *j* is 16 bytes
and holds nibble *j* of all 32 elements. Group 0 holds the least-significant
nibbles and group 7 the most significant. For example, 32 copies of
`0x7fffffff` become seven groups of `f` and one group of `7`: all 16 segments
are CSN.

The two 64-byte DSM units split the remapped block down the middle:

* DSM 0 gets groups 0–3 (the low 16 bits of every element).
* DSM 1 gets groups 4–7 (the high 16 bits).

Each DSM segment is half a group (nibble *j* of 16 elements).

## Approximation map (`approx_unit`)

The map has eight entries `{start, end, bits}`, written through the `map_*`
port. It stands in for what the host would send when it allocates
approximable memory. A zero `bits` marks an unused entry, and reset clears
the map.

**Stage 1.** The block address is compared with all eight ranges in parallel.
Both bounds are inclusive, and the lowest-index hit wins. The hit's `bits`
value is decoded into a 5-bit thermometer mask:

| bits     | 4     | 8     | 12    | 16    | 20    |
|----------|-------|-------|-------|-------|-------|
| mask     | 10000 | 11000 | 11100 | 11110 | 11111 |

Values that are not multiples of 4 round down. Values above 20 act as 20.

**Stage 2.** Every nibble group with its mask bit set is zeroed. Each group is
16 bytes of the remapped block.

`out_approx` reports whether anything was zeroed. Approximation is lossy: the
SM receives the block with those low bits cleared. Choosing `bits` for a
dataset is left to software.

## Compressed chunk format (`dsm_compressor`)

One DSM unit turns a 64-byte remapped block into a chunk. Fields are listed
from bit 0 upward:

```
compressed (C = 1):   [0] C=1 | [8:1] ES | ED: seg0 enc, seg1 enc, ... seg7 enc
raw        (C = 0):   [0] C=0 | [512:1] the 64 bytes unchanged
```

* `ES[i]` (chunk bit 1+*i*) is 1 when segment *i* is a CSN segment.
* Segment *i*'s encoding is 4 bits (the nibble) when `ES[i]` = 1, and
  otherwise its 64 raw bits.
* The encodings are packed back to back in segment order. Their positions
  therefore depend on the earlier segments.

A chunk with *n* CSN segments is 9 + 4*n* + 64(8 − *n*) bits long. That is
already shorter than the raw 513 bits at *n* = 1. The comp checker therefore
only has to ask "is any ES bit set?". If none is, the raw form is sent.

**Stage 1.** Eight `csn_detector`s, one per segment, each compare the 15
pairs of neighbouring nibbles. The four pairs of segment encodings are joined
by `var_concat`.

**Stage 2.** Two more levels of `var_concat` pack the pairs. The comp checker
then picks the compressed or raw form.

`out_len` gives the chunk length in bits. `var_concat` places field *b* at
bit `a_len` of field *a* and masks both fields to their lengths.

A 128-byte reply packet is chunk 0 followed directly by chunk 1. Its length
is 18 bits (all 16 segments CSN, e.g. an all-zero block) up to 1026 bits
(nothing compressible).

## Decompression offsets (`dsm_decompressor`, `dsm_decomp_path`)

The receiver needs the start of every segment's encoding. For segment *i*:

* **Bit counter.** *cnt* = number of ones in `ES[i-1:0]`.
* **Shifter.** The encoded data (ED) is shifted right by 4·*cnt* + 64·(*i* − *cnt*).
* **Segment recover.** The low 64 bits of the shifted ED are the segment,
  unless `ES[i]` is 1. In that case the low nibble is repeated 16 times.

All eight segments are restored in parallel, and the output register gives
the 1-cycle latency. A raw chunk (C = 0) is passed through.

`dsm_decomp_path` finds chunk 1 by computing chunk 0's length from chunk 0's
own C and ES fields, using `chunk_len` in `dsm_pkg`. It then shifts the
packet. Bits after the packet's end are ignored, so leftovers in the
receiver's packet register do no harm.

## Packets, flits and back-pressure

* **Flits.** A flit is 32 bytes, so an uncompressed reply needs 4 flits. The
  packetizer sends ⌈length / 256⌉ flits, low bits first. The first flit is
  marked head and the last one tail, and padding is zero. No header flit is
  added: routing belongs to the crossbar.
* **Incompressible replies.** A reply with nothing compressible needs
  1026 bits, i.e. 5 flits. It costs one more flit than sending it
  unencoded. The thesis leaves this case open.
* **Flit reduction.** Compression ratio is measured as 1 − flits / 4.
* **Stalls.** When the crossbar refuses flits (`mc_flit_ready` low), the
  packetizer holds its flit and `comp_buffer` fills. Once the buffer is
  full, the whole compression pipeline holds: every stage shares one enable,
  `adv`. `mc_reply_ready` then drops, which is the MC stall the compression
  is meant to shorten.
* **SM side.** There is no back-pressure: one block per cycle is assumed to
  be accepted.

## Parameters

Shared sizes are in `rtl/dsm_pkg.sv`:

| Name | Value | Meaning |
|------|-------|---------|
| `BLOCK_BYTES` | 128 | cache block |
| `ELEM_BYTES` | 4 | INT / single-precision element |
| `DSM_BYTES` | 64 | one DSM unit (two per block) |
| `SEG_BYTES` | 8 | compression resolution |
| `MAP_ENTRIES` | 8 | approximation map entries |
| `APX_BITS_W` | 5 | width of the approximation number |
| `APX_GROUPS` | 5 | groups that can be zeroed (20 bits) |
| `ADDR_W` | 32 | address width (own choice) |
| `FLIT_BITS` | 256 | flit size (own choice) |

The leaf modules take the same values as parameters. They also run at other
sizes: `tb_dsm_small_example` builds the chain at 16 bytes with 2-byte
segments. The top has one parameter of its own, `BUF_DEPTH` = 4 (own
choice).

## Where this design makes its own choices

These follow the thesis:

* the segment size and CSN encoding
* the C/ES/ED fields
* the remapping rule
* the approximation map's size and decoding
* the two 64-byte units per block
* the 2/2/1-cycle latencies
* leaving write replies uncompressed

These are choices of this design:

* the bit order of the chunk fields and the packing of two chunks into one
  packet
* the 32-byte flit and head/tail framing
* the buffer depth and the valid/ready handshakes with a single pipeline
  stall
* the 32-bit address, inclusive range ends, lowest-entry priority and
  rounding of odd approximation numbers
* asynchronous active-low reset everywhere

One point of the thesis' description is inconsistent. It once says that
ES bits are all ones when nothing compresses. Its worked examples and its
decompressor use ES = 1 for a compressed segment, and this design follows
those.

Not included:

* the crossbar
* the SMs, caches, MCs and DRAM
* the host driver path that fills the map
* the neural-network model that picks approximation bits per dataset (a
  software step)
* replication of the interfaces across the MCs and SMs of a whole GPU

Latency hiding by overlapping compression with flit traversal is also left
out; the thesis' evaluation does not use it either.

## Verification

Each module in `rtl/` has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog.
`tb/dsm_ref_pkg.sv` holds an independent bit-by-bit reference model
(remapping by index arithmetic, compression by appending at a bit pointer)
and a generator of typical GPU block patterns.

| Testbench | What it establishes |
|-----------|---------------------|
| `tb_data_remap`, `tb_data_unremap` | permutation and its inverse, `0x7fffffff` example |
| `tb_csn_detector`, `tb_var_concat` | detector on all nibble values and single-nibble changes; packing with garbage above lengths |
| `tb_approx_unit` | overlapping ranges, rounding, write-reply exclusion, 2-cycle latency, stall hold |
| `tb_dsm_compressor` | chunk and length vs reference, all-CSN case, one-CSN and no-CSN cases, raw mode, 2-cycle latency |
| `tb_dsm_decompressor` | round trip of reference chunks, 1-cycle latency |
| `tb_comp_buffer`, `tb_flit_packetizer`, `tb_flit_depacketizer` | ordering, full/empty, flit counts, head/tail, held flits, gapless packets |
| `tb_dsm_comp_path`, `tb_dsm_decomp_path` | full packets vs reference, 4-cycle latency, stalls, write replies |
| `tb_dsm_packet_top` | 2001 replies end to end at default sizes, through a crossbar model that blocks and delays flits |
| `tb_dsm_small_example` | 16-byte block of four floats with top nibbles 3, c, 6 |
| `tb_dsm_workload_mix` | flit reduction per data class at default sizes |

`tb_dsm_packet_top` checks every delivered block. It counts compressed and
raw packets, approximations, write-reply bypasses, network stalls, full
buffers and MC stalls, and fails if any of them never happened.

`tb_dsm_small_example` gives ES = `00000111` (segment 0 first) without
approximation and `11000111` with 8 approximation bits. These are the
values of the thesis' worked example.

Measured flit reduction in `tb_dsm_workload_mix`, on synthetic data:

| Data class | Flit reduction |
|------------|----------------|
| Integer mix: 19.7% zeros, 41.5% narrow, 18.5% repeated, 20.3% similar | 71% |
| FP, precise | 0% (about 110 bits saved, not a whole flit) |
| FP, 12 approximation bits | 50% |
| FP, 20 approximation bits | 75% |

These numbers describe the synthetic data. They are not benchmark results.

To run one testbench with plain Verilator (5.x), from the folder that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_dsm_packet_top \
    rtl/dsm_pkg.sv tb/dsm_ref_pkg.sv $(ls rtl/*.sv | grep -v dsm_pkg) \
    tb/tb_dsm_packet_top.sv -o sim
./obj_dir/sim
```

The packages come first, and each file only once. Any other testbench runs
the same way with its own name. All testbenches build without warnings
under Verilator's default settings. The whole top simulates in well under a
second.
