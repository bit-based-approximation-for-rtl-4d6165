# Bit-based approximation (BAXX) for a compressing network-on-chip

Many programs tolerate small errors in some of their data: pixels, samples,
probabilities. When such data crosses a chip as cache blocks, the low-order bits
of each word carry little meaning but cost as much bandwidth as the rest.
This RTL turns that tolerance into fewer flits.

The main idea is a transpose. A 64-byte cache block is 16 words of 32 bits.
The sender views it as a 16 x 16 matrix of 2-bit groups and transposes it:

- transposed row 0 holds bits [1:0] of all 16 words;
- row 1 holds bits [3:2] of all 16 words;
- and so on up to row 15, which holds bits [31:30].

After the transpose, the bits that may be wrong are no longer spread thinly over 16
words. They sit together in whole rows at the front of the block. A row that is
entirely "don't care" can then be replaced by whatever compresses best:

- **FP-BAXX** sets those rows to zero. A static frequent-pattern compressor (FPC) then
  squeezes the block; a run of up to eight zero words costs 6 bits.
- **DICT-BAXX** replaces each such row with any pattern that the destination's dictionary
  already knows. An index of 4 bits then travels instead of the 33-bit literal.

The receiver decompresses the block and applies the same transpose again, which
undoes the first. Every word comes back within the error bound the programmer
set.

The design is an 8 x 8 mesh. Each node has:

- a router;
- a sending network interface (NI) that approximates, compresses and packetizes;
- a receiving NI that does the reverse.

The cores and caches are not part of the RTL. Each node's cache-block interface
is brought out as ports on the top.

## From an error threshold to a number of approximable bits

The error threshold `e` is given in percent (`err_pct`, 0 to 127; 0 means exact).
It can change at run time. It is first turned into a right shift:

    S = floor(log2(100 / e))          5 % -> 4, 10 % -> 3, 20 % -> 2, 25 % -> 2

`baxx_pkg::thresh_shift` computes S as the largest `i <= 6` with `e << i <= 100`.
Then `v >> S` is an estimate of the allowed error range for a value `v`. The number of
approximable low bits of a word is the bit length of that range:

    k = bit_length(|v| >> S)

Examples:

- v = 9 at 20 %: 9 >> 2 = 2, so k = 2. The word may become anything of the form 10xx.
- v = 128 at 25 %: 128 >> 2 = 32, so k = 6.

Because k is a bit *length*, the actual deviation can reach about twice the estimated range.
That is a property of the rule, not a bug.

Negative integers use their magnitude.

For IEEE-754 single-precision words (`is_float`):

- the rule is applied to the mantissa with its hidden one, `{8'b0, 1, m[22:0]}`;
- k is capped at 23, so the sign and exponent are never touched;
- exponents 0x00 (zero, subnormal) and 0xFF (infinity, NaN) give k = 0.

`baxx_avcl` is this per-word unit; it is purely combinational.

## The block rule: one minimum, whole rows

A transposed row mixes bits from all 16 words. So a row may only be dropped when
it is approximable in *every* word. `baxx_engine` runs 16 AVCLs in parallel and
takes the minimum k over the block; a zero word contributes 0. Only whole rows are
used:

    rows = floor(min_k / 2)

An odd leftover bit is wasted. For example, with min_k = 5, rows 0 and 1 (bits [3:0]
of every word) are free and bit 4 is kept.

A block is left alone, neither transposed nor changed, in three cases:

- the tile marks it not approximable;
- the threshold is 0;
- rows = 0 (for instance when any word is zero).

In that case the head flit's `approx` flag is 0, and the receiver skips the
post-process transpose.

`baxx_engine` outputs:

- `blk_out`: the transposed block with the free rows zeroed (FP-BAXX), or the input
  unchanged when bypassed;
- `blk_xp`: the transposed block without zeroing, used by DICT-BAXX;
- `rows`, `min_bits` and `approx_out`.

## Bit layout of the transpose

In `baxx_transpose`, row `r` of the output is output word `r`. Inside it, word
`w`'s pair sits at bits `[2w+1:2w]`, so word 0 is at the low end:

    dout[r][2w+1:2w] = din[w][2r+1:2r]

The 16 x 16 group matrix is square, so this map is its own inverse. The same
module therefore serves as pre-process (sender) and post-process (receiver).
Bit order inside a 2-bit group is preserved.

## Frequent pattern compression (FP-BAXX)

`fpc_encoder` codes each of the 16 (transposed, zeroed) words as a 3-bit prefix
followed by a payload. It chooses the shortest pattern that matches:

| prefix | pattern                                        | payload |
|--------|------------------------------------------------|---------|
| 000    | run of 1..8 zero words, payload = run - 1      | 3       |
| 001    | 4-bit value, sign-extended                     | 4       |
| 010    | byte, sign-extended                            | 8       |
| 011    | halfword, sign-extended                        | 16      |
| 100    | halfword padded with a zero low halfword       | 16 (upper half) |
| 101    | two halfwords, each a sign-extended byte       | 16 = {byte 2, byte 0} |
| 111    | uncompressed                                   | 32      |

Prefix 110 is not used; the decoder flags it as an error.

Codes are packed LSB first into a 576-bit stream buffer, with the prefix below
its payload. 576 bits is nine 64-bit flits, enough for the worst case of
16 x 35 = 560 bits.

Timing:

- **Encoder:** handles one word per clock. `done` pulses 17 cycles after `start`.
- **Decoder:** `fpc_decoder` handles one code per clock. For a stream of c codes,
  `done` comes c+1 cycles after `start`.
- **Decoder `err` output:** raised for a bad prefix, for more than 16 words, or when
  the stream does not end exactly at `nbits`.

The pattern table is a fixed set of comparators. Since the set never changes, a
content-addressable memory would match the same patterns.

## Dictionary compression (DICT-BAXX) and how its tables stay consistent

This is the part that takes the most care. Each node has a dictionary encoder
(sending side) and a dictionary decoder (receiving side), each with an 8-entry
pattern matching table (PMT). The encoder may only send an index that the
destination's decoder will expand to the same pattern. The two tables sit at
different nodes and are updated at different times.

**Decoder PMT (`dict_decoder`).** Entry i has:

- a 32-bit pattern;
- a frequency counter;
- one "published" bit per node.

Its index is its position i. Decoding goes one code per clock:

- `{idx, 1}` (4 bits) expands to entry idx. This is an error unless the entry is
  published to the packet's source.
- `{word, 0}` (33 bits) is a literal. Literals are also how the decoder learns:
  - a literal already in the table raises its counter;
  - a new literal is installed with counter 1 in an entry that has never been
    published, choosing a free entry first, else the least-used one.
- When a literal's counter reaches `FREQ_THRESH` (2) from some source s, the
  decoder sends an update (pattern, index) to node s and sets the entry's
  published bit for s.

**Encoder PMT (`dict_encoder`).** Each entry has:

- a pattern;
- a hit counter;
- for each destination node, an index and a valid bit.

An update from node d's decoder writes the pattern (or finds it already present)
and records, for destination d, the index that d uses. A pattern needing a new
entry replaces a free one, else the least-used one.

**Encoding.** The encoder works on the transposed rows:

- A row among the first `rows` approximable rows is all don't-care. It may
  therefore be sent as the index of *any* entry valid for the destination. An
  exact match is preferred, and the receiver gets that pattern in place of the
  row.
- Other rows need an exact match.
- Rows without a usable entry go as literals.

`hits` and `approx_hits` count the index codes and the rows that were replaced by
a different pattern.

**Why the indices never disagree:**

1. The decoder only replaces entries that have never been published. An index it
   has told any encoder about therefore keeps meaning the same pattern for good.
   No invalidation messages are needed.
2. The encoder only uses an index for destination d after d's decoder has sent
   it. Until the update arrives, the encoder sends literals.
3. Update packets and data packets between the same pair of nodes follow the
   same XY path. An update can only make the encoder *start* using an index that
   already exists at the decoder, so their relative order does not matter.
4. If the encoder evicts an entry, it simply forgets the mapping. The decoder
   keeps it, which is harmless.

The cost of this scheme is that a decoder whose 8 entries are all published
stops learning. This keeps the hardware simple and never gives wrong data.

**Flow control of updates.** The decoder publishes only when `upd_ready` is high,
that is, when the receiving NI's 4-entry update queue has room. Otherwise it does
not set the published bit and tries again the next time the pattern arrives.
Decoding never waits for the network.

**Update packets.** The sending NI turns a queued update into a two-flit packet:

- a head flit with the `upd` flag, addressed to the node whose encoder must learn;
- one data flit `{idx, pattern}`.

Update packets go ahead of waiting blocks. At the destination, the receiving NI
passes the update (with the packet's source as the decoder node) to that node's
encoder through `pmt_wr_*`.

`comp_dict` selects FP-BAXX (0) or DICT-BAXX (1) for all nodes. A head flit carries
a `dict` flag, so blocks sent under either scheme are decoded correctly.

## Packets and network interfaces

A block travels as one packet: a head flit, then ceil(nbits/64) data flits
carrying the stream. A flit is `{head, tail, data[63:0]}` (`baxx_pkg::flit_t`).
The head flit's data is `head_t`, listed here from the MSB down:

| field     | bits | meaning |
|-----------|------|---------|
| rsvd      | 30   | unused (0) |
| nbits     | 10   | stream length in bits |
| ndata     | 4    | number of data flits (1..9) |
| upd       | 1    | dictionary update packet |
| dict      | 1    | stream is dictionary-coded |
| is_float  | 1    | data type of the block |
| approx    | 1    | block was transposed; receiver must post-process |
| src_y, src_x | 4 + 4 | source node |
| dst_y, dst_x | 4 + 4 | destination node |

The node id is `y * 8 + x`.

**`baxx_ni_tx`** takes a block with a valid/ready handshake (one block in flight).
It runs the engine and one of the two encoders, then writes the head flit and the
data flits into a 4-flit injection queue. That queue feeds the router's local
input, one flit per credit. With free credits, counting the edge that accepts the
request as edge 0:

- the encoder starts at edge 1 and finishes at edge 17;
- the head flit enters the queue at edge 19 and is taken by the router at edge 20;
- data flits follow one per cycle.

`last_rows` and `last_nbits` report the last block's row count and stream length.

**`baxx_ni_rx`** is fed by the router's local output through a 4-flit ejection
queue, which returns credits. It works through these steps:

1. It collects the data flits into a stream buffer.
2. It starts the FPC or dictionary decoder on the tail flit.
3. It transposes the result back if `approx` is set.
4. It presents the block on `out_valid`/`out_ready` with its source, flags and `out_err`.

A block of c codes is on `out_valid` c+1 edges after the tail flit leaves the
queue. While a block waits, no further flits are taken, so back-pressure reaches
the network through credits.

A stream longer than 512 bits (more than 8 data flits) is still sent
compressed, in up to 9 data flits. There is no fall-back to the raw block.

## Router and mesh

`noc_router` has five ports, numbered 0 local, 1 north (y-1), 2 east (x+1),
3 south (y+1) and 4 west (x-1). It uses:

- XY dimension-order routing;
- wormhole switching (an output stays locked to one input from head to tail);
- credit-based flow control with 4-flit input buffers (`flit_fifo`).

The pipeline has three stages:

1. buffer write;
2. route computation together with round-robin switch allocation per output;
3. switch traversal into an output register.

An unloaded flit leaves two cycles after it enters.

`baxx_noc_top` builds the 8 x 8 mesh and wires the neighbour links, credits
included. Unused edge ports are tied off. Each node's router, NIs and local
dictionary update wires are in a `g_node[n]` generate block. The tile side of
every node is brought out as arrays indexed by node id:

- `req_*`: block to send;
- `out_*`: block received;
- `tx_rows`, `tx_nbits`.

## Where this RTL departs from the design it follows

- **Virtual channels.** The router has one virtual channel per port. The original
  router has 4 virtual channels of 4 flits each, with VC allocation. Compression
  results do not depend on this, but contention behaviour does.
- **Float rule.** Float words are approximated on the mantissa only. Zero, subnormal,
  infinity and NaN words are never approximated.
- **Range estimate.** `k = bit_length(|v| >> S)`, with S the floor of log2(100/e).
  The original wording gives the divisor 100/e and a worked example. The floor
  of its log2 is what reproduces that example.
- **Zero words.** They count as tolerating 0 bits. So a block containing a zero word
  is not approximated.
- **Dictionary policy.** These are choices made here:
  - publishing threshold of 2;
  - a published entry is never replaced;
  - updates are dropped (and retried later) when the update queue is full;
  - no stored approximate versions of patterns (a whole approximable row matches
    any pattern, so they are not needed).
- **Specified here, not in the original.**
  - packet format, head-flit fields and code formats;
  - stream bit order;
  - NI queue depths;
  - the one-block-at-a-time NIs;
  - FPC zero-run encoding (payload = run - 1);
  - decoder error flags.
- **No raw fall-back.** A long compressed stream is not replaced by the raw block.
- **Not in the RTL.** Cores, caches, directories and the coherence protocol.

## Simulating

Everything is plain SystemVerilog 2017. There are no vendor primitives and no
include paths beyond `rtl/` and `tb/`. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/baxx_pkg.sv tb/tb_ref_pkg.sv tb/tb_baxx_noc_top.sv \
        --top-module tb_baxx_noc_top -o sim
    ./obj_dir/sim

Replace the testbench name to run any other one. Each testbench prints
`TB_RESULT checks=N failures=M` and ends itself; a watchdog ends it if it hangs.

`tb_ref_pkg` holds independent reference models used by all testbenches:

- threshold shift and approximable bits;
- the row rule and the transpose;
- an FPC encoder;
- random block generators (mixed, similar integers, floats, random).

| testbench | what it checks |
|-----------|----------------|
| tb_baxx_avcl | approximable bits for random and edge-case integers and floats, all thresholds |
| tb_baxx_transpose | transpose against the reference; applying it twice gives the input |
| tb_baxx_engine | minimum, row count, zeroing, bypass; every word within its bound after the round trip |
| tb_fpc_encoder | stream bit-exact against the reference encoder; 17-cycle latency |
| tb_fpc_decoder | round trip of random blocks, malformed streams, latency c+1 |
| tb_noc_router | XY port, wormhole order, no loss, credits, 2-cycle latency, contention and stalls |
| tb_baxx_ni_tx | FP-BAXX packet contents against the reference, head-flit timing, update packets |
| tb_baxx_ni_rx | FP-BAXX packets delivered within bounds, tile back-pressure, bad length, update hand-over |
| tb_dict_encoder | stream against a model of the encoder PMT, approximate hits, latency |
| tb_dict_decoder | expansion, learning and publishing against a model of the decoder PMT |
| tb_baxx_noc_top | full 8 x 8 mesh at default parameters (see below); the DICT-BAXX path through the NIs is tested here |

`tb_baxx_noc_top` runs the whole mesh at its defaults, in four phases:

1. FP-BAXX at 10 %;
2. FP-BAXX at 20 %;
3. FP-BAXX at 0 %, i.e. exact;
4. DICT-BAXX at 10 % with repeated data.

In phases 1 to 3, nodes send to random destinations. In the DICT phase, each node
sends to a fixed partner.

The testbench checks each delivered block in three ways: against the sent one
within the error bound, bit-exact where no approximation was allowed, and with the
source and flags as sent. It counts and requires each of these mechanisms:

- approximated, bypassed, float and exact blocks;
- short and long packets;
- NI and tile back-pressure;
- credit stalls;
- dictionary updates, index hits and approximate dictionary hits.

Compilation takes a few minutes. The run itself takes about a second.

## Files

- `rtl/baxx_pkg.sv`: sizes, flit and head-flit types, FPC prefixes, threshold and bit-length functions.
- `rtl/baxx_avcl.sv`, `rtl/baxx_transpose.sv`, `rtl/baxx_engine.sv`: the approximation path.
- `rtl/fpc_encoder.sv`, `rtl/fpc_decoder.sv`: frequent pattern compression.
- `rtl/dict_encoder.sv`, `rtl/dict_decoder.sv`: dictionary compression and its tables.
- `rtl/baxx_ni_tx.sv`, `rtl/baxx_ni_rx.sv`: network interfaces.
- `rtl/flit_fifo.sv`, `rtl/noc_router.sv`: buffers and router.
- `rtl/baxx_noc_top.sv`: the 8 x 8 mesh.
- `tb/`: one testbench per module, plus `tb_ref_pkg.sv`.
