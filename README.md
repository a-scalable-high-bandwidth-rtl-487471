# A stall-free LZ77 + static Huffman compressor, 32 bytes per clock

A software compressor like DEFLATE walks through its input one byte at a
time. For each byte it looks up a hash chain for earlier occurrences of the
next few bytes, picks the longest match, and decides between emitting a
literal or a (length, distance) pair. Each decision depends on the previous
one, so the loop does not get faster by adding hardware.

This design breaks the loop by working on a **window** of `PWS` bytes
(32 by default) in every clock cycle. All `PWS` positions of a window are
hashed, looked up, matched and encoded in parallel, and a new window enters
the pipeline each cycle. The dependencies that DEFLATE resolves one byte at a
time are removed in three places:

* **Hash table:** the table is split into banks that each take at most two
  requests per cycle. Any further requests that collide on a bank are
  dropped, so those positions simply find no match.
* **Matching:** each position compares up to `PWS` bytes against its
  candidate in one step. Each matcher reads its own copy of the history
  memory.
* **Match selection:** head/tail selection lets a single match cross into
  the next window. All other matches are trimmed to stay inside their
  window. As a result, the selection of one window depends on the previous
  window only through one small value.

The output is a DEFLATE-style fixed-Huffman block per input stream. At
175 MHz, 32 bytes per cycle is 5.6 GB/s. No clock target is checked here.

## Pipeline at a glance

```
in_data (PWS bytes/cycle)
   |
hash_calc ------- writes each window into the history memory
   |  3 stages (+1 cycle: waits for the next window's first bytes)
hash_table ------ HBN banks, 2 requests per bank per cycle, rest dropped
   |  5 stages        (window bytes travel beside it in pipe_delay)
string_match ---- PWS matchers, each reads PWS bytes from its data_memory copy
   |  7 stages
match_select ---- tail match by max-reduction, head/tail trim, selector chain
   |  PWS + log2(PWS) + 3 stages
huffman_bitpack - huff_encoder -> PWS window_packers (round robin) -> output_packer
   |  PWS + 4 stages
out_data (320-bit words)
```

The stages add up to 22 + 2·PWS + log2(PWS), plus one cycle in which a window
waits for its successor. At PWS = 32 the latency from a window to the output
word that completes with it is 92 cycles. Nothing stalls: there is no ready
signal, and every block accepts a window in every cycle.

## Positions, windows and streams

Input bytes are numbered by a 32-bit position counter. A window covers
positions `pos .. pos+PWS-1`, and each window is written whole into the
history memory at `pos mod 64 KiB`.

A stream ends with a window marked `in_last`, which may be partial
(`in_count` valid bytes). The next window starts a new stream at the next
window-aligned position. Matches never reach into an earlier stream, because
the matcher rejects candidates below the stream's start position. That check
also makes stale hash-table entries harmless, so the table is never cleared.

The hash of position `i` covers bytes `i..i+3`. The matcher for position `i`
compares up to `PWS` bytes from `i`. Both need bytes of the *next* window, so
`hash_calc` holds each window until its successor arrives, or releases it at
once if it is the last window. It then sends both windows on as `2·PWS` bytes.
It also sends `avail`, the number of those bytes that belong to the stream.
This is how a match in the window before a partial last window is kept from
running past the end of the stream.

## Hash table banks and dropping

The 64 K hash values (16 bits) are split over 32 banks by their low 5 bits,
giving 2048 entries per bank. The table has depth 1: each entry holds the
most recent position with that hash. A position reads the old entry as its
candidate and writes itself in the same access.

In each cycle the two lowest positions that address a bank are granted.
Every other position for that bank gets no candidate and is not written.
This also settles what would otherwise be a read-after-write chain inside
the window.

A bank serves two requests per cycle. The published architecture does this
by running the bank RAM at twice the pipeline clock. `ht_bank` models this
as a two-port memory in one clock domain. When both ports use the same
index, port 1 sees port 0's write, as the second half of a double-pumped
cycle would. For an FPGA you would map this to a true dual-port RAM, or to
a RAM on a 2x clock.

The hash function is this design's own choice: the upper 16 bits of the
four bytes multiplied by `0x9E3779B1`.

## History memory and matching

`data_memory` returns `PWS` consecutive bytes from any byte address, with a
latency of two cycles. Each copy is split into `PWS` byte-wide banks. Address
`a` is held in bank `a mod PWS`, row `a / PWS`. A read at `A` takes row
`A/PWS` from banks at or above `A mod PWS` and the next row from the banks
below them. A rotator then puts the bytes in order. There is one copy per
matcher, which makes 32 copies of 64 KiB at the default size.

`string_match` accepts a candidate only if all of these hold:

* it lies before the position;
* it lies inside the current stream;
* it is at most `MAX_DIST` = 64 KiB − 16·PWS bytes back, so its bytes are
  not overwritten while the window is still in flight.

The match length is the number of leading equal bytes, up to `PWS`, capped
at the stream bytes present. Lengths below 4 count as no match.

## Head/tail match selection (the hard part)

A match found at position `i` of window N can cover positions in window N+1.
If windows were selected independently, N+1 could not know which of its
positions are already covered. `match_select` solves this with two rules:

1. **Tail.** Of the matches that run past the end of window N, the longest
   is the *tail*. If two are equally long, the lower position wins. The tail
   is found by a pipelined max-reduction over the `PWS` positions. The tail
   is handed to window N+1, where it is called the *head*.
2. **Trimming.** Window N first shortens its own tail so that the tail
   starts after the end of the head it received from window N−1. Its length
   drops by the same amount. If fewer than 4 bytes remain, the tail is
   dropped. All other matches of window N are then cut to end before the
   tail starts, or before the end of the window or stream if there is no
   tail.

After trimming, no match except the tail crosses a window boundary. The
tail's reach into the next window is a single number: the head's end. This
value is the only state passed from window to window, and it is computed in
a one-cycle loop.

The remaining choice is made by a chain of `PWS` selector stages, one
position per stage, from the lowest position up. Each stage carries a
preclusion count:

* A position still covered by the count is *covered* and emits nothing.
* The tail's start position emits the tail.
* Otherwise the position emits its match if the trimmed length is at least 4
  and strictly longer than the next position's trimmed match.
* Otherwise it emits a literal.

Preferring the lower position works because trimming makes the longest
matches sit at low positions. Taking a match loads the count with its
length − 1. Selections are carried to the last stage, so a whole window
leaves the block together, `PWS + log2(PWS) + 3` cycles after entering.

These details are this design's reading of the published rules:

* ties go to the lower position;
* equal lengths give a literal;
* the last window of a stream has no tail, and the window after it has no
  head.

With `HEAD_TAIL = 0` there is no head or tail, and every match is cut at
the window end. This uses fewer resources and compresses a little worse.

## Code book and bit packing

The published design uses a static code-book ROM without giving its
contents. This design uses the **DEFLATE fixed Huffman code**:

* literals take 8 or 9 bits;
* lengths use codes 257–285 with their extra bits;
* distances use 5-bit codes with extra bits.

The distance code is extended with codes 30 and 31 (14 extra bits each) so
that distances up to 64 KiB can be coded. Streams that only use distances up
to 32 KiB produce standard DEFLATE. A match of length ≤ 34 is at most 28 bits.
All bits are LSB first, as in DEFLATE, so the Huffman codes are stored
bit-reversed. The code book is computed by functions in `lz_pkg`, which
synthesis turns into the same lookup a ROM would hold.

`huff_encoder` codes a whole window in one cycle. Each of the `PWS`
`window_packer`s takes one window in turn, round robin, and spends `PWS`
cycles appending its codes one per cycle. Appending uses a 64-bit barrel
shifter and a double buffer of two 32-bit registers. Each full 32-bit half
is written into a word store. Because one packer finishes in every cycle,
the packers together keep up with the pipeline.

`output_packer` shifts each finished window onto the current fill level of a
2×320-bit buffer and sends out 320-bit words. It frames each stream as one
block: the 3-bit header `1,1,0` (BFINAL = 1, BTYPE = fixed), the codes, and
the 7-bit end-of-block code. It marks the last word with `out_last` and
`out_bits`. If a stream's last window fills a word exactly, the final partial
word follows one cycle later.

The output word is 320 bits wide, not `PWS·8` = 256 bits. With 9-bit
literals a window of 32 literals takes 288 bits, and a stall-free packer
must drain the worst window in every cycle. The window word store grows for
the same reason: 10 words instead of `PWS/4` = 8.

## Interface of `lz_compressor`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `in_valid` | in | a window is presented this cycle; gaps are allowed |
| `in_data[PWS][8]` | in | window bytes, byte `i` is stream byte `pos+i` |
| `in_last`, `in_count` | in | last window of a stream, and its valid bytes (1..PWS) |
| `out_valid`, `out_data[320]` | out | compressed words, LSB first, back to back within a stream |
| `out_last`, `out_bits` | out | last word of a stream and its number of valid bits |
| `stat_dropped` | out | positions dropped by bank conflicts in a window |
| `stat_head`, `stat_tail` | out | head/tail events of the selector |

Parameters:

| parameter | default | meaning |
|---|---|---|
| `PWS` | 32 | bytes per window; must be a power of two |
| `HBN` | 32 | hash table banks |
| `HASH_W` | 16 | hash width (64 K entries in all) |
| `DM_BYTES` | 65536 | history memory size |
| `HEAD_TAIL` | 1 | head/tail selection on or off |

## Where this departs from the published architecture

* The double-clocked hash bank is modelled as a two-port bank in a single
  clock.
* The code book is the DEFLATE fixed code with two added distance codes. The
  output word (320 bits) and the window word store (10 words) are wider than
  `PWS·8` bits to fit 9-bit literals.
* The encoder codes a window per cycle from logic, where the published
  design uses `PWS/2` dual-ported ROMs.
* The window packer writes its word store by index instead of shifting it.
* Streams, block framing, the `avail` end-of-stream cap and the `MAX_DIST`
  limit are this design's own additions.
* Only hash table depth 1 is built. This is the depth of the published
  hardware; deeper tables appear there only in a compression-ratio study.
* `PWS` must be a power of two, so the published PWS = 24 point cannot be
  built.
* The position counter is 32 bits wide. Reset before 4 GiB of input in
  total.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | size | what it checks |
|---|---|---|
| `tb_hash_calc` | PWS 8 | hashes, look-ahead bytes, positions, `avail`, memory writes, gaps and streams |
| `tb_hash_table` | PWS 8, 4 banks, 8-bit hash | candidates and drops against an in-order reference table |
| `tb_data_memory` | PWS 8, 3 ports, 256 B | random reads during continuous writes |
| `tb_string_match` | PWS 8, 1 KiB | lengths, offsets and candidate rejection against the byte array |
| `tb_match_select` | PWS 8 | every selection against a reference model; each byte coded exactly once |
| `tb_huff_encoder` | PWS 4 | codes against separately written DEFLATE tables |
| `tb_window_packer` | PWS 8 | concatenation, size and the PWS-cycle timing |
| `tb_output_packer` | 64/80-bit | framing, word boundaries, late final word |
| `tb_lz_compressor` | full default size | see below |
| `tb_lz_small` | PWS 8, head/tail off | same streams and decoder; 42-cycle latency; no head/tail events |

`tb_lz_compressor` runs with the top's defaults. It compresses several
streams back to back:

* text-like data;
* random bytes;
* runs of a single byte;
* a 90 KB stream with repeats more than 32 KiB back;
* short streams of 5, 33, 64 and 100 bytes.

Input gaps and partial last windows are included. A fixed-Huffman decoder in
the testbench decodes every stream and must get back the input exactly. The
testbench also checks the 92-cycle latency. It fails if any of these never
occurs: bank drops, heads, tails, 9-bit literals, long distances, gaps,
partial windows or a late final word.

## Simulating

With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/lz_pkg.sv tb/tb_lz_compressor.sv \
    --top-module tb_lz_compressor
./obj_dir/Vtb_lz_compressor +verilator+rand+reset+2
```

Use the same pattern for the block testbenches. The full-size test runs in
well under a minute. Smaller configurations come from overriding `PWS`,
`HBN` and `DM_BYTES` on `lz_compressor`.
