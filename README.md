# Similarity encoding for non-volatile main memory

Phase-change memory (PCM) and other non-volatile main memories are slow to write
and wear out after a limited number of writes, and both costs grow with the
number of bits actually written. The words of one 64-byte cache line are often
very alike: arrays of small integers, repeated pixels, floats with the same
exponent. This design exploits that. For every line it forms a *mask word*, the
bit-wise majority of all words in the line, XORs every word with it, and stores
only the mask, one tag bit per 2-byte sub-word, and the sub-words that did not
become zero. A line whose words are all equal is stored as the mask word alone.
The word size is chosen per line among 2, 4, 8 and 16 bytes, whichever gives the
shortest result; a line that no coding shortens is stored raw.

The RTL is the encoder that sits on the write path between the last-level cache
and the memory, and the decoder on the read path. The memory array and its
scheduler are not included; their side of the interface is brought out as ports.

## The coding of one line

For a word size of `G` bytes the 512-bit line is cut into `K = 64/G` words
`W1..WK` (W1 in the least significant bits).

1. **Mask word.** For each bit position the ones among the K words are counted;
   the mask bit is 1 when that count is *strictly* greater than K/2. A tie gives
   0. This is the word with the smallest total Hamming distance to the words of
   the line, found in one pass rather than by comparing all pairs.
2. **XOR.** Each word is replaced by `Wi ^ mask`. Bits on which a word agrees
   with the majority become 0.
3. **Sub-word filter.** Whatever `G`, the XORed line is examined as 32 sub-words
   of 2 bytes. Each sub-word gets a tag bit, 0 if it is all zero and 1 otherwise,
   and only the non-zero sub-words are kept, packed in ascending order.
4. **Size test.** The coded body is `2 + 8G + 32 + 16·n` bits, where `n` is the
   number of non-zero sub-words (prefix, mask, tags, payload). A granularity
   succeeds only if this is below 512.

Four such encoder units (G = 2, 4, 8, 16) and a **zero-line unit** run in
parallel on the same line. The zero-line unit handles the case where the coded
line would be all zero, which happens exactly when all words are equal (the
majority mask is then that word): it stores only the prefix and the mask,
`2 + 8G` bits, and drops the 32 tag bits. It uses the smallest G at which the
words are all equal; an all-zero line therefore costs 18 bits.

A **selector** takes the successful candidate with the fewest bits. On a tie the
zero-line unit wins, then the smaller granularity. If nobody succeeded, the raw
line is stored.

### Worked example

Sixteen 4-byte floats, twelve of them `0x3F800000` (1.0), and
`W4 = 0x3F800001`, `W8 = 0x40400000`, `W13 = 0x3F800100`:

| G (bytes) | mask word | non-zero sub-words | body bits |
|---|---|---|---|
| 2  | `0x0000` (16 of 32 sub-words set: tie) | 18 | 338 |
| 4  | `0x3F800000` | 3 | **114** |
| 8  | `0x3F800000_3F800000` | 3 | 146 |
| 16 | `0x3F800000` repeated 4 times | 3 | 210 |

The 4-byte coding wins: 114 body bits plus the two flag bits instead of 512.

## The stored frame

What goes to the memory for one line is a `frame_t` (`rtl/simi_pkg.sv`), 514 bits:

| field | meaning |
|---|---|
| `coded` | 0: `body` is the raw line |
| `zline` | 1: the coded line is all zero; `body` holds only prefix and mask |
| `body[511:0]` | the packed coding, from bit 0 upward |

Body layout of a coded line (`coded = 1`):

| bits | content |
|---|---|
| `[1:0]` | prefix: `00` = 2 B, `01` = 4 B, `10` = 8 B, `11` = 16 B words |
| `[2 +: 8G]` | mask word |
| `[2+8G +: 32]` | tag bits, bit i for sub-word i (1 = stored) |
| `[34+8G ...]` | the non-zero sub-words, sub-word with the lowest index first |

A zero-line frame has only the first two fields. All unused body bits are 0.
`nvm_wr_bits_o` gives the number of body bits that carry information (body size
above, or 512 for a raw line), so a memory model or a write circuit downstream
can count or skip the rest; the two flag bits are written for every line.

Because unused body bits are zero, a zero-line frame would also decode correctly
as an ordinary coded frame whose tags are all 0; the `zline` flag is what lets
the writer skip the 32 tag bits.

## Decoding

The decoder (`simi_decoder`) reverses the steps. A raw frame returns its body.
Otherwise the prefix selects G, and with it where mask, tags and payload start.
The sub-words are rebuilt in parallel: sub-word i is 0 when its tag is 0, and
otherwise the payload sub-word whose index is the number of set tags below i.
The rebuilt line is XORed with the mask word repeated K times. A zero-line frame
returns the repeated mask directly.

## Module hierarchy, interface and timing

```
simi_top
├── simi_encoder          write path, 1 register stage
│   ├── zero_encoder      all-words-equal detection at 2/4/8/16 B
│   ├── gran_encoder ×4   GRAN_BYTES = 2, 4, 8, 16
│   │   ├── mask_word_gen bit-wise majority of K words
│   │   └── subword_filter tags and compaction of 2-byte sub-words
│   └── selector          smallest successful candidate, else raw
└── simi_decoder          read path, 1 register stage
```

`simi_top` ports (`ADDR_W = 26`, enough for the 2^26 lines of a 4 GB memory):

| group | signals | direction |
|---|---|---|
| clock, reset | `clk`, `rst_n` (synchronous, active low) | in |
| write from cache | `wr_valid_i`, `wr_addr_i`, `wr_line_i[511:0]` | in |
| write to memory | `nvm_wr_valid_o`, `nvm_wr_addr_o`, `nvm_wr_frame_o`, `nvm_wr_bits_o[9:0]` | out |
| frame from memory | `nvm_rd_valid_i`, `nvm_rd_addr_i`, `nvm_rd_frame_i` | in |
| line to cache | `rd_valid_o`, `rd_addr_o`, `rd_line_o[511:0]` | out |

Each path accepts one line per clock and answers exactly one clock later; there
is no back-pressure. The address only travels alongside the data. Reset clears
the two valid outputs; the data registers load only when their valid input is
set. All of the coding is combinational inside that single stage. In synthesis
the encoder is roughly 2,500 word-level cells, most of them in the four
majority counters and the four sub-word compaction networks; a design that must
reach a high clock rate would cut the encoder between the mask/XOR step and the
filter/selector step.

## Interpretations and departures

The coding rules above follow the published scheme. These points are this
design's own choices or readings:

- **Tags per sub-word for every granularity.** The per-granularity overhead in
  the scheme's size table assumes one tag per word (`h/G` tags for an `h`-byte
  line), while its hardware description tags each 2-byte sub-word. The sub-word
  version is built, so every coded line carries 32 tag bits.
- **Selection rule.** The scheme is described both as choosing the granularity
  with the most zero words and as choosing the smallest coded line. The hardware
  selects the smallest coded line.
- **Zero-line unit.** Read as "all words equal at some granularity", coded with
  the smallest such granularity.
- **Size test.** The flag bits are not counted against the 512-bit limit.
- **Mask ties** give 0, word 1 sits in the low bits, and selection ties go to the
  zero-line unit, then the smaller word.
- **Body layout, latency, handshake and reset** are not specified by the scheme
  and are this design's.

Not included:

- The optional inversion of the coded line for PCM, where writing 1 wears the
  cell less than writing 0 (mentioned as a possible add-on, not part of the main
  scheme).
- Read-compare-write circuits such as data-comparison write or flip-n-write,
  which can be placed after this encoder.
- The PCM array and its request scheduler.

## Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. They share `tb/simi_ref_pkg.sv`, an
independent bit-serial reference of the coding (encoder, decoder, and a line
generator producing zero lines, repeated words, near-repeated words, small
integers and random lines). For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/simi_pkg.sv tb/simi_ref_pkg.sv tb/simi_top_tb.sv --top-module simi_top_tb
./obj_dir/Vsimi_top_tb
```

Replace `simi_top_tb` by any other `*_tb` to run that test. `simi_top_tb` runs
the full-size design end to end: it writes 400 lines into a behavioural memory,
reads them back while overwriting half of them in the same cycles, and reads the
overwritten lines again. It checks every frame, bit count, returned line and
the one-cycle latency on both paths, and it fails unless every outcome occurred:
raw fallback, zero line, coding at each of the four word sizes, filtered zero
sub-words, more than one unit succeeding, and reads and writes in one cycle.
With its line mix it writes about 40 % of the bits of an uncoded memory.

## Changing it

- The line size, sub-word size and granularity count are constants in
  `simi_pkg`. `mask_word_gen` and `gran_encoder` are parameterised; the rest
  follows the package.
- Another granularity needs one more `gran_encoder` instance, one more
  `zero_encoder` comparison and a wider prefix.
- The selection rule is the comparison inside `selector`.
