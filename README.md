# C-Pack cache-line compressor and decompressor

Compressing the contents of an on-chip cache raises its effective capacity
and so cuts misses, but only if the hardware that compresses and decompresses
is fast. C-Pack ("Cache Packer") is a lossless scheme built for that job. It
codes each 32-bit word in one of two ways:

- **static patterns** for words that are very common in cache data: an
  all-zero word, or a word whose upper three bytes are zero;
- a small **dictionary** of recently seen words, which can match a whole word
  or only its upper two or three bytes.

Every word is compared with both patterns and with every dictionary entry at
the same time. This RTL goes one step further and handles **two words per
clock** in both directions. A 64-byte line goes through in eight cycles.

The design has two independent paths. Both live in `cpack_top`:

```
 compression:   c_words (2x32) ─► cpack_compressor ─► cpack_line_packer ─► c_line_bits / c_line_len
                                   (dictionary, 2 encoders)

 decompression: d_line_bits ─► cpack_line_unpacker ─► cpack_decompressor ─► d_words (2x32)
                                   ▲      window (68 b)        │
                                   └────── consumed ◄──────────┘
```

## Compressed word formats

Each word becomes a code and then a payload. Bits are written most
significant first. `idx` is the dictionary slot, 4 bits wide with the default
16 entries.

| kind | condition                                 | code   | payload           | bits |
|------|-------------------------------------------|--------|-------------------|------|
| zzzz | word is 0                                 | `00`   | –                 | 2    |
| xxxx | nothing below matched                     | `01`   | 32-bit word       | 34   |
| mmmm | equals a dictionary entry                 | `10`   | idx               | 6    |
| mmxx | upper 2 bytes equal an entry              | `1100` | idx, low 2 bytes  | 24   |
| zzzx | upper 3 bytes are 0, low byte is not      | `1101` | low byte          | 12   |
| mmmx | upper 3 bytes equal an entry              | `1110` | idx, low byte     | 16   |

Code `1111` is never produced. The decoder flags it on `out_bad`/`d_bad`.

An example with a four-entry dictionary `{12345678, AAAAAAAA, 12340000,
3527894E}` (the 2-bit index case, `DICT_ENTRIES=4`):

- `000000AB` becomes `1101 10101011`;
- `BBBB2022` becomes `01` followed by the raw word;
- `123456AA` becomes `1110 00 10101010`, because it shares three bytes with
  entry 0.

The testbenches check this example.

Order of decisions:

1. A static pattern wins, even if a dictionary entry also matches. Such a
   word is **not** put into the dictionary.
2. Otherwise the entry with the most matching leading bytes wins (4, 3 or 2).
   On a tie, the lowest slot wins.
3. With fewer than two matching bytes, the word is sent raw.

Every word of step 2 or 3 is pushed into the dictionary, including one that
matched an entry fully.

## The dictionary, and two words in one cycle

The dictionary (`cpack_dictionary`) is a FIFO of 16 words (64 bytes), stored
as a circular buffer. `wptr` points at the oldest slot, which is the next one
replaced. The index sent in the stream is the physical slot number. That is
why the decompressor, which keeps its own copy with the same update rule,
reads the same entry back.

The hard part is the second word of a pair. In stream order it comes after
the first word, so it must be coded against the dictionary *as the first word
leaves it*. Two cases:

- **The first word is a static pattern.** It does not enter the dictionary,
  and the second word sees the dictionary unchanged.
- **Otherwise** the first word takes the oldest slot (`wptr`). The second word
  is compared with the first word and with every other entry. The oldest
  entry is not among them, because the first word has replaced it.

`cpack_compressor` forms this second view with a single multiplexer on slot
`wptr`. It does not wait for the first encoder's result, only for its push
flag, which is cheap: it depends only on the zero tests. Two similar words
that arrive together therefore still match each other, so coding two words
in parallel costs nothing in compression ratio. The same cycle pushes up to
two words: the first to `wptr`, the second after it, or to `wptr` itself when
the first was a pattern.

`cpack_decompressor` mirrors this:

1. Word 0 is decoded from the top of the window.
2. Its length says where word 1 starts.
3. Word 1 is decoded against the dictionary with word 0 placed in the oldest
   slot, when word 0 is pushed.

The decoders are chained combinationally within one cycle.

**Per-line dictionary.** The dictionary is emptied at the first pair of every
line (`c_first`, and `win_first` inside the decompression path), so each
line can be decompressed on its own. The clear takes effect in the same
cycle: the first pair is coded against an empty dictionary, with no idle
cycle between lines. Emptied entries read as zero. They take part in
matching like any other entry, which is safe because both sides hold the same
zeros.

With 16 entries and 16 words per line, nothing is ever evicted within a line.
The pointer wraps only when all 16 words are pushed. The FIFO rule still
decides which slot a new word takes, and so the indices. Lines longer than the
dictionary (`LINE_WORDS > DICT_ENTRIES`) would evict in FIFO order.

## The compressed line

`cpack_compressor` outputs each pair as one left-aligned 68-bit field,
`out_pair`: word 0's code word, then word 1's right after it. Its total
length (4 to 68 bits) is on `out_len`.

`cpack_line_packer` appends the eight pairs of a line into a 544-bit buffer,
first bit at the top. It reports the line's length in bits on `c_line_len`.
The worst case is 16 raw words, 544 bits, which is more than the 512 bits of
the original line. Such a line stays in compressed form. There is no raw
fall-back.

`cpack_line_unpacker` holds a packed line and shows the decompressor a
68-bit window starting at the current read position. The decompressor
returns `consumed`, the length of the pair at the top of the window,
combinationally. The read position advances by that amount each cycle for
eight cycles. At the end, `d_bits_used` equals the packed length.

## Timing

All registers use a rising clock edge and an asynchronous active-low reset,
`rst_n`. There is no back-pressure: `valid` signals only.

| path | event | cycle |
|------|-------|-------|
| compression | pair applied with `c_valid` | k |
| compression | compressor result (`c_pair_valid`, `c_kinds`) | k+1 |
| compression | `c_line_valid` pulse, after the 8th pair of a line | k+2 |
| decompression | `d_load` high | k |
| decompression | window valid | k+1 … k+8 |
| decompression | `d_valid` with two rebuilt words per cycle | k+2 … k+9 |

- **Compression** takes one pair per cycle, and lines may follow each other
  with no gap. `c_line_bits` and `c_line_len` hold steady until the next
  line starts.
- **Decompression:** a new `d_load` while `d_busy` is high restarts the
  reader.

Two assertions guard the internal stream contract:

- `cpack_line_packer` checks that each incoming pair is at most 68 bits and
  zero past its length, since pairs are merged with an OR.
- `cpack_line_unpacker` checks that each consumed length is between 4 and 68
  bits and stays inside the line.

## Modules

All files are in `rtl/`, one module or package per file.

| file | role |
|------|------|
| `cpack_pkg.sv` | word type, kind enum, codes, `kind_len()` |
| `cpack_pattern_match.sv` | zzzz / zzzx detector |
| `cpack_dict_match.sv` | parallel compare against all entries, best match and index |
| `cpack_dictionary.sv` | 16 x 32-bit FIFO, two pushes per cycle, same-cycle clear |
| `cpack_word_encoder.sv` | one word to code word and length; push flag |
| `cpack_word_decoder.sv` | code word back to one word; length; push flag |
| `cpack_compressor.sv` | two encoders and the dictionary; registered pair output |
| `cpack_decompressor.sv` | two chained decoders and the dictionary; registered words |
| `cpack_line_packer.sv` | pairs into a packed 64-byte line |
| `cpack_line_unpacker.sv` | windows out of a packed line |
| `cpack_top.sv` | both paths |

Parameters:

- `DICT_ENTRIES`, default 16. Must be a power of two. The index width follows
  it.
- `LINE_WORDS`, default 16. Must be even. The line buffer width is
  `LINE_WORDS/2 * 68`.

The word size is fixed at 32 bits.

## Simulation

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`. `tb/cpack_ref_pkg.sv` is a plain behavioural
model of the format, used by all of them to compute expected values: a FIFO
class, a byte-counting matcher, and bit queues for the stream.

To run the end-to-end test at the default size:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/cpack_pkg.sv tb/cpack_ref_pkg.sv tb/tb_cpack_top.sv --top-module tb_cpack_top
./obj_dir/Vtb_cpack_top
```

Replace `tb_cpack_top` with any other `tb_*` name to test one block.

`tb_cpack_top` compresses 400 random lines two words per cycle. The random
data is generated so that every code occurs: zeros, small values, repeats
and near-repeats of recent words, and one raw line in seven. The test
checks:

- every packed line bit for bit against the model, with `c_line_valid` two
  cycles after the last pair;
- every word after decompression, with `d_valid` from two cycles after the
  load and `d_bits_used` equal to the packed length;
- that each of these happened at least once: every code, word 1 matching
  word 0 of its own pair, a line above and a line below 512 bits, a
  dictionary wrap, back-to-back lines, and both paths busy together.

Decompression of one line overlaps compression of the next.

The compressor and decompressor testbenches also send runs of 48 words
between dictionary clears. Those runs make the FIFO evict its oldest entries,
which never happens with the default 16-word lines. The test also
prints the overall packed size of its synthetic data (about 69 % of the
original). This figure describes that generator only, not real cache
contents.

## What was chosen here, and what is not covered

The following come from the C-Pack description this design implements:

- the two static patterns and the dictionary matching by bytes;
- the 64-byte FIFO dictionary;
- two words per cycle, with the second word coded against the first;
- the push rule;
- the codes `01` (raw), `1101` (zzzx) and `1110` (mmmx).

The following are this design's own choices, because that description does
not give them:

- **Codes.** The codes for zzzz (`00`), mmmm (`10`) and mmxx (`1100`) fill
  the remaining 2-bit and 4-bit values. Another code assignment would change
  only `cpack_pkg`, the decoder's `case`, and the model.
- **Matching.** Partial matches count bytes from the most significant one,
  and a tie goes to the lowest slot.
- **Dictionary.** It is cleared per line, and its entries reset to zero.
- **Stream layout.** The packed layout of a line, the 68-bit window, and the
  one-cycle registered latencies. No handshake beyond `valid`.
- **No raw fall-back** for lines that grow past 512 bits.

Not covered:

- How compressed lines are stored in a cache: tags, segment allocation,
  fragmentation. This RTL stops at the packed line.
- Clock rate and FPGA resource use. No timing constraint or device is
  targeted, and none of the published figures for an earlier implementation
  were reproduced.
- Compression ratios on real workloads. The benchmark data (mpeg2, mesa, art
  and others) is not available, so the published ratios of about 52–58 % raw
  and 58–61 % system-wide were not re-measured.
- An image-data variant based on interpolation is mentioned in the source
  description without any detail, and is not built.
