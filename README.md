# LZW-compressed reception buffer for an AFDX end system

An AFDX reception end system must buffer every frame that arrives while the
slower UDP/IP software layer catches up. Bursts of back-to-back frames make
that backlog, and so the buffer, large. This design puts a small hardware
LZW compressor in front of the reception buffer and a decompressor behind
it. The buffer then holds compressed words, and the same memory holds more
frames.

The frames are read as strings of 4-bit (hexadecimal) symbols. AFDX frames
repeat a lot from frame to frame, mostly in their headers. The compressor
learns repeated runs of 2, 3 or 4 symbols and replaces each run with one
n-bit code (n = 10 by default). The dictionaries are never reset between
frames, so what one frame teaches helps the next.

```
             lzw_block
            +---------------------------------------------------------------+
 in_word -->| lzw_encoder --> es_rx_buffer (FIFO) --+--> lzw_decoder --> out_word
 (32 bit)   |  FIFO > symbol extractor > FSM <> dictionaries > shaper        |
            |                                        +--> raw_word (compressed)
            +---------------------------------------------------------------+
```

## The code space and the four dictionaries

All codes are `CODE_W` bits wide. The code space is split into four
dictionaries, one per sequence length:

| dictionary | holds | codes (defaults) | size parameter |
|---|---|---|---|
| 1 | the 16 single symbols | 0 .. 15 | fixed |
| 2 | sequences of 2 symbols | 16 .. 271 | `D2` = 256 |
| 3 | sequences of 3 symbols | 272 .. 782 | `D3` = 511 |
| 4 | sequences of 4 symbols | 783 .. 1022 | `D4` = 240 |
| — | end of frame | 1023 (2^n − 1) | reserved |

Entries are handed out in order. The first new 3-symbol sequence gets code
272, the next gets 273, and so on. When a dictionary is full it stops
growing. Nothing is ever evicted, and only a reset clears the dictionaries.
Decoding therefore depends on every frame since reset, in order. The same
frames in another order give different dictionaries and a different gain.

Dictionary 2 is always full size (256 entries), because every pair of
symbols is worth a code. The codes left over are split between dictionaries
3 and 4. The split used here puts 240 entries in dictionary 4 and the rest,
less the reserved code, in dictionary 3. Other code widths and splits are
parameter changes; see below.

## Encoding walk (`lzw_enc_fsm`)

The encoder keeps a current sequence *w* (its code and its length):

1. At the start of a frame, *w* becomes the first symbol.
2. For each further symbol *s*:
   * if *w* is already 4 symbols long, emit *w* and restart with *w = s*;
   * else, if *w+s* is in the next dictionary, *w* grows to *w+s*;
   * else emit *w*, store *w+s* in dictionary |w|+1 (if it is not full),
     and restart with *w = s*.
3. At the end of the frame, emit *w*, then the end-of-frame code.

Take the symbols `A B A C B A A B C B C B C A C B`, with dictionaries 2, 3
and 4 cut down to 5, 4 and 4 entries. The encoder emits A, B, A, C, BA, AB,
CB, CBC, AC and the final B. The state machine
testbench runs this exact case.

**Timing.** Each dictionary lookup takes one clock. The next lookup starts
in the clock the previous one resolves, and a 4-symbol sequence is emitted
in the same clock a fifth symbol arrives. So the encoder takes **one symbol
per clock** (8 clocks per 32-bit word) while the buffer accepts its output.
Each frame adds two clocks for the last code and the end-of-frame code.

## Dictionary storage (`lzw_enc_dict`, `lzw_dict_level`)

Dictionary 1 needs no storage, because a symbol is its own code. Each of
dictionaries 2, 3 and 4 is a table addressed by {index of the parent
sequence, new symbol}. Each table entry holds a valid bit and the child's
index. This works as an exact hash with no collisions: one read finds
*w+s*, and one write records it.

The tables have 16·16, 256·16 and 511·16 entries. After reset they are
swept to "invalid" one entry per clock (16·max(D2, D3) = 8176 clocks by
default), and `ready` stays low during the sweep. A lookup of an entry
written in the same clock sees the new value (bypass).

## Packing (`lzw_shaper`) and framing

Codes are packed densely, most significant bit first, into 32-bit words. A
code may straddle two words. After the end-of-frame code, the shaper pads
the rest of the word with zeros. Every frame therefore starts on a word
boundary in the buffer, and its compressed size is a whole number of words.
Compression gain is `1 − (4 × compressed words) / (input bytes)`.

## Input side (`sync_fifo`, `lzw_symbol_extractor`)

Frames arrive as 32-bit words on a valid/ready port of type `frame_word_t`:

* `data[31:0]`: the first byte is in bits 31:24;
* `last`: marks the final word of a frame;
* `nbytes`: the number of valid bytes in that final word (0 means 4).

A 16-word FIFO decouples the input from the symbol rate. The symbol
extractor then shifts out the nibbles, high nibble of each byte first.

## Reception buffer (`es_rx_buffer`)

The reception buffer is a 4096 × 32-bit FIFO. When it is full, it holds the
encoder back rather than dropping data. It reports:

* `level`: the current backlog;
* `max_level`: the worst backlog since reset, one clock late;
* `stalls`: how many clocks a word waited on a full buffer.

## Decoder (`lzw_decoder`, `lzw_sym_packer`)

The decoder reads codes from a bit accumulator and rebuilds the same
dictionaries in the same order as the encoder. It stores whole sequences,
not parent links:

* dictionary 2 entries are 8 bits wide;
* dictionary 3 entries are 12 bits wide;
* dictionary 4 entries are 16 bits wide.

A code therefore needs at most one table read.

After each code, the previous sequence plus the first symbol of the current
one becomes the next entry of the matching dictionary. Like the encoder, it
skips this when the previous sequence is 4 symbols long or the dictionary is
full. The standard LZW corner case is a code naming the entry that is being
created at that moment. That code decodes to the previous sequence plus its
own first symbol.

The end-of-frame code drops the padding and starts a fresh frame. The
symbols are packed back into `frame_word_t` words with the original byte
count. Rate: one symbol per clock, plus one or two clocks per code. `error`
goes high (and stays high) if a code names an entry that does not exist.

## Top level (`lzw_block`)

`read_compressed` selects what the reader gets:

* 0: decompressed frames on `out_*`;
* 1: the compressed words themselves on `raw_*`, to measure the gain.

The select is meant to be set for a whole run. If it changes while a frame
is only partly read, the decoder misses codes and its dictionaries no longer
match the encoder's. `in_bytes` and `comp_words` count traffic for the gain
figure. `dict_full` shows which dictionaries have stopped growing.

Every port is a plain valid/ready stream. The clock is single, and the
reset is synchronous and active high.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `CODE_W` | 10 | code width n |
| `D2`, `D3`, `D4` | 256, 511, 240 | dictionary sizes; need 16 + D2 + D3 + D4 < 2^CODE_W |
| `IN_DEPTH` | 16 | input FIFO depth (power of two) |
| `BUF_DEPTH` | 4096 | reception buffer depth in words (power of two) |

For 12-bit codes, for example: `CODE_W=12, D2=256, D3=3583, D4=240`. An
elaboration-time assertion checks that the end-of-frame code stays free.

## Where this departs from the source design

* **Dictionary 3 size.** The source reports a gain plateau from 240 entries
  in dictionary 4 and 540 in dictionary 3 at 10-bit codes. It also says
  dictionaries 3 and 4 share 2^n − 272 codes, which is 752 at n = 10. Both
  cannot hold, so this design keeps 240 for dictionary 4 and gives
  dictionary 3 the rest: 511, after reserving one code.
* **End-of-frame code and padding.** The source does not say how frames are
  delimited in the compressed stream. The reserved code 2^n − 1 and
  word-aligned frames are this design's choice. They cost one code per
  frame and, on average, half a word per frame.
* **Dictionary memory organisation, state machine and decoder.** The source
  gives the encoder's block structure: FIFO, "hash table", state machine,
  four dictionaries and shaper. It gives only the function of each block.
  The parent/symbol tables, the pipelined one-symbol-per-clock walk and the
  whole decoder are this design's own.
* **Dictionary lifetime.** The source says that frame order changes the
  gain and calls the dictionaries static. Here they persist across frames,
  stop growing when full, and are cleared only by reset.
* **Read modes.** The source's test host reads either the compressed words
  or the decoder's output. Here this is the `read_compressed` select. The
  byte and word counters for the gain are in hardware, and decompression
  time is left to the reader to measure.
* **The "hash table" block** only extracts 4-bit symbols here, which is the
  function the source gives it.
* **Buffer and FIFO depths** are not given in the source. 4096 and 16 words
  are choices.
* **Resources.** The source reports about 19,600 logic elements and 4,700
  registers for its 10-bit build. This design stores its dictionaries
  differently, so its size will not match. It is about 500 flip-flops plus
  about 260 kbit of RAM, mostly the encoder tables and the buffer.
* **Gain.** The source measures up to about 22 % on its own frame sets. The
  testbench frames here are synthetic, drawn from weighted lists of random
  1–4 symbol runs, and show about 11 %. That number checks the mechanism,
  not the source's result.
* The test platform around the block is not included: soft processor, SD
  card, PIO and JTAG UART. Neither is the rest of the end system: MAC/PHY,
  integrity checking, redundancy management and the UDP/IP layer. The
  testbenches play the host's part.

## Verification

Every block has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=… failures=…` line.

| testbench | what it checks |
|---|---|
| `tb_sync_fifo` | order, count, full/empty against a queue model |
| `tb_lzw_symbol_extractor` | symbol order, `last` on partial words, 1 symbol/clock |
| `tb_lzw_enc_dict` | lookups and insertions against an associative-array model, full flags, clear time |
| `tb_lzw_enc_fsm` | the 16-symbol worked example, random frames against the reference encoder, 1 symbol/clock |
| `tb_lzw_shaper` | packed words against a software packer, 1 code/clock |
| `tb_es_rx_buffer` | data, level, worst backlog, stall count |
| `tb_lzw_encoder` | compressed words of random frames against the reference (all dictionaries filled), throughput |
| `tb_lzw_decoder` | round trip of reference-encoded frames, the KwKwK case, the error flag |
| `tb_lzw_block` | end to end at default parameters (see below) |
| `tb_lzw_workloads` | gain runs on 9-, 10-, 11- and 12-bit builds (see below) |

`tb/lzw_ref_pkg.sv` holds an independent software LZW encoder and packer.
It also holds a frame generator that builds frames from weighted lists of
short random sequences.

`tb_lzw_block` runs the full-size design at its defaults:

1. 300 frames through encoder, buffer and decoder, with a reader that
   pauses at random. Every frame must come back intact, and the word count
   must match the reference.
2. A stopped reader. The buffer must fill to 4096 words and stall the
   encoder. Then it drains with no loss.
3. Compressed read-out. The words must match the reference packing bit for
   bit.

It counts dictionary hits, insertions, 4-symbol emissions, each
dictionary filling, the KwKwK case, encoder and buffer stalls, partial last
words and raw reads. It fails if any of them never happened.

`tb_lzw_workloads` puts four builds side by side:

* n = 9 with D3/D4 = 120/119;
* n = 10 at the defaults;
* n = 11 with D3/D4 = 1535/240;
* n = 12 with D3/D4 = 3583/240.

Each build gets the same frame sets, from freshly reset dictionaries. Every
frame must decode intact, and every word count must match the reference.
The run takes about a minute and a half. Its gains:

| frame set | symbols | n = 9 | n = 10 | n = 11 | n = 12 |
|---|---|---|---|---|---|
| standard lists | 12 M | −1.5 % | 11.3 % | 7.5 % | 4.0 % |
| short-sequence lists | 2 M | −9.5 % | −9.3 % | −3.6 % | −1.6 % |
| wide lists, long sequences | 2 M | −8.7 % | −2.8 % | 1.8 % | 0.7 % |
| near-uniform symbols | 2 M | −12.6 % | −19.3 % | −17.5 % | −6.3 % |

The same testbench replays one 400 k-symbol set in its original order and
in 20 shuffled orders. The gain changes with the order, because the
dictionaries keep whatever sequences they meet first:

| build | min | avg | max |
|---|---|---|---|
| n = 9 | −3.2 % | −1.9 % | −0.5 % |
| n = 10 | 8.1 % | 10.7 % | 12.5 % |
| n = 11 | 6.3 % | 7.6 % | 8.9 % |
| n = 12 | 2.7 % | 3.5 % | 4.3 % |

These numbers describe the synthetic generator, not real AFDX traffic. They
show the expected pattern:

* redundancy is what pays;
* on the standard set, 10-bit codes beat both 9 bits (dictionaries too
  small) and 11–12 bits (codes too wide).

Sets with little redundancy come out negative because every code is 9 to
12 bits wide, while a symbol that matches nothing carries only 4 bits. The
end-of-frame code and padding add about 26 bits per frame at n = 10: a
10-bit code plus half a word of padding on average.

### Running a testbench with Verilator

From the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -y rtl \
    rtl/lzw_pkg.sv tb/lzw_ref_pkg.sv tb/tb_lzw_block.sv \
    --top-module tb_lzw_block -o sim
./obj_dir/sim
```

To run another testbench, substitute its name. `-y rtl` finds the modules
by file name. The end-to-end test takes under a second.
