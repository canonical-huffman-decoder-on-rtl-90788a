# Canonical Huffman decoder with a single look-up table

This is a hardware decoder for canonical Huffman codes over byte symbols, with
code lengths of up to 15 bits. A canonical code needs no tree. The encoder
sends a short header: how many symbols have each code length, then the symbols
in canonical order. From that header the decoder rebuilds every codeword. It
writes the codewords into one look-up table (LUT) that maps the next `max_len`
bits of the stream directly to a symbol and its length. `max_len` is the
longest code length in use. Decoding is therefore *bit-parallel*. Each LUT read
yields one whole symbol, however long its code, and the symbol's code length
says how far to move along the stream.

The structure follows a decoder that was first mapped as software tasks onto
a fine-grain many-core processor array. In that mapping, lanes of small
processors compute the starting codewords, assign codewords, generate LUT
addresses, buffer the bitstream and parse memory words, and a single 64 KB
SRAM holds the LUT. Here each of those tasks is a dedicated RTL block. The
task split, the recurrence, the LUT layout and the sizes (15-bit codes, byte
symbols, 64 KB table, 16-bit input chunks) come from that design. The
handshakes, the sequencing and the cycle-level schedule were chosen for this
RTL.

## From a header to a table

The header for the four-symbol code A=`0`, B=`10`, C=`110`, D=`111` is

    counts per length 1..15 : 1, 1, 2, 0, 0, ... 0
    symbols                 : A, B, C, D

**Starting codewords.** For each length L, the first codeword is

    code = 0
    for L = 2 .. 15:  code = (code + count[L-1]) << 1;  first[L] = code

with `first[1] = 0`. In closed form, `first[L]` is the sum over k < L of
`count[k]·2^(L-k)`. For the example this gives 0, `10` and `110`.

**Codewords.** Symbols of length L take `first[L]`, `first[L]+1`, ... in
header order. So C=`110` and D=`111`.

**Table.** The LUT has 2^max_len words; here max_len is 3, so there are 8.
Every index that *starts with* a symbol's codeword holds that symbol and its
length. A gets indices 000-011, B gets 100-101, C gets 110 and D gets 111. A
symbol of length L fills 2^(max_len-L) consecutive words, starting at
`code << (max_len-L)`. For a complete code the symbols tile the table exactly.

**Decoding.** Take the next 3 bits, look them up, output the symbol, and
advance by its length. The stream `11011110000` decodes as
`110`→C, `111`→D, `10.`→B, `0..`→A, `0..`→A.

The table width follows the header: a code whose longest length is 9 uses
only 512 LUT words. This keeps both the build time and the number of index
bits to a minimum. The 15-bit limit fixes the largest table, 2^15 words of 16
bits, which is exactly 64 KB.

## Block structure

```
 header ──► start_codeword_gen ──► symbol_router ──► codeword_gen ──► lut_addr_gen ─┐ writes
 (counts)   (first[L], max_len)    (tag each symbol   (one codeword     (fill 2^(m-L)  │
                                    with its length)   counter per L)    words)        ▼
 header ───────────────────────────────┘                                         lut_mem_ctrl ◄──► lut_sram
 (symbols)                                                                             ▲          2^15 x 16
                                                                                reads  │
 bitstream ──► bitstream_buffer ──index──► next_chunk_ctrl ────────────────────────────┘
 (16-bit)      (48-bit window)  ◄─consume len─┘       │
                                                      └──► symbol_out_fifo ──► decoded bytes
```

`chuff_decoder_top` wires these together. Its sequencer moves through four
phases: counts, symbols, LUT fill and decode. Package `chuff_pkg` holds the
shared widths and the three record types: `lut_word_t` {len, sym},
`sym_len_t` and `sym_code_t` {sym, len, code}.

| block | what it does |
|---|---|
| `start_codeword_gen` | Takes the 15 counts and runs the recurrence above. It also reports `max_len` (the longest length with a non-zero count) and the number of header symbols. |
| `symbol_router` | Walks the lengths from the shortest used one upwards, skipping empty ones. Each header symbol is tagged with its length. |
| `codeword_gen` | Holds one codeword register per length, loaded with `first[L]`. The register hands its value to the next symbol of that length and then increments. |
| `lut_addr_gen` | Expands a record into its range of LUT addresses, one write per cycle. |
| `lut_mem_ctrl` | Shares the single SRAM port. Writes win; reads are granted otherwise, and data returns one cycle later. It also counts the LUT words written. |
| `lut_sram` | The 64 KB table: a plain array with a synchronous read, ready to be mapped to an SRAM macro. |
| `bitstream_buffer` | A left-aligned window of bits. The index is the top `max_len` bits. Consuming n bits shifts it, and 16-bit chunks are appended behind. |
| `next_chunk_ctrl` | The decode loop: one LUT read per symbol, and the code length read back is the number of bits to consume. |
| `symbol_out_fifo` | A 4-deep output buffer, so a consumer that pauses does not stall decoding at once. |

## Loop unrolling of the starting-codeword recurrence

In the recurrence, each length depends on the previous one. `UNROLL` sets how
many add-and-shift steps are chained within one clock cycle. The 14 steps then
take `ceil(14/UNROLL)` cycles.

- `UNROLL = 14` (the default) is the fast variant: one cycle, with a chain of
  14 16-bit adders.
- `UNROLL = 7` takes two cycles.
- `UNROLL = 1` is the serial baseline: 14 cycles, with one adder.

This cost is small next to the LUT fill. It matters only for headers with few
symbols and short codes. The variants exist because they trade adder area for
header latency, just as the original processor mapping traded processors for
speed.

## Interfaces and timing

All streams use valid/ready. Reset `rst_n` is asynchronous and active low.

| top port | meaning |
|---|---|
| `start`, `num_syms[31:0]` | Begin a block. `num_syms` is the number of symbols to decode. |
| `hdr_valid/hdr_data[15:0]/hdr_ready` | 15 count words (low 9 bits), then one symbol per word (low 8 bits), sorted by length and in canonical order within a length. |
| `bs_valid/bs_data[15:0]/bs_last/bs_ready` | The encoded stream in 16-bit chunks, first bit in bit 15. `bs_last` marks the final chunk. Bits after it read as 0. |
| `sym_valid/sym_data[7:0]/sym_ready` | Decoded bytes. |
| `busy`, `done` | `busy` is high from `start` until the last byte has left. `done` pulses once at the end. |
| `max_len`, `lut_words` | The LUT width and the words written for the current header. |

The number of symbols is given explicitly, because the zero bits that pad the
last chunk would otherwise decode as extra symbols.

The bitstream may be sent as soon as `start` is given. The buffer fills while
the LUT is being built. Cycle counts for one block, with no stalls:

| phase | cycles |
|---|---|
| counts | 15 (one per count word) |
| starting codewords | ceil(14/UNROLL), so 1 by default |
| symbols and LUT fill | one per LUT word, 2^max_len for a complete code, plus about 3 |
| decode | exactly 2 per symbol |

Decoding takes two cycles per symbol because the SRAM read has one cycle of
latency. The address of the next symbol depends on the length read for the
current one, so the loop cannot be overlapped without speculation.

The bit window is 48 bits wide, and it takes a chunk whenever it holds 32 bits
or fewer. After any symbol, even a 15-bit one, at least 18 bits therefore
remain. The decoder never waits for bits while the stream keeps up. With a
32-bit window it lost a cycle after long codes.

A new `start` is accepted only when `busy` is low, and an assertion checks
this. One header and one stream are in flight at a time.

## Limits and departures

- The original design runs as software on a programmable processor array.
  Here the processors, the chip's I/O handlers and the placement onto the
  array are replaced by dedicated logic and plain input streams. Processor
  counts, energy and area figures of the original therefore do not carry over
  to this RTL.
- At most 256 symbols, with code lengths of 1 to 15. The encoder must limit
  code lengths to 15, as for example DEFLATE does.
- The header must describe a valid prefix code. For an incomplete code (for
  example a single symbol of length 1), the unused LUT words keep stale
  contents. A stream that indexes one of them decodes garbage, and an
  assertion flags a zero code length.
- The LUT is not cleared between blocks. A complete code overwrites all
  2^max_len words it uses.
- Only a single-level table is built. A multi-level table, which would need
  less memory but be slower for long codes, is not included.

## Verification

Every block has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog. Reference values come
from `tb/chuff_tb_pkg.sv`. It assigns codewords sequentially
(`code(i) = (code(i-1)+1) << (len(i)-len(i-1))`) and computes starting
codewords in closed form, which is independent of the recurrence used in the
RTL. It also builds random complete codes and Huffman codes from frequencies.

| testbench | covers |
|---|---|
| `tb_start_codeword_gen` | UNROLL 14, 7 and 1 side by side, the worked example, random counts, and the latency `ceil(14/UNROLL)` |
| `tb_symbol_router`, `tb_codeword_gen` | Length tags and codewords for random codes under random stalls; one symbol per cycle |
| `tb_lut_addr_gen` | Every LUT word written exactly once with the right {len, sym}; one word per cycle |
| `tb_lut_sram`, `tb_lut_mem_ctrl` | The full 2^15 array, read latency, and the grant rule |
| `tb_bitstream_buffer` | Index against a bit-queue model for max_len 1-15, `index_valid` rule, zero padding |
| `tb_next_chunk_ctrl` | Decoding against a model LUT with starvation and refused grants; 2 cycles per symbol |
| `tb_symbol_out_fifo` | Order, count and full/empty behaviour |
| `tb_chuff_decoder_top` | End to end at default parameters: the worked example (decodes C D B A A), a code with lengths 1..15 filling all 32768 words, random and Huffman codes, with and without stalls. It counts that multi-word LUT fill, skipped empty lengths, bitstream prefetch, waiting for bits, output back-pressure, end padding, one-cycle unrolled start codes and LUT rebuilds all occur. |
| `tb_corpus_workloads` (with `corpus_runner`) | Generated stand-ins for typical corpus files: one repeated byte, a repeated alphabet, random text, English-like text, a 4-letter genome and skewed binary. Each is Huffman-coded, decoded and compared in all three variants (UNROLL 14, 7 and 1) side by side, and the starting-codeword latency of each variant is checked. |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/chuff_pkg.sv tb/chuff_tb_pkg.sv tb/tb_chuff_decoder_top.sv \
  --top-module tb_chuff_decoder_top -o sim
./obj_dir/sim
```

Run it from the folder that holds `rtl/` and `tb/`. Replace the testbench
file and top-module name to run another.

Each testbench runs in well under a second. On the generated workloads the
decoder always spends exactly two cycles per byte, whatever the code. Only the
LUT build depends on the code. It took 3 cycles for the one-symbol file
(max_len 1), about 1,000 for English-like text (max_len 10) and 4,098 for
skewed binary data (max_len 12).

## Changing the design

- `UNROLL` on `chuff_decoder_top` selects the starting-codeword variant.
- `OUT_DEPTH` sets the output buffer depth; it must be a power of two.
- `NSYM_W` sets the width of the symbol counter.
- The code-length limit, symbol width and word widths live in `chuff_pkg`.
  `MAX_BITS` also sets the LUT size (2^MAX_BITS words). `LEN_W` must stay
  large enough to hold `MAX_BITS`.
- The LUT word layout is `lut_word_t`. The 4 spare bits could hold a flag for
  a second-level table.
