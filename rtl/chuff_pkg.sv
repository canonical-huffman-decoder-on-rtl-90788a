// chuff_pkg: shared constants and types of the canonical Huffman decoder.
//
// The decoder handles byte symbols and canonical codes of up to 15 bits, the
// limit the design is built for. The look-up table (LUT) that turns a
// MAX_BITS-bit window of the bitstream into a symbol holds one 16-bit word per
// index: the symbol in the low byte and its code length above it, so a full
// 2^15-entry table is exactly 64 KB. Header and bitstream words are 16 bits
// wide. The field layout of a LUT word and the header word width are choices of
// this design.
package chuff_pkg;

  // Longest code length supported.
  localparam int unsigned MAX_BITS = 15;
  // Symbol width: one byte per decoded symbol.
  localparam int unsigned SYM_W    = 8;
  // Width of a code length field (holds 0..MAX_BITS).
  localparam int unsigned LEN_W    = 4;
  // Width of a per-length symbol count (0..256 symbols).
  localparam int unsigned CNT_W    = 9;
  // Width of header and bitstream input words (two bytes).
  localparam int unsigned IN_W     = 16;
  // Width of one LUT word.
  localparam int unsigned LUT_DW   = 16;

  // One LUT word: code length and symbol.
  typedef struct packed {
    logic [LUT_DW-LEN_W-SYM_W-1:0] rsvd;
    logic [LEN_W-1:0]              len;
    logic [SYM_W-1:0]              sym;
  } lut_word_t;

  // A header symbol tagged with its code length.
  typedef struct packed {
    logic [SYM_W-1:0] sym;
    logic [LEN_W-1:0] len;
  } sym_len_t;

  // A symbol with its code length and canonical codeword (right-aligned).
  typedef struct packed {
    logic [SYM_W-1:0]    sym;
    logic [LEN_W-1:0]    len;
    logic [MAX_BITS-1:0] code;
  } sym_code_t;

endpackage
