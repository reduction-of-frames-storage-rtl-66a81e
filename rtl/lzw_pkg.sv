// lzw_pkg: constants, types and code-space helpers shared by the LZW frame
// compressor (encoder, reception buffer, decoder).
//
// Frames are handled as streams of 4-bit source symbols (one hexadecimal digit
// each) carried on a 32-bit bus, eight symbols per word, first symbol in the
// most significant nibble. The code space of the n-bit output words is split
// into four contiguous dictionaries, as in the reference scheme:
//   dictionary 1: codes 0 .. 15                   (the 16 single symbols)
//   dictionary 2: next D2 codes                   (sequences of 2 symbols)
//   dictionary 3: next D3 codes                   (sequences of 3 symbols)
//   dictionary 4: next D4 codes                   (sequences of 4 symbols)
// The highest code, 2**n - 1, is kept out of the dictionaries and marks the end
// of a frame in the compressed stream (a choice of this design, so that the
// reception buffer holds plain 32-bit words with frames still delimited).
package lzw_pkg;

  localparam int unsigned SYM_W   = 4;               // bits per source symbol
  localparam int unsigned BUS_W   = 32;              // frame bus / buffer word width
  localparam int unsigned SYMS_PER_WORD = BUS_W / SYM_W;
  localparam int unsigned MAX_LEN = 4;               // longest sequence (dictionary 4)
  localparam int unsigned D1_SIZE = 1 << SYM_W;      // 16 single-symbol sequences

  typedef logic [SYM_W-1:0] sym_t;
  typedef logic [BUS_W-1:0] word_t;
  typedef logic [2:0]       len_t;                   // sequence length 1..4
  typedef logic [1:0]       nbytes_t;                // valid bytes in a last word, 0 means 4

  // One 32-bit word of an uncompressed frame.
  typedef struct packed {
    word_t   data;   // first byte in bits 31:24
    logic    last;   // final word of the frame
    nbytes_t nbytes; // valid bytes of a final word (0 = all four)
  } frame_word_t;

  // One source symbol leaving the symbol extractor.
  typedef struct packed {
    sym_t sym;
    logic last;      // final symbol of the frame
  } sym_beat_t;

  // First code of dictionary k (k = 1..4).
  function automatic int unsigned dict_base(input int unsigned k, input int unsigned d2,
                                            input int unsigned d3);
    case (k)
      1:       return 0;
      2:       return D1_SIZE;
      3:       return D1_SIZE + d2;
      default: return D1_SIZE + d2 + d3;
    endcase
  endfunction

  // Number of bits needed to index n entries (at least 1).
  function automatic int unsigned idx_w(input int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage
