// lzw_block: compressed reception buffer of an AFDX End System.
//
// Frames accepted by the reception chain are LZW-compressed on the way into
// the reception buffer and decompressed on the way out, so the buffer that
// absorbs bursts of back-to-back frames needs less memory:
//
//   in_* --> lzw_encoder --> es_rx_buffer --+--> lzw_decoder --> out_*
//                                           +--> raw_*   (compressed words)
//
// read_compressed selects where the buffer drains: 0 sends its words through
// the decoder (the frames come back as they went in), 1 hands the compressed
// words out unchanged on raw_*, e.g. to measure the compressed size. Change it
// only between frames, when the decoder has finished the frame it was on.
//
// Statistics for the compression gain: in_bytes counts the frame bytes
// accepted, comp_words the 32-bit words written into the buffer. The gain is
// 1 - 4*comp_words/in_bytes. buf_level/buf_max_level give the backlog now
// and its worst value since reset, in 32-bit words.
//
// Interface: valid/ready ports throughout; frame words are frame_word_t
// (data with the first byte in bits 31:24, last, nbytes of a last word,
// 0 = four). ready goes high when the encoder dictionaries are cleared after
// reset. dec_error flags a code stream the decoder cannot follow.
// Parameter defaults: 10-bit codes with dictionary 2 at 256 entries and
// dictionary 4 at 240 follow the best configuration reported for this
// scheme; D3 = 511 (the rest of the code space less the end-of-frame code)
// and the buffer depth are this design's choices.
module lzw_block
  import lzw_pkg::*;
#(
  parameter int unsigned CODE_W    = 10,
  parameter int unsigned D2        = 256,
  parameter int unsigned D3        = 511,
  parameter int unsigned D4        = 240,
  parameter int unsigned IN_DEPTH  = 16,
  parameter int unsigned BUF_DEPTH = 4096
) (
  input  logic                       clk,
  input  logic                       rst,
  output logic                       ready,
  // uncompressed frames in
  input  frame_word_t                in_word,
  input  logic                       in_valid,
  output logic                       in_ready,
  // drain selection
  input  logic                       read_compressed,
  // decompressed frames out
  output frame_word_t                out_word,
  output logic                       out_valid,
  input  logic                       out_ready,
  // compressed words out
  output word_t                      raw_word,
  output logic                       raw_valid,
  input  logic                       raw_ready,
  // status
  output logic [4:2]                 dict_full,
  output logic [$clog2(BUF_DEPTH):0] buf_level,
  output logic [$clog2(BUF_DEPTH):0] buf_max_level,
  output logic [31:0]                buf_stalls,
  output logic                       dec_error,
  output logic [31:0]                in_bytes,
  output logic [31:0]                comp_words
);
  word_t enc_word, buf_word;
  logic  enc_valid, enc_ready, buf_valid, buf_ready, dec_in_ready;

  lzw_encoder #(.CODE_W(CODE_W), .D2(D2), .D3(D3), .D4(D4), .IN_DEPTH(IN_DEPTH)) u_enc (
    .clk, .rst, .ready, .dict_full,
    .in_word, .in_valid, .in_ready,
    .out_word(enc_word), .out_valid(enc_valid), .out_ready(enc_ready));

  es_rx_buffer #(.DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst,
    .in_word(enc_word), .in_valid(enc_valid), .in_ready(enc_ready),
    .out_word(buf_word), .out_valid(buf_valid), .out_ready(buf_ready),
    .level(buf_level), .max_level(buf_max_level), .stalls(buf_stalls));

  assign raw_word  = buf_word;
  assign raw_valid = buf_valid && read_compressed;
  assign buf_ready = read_compressed ? raw_ready : dec_in_ready;

  lzw_decoder #(.CODE_W(CODE_W), .D2(D2), .D3(D3), .D4(D4)) u_dec (
    .clk, .rst,
    .in_word(buf_word), .in_valid(buf_valid && !read_compressed), .in_ready(dec_in_ready),
    .out_word, .out_valid, .out_ready,
    .error(dec_error));

  always_ff @(posedge clk) begin
    if (rst) begin
      in_bytes   <= '0;
      comp_words <= '0;
    end else begin
      if (in_valid && in_ready)
        in_bytes <= in_bytes + ((in_word.last && in_word.nbytes != 2'd0) ? 32'(in_word.nbytes) : 32'd4);
      if (enc_valid && enc_ready)
        comp_words <= comp_words + 1'b1;
    end
  end
endmodule
