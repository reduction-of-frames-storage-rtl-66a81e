// lzw_encoder: LZW compressor for received frames, placed in front of the
// reception buffer.
//
// Structure (as in the reference block diagram):
//   input FIFO (sync_fifo) -> symbol extractor ("hash table", 4-bit symbols)
//   -> state machine (lzw_enc_fsm) <-> dictionaries 1..4 (lzw_enc_dict)
//   -> output shaper (lzw_shaper, 32-bit words).
// Frames come in as 32-bit words, leave as a dense stream of CODE_W-bit codes
// packed into 32-bit words; each frame ends with the end-of-frame code and is
// padded to a whole word. The dictionaries are filled from the frames as they
// arrive and are kept across frames; once full they no longer change. They
// are only emptied by reset.
//
// Interface: in_* valid/ready port of frame_word_t (32-bit data, last, valid
// bytes of the last word); out_* valid/ready port of 32-bit compressed words.
// dict_full[k] is set once dictionary k (2..4) has no free entry left.
// ready is low during the dictionary clearing after reset (16*max(D2,D3) cycles;
// the input FIFO still accepts words meanwhile).
// Throughput: one symbol per clock (eight per input word) while the output is
// not held back, plus two cycles per frame.
module lzw_encoder
  import lzw_pkg::*;
#(
  parameter int unsigned CODE_W   = 10,
  parameter int unsigned D2       = 256,
  parameter int unsigned D3       = 511,
  parameter int unsigned D4       = 240,
  parameter int unsigned IN_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst,
  output logic        ready,
  output logic [4:2]  dict_full,
  input  frame_word_t in_word,
  input  logic        in_valid,
  output logic        in_ready,
  output word_t       out_word,
  output logic        out_valid,
  input  logic        out_ready
);
  frame_word_t fifo_word;
  logic        fifo_valid, fifo_ready;
  sym_beat_t   sym;
  logic        sym_valid, sym_ready;

  logic              lk_en, lk_hit, ins_en, code_flush, code_valid, code_ready;
  len_t              lk_len, ins_len;
  logic [CODE_W-1:0] lk_code, lk_code_res, ins_code, code;
  sym_t              lk_sym, ins_sym;

  sync_fifo #(.W($bits(frame_word_t)), .DEPTH(IN_DEPTH)) u_in_fifo (
    .clk, .rst,
    .in_data(in_word), .in_valid, .in_ready,
    .out_data(fifo_word), .out_valid(fifo_valid), .out_ready(fifo_ready),
    .count());

  lzw_symbol_extractor u_extract (
    .clk, .rst,
    .in_word(fifo_word), .in_valid(fifo_valid), .in_ready(fifo_ready),
    .out_sym(sym), .out_valid(sym_valid), .out_ready(sym_ready));

  lzw_enc_fsm #(.CODE_W(CODE_W)) u_fsm (
    .clk, .rst,
    .sym_in(sym), .sym_valid, .sym_ready,
    .dict_ready(ready),
    .lk_en, .lk_len, .lk_code, .lk_sym, .lk_hit, .lk_code_in(lk_code_res),
    .ins_en, .ins_len, .ins_code, .ins_sym,
    .code_out(code), .code_flush, .code_valid, .code_ready);

  lzw_enc_dict #(.CODE_W(CODE_W), .D2(D2), .D3(D3), .D4(D4)) u_dict (
    .clk, .rst, .ready,
    .lk_en, .lk_len, .lk_code, .lk_sym, .lk_hit, .lk_code_out(lk_code_res),
    .ins_en, .ins_len, .ins_code, .ins_sym,
    .full(dict_full));

  lzw_shaper #(.CODE_W(CODE_W)) u_shaper (
    .clk, .rst,
    .in_code(code), .in_flush(code_flush), .in_valid(code_valid), .in_ready(code_ready),
    .out_word, .out_valid, .out_ready);
endmodule
