// lzw_symbol_extractor: the "hash table" stage of the LZW encoder, which cuts
// the 32-bit words of the input FIFO into 4-bit source symbols.
//
// A word is loaded into a shift register together with the number of symbols
// it carries (8, or twice the valid byte count of a frame's last word). The
// symbol in the top nibble is offered on the output; each accepted symbol
// shifts the register by four bits. When the last symbol of a word is taken,
// the next word is loaded in the same cycle, so a steady stream leaves at one
// symbol per clock. The final symbol of a frame is flagged with last.
//
// Interface: in_* is a valid/ready port of frame_word_t (from the input FIFO);
// out_* is a valid/ready port of sym_beat_t (to the encoder state machine).
// Latency: a word accepted at edge t offers its first symbol from edge t.
// Reset is synchronous and active high.
//
// The reference architecture names this block and says it extracts 4-bit
// symbols; the most-significant-nibble-first order and the partial last word
// (whole bytes) are this design's choices.
module lzw_symbol_extractor
  import lzw_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  frame_word_t in_word,
  input  logic        in_valid,
  output logic        in_ready,
  output sym_beat_t   out_sym,
  output logic        out_valid,
  input  logic        out_ready
);
  word_t      sreg;
  logic [3:0] rem;       // symbols still held in sreg
  logic       frame_end; // sreg holds the frame's last word

  wire take = out_valid && out_ready;

  assign out_valid     = (rem != '0);
  assign out_sym.sym   = sreg[BUS_W-1 -: SYM_W];
  assign out_sym.last  = frame_end && (rem == 4'd1);
  assign in_ready      = (rem == '0) || (take && rem == 4'd1);

  function automatic logic [3:0] nsyms(input logic last, input nbytes_t nbytes);
    if (!last || nbytes == 2'd0) return 4'(SYMS_PER_WORD);
    return {1'b0, nbytes, 1'b0};
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      rem       <= '0;
      sreg      <= '0;
      frame_end <= 1'b0;
    end else if (in_valid && in_ready) begin
      sreg      <= in_word.data;
      rem       <= nsyms(in_word.last, in_word.nbytes);
      frame_end <= in_word.last;
    end else if (take) begin
      sreg <= sreg << SYM_W;
      rem  <= rem - 4'd1;
    end
  end
endmodule
