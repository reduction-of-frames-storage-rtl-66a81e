// lzw_sym_packer: output stage of the LZW decoder. Gathers decoded 4-bit
// symbols into 32-bit frame words (first symbol in bits 31:28).
//
// A word is assembled in a shift position counter; it is handed to the
// output register when a ninth symbol arrives (then it is not the frame's
// last word) or when the end-of-frame beat arrives (then it is sent with last
// set and nbytes = valid bytes, 0 meaning all four). Holding a full word until
// the next beat is what lets the last word of a frame carry its flag.
//
// Interface: in_* valid/ready beats {in_end, in_sym}; a beat with in_end set
// carries no symbol and closes the frame. out_* valid/ready port of
// frame_word_t. One beat per clock while the output is drained. Synchronous
// active-high reset. This stage is this design's own; the reference only says
// that the decoder restores the frames.
module lzw_sym_packer
  import lzw_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  sym_t        in_sym,
  input  logic        in_end,
  input  logic        in_valid,
  output logic        in_ready,
  output frame_word_t out_word,
  output logic        out_valid,
  input  logic        out_ready
);
  word_t      asm_q;
  logic [3:0] cnt;

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      asm_q     <= '0;
      cnt       <= '0;
      out_word  <= '0;
      out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        if (in_end) begin
          out_word  <= '{data: asm_q, last: 1'b1, nbytes: cnt[2:1]};
          out_valid <= 1'b1;
          asm_q     <= '0;
          cnt       <= '0;
        end else if (cnt == 4'(SYMS_PER_WORD)) begin
          out_word  <= '{data: asm_q, last: 1'b0, nbytes: 2'd0};
          out_valid <= 1'b1;
          asm_q     <= {in_sym, {(BUS_W-SYM_W){1'b0}}};
          cnt       <= 4'd1;
        end else begin
          asm_q <= asm_q | (word_t'(in_sym) << (BUS_W - SYM_W - SYM_W * cnt));
          cnt   <= cnt + 4'd1;
        end
      end
    end
  end
endmodule
