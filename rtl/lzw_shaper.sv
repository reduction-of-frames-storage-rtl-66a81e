// lzw_shaper: output shaper of the LZW encoder. Concatenates CODE_W-bit code
// words into a dense bit stream and cuts it into 32-bit words for the
// reception buffer.
//
// Codes are packed most significant bit first: the first code of a frame
// starts at bit 31 of a word and a code may straddle two words. An
// accumulator of 32+CODE_W bits holds the bits not yet sent. A word is
// offered as soon as 32 bits are present. A code accepted with in_flush set
// closes the frame: after it, the remaining bits are sent as one word padded
// with zeros, so the next frame starts on a word boundary.
//
// Interface: in_* valid/ready port of codes (one per cycle at most), out_*
// valid/ready port of 32-bit words. A code is accepted in the same cycle a
// full word leaves, so codes enter at one per clock while the output is
// ready; in_ready is low only while a full word is held back or a frame is
// being flushed (one or two cycles). Latency: a code completing a word at edge t makes the
// word visible from edge t. Synchronous active-high reset empties it.
// Packing into 32-bit words follows the reference architecture; the bit order
// and the padding at frame end are this design's choices.
module lzw_shaper
  import lzw_pkg::*;
#(
  parameter int unsigned CODE_W = 10
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [CODE_W-1:0] in_code,
  input  logic              in_flush,
  input  logic              in_valid,
  output logic              in_ready,
  output word_t             out_word,
  output logic              out_valid,
  input  logic              out_ready
);
  localparam int unsigned ACCW = BUS_W + CODE_W;

  logic [ACCW-1:0] acc;
  logic [6:0]      cnt;        // valid bits in acc, from its top
  logic            flushing;   // frame closed: pad and send what remains

  assign out_word  = acc[ACCW-1 -: BUS_W];
  assign out_valid = (cnt >= 7'(BUS_W)) || (flushing && cnt != '0);
  // A code can enter in the cycle a full word leaves.
  assign in_ready  = !flushing && ((cnt < 7'(BUS_W)) || out_ready);

  always_ff @(posedge clk) begin
    if (rst) begin
      acc      <= '0;
      cnt      <= '0;
      flushing <= 1'b0;
    end else begin
      logic [ACCW-1:0] a;
      logic [6:0]      c;
      logic            f;
      a = acc;
      c = cnt;
      f = flushing;
      if (out_valid && out_ready) begin
        a = a << BUS_W;
        if (c > 7'(BUS_W)) c = c - 7'(BUS_W);
        else begin
          c = '0;
          f = 1'b0;
        end
      end
      if (in_valid && in_ready) begin
        a = a | (ACCW'(in_code) << (7'(ACCW - CODE_W) - c));
        c = c + 7'(CODE_W);
        f = in_flush;
      end
      acc      <= a;
      cnt      <= c;
      flushing <= f;
    end
  end
endmodule
