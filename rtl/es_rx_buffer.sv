// es_rx_buffer: reception buffer of the End System, between the hardware
// reception chain (here: the LZW encoder) and the software side (here: the
// LZW decoder or a direct reader of the compressed words).
//
// It is a first-in first-out store of DEPTH 32-bit words. Besides the words it
// reports the backlog: level is the number of words held now and max_level
// the largest level seen since reset (updated one cycle later), the worst backlog that sizes the
// buffer. Nothing is ever dropped: when the buffer is full, in_ready is low
// and the writer waits; stalls counts the cycles in which a word was offered
// to a full buffer.
//
// Interface: in_* and out_* valid/ready ports of 32-bit words, show-ahead
// read (a word written at edge t can be read at edge t+1). Synchronous
// active-high reset empties the buffer and clears the statistics.
// The buffer itself and its FIFO discipline come from the reference; the
// depth (4096 words, 16 KiB) and the statistics outputs are this design's
// choices.
module es_rx_buffer
  import lzw_pkg::*;
#(
  parameter int unsigned DEPTH = 4096
) (
  input  logic                   clk,
  input  logic                   rst,
  input  word_t                  in_word,
  input  logic                   in_valid,
  output logic                   in_ready,
  output word_t                  out_word,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic [$clog2(DEPTH):0] level,
  output logic [$clog2(DEPTH):0] max_level,
  output logic [31:0]            stalls
);
  sync_fifo #(.W(BUS_W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst,
    .in_data(in_word), .in_valid, .in_ready,
    .out_data(out_word), .out_valid, .out_ready,
    .count(level));

  always_ff @(posedge clk) begin
    if (rst) begin
      max_level <= '0;
      stalls    <= '0;
    end else begin
      if (level > max_level) max_level <= level;
      if (in_valid && !in_ready) stalls <= stalls + 1'b1;
    end
  end
endmodule
