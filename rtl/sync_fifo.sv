// sync_fifo: single-clock first-in first-out memory with valid/ready ports.
//
// Used as the input FIFO of the LZW encoder (absorbs the 32-bit frame words
// arriving from the reception chain while the encoder is busy on earlier
// symbols) and as the storage array of the reception buffer. It is a circular
// buffer of DEPTH entries with a write and a read pointer one bit wider than the
// address, so full and empty are told apart without a separate flag.
//
// Interface: a write happens on a clock edge where in_valid && in_ready; a read
// where out_valid && out_ready. The head entry is presented on out_data as soon
// as it is written ("show-ahead"): a word written at edge t can be read at edge
// t+1. Both may happen in the same cycle, also when full (the read frees the
// slot only after the edge, so in_ready is low when full). count is the number
// of stored entries. Synchronous active-high reset empties the FIFO; the array
// itself is not cleared. Only the function (a FIFO) comes from the reference
// architecture; the depth, width and handshake are this design's choices.
module sync_fifo #(
  parameter int unsigned W     = 35,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [W-1:0]             in_data,
  input  logic                     in_valid,
  output logic                     in_ready,
  output logic [W-1:0]             out_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wr_ptr, rd_ptr;

  wire do_wr = in_valid && in_ready;
  wire do_rd = out_valid && out_ready;

  assign count     = wr_ptr - rd_ptr;
  assign in_ready  = (count != (AW+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr[AW-1:0]] <= in_data;
  end

  // DEPTH must be a power of two for the wrap-around pointers.
  initial assert ((1 << AW) == DEPTH) else $error("sync_fifo: DEPTH must be a power of two");

endmodule
