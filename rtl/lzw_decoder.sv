// lzw_decoder: LZW decompressor behind the reception buffer. It reads the
// packed code stream, rebuilds the same four dictionaries the encoder built,
// and restores the original frames.
//
// How it works:
//   * Bit reader: 32-bit words are appended to an accumulator whenever it
//     holds fewer than CODE_W bits; codes are taken from its top, MSB first.
//   * A code below 16 is a single symbol (dictionary 1). A code of dictionary
//     2, 3 or 4 is looked up in that dictionary's sequence table (one cycle,
//     synchronous read); each entry holds the whole sequence (2, 3 or 4
//     symbols), so no chain of parents has to be followed.
//   * Dictionary update: after decoding code c, the previous sequence p plus
//     the first symbol of c's sequence gets the next entry of dictionary
//     |p|+1, unless |p| = 4 or that dictionary is full. These are exactly the
//     entries the encoder made, in the same order. If c is the entry that is
//     being created at that moment (the classic LZW "KwKwK" case) its sequence
//     is p plus the first symbol of p.
//   * The end-of-frame code 2**CODE_W-1 closes the frame: the rest of the
//     current word is padding and is dropped, and no entry links the last
//     sequence of a frame with the first one of the next.
//   * The symbols go out through lzw_sym_packer as 32-bit frame words.
// Interface: in_* valid/ready 32-bit compressed words (from the reception
// buffer); out_* valid/ready frame_word_t. error is set (sticky) when a code
// names an entry that does not exist. Timing: per code, one cycle to take
// it, one more for a table read (codes of dictionaries 2..4), then one cycle
// per output symbol; a new word is read in the cycle a code is taken.
// The decoder's existence and place come from the reference; its inner
// structure is this design's own, built to mirror lzw_encoder exactly.
module lzw_decoder
  import lzw_pkg::*;
#(
  parameter int unsigned CODE_W = 10,
  parameter int unsigned D2     = 256,
  parameter int unsigned D3     = 511,
  parameter int unsigned D4     = 240
) (
  input  logic        clk,
  input  logic        rst,
  input  word_t       in_word,
  input  logic        in_valid,
  output logic        in_ready,
  output frame_word_t out_word,
  output logic        out_valid,
  input  logic        out_ready,
  output logic        error
);
  localparam int unsigned B2   = dict_base(2, D2, D3);
  localparam int unsigned B3   = dict_base(3, D2, D3);
  localparam int unsigned B4   = dict_base(4, D2, D3);
  localparam int unsigned ACCW = BUS_W + CODE_W;
  localparam logic [CODE_W-1:0] EOF_CODE = '1;
  localparam int unsigned FW   = idx_w(D3 + 1) > idx_w(D2 + 1) ? idx_w(D3 + 1) : idx_w(D2 + 1);
  localparam int unsigned FW4  = idx_w(D4 + 1) > FW ? idx_w(D4 + 1) : FW;
  localparam int unsigned I2W  = idx_w(D2);
  localparam int unsigned I3W  = idx_w(D3);
  localparam int unsigned I4W  = idx_w(D4);

  typedef logic [15:0] seq_t;   // up to four symbols, first one in bits 15:12

  typedef enum logic [1:0] {S_GET, S_READ, S_OUT, S_END} state_t;

  // Sequence tables of dictionaries 2, 3 and 4.
  logic [7:0]  t2 [D2];
  logic [11:0] t3 [D3];
  logic [15:0] t4 [D4];
  logic [7:0]  rd2;
  logic [11:0] rd3;
  logic [15:0] rd4;
  logic [FW4-1:0] fill [2:4];
  logic [4:2]     full;

  state_t          state;
  logic [ACCW-1:0] acc;
  logic [6:0]      cnt;
  len_t            lvl_q;        // dictionary of the code being read
  logic [CODE_W-1:0] idx_q;      // its index in that dictionary
  seq_t            prev_seq, cur_seq;
  len_t            prev_len, cur_len;
  logic            prev_valid;

  // Packer side
  sym_t pk_sym;
  logic pk_end, pk_valid, pk_ready;

  wire [CODE_W-1:0] code = acc[ACCW-1 -: CODE_W];
  wire              have_code = (cnt >= 7'(CODE_W));

  assign in_ready = (state == S_GET) && !have_code;

  for (genvar k = 2; k <= 4; k++) begin : g_full
    localparam int unsigned SZ = (k == 2) ? D2 : (k == 3) ? D3 : D4;
    assign full[k] = (fill[k] == FW4'(SZ));
  end

  // Sequence of the code read from a table, and the KwKwK case.
  seq_t table_seq;
  logic kwk;
  always_comb begin
    case (lvl_q)
      3'd2:    table_seq = {rd2, 8'h00};
      3'd3:    table_seq = {rd3, 4'h0};
      default: table_seq = rd4;
    endcase
    kwk = prev_valid && (lvl_q == prev_len + 3'd1) && (idx_q == CODE_W'(fill[lvl_q]));
  end

  // New entry: previous sequence + first symbol of the current one.
  function automatic seq_t extend(input seq_t p, input len_t plen, input sym_t s);
    return p | (seq_t'(s) << (12 - 4 * plen));
  endfunction

  assign pk_sym   = cur_seq[15:12];
  assign pk_end   = (state == S_END);
  assign pk_valid = (state == S_OUT) || (state == S_END);

  // Resolution of a code: the sequence it stands for is known this cycle,
  // either directly (dictionary 1), from the table read, or by the KwKwK rule.
  logic res_en;
  seq_t res_seq;
  len_t res_len;
  always_comb begin
    res_en  = 1'b0;
    res_seq = table_seq;
    res_len = lvl_q;
    if (state == S_GET && have_code && code < CODE_W'(D1_SIZE)) begin
      res_en  = 1'b1;
      res_seq = {code[SYM_W-1:0], 12'h000};
      res_len = 3'd1;
    end else if (state == S_READ) begin
      res_en = 1'b1;
      if (kwk) res_seq = extend(prev_seq, prev_len, prev_seq[15:12]);
    end
  end

  // New dictionary entry: previous sequence + first symbol of this one.
  logic add_en;
  seq_t ent;
  assign add_en = res_en && prev_valid && prev_len != 3'(MAX_LEN) && !full[prev_len + 3'd1];
  assign ent    = extend(prev_seq, prev_len, res_seq[15:12]);

  // Table write and read ports (plain memories, no reset).
  logic rd_en;
  assign rd_en = (state == S_GET) && have_code && code >= CODE_W'(D1_SIZE) && code != EOF_CODE;

  always_ff @(posedge clk) begin
    if (add_en && prev_len == 3'd1) t2[I2W'(fill[2])] <= ent[15:8];
    if (add_en && prev_len == 3'd2) t3[I3W'(fill[3])] <= ent[15:4];
    if (add_en && prev_len == 3'd3) t4[I4W'(fill[4])] <= ent;
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      rd2 <= t2[I2W'(code - CODE_W'(B2))];
      rd3 <= t3[I3W'(code - CODE_W'(B3))];
      rd4 <= t4[I4W'(code - CODE_W'(B4))];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_GET;
      acc        <= '0;
      cnt        <= '0;
      lvl_q      <= 3'd2;
      idx_q      <= '0;
      prev_valid <= 1'b0;
      prev_seq   <= '0;
      prev_len   <= 3'd1;
      cur_seq    <= '0;
      cur_len    <= 3'd1;
      error      <= 1'b0;
      for (int k = 2; k <= 4; k++) fill[k] <= '0;
    end else begin
      if (add_en) fill[prev_len + 3'd1] <= fill[prev_len + 3'd1] + 1'b1;
      if (res_en) begin
        prev_valid <= 1'b1;
        prev_seq   <= res_seq;
        prev_len   <= res_len;
        cur_seq    <= res_seq;
        cur_len    <= res_len;
        state      <= S_OUT;
      end
      unique case (state)
        S_GET: begin
          logic [ACCW-1:0] a;
          logic [6:0]      c;
          a = acc;
          c = cnt;
          if (have_code) begin
            a = a << CODE_W;
            c = c - 7'(CODE_W);
            if (code == EOF_CODE) begin
              a = '0;             // rest of the word is padding
              c = '0;
              state <= S_END;
            end else if (rd_en) begin
              if (code < CODE_W'(B3)) begin
                lvl_q <= 3'd2; idx_q <= code - CODE_W'(B2);
              end else if (code < CODE_W'(B4)) begin
                lvl_q <= 3'd3; idx_q <= code - CODE_W'(B3);
              end else begin
                lvl_q <= 3'd4; idx_q <= code - CODE_W'(B4);
              end
              state <= S_READ;
            end
          end
          if (in_valid && in_ready) begin
            a = a | (ACCW'(in_word) << (7'(ACCW - BUS_W) - c));
            c = c + 7'(BUS_W);
          end
          acc <= a;
          cnt <= c;
        end

        S_READ: if (!kwk && idx_q >= CODE_W'(fill[lvl_q])) error <= 1'b1;

        S_OUT: if (pk_ready) begin
          cur_seq <= cur_seq << SYM_W;
          cur_len <= cur_len - 3'd1;
          if (cur_len == 3'd1) state <= S_GET;
        end

        S_END: if (pk_ready) begin
          prev_valid <= 1'b0;
          state      <= S_GET;
        end

        default: state <= S_GET;
      endcase
    end
  end

  lzw_sym_packer u_pack (
    .clk, .rst,
    .in_sym(pk_sym), .in_end(pk_end), .in_valid(pk_valid), .in_ready(pk_ready),
    .out_word, .out_valid, .out_ready);
endmodule
