// lzw_enc_dict: the four LZW dictionaries of the encoder.
//
// Dictionary 1 holds the 16 single symbols at codes 0..15; it is fixed, so a
// symbol is its own code and no storage is needed. Dictionaries 2, 3 and 4
// hold sequences of 2, 3 and 4 symbols in D2, D3 and D4 entries, each one an
// lzw_dict_level table in which a sequence is found from its parent (the
// sequence one symbol shorter, held by the dictionary below) and its last
// symbol. The n-bit code of entry i of dictionary k is base(k) + i, bases
// 16, 16+D2 and 16+D2+D3, so the four dictionaries fill one code space in
// order, as in the reference scheme.
//
// Interface (codes are CODE_W bits):
//   lookup: lk_en with the current sequence (lk_len = 1..3 symbols, lk_code)
//           and the next symbol lk_sym. One cycle later lk_hit tells whether
//           the extended sequence is known and lk_code_out gives its code;
//           both hold until the next lk_en.
//   insert: ins_en with a sequence (ins_len 1..3, ins_code) and symbol: the
//           extended sequence gets the next free code of dictionary ins_len+1,
//           unless that dictionary is full (full[k] for k = 2..4).
//   ready:  low during the clearing sweep after reset.
// All parameter defaults follow the reference configuration for 10-bit codes
// (D2 = 256); the split of the remaining codes between D3 and D4 and the
// reserved end-of-frame code are this design's reading of it.
module lzw_enc_dict
  import lzw_pkg::*;
#(
  parameter int unsigned CODE_W = 10,
  parameter int unsigned D2     = 256,
  parameter int unsigned D3     = 511,
  parameter int unsigned D4     = 240
) (
  input  logic              clk,
  input  logic              rst,
  output logic              ready,
  input  logic              lk_en,
  input  len_t              lk_len,
  input  logic [CODE_W-1:0] lk_code,
  input  sym_t              lk_sym,
  output logic              lk_hit,
  output logic [CODE_W-1:0] lk_code_out,
  input  logic              ins_en,
  input  len_t              ins_len,
  input  logic [CODE_W-1:0] ins_code,
  input  sym_t              ins_sym,
  output logic [4:2]        full
);
  localparam int unsigned B2 = dict_base(2, D2, D3);
  localparam int unsigned B3 = dict_base(3, D2, D3);
  localparam int unsigned B4 = dict_base(4, D2, D3);
  localparam int unsigned P2W = idx_w(D1_SIZE);
  localparam int unsigned P3W = idx_w(D2);
  localparam int unsigned P4W = idx_w(D3);
  localparam int unsigned C2W = idx_w(D2 + 1);
  localparam int unsigned C3W = idx_w(D3 + 1);
  localparam int unsigned C4W = idx_w(D4 + 1);

  initial assert (B4 + D4 < (1 << CODE_W))
    else $error("lzw_enc_dict: dictionaries plus end-of-frame code exceed 2**CODE_W");

  // Index of a sequence inside its own dictionary.
  function automatic logic [CODE_W-1:0] own_idx(input len_t len, input logic [CODE_W-1:0] code);
    case (len)
      3'd1:    return code;
      3'd2:    return code - CODE_W'(B2);
      default: return code - CODE_W'(B3);
    endcase
  endfunction

  logic [CODE_W-1:0] lk_pidx, ins_pidx;
  assign lk_pidx  = own_idx(lk_len, lk_code);
  assign ins_pidx = own_idx(ins_len, ins_code);

  logic        rdy2, rdy3, rdy4;
  logic        hit2, hit3, hit4;
  logic [C2W-1:0] idx2;
  logic [C3W-1:0] idx3;
  logic [C4W-1:0] idx4;
  len_t        lk_len_q;

  lzw_dict_level #(.PARENTS(D1_SIZE), .CHILDREN(D2)) u_dict2 (
    .clk, .rst, .ready(rdy2),
    .lk_en(lk_en && lk_len == 3'd1), .lk_parent(lk_pidx[P2W-1:0]), .lk_sym,
    .lk_hit(hit2), .lk_idx(idx2),
    .ins_en(ins_en && ins_len == 3'd1), .ins_parent(ins_pidx[P2W-1:0]), .ins_sym,
    .full(full[2]));

  lzw_dict_level #(.PARENTS(D2), .CHILDREN(D3)) u_dict3 (
    .clk, .rst, .ready(rdy3),
    .lk_en(lk_en && lk_len == 3'd2), .lk_parent(lk_pidx[P3W-1:0]), .lk_sym,
    .lk_hit(hit3), .lk_idx(idx3),
    .ins_en(ins_en && ins_len == 3'd2), .ins_parent(ins_pidx[P3W-1:0]), .ins_sym,
    .full(full[3]));

  lzw_dict_level #(.PARENTS(D3), .CHILDREN(D4)) u_dict4 (
    .clk, .rst, .ready(rdy4),
    .lk_en(lk_en && lk_len == 3'd3), .lk_parent(lk_pidx[P4W-1:0]), .lk_sym,
    .lk_hit(hit4), .lk_idx(idx4),
    .ins_en(ins_en && ins_len == 3'd3), .ins_parent(ins_pidx[P4W-1:0]), .ins_sym,
    .full(full[4]));

  assign ready = rdy2 && rdy3 && rdy4;

  always_ff @(posedge clk) begin
    if (rst)        lk_len_q <= 3'd1;
    else if (lk_en) lk_len_q <= lk_len;
  end

  always_comb begin
    case (lk_len_q)
      3'd1: begin lk_hit = hit2; lk_code_out = CODE_W'(B2) + CODE_W'(idx2); end
      3'd2: begin lk_hit = hit3; lk_code_out = CODE_W'(B3) + CODE_W'(idx3); end
      default: begin lk_hit = hit4; lk_code_out = CODE_W'(B4) + CODE_W'(idx4); end
    endcase
  end
endmodule
