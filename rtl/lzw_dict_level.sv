// lzw_dict_level: one encoder-side LZW dictionary (the sequences of one length).
//
// A sequence of length k is stored as "parent + symbol", where the parent is a
// sequence of length k-1 held by the dictionary below. The dictionary is a
// lookup table addressed by {parent index, symbol}; an entry holds a valid bit
// and the index the sequence received in this dictionary. Indices are handed
// out in order of first occurrence (0, 1, 2 ...) until CHILDREN entries are
// used; the dictionary is then full and stays unchanged (static).
//
// After reset the table is swept to all-invalid, one entry per clock
// (PARENTS*16 cycles); ready is low meanwhile.
//
// Interface:
//   lookup: lk_en with lk_parent/lk_sym; one cycle later lk_hit/lk_idx give the
//           result, and they hold it until the next lk_en (synchronous read).
//   insert: ins_en with ins_parent/ins_sym records that sequence under index
//           the number of entries so far; ignored when full. A lookup of the
//           same entry in the same cycle already returns the new index.
// The split into per-length dictionaries follows the reference architecture;
// storing them as parent/symbol lookup tables is this design's choice.
module lzw_dict_level #(
  parameter int unsigned PARENTS  = 16,   // entries of the dictionary below
  parameter int unsigned CHILDREN = 256,  // entries of this dictionary
  localparam int unsigned PW = lzw_pkg::idx_w(PARENTS),
  localparam int unsigned CW = lzw_pkg::idx_w(CHILDREN + 1),
  localparam int unsigned AW = PW + lzw_pkg::SYM_W
) (
  input  logic                   clk,
  input  logic                   rst,
  output logic                   ready,
  input  logic                   lk_en,
  input  logic [PW-1:0]          lk_parent,
  input  lzw_pkg::sym_t          lk_sym,
  output logic                   lk_hit,
  output logic [CW-1:0]          lk_idx,
  input  logic                   ins_en,
  input  logic [PW-1:0]          ins_parent,
  input  lzw_pkg::sym_t          ins_sym,
  output logic                   full
);
  localparam int unsigned ENTRIES = PARENTS << lzw_pkg::SYM_W;

  typedef struct packed {
    logic          valid;
    logic [CW-1:0] idx;
  } entry_t;

  entry_t        table_q [ENTRIES];
  logic [AW-1:0] clr_ptr;
  logic          clearing;
  entry_t        rd_q;
  logic [CW-1:0] fill;      // entries recorded so far

  assign ready  = !clearing;
  assign full   = (fill == CW'(CHILDREN));
  assign lk_hit = rd_q.valid;
  assign lk_idx = rd_q.idx;

  wire do_ins = ins_en && !full && !clearing;

  // Write port: clearing sweep, or insertion of a new sequence.
  always_ff @(posedge clk) begin
    if (clearing)
      table_q[clr_ptr] <= '0;
    else if (do_ins)
      table_q[{ins_parent, ins_sym}] <= '{valid: 1'b1, idx: fill};
  end

  // Read port, registered and held between lookups.
  always_ff @(posedge clk) begin
    if (rst)        rd_q <= '0;
    else if (lk_en) begin
      // A lookup of the very entry being inserted in the same cycle sees it.
      if (do_ins && {ins_parent, ins_sym} == {lk_parent, lk_sym})
        rd_q <= '{valid: 1'b1, idx: fill};
      else
        rd_q <= table_q[{lk_parent, lk_sym}];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      clearing <= 1'b1;
      clr_ptr  <= '0;
      fill     <= '0;
    end else begin
      if (clearing) begin
        clr_ptr <= clr_ptr + 1'b1;
        if (clr_ptr == AW'(ENTRIES - 1)) clearing <= 1'b0;
      end
      if (do_ins) fill <= fill + 1'b1;
    end
  end
endmodule
