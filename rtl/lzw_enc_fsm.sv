// lzw_enc_fsm: state machine of the LZW encoder.
//
// It keeps the current sequence w (its code and length, 1..4 symbols) and
// reads source symbols one at a time:
//   * w empty (start of a frame): w becomes the symbol (dictionary 1).
//   * w has 4 symbols: no longer sequence exists, so the code of w is emitted
//     and w restarts from the symbol.
//   * otherwise the dictionaries are asked whether w+symbol is known. If it is,
//     w grows to it. If not, the code of w is emitted, w+symbol is recorded in
//     the next dictionary (when that one is not full) and w restarts from the
//     symbol.
// At the end of a frame the code of w is emitted, followed by the end-of-frame
// code 2**CODE_W-1 with the flush flag that makes the shaper pad its last word.
// This is the LZW walk of the reference example (Fig. 4 there): with symbols
// A B A C B A A B C B C B C A C B it emits A, B, A, C, BA, AB, CB, CBC, AC.
//
// Timing: a dictionary lookup takes one cycle, and the next lookup is issued
// in the cycle its predecessor resolves, so a frame is encoded at one symbol
// per clock while the shaper accepts codes; a frame adds two cycles (last
// code, end-of-frame code). After reset nothing is read until the dictionaries
// have been cleared (dict_ready).
//
// Interface: sym_* valid/ready symbols from the extractor; lk_*/ins_* to the
// dictionaries (lzw_enc_dict); code_* valid/ready codes to the shaper.
// The algorithm follows the reference; the state encoding, the pipelined
// lookup and the end-of-frame code are this design's choices.
module lzw_enc_fsm
  import lzw_pkg::*;
#(
  parameter int unsigned CODE_W = 10
) (
  input  logic              clk,
  input  logic              rst,
  // symbols in
  input  sym_beat_t         sym_in,
  input  logic              sym_valid,
  output logic              sym_ready,
  // dictionaries
  input  logic              dict_ready,
  output logic              lk_en,
  output len_t              lk_len,
  output logic [CODE_W-1:0] lk_code,
  output sym_t              lk_sym,
  input  logic              lk_hit,
  input  logic [CODE_W-1:0] lk_code_in,
  output logic              ins_en,
  output len_t              ins_len,
  output logic [CODE_W-1:0] ins_code,
  output sym_t              ins_sym,
  // codes out
  output logic [CODE_W-1:0] code_out,
  output logic              code_flush,
  output logic              code_valid,
  input  logic              code_ready
);
  localparam logic [CODE_W-1:0] EOF_CODE = '1;

  typedef enum logic [2:0] {S_INIT, S_SYM, S_LOOK, S_END, S_EOF} state_t;

  state_t            state, state_n;
  logic              w_valid, w_valid_n;
  logic [CODE_W-1:0] w_code, w_code_n;
  len_t              w_len, w_len_n;
  sym_t              s_q, s_q_n;
  logic              last_q, last_q_n;
  logic              resolved;   // the pending lookup is settled this cycle

  assign lk_sym   = sym_in.sym;
  assign ins_len  = w_len;
  assign ins_code = w_code;
  assign ins_sym  = s_q;

  always_comb begin
    state_n    = state;
    w_valid_n  = w_valid;
    w_code_n   = w_code;
    w_len_n    = w_len;
    s_q_n      = s_q;
    last_q_n   = last_q;
    sym_ready  = 1'b0;
    lk_en      = 1'b0;
    lk_len     = w_len;
    lk_code    = w_code;
    ins_en     = 1'b0;
    code_out   = w_code;
    code_flush = 1'b0;
    code_valid = 1'b0;
    resolved   = 1'b0;

    unique case (state)
      S_INIT: if (dict_ready) state_n = S_SYM;

      S_SYM: if (sym_valid) begin
        if (!w_valid) begin
          sym_ready = 1'b1;
          w_valid_n = 1'b1;
          w_code_n  = CODE_W'(sym_in.sym);
          w_len_n   = 3'd1;
          if (sym_in.last) state_n = S_END;
        end else if (w_len == 3'(MAX_LEN)) begin
          code_valid = 1'b1;
          if (code_ready) begin
            sym_ready = 1'b1;
            w_code_n  = CODE_W'(sym_in.sym);
            w_len_n   = 3'd1;
            if (sym_in.last) state_n = S_END;
          end
        end else begin
          sym_ready = 1'b1;
          lk_en     = 1'b1;
          s_q_n     = sym_in.sym;
          last_q_n  = sym_in.last;
          state_n   = S_LOOK;
        end
      end

      S_LOOK: begin
        resolved = lk_hit;
        if (lk_hit) begin
          w_code_n = lk_code_in;
          w_len_n  = w_len + 3'd1;
        end else begin
          code_valid = 1'b1;
          if (code_ready) begin
            resolved = 1'b1;
            ins_en   = 1'b1;
            w_code_n = CODE_W'(s_q);
            w_len_n  = 3'd1;
          end
        end
        if (resolved) begin
          if (last_q) state_n = S_END;
          else if (sym_valid && w_len_n != 3'(MAX_LEN)) begin
            // start the next lookup straight away from the new w
            sym_ready = 1'b1;
            lk_en     = 1'b1;
            lk_len    = w_len_n;
            lk_code   = w_code_n;
            s_q_n     = sym_in.sym;
            last_q_n  = sym_in.last;
          end else if (sym_valid && lk_hit) begin
            // w just reached 4 symbols: emit it now and restart from the symbol
            code_valid = 1'b1;
            code_out   = w_code_n;
            state_n    = S_SYM;
            if (code_ready) begin
              sym_ready = 1'b1;
              w_code_n  = CODE_W'(sym_in.sym);
              w_len_n   = 3'd1;
              if (sym_in.last) state_n = S_END;
            end
          end else state_n = S_SYM;
        end
      end

      S_END: begin
        code_valid = 1'b1;
        if (code_ready) state_n = S_EOF;
      end

      S_EOF: begin
        code_valid = 1'b1;
        code_out   = EOF_CODE;
        code_flush = 1'b1;
        if (code_ready) begin
          w_valid_n = 1'b0;
          state_n   = S_SYM;
        end
      end

      default: state_n = S_INIT;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_INIT;
      w_valid <= 1'b0;
      w_code  <= '0;
      w_len   <= 3'd1;
      s_q     <= '0;
      last_q  <= 1'b0;
    end else begin
      state   <= state_n;
      w_valid <= w_valid_n;
      w_code  <= w_code_n;
      w_len   <= w_len_n;
      s_q     <= s_q_n;
      last_q  <= last_q_n;
    end
  end

  // The code of a valid sequence is never the end-of-frame code.
  always_ff @(posedge clk)
    if (!rst && code_valid && !code_flush)
      assert (code_out != EOF_CODE) else $error("lzw_enc_fsm: sequence code collides with end of frame");
endmodule
