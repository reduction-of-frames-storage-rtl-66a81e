// lzw_ref_pkg: reference model and stimulus helpers for the LZW testbenches.
//
// lzw_ref is a plain software LZW encoder with the same dictionary layout
// (16 single symbols, then D2, D3, D4 entries for sequences of 2, 3, 4
// symbols; code 2**n-1 ends a frame), written with associative arrays and no
// shared code with the RTL. It returns the code stream of a frame and packs
// it into 32-bit words as the reception buffer should receive them.
// frame_gen draws frames the way the evaluation frames were drawn: a few
// lists of random symbol sequences of length 1..4, a list chosen by weight,
// a sequence chosen uniformly in it, appended until the frame is long enough.
package lzw_ref_pkg;

  typedef byte unsigned bytes_t[$];

  class lzw_ref;
    int code_w, d2, d3, d4;
    int fill[5];
    int dict[longint];         // (code of w) * 16 + symbol -> code of w+symbol
    int hits, misses, len4_emits, full_skips;
    bit level_filled[5];       // dictionary k became full at some point

    function new(int code_w, int d2, int d3, int d4);
      this.code_w = code_w; this.d2 = d2; this.d3 = d3; this.d4 = d4;
      fill = '{default: 0};
      level_filled = '{default: 0};
    endfunction

    function int size(int k);
      return (k == 2) ? d2 : (k == 3) ? d3 : d4;
    endfunction

    function int base(int k);
      return (k == 2) ? 16 : (k == 3) ? 16 + d2 : 16 + d2 + d3;
    endfunction

    function int eof_code();
      return (1 << code_w) - 1;
    endfunction

    // Code stream of one frame (its bytes, high nibble first), EOF included.
    function void encode(bytes_t frame, ref int codes[$]);
      int syms[$];
      int w, wlen;
      foreach (frame[i]) begin
        syms.push_back(frame[i] >> 4);
        syms.push_back(frame[i] & 15);
      end
      codes = {};
      w = syms[0]; wlen = 1;
      for (int i = 1; i < syms.size(); i++) begin
        int s = syms[i];
        if (wlen == 4) begin
          codes.push_back(w); len4_emits++;
          w = s; wlen = 1;
        end else if (dict.exists(longint'(w) * 16 + s)) begin
          w = dict[longint'(w) * 16 + s]; wlen++; hits++;
        end else begin
          codes.push_back(w); misses++;
          if (fill[wlen + 1] < size(wlen + 1)) begin
            dict[longint'(w) * 16 + s] = base(wlen + 1) + fill[wlen + 1];
            fill[wlen + 1]++;
            if (fill[wlen + 1] == size(wlen + 1)) level_filled[wlen + 1] = 1;
          end else full_skips++;
          w = s; wlen = 1;
        end
      end
      codes.push_back(w);
      codes.push_back(eof_code());
    endfunction

    // Dense MSB-first packing into 32-bit words, last word zero-padded.
    function void pack(int codes[$], ref int unsigned words[$]);
      longint unsigned acc = 0;
      int nb = 0;
      words = {};
      foreach (codes[i]) begin
        acc = (acc << code_w) | longint'(codes[i]);
        nb += code_w;
        if (nb >= 32) begin
          words.push_back(32'(acc >> (nb - 32)));
          nb -= 32;
          acc &= (64'd1 << nb) - 1;
        end
      end
      if (nb > 0) words.push_back(32'(acc << (32 - nb)));
    endfunction
  endclass

  // Frame generator with weighted lists of short random sequences.
  class frame_gen;
    int seqs[4][$][$];         // seqs[len-1][j] = sequence of len symbols
    int weight[4];

    function new(int list_len, int w1, int w2, int w3, int w4);
      weight = '{w1, w2, w3, w4};
      for (int l = 0; l < 4; l++)
        for (int j = 0; j < list_len; j++) begin
          int q[$];
          for (int k = 0; k <= l; k++) q.push_back($urandom_range(15));
          seqs[l].push_back(q);
        end
    endfunction

    function bytes_t frame(int nbytes);
      int syms[$];
      bytes_t f;
      int tot = weight[0] + weight[1] + weight[2] + weight[3];
      while (syms.size() < 2 * nbytes) begin
        int r = $urandom_range(tot - 1);
        int l = 0;
        while (r >= weight[l]) begin r -= weight[l]; l++; end
        syms = {syms, seqs[l][$urandom_range(seqs[l].size() - 1)]};
      end
      for (int i = 0; i < nbytes; i++) f.push_back(byte'(syms[2*i] * 16 + syms[2*i+1]));
      return f;
    endfunction
  endclass

endpackage
