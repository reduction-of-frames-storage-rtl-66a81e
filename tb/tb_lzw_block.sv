// tb_lzw_block: end-to-end test of the compressed reception buffer at its
// default configuration (10-bit codes, dictionaries 256/511/240, 4096-word
// buffer).
//
// Frames are drawn like the evaluation frames (weighted lists of random 1..4
// symbol sequences), 64 to 300 bytes long, any byte count. Every frame is
// also run through the reference encoder of lzw_ref_pkg.
//   Phase A: frames go through encoder, buffer and decoder; each decoded
//            frame must equal the one sent, and the number of compressed
//            words must match the reference.
//   Phase B: the reader stops until the buffer is full and the encoder is
//            held back, then drains; no frame may be lost or altered, and the
//            worst backlog must equal the buffer depth.
//   Phase C: read_compressed = 1; the compressed words must equal the
//            reference packing bit for bit.
// It counts how often each mechanism occurred (dictionary hit, insertion,
// length-4 emission, each dictionary full, KwKwK decode, buffer-full stall,
// encoder output stall, partial last word, raw read) and fails if one never
// did. The encoder must sustain one symbol per clock while not stalled.
module tb_lzw_block;
  import lzw_pkg::*;
  import lzw_ref_pkg::*;

  localparam int CODE_W = 10, D2 = 256, D3 = 511, D4 = 240, DEPTH = 4096;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        ready, in_valid, in_ready, read_compressed, out_valid, out_ready;
  logic        raw_valid, raw_ready, dec_error;
  frame_word_t in_word, out_word;
  word_t       raw_word;
  logic [4:2]  dict_full;
  logic [12:0] buf_level, buf_max_level;
  logic [31:0] buf_stalls, in_bytes, comp_words;

  lzw_block dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  lzw_ref   ref_m;
  frame_gen gen;
  bytes_t   exp_frames[$];
  int unsigned exp_raw[$];
  int       ref_words_total = 0, bytes_total = 0;
  int       frames_done = 0, raw_done = 0;
  int       n_partial = 0;

  // ---------------- driver ----------------
  task automatic send_frame(bytes_t f);
    int codes[$];
    int unsigned words[$];
    int nw = (f.size() + 3) / 4;
    ref_m.encode(f, codes);
    ref_m.pack(codes, words);
    ref_words_total += words.size();
    bytes_total += f.size();
    if (read_compressed) foreach (words[i]) exp_raw.push_back(words[i]);
    else exp_frames.push_back(f);
    if (f.size() % 4 != 0) n_partial++;
    for (int i = 0; i < nw; i++) begin
      word_t d = '0;
      for (int b = 0; b < 4; b++)
        if (4*i + b < f.size()) d[31 - 8*b -: 8] = f[4*i + b];
      // drive between edges; in_ready is stable there
      @(negedge clk);
      in_word  = '{data: d, last: (i == nw - 1), nbytes: 2'(f.size() % 4)};
      in_valid = 1'b1;
      #1;
      while (!in_ready) @(negedge clk);
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  // ---------------- monitors ----------------
  bytes_t cur;
  always @(posedge clk) if (!rst && out_valid && out_ready) begin
    int nb;
    nb = (out_word.last && out_word.nbytes != 0) ? out_word.nbytes : 4;
    for (int b = 0; b < nb; b++) cur.push_back(out_word.data[31 - 8*b -: 8]);
    if (out_word.last) begin
      if (exp_frames.size() == 0) check(0, "decoded frame not expected");
      else begin
        bytes_t e;
        e = exp_frames.pop_front();
        if (cur != e && failures < 2) begin $display("got %p", cur); $display("exp %p", e); end
        check(cur == e, $sformatf("decoded frame %0d differs (%0d vs %0d bytes)",
                                  frames_done, cur.size(), e.size()));
      end
      cur = {};
      frames_done++;
    end
  end

  always @(posedge clk) if (!rst && raw_valid && raw_ready) begin
    if (exp_raw.size() == 0) check(0, "raw word not expected");
    else begin
      int unsigned e;
      e = exp_raw.pop_front();
      check(raw_word == e, $sformatf("raw word %0d: %08h expected %08h", raw_done, raw_word, e));
    end
    raw_done++;
  end

  // ---------------- mechanism counters ----------------
  int n_hit = 0, n_ins = 0, n_len4 = 0, n_kwk = 0, n_enc_stall = 0, n_full_cyc[5] = '{default: 0};
  int sym_taken = 0, busy_cycles = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.u_enc.u_fsm.state == 3'd2 && dut.u_enc.u_fsm.lk_hit) n_hit++;
    if (dut.u_enc.u_fsm.ins_en && !dict_full[dut.u_enc.u_fsm.ins_len + 1]) n_ins++;
    if (dut.u_enc.u_fsm.state == 3'd1 && dut.u_enc.u_fsm.w_valid && dut.u_enc.u_fsm.w_len == 3'd4
        && dut.u_enc.u_fsm.code_valid && dut.u_enc.u_fsm.code_ready) n_len4++;
    if (dut.u_dec.state == 2'd1 && dut.u_dec.kwk) n_kwk++;
    if (dut.u_enc.u_fsm.code_valid && !dut.u_enc.u_fsm.code_ready) n_enc_stall++;
    for (int k = 2; k <= 4; k++) if (dict_full[k]) n_full_cyc[k]++;
    // throughput: cycles in which the FSM has a symbol waiting and the
    // shaper is not holding it back
    if (dut.u_enc.sym_valid && !(dut.u_enc.u_fsm.code_valid && !dut.u_enc.u_fsm.code_ready)
        && dut.u_enc.u_fsm.state inside {3'd1, 3'd2}) begin
      busy_cycles++;
      if (dut.u_enc.sym_valid && dut.u_enc.sym_ready) sym_taken++;
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_decoded(input int n);
    int t = 0;
    while (frames_done < n && t < 500_000) begin @(posedge clk); t++; end
    check(frames_done == n, $sformatf("only %0d of %0d frames decoded", frames_done, n));
  endtask

  initial begin
    int sent = 0;
    logic [31:0] stalls_a;
    ref_m = new(CODE_W, D2, D3, D4);
    gen   = new(48, 2, 3, 4, 5);
    in_valid = 0; in_word = '0; read_compressed = 0; out_ready = 1; raw_ready = 1;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    begin
      int t = 0;
      while (!ready) begin @(posedge clk); t++; end
      check(t <= 16 * D3 + 4, $sformatf("dictionary clearing took %0d cycles", t));
    end

    // Phase A: reader mostly ready
    fork
      forever begin
        @(posedge clk);
        out_ready <= ($urandom_range(9) != 0);
      end
    join_none
    for (int i = 0; i < 300; i++) begin
      send_frame(gen.frame($urandom_range(64, 300)));
      sent++;
    end
    wait_decoded(sent);
    disable fork;
    check(comp_words == 32'(ref_words_total), $sformatf("compressed words %0d, reference %0d",
                                                        comp_words, ref_words_total));
    check(in_bytes == 32'(bytes_total), "byte counter");
    $display("phase A: %0d bytes -> %0d words, gain %0.2f %%", bytes_total, comp_words,
             100.0 * (1.0 - 4.0 * comp_words / bytes_total));

    // Phase B: reader stopped until the buffer overflows into a stall
    out_ready <= 1'b0;
    stalls_a = buf_stalls;
    fork
      for (int i = 0; i < 250; i++) begin
        send_frame(gen.frame($urandom_range(64, 300)));
        sent++;
      end
    join_none
    begin
      int t = 0;
      while (buf_stalls == stalls_a && t < 1_000_000) begin @(posedge clk); t++; end
    end
    check(buf_level == 13'(DEPTH), "buffer full while reader stopped");
    repeat (50) @(posedge clk);
    out_ready <= 1'b1;
    wait fork;
    wait_decoded(sent);
    check(buf_max_level == 13'(DEPTH), "worst backlog equals buffer depth");

    // Phase C: direct read of the compressed words
    @(posedge clk);
    read_compressed <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 40; i++) send_frame(gen.frame($urandom_range(64, 300)));
    begin
      int t = 0;
      while (exp_raw.size() != 0 && t < 100_000) begin @(posedge clk); t++; end
      check(exp_raw.size() == 0, "all raw words read");
    end
    check(!dec_error, "decoder error flag");

    // Throughput: one symbol per clock when not held back
    check(sym_taken * 100 >= busy_cycles * 95,
          $sformatf("encoder took %0d symbols in %0d free cycles", sym_taken, busy_cycles));

    // Mechanisms
    $display("hits=%0d inserts=%0d len4=%0d kwk=%0d enc_stall=%0d full2/3/4=%0d/%0d/%0d stalls=%0d partial=%0d raw=%0d",
             n_hit, n_ins, n_len4, n_kwk, n_enc_stall, n_full_cyc[2], n_full_cyc[3], n_full_cyc[4],
             buf_stalls, n_partial, raw_done);
    check(n_hit > 0, "mechanism: dictionary hit");
    check(n_ins > 0, "mechanism: dictionary insertion");
    check(n_len4 > 0, "mechanism: length-4 sequence emitted");
    check(n_kwk > 0, "mechanism: KwKwK decode");
    check(n_enc_stall > 0, "mechanism: encoder output stall");
    check(n_full_cyc[2] > 0, "mechanism: dictionary 2 full");
    check(n_full_cyc[3] > 0, "mechanism: dictionary 3 full");
    check(n_full_cyc[4] > 0, "mechanism: dictionary 4 full");
    check(buf_stalls > 0, "mechanism: reception buffer full");
    check(n_partial > 0, "mechanism: partial last word");
    check(raw_done > 0, "mechanism: compressed read");
    check(ref_m.full_skips > 0, "reference saw full dictionaries");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
