// tb_lzw_enc_fsm: the encoder state machine with its dictionaries.
//  1. The worked example of the scheme: alphabet A, B, C (here 0xA, 0xB,
//     0xC), dictionary 2 of 5 entries, dictionaries 3 and 4 of 4 entries,
//     5-bit codes, input A B A C B A A B C B C B C A C B. Expected codes: the
//     published walk A B A C BA AB CB CBC AC, then the final B and the
//     end-of-frame code. With dictionary 2 at code 16, 3 at 21, 4 at 25:
//     10 11 10 12 17 16 19 23 18 11 31.
//  2. Random frames against the reference encoder, 6-bit codes and small
//     dictionaries so they fill up, with random back-pressure on the codes.
//  3. Rate: with codes always accepted, a frame of S symbols is encoded in
//     at most S+3 cycles.
module tb_lzw_enc_fsm;
  import lzw_pkg::*;
  import lzw_ref_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Two instances: the worked example (5-bit) and the random test (6-bit).
  `define ENC_INST(N, CW, P2, P3, P4) \
    sym_beat_t sym_``N; logic sv_``N, sr_``N, dr_``N, lk_en_``N, lk_hit_``N, ins_en_``N; \
    len_t lk_len_``N, ins_len_``N; sym_t lk_sym_``N, ins_sym_``N; \
    logic [CW-1:0] lk_code_``N, lk_res_``N, ins_code_``N, code_``N; \
    logic flush_``N, cv_``N, cr_``N; logic [4:2] full_``N; \
    lzw_enc_fsm #(.CODE_W(CW)) fsm_``N (.clk, .rst, .sym_in(sym_``N), .sym_valid(sv_``N), \
      .sym_ready(sr_``N), .dict_ready(dr_``N), .lk_en(lk_en_``N), .lk_len(lk_len_``N), \
      .lk_code(lk_code_``N), .lk_sym(lk_sym_``N), .lk_hit(lk_hit_``N), .lk_code_in(lk_res_``N), \
      .ins_en(ins_en_``N), .ins_len(ins_len_``N), .ins_code(ins_code_``N), .ins_sym(ins_sym_``N), \
      .code_out(code_``N), .code_flush(flush_``N), .code_valid(cv_``N), .code_ready(cr_``N)); \
    lzw_enc_dict #(.CODE_W(CW), .D2(P2), .D3(P3), .D4(P4)) dict_``N (.clk, .rst, .ready(dr_``N), \
      .lk_en(lk_en_``N), .lk_len(lk_len_``N), .lk_code(lk_code_``N), .lk_sym(lk_sym_``N), \
      .lk_hit(lk_hit_``N), .lk_code_out(lk_res_``N), .ins_en(ins_en_``N), .ins_len(ins_len_``N), \
      .ins_code(ins_code_``N), .ins_sym(ins_sym_``N), .full(full_``N));

  `ENC_INST(a, 5, 5, 4, 4)
  `ENC_INST(b, 6, 20, 16, 11)

  int got_a[$], got_b[$];
  bit rnd_ready = 0;
  always @(posedge clk) begin
    if (!rst && cv_a && cr_a) begin
      got_a.push_back(code_a);
      if (code_a == 31) check(flush_a, "flush with end-of-frame code");
    end
    if (!rst && cv_b && cr_b) got_b.push_back(code_b);
  end
  always @(posedge clk) begin
    #1;
    cr_a = 1'b1;
    cr_b = rnd_ready ? ($urandom_range(2) != 0) : 1'b1;
  end

  task automatic feed(input int syms[$], input bit which_b);
    foreach (syms[i]) begin
      @(negedge clk);
      if (which_b) begin
        sym_b = '{sym: 4'(syms[i]), last: (i == syms.size() - 1)}; sv_b = 1;
        #1;
        while (!sr_b) @(negedge clk);
      end else begin
        sym_a = '{sym: 4'(syms[i]), last: (i == syms.size() - 1)}; sv_a = 1;
        #1;
        while (!sr_a) @(negedge clk);
      end
      @(posedge clk);
    end
    @(negedge clk);
    sv_a = 0; sv_b = 0;
  endtask

  initial begin
    int ex[$] = '{10, 11, 10, 12, 11, 10, 10, 11, 12, 11, 12, 11, 12, 10, 12, 11};
    int exp_codes[$] = '{10, 11, 10, 12, 17, 16, 19, 23, 18, 11, 31};
    lzw_ref r;
    frame_gen g;
    int total_exp[$];
    sv_a = 0; sv_b = 0; sym_a = '0; sym_b = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    wait (dr_a && dr_b);
    repeat (3) @(negedge clk);

    // 1. worked example
    feed(ex, 0);
    repeat (5) @(posedge clk);
    check(got_a.size() == exp_codes.size(), $sformatf("example: %0d codes", got_a.size()));
    foreach (exp_codes[i])
      if (i < got_a.size())
        check(got_a[i] == exp_codes[i], $sformatf("example code %0d: %0d expected %0d", i, got_a[i], exp_codes[i]));
    check(full_a == 3'b010, "example: only dictionary 3 full");

    // 3. rate on the example instance: 40 symbols, codes always accepted
    begin
      int s40[$];
      int t0;
      for (int i = 0; i < 40; i++) s40.push_back($urandom_range(10, 12));
      got_a = {};
      @(negedge clk);
      t0 = $time;
      fork feed(s40, 0); join_none
      while (got_a.size() == 0 || got_a[got_a.size() - 1] != 31) @(negedge clk);
      check(($time - t0) / 10 <= 40 + 3 + 1, $sformatf("40 symbols took %0d cycles", ($time - t0) / 10));
    end

    // 2. random frames against the reference, with back-pressure
    rnd_ready = 1;
    r = new(6, 20, 16, 11);
    g = new(8, 2, 3, 4, 5);
    for (int f = 0; f < 60; f++) begin
      bytes_t fr;
      int codes[$], syms[$];
      fr = g.frame($urandom_range(4, 40));
      syms = {};
      r.encode(fr, codes);
      total_exp = {total_exp, codes};
      foreach (fr[i]) begin syms.push_back(fr[i] >> 4); syms.push_back(fr[i] & 15); end
      feed(syms, 1);
    end
    repeat (20) @(posedge clk);
    check(got_b.size() == total_exp.size(), $sformatf("random: %0d codes, expected %0d", got_b.size(), total_exp.size()));
    foreach (total_exp[i])
      if (i < got_b.size()) check(got_b[i] == total_exp[i], $sformatf("random code %0d", i));
    check(full_b == 3'b111, "random: all dictionaries full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
