// tb_lzw_enc_dict: the encoder dictionaries against an associative-array
// model, 6-bit codes, D2 = 20, D3 = 16, D4 = 11 (codes 16..35, 36..51,
// 52..62). Checks: ready rises after the clearing sweep (16*D2 cycles here,
// the size of the largest table); random lookups of (sequence, symbol) return hit and
// code as the model says, one cycle later; insertions get consecutive codes
// of the right dictionary and stop when it is full (full flags); a lookup in
// the same cycle as the insertion of the same entry already hits.
module tb_lzw_enc_dict;
  import lzw_pkg::*;
  localparam int CW = 6, D2 = 20, D3 = 16, D4 = 11;
  localparam int B2 = 16, B3 = 36, B4 = 52;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic ready, lk_en, lk_hit, ins_en;
  len_t lk_len, ins_len;
  logic [CW-1:0] lk_code, lk_code_out, ins_code;
  sym_t lk_sym, ins_sym;
  logic [4:2] full;

  lzw_enc_dict #(.CODE_W(CW), .D2(D2), .D3(D3), .D4(D4)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int model[int];           // code*16+sym -> code
  int fill[5] = '{0, 0, 0, 0, 0};
  function automatic int sz(int k); return k == 2 ? D2 : k == 3 ? D3 : D4; endfunction
  function automatic int bs(int k); return k == 2 ? B2 : k == 3 ? B3 : B4; endfunction

  // a random existing sequence of length len
  function automatic int pick(int len);
    if (len == 1) return $urandom_range(15);
    if (fill[len] == 0) return -1;
    return bs(len) + $urandom_range(fill[len] - 1);
  endfunction

  initial begin
    int t = 0;
    lk_en = 0; ins_en = 0; lk_len = 1; ins_len = 1; lk_code = 0; ins_code = 0; lk_sym = 0; ins_sym = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    while (!ready) begin @(negedge clk); t++; end
    check(t >= 16 * D2 - 2 && t <= 16 * D2 + 2, $sformatf("clearing took %0d cycles", t));

    for (int it = 0; it < 3000; it++) begin
      int len, c, s, key;
      bit do_ins;
      len = $urandom_range(1, 3);
      c = pick(len);
      s = $urandom_range(15);
      if (c < 0) continue;
      key = c * 16 + s;
      do_ins = !model.exists(key) && $urandom_range(1);
      @(negedge clk);
      lk_en = 1; lk_len = 3'(len); lk_code = CW'(c); lk_sym = 4'(s);
      ins_en = do_ins; ins_len = 3'(len); ins_code = CW'(c); ins_sym = 4'(s);
      @(negedge clk);
      lk_en = 0; ins_en = 0;
      if (do_ins && fill[len + 1] < sz(len + 1)) begin
        model[key] = bs(len + 1) + fill[len + 1];
        fill[len + 1]++;
      end
      // the lookup was issued together with the insertion: it sees it
      check(lk_hit == model.exists(key), $sformatf("hit for code %0d sym %0d", c, s));
      if (model.exists(key)) check(lk_code_out == CW'(model[key]), "code of hit");
      check(full == {fill[4] == D4, fill[3] == D3, fill[2] == D2}, "full flags");
      // held until the next lookup
      @(negedge clk);
      check(lk_hit == model.exists(key), "result held");
    end
    check(full == 3'b111, "all dictionaries filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
