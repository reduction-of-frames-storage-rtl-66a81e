// tb_lzw_encoder: the complete encoder (input FIFO, symbol extraction, state
// machine, dictionaries, shaper) with 8-bit codes and dictionaries of 64, 100
// and 75 entries so that all of them fill. Random frames of 1..120 bytes,
// drawn from weighted sequence lists, go in; the 32-bit words that come out
// must equal the reference encoder's packed code stream bit for bit, with
// random back-pressure on the output. Rate: with the output always ready a
// 256-byte frame (512 symbols) must be encoded in at most 512+12 cycles
// from its first word to its last output word.
module tb_lzw_encoder;
  import lzw_pkg::*;
  import lzw_ref_pkg::*;
  localparam int CW = 8, D2 = 64, D3 = 100, D4 = 75;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic ready, in_valid, in_ready, out_valid, out_ready;
  logic [4:2] dict_full;
  frame_word_t in_word;
  word_t out_word;

  lzw_encoder #(.CODE_W(CW), .D2(D2), .D3(D3), .D4(D4)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  lzw_ref r;
  frame_gen g;
  int unsigned exp_w[$];
  bit rnd = 1;
  int last_out_t = 0;

  always @(posedge clk) #1 out_ready = rnd ? ($urandom_range(3) != 0) : 1'b1;
  always @(negedge clk) if (!rst && out_valid && out_ready) begin
    if (exp_w.size() == 0) check(0, "unexpected word");
    else check(out_word == exp_w.pop_front(), "compressed word");
    last_out_t = $time;
  end

  task automatic send(bytes_t f);
    int codes[$];
    int unsigned w[$];
    int nw = (f.size() + 3) / 4;
    r.encode(f, codes);
    r.pack(codes, w);
    exp_w = {exp_w, w};
    for (int i = 0; i < nw; i++) begin
      word_t d = '0;
      for (int b = 0; b < 4; b++) if (4*i + b < f.size()) d[31 - 8*b -: 8] = f[4*i + b];
      @(negedge clk);
      in_word = '{data: d, last: (i == nw - 1), nbytes: 2'(f.size() % 4)};
      in_valid = 1;
      #1;
      while (!in_ready) @(negedge clk);
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    in_valid = 0; in_word = '0; out_ready = 0;
    r = new(CW, D2, D3, D4);
    g = new(12, 2, 3, 4, 5);
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 400; i++) send(g.frame($urandom_range(1, 120)));
    while (exp_w.size() != 0) @(negedge clk);
    check(dict_full == 3'b111, "all dictionaries full");
    rnd = 0;
    repeat (5) @(negedge clk);
    begin
      int t0;
      t0 = $time;
      send(g.frame(256));
      while (exp_w.size() != 0) @(negedge clk);
      check((last_out_t - t0) / 10 <= 512 + 12, $sformatf("512 symbols took %0d cycles", (last_out_t - t0) / 10));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
