// tb_lzw_decoder: the decoder fed with compressed words made by the
// reference encoder (8-bit codes, dictionaries of 64, 100 and 75 entries so
// all of them fill). Frames are random (weighted sequence lists, 1..120
// bytes) plus frames of one repeated byte, which force the case where a code
// names the entry that is being created (KwKwK). Every decoded frame must
// equal the original, with last and the byte count of the last word right,
// under random back-pressure on the output. Finally a code that names an
// entry not yet made must raise the error flag.
module tb_lzw_decoder;
  import lzw_pkg::*;
  import lzw_ref_pkg::*;
  localparam int CW = 8, D2 = 64, D3 = 100, D4 = 75;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  word_t in_word;
  logic in_valid, in_ready, out_valid, out_ready, error;
  frame_word_t out_word;

  lzw_decoder #(.CODE_W(CW), .D2(D2), .D3(D3), .D4(D4)) dut (.*);

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
  bytes_t exp_f[$];
  bytes_t cur;
  int n_kwk = 0, done = 0;

  always @(posedge clk) #1 out_ready = ($urandom_range(3) != 0);
  always @(posedge clk) if (!rst && dut.state == 2'd1 && dut.kwk) n_kwk++;
  always @(negedge clk) if (!rst && out_valid && out_ready) begin
    int nb;
    nb = (out_word.last && out_word.nbytes != 0) ? out_word.nbytes : 4;
    for (int b = 0; b < nb; b++) cur.push_back(out_word.data[31 - 8*b -: 8]);
    if (out_word.last) begin
      bytes_t e;
      if (exp_f.size() == 0) check(0, "unexpected frame");
      else begin
        e = exp_f.pop_front();
        check(cur == e, $sformatf("frame %0d: %0d bytes, expected %0d", done, cur.size(), e.size()));
      end
      cur = {};
      done++;
    end
  end

  task automatic put_word(int unsigned w);
    @(negedge clk);
    in_word = w; in_valid = 1;
    #1;
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    #1 in_valid = 0;
  endtask

  task automatic send(bytes_t f);
    int codes[$];
    int unsigned w[$];
    r.encode(f, codes);
    r.pack(codes, w);
    exp_f.push_back(f);
    foreach (w[i]) put_word(w[i]);
  endtask

  initial begin
    in_valid = 0; in_word = '0;
    r = new(CW, D2, D3, D4);
    g = new(12, 2, 3, 4, 5);
    repeat (3) @(negedge clk);
    rst = 0;
    // a run of one symbol first: 0x33 x 6 -> 12 symbols, codes 3, 16, ...
    send('{8'h33, 8'h33, 8'h33, 8'h33, 8'h33, 8'h33});
    for (int i = 0; i < 300; i++) begin
      if (i % 50 == 7) begin
        bytes_t f;
        f = {};
        for (int k = 0, n = $urandom_range(2, 20); k < n; k++) f.push_back(8'h11 * $urandom_range(15));
        for (int k = 0; k < 4; k++) f.push_back(f[f.size() - 1]);
        send(f);
      end else send(g.frame($urandom_range(1, 120)));
    end
    while (exp_f.size() != 0) @(negedge clk);
    repeat (10) @(negedge clk);
    check(done == 301, $sformatf("%0d frames decoded", done));
    check(n_kwk > 0, $sformatf("KwKwK case seen %0d times", n_kwk));
    check(!error, "no error on valid streams");
    check(r.full_skips > 0, "dictionaries were full");
    // code 0x50 is in dictionary 2 (16..79) and exists; after a reset none does
    rst = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    put_word(32'h4150_FF00);      // codes 0x41 (dict 2, entry 49, unknown), 0x50 ...
    repeat (10) @(negedge clk);
    check(error, "error flag on a code naming a missing entry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
