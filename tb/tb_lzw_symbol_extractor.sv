// tb_lzw_symbol_extractor: random frames of random byte length go in as
// 32-bit words; the symbol stream must be their nibbles, high nibble of the
// first byte first, with last set on exactly the final symbol of each frame.
// With the output always ready and words always available the extractor
// must deliver one symbol per clock.
module tb_lzw_symbol_extractor;
  import lzw_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  frame_word_t in_word;
  logic in_valid, in_ready, out_valid, out_ready;
  sym_beat_t out_sym;

  lzw_symbol_extractor dut (.*);

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

  sym_beat_t exp_q[$];
  bit random_ready = 1;

  // reader
  initial begin
    out_ready = 0;
    forever begin
      @(posedge clk);
      #1 out_ready = random_ready ? ($urandom_range(3) != 0) : 1'b1;
      @(negedge clk);
      if (out_valid && out_ready) begin
        if (exp_q.size() == 0) check(0, "unexpected symbol");
        else check(out_sym == exp_q.pop_front(), "symbol/last mismatch");
      end
    end
  end

  task automatic send(int nbytes);
    int nw = (nbytes + 3) / 4;
    for (int i = 0; i < nw; i++) begin
      word_t d = $urandom;
      int nb = (i == nw - 1 && nbytes % 4 != 0) ? nbytes % 4 : 4;
      for (int k = 0; k < 2 * nb; k++)
        exp_q.push_back('{sym: d[31 - 4*k -: 4], last: (i == nw - 1) && (k == 2*nb - 1)});
      @(negedge clk);
      in_word = '{data: d, last: (i == nw - 1), nbytes: 2'(nbytes % 4)};
      in_valid = 1;
      #1;
      while (!in_ready) @(negedge clk);
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    in_valid = 0; in_word = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 200; f++) send($urandom_range(1, 40));
    repeat (20) @(posedge clk);
    check(exp_q.size() == 0, "all symbols delivered");
    // rate: 64 words back to back, reader always ready -> 512 symbols in ~512 cycles
    random_ready = 0;
    begin
      int t0, t1;
      @(negedge clk);
      t0 = $time;
      send(256);
      while (exp_q.size() != 0) @(negedge clk);
      t1 = $time;
      check((t1 - t0) / 10 <= 512 + 4, $sformatf("512 symbols took %0d cycles", (t1 - t0) / 10));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
