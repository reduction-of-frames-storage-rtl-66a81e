// tb_lzw_shaper: random 10-bit codes, every few codes one with the flush
// flag, against a bit-level packing model: dense MSB-first concatenation,
// a word out per 32 bits, and after a flush the partial word padded with
// zeros. Random back-pressure on the output. Also checks that codes are
// accepted at one per cycle while the output is always ready.
module tb_lzw_shaper;
  import lzw_pkg::*;
  localparam int CW = 10;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [CW-1:0] in_code;
  logic in_flush, in_valid, in_ready, out_valid, out_ready;
  word_t out_word;

  lzw_shaper #(.CODE_W(CW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model: bit queue
  bit bits[$];
  int unsigned exp_w[$];
  task automatic model_push(input logic [CW-1:0] c, input bit fl);
    for (int i = CW - 1; i >= 0; i--) bits.push_back(c[i]);
    while (bits.size() >= 32) begin
      int unsigned w = 0;
      for (int i = 0; i < 32; i++) w = (w << 1) | bits.pop_front();
      exp_w.push_back(w);
    end
    if (fl && bits.size() > 0) begin
      int unsigned w = 0;
      int n = bits.size();
      for (int i = 0; i < 32; i++) w = (w << 1) | ((i < n) ? bits.pop_front() : 1'b0);
      exp_w.push_back(w);
    end
  endtask

  bit rnd = 1;
  always @(posedge clk) begin
    #1 out_ready = rnd ? ($urandom_range(3) != 0) : 1'b1;
  end
  always @(negedge clk) if (!rst && out_valid && out_ready) begin
    if (exp_w.size() == 0) check(0, "unexpected word");
    else check(out_word == exp_w.pop_front(), "word mismatch");
  end

  int accepted = 0, offered = 0;
  task automatic send(input logic [CW-1:0] c, input bit fl);
    @(negedge clk);
    in_code = c; in_flush = fl; in_valid = 1;
    model_push(c, fl);
    #1;
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    #2 in_valid = 0;
  endtask

  initial begin
    in_valid = 0; in_code = 0; in_flush = 0; out_ready = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) send(CW'($urandom), $urandom_range(7) == 0);
    send(CW'($urandom), 1);
    repeat (20) @(posedge clk);
    check(exp_w.size() == 0, "all words out");
    // rate: 64 codes = 640 bits = 20 words with the output always ready
    rnd = 0;
    begin
      int t0;
      @(negedge clk);
      t0 = $time;
      for (int i = 0; i < 64; i++) send(CW'($urandom), i == 63);
      check(($time - t0) / 10 <= 64 + 3, $sformatf("64 codes took %0d cycles", ($time - t0) / 10));
    end
    repeat (5) @(posedge clk);
    check(exp_w.size() == 0, "all words out after rate test");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
