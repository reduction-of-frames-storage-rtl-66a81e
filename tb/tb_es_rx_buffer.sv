// tb_es_rx_buffer: the reception buffer (DEPTH reduced to 32 here). A
// writer offers words faster than a reader takes them until the buffer is
// full; it checks that words come out in order and unchanged, that level
// follows the model, that max_level keeps the worst backlog one cycle later
// (= DEPTH once full) after the buffer drains, and that stalls counts exactly the cycles
// in which a word was offered to the full buffer.
module tb_es_rx_buffer;
  import lzw_pkg::*;
  localparam int DEPTH = 32;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  word_t in_word, out_word;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [5:0] level, max_level;
  logic [31:0] stalls;

  es_rx_buffer #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t model[$];
  int exp_stalls = 0, worst = 0;
  initial begin
    in_valid = 0; out_ready = 0; in_word = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      bit wr, rd;
      // bursts: writer busy, reader slow in the first part of each 600 cycles
      @(negedge clk);
      in_valid = (cyc % 600 < 300) ? 1'b1 : ($urandom_range(3) == 0);
      out_ready = (cyc % 600 < 300) ? ($urandom_range(3) == 0) : 1'b1;
      in_word = $urandom;
      #1;
      check(level == 6'(model.size()), "level");
      check(max_level == 6'(worst), $sformatf("max_level %0d model %0d", max_level, worst));
      check(stalls == 32'(exp_stalls), "stall count");
      if (out_valid) check(out_word == model[0], "word order/value");
      wr = in_valid && in_ready;
      rd = out_valid && out_ready;
      if (in_valid && !in_ready) exp_stalls++;
      if (model.size() > worst) worst = model.size();   // seen by max_level next cycle
      @(posedge clk);
      if (rd) void'(model.pop_front());
      if (wr) model.push_back(in_word);
    end
    check(worst == DEPTH && exp_stalls > 0, "buffer was full and stalled the writer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
