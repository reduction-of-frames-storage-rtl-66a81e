// tb_sync_fifo: random pushes and pops against a queue model. Checks the
// order and value of every word read, count, full (in_ready low exactly at
// DEPTH entries) and empty, and that a word written is readable on the next
// cycle.
module tb_sync_fifo;
  localparam int W = 35, DEPTH = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [W-1:0] in_data, out_data;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [4:0] count;

  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

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

  int n_full = 0, n_empty = 0;
  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // phases: mostly writing, mostly reading, mixed
      int pw = (cyc % 1000 < 300) ? 9 : (cyc % 1000 < 600) ? 2 : 5;
      @(negedge clk);
      in_valid = ($urandom_range(9) < pw);
      out_ready = ($urandom_range(9) >= pw);
      in_data = {$urandom, 3'($urandom)};
      check(count == 5'(model.size()), $sformatf("count %0d model %0d", count, model.size()));
      check(in_ready == (model.size() < DEPTH), "in_ready vs full");
      check(out_valid == (model.size() > 0), "out_valid vs empty");
      if (model.size() == DEPTH) n_full++;
      if (model.size() == 0) n_empty++;
      if (out_valid) check(out_data == model[0], "head word");
      begin
        bit wr, rd;
        wr = in_valid && in_ready;
        rd = out_valid && out_ready;
        @(posedge clk);
        if (rd) void'(model.pop_front());
        if (wr) model.push_back(in_data);
      end
    end
    check(n_full > 0 && n_empty > 0, "full and empty both reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
