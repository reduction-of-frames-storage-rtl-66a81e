// tb_lzw_workloads: compression-gain runs of the kind the design was sized
// with, on four builds of lzw_block side by side.
//
// Builds (D2 = 256 in all, dictionaries 3 and 4 share 2**n - 272 codes less
// the end-of-frame code):
//   n =  9: D3 = 120,  D4 = 119   (too few codes for both; expected poor)
//   n = 10: defaults, D3 = 511, D4 = 240
//   n = 11: D3 = 1535, D4 = 240
//   n = 12: D3 = 3583, D4 = 240
// Frame sets, each started from freshly reset dictionaries:
//   standard  : weighted lists of random 1..4 symbol sequences
//   short     : the same kind of lists, weighted towards short sequences
//   dict4     : wider lists, weighted towards 4-symbol sequences
//   uniform   : single symbols drawn from a long random list (~no redundancy)
// Frames are 64..299 bytes. The standard set is as long as the evaluation
// set it stands for (12 million symbols, STD_SYMS); the others are shorter
// (SET_SYMS), their size not being fixed by the evaluation. The list lengths
// and weights are this testbench's choice.
//
// Timing: the four builds run in parallel at one symbol per clock; about
// 27 million clocks in all.
//
// Frame order: a reference set of ORD_SYMS symbols is run again as NREORD
// secondary sets with the same frames shuffled, and the minimum, average and
// maximum gain of each build are printed, as in the evaluation of the order
// sensitivity.
//
// Every frame goes into all four builds. Checks: each decoded frame equals
// the frame sent, each build's compressed word count per set equals the
// reference encoder's, no decoder error, the uniform set compresses worse
// than the standard set, and on the standard set 10-bit codes beat 9-bit
// codes (with 9 bits dictionaries 3 and 4 are too small to pay off), and
// the frame order changes the gain. The gain of every build on every set is
// printed as 1 - 4*words/bytes.
module tb_lzw_workloads;
  import lzw_pkg::*;
  import lzw_ref_pkg::*;

  localparam int NL       = 4;
  localparam int STD_SYMS = 12_000_000;
  localparam int SET_SYMS = 2_000_000;
  localparam int ORD_SYMS = 400_000;   // per reordered set
  localparam int NREORD   = 20;        // secondary sets

  localparam int CW [NL] = '{9, 10, 11, 12};
  localparam int C3 [NL] = '{120, 511, 1535, 3583};
  localparam int C4 [NL] = '{119, 240, 240, 240};

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- the four builds ----------------
  logic        ready     [NL];
  frame_word_t in_word   [NL];
  logic        in_valid  [NL];
  logic        in_ready  [NL];
  frame_word_t out_word  [NL];
  logic        out_valid [NL];
  logic        dec_error [NL];
  logic [31:0] in_bytes  [NL];
  logic [31:0] comp_words[NL];

  for (genvar l = 0; l < NL; l++) begin : g_lane
    word_t       raw_word;
    logic        raw_valid;
    logic [4:2]  dict_full;
    logic [12:0] buf_level, buf_max_level;
    logic [31:0] buf_stalls;
    if (l == 1) begin : g_dut
      lzw_block dut (
        .clk, .rst, .ready(ready[l]),
        .in_word(in_word[l]), .in_valid(in_valid[l]), .in_ready(in_ready[l]),
        .read_compressed(1'b0),
        .out_word(out_word[l]), .out_valid(out_valid[l]), .out_ready(1'b1),
        .raw_word, .raw_valid, .raw_ready(1'b1),
        .dict_full, .buf_level, .buf_max_level, .buf_stalls,
        .dec_error(dec_error[l]), .in_bytes(in_bytes[l]), .comp_words(comp_words[l]));
    end else begin : g_dut
      lzw_block #(.CODE_W(CW[l]), .D2(256), .D3(C3[l]), .D4(C4[l])) dut (
        .clk, .rst, .ready(ready[l]),
        .in_word(in_word[l]), .in_valid(in_valid[l]), .in_ready(in_ready[l]),
        .read_compressed(1'b0),
        .out_word(out_word[l]), .out_valid(out_valid[l]), .out_ready(1'b1),
        .raw_word, .raw_valid, .raw_ready(1'b1),
        .dict_full, .buf_level, .buf_max_level, .buf_stalls,
        .dec_error(dec_error[l]), .in_bytes(in_bytes[l]), .comp_words(comp_words[l]));
    end
  end

  // ---------------- frames of the current set ----------------
  bytes_t frames[$];
  int     ref_words[NL];
  int     set_bytes;
  int     rx_frame[NL];     // frames fully decoded, per build
  int     rx_byte[NL];      // bytes of the current frame already seen

  task automatic drive(input int l);
    foreach (frames[k]) begin
      int nb, nw;
      nb = frames[k].size();
      nw = (nb + 3) / 4;
      for (int i = 0; i < nw; i++) begin
        word_t d;
        d = '0;
        for (int b = 0; b < 4; b++)
          if (4*i + b < nb) d[31 - 8*b -: 8] = frames[k][4*i + b];
        @(negedge clk);
        in_word[l]  = '{data: d, last: (i == nw - 1), nbytes: 2'(nb % 4)};
        in_valid[l] = 1'b1;
        #1;
        while (!in_ready[l]) @(negedge clk);
        @(posedge clk);
      end
    end
    @(negedge clk);
    in_valid[l] = 1'b0;
  endtask

  // Monitors compare on the fly against the stored frames.
  for (genvar l = 0; l < NL; l++) begin : g_mon
    always @(posedge clk) if (!rst && out_valid[l]) begin
      int nb;
      bit ok;
      nb = (out_word[l].last && out_word[l].nbytes != 0) ? out_word[l].nbytes : 4;
      ok = (rx_frame[l] < frames.size());
      for (int b = 0; b < nb && ok; b++)
        ok = (rx_byte[l] + b < frames[rx_frame[l]].size()) &&
             (out_word[l].data[31 - 8*b -: 8] == frames[rx_frame[l]][rx_byte[l] + b]);
      rx_byte[l] += nb;
      if (out_word[l].last) begin
        ok = ok && (rx_byte[l] == frames[rx_frame[l]].size());
        check(ok, $sformatf("n=%0d frame %0d decoded wrongly", CW[l], rx_frame[l]));
        rx_frame[l]++;
        rx_byte[l] = 0;
      end else if (!ok) begin
        check(0, $sformatf("n=%0d frame %0d: wrong word", CW[l], rx_frame[l]));
      end
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (120_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real gain[4][NL];   // [set][build]
  real g_last[NL];    // gains of the last run

  // Fills frames with a new set of about nsyms symbols.
  task automatic make_set(input frame_gen g, input int nsyms);
    int syms;
    syms   = 0;
    frames = {};
    while (syms < nsyms) begin
      bytes_t f;
      f = g.frame($urandom_range(64, 299));
      frames.push_back(f);
      syms += 2 * f.size();
    end
  endtask

  // Runs the frames in their current order through all builds, from freshly
  // reset dictionaries, and leaves the gains in g_last.
  task automatic run_frames(input string name, input bit show);
    lzw_ref refs[NL];
    rst <= 1'b1;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int l = 0; l < NL; l++) begin
      while (!ready[l]) @(posedge clk);
      refs[l]      = new(CW[l], 256, C3[l], C4[l]);
      ref_words[l] = 0;
      rx_frame[l]  = 0;
      rx_byte[l]   = 0;
    end
    set_bytes = 0;
    foreach (frames[k]) begin
      set_bytes += frames[k].size();
      for (int l = 0; l < NL; l++) begin
        int codes[$];
        int unsigned words[$];
        refs[l].encode(frames[k], codes);
        refs[l].pack(codes, words);
        ref_words[l] += words.size();
      end
    end
    fork
      drive(0);
      drive(1);
      drive(2);
      drive(3);
    join
    for (int l = 0; l < NL; l++) begin
      int t;
      t = 0;
      while (rx_frame[l] < frames.size() && t < 100_000) begin @(posedge clk); t++; end
      check(rx_frame[l] == frames.size(),
            $sformatf("%s n=%0d: %0d of %0d frames decoded", name, CW[l], rx_frame[l], frames.size()));
      check(comp_words[l] == 32'(ref_words[l]),
            $sformatf("%s n=%0d: %0d words, reference %0d", name, CW[l], comp_words[l], ref_words[l]));
      check(in_bytes[l] == 32'(set_bytes), $sformatf("%s n=%0d: byte count", name, CW[l]));
      check(!dec_error[l], $sformatf("%s n=%0d: decoder error", name, CW[l]));
      g_last[l] = 100.0 * (1.0 - 4.0 * comp_words[l] / set_bytes);
    end
    if (show)
      $display("%-8s %0d frames, %0d symbols: gain n=9 %6.2f %%  n=10 %6.2f %%  n=11 %6.2f %%  n=12 %6.2f %%",
               name, frames.size(), 2 * set_bytes, g_last[0], g_last[1], g_last[2], g_last[3]);
  endtask

  task automatic run_set(input int set, input string name, input frame_gen g, input int nsyms);
    make_set(g, nsyms);
    run_frames(name, 1'b1);
    for (int l = 0; l < NL; l++) gain[set][l] = g_last[l];
  endtask

  initial begin
    frame_gen g_std, g_short, g_d4, g_uni;
    real gmin[NL], gmax[NL], gsum[NL];
    for (int l = 0; l < NL; l++) begin
      in_valid[l] = 1'b0;
      in_word[l]  = '0;
      rx_frame[l] = 0;
      rx_byte[l]  = 0;
    end
    g_std   = new(48, 2, 3, 4, 5);
    g_short = new(48, 6, 5, 2, 1);
    g_d4    = new(160, 1, 2, 3, 8);
    g_uni   = new(4096, 1, 0, 0, 0); // long list of single symbols: ~uniform
    run_set(0, "standard", g_std, STD_SYMS);
    run_set(1, "short", g_short, SET_SYMS);
    run_set(2, "dict4", g_d4, SET_SYMS);
    run_set(3, "uniform", g_uni, SET_SYMS);
    for (int l = 0; l < NL; l++)
      check(gain[3][l] < gain[0][l],
            $sformatf("n=%0d: uniform frames compress better than the standard set", CW[l]));
    check(gain[0][1] > gain[0][0], "standard set: 10-bit codes do not beat 9-bit codes");

    // Frame order: one reference set and NREORD secondary sets holding the
    // same frames in shuffled order.
    make_set(g_std, ORD_SYMS);
    for (int r = 0; r <= NREORD; r++) begin
      if (r > 0) frames.shuffle();
      run_frames("order", 1'b0);
      for (int l = 0; l < NL; l++) begin
        if (r == 0 || g_last[l] < gmin[l]) gmin[l] = g_last[l];
        if (r == 0 || g_last[l] > gmax[l]) gmax[l] = g_last[l];
        gsum[l] = (r == 0) ? g_last[l] : gsum[l] + g_last[l];
      end
    end
    for (int l = 0; l < NL; l++) begin
      $display("order    n=%0d, %0d sets of %0d frames: gain min %6.2f %%  avg %6.2f %%  max %6.2f %%",
               CW[l], NREORD + 1, frames.size(), gmin[l], gsum[l] / (NREORD + 1), gmax[l]);
      check(gmax[l] > gmin[l], $sformatf("n=%0d: frame order made no difference", CW[l]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
