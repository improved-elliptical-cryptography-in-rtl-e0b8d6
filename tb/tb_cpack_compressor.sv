// tb_cpack_compressor: streams random cache lines (8 pairs each, with idle
// cycles and back-to-back lines) into the two-word compressor and checks
// every output pair bit for bit against the reference model, one cycle after
// its input (latency 1, one pair per cycle). It also counts that each kind
// occurred and that word 1 of a pair was coded against word 0 of the same
// pair (the in-pair dictionary path). Some runs between clears are three
// lines long, so the FIFO evicts its oldest entries; that must happen too.
module tb_cpack_compressor;
  import cpack_pkg::*;
  import cpack_ref_pkg::*;

  localparam int N = 16;
  localparam int LINE_PAIRS = 8;

  logic              clk = 0, rst_n = 0;
  logic              in_valid, in_first;
  word_t             in_words [2];
  logic              out_valid;
  logic [PAIR_W-1:0] out_pair;
  logic [6:0]        out_len;
  kind_e             out_kind [2];
  int checks = 0, failures = 0;

  cpack_compressor #(.DICT_ENTRIES(N)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_first(in_first),
    .in_words(in_words), .out_valid(out_valid), .out_pair(out_pair),
    .out_len(out_len), .out_kind(out_kind));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // nxt_* is the expected result of the input just applied; exp_* is what
  // the outputs must show after the next clock edge.
  bit                nxt_valid = 0, exp_valid = 0;
  logic [PAIR_W-1:0] nxt_pair, exp_pair;
  int                nxt_len, nxt_k0, nxt_k1, exp_len, exp_k0, exp_k1;

  always @(posedge clk) begin
    exp_valid <= nxt_valid; exp_pair <= nxt_pair; exp_len <= nxt_len;
    exp_k0 <= nxt_k0; exp_k1 <= nxt_k1;
  end
  int                seen [6];
  int                evictions = 0;
  int                in_pair_hits = 0;

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (out_valid != exp_valid) begin
      failures++;
      $display("FAIL out_valid %0b expected %0b at %0t", out_valid, exp_valid, $time);
    end else if (exp_valid) begin
      checks++;
      if (out_pair != exp_pair || out_len != 7'(exp_len) ||
          int'(out_kind[0]) != exp_k0 || int'(out_kind[1]) != exp_k1) begin
        failures++;
        if (failures < 10)
          $display("FAIL pair %h len %0d kinds %0d %0d, expected %h %0d %0d %0d", out_pair,
                   out_len, out_kind[0], out_kind[1], exp_pair, exp_len, exp_k0, exp_k1);
      end
    end
  end

  initial begin
    automatic RefDict m = new(N);
    logic [31:0] pool[$];
    in_valid = 0; in_first = 0; in_words[0] = 0; in_words[1] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int line = 0; line < 300; line++) begin
      // One run in four between dictionary clears is three lines long, so
      // more words are pushed than the dictionary holds and the oldest
      // entries are evicted in FIFO order.
      automatic int run_pairs = (line % 4 == 1) ? 3 * LINE_PAIRS : LINE_PAIRS;
      automatic int pushes = 0;
      for (int p = 0; p < run_pairs; p++) begin
        automatic bit q[$];
        automatic logic [31:0] w0 = pick_word(pool);
        automatic logic [31:0] w1 = pick_word(pool);
        automatic int slot0;
        // Idle cycles now and then.
        while ($urandom_range(0, 5) == 0) begin
          @(posedge clk);
          #1 in_valid = 0; nxt_valid = 0;
        end
        // Often make word 1 a near copy of word 0.
        if ($urandom_range(0, 3) == 0) w1 = w0 ^ 32'($urandom_range(0, 255));
        @(posedge clk);
        #1;
        in_valid = 1; in_first = (p == 0);
        in_words[0] = w0; in_words[1] = w1;
        if (p == 0) m.clear();
        slot0 = m.wptr;
        encode_pair(q, w0, w1, m, nxt_k0, nxt_k1);
        nxt_pair = '0;
        foreach (q[i]) nxt_pair[PAIR_W-1-i] = q[i];
        nxt_len = q.size();
        nxt_valid = 1;
        seen[nxt_k0]++; seen[nxt_k1]++;
        pushes += int'(nxt_k0 inside {1, 2, 3, 5}) + int'(nxt_k1 inside {1, 2, 3, 5});
        if (pushes > N) evictions++;
        // Word 1 coded against the slot word 0 was just written into.
        if (nxt_k0 inside {1, 2, 3, 5} && nxt_k1 inside {2, 3, 5} &&
            lead_bytes(w0, w1) >= 2 && m.ent[slot0] == w0) begin
          automatic int iw = 4;
          automatic int off = kind_bits(nxt_k0, iw) + ((nxt_k1 == 2) ? 2 : 4);
          automatic int idx = 0;
          for (int b = 0; b < iw; b++) idx = (idx << 1) | int'(q[off + b]);
          if (idx == slot0) in_pair_hits++;
        end
      end
    end
    @(posedge clk);
    #1 in_valid = 0; nxt_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (evictions == 0) begin failures++; $display("FAIL no FIFO eviction"); end
    $display("pairs coded after an eviction %0d", evictions);
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL kind %0d never produced", i); end
    end
    checks++;
    if (in_pair_hits == 0) begin failures++; $display("FAIL no in-pair dictionary match"); end
    $display("in-pair matches %0d", in_pair_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
