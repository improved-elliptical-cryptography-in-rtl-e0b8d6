// tb_cpack_decompressor: compresses random lines with the reference model
// and feeds each compressed pair to the decompressor as the top of a 68-bit
// window whose remaining bits are random stream bits. Checks the consumed
// length in the same cycle and both rebuilt words one cycle later, with idle
// cycles between pairs and lines. Some runs between clears are three lines
// long, so the FIFO evicts its oldest entries; that must happen too.
module tb_cpack_decompressor;
  import cpack_pkg::*;
  import cpack_ref_pkg::*;

  localparam int N = 16;
  localparam int LINE_PAIRS = 8;

  logic              clk = 0, rst_n = 0;
  logic              in_valid, in_first;
  logic [PAIR_W-1:0] in_bits;
  logic [6:0]        consumed;
  logic              out_valid, out_bad;
  word_t             out_words [2];
  kind_e             out_kind [2];
  int checks = 0, failures = 0;

  cpack_decompressor #(.DICT_ENTRIES(N)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_first(in_first),
    .in_bits(in_bits), .consumed(consumed), .out_valid(out_valid),
    .out_words(out_words), .out_kind(out_kind), .out_bad(out_bad));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // nxt_* is what the driver just applied; exp_* is what the outputs must
  // show after the next clock edge.
  bit          nxt_valid = 0, exp_valid = 0;
  logic [31:0] nxt_w0, nxt_w1, exp_w0, exp_w1;
  int          nxt_k0, nxt_k1, exp_k0, exp_k1;

  always @(posedge clk) begin
    exp_valid <= nxt_valid;
    exp_w0 <= nxt_w0; exp_w1 <= nxt_w1; exp_k0 <= nxt_k0; exp_k1 <= nxt_k1;
  end
  int          seen [6];
  int          evictions = 0;

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (out_valid != exp_valid) begin
      failures++;
      $display("FAIL out_valid %0b expected %0b at %0t", out_valid, exp_valid, $time);
    end else if (exp_valid) begin
      checks++;
      if (out_words[0] != exp_w0 || out_words[1] != exp_w1 || out_bad ||
          int'(out_kind[0]) != exp_k0 || int'(out_kind[1]) != exp_k1) begin
        failures++;
        if (failures < 10)
          $display("FAIL words %h %h, expected %h %h", out_words[0], out_words[1], exp_w0, exp_w1);
      end
    end
  end

  initial begin
    automatic RefDict m = new(N);
    logic [31:0] pool[$];
    in_valid = 0; in_first = 0; in_bits = '0;
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
        automatic int k0, k1;
        while ($urandom_range(0, 5) == 0) begin
          @(posedge clk);
          #1 in_valid = 0; nxt_valid = 0; in_bits = {$urandom, $urandom, 4'($urandom)};
        end
        if ($urandom_range(0, 3) == 0) w1 = w0 ^ 32'($urandom_range(0, 255));
        if (p == 0) m.clear();
        encode_pair(q, w0, w1, m, k0, k1);
        @(posedge clk);
        #1;
        in_valid = 1; in_first = (p == 0);
        in_bits = {$urandom, $urandom, 4'($urandom)};
        foreach (q[i]) in_bits[PAIR_W-1-i] = q[i];
        nxt_valid = 1; nxt_w0 = w0; nxt_w1 = w1; nxt_k0 = k0; nxt_k1 = k1;
        seen[k0]++; seen[k1]++;
        pushes += int'(k0 inside {1, 2, 3, 5}) + int'(k1 inside {1, 2, 3, 5});
        if (pushes > N) evictions++;
        #1;
        checks++;
        if (consumed != 7'(q.size())) begin
          failures++;
          if (failures < 10) $display("FAIL consumed %0d expected %0d", consumed, q.size());
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
      if (seen[i] == 0) begin failures++; $display("FAIL kind %0d never decoded", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
