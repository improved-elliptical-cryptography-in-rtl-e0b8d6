// tb_cpack_top: end-to-end test of the C-Pack engine at its default size
// (16-entry dictionary, 64-byte lines).
//
// Random cache lines, drawn so that every code occurs, are compressed two
// words per cycle. Each packed line is checked bit for bit against the
// reference model, and its line_valid must come two cycles after the last
// pair. The line is then fed to the decompression path while the next line
// is being compressed; the words must come back unchanged, two per cycle,
// starting two cycles after the load, and the reader must consume exactly
// the packed length. Mechanisms counted (each must occur): every kind,
// word 1 coded against word 0 of its own pair, a line growing past 512 bits,
// a line shrinking below 512 bits, a dictionary pointer wrap inside a line,
// back-to-back lines, and both paths busy in the same cycle.
module tb_cpack_top;
  import cpack_pkg::*;
  import cpack_ref_pkg::*;

  localparam int N          = 16;
  localparam int LINE_WORDS = 16;
  localparam int LINE_PAIRS = LINE_WORDS / 2;
  localparam int LINE_BITS  = LINE_PAIRS * PAIR_W;
  localparam int NLINES     = 400;

  logic                 clk = 0, rst_n = 0;
  logic                 c_valid, c_first;
  word_t                c_words [2];
  logic                 c_pair_valid;
  kind_e                c_kinds [2];
  logic                 c_line_valid;
  logic [LINE_BITS-1:0] c_line_bits;
  logic [9:0]           c_line_len;
  logic                 d_load;
  logic [LINE_BITS-1:0] d_line_bits;
  logic                 d_busy, d_valid, d_bad;
  logic [9:0]           d_bits_used;
  word_t                d_words [2];
  kind_e                d_kinds [2];

  int checks = 0, failures = 0;

  cpack_top dut (
    .clk(clk), .rst_n(rst_n),
    .c_valid(c_valid), .c_first(c_first), .c_words(c_words),
    .c_pair_valid(c_pair_valid), .c_kinds(c_kinds),
    .c_line_valid(c_line_valid), .c_line_bits(c_line_bits), .c_line_len(c_line_len),
    .d_load(d_load), .d_line_bits(d_line_bits), .d_busy(d_busy),
    .d_bits_used(d_bits_used), .d_valid(d_valid), .d_words(d_words),
    .d_kinds(d_kinds), .d_bad(d_bad));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters.
  int seen [6];
  int in_pair_hits = 0, long_lines = 0, short_lines = 0, wraps = 0;
  int back_to_back = 0, overlap = 0;

  always @(posedge clk) if (rst_n && c_valid && d_busy) overlap++;

  // Lines and their expected packed form, from the compression side to the
  // decompression side.
  logic [31:0]          lw   [NLINES][LINE_WORDS];
  logic [LINE_BITS-1:0] lexp [NLINES];
  int                   llen [NLINES];

  int cyc = 0;
  always @(posedge clk) cyc++;

  // Cycle in which the last pair of each line was applied.
  int last_cyc [NLINES];
  int sent = 0;

  task automatic compress_line(int n, RefDict m, ref logic [31:0] pool[$]);
    automatic bit q[$];
    automatic int pushes = 0;
    m.clear();
    for (int p = 0; p < LINE_PAIRS; p++) begin
      automatic logic [31:0] w0 = pick_word(pool);
      automatic logic [31:0] w1 = pick_word(pool);
      automatic int k0, k1, slot0, q_start;
      if ($urandom_range(0, 3) == 0) w1 = w0 ^ 32'($urandom_range(0, 255));
      // Every 7th line is raw random data, so the line grows past 512 bits.
      if (n % 7 == 3) begin w0 = $urandom | 32'h8000_0000; w1 = $urandom | 32'h4000_0000; end
      lw[n][2*p] = w0; lw[n][2*p+1] = w1;
      slot0 = m.wptr;
      q_start = q.size();
      encode_pair(q, w0, w1, m, k0, k1);
      seen[k0]++; seen[k1]++;
      pushes += int'(k0 inside {1, 2, 3, 5}) + int'(k1 inside {1, 2, 3, 5});
      if (k1 inside {2, 3, 5} && k0 inside {1, 2, 3, 5}) begin
        automatic int off = q_start + kind_bits(k0, 4) + ((k1 == 2) ? 2 : 4);
        automatic int idx = 0;
        for (int b = 0; b < 4; b++) idx = (idx << 1) | int'(q[off + b]);
        if (idx == slot0) in_pair_hits++;
      end
      @(posedge clk);
      #1;
      if (p == 0 && c_valid) back_to_back++;
      c_valid = 1; c_first = (p == 0); c_words[0] = w0; c_words[1] = w1;
      // Idle cycles inside a line now and then.
      if (p < LINE_PAIRS - 1 && $urandom_range(0, 7) == 0) begin
        @(posedge clk);
        #1 c_valid = 0;
      end
    end
    last_cyc[n] = cyc;
    if (pushes == LINE_WORDS) wraps++;
    lexp[n] = '0;
    foreach (q[i]) lexp[n][LINE_BITS-1-i] = q[i];
    llen[n] = q.size();
    if (q.size() > 512) long_lines++; else short_lines++;
    sent = n + 1;
  endtask

  // Packed lines as produced by the design, checked and captured on
  // line_valid, which must come two cycles after the cycle of the last pair.
  logic [LINE_BITS-1:0] got_bits [NLINES];
  int cap = 0;
  always @(negedge clk) if (rst_n && c_line_valid) begin
    checks++;
    if (cap >= sent || cyc != last_cyc[cap] + 2 || c_line_bits != lexp[cap] ||
        c_line_len != 10'(llen[cap])) begin
      failures++;
      if (failures < 10)
        $display("FAIL line %0d: cycle %0d (last pair %0d) len %0d expected %0d", cap, cyc,
                 last_cyc[cap], c_line_len, llen[cap]);
    end
    if (cap < NLINES) got_bits[cap] = c_line_bits;
    cap++;
  end

  task automatic decompress_line(int n);
    wait (cap > n);
    @(posedge clk);
    #1 d_load = 1; d_line_bits = got_bits[n];
    @(posedge clk);
    #1 d_load = 0;
    @(posedge clk);
    #1;
    for (int p = 0; p < LINE_PAIRS; p++) begin
      checks++;
      if (!d_valid || d_bad || d_words[0] != lw[n][2*p] || d_words[1] != lw[n][2*p+1]) begin
        failures++;
        if (failures < 10)
          $display("FAIL line %0d pair %0d: valid %0b words %h %h expected %h %h", n, p, d_valid,
                   d_words[0], d_words[1], lw[n][2*p], lw[n][2*p+1]);
      end
      @(posedge clk);
      #1;
    end
    checks++;
    if (d_valid || d_busy || d_bits_used != 10'(llen[n])) begin
      failures++;
      $display("FAIL line %0d end: valid %0b busy %0b used %0d expected %0d", n, d_valid, d_busy,
               d_bits_used, llen[n]);
    end
  endtask

  initial begin
    automatic RefDict m = new(N);
    logic [31:0] pool[$];
    c_valid = 0; c_first = 0; c_words[0] = 0; c_words[1] = 0;
    d_load = 0; d_line_bits = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    fork
      begin
        for (int n = 0; n < NLINES; n++) begin
          compress_line(n, m, pool);
          // Between lines: none, or a few idle cycles.
          if ($urandom_range(0, 1) == 0) begin
            @(posedge clk);
            #1 c_valid = 0;
            repeat ($urandom_range(0, 2)) @(posedge clk);
          end
        end
        @(posedge clk);
        #1 c_valid = 0;
      end
      for (int n = 0; n < NLINES; n++) decompress_line(n);
    join
    checks++;
    if (cap != NLINES) begin failures++; $display("FAIL %0d lines out of %0d", cap, NLINES); end

    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL kind %0d never occurred", i); end
    end
    checks += 6;
    if (in_pair_hits == 0) begin failures++; $display("FAIL no in-pair match"); end
    if (long_lines == 0)   begin failures++; $display("FAIL no line above 512 bits"); end
    if (short_lines == 0)  begin failures++; $display("FAIL no line below 512 bits"); end
    if (wraps == 0)        begin failures++; $display("FAIL no dictionary wrap"); end
    if (back_to_back == 0) begin failures++; $display("FAIL no back-to-back lines"); end
    if (overlap == 0)      begin failures++; $display("FAIL paths never busy together"); end
    $display("kinds zzzz %0d xxxx %0d mmmm %0d mmxx %0d zzzx %0d mmmx %0d", seen[0], seen[1],
             seen[2], seen[3], seen[4], seen[5]);
    $display("in-pair %0d long %0d short %0d wraps %0d back-to-back %0d overlap %0d",
             in_pair_hits, long_lines, short_lines, wraps, back_to_back, overlap);
    begin
      automatic longint total = 0;
      foreach (llen[i]) total += longint'(llen[i]);
      $display("packed size %0d of %0d bits: %0d.%02d %% of the original", total, NLINES * 512,
               (total * 100) / (NLINES * 512), ((total * 10000) / (NLINES * 512)) % 100);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
