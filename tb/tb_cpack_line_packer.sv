// tb_cpack_line_packer: sends lines of 8 random-length pairs (4 to 68 bits,
// zero past their length) into the packer, with idle cycles and
// back-to-back lines, and checks that line_valid comes exactly one cycle
// after the last pair and that line_bits/line_len equal the concatenation of
// the pairs. Lines longer than the 512 uncompressed bits occur on purpose.
module tb_cpack_line_packer;
  import cpack_pkg::*;

  localparam int LINE_WORDS = 16;
  localparam int LINE_PAIRS = LINE_WORDS / 2;
  localparam int LINE_BITS  = LINE_PAIRS * PAIR_W;

  logic                 clk = 0, rst_n = 0;
  logic                 in_valid, in_first;
  logic [PAIR_W-1:0]    in_pair;
  logic [6:0]           in_len;
  logic                 line_valid;
  logic [LINE_BITS-1:0] line_bits;
  logic [9:0]           line_len;
  int checks = 0, failures = 0;
  int long_lines = 0;

  cpack_line_packer #(.LINE_WORDS(LINE_WORDS)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_first(in_first),
    .in_pair(in_pair), .in_len(in_len), .line_valid(line_valid),
    .line_bits(line_bits), .line_len(line_len));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit                   nxt_done = 0, exp_done = 0;
  logic [LINE_BITS-1:0] nxt_bits, exp_bits;
  int                   nxt_len, exp_len;

  always @(posedge clk) begin
    exp_done <= nxt_done; exp_bits <= nxt_bits; exp_len <= nxt_len;
  end

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (line_valid != exp_done) begin
      failures++;
      $display("FAIL line_valid %0b expected %0b at %0t", line_valid, exp_done, $time);
    end else if (exp_done) begin
      checks++;
      if (line_bits != exp_bits || line_len != 10'(exp_len)) begin
        failures++;
        if (failures < 10) $display("FAIL line len %0d expected %0d", line_len, exp_len);
      end
    end
  end

  initial begin
    in_valid = 0; in_first = 0; in_pair = '0; in_len = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int line = 0; line < 400; line++) begin
      automatic bit q[$];
      for (int p = 0; p < LINE_PAIRS; p++) begin
        automatic int len = (line % 5 == 0) ? $urandom_range(60, 68) : $urandom_range(4, 68);
        automatic logic [PAIR_W-1:0] v = {$urandom, $urandom, 4'($urandom)};
        while ($urandom_range(0, 4) == 0) begin
          @(posedge clk);
          #1 in_valid = 0; nxt_done = 0;
        end
        for (int i = 0; i < PAIR_W - len; i++) v[i] = 1'b0;
        for (int i = 0; i < len; i++) q.push_back(v[PAIR_W-1-i]);
        @(posedge clk);
        #1;
        in_valid = 1; in_first = (p == 0); in_pair = v; in_len = 7'(len);
        nxt_done = (p == LINE_PAIRS - 1);
        if (nxt_done) begin
          nxt_bits = '0;
          foreach (q[i]) nxt_bits[LINE_BITS-1-i] = q[i];
          nxt_len = q.size();
          if (q.size() > 512) long_lines++;
        end
      end
    end
    @(posedge clk);
    #1 in_valid = 0; nxt_done = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (long_lines == 0) begin failures++; $display("FAIL no line above 512 bits"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
