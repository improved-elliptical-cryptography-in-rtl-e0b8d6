// tb_cpack_line_unpacker: loads random packed lines and answers each window
// with a random consumed length, as a decompressor would. Checks that the
// window always shows the line's bits from the running read position (zeros
// past the end), that win_first marks only the first window, that exactly 8
// windows come per line, and that bits_used ends at the sum consumed.
module tb_cpack_line_unpacker;
  import cpack_pkg::*;

  localparam int LINE_WORDS = 16;
  localparam int LINE_PAIRS = LINE_WORDS / 2;
  localparam int LINE_BITS  = LINE_PAIRS * PAIR_W;

  logic                 clk = 0, rst_n = 0;
  logic                 load;
  logic [LINE_BITS-1:0] load_bits;
  logic [6:0]           consumed;
  logic                 win_valid, win_first, busy;
  logic [PAIR_W-1:0]    window;
  logic [9:0]           bits_used;
  int checks = 0, failures = 0;

  cpack_line_unpacker #(.LINE_WORDS(LINE_WORDS)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .load_bits(load_bits),
    .consumed(consumed), .win_valid(win_valid), .win_first(win_first),
    .window(window), .busy(busy), .bits_used(bits_used));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; load_bits = '0; consumed = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int line = 0; line < 300; line++) begin
      automatic logic [LINE_BITS-1:0] l;
      automatic int pos = 0;
      for (int i = 0; i < LINE_BITS; i += 32) l[LINE_BITS-1-i -: 32] = $urandom;
      @(posedge clk);
      #1 load = 1; load_bits = l;
      @(posedge clk);
      #1 load = 0; load_bits = '0;
      for (int p = 0; p < LINE_PAIRS; p++) begin
        automatic logic [PAIR_W-1:0] exp_win = '0;
        automatic int c = $urandom_range(4, 68);
        for (int i = 0; i < PAIR_W; i++)
          if (pos + i < LINE_BITS) exp_win[PAIR_W-1-i] = l[LINE_BITS-1-pos-i];
        consumed = 7'(c);
        #1;
        checks++;
        if (!win_valid || win_first != (p == 0) || window != exp_win || bits_used != 10'(pos)) begin
          failures++;
          if (failures < 10)
            $display("FAIL line %0d pair %0d: valid %0b first %0b pos %0d/%0d window %h expected %h",
                     line, p, win_valid, win_first, bits_used, pos, window, exp_win);
        end
        pos += c;
        @(posedge clk);
        #1;
      end
      checks++;
      if (win_valid || busy || bits_used != 10'(pos)) begin
        failures++;
        $display("FAIL line %0d end: valid %0b busy %0b bits_used %0d expected %0d",
                 line, win_valid, busy, bits_used, pos);
      end
      repeat ($urandom_range(0, 2)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
