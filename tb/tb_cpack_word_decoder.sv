// tb_cpack_word_decoder: encodes random words with the reference encoder,
// places each compressed word at the top of a window followed by random
// bits, and checks that the decoder returns the original word, the right
// length, kind and push flag. Also decodes the worked example (111000)AA
// with a four-entry dictionary and the unused code 1111.
module tb_cpack_word_decoder;
  import cpack_pkg::*;
  import cpack_ref_pkg::*;

  localparam int N = 16;
  int checks = 0, failures = 0;

  logic [CW_W-1:0] cw;
  word_t           e [N];
  word_t           word;
  logic [5:0]      len;
  kind_e           kind;
  logic            push, bad;
  cpack_word_decoder #(.DICT_ENTRIES(N)) dut (
    .cw(cw), .entries(e), .word(word), .len(len), .kind(kind), .push(push), .bad(bad));

  logic [CW_W-1:0] cw4;
  word_t           e4 [4];
  word_t           word4;
  logic [5:0]      len4;
  kind_e           kind4;
  logic            push4, bad4;
  cpack_word_decoder #(.DICT_ENTRIES(4)) dut4 (
    .cw(cw4), .entries(e4), .word(word4), .len(len4), .kind(kind4), .push(push4), .bad(bad4));

  int seen [6];

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic RefDict m = new(N);
    logic [31:0] pool[$];

    e4[0] = 32'h12345678; e4[1] = 32'hAAAAAAAA; e4[2] = 32'h12340000; e4[3] = 32'h3527894E;
    cw4 = {4'b1110, 2'b00, 8'hAA, 20'hFFFFF};
    #1;
    checks++;
    if (word4 != 32'h123456AA || len4 != 6'd14 || kind4 != K_MMMX || !push4) begin
      failures++;
      $display("FAIL example (111000)AA: %h len %0d", word4, len4);
    end
    cw4 = {4'b1101, 8'hAB, 22'h3FFFFF};
    #1;
    checks++;
    if (word4 != 32'h000000AB || len4 != 6'd12 || kind4 != K_ZZZX || push4) begin
      failures++;
      $display("FAIL example (1101)AB: %h len %0d", word4, len4);
    end
    cw = {4'b1111, 30'h0};
    #1;
    checks++;
    if (!bad || push) begin failures++; $display("FAIL code 1111 not flagged"); end

    for (int t = 0; t < 4000; t++) begin
      automatic bit q[$];
      bit p;
      int k;
      if (t % 8 == 0) m.clear();
      begin
        automatic logic [31:0] x = pick_word(pool);
        foreach (e[i]) e[i] = m.ent[i];
        k = encode(q, x, m, p);
        cw = {$urandom, 2'($urandom)};
        foreach (q[i]) cw[CW_W-1-i] = q[i];
        #1;
        seen[k]++;
        checks++;
        if (word != x || len != 6'(q.size()) || int'(kind) != k || push != p || bad) begin
          failures++;
          if (failures < 10)
            $display("FAIL word %h kind %0d: got %h len %0d kind %0d push %0b", x, k, word, len, kind, push);
        end
        if (p) m.push(x);
      end
    end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL kind %0d never decoded", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
