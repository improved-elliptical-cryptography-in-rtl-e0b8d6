// tb_cpack_word_encoder: checks the single-word encoder.
//  - The worked example of the scheme with a four-entry dictionary
//    {12345678, AAAAAAAA, 12340000, 3527894E}: 000000AB -> (1101)AB,
//    BBBB2022 -> (01)BBBB2022, 123456AA -> (1110 00)AA.
//  - Random words against random 16-entry dictionaries, compared bit for
//    bit with the reference encoder; every kind must occur.
module tb_cpack_word_encoder;
  import cpack_pkg::*;
  import cpack_ref_pkg::*;

  localparam int N = 16;
  int checks = 0, failures = 0;

  // Four-entry instance for the worked example.
  word_t           w4, e4 [4];
  logic [CW_W-1:0] cw4;
  logic [5:0]      len4;
  kind_e           kind4;
  logic            push4;
  cpack_word_encoder #(.DICT_ENTRIES(4)) dut4 (
    .word(w4), .entries(e4), .cw(cw4), .len(len4), .kind(kind4), .push(push4));

  // Full-size instance.
  word_t           w, e [N];
  logic [CW_W-1:0] cw;
  logic [5:0]      len;
  kind_e           kind;
  logic            push;
  cpack_word_encoder #(.DICT_ENTRIES(N)) dut (
    .word(w), .entries(e), .cw(cw), .len(len), .kind(kind), .push(push));

  int seen [6];

  task automatic example(word_t x, logic [CW_W-1:0] exp_cw, int exp_len, kind_e exp_kind);
    w4 = x;
    #1;
    checks++;
    if (cw4 != exp_cw || len4 != 6'(exp_len) || kind4 != exp_kind) begin
      failures++;
      $display("FAIL example %h: cw %h len %0d kind %s, expected %h %0d %s",
               x, cw4, len4, kind4.name(), exp_cw, exp_len, exp_kind.name());
    end
  endtask

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
    example(32'h000000AB, {4'b1101, 8'hAB, 22'd0}, 12, K_ZZZX);
    example(32'hBBBB2022, {2'b01, 32'hBBBB2022}, 34, K_XXXX);
    example(32'h123456AA, {4'b1110, 2'b00, 8'hAA, 20'd0}, 14, K_MMMX);
    example(32'h12345678, {2'b10, 2'b00, 30'd0}, 4, K_MMMM);
    example(32'h1234ABCD, {4'b1100, 2'b00, 16'hABCD, 12'd0}, 22, K_MMXX);
    example(32'h00000000, {2'b00, 32'd0}, 2, K_ZZZZ);

    for (int t = 0; t < 4000; t++) begin
      automatic bit q[$];
      bit p;
      int k;
      logic [CW_W-1:0] exp_cw;
      if (t % 8 == 0) m.clear();
      w = pick_word(pool);
      foreach (e[i]) e[i] = m.ent[i];
      #1;
      k = encode(q, w, m, p);
      exp_cw = '0;
      foreach (q[i]) exp_cw[CW_W-1-i] = q[i];
      seen[k]++;
      checks++;
      if (cw != exp_cw || len != 6'(q.size()) || int'(kind) != k || push != p) begin
        failures++;
        if (failures < 10)
          $display("FAIL word %h: cw %h len %0d kind %0d push %0b, expected %h %0d %0d %0b",
                   w, cw, len, kind, push, exp_cw, q.size(), k, p);
      end
      if (p) m.push(w);
    end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL kind %0d never produced", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
