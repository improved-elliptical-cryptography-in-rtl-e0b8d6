// tb_cpack_dict_match: fills a 16-entry dictionary with random words and
// planted near-copies of the probe word, and checks the chosen match level
// and index against a reference that counts leading equal bytes.
module tb_cpack_dict_match;
  import cpack_pkg::*;
  import cpack_ref_pkg::*;

  localparam int N = 16;
  word_t      w;
  word_t      ent [N];
  logic [1:0] level;
  logic [3:0] idx;
  int checks = 0, failures = 0;

  cpack_dict_match #(.DICT_ENTRIES(N)) dut (.word(w), .entries(ent), .level(level), .idx(idx));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int best, bidx, elevel;
      w = $urandom;
      foreach (ent[i]) ent[i] = $urandom;
      // Plant a few entries sharing 2, 3 or 4 leading bytes with the probe.
      repeat ($urandom_range(0, 4)) begin
        automatic int s = $urandom_range(0, N - 1);
        case ($urandom_range(0, 2))
          0: ent[s] = w;
          1: ent[s] = {w[31:8], 8'($urandom)};
          default: ent[s] = {w[31:16], 16'($urandom)};
        endcase
      end
      #1;
      best = 0; bidx = 0;
      for (int i = 0; i < N; i++) begin
        automatic int k = lead_bytes(w, ent[i]);
        if (k >= 2 && k > best) begin best = k; bidx = i; end
      end
      elevel = (best == 0) ? 0 : best - 1;
      checks++;
      if (level != 2'(elevel) || (elevel != 0 && idx != 4'(bidx))) begin
        failures++;
        if (failures < 10)
          $display("FAIL t=%0d word %h: level %0d idx %0d, expected %0d %0d", t, w, level, idx, elevel, bidx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
