// tb_cpack_pattern_match: checks the zzzz / zzzx detector on directed corner
// words and on random words, against a byte-by-byte reference.
module tb_cpack_pattern_match;
  import cpack_pkg::*;

  word_t w;
  logic  is_zzzz, is_zzzx;
  int    checks = 0, failures = 0;

  cpack_pattern_match dut (.word(w), .is_zzzz(is_zzzz), .is_zzzx(is_zzzx));

  task automatic check_word(word_t x);
    bit ez, ex;
    w = x;
    #1;
    ez = (x[31:24] == 0) && (x[23:16] == 0) && (x[15:8] == 0) && (x[7:0] == 0);
    ex = (x[31:24] == 0) && (x[23:16] == 0) && (x[15:8] == 0) && (x[7:0] != 0);
    checks++;
    if (is_zzzz !== ez || is_zzzx !== ex) begin
      failures++;
      $display("FAIL word %h: zzzz %0b zzzx %0b, expected %0b %0b", x, is_zzzz, is_zzzx, ez, ex);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Directed: the worked example word 000000AB is zzzx.
    check_word(32'h0000_00AB);
    check_word(32'h0000_0000);
    check_word(32'h0000_0001);
    check_word(32'h0000_0100);
    check_word(32'h0001_0000);
    check_word(32'h8000_0000);
    check_word(32'hFFFF_FFFF);
    for (int i = 0; i < 2000; i++) begin
      automatic word_t x = $urandom;
      case (i % 4)
        0: x[31:8] = '0;
        1: x = '0;
        2: x[31:16] = '0;
        default: ;
      endcase
      check_word(x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
