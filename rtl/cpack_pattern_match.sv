// cpack_pattern_match: static pattern detector of the C-Pack compressor.
//
// Compares one 32-bit word with the two static patterns of the scheme:
// zzzz (all four bytes zero) and zzzx (upper three bytes zero, lowest byte
// not zero). The two outputs are mutually exclusive, so a zero word is
// reported only as zzzz. Purely combinational.
//
// The two patterns are those of the C-Pack scheme; reporting a zero word only
// as zzzz (the shorter code) is this design's choice.
module cpack_pattern_match
  import cpack_pkg::*;
(
  input  word_t word,
  output logic  is_zzzz,
  output logic  is_zzzx
);

  logic upper_zero;

  always_comb begin
    upper_zero = (word[31:8] == 24'd0);
    is_zzzz    = upper_zero && (word[7:0] == 8'd0);
    is_zzzx    = upper_zero && (word[7:0] != 8'd0);
  end

endmodule
