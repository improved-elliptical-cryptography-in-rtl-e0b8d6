// cpack_dict_match: parallel dictionary search of the C-Pack compressor.
//
// Compares one word with all DICT_ENTRIES dictionary entries at once and
// returns the entry with the most matching bytes, counted from the most
// significant byte: a full match (mmmm), the upper three bytes (mmmx) or the
// upper two bytes (mmxx). Among entries with the same number of matching
// bytes the lowest index wins. Purely combinational.
//
//   level = 3 full match, 2 upper three bytes, 1 upper two bytes, 0 no match
//   idx   = index of the chosen entry (0 when level is 0)
//
// Parallel comparison with all entries and the 'most matching bytes' rule are
// C-Pack's; counting bytes from the top, requiring at least two, and the
// lowest-index tie-break are this design's choices.
module cpack_dict_match
  import cpack_pkg::*;
#(
  parameter int unsigned DICT_ENTRIES = 16,
  localparam int unsigned IDX_W = $clog2(DICT_ENTRIES)
) (
  input  word_t             word,
  input  word_t             entries [DICT_ENTRIES],
  output logic [1:0]        level,
  output logic [IDX_W-1:0]  idx
);

  logic [1:0] ent_level [DICT_ENTRIES];

  always_comb begin
    for (int i = 0; i < DICT_ENTRIES; i++) begin
      if (entries[i] == word)                    ent_level[i] = 2'd3;
      else if (entries[i][31:8] == word[31:8])   ent_level[i] = 2'd2;
      else if (entries[i][31:16] == word[31:16]) ent_level[i] = 2'd1;
      else                                       ent_level[i] = 2'd0;
    end
    level = 2'd0;
    idx   = '0;
    // Scan from the highest index down so that the lowest index wins a tie.
    for (int i = DICT_ENTRIES - 1; i >= 0; i--) begin
      if (ent_level[i] != 2'd0 && ent_level[i] >= level) begin
        level = ent_level[i];
        idx   = IDX_W'(i);
      end
    end
  end

endmodule
