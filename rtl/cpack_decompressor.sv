// cpack_decompressor: two-word-per-cycle C-Pack decompressor.
//
// in_bits is a window of the compressed stream, left-aligned, that starts at
// the first bit of a compressed pair; 68 bits always cover a whole pair. The
// code of word 0 is read from the top of the window, which gives its length
// and so the start of word 1. Word 0 is rebuilt from the dictionary as it
// stands, word 1 from the dictionary as word 0 leaves it (word 0 in the slot
// of the oldest entry when word 0 is pushed), exactly as the compressor saw
// them. Rebuilt words that were not static patterns are pushed into the
// FIFO dictionary, so it stays a copy of the compressor's. in_first marks the
// first pair of a line and empties the dictionary for that pair.
//
// consumed (combinational) is the length in bits of the pair at the top of
// the window, for the stream reader to advance by in the same cycle.
// Rebuilt words are registered: out_words appears one cycle after the
// window (latency 1, one pair per cycle), with the kind of each word in
// out_kind. out_bad flags an unused code.
//
// The mirrored dictionary update follows C-Pack; the 68-bit window, the
// combinational consumed length and the one-cycle latency are this design's
// choices.
module cpack_decompressor
  import cpack_pkg::*;
#(
  parameter int unsigned DICT_ENTRIES = 16,
  localparam int unsigned IDX_W = $clog2(DICT_ENTRIES)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              in_first,
  input  logic [PAIR_W-1:0] in_bits,
  output logic [6:0]        consumed,
  output logic              out_valid,
  output word_t             out_words [2],
  output kind_e             out_kind [2],
  output logic              out_bad
);

  word_t            dict_rd [DICT_ENTRIES];
  word_t            dict_w1 [DICT_ENTRIES];
  logic [IDX_W-1:0] dict_wptr;

  word_t             word0, word1;
  logic [5:0]        len0, len1;
  kind_e             kind0, kind1;
  logic              push0, push1, bad0, bad1;
  logic [PAIR_W-1:0] rest;

  cpack_dictionary #(.DICT_ENTRIES(DICT_ENTRIES)) u_dict (
    .clk        (clk),
    .rst_n      (rst_n),
    .clear      (in_valid && in_first),
    .push0      (in_valid && push0),
    .wdata0     (word0),
    .push1      (in_valid && push1),
    .wdata1     (word1),
    .rd_entries (dict_rd),
    .rd_wptr    (dict_wptr)
  );

  cpack_word_decoder #(.DICT_ENTRIES(DICT_ENTRIES)) u_dec0 (
    .cw      (in_bits[PAIR_W-1 -: CW_W]),
    .entries (dict_rd),
    .word    (word0),
    .len     (len0),
    .kind    (kind0),
    .push    (push0),
    .bad     (bad0)
  );

  always_comb begin
    dict_w1 = dict_rd;
    if (push0) dict_w1[dict_wptr] = word0;
    rest = in_bits << len0;
  end

  cpack_word_decoder #(.DICT_ENTRIES(DICT_ENTRIES)) u_dec1 (
    .cw      (rest[PAIR_W-1 -: CW_W]),
    .entries (dict_w1),
    .word    (word1),
    .len     (len1),
    .kind    (kind1),
    .push    (push1),
    .bad     (bad1)
  );

  assign consumed = 7'(len0) + 7'(len1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid    <= 1'b0;
      out_words[0] <= '0;
      out_words[1] <= '0;
      out_kind[0]  <= K_ZZZZ;
      out_kind[1]  <= K_ZZZZ;
      out_bad      <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_words[0] <= word0;
        out_words[1] <= word1;
        out_kind[0]  <= kind0;
        out_kind[1]  <= kind1;
        out_bad      <= bad0 || bad1;
      end
    end
  end

endmodule
