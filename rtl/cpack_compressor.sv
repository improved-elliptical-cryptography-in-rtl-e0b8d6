// cpack_compressor: two-word-per-cycle C-Pack compressor.
//
// Each cycle with in_valid high it takes two 32-bit words, word 0 first in
// stream order, and compresses both against one FIFO dictionary:
//  - word 0 is coded against the dictionary as it stands;
//  - word 1 is coded against the dictionary as word 0 leaves it. If word 0
//    is pushed it takes the slot of the oldest entry, so word 1 is compared
//    with word 0 and all entries except that oldest one, in parallel with
//    the coding of word 0. Two similar new words in one pair therefore still
//    find each other, and coding two words at once costs no compression.
// Words that match no static pattern are pushed into the dictionary, word 0
// before word 1. in_first marks the first pair of a cache line: the
// dictionary is emptied for that pair, so each line decodes on its own.
//
// Output, registered, one cycle after the input (latency 1, throughput one
// pair per cycle): out_pair holds compressed word 0 immediately followed by
// compressed word 1, left-aligned, with out_len their total length in bits
// (4 to 68) and out_kind the kind of each word. Bits of out_pair past
// out_len are zero.
//
// The two-words-per-cycle structure and the way word 1 sees word 0 follow
// C-Pack; the registered one-cycle latency and the valid-only interface are
// this design's choices.
module cpack_compressor
  import cpack_pkg::*;
#(
  parameter int unsigned DICT_ENTRIES = 16,
  localparam int unsigned IDX_W = $clog2(DICT_ENTRIES)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              in_first,
  input  word_t             in_words [2],
  output logic              out_valid,
  output logic [PAIR_W-1:0] out_pair,
  output logic [6:0]        out_len,
  output kind_e             out_kind [2]
);

  word_t            dict_rd [DICT_ENTRIES];
  word_t            dict_w1 [DICT_ENTRIES];
  logic [IDX_W-1:0] dict_wptr;

  logic [CW_W-1:0]  cw0, cw1;
  logic [5:0]       len0, len1;
  kind_e            kind0, kind1;
  logic             push0, push1;
  logic [PAIR_W-1:0] pair;

  cpack_dictionary #(.DICT_ENTRIES(DICT_ENTRIES)) u_dict (
    .clk        (clk),
    .rst_n      (rst_n),
    .clear      (in_valid && in_first),
    .push0      (in_valid && push0),
    .wdata0     (in_words[0]),
    .push1      (in_valid && push1),
    .wdata1     (in_words[1]),
    .rd_entries (dict_rd),
    .rd_wptr    (dict_wptr)
  );

  cpack_word_encoder #(.DICT_ENTRIES(DICT_ENTRIES)) u_enc0 (
    .word    (in_words[0]),
    .entries (dict_rd),
    .cw      (cw0),
    .len     (len0),
    .kind    (kind0),
    .push    (push0)
  );

  // Dictionary as seen by word 1: the oldest slot replaced by word 0 when
  // word 0 is pushed.
  always_comb begin
    dict_w1 = dict_rd;
    if (push0) dict_w1[dict_wptr] = in_words[0];
  end

  cpack_word_encoder #(.DICT_ENTRIES(DICT_ENTRIES)) u_enc1 (
    .word    (in_words[1]),
    .entries (dict_w1),
    .cw      (cw1),
    .len     (len1),
    .kind    (kind1),
    .push    (push1)
  );

  always_comb begin
    pair = {cw0, {CW_W{1'b0}}} | ({cw1, {CW_W{1'b0}}} >> len0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_pair    <= '0;
      out_len     <= '0;
      out_kind[0] <= K_ZZZZ;
      out_kind[1] <= K_ZZZZ;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_pair    <= pair;
        out_len     <= 7'(len0) + 7'(len1);
        out_kind[0] <= kind0;
        out_kind[1] <= kind1;
      end
    end
  end

endmodule
