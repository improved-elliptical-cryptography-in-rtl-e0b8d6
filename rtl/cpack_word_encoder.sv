// cpack_word_encoder: encodes one 32-bit word in the C-Pack format.
//
// The word is first checked against the static patterns zzzz and zzzx; a
// pattern match is coded at once and the word is not pushed into the
// dictionary. Otherwise the word is compared with every dictionary entry and
// coded as mmmm, mmmx or mmxx (code, index, unmatched bytes), or as xxxx
// (code and raw word) when no entry shares its upper two bytes. Every word
// that matched no static pattern is to be pushed into the dictionary
// (push = 1), whether or not it matched an entry.
//
// cw holds the compressed word left-aligned (first bit in cw[CW_W-1]); the
// bits below cw[CW_W-len] are zero. Purely combinational.
//
// Pattern-before-dictionary and the push rule follow the C-Pack flow; the
// code values are listed in cpack_pkg.
module cpack_word_encoder
  import cpack_pkg::*;
#(
  parameter int unsigned DICT_ENTRIES = 16,
  localparam int unsigned IDX_W = $clog2(DICT_ENTRIES)
) (
  input  word_t            word,
  input  word_t            entries [DICT_ENTRIES],
  output logic [CW_W-1:0]  cw,
  output logic [5:0]       len,
  output kind_e            kind,
  output logic             push
);

  logic             is_zzzz, is_zzzx;
  logic [1:0]       level;
  logic [IDX_W-1:0] idx;

  cpack_pattern_match u_pat (
    .word    (word),
    .is_zzzz (is_zzzz),
    .is_zzzx (is_zzzx)
  );

  cpack_dict_match #(.DICT_ENTRIES(DICT_ENTRIES)) u_dm (
    .word    (word),
    .entries (entries),
    .level   (level),
    .idx     (idx)
  );

  always_comb begin
    if (is_zzzz)          kind = K_ZZZZ;
    else if (is_zzzx)     kind = K_ZZZX;
    else if (level == 3)  kind = K_MMMM;
    else if (level == 2)  kind = K_MMMX;
    else if (level == 1)  kind = K_MMXX;
    else                  kind = K_XXXX;

    push = !(is_zzzz || is_zzzx);
    len  = kind_len(kind, IDX_W);

    cw = '0;
    case (kind)
      K_ZZZZ: cw[CW_W-1 -: 2] = CODE_ZZZZ;
      K_XXXX: cw[CW_W-1 -: 34] = {CODE_XXXX, word};
      K_MMMM: cw[CW_W-1 -: 2+IDX_W] = {CODE_MMMM, idx};
      K_MMXX: cw[CW_W-1 -: 4+IDX_W+16] = {CODE_MMXX, idx, word[15:0]};
      K_ZZZX: cw[CW_W-1 -: 12] = {CODE_ZZZX, word[7:0]};
      K_MMMX: cw[CW_W-1 -: 4+IDX_W+8] = {CODE_MMMX, idx, word[7:0]};
      default: cw = '0;
    endcase
  end

endmodule
