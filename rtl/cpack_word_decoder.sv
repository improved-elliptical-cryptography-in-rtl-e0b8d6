// cpack_word_decoder: decodes one C-Pack compressed word.
//
// cw is a window of the compressed stream, left-aligned, whose first bit is
// the first bit of the compressed word. The decoder reads the 2-bit code, or
// the 4-bit code when the first two bits are 11, which gives the kind and
// so the length. A pattern code rebuilds the word from zeros and the
// unmatched byte; a dictionary code combines the matched bytes of the
// indexed entry with the unmatched bytes that follow the index; xxxx takes
// the raw word. push tells whether the word enters the dictionary (every
// kind except zzzz and zzzx), mirroring the encoder. Code 1111 is not used
// by the encoder: it gives kind K_BAD, bad = 1, a zero word and no push.
// Purely combinational.
//
// The rebuild rules follow C-Pack decompression; the handling of code 1111 is
// this design's choice.
module cpack_word_decoder
  import cpack_pkg::*;
#(
  parameter int unsigned DICT_ENTRIES = 16,
  localparam int unsigned IDX_W = $clog2(DICT_ENTRIES)
) (
  input  logic [CW_W-1:0]  cw,
  input  word_t            entries [DICT_ENTRIES],
  output word_t            word,
  output logic [5:0]       len,
  output kind_e            kind,
  output logic             push,
  output logic             bad
);

  logic [IDX_W-1:0] idx2, idx4;
  word_t            ent2, ent4;

  always_comb begin
    // Index position after a 2-bit and after a 4-bit code.
    idx2 = cw[CW_W-3 -: IDX_W];
    idx4 = cw[CW_W-5 -: IDX_W];
    ent2 = entries[idx2];
    ent4 = entries[idx4];

    case (cw[CW_W-1 -: 2])
      CODE_ZZZZ: kind = K_ZZZZ;
      CODE_XXXX: kind = K_XXXX;
      CODE_MMMM: kind = K_MMMM;
      default:
        case (cw[CW_W-1 -: 4])
          CODE_MMXX: kind = K_MMXX;
          CODE_ZZZX: kind = K_ZZZX;
          CODE_MMMX: kind = K_MMMX;
          default:   kind = K_BAD;
        endcase
    endcase

    bad  = (kind == K_BAD);
    push = !(kind == K_ZZZZ || kind == K_ZZZX || kind == K_BAD);
    len  = kind_len(kind, IDX_W);

    case (kind)
      K_XXXX:  word = cw[CW_W-3 -: 32];
      K_MMMM:  word = ent2;
      K_MMXX:  word = {ent4[31:16], cw[CW_W-5-IDX_W -: 16]};
      K_ZZZX:  word = {24'd0, cw[CW_W-5 -: 8]};
      K_MMMX:  word = {ent4[31:8], cw[CW_W-5-IDX_W -: 8]};
      default: word = '0;
    endcase
  end

endmodule
