// cpack_pkg: shared constants, types and code table of the C-Pack cache
// compressor and decompressor.
//
// A 32-bit word is compressed into one of six formats. Each compressed word
// is written most-significant bit first: the code, then (for dictionary
// matches) the dictionary index, then the bytes that did not match.
//
//   kind  meaning                              code   payload          bits (16-entry dict)
//   zzzz  all four bytes zero                  00     -                 2
//   xxxx  no match, word sent raw              01     4 bytes          34
//   mmmm  full match with a dictionary entry   10     index             6
//   mmxx  upper two bytes match an entry       1100   index + 2 bytes  24
//   zzzx  upper three bytes zero               1101   1 byte           12
//   mmmx  upper three bytes match an entry     1110   index + 1 byte   16
//
// The codes 01 (xxxx), 1101 (zzzx) and 1110 (mmmx) and the 2-bit index of the
// four-entry example follow the published worked example of the scheme; the
// codes of zzzz, mmmm and mmxx complete the table with the remaining 2-bit and
// 4-bit values. Code 1111 is unused and flagged as an error by the decoder.
package cpack_pkg;

  localparam int unsigned WORD_W = 32;
  // Longest compressed word: 2-bit code + 32-bit raw word.
  localparam int unsigned CW_W   = 34;
  // Two compressed words side by side.
  localparam int unsigned PAIR_W = 2 * CW_W;

  typedef logic [WORD_W-1:0] word_t;

  typedef enum logic [2:0] {
    K_ZZZZ = 3'd0,
    K_XXXX = 3'd1,
    K_MMMM = 3'd2,
    K_MMXX = 3'd3,
    K_ZZZX = 3'd4,
    K_MMMX = 3'd5,
    K_BAD  = 3'd7
  } kind_e;

  localparam logic [1:0] CODE_ZZZZ = 2'b00;
  localparam logic [1:0] CODE_XXXX = 2'b01;
  localparam logic [1:0] CODE_MMMM = 2'b10;
  localparam logic [3:0] CODE_MMXX = 4'b1100;
  localparam logic [3:0] CODE_ZZZX = 4'b1101;
  localparam logic [3:0] CODE_MMMX = 4'b1110;

  // Length in bits of a compressed word of the given kind, for a dictionary
  // index of idx_w bits.
  function automatic logic [5:0] kind_len(kind_e k, int unsigned idx_w);
    case (k)
      K_ZZZZ:  return 6'd2;
      K_XXXX:  return 6'd34;
      K_MMMM:  return 6'(2 + idx_w);
      K_MMXX:  return 6'(4 + idx_w + 16);
      K_ZZZX:  return 6'd12;
      K_MMMX:  return 6'(4 + idx_w + 8);
      default: return 6'd4;
    endcase
  endfunction

endpackage
